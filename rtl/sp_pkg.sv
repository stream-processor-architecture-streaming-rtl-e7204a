// sp_pkg: types and constants shared by the stream processor blocks.
//
// The stream processor keeps streams in a Stream Register File (SRF) and moves
// them between the SRF and external SDRAM with a streaming memory system, under
// the control of a stream controller that executes instructions from a host.
// This package holds the data width, the stream instruction format the host
// writes, the command format of an SRF stream port, and the fixed assignment of
// SRF stream ports to their clients. The instruction set (load, store, kernel,
// set-coefficient) and every width here are choices of this design; the source
// architecture names the operations but gives no encoding.
package sp_pkg;

  // Word width of the SRF, stream buffers and the SDRAM data path.
  parameter int DATA_W = 32;
  // Width of SRF address fields in instructions (up to 64K SRF words).
  parameter int SRF_AW = 16;
  // Width of SDRAM word addresses.
  parameter int MEM_AW = 32;
  // Width of stream length and image width fields.
  parameter int LEN_W  = 16;
  // Convolution coefficient width (signed).
  parameter int COEF_W = 8;

  typedef enum logic [2:0] {
    SOP_NOP     = 3'd0,
    SOP_LOAD    = 3'd1,   // SDRAM[mem_addr..] -> SRF[srf_a..], len words
    SOP_STORE   = 3'd2,   // SRF[srf_a..] -> SDRAM[mem_addr..], len words
    SOP_KERNEL  = 3'd3,   // kernel reads len words at srf_a, writes out_len at srf_b
    SOP_SETCOEF = 3'd4    // convolution coefficient coef_idx <= coef
  } sop_e;

  typedef enum logic [1:0] {
    K_RGB2YUV = 2'd0,     // dedicated RGB to YUV cluster
    K_CONV3X3 = 2'd1,     // dedicated 3x3 2D convolution cluster
    K_EXT     = 2'd2      // external programmable cluster (microcontroller)
  } kid_e;

  typedef struct packed {
    sop_e                      op;
    kid_e                      kernel;
    logic [SRF_AW-1:0]         srf_a;
    logic [SRF_AW-1:0]         srf_b;
    logic [MEM_AW-1:0]         mem_addr;
    logic [LEN_W-1:0]          len;
    logic [LEN_W-1:0]          out_len;
    logic [LEN_W-1:0]          width;
    logic [3:0]                coef_idx;
    logic signed [COEF_W-1:0]  coef;
  } stream_instr_t;

  // Command that starts one transfer on an SRF stream port.
  // wr=1: client writes len words into the SRF from base upwards.
  // wr=0: SRF delivers len words starting at base to the client.
  typedef struct packed {
    logic              wr;
    logic [SRF_AW-1:0] base;
    logic [LEN_W-1:0]  len;
  } srf_cmd_t;

  // SRF stream port assignment.
  localparam int P_MEM      = 0;
  localparam int P_YUV_IN   = 1;
  localparam int P_YUV_OUT  = 2;
  localparam int P_CONV_IN  = 3;
  localparam int P_CONV_OUT = 4;
  localparam int P_EXT_IN   = 5;
  localparam int P_EXT_OUT  = 6;
  localparam int N_SRF_PORTS = 7;

endpackage
