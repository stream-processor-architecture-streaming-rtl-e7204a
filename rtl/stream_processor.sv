// stream_processor: the streaming memory system of a stream processor, with
// its stream register file, stream controller and two dedicated test-case
// ALU clusters.
//
// Data flows in three levels: external SDRAM -> streaming memory system ->
// stream register file (SRF) -> ALU clusters, and back. The host sends stream
// instructions (sp_pkg::stream_instr_t) to the stream controller, which loads
// whole streams from SDRAM into the SRF, runs a kernel on a cluster from one
// SRF stream to another, and stores result streams back to SDRAM.
// SRF stream ports: 0 memory system, 1/2 RGB-to-YUV cluster in/out,
// 3/4 3x3 convolution cluster in/out, 5/6 external programmable cluster in/out.
// The external cluster (a microcontroller-driven ALU cluster, not part of this
// design) is reached through ext_*: ext_start pulses with ext_len/ext_out_len;
// it then reads ext_len words from ext_in_* and must write ext_out_len words to
// ext_out_*. SDRAM is reached through mem_*: request held until mem_gnt, read
// data returned in order on mem_rvalid.
// SRF_BW sets the SRF bandwidth (words per SRF access); SB_DEPTH should be at
// least max(2*SRF_BW, SRF_BW+2) for kernels to stream at one word per cycle.
// The block structure, and the SRF bandwidth and stream buffer sizes being
// parameters, follow the source architecture; widths, protocols, default
// sizes and the instruction set are this design's own (see the README).
module stream_processor
  import sp_pkg::*;
#(
  parameter int SRF_WORDS  = 8192,
  parameter int SRF_BW     = 4,
  parameter int SB_DEPTH   = 8,
  parameter int LD_DEPTH   = 8,
  parameter int IQ_DEPTH   = 8,
  parameter int CONV_MAX_W = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  // host
  input  logic                instr_valid,
  input  stream_instr_t       instr,
  output logic                instr_ready,
  output logic                instr_done,
  output logic                idle,
  // SDRAM
  output logic                mem_req,
  output logic                mem_we,
  output logic [MEM_AW-1:0]   mem_addr,
  output logic [DATA_W-1:0]   mem_wdata,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  logic [DATA_W-1:0]   mem_rdata,
  // external programmable cluster
  output logic                ext_start,
  output logic [LEN_W-1:0]    ext_len,
  output logic [LEN_W-1:0]    ext_out_len,
  output logic                ext_in_valid,
  output logic [DATA_W-1:0]   ext_in_data,
  input  logic                ext_in_ready,
  input  logic                ext_out_valid,
  input  logic [DATA_W-1:0]   ext_out_data,
  output logic                ext_out_ready
);

  // SRF port bundles
  logic              srf_cmd_valid [N_SRF_PORTS];
  srf_cmd_t          srf_cmd       [N_SRF_PORTS];
  logic              srf_busy      [N_SRF_PORTS];
  logic              srf_done      [N_SRF_PORTS];
  logic              rd_valid      [N_SRF_PORTS];
  logic [DATA_W-1:0] rd_data       [N_SRF_PORTS];
  logic              rd_ready      [N_SRF_PORTS];
  logic              wr_valid      [N_SRF_PORTS];
  logic [DATA_W-1:0] wr_data       [N_SRF_PORTS];
  logic              wr_ready      [N_SRF_PORTS];

  logic              mem_cmd_valid, mem_cmd_store, mem_done, mem_busy;
  logic [MEM_AW-1:0] mem_cmd_addr;
  logic [LEN_W-1:0]  mem_cmd_len;
  logic              conv_start, coef_we;
  logic [LEN_W-1:0]  conv_width;
  logic [3:0]        coef_idx;
  logic signed [COEF_W-1:0] coef_val;

  stream_controller #(.IQ_DEPTH(IQ_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_ready, .instr_done, .idle,
    .srf_cmd_valid, .srf_cmd, .srf_done,
    .mem_cmd_valid, .mem_cmd_store, .mem_cmd_addr, .mem_cmd_len, .mem_done,
    .conv_start, .conv_width, .coef_we, .coef_idx, .coef_val,
    .ext_start, .ext_len, .ext_out_len
  );

  srf #(.WORDS(SRF_WORDS), .BW(SRF_BW), .SB_DEPTH(SB_DEPTH)) u_srf (
    .clk, .rst_n,
    .cmd_valid(srf_cmd_valid), .cmd(srf_cmd), .busy(srf_busy), .done(srf_done),
    .rd_valid, .rd_data, .rd_ready,
    .wr_valid, .wr_data, .wr_ready
  );

  mem_system #(.LD_DEPTH(LD_DEPTH)) u_mem (
    .clk, .rst_n,
    .cmd_valid(mem_cmd_valid), .cmd_store(mem_cmd_store),
    .cmd_addr(mem_cmd_addr), .cmd_len(mem_cmd_len),
    .busy(mem_busy), .done(mem_done),
    .ld_valid(wr_valid[P_MEM]), .ld_data(wr_data[P_MEM]), .ld_ready(wr_ready[P_MEM]),
    .st_valid(rd_valid[P_MEM]), .st_data(rd_data[P_MEM]), .st_ready(rd_ready[P_MEM]),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  rgb2yuv_cluster u_yuv (
    .clk, .rst_n,
    .in_valid (rd_valid[P_YUV_IN]),  .in_data (rd_data[P_YUV_IN]),  .in_ready (rd_ready[P_YUV_IN]),
    .out_valid(wr_valid[P_YUV_OUT]), .out_data(wr_data[P_YUV_OUT]), .out_ready(wr_ready[P_YUV_OUT])
  );

  conv2d_cluster #(.MAX_W(CONV_MAX_W)) u_conv (
    .clk, .rst_n,
    .start(conv_start), .width(conv_width),
    .coef_we, .coef_idx, .coef_val,
    .in_valid (rd_valid[P_CONV_IN]),  .in_data (rd_data[P_CONV_IN]),  .in_ready (rd_ready[P_CONV_IN]),
    .out_valid(wr_valid[P_CONV_OUT]), .out_data(wr_data[P_CONV_OUT]), .out_ready(wr_ready[P_CONV_OUT])
  );

  // external cluster streams
  assign ext_in_valid       = rd_valid[P_EXT_IN];
  assign ext_in_data        = rd_data[P_EXT_IN];
  assign rd_ready[P_EXT_IN] = ext_in_ready;
  assign wr_valid[P_EXT_OUT] = ext_out_valid;
  assign wr_data[P_EXT_OUT]  = ext_out_data;
  assign ext_out_ready       = wr_ready[P_EXT_OUT];

  // unused directions of each port: read ports never write, write ports never read
  assign rd_ready[P_YUV_OUT]  = 1'b0;
  assign rd_ready[P_CONV_OUT] = 1'b0;
  assign rd_ready[P_EXT_OUT]  = 1'b0;
  assign wr_valid[P_YUV_IN]   = 1'b0;
  assign wr_data[P_YUV_IN]    = '0;
  assign wr_valid[P_CONV_IN]  = 1'b0;
  assign wr_data[P_CONV_IN]   = '0;
  assign wr_valid[P_EXT_IN]   = 1'b0;
  assign wr_data[P_EXT_IN]    = '0;

endmodule
