// mem_system: streaming memory system. Moves a whole stream, a block of
// consecutive words, between external SDRAM and one SRF stream port.
//
// A command (cmd_valid with cmd_store, cmd_addr, cmd_len) starts one transfer;
// busy stays high and done pulses for one cycle when it is complete.
//   load  (cmd_store=0): issues pipelined SDRAM reads at consecutive word
//         addresses and forwards the returning words, in order, to the SRF
//         write stream (ld_valid/ld_data/ld_ready). Reads are only issued while
//         the words already in the load buffer plus the reads still outstanding
//         fit in it, so returning data is never dropped however slowly the SRF
//         accepts it. done follows the handshake of the last word.
//   store (cmd_store=1): takes words from the SRF read stream
//         (st_valid/st_data/st_ready) and issues one SDRAM write per word;
//         done follows the grant of the last write.
// SDRAM interface: mem_req with mem_we/mem_addr/mem_wdata is held until
// mem_gnt; read data returns in request order on mem_rvalid/mem_rdata, any
// number of cycles later. The word-per-request protocol and the bound of
// LD_DEPTH reads in flight are this design's choices; streaming whole chunks
// between external memory and the SRF is the source architecture's function
// for this unit.
module mem_system
  import sp_pkg::DATA_W, sp_pkg::MEM_AW, sp_pkg::LEN_W;
#(
  parameter int LD_DEPTH = 8,
  localparam int CW = $clog2(LD_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the stream controller
  input  logic              cmd_valid,
  input  logic              cmd_store,
  input  logic [MEM_AW-1:0] cmd_addr,
  input  logic [LEN_W-1:0]  cmd_len,
  output logic              busy,
  output logic              done,
  // to SRF (stream load)
  output logic              ld_valid,
  output logic [DATA_W-1:0] ld_data,
  input  logic              ld_ready,
  // from SRF (stream store)
  input  logic              st_valid,
  input  logic [DATA_W-1:0] st_data,
  output logic              st_ready,
  // SDRAM
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata
);

  logic              active, store;
  logic [MEM_AW-1:0] addr;
  logic [LEN_W-1:0]  issue_left;   // SDRAM requests still to issue
  logic [LEN_W-1:0]  out_left;     // words still to hand to the SRF (load)
  logic [CW-1:0]     outstanding;  // reads issued, data not yet returned

  logic              lb_empty, lb_full;
  logic [CW-1:0]     lb_count;
  logic [DATA_W-1:0] lb_dout;
  logic              issue;

  stream_buffer #(.WIDTH(DATA_W), .DEPTH(LD_DEPTH)) u_ldbuf (
    .clk, .rst_n, .clr(1'b0),
    .push_n(mem_rvalid), .din(mem_rdata),
    .pop_n (ld_valid && ld_ready), .dout(lb_dout),
    .full (lb_full), .empty(lb_empty), .count(lb_count)
  );

  always_comb begin
    mem_we    = store;
    mem_addr  = addr;
    mem_wdata = st_data;
    if (!active || issue_left == '0) mem_req = 1'b0;
    else if (store)                  mem_req = st_valid;
    else mem_req = (32'(lb_count) + 32'(outstanding)) < LD_DEPTH;
    issue    = mem_req && mem_gnt;
    st_ready = active && store && issue;
    ld_valid = active && !store && !lb_empty;
    ld_data  = lb_dout;
  end

  assign busy = active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active      <= 1'b0;
      store       <= 1'b0;
      addr        <= '0;
      issue_left  <= '0;
      out_left    <= '0;
      outstanding <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      outstanding <= outstanding + CW'(issue && !store) - CW'(mem_rvalid);
      if (!active) begin
        if (cmd_valid && cmd_len != '0) begin
          active     <= 1'b1;
          store      <= cmd_store;
          addr       <= cmd_addr;
          issue_left <= cmd_len;
          out_left   <= cmd_len;
        end
      end else begin
        if (issue) begin
          addr       <= addr + 1'b1;
          issue_left <= issue_left - 1'b1;
          if (store && issue_left == LEN_W'(1)) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
        if (ld_valid && ld_ready) begin
          out_left <= out_left - 1'b1;
          if (out_left == LEN_W'(1)) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (!lb_full || (ld_valid && ld_ready)));
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req && !mem_gnt && !store) |=> mem_req);

endmodule
