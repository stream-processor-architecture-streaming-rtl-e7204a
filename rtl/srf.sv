// srf: Stream Register File, the on-chip store that holds whole streams between
// the streaming memory system and the ALU clusters.
//
// The array of WORDS words is split into BW banks (word a lives in bank a%BW,
// row a/BW), so one access moves up to BW consecutive words starting at any
// address: BW is the SRF bandwidth in words per cycle. The whole SRF makes one
// access per cycle, shared by NPORTS stream ports through a round-robin
// arbiter. Each port owns a stream buffer (FIFO of SB_DEPTH words, at least
// BW) that converts between BW-word array accesses and the one word per cycle
// its client moves.
// A port is started with a command (srf_cmd_t): base address, length and
// direction. While it runs, its client streams words through valid/ready
// handshakes at up to one word per cycle:
//   read port  (wr=0): the port reads ahead min(BW, words left) words whenever
//                      its buffer has room for them besides any read in
//                      flight; the client takes words from rd_valid/rd_data.
//   write port (wr=1): the client pushes words with wr_valid/wr_data into the
//                      buffer; once min(BW, words left) are buffered the port
//                      writes them to the array in one access.
// done[p] pulses for one cycle when a read port has handed its last word to
// the client, or when a write port has written its last word into the array;
// busy[p] is high from the command until then. A command to a busy port, or
// one of length 0, is ignored.
// Timing: an array read returns on the next clock edge into the port's buffer,
// so a read port's first word is visible three cycles after its command. A
// port streams one word per cycle when SB_DEPTH >= max(2*BW, BW+2), room for
// a read in flight plus the next one; a smaller buffer is legal but slower.
// The SRF as shared storage between memory system and clusters, with its
// bandwidth and its stream buffers as parameters, follows the source
// architecture; the banked single-access array, per-port FIFOs and
// round-robin arbitration are this design's choices.
module srf
  import sp_pkg::srf_cmd_t, sp_pkg::LEN_W;
#(
  parameter int DW       = sp_pkg::DATA_W,
  parameter int WORDS    = 8192,
  parameter int BW       = 4,
  parameter int NPORTS   = sp_pkg::N_SRF_PORTS,
  parameter int SB_DEPTH = 8,
  localparam int AW  = $clog2(WORDS),
  localparam int BB  = (BW > 1) ? $clog2(BW) : 1,
  localparam int RW  = (WORDS / BW > 1) ? $clog2(WORDS / BW) : 1,
  localparam int NW  = $clog2(BW + 1),
  localparam int IW  = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int CW  = $clog2(SB_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // port control
  input  logic          cmd_valid [NPORTS],
  input  srf_cmd_t      cmd       [NPORTS],
  output logic          busy      [NPORTS],
  output logic          done      [NPORTS],
  // SRF -> client (read ports)
  output logic          rd_valid  [NPORTS],
  output logic [DW-1:0] rd_data   [NPORTS],
  input  logic          rd_ready  [NPORTS],
  // client -> SRF (write ports)
  input  logic          wr_valid  [NPORTS],
  input  logic [DW-1:0] wr_data   [NPORTS],
  output logic          wr_ready  [NPORTS]
);

  // per-port state
  logic              active  [NPORTS];
  logic              dir_wr  [NPORTS];
  logic [AW-1:0]     addr    [NPORTS];
  logic [LEN_W-1:0]  acc_left[NPORTS];   // words still to move through the array
  logic [LEN_W-1:0]  cli_left[NPORTS];   // client handshakes still to do
  logic [NW-1:0]     n_acc   [NPORTS];   // words in this port's next access

  // per-port buffer signals
  logic [NW-1:0]             fb_push_n[NPORTS];
  logic [BW-1:0][DW-1:0]     fb_din   [NPORTS];
  logic [NW-1:0]             fb_pop_n [NPORTS];
  logic [BW-1:0][DW-1:0]     fb_dout  [NPORTS];
  logic                      fb_full  [NPORTS];
  logic                      fb_empty [NPORTS];
  logic [CW-1:0]             fb_count [NPORTS];

  logic [NPORTS-1:0] req, gnt;
  logic [IW-1:0]     gnt_idx;

  // the granted access
  logic [AW-1:0]     g_addr;
  logic [NW-1:0]     g_n;
  logic              g_wr;
  logic [BB-1:0]     g_off;       // g_addr modulo BW

  // read in flight: returns into port rd_port next cycle
  logic              rd_pend;
  logic [IW-1:0]     rd_port;
  logic [NW-1:0]     rd_n;
  logic [BB-1:0]     rd_off;
  logic [DW-1:0]     bank_rd [BW];
  logic [BW-1:0][DW-1:0] rd_words;

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req, .gnt, .gnt_idx
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic inflight;
    assign inflight = rd_pend && (rd_port == IW'(p));
    assign n_acc[p] = (acc_left[p] < LEN_W'(BW)) ? NW'(acc_left[p]) : NW'(BW);

    stream_buffer #(.WIDTH(DW), .DEPTH(SB_DEPTH), .NIN(BW), .NOUT(BW)) u_sb (
      .clk, .rst_n, .clr(1'b0),
      .push_n(fb_push_n[p]), .din  (fb_din[p]),
      .pop_n (fb_pop_n[p]),  .dout (fb_dout[p]),
      .full  (fb_full[p]),   .empty(fb_empty[p]),
      .count (fb_count[p])
    );

    // array request
    assign req[p] = active[p] && acc_left[p] != '0 &&
                    (dir_wr[p] ? (fb_count[p] >= CW'(n_acc[p]))
                               : (32'(fb_count[p]) + (inflight ? 32'(rd_n) : 0)
                                  + 32'(n_acc[p])) <= SB_DEPTH);

    // client side
    assign rd_valid[p] = active[p] && !dir_wr[p] && !fb_empty[p];
    assign rd_data[p]  = fb_dout[p][0];
    assign wr_ready[p] = active[p] && dir_wr[p] && !fb_full[p] && cli_left[p] != '0;

    // buffer traffic
    assign fb_push_n[p] = dir_wr[p] ? NW'(wr_valid[p] && wr_ready[p])
                                    : (inflight ? rd_n : '0);
    assign fb_din[p]    = dir_wr[p] ? (BW*DW)'(wr_data[p]) : rd_words;
    assign fb_pop_n[p]  = dir_wr[p] ? (gnt[p] ? n_acc[p] : '0)
                                    : NW'(rd_valid[p] && rd_ready[p]);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        active[p]   <= 1'b0;
        dir_wr[p]   <= 1'b0;
        addr[p]     <= '0;
        acc_left[p] <= '0;
        cli_left[p] <= '0;
        done[p]     <= 1'b0;
      end else begin
        done[p] <= 1'b0;
        if (!active[p]) begin
          if (cmd_valid[p] && cmd[p].len != '0) begin
            active[p]   <= 1'b1;
            dir_wr[p]   <= cmd[p].wr;
            addr[p]     <= AW'(cmd[p].base);
            acc_left[p] <= cmd[p].len;
            cli_left[p] <= cmd[p].len;
          end
        end else begin
          if (gnt[p]) begin
            addr[p]     <= addr[p] + AW'(n_acc[p]);
            acc_left[p] <= acc_left[p] - LEN_W'(n_acc[p]);
          end
          if (dir_wr[p]) begin
            if (wr_valid[p] && wr_ready[p]) cli_left[p] <= cli_left[p] - 1'b1;
            if (gnt[p] && acc_left[p] == LEN_W'(n_acc[p])) begin
              active[p] <= 1'b0;
              done[p]   <= 1'b1;
            end
          end else begin
            if (rd_valid[p] && rd_ready[p]) begin
              cli_left[p] <= cli_left[p] - 1'b1;
              if (cli_left[p] == LEN_W'(1)) begin
                active[p] <= 1'b0;
                done[p]   <= 1'b1;
              end
            end
          end
        end
      end
    end

    assign busy[p] = active[p];
  end

  assign g_addr = addr[gnt_idx];
  assign g_n    = |gnt ? n_acc[gnt_idx] : '0;
  assign g_wr   = dir_wr[gnt_idx];
  assign g_off  = BB'(g_addr % AW'(BW));

  // banks: bank b holds word k = (b - g_off) mod BW of the access; each bank
  // is a separate single-ported memory of WORDS/BW words
  for (genvar b = 0; b < BW; b++) begin : g_bank
    logic [DW-1:0] mem [WORDS / BW];
    logic [BB-1:0] k;
    logic [AW-1:0] a;
    logic [RW-1:0] row;
    assign k   = BB'(BB'(b) - g_off);
    assign a   = g_addr + AW'(k);
    assign row = RW'(a / AW'(BW));

    always_ff @(posedge clk) begin
      if (g_wr && 32'(k) < 32'(g_n)) mem[row] <= fb_dout[gnt_idx][k];
      bank_rd[b] <= mem[row];
    end
  end

  // returned words back in stream order
  for (genvar k = 0; k < BW; k++) begin : g_ret
    assign rd_words[k] = bank_rd[BB'(rd_off + BB'(k))];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_port <= '0;
      rd_n    <= '0;
      rd_off  <= '0;
    end else begin
      rd_pend <= |gnt && !g_wr;
      rd_port <= gnt_idx;
      rd_n    <= g_n;
      rd_off  <= g_off;
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n)
      gnt[p] |-> req[p]);
  end
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
