// srf_config_check: one configuration of the stream register file test, used
// by tb_srf once per (bandwidth, stream buffer depth) pair. Two ports write
// streams concurrently with random valid gaps, then three ports read them back
// concurrently with random ready gaps, so the shared array is contended; data,
// done pulses and the arbitration conflicts are checked. A final single-port
// read with the client always ready checks the streaming rate: when
// SB_DEPTH >= max(2*BW, BW+2) the last of N words is taken exactly N+2 cycles
// after the command; with a smaller buffer the port must be slower.
// Interface: clk in; checks, failures and finished out (finished rises once
// the sequence is over).
module srf_config_check #(
  parameter int BW       = 4,
  parameter int SB_DEPTH = 8
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import sp_pkg::*;
  initial begin checks = 0; failures = 0; end
  localparam int NP = 3, WORDS = 64, DW = 32;
  localparam bit FULL_RATE = SB_DEPTH >= 2 * BW && SB_DEPTH >= BW + 2;
  logic rst_n = 0;
  logic          cmd_valid [NP];
  srf_cmd_t      cmd       [NP];
  logic          busy      [NP];
  logic          done      [NP];
  logic          rd_valid  [NP];
  logic [DW-1:0] rd_data   [NP];
  logic          rd_ready  [NP];
  logic          wr_valid  [NP];
  logic [DW-1:0] wr_data   [NP];
  logic          wr_ready  [NP];
  int conflicts = 0, ndone [NP];
  int cyc = 0, t_cmd = 0, t_last = 0;

  srf #(.DW(DW), .WORDS(WORDS), .BW(BW), .NPORTS(NP), .SB_DEPTH(SB_DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL BW=%0d SB_DEPTH=%0d: %s at cycle %0d", BW, SB_DEPTH, what, cyc);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && $countones(dut.req) > 1) conflicts++;
    for (int p = 0; p < NP; p++) if (rst_n && done[p]) ndone[p]++;
  end

  function automatic logic [DW-1:0] pat(int a);
    return DW'(32'hA5000000 + a * 32'h00010101);
  endfunction

  task automatic start(int p, bit wr, int base, int len);
    cmd[p]       <= '{wr: wr, base: SRF_AW'(base), len: LEN_W'(len)};
    cmd_valid[p] <= 1'b1;
    @(posedge clk);
    t_cmd = cyc;
    cmd_valid[p] <= 1'b0;
  endtask

  task automatic writer(int p, int base, int len);
    int i = 0;
    start(p, 1'b1, base, len);
    while (i < len) begin
      wr_valid[p] <= ($urandom % 4) != 0;
      wr_data[p]  <= pat(base + i);
      @(posedge clk);
      if (wr_valid[p] && wr_ready[p]) i++;
    end
    wr_valid[p] <= 1'b0;
  endtask

  task automatic reader(int p, int base, int len, bit always_ready);
    int i = 0;
    start(p, 1'b0, base, len);
    while (i < len) begin
      rd_ready[p] <= always_ready || (($urandom % 3) != 0);
      @(posedge clk);
      if (rd_valid[p] && rd_ready[p]) begin
        check(rd_data[p] == pat(base + i), $sformatf("port %0d word %0d", p, i));
        i++;
        t_last = cyc;
      end
    end
    rd_ready[p] <= 1'b0;
  endtask

  initial begin
    finished = 1'b0;
    for (int p = 0; p < NP; p++) begin
      cmd_valid[p] = 0; cmd[p] = '0; rd_ready[p] = 0; wr_valid[p] = 0; wr_data[p] = '0; ndone[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      writer(0, 5, 20);
      writer(1, 30, 25);
    join
    // a write port still drains its buffer after the client is done
    repeat (2 * SB_DEPTH + 4) @(posedge clk);
    check(ndone[0] == 1 && ndone[1] == 1, $sformatf("write done pulses (%0d %0d)", ndone[0], ndone[1]));
    check(!busy[0] && !busy[1], "write ports idle");
    fork
      reader(2, 5, 20, 1'b0);
      reader(0, 30, 25, 1'b0);
      reader(1, 12, 13, 1'b0);
    join
    repeat (2) @(posedge clk);
    check(ndone[0] == 2 && ndone[1] == 2 && ndone[2] == 1, "read done pulses");
    check(conflicts > 0, "arbitration conflicts occurred");
    // rate: one word per cycle after a latency of three
    reader(2, 30, 25, 1'b1);
    // command taken at edge t_cmd, array read t_cmd+1, buffered t_cmd+2,
    // then one word per edge: the last of N words is taken at t_cmd+N+2
    // the buffer keeps up with the client only if it holds a read in flight
    // plus the next access: SB_DEPTH >= max(2*BW, BW+2); below that the
    // port streams slower than one word per cycle
    if (FULL_RATE)
      check(t_last - t_cmd == 25 + 2, $sformatf("streaming rate (%0d cycles)", t_last - t_cmd));
    else
      check(t_last - t_cmd > 25 + 2, $sformatf("reduced streaming rate (%0d cycles)", t_last - t_cmd));
    $display("BW=%0d SB_DEPTH=%0d: conflicts=%0d, %0d words in %0d cycles",
             BW, SB_DEPTH, conflicts, 25, t_last - t_cmd);
    finished = 1'b1;
  end
endmodule
