// tb_stream_buffer: self-checking test of the stream buffer FIFO, in its
// multi-word form (up to 4 words in and 4 words out per cycle, depth 8) and
// its one-word form (depth 4). Random push and pop counts, including pushes
// that do not fit and pops larger than the fill level, are checked against a
// queue model: every visible output word, the full/empty flags and the count.
// Also checks the synchronous clear.
module tb_stream_buffer;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, clr = 0;
  int checks = 0, failures = 0;

  // multi-word instance
  localparam int D4 = 8, N4 = 4;
  logic [2:0]           push_n4 = '0, pop_n4 = '0;
  logic [N4-1:0][W-1:0] din4 = '0, dout4;
  logic                 full4, empty4;
  logic [3:0]           count4;
  // one-word instance
  localparam int D1 = 4;
  logic                 push1 = 0, pop1 = 0;
  logic [W-1:0]         din1 = '0, dout1;
  logic                 full1, empty1;
  logic [2:0]           count1;

  stream_buffer #(.WIDTH(W), .DEPTH(D4), .NIN(N4), .NOUT(N4)) dut4 (
    .clk, .rst_n, .clr, .push_n(push_n4), .din(din4), .pop_n(pop_n4), .dout(dout4),
    .full(full4), .empty(empty4), .count(count4));
  stream_buffer #(.WIDTH(W), .DEPTH(D1)) dut1 (
    .clk, .rst_n, .clr, .push_n(push1), .din(din1), .pop_n(pop1), .dout(dout1),
    .full(full1), .empty(empty1), .count(count1));

  logic [W-1:0] m4[$], m1[$];
  int nfull4 = 0, nfull1 = 0, nrefused = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 1200; i++) begin
      int pu4, po4, np4;
      bit pu1, po1, mp1, mq1;
      logic [N4-1:0][W-1:0] v4;
      logic [W-1:0] v1;
      @(negedge clk);
      // compare state with the models
      check(count4 == m4.size() && empty4 == (m4.size() == 0) && full4 == (m4.size() == D4), "flags (4)");
      for (int k = 0; k < N4; k++) if (k < m4.size()) check(dout4[k] == m4[k], $sformatf("dout4[%0d]", k));
      check(count1 == m1.size() && empty1 == (m1.size() == 0) && full1 == (m1.size() == D1), "flags (1)");
      if (m1.size() > 0) check(dout1 == m1[0], "dout1");
      if (full4) nfull4++;
      if (full1) nfull1++;
      // next stimulus
      pu4 = int'($urandom % 5); po4 = int'($urandom % 5);
      if (i > 600) po4 = int'($urandom % 3) + 2;
      for (int k = 0; k < N4; k++) v4[k] = W'($urandom);
      pu1 = ($urandom % 100) < (i < 600 ? 70 : 30);
      po1 = ($urandom % 100) < (i < 600 ? 40 : 70);
      v1 = W'($urandom);
      push_n4 <= 3'(pu4); pop_n4 <= 3'(po4); din4 <= v4;
      push1 <= pu1; pop1 <= po1; din1 <= v1;
      @(posedge clk);
      // model update
      np4 = (po4 > m4.size()) ? m4.size() : po4;
      for (int k = 0; k < np4; k++) void'(m4.pop_front());
      if (pu4 <= D4 - m4.size()) begin
        for (int k = 0; k < pu4; k++) m4.push_back(v4[k]);
      end else nrefused++;
      mq1 = po1 && m1.size() > 0;
      mp1 = pu1 && (m1.size() < D1 || mq1);
      if (mq1) void'(m1.pop_front());
      if (mp1) m1.push_back(v1);
    end
    @(negedge clk);
    push_n4 <= 0; pop_n4 <= 0; push1 <= 0; pop1 <= 0;
    clr <= 1; @(posedge clk); clr <= 0;
    @(negedge clk);
    check(empty4 && count4 == 0 && empty1 && count1 == 0, "clear");
    check(nfull4 > 0 && nfull1 > 0, "full reached");
    check(nrefused > 0, "oversized push refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
