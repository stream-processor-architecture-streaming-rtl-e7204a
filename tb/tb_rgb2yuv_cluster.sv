// tb_rgb2yuv_cluster: self-checking test of the RGB to YUV cluster.
// Streams 300 pixels (corner colours plus random ones) with random input gaps
// and random output back-pressure, and compares each result with the BT.601
// formulas evaluated here in plain integer arithmetic. With both sides always
// ready, 64 pixels must pass at one per cycle with one cycle of latency.
module tb_rgb2yuv_cluster;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [DATA_W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, cyc = 0, stalls = 0;
  logic [DATA_W-1:0] expq[$];

  rgb2yuv_cluster dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !in_ready) stalls++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int fl(int n);   // floor(n / 256)
    return (n >= 0) ? n / 256 : -((-n + 255) / 256);
  endfunction

  function automatic logic [DATA_W-1:0] ref_yuv(logic [DATA_W-1:0] px);
    int r, g, b, y, u, v;
    r = int'(px[23:16]); g = int'(px[15:8]); b = int'(px[7:0]);
    y = fl(66 * r + 129 * g + 25 * b + 128) + 16;
    u = fl(-38 * r - 74 * g + 112 * b + 128) + 128;
    v = fl(112 * r - 94 * g - 18 * b + 128) + 128;
    return {8'h00, 8'(y), 8'(u), 8'(v)};
  endfunction

  // output monitor
  int nout = 0, t_first = 0, t_last = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(expq.size() > 0 && out_data == expq[0], $sformatf("pixel %0d", nout));
      if (expq.size() > 0) void'(expq.pop_front());
      nout++;
      t_last = cyc;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int n, bit gaps);
    int i = 0;
    logic [DATA_W-1:0] px;
    px = {8'h00, 24'($urandom)};
    while (i < n) begin
      bit v;
      if (i < 8) px = {8'h00, (i[0] ? 8'hFF : 8'h00), (i[1] ? 8'hFF : 8'h00), (i[2] ? 8'hFF : 8'h00)};
      v = !gaps || ($urandom % 4) != 0;
      in_valid <= v;
      in_data  <= px;
      @(posedge clk);
      if (v && in_ready) begin
        if (i == 0) t_first = cyc;
        expq.push_back(ref_yuv(px));
        i++;
        px = {8'h00, 24'($urandom)};
      end
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      send(300, 1'b1);
      begin
        while (nout < 300) begin
          out_ready <= ($urandom % 3) != 0;
          @(posedge clk);
        end
      end
    join
    out_ready <= 1;
    repeat (3) @(posedge clk);
    check(nout == 300 && expq.size() == 0, "all pixels out");
    check(stalls > 0, "back-pressure reached the input");
    // rate
    send(64, 1'b0);
    while (nout < 364) @(posedge clk);
    // first input taken at edge t_first, its result taken one edge later,
    // last (64th) result 63 edges after that
    check(t_last - t_first == 64, $sformatf("rate (%0d cycles)", t_last - t_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
