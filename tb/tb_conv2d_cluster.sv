// tb_conv2d_cluster: self-checking test of the 3x3 convolution cluster.
// Loads random signed coefficients, streams a 9x6 random image with random
// input gaps and output back-pressure, and checks all 7x4 outputs against a
// direct 3x3 sum computed here. A second image (5x4, new coefficients) checks
// that start restarts the row/column tracking. With both sides always ready
// the last output leaves one cycle after the last pixel enters.
module tb_conv2d_cluster;
  import sp_pkg::*;
  localparam int MAXW = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, coef_we = 0;
  logic [LEN_W-1:0] width = '0;
  logic [3:0] coef_idx = '0;
  logic signed [COEF_W-1:0] coef_val = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [DATA_W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, cyc = 0, nout = 0, t_in_last = 0, t_out_last = 0;
  int img [16][16];
  int k [9];
  logic [DATA_W-1:0] expq[$];

  conv2d_cluster #(.MAX_W(MAXW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(expq.size() > 0 && out_data == expq[0],
            $sformatf("output %0d: got %0d exp %0d", nout, $signed(out_data),
                      expq.size() > 0 ? $signed(expq[0]) : 0));
      if (expq.size() > 0) void'(expq.pop_front());
      nout++;
      t_out_last = cyc;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_image(int w, int h, bit gaps);
    int i, nexp;
    // coefficients
    for (int c = 0; c < 9; c++) begin
      k[c] = int'($signed(8'($urandom)));
      coef_we <= 1; coef_idx <= 4'(c); coef_val <= 8'(k[c]);
      @(posedge clk);
    end
    coef_we <= 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) img[y][x] = int'($urandom % 256);
    for (int y = 2; y < h; y++)
      for (int x = 2; x < w; x++) begin
        int s = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) s += k[3*r+c] * img[y-2+r][x-2+c];
        expq.push_back(32'(s));
      end
    nexp = nout + (w - 2) * (h - 2);
    start <= 1; width <= LEN_W'(w);
    @(posedge clk);
    start <= 0;
    i = 0;
    fork
      while (i < w * h) begin
        bit v;
        v = !gaps || ($urandom % 4) != 0;
        in_valid <= v;
        in_data  <= {$urandom, 8'(img[i / w][i % w])};
        @(posedge clk);
        if (v && in_ready) begin i++; t_in_last = cyc; end
      end
      while (nout < nexp) begin
        out_ready <= !gaps || ($urandom % 3) != 0;
        @(posedge clk);
      end
    join
    in_valid <= 0;
    check(nout == nexp && expq.size() == 0, "output count");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_image(9, 6, 1'b1);
    run_image(5, 4, 1'b0);
    check(t_out_last == t_in_last + 1, $sformatf("latency %0d", t_out_last - t_in_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
