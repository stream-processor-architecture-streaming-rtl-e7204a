// tb_workloads: the two test-case workloads (RGB to YUV on 4096 pixels, 3x3
// convolution on a 64x60 image) at the largest sizes the default 8192-word
// SRF holds at once, run end to end by workload_run on five configurations
// of the SRF bandwidth and stream buffer depth: the default (4 words, 8-word
// buffers) and (1,2), (1,4), (2,4), (8,16). Results are checked word by word
// and the kernel cycle counts against the rate each configuration allows.
module tb_workloads;
  localparam int NCFG = 5;
  localparam int CFG_BW [NCFG] = '{4, 1, 1, 2, 8};
  localparam int CFG_SB [NCFG] = '{8, 2, 4, 4, 16};
  logic clk = 0;
  int   c_checks [NCFG];
  int   c_failures [NCFG];
  logic c_finished [NCFG];
  int   checks, failures;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    workload_run #(.SRF_BW(CFG_BW[g]), .SB_DEPTH(CFG_SB[g])) u_run (
      .clk, .checks(c_checks[g]), .failures(c_failures[g]), .finished(c_finished[g])
    );
  end

  function automatic void total();
    checks = 0;
    failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks   += c_checks[g];
      failures += c_failures[g];
    end
  endfunction

  function automatic bit all_finished();
    for (int g = 0; g < NCFG; g++) if (!c_finished[g]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    while (!all_finished()) @(posedge clk);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
