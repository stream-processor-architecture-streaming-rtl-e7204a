// tb_srf: self-checking test of the stream register file at several
// configurations of its two parameters, the SRF bandwidth (banks, i.e. words
// per array access) and the stream buffer depth. Each configuration runs the
// sequence in srf_config_check: unaligned streams of odd lengths written and
// read back by contending ports, done pulses, arbitration conflicts, and the
// streaming rate (N words in N+2 cycles where the buffer is deep enough, and
// slower for the 1-bank, 2-word configuration). The default configuration
// (4 banks, 8-word buffers) is one of them.
module tb_srf;
  localparam int NCFG = 6;
  localparam int CFG_BW [NCFG] = '{1, 1, 2, 4, 8, 4};
  localparam int CFG_SB [NCFG] = '{2, 4, 4, 8, 16, 16};
  logic clk = 0;
  int   c_checks [NCFG];
  int   c_failures [NCFG];
  logic c_finished [NCFG];
  int   checks, failures;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    srf_config_check #(.BW(CFG_BW[g]), .SB_DEPTH(CFG_SB[g])) u_chk (
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
    repeat (5000) @(posedge clk);
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
