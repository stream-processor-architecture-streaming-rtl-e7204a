// tb_stream_controller: self-checking test of the stream controller.
// The host pushes a program of loads, stores, kernels on all three clusters,
// coefficient writes, a NOP and zero-length transfers faster than they
// execute, so the instruction queue fills and instr_ready drops. A responder
// answers every SRF port and memory system command with a done pulse after a
// random delay. For every retired instruction the commands it issued are
// compared with those the instruction set prescribes, and no instruction may
// issue commands before the previous one has retired.
module tb_stream_controller;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done, idle;
  stream_instr_t instr = '0;
  logic srf_cmd_valid [N_SRF_PORTS];
  srf_cmd_t srf_cmd [N_SRF_PORTS];
  logic srf_done [N_SRF_PORTS];
  logic mem_cmd_valid, mem_cmd_store, mem_done;
  logic [MEM_AW-1:0] mem_cmd_addr;
  logic [LEN_W-1:0] mem_cmd_len;
  logic conv_start, coef_we, ext_start;
  logic [LEN_W-1:0] conv_width, ext_len, ext_out_len;
  logic [3:0] coef_idx;
  logic signed [COEF_W-1:0] coef_val;
  int checks = 0, failures = 0, qfull = 0, nretired = 0;
  int pend_srf [N_SRF_PORTS];
  int pend_mem;
  string seen, expq[$];

  stream_controller #(.IQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // responder: done pulse a random number of cycles after each command
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_SRF_PORTS; p++) begin pend_srf[p] <= 0; srf_done[p] <= 0; end
      pend_mem <= 0; mem_done <= 0;
    end else begin
      for (int p = 0; p < N_SRF_PORTS; p++) begin
        srf_done[p] <= pend_srf[p] == 1;
        if (srf_cmd_valid[p]) pend_srf[p] <= 3 + int'($urandom % 15);
        else if (pend_srf[p] > 0) pend_srf[p] <= pend_srf[p] - 1;
      end
      mem_done <= pend_mem == 1;
      if (mem_cmd_valid) pend_mem <= 3 + int'($urandom % 15);
      else if (pend_mem > 0) pend_mem <= pend_mem - 1;
    end
  end

  // monitor: record commands, compare per retired instruction
  always @(posedge clk) begin
    if (rst_n) begin
      if (instr_valid && !instr_ready) qfull++;
      for (int p = 0; p < N_SRF_PORTS; p++)
        if (srf_cmd_valid[p])
          seen = {seen, $sformatf("P%0d:%0d,%0d,%0d;", p, srf_cmd[p].wr, srf_cmd[p].base, srf_cmd[p].len)};
      if (mem_cmd_valid)
        seen = {seen, $sformatf("M:%0d,%0d,%0d;", mem_cmd_store, mem_cmd_addr, mem_cmd_len)};
      if (conv_start) seen = {seen, $sformatf("C:%0d;", conv_width)};
      if (ext_start)  seen = {seen, $sformatf("E:%0d,%0d;", ext_len, ext_out_len)};
      if (coef_we)    seen = {seen, $sformatf("K:%0d,%0d;", coef_idx, coef_val)};
      if (instr_done) begin
        check(expq.size() > 0 && seen == expq[0],
              $sformatf("instr %0d: saw '%s' expected '%s'", nretired, seen,
                        expq.size() > 0 ? expq[0] : "-"));
        if (expq.size() > 0) void'(expq.pop_front());
        seen = "";
        nretired++;
      end
    end
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(stream_instr_t i, string e);
    expq.push_back(e);
    instr_valid <= 1; instr <= i;
    // instr_ready changes only on the rising edge: sample it mid-cycle
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    @(posedge clk);
  endtask

  function automatic stream_instr_t mk(sop_e op, kid_e kd, int a, int b, int m, int n, int on, int w);
    stream_instr_t i = '0;
    i.op = op; i.kernel = kd; i.srf_a = SRF_AW'(a); i.srf_b = SRF_AW'(b);
    i.mem_addr = MEM_AW'(m); i.len = LEN_W'(n); i.out_len = LEN_W'(on); i.width = LEN_W'(w);
    return i;
  endfunction

  initial begin
    stream_instr_t c;
    seen = "";
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(mk(SOP_LOAD, K_RGB2YUV, 100, 0, 5000, 64, 0, 0), "P0:1,100,64;M:0,5000,64;");
    issue(mk(SOP_KERNEL, K_RGB2YUV, 100, 300, 0, 64, 64, 0), "P1:0,100,64;P2:1,300,64;");
    issue(mk(SOP_STORE, K_RGB2YUV, 300, 0, 9000, 64, 0, 0), "P0:0,300,64;M:1,9000,64;");
    for (int k = 0; k < 3; k++) begin
      c = mk(SOP_SETCOEF, K_CONV3X3, 0, 0, 0, 0, 0, 0);
      c.coef_idx = 4'(k); c.coef = 8'(k * 3 - 4);
      issue(c, $sformatf("K:%0d,%0d;", k, k * 3 - 4));
    end
    issue(mk(SOP_KERNEL, K_CONV3X3, 0, 500, 0, 48, 24, 8), "P3:0,0,48;P4:1,500,24;C:8;");
    issue(mk(SOP_NOP, K_RGB2YUV, 0, 0, 0, 5, 0, 0), "");
    issue(mk(SOP_LOAD, K_RGB2YUV, 10, 0, 70, 0, 0, 0), "");
    issue(mk(SOP_KERNEL, K_EXT, 7, 900, 0, 12, 3, 0), "P5:0,7,12;P6:1,900,3;E:12,3;");
    issue(mk(SOP_STORE, K_RGB2YUV, 900, 0, 77, 3, 0, 0), "P0:0,900,3;M:1,77,3;");
    instr_valid <= 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (3) @(posedge clk);
    check(expq.size() == 0 && nretired == 11, $sformatf("all retired (%0d)", nretired));
    check(qfull > 0, "instruction queue filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
