// tb_mem_system: self-checking test of the streaming memory system against the
// SDRAM model with random grants. A stream load of 40 words is taken by an SRF
// side that is ready only part of the time (so the load buffer fills and read
// issue must hold back); the words are checked in order. A stream store of 30
// words from a random-valid source is then checked in the SDRAM model. With
// grants always on and the SRF always ready, a 32-word load must finish within
// 32 + latency + 3 cycles: one word per cycle.
module tb_mem_system;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_store = 0;
  logic [MEM_AW-1:0] cmd_addr = '0;
  logic [LEN_W-1:0]  cmd_len = '0;
  logic busy, done;
  logic ld_valid, ld_ready = 0;
  logic [DATA_W-1:0] ld_data;
  logic st_valid = 0, st_ready;
  logic [DATA_W-1:0] st_data = '0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [MEM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0, cyc = 0, ndone = 0, full_seen = 0;

  mem_system #(.LD_DEPTH(8)) dut (.*);

  sdram_model #(.DW(DATA_W), .AW(MEM_AW), .SIZE(256), .LATENCY(5), .GNT_PCT(60)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) ndone++;
    if (dut.lb_full) full_seen++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("dbg active=%0d store=%0d issue_left=%0d out_left=%0d outst=%0d lbc=%0d", dut.active, dut.store, dut.issue_left, dut.out_left, dut.outstanding, dut.lb_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(bit st, int a, int n);
    cmd_store <= st; cmd_addr <= MEM_AW'(a); cmd_len <= LEN_W'(n); cmd_valid <= 1;
    @(posedge clk);
    cmd_valid <= 0;
  endtask

  initial begin
    int i, t0, nd;
    for (int a = 0; a < 256; a++) u_mem.mem[a] = 32'hC0DE0000 + 32'(a * 7);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // load with back-pressure
    nd = ndone;
    command(0, 17, 40);
    i = 0;
    t0 = cyc;
    while (i < 40) begin
      ld_ready <= (cyc - t0 < 20) ? 1'b0 : (($urandom % 3) == 0);
      @(posedge clk);
      if (ld_valid && ld_ready) begin
        check(ld_data == 32'hC0DE0000 + 32'((17 + i) * 7), $sformatf("load word %0d", i));
        i++;
      end
    end
    ld_ready <= 0;
    repeat (2) @(posedge clk);
    check(ndone == nd + 1 && !busy, "load done");
    check(full_seen > 0, "load buffer filled");
    // store
    command(1, 100, 30);
    i = 0;
    st_data <= 32'h5EED0000;
    while (i < 30) begin
      st_valid <= ($urandom % 4) != 0;
      @(posedge clk);
      if (st_valid && st_ready) begin
        i++;
        st_data <= 32'h5EED0000 + 32'(i);
      end
    end
    st_valid <= 0;
    repeat (2) @(posedge clk);
    check(ndone == nd + 2 && !busy, "store done");
    for (int a = 0; a < 30; a++)
      check(u_mem.mem[100 + a] == 32'h5EED0000 + 32'(a), $sformatf("stored word %0d", a));
    check(u_mem.mem[99] == 32'hC0DE0000 + 32'(99 * 7) && u_mem.mem[130] == 32'hC0DE0000 + 32'(130 * 7),
          "store stays inside its range");
    check(u_mem.stalls > 0, "SDRAM stalls occurred");
    // rate
    u_mem.gnt_pct = 100;
    repeat (2) @(posedge clk);
    ld_ready <= 1;
    command(0, 0, 32);
    t0 = cyc;
    nd = ndone;
    while (ndone == nd) @(posedge clk);
    check(cyc - t0 <= 32 + 5 + 3, $sformatf("load rate (%0d cycles)", cyc - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
