// tb_stream_processor: end-to-end test of the stream processor at its default
// parameters, against the SDRAM model (random grants, 6-cycle read latency).
// A host program of 28 stream instructions, pushed faster than it executes:
//   1. RGB to YUV: load 64 RGB pixels, convert them, store the YUV stream.
//   2. 3x3 convolution: load a 12x8 image, write 9 coefficients, convolve,
//      store the 10x6 result.
//   3. External cluster: load a 1024-word block; the testbench plays a
//      programmable cluster that adds pairs of words (1024 in, 512 out, with
//      independent random gaps on both sides); store the result.
// Every output region of SDRAM is compared with results computed here, and
// the words around each region must be untouched. The test also counts the
// mechanisms of the design and fails if one never happened: each kind of
// instruction (load, store, each of the three kernels, coefficient write,
// NOP), SRF arbitration conflicts, an SRF stream buffer filling, SDRAM stalls
// and the host stalling on a full instruction queue. (With one instruction
// executing at a time, the memory system's load buffer and the clusters'
// output registers never back up at this level; their back-pressure is
// exercised by the block testbenches.)
module tb_stream_processor;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done, idle;
  stream_instr_t instr = '0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [MEM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  logic ext_start, ext_in_valid, ext_in_ready = 0, ext_out_valid = 0, ext_out_ready;
  logic [LEN_W-1:0] ext_len, ext_out_len;
  logic [DATA_W-1:0] ext_in_data, ext_out_data = '0;

  localparam int NPIX = 64, CW_ = 12, CH_ = 8, NEXT = 1024;
  localparam int A_RGB = 0, A_IMG = 200, A_YUV = 1000, A_CONV = 1200, A_BIG = 2048, A_EXT = 3200;

  int checks = 0, failures = 0, cyc = 0, nretired = 0;
  int n_conflict = 0, n_sbfull = 0, n_qfull = 0;
  int n_op [5];
  int n_kern [3];
  int coef [9];
  int img [CH_][CW_];

  stream_processor dut (.*);

  sdram_model #(.DW(DATA_W), .AW(MEM_AW), .SIZE(4096), .LATENCY(6), .GNT_PCT(60)) u_sdram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (instr_done) nretired++;
    if ($countones(dut.u_srf.req) > 1) n_conflict++;
    for (int p = 0; p < N_SRF_PORTS; p++) if (dut.u_srf.fb_full[p]) n_sbfull++;
    if (dut.u_ctrl.q_pop) begin
      n_op[int'(dut.u_ctrl.cur.op)]++;
      if (dut.u_ctrl.cur.op == SOP_KERNEL) n_kern[int'(dut.u_ctrl.cur.kernel)]++;
    end
    if (instr_valid && !instr_ready) n_qfull++;
  end

  // external programmable cluster: out[j] = in[2j] + in[2j+1]. Input and
  // output run as two independent processes with random gaps, so the two SRF
  // ports it uses move words in unrelated cycles.
  logic [DATA_W-1:0] extq[$];
  initial begin
    forever begin
      @(posedge clk);
      if (ext_start) begin
        int n, m;
        logic [DATA_W-1:0] acc;
        n = int'(ext_len);
        m = 0;
        while (m < n) begin
          ext_in_ready <= ($urandom % 3) != 0;
          @(posedge clk);
          if (ext_in_valid && ext_in_ready) begin
            if (m % 2 == 0) acc = ext_in_data;
            else extq.push_back(acc + ext_in_data);
            m++;
          end
        end
        ext_in_ready <= 0;
      end
    end
  end
  initial begin
    forever begin
      @(posedge clk);
      if (ext_out_valid && ext_out_ready) void'(extq.pop_front());
      if (extq.size() > 0 && ($urandom % 3) == 0) begin
        ext_out_valid <= 1;
        ext_out_data  <= extq[0];
      end else begin
        ext_out_valid <= 0;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] rgb(int i);
    return {8'h00, 8'((i * 37) ^ 8'h5A), 8'(i * 11 + 3), 8'(255 - i * 5)};
  endfunction

  function automatic int fl(int n);
    return (n >= 0) ? n / 256 : -((-n + 255) / 256);
  endfunction

  function automatic logic [DATA_W-1:0] ref_yuv(logic [DATA_W-1:0] px);
    int r, g, b;
    r = int'(px[23:16]); g = int'(px[15:8]); b = int'(px[7:0]);
    return {8'h00, 8'(fl(66 * r + 129 * g + 25 * b + 128) + 16),
                   8'(fl(-38 * r - 74 * g + 112 * b + 128) + 128),
                   8'(fl(112 * r - 94 * g - 18 * b + 128) + 128)};
  endfunction

  task automatic issue(stream_instr_t i);
    instr_valid <= 1; instr <= i;
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
    int t0;
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_kern[i]) n_kern[i] = 0;
    for (int a = 0; a < 4096; a++) u_sdram.mem[a] = 32'hDEAD0000 + 32'(a);
    for (int i = 0; i < NPIX; i++) u_sdram.mem[A_RGB + i] = rgb(i);
    for (int y = 0; y < CH_; y++)
      for (int x = 0; x < CW_; x++) begin
        img[y][x] = int'($urandom % 256);
        u_sdram.mem[A_IMG + y * CW_ + x] = {24'h00ABC0, 8'(img[y][x])};
      end
    for (int k = 0; k < 9; k++) coef[k] = int'($urandom % 31) - 15;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t0 = cyc;
    // 1. RGB -> YUV
    issue(mk(SOP_LOAD,   K_RGB2YUV, 0,   0,   A_RGB,  NPIX, 0, 0));
    issue(mk(SOP_KERNEL, K_RGB2YUV, 0,   100, 0,      NPIX, NPIX, 0));
    issue(mk(SOP_STORE,  K_RGB2YUV, 100, 0,   A_YUV,  NPIX, 0, 0));
    // 2. 3x3 convolution
    issue(mk(SOP_LOAD,   K_CONV3X3, 200, 0,   A_IMG,  CW_ * CH_, 0, 0));
    for (int k = 0; k < 9; k++) begin
      c = mk(SOP_SETCOEF, K_CONV3X3, 0, 0, 0, 0, 0, 0);
      c.coef_idx = 4'(k); c.coef = 8'(coef[k]);
      issue(c);
    end
    issue(mk(SOP_KERNEL, K_CONV3X3, 200, 400, 0, CW_ * CH_, (CW_ - 2) * (CH_ - 2), CW_));
    issue(mk(SOP_STORE,  K_CONV3X3, 400, 0,   A_CONV, (CW_ - 2) * (CH_ - 2), 0, 0));
    // 3. external cluster on a block of NEXT words
    issue(mk(SOP_LOAD,   K_EXT,     4096, 0,   A_BIG, NEXT, 0, 0));
    issue(mk(SOP_KERNEL, K_EXT,     4096, 6000, 0,    NEXT, NEXT / 2, 0));
    issue(mk(SOP_STORE,  K_EXT,     6000, 0,   A_EXT, NEXT / 2, 0, 0));
    // fill the queue with NOPs so the host must wait
    for (int k = 0; k < 10; k++) issue(mk(SOP_NOP, K_RGB2YUV, 0, 0, 0, 0, 0, 0));
    instr_valid <= 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (3) @(posedge clk);
    $display("program ran in %0d cycles", cyc - t0);

    check(nretired == 28, $sformatf("retired %0d of 28", nretired));
    for (int i = 0; i < NPIX; i++)
      check(u_sdram.mem[A_YUV + i] == ref_yuv(rgb(i)), $sformatf("yuv %0d", i));
    for (int y = 2; y < CH_; y++)
      for (int x = 2; x < CW_; x++) begin
        automatic int s = 0;
        for (int r = 0; r < 3; r++)
          for (int q = 0; q < 3; q++) s += coef[3*r+q] * img[y-2+r][x-2+q];
        check(u_sdram.mem[A_CONV + (y - 2) * (CW_ - 2) + (x - 2)] == 32'(s),
              $sformatf("conv (%0d,%0d)", y, x));
      end
    for (int j = 0; j < NEXT / 2; j++)
      check(u_sdram.mem[A_EXT + j] == 32'hDEAD0000 + 32'(A_BIG + 2 * j) + 32'hDEAD0000 + 32'(A_BIG + 2 * j + 1),
            $sformatf("ext %0d", j));
    check(u_sdram.mem[A_YUV - 1] == 32'hDEAD0000 + 32'(A_YUV - 1) &&
          u_sdram.mem[A_YUV + NPIX] == 32'hDEAD0000 + 32'(A_YUV + NPIX) &&
          u_sdram.mem[A_CONV + 60] == 32'hDEAD0000 + 32'(A_CONV + 60) &&
          u_sdram.mem[A_EXT + NEXT / 2] == 32'hDEAD0000 + 32'(A_EXT + NEXT / 2),
          "stores stay inside their regions");

    $display("mechanisms: load=%0d store=%0d rgb2yuv=%0d conv=%0d ext=%0d setcoef=%0d nop=%0d srf_conflict=%0d sb_full=%0d sdram_stall=%0d queue_full=%0d",
             n_op[SOP_LOAD], n_op[SOP_STORE], n_kern[K_RGB2YUV], n_kern[K_CONV3X3], n_kern[K_EXT],
             n_op[SOP_SETCOEF], n_op[SOP_NOP], n_conflict, n_sbfull, u_sdram.stalls, n_qfull);
    check(n_op[SOP_LOAD] == 3 && n_op[SOP_STORE] == 3, "stream loads and stores executed");
    check(n_kern[K_RGB2YUV] == 1 && n_kern[K_CONV3X3] == 1 && n_kern[K_EXT] == 1, "each kernel ran");
    check(n_op[SOP_SETCOEF] == 9 && n_op[SOP_NOP] == 10, "coefficient writes and NOPs executed");
    check(n_conflict > 0, "SRF arbitration conflict happened");
    check(n_sbfull > 0, "an SRF stream buffer filled");
    check(u_sdram.stalls > 0, "SDRAM stalled a request");
    check(n_qfull > 0, "the host stalled on a full instruction queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
