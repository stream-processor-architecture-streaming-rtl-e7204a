// workload_run: the two test-case workloads run end to end on one stream
// processor configuration, used by tb_workloads once per (SRF_BW, SB_DEPTH).
//   RGB to YUV: 4096 pixels loaded, converted and stored; input and output
//               streams together fill the 8192-word SRF exactly.
//   3x3 convolution: a 64x60 image (3840 words) in, 62x58 (3596 words) out.
// Every result word in SDRAM is compared with values computed here, and the
// cycles of each kernel are reported. A kernel moves two words per pixel
// through the SRF (one read, one write), so with SRF_BW >= 2 and deep enough
// stream buffers it must run at one pixel per cycle plus a small fixed
// overhead; with a one-word SRF it must take at least one cycle per input
// and output word, as the single SRF access per cycle is then the bottleneck.
// Interface: clk in; checks, failures and finished out.
module workload_run #(
  parameter int SRF_BW   = 4,
  parameter int SB_DEPTH = 8
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import sp_pkg::*;
  logic rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done, idle;
  stream_instr_t instr = '0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [MEM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  logic ext_start, ext_in_valid, ext_out_ready;
  logic [LEN_W-1:0] ext_len, ext_out_len;
  logic [DATA_W-1:0] ext_in_data;

  // one pixel per cycle needs two SRF words per cycle and buffers deep
  // enough to keep a read in flight (see srf)
  localparam bit FULL_RATE = SRF_BW >= 2 && SB_DEPTH >= 2 * SRF_BW && SB_DEPTH >= SRF_BW + 2;
  localparam int NPIX = 4096, IW_ = 64, IH_ = 60;
  localparam int NIMG = IW_ * IH_, NOUT = (IW_ - 2) * (IH_ - 2);
  localparam int A_RGB = 0, A_YUV = 4096, A_IMG = 8192, A_CONV = 12288;

  int cyc = 0, nretired = 0, bad = 0;
  int coef [9];
  logic [7:0] img [IH_][IW_];
  int t_start [$], t_end [$];

  stream_processor #(.SRF_BW(SRF_BW), .SB_DEPTH(SB_DEPTH)) dut (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready, .instr_done, .idle,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ext_start, .ext_len, .ext_out_len,
    .ext_in_valid, .ext_in_data, .ext_in_ready(1'b0),
    .ext_out_valid(1'b0), .ext_out_data('0), .ext_out_ready);

  sdram_model #(.DW(DATA_W), .AW(MEM_AW), .SIZE(16384), .LATENCY(6), .GNT_PCT(90)) u_sdram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL SRF_BW=%0d SB_DEPTH=%0d: %s", SRF_BW, SB_DEPTH, what);
    end
  endtask

  // kernel start / end: output port command to output port done
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (instr_done) nretired++;
    if (dut.srf_cmd_valid[P_YUV_OUT] || dut.srf_cmd_valid[P_CONV_OUT]) t_start.push_back(cyc);
    if (dut.srf_done[P_YUV_OUT] || dut.srf_done[P_CONV_OUT]) t_end.push_back(cyc);
  end

  function automatic logic [DATA_W-1:0] rgb(int i);
    return {8'h00, 8'((i * 37) ^ (i >> 4)), 8'(i * 11 + 3), 8'(255 - i * 5)};
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
    checks = 0;
    failures = 0;
    finished = 1'b0;
    for (int i = 0; i < NPIX; i++) u_sdram.mem[A_RGB + i] = rgb(i);
    for (int y = 0; y < IH_; y++)
      for (int x = 0; x < IW_; x++) begin
        img[y][x] = 8'($urandom);
        u_sdram.mem[A_IMG + y * IW_ + x] = {24'd0, img[y][x]};
      end
    for (int k = 0; k < 9; k++) coef[k] = int'($urandom % 255) - 127;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(mk(SOP_LOAD,   K_RGB2YUV, 0, 0,    A_RGB, NPIX, 0, 0));
    issue(mk(SOP_KERNEL, K_RGB2YUV, 0, 4096, 0,     NPIX, NPIX, 0));
    issue(mk(SOP_STORE,  K_RGB2YUV, 4096, 0, A_YUV, NPIX, 0, 0));
    issue(mk(SOP_LOAD,   K_CONV3X3, 0, 0,    A_IMG, NIMG, 0, 0));
    for (int k = 0; k < 9; k++) begin
      c = mk(SOP_SETCOEF, K_CONV3X3, 0, 0, 0, 0, 0, 0);
      c.coef_idx = 4'(k); c.coef = 8'(coef[k]);
      issue(c);
    end
    issue(mk(SOP_KERNEL, K_CONV3X3, 0, 4096, 0, NIMG, NOUT, IW_));
    issue(mk(SOP_STORE,  K_CONV3X3, 4096, 0, A_CONV, NOUT, 0, 0));
    instr_valid <= 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (3) @(posedge clk);

    check(nretired == 15, $sformatf("retired %0d of 15", nretired));
    bad = 0;
    for (int i = 0; i < NPIX; i++) if (u_sdram.mem[A_YUV + i] != ref_yuv(rgb(i))) bad++;
    check(bad == 0, $sformatf("RGB to YUV: %0d of %0d pixels wrong", bad, NPIX));
    bad = 0;
    for (int y = 2; y < IH_; y++)
      for (int x = 2; x < IW_; x++) begin
        automatic int s = 0;
        for (int r = 0; r < 3; r++)
          for (int q = 0; q < 3; q++) s += coef[3*r+q] * int'(img[y-2+r][x-2+q]);
        if (u_sdram.mem[A_CONV + (y - 2) * (IW_ - 2) + (x - 2)] != 32'(s)) bad++;
      end
    check(bad == 0, $sformatf("convolution: %0d of %0d outputs wrong", bad, NOUT));
    check(t_start.size() == 2 && t_end.size() == 2, "two kernels timed");
    if (t_start.size() == 2 && t_end.size() == 2) begin
      $display("SRF_BW=%0d SB_DEPTH=%0d: RGB to YUV kernel %0d pixels in %0d cycles, convolution kernel %0d pixels in %0d cycles",
               SRF_BW, SB_DEPTH, NPIX, t_end[0] - t_start[0], NIMG, t_end[1] - t_start[1]);
      if (FULL_RATE) begin
        check(t_end[0] - t_start[0] <= NPIX + 16, "RGB to YUV at one pixel per cycle");
        check(t_end[1] - t_start[1] <= NIMG + 16, "convolution at one pixel per cycle");
      end else begin
        // every input and output word of a kernel is one SRF access share
        check(t_end[0] - t_start[0] >= (NPIX + NPIX) / SRF_BW, "RGB to YUV bounded by SRF bandwidth");
        check(t_end[1] - t_start[1] >= (NIMG + NOUT) / SRF_BW, "convolution bounded by SRF bandwidth");
      end
    end
    finished = 1'b1;
  end
endmodule
