// rgb2yuv_cluster: dedicated ALU cluster converting a stream of RGB pixels to
// YUV, one pixel per cycle.
//
// Input word:  {8'h00, R, G, B}; output word: {8'h00, Y, U, V}, all 8-bit.
// Conversion (ITU-R BT.601, 8-bit fixed point, studio range):
//   Y = ((  66 R + 129 G +  25 B + 128) >>> 8) +  16
//   U = (( -38 R -  74 G + 112 B + 128) >>> 8) + 128
//   V = (( 112 R -  94 G -  18 B + 128) >>> 8) + 128
// The result is registered: one cycle of latency, one pixel per cycle, with a
// valid/ready handshake on both sides (in_ready is low only while a result is
// held that the output side does not take).
// The source architecture uses an RGB to YUV cluster as a test case for the
// streaming memory system but gives neither its formulas nor its structure; the
// BT.601 coefficients and the single pipeline stage are this design's choice.
module rgb2yuv_cluster
  import sp_pkg::DATA_W;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready
);

  logic signed [18:0] r, g, b;
  logic signed [18:0] ys, us, vs;
  logic [7:0]         y8, u8, v8;

  always_comb begin
    r  = 19'(in_data[23:16]);
    g  = 19'(in_data[15:8]);
    b  = 19'(in_data[7:0]);
    ys = ((19'sd66 * r + 19'sd129 * g + 19'sd25 * b + 19'sd128) >>> 8) + 19'sd16;
    us = ((-19'sd38 * r - 19'sd74 * g + 19'sd112 * b + 19'sd128) >>> 8) + 19'sd128;
    vs = ((19'sd112 * r - 19'sd94 * g - 19'sd18 * b + 19'sd128) >>> 8) + 19'sd128;
    y8 = ys[7:0];
    u8 = us[7:0];
    v8 = vs[7:0];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= DATA_W'({y8, u8, v8});
    end
  end

endmodule
