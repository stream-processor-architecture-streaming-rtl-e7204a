// conv2d_cluster: dedicated ALU cluster computing a 3x3 2D convolution over an
// image that arrives as a raster-order pixel stream.
//
// start (one cycle, with width) begins a new image of width pixels per row;
// the height is not needed, the cluster simply keeps going until the stream
// ends. Pixels are the low 8 bits (unsigned) of each input word. Two line
// buffers of MAX_W pixels hold the previous two rows, and a 3x3 window of
// registers holds the last three columns. For every input pixel at column
// x >= 2 of row y >= 2 one output word is produced:
//   out(y,x) = sum_{r,c in 0..2} coef[3r+c] * pix(y-2+r, x-2+c)
// as a signed 32-bit value (correlation form, coefficient 0 at the top left,
// no flipping, no padding): a W x H image gives (W-2) x (H-2) outputs.
// coef_we writes the signed 8-bit coefficient coef_val at index coef_idx.
// Timing: one pixel per cycle, result registered one cycle after its pixel is
// taken, valid/ready handshake on both sides. width must be 3..MAX_W.
// The source architecture names a 2D convolution cluster as its second test
// case without further detail; kernel size, widths and line buffers are this
// design's choice.
module conv2d_cluster
  import sp_pkg::DATA_W, sp_pkg::LEN_W, sp_pkg::COEF_W;
#(
  parameter int MAX_W = 256,
  localparam int XW = $clog2(MAX_W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [LEN_W-1:0]         width,
  input  logic                     coef_we,
  input  logic [3:0]               coef_idx,
  input  logic signed [COEF_W-1:0] coef_val,
  input  logic                     in_valid,
  input  logic [DATA_W-1:0]        in_data,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic [DATA_W-1:0]        out_data,
  input  logic                     out_ready
);

  logic signed [COEF_W-1:0] coef [9];
  logic [7:0]  lb0 [MAX_W];      // row y-1
  logic [7:0]  lb1 [MAX_W];      // row y-2
  logic [7:0]  win [3][2];       // [row][col]: columns x-2, x-1
  logic [7:0]  col [3];          // column x: rows y-2, y-1, y
  logic [XW-1:0] x, last_x;
  logic [1:0]  yc;               // row count, saturates at 2
  logic        take, emit;
  logic signed [31:0] acc;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  assign emit     = take && x >= XW'(2) && yc == 2'd2;

  always_comb begin
    col[0] = lb1[x];
    col[1] = lb0[x];
    col[2] = in_data[7:0];
    acc = '0;
    for (int r = 0; r < 3; r++) begin
      acc += 32'(coef[3*r+0]) * $signed({24'd0, win[r][0]});
      acc += 32'(coef[3*r+1]) * $signed({24'd0, win[r][1]});
      acc += 32'(coef[3*r+2]) * $signed({24'd0, col[r]});
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 9; k++) coef[k] <= '0;
    end else if (coef_we && coef_idx < 4'd9) begin
      coef[coef_idx] <= coef_val;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      last_x    <= XW'(MAX_W - 1);
      yc        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (start) begin
        x      <= '0;
        yc     <= '0;
        last_x <= XW'(width - 1'b1);
      end else if (take) begin
        if (x == last_x) begin
          x  <= '0;
          if (yc != 2'd2) yc <= yc + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
      if (in_ready) out_valid <= emit;
      if (emit)     out_data  <= acc;
    end
  end

  // line buffers and window: data only, no reset needed
  always_ff @(posedge clk) begin
    if (take) begin
      lb1[x] <= lb0[x];
      lb0[x] <= in_data[7:0];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= col[r];
      end
    end
  end

endmodule
