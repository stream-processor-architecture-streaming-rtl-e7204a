// stream_buffer: synchronous first-word-fall-through FIFO that can take up to
// NIN words and give up to NOUT words per cycle.
//
// Stream buffers decouple each SRF stream port, and the memory system's load
// path, from the shared resource behind it: a client moves one word per cycle
// while the SRF array, which moves several words per access, or SDRAM is busy
// with someone else. The source architecture names stream buffers and makes
// their size a parameter; the organisation here is this design's own.
//
// Interface: push_n words din[0..push_n-1] are written in one cycle, din[0]
// first; dout[0..NOUT-1] show the oldest words (dout[k] is valid when
// count > k) and pop_n removes that many. A pop larger than count is cut to
// count; a push that would not fit even after this cycle's pop is refused as
// a whole. Push and pop may happen in the same cycle. count gives the fill
// level; clr empties the buffer synchronously. DEPTH must be a power of two.
// With NIN = NOUT = 1 this is an ordinary one-word FIFO.
module stream_buffer #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 8,
  parameter int NIN   = 1,
  parameter int NOUT  = 1,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = $clog2(DEPTH + 1),
  localparam int IW = $clog2(NIN + 1),
  localparam int OW = $clog2(NOUT + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic [IW-1:0]              push_n,
  input  logic [NIN-1:0][WIDTH-1:0]  din,
  input  logic [OW-1:0]              pop_n,
  output logic [NOUT-1:0][WIDTH-1:0] dout,
  output logic                       full,
  output logic                       empty,
  output logic [CW-1:0]              count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    n_pop, n_push;

  always_comb begin
    n_pop  = (CW'(pop_n) > count) ? count : CW'(pop_n);
    n_push = (32'(push_n) > DEPTH - 32'(count) + 32'(n_pop)) ? '0 : CW'(push_n);
  end

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

  for (genvar k = 0; k < NOUT; k++) begin : g_out
    assign dout[k] = mem[AW'(rd_ptr + AW'(k))];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= AW'(wr_ptr + AW'(n_push));
      rd_ptr <= AW'(rd_ptr + AW'(n_pop));
      count  <= count + n_push - n_pop;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NIN; k++)
      if (CW'(k) < n_push) mem[AW'(wr_ptr + AW'(k))] <= din[k];
  end

endmodule
