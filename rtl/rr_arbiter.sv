// rr_arbiter: round-robin arbiter for N requesters.
//
// Grants at most one requester per cycle (one-hot gnt), searching from the
// requester after the one granted last, so every requester that keeps asking
// is served within N grants. The priority pointer moves only when a grant is
// given. Combinational from req to gnt; the pointer is registered.
module rr_arbiter #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic [IW-1:0] gnt_idx
);

  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    // walk from last+N down to last+1 so the nearest after 'last' wins
    for (int k = N; k >= 1; k--) begin
      if (req[(int'(last) + k) % N]) begin
        gnt                          = '0;
        gnt[(int'(last) + k) % N]    = 1'b1;
        gnt_idx                      = IW'((int'(last) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     last <= IW'(N - 1);
    else if (|req)  last <= gnt_idx;
  end

endmodule
