// sdram_model: behavioural model of the external SDRAM, for testbenches only.
// Word-addressed memory of SIZE words (address taken modulo SIZE). A request
// is accepted in a cycle where gnt is high; gnt is high in a random GNT_PCT
// percent of cycles (gnt_pct, which a testbench may change) to exercise stalls. Reads return in order exactly LATENCY
// cycles after acceptance on rvalid/rdata; writes take effect at acceptance.
// The testbench fills and inspects 'mem' directly.
module sdram_model #(
  parameter int DW      = 32,
  parameter int AW      = 32,
  parameter int SIZE    = 4096,
  parameter int LATENCY = 4,
  parameter int GNT_PCT = 70
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          gnt,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [SIZE];
  logic          vpipe [LATENCY];
  logic [DW-1:0] dpipe [LATENCY];
  logic          gnt_q;
  int            stalls = 0;
  int            gnt_pct = GNT_PCT;   // may be changed by the testbench

  assign gnt    = gnt_q;
  assign rvalid = vpipe[LATENCY-1];
  assign rdata  = dpipe[LATENCY-1];

  always @(posedge clk) begin
    if (!rst_n) begin
      gnt_q <= 1'b0;
      for (int i = 0; i < LATENCY; i++) vpipe[i] <= 1'b0;
    end else begin
      gnt_q <= ($urandom % 100) < gnt_pct;
      if (req && !gnt) stalls++;
      if (req && gnt && we) mem[addr % SIZE] <= wdata;
      vpipe[0] <= req && gnt && !we;
      dpipe[0] <= mem[addr % SIZE];
      for (int i = 1; i < LATENCY; i++) begin
        vpipe[i] <= vpipe[i-1];
        dpipe[i] <= dpipe[i-1];
      end
    end
  end
endmodule
