// sc_orplus: stochastic adder "OR+", an OR gate with a memory. A plain OR
// loses a one whenever two inputs are 1 in the same clock; OR+ remembers
// those surplus ones and emits them in later clocks in which no input is 1.
// The output density is then the sum of the input densities as long as that
// sum stays below 1 (no scaling, unlike a multiplexer adder). This works
// because the unnormalised probabilities summed in a Bayesian machine are low.
//
// The source names the OR+ (an OR gate and a memory) but not its insides.
// This design's version: the memory is a saturating counter `pend` of surplus
// ones, PEND_W bits wide. Each enabled clock:
//   total = popcount(a) + pend;  y = (total != 0);  pend <= min(total - y, max)
// With N = 2 and PEND_W = 1 this is the classic one-bit OR+ cell.
//
// Timing: y is combinational from `a` and the registered `pend`; `pend`
// updates only when `en` is high and is cleared by `clr`.
module sc_orplus #(
  parameter int unsigned N      = 2,
  parameter int unsigned PEND_W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] a,
  output logic         y
);

  localparam int unsigned SW = $clog2(N + (1 << PEND_W)) + 1;
  localparam logic [SW-1:0] PMAX = SW'((1 << PEND_W) - 1);

  logic [PEND_W-1:0] pend;
  logic [SW-1:0]     total, rest;

  always_comb begin
    total = SW'(pend);
    for (int i = 0; i < N; i++) total = total + SW'(a[i]);
    y    = (total != '0);
    rest = total - SW'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pend <= '0;
    else if (clr) pend <= '0;
    else if (en)  pend <= (rest > PMAX) ? PEND_W'(PMAX) : PEND_W'(rest);
  end

endmodule
