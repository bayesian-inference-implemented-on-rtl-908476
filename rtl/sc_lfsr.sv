// sc_lfsr: 32-bit linear feedback shift register, the entropy source of one
// binary-to-stochastic converter. The source uses 32-bit LFSRs for this; the
// polynomial (x^32 + x^22 + x^2 + x + 1, maximal length, Galois form) and the
// load/step interface are this design's choice.
//
// Interface: `load` copies `seed` into the register (a zero seed is replaced
// by 1, since the all-zero state is a lock-up state); otherwise `step` advances
// one state per clock. `state` is the current register value; it visits every
// nonzero 32-bit value once per period of 2^32-1 steps. Reset state is 1.
module sc_lfsr #(
  parameter int unsigned W = 32,
  parameter logic [W-1:0] MASK = bm_pkg::LFSR_MASK
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] state
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = state >> 1;
    if (state[0]) nxt = nxt ^ MASK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= W'(1);
    else if (load)   state <= (seed == '0) ? W'(1) : seed;
    else if (step)   state <= nxt;
  end

endmodule
