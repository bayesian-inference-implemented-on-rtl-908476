// sc_mult: stochastic multiplier. For independent bitstreams the density of
// the AND of the streams is the product of their densities, so an N-input
// AND gate multiplies N probabilities. This is the multiplier the source
// uses; the N-input form is this design's packaging. Purely combinational.
module sc_mult #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  output logic         y
);

  assign y = &a;

endmodule
