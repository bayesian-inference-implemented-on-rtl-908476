// bin2sto: binary-to-stochastic converter. A W-bit binary probability `prob`
// (value prob / 2^W) becomes a bitstream whose density of ones is that value.
// As in the source, each converter has its own 32-bit LFSR as entropy source;
// the comparator form (emit 1 when the LFSR state is below `prob`) is this
// design's choice.
//
// Timing: while `en` is high the LFSR advances and `bit_o` is registered each
// clock, so bit_o at cycle t+1 reflects the LFSR state and prob of cycle t.
// `load` seeds the LFSR and clears bit_o. Because the LFSR never holds zero,
// the density is (prob-1)/(2^W-1), within 2^-W of prob/2^W.
module bin2sto #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  input  logic [W-1:0] prob,
  output logic         bit_o
);

  logic [W-1:0] rnd;

  sc_lfsr #(.W(W)) u_lfsr (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .step(en), .state(rnd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bit_o <= 1'b0;
    else if (load) bit_o <= 1'b0;
    else if (en)   bit_o <= (rnd < prob);
  end

endmodule
