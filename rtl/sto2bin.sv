// sto2bin: stochastic-to-binary converter, an accumulator counter as in the
// source. It counts the ones of a bitstream; the count divided by the number
// of bits counted is the stream's value. W = 32 bits holds streams of up to
// 2^32-1 bits, more than the 10^9-bit runs the design is meant for.
//
// Timing: `clr` zeroes the count; each clock with `en` high adds `bit_i`.
// `count` is registered.
module sto2bin #(
  parameter int unsigned W = bm_pkg::PW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bit_i,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (clr)         count <= '0;
    else if (en && bit_i) count <= count + 1'b1;
  end

endmodule
