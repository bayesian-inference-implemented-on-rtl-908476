// bin2sto_bank: the "Binary to Stochastic" stage, N converters side by side
// (216 in the robot machine, each with its own LFSR, as in the source).
//
// Every LFSR is seeded with `base_seed` XOR a fixed per-index offset
// (bm_pkg::seed_offset), so one 32-bit seed register gives every converter a
// different starting point and a new base seed gives a new, reproducible
// set of streams. The offset scheme is this design's choice.
//
// Timing: `load` seeds all LFSRs in one clock; while `en` is high each
// stream bit_o[i] delivers one bit per clock, one cycle after its input.
module bin2sto_bank #(
  parameter int unsigned N = bm_pkg::N_IN,
  parameter int unsigned W = bm_pkg::PW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [W-1:0]         base_seed,
  input  logic                 en,
  input  logic [N-1:0][W-1:0]  prob,
  output logic [N-1:0]         bits
);

  for (genvar i = 0; i < N; i++) begin : g_conv
    localparam logic [W-1:0] OFS = W'(bm_pkg::seed_offset(i));
    bin2sto #(.W(W)) u_conv (
      .clk(clk), .rst_n(rst_n), .load(load), .seed(base_seed ^ OFS),
      .en(en), .prob(prob[i]), .bit_o(bits[i])
    );
  end

endmodule
