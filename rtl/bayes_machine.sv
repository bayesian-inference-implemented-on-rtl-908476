// bayes_machine: the "Full Bayesian Machine" of the robot obstacle-avoidance
// example. It takes the 216 stochastic bitstreams of the model parameters and
// the soft evidence, and delivers 5 bitstreams whose densities are
// proportional to the posterior over the 5 rotation velocities (full left,
// half left, none, half right, full right). As in the source, the circuit is
// duplicated five times in parallel, one copy (bm_branch) per output value,
// and the normalisation is left to whoever reads the counts: the densities
// are not divided by their sum.
//
// Timing: combinational from `bits` to `post` apart from the OR+ memories in
// the branches (updated when `en` is high, cleared by `clr`).
module bayes_machine #(
  parameter int unsigned ESUM_PW = 2,
  parameter int unsigned MARG_PW = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic [bm_pkg::N_IN-1:0]  bits,
  output logic [bm_pkg::N_OUT-1:0] post
);

  for (genvar m = 0; m < bm_pkg::N_OUT; m++) begin : g_br
    bm_branch #(.M(m), .ESUM_PW(ESUM_PW), .MARG_PW(MARG_PW)) u_br (
      .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .bits(bits), .y(post[m]));
  end

endmodule
