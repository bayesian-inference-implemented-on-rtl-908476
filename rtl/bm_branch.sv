// bm_branch: one of the five identical circuits of the Bayesian machine. It
// turns the 216 input bitstreams into one bitstream whose density is the
// unnormalised posterior of one rotation velocity V = M:
//
//   y ~ sum_{d0,d1,d2} P(M|d0 d1 d2) * prod_j P(Dj=dj) * Eir_j(dj) * Eus_j(dj)
//   Eir_j(d) = sum_x P~(IRj=x) P(IRj=x | Dj=d)      (likewise Eus_j)
//
// which is equation (2) of the inference for the robot model described in
// bm_pkg, with the sums nested as far as the model allows. Products are AND
// gates (sc_mult) and sums are OR+ adders (sc_orplus). Each branch has its own
// copy of the evidence sums, so the five branches are exact copies apart from
// the P(V=M|D) streams they read. The factorisation is this design's
// reconstruction of the source's computation tree.
//
// Timing: combinational from `bits` to `y` apart from the OR+ memories,
// which update when `en` is high and are cleared by `clr`.
module bm_branch #(
  parameter int unsigned M        = 0,
  parameter int unsigned ESUM_PW  = 2,   // OR+ memory of the 3-term sums
  parameter int unsigned MARG_PW  = 4    // OR+ memory of the 27-term sum
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic [bm_pkg::N_IN-1:0] bits,
  output logic                    y
);
  import bm_pkg::*;

  logic [N_DIR-1:0][N_LVL-1:0] e_ir, e_us, f;
  logic [N_DCOMB-1:0]          term;

  for (genvar j = 0; j < N_DIR; j++) begin : g_dir
    for (genvar d = 0; d < N_LVL; d++) begin : g_lvl
      logic [N_LVL-1:0] p_ir, p_us;
      for (genvar x = 0; x < N_LVL; x++) begin : g_x
        sc_mult #(.N(2)) u_mir (
          .a({bits[A_EIR + j*3 + x], bits[A_PIR + j*9 + d*3 + x]}), .y(p_ir[x]));
        sc_mult #(.N(2)) u_mus (
          .a({bits[A_EUS + j*3 + x], bits[A_PUS + j*9 + d*3 + x]}), .y(p_us[x]));
      end
      sc_orplus #(.N(N_LVL), .PEND_W(ESUM_PW)) u_sir (
        .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(p_ir), .y(e_ir[j][d]));
      sc_orplus #(.N(N_LVL), .PEND_W(ESUM_PW)) u_sus (
        .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(p_us), .y(e_us[j][d]));
      sc_mult #(.N(3)) u_f (
        .a({bits[A_PD + j*3 + d], e_ir[j][d], e_us[j][d]}), .y(f[j][d]));
    end
  end

  for (genvar c = 0; c < N_DCOMB; c++) begin : g_term
    localparam int unsigned D0 = c / 9;
    localparam int unsigned D1 = (c / 3) % 3;
    localparam int unsigned D2 = c % 3;
    sc_mult #(.N(4)) u_t (
      .a({bits[A_PV + M*N_DCOMB + c], f[0][D0], f[1][D1], f[2][D2]}), .y(term[c]));
  end

  sc_orplus #(.N(N_DCOMB), .PEND_W(MARG_PW)) u_marg (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(term), .y(y));

endmodule
