// bm_top: stochastic-computing Bayesian machine for robot obstacle avoidance.
// The chain follows the source's block diagram:
//
//   in_mem (216 x 32) -> bin2sto_bank (216 streams) -> bayes_machine (5
//   streams) -> 5 x sto2bin (5 x 32) -> out_mem (5 x 32),  ctrl_reg driving
//   the converters, the machine and the counters.
//
// The host loads 216 binary probabilities (model parameters and soft
// evidence, layout in bm_pkg), writes a seed and a bitstream length, starts
// a run and, when done, reads 5 counts. count[m] / LENGTH approximates the
// unnormalised posterior of rotation velocity m; dividing each count by the
// sum of the five gives the posterior. Precision grows with the length
// (about 10^6 bits for a KL divergence near 10^-4 in the source's tests).
//
// Host bus (this design's choice): one word per clock, word address `addr`,
// write when `we` is high, combinational `rdata`:
//   0x000-0x0D7 input memory, 0x100 CTRL, 0x101 SEED, 0x102 LENGTH,
//   0x103 STATUS, 0x110-0x114 output counts. Other addresses read 0.
// Input-memory writes are taken at any time; writing during a run changes
// the streams from the next clock on.
module bm_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [8:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        busy,
  output logic        done
);
  import bm_pkg::*;

  logic [N_IN-1:0][PW-1:0]  prob;
  logic [N_IN-1:0]          sbits;
  logic [N_OUT-1:0]         post;
  logic [N_OUT-1:0][PW-1:0] counts;
  logic [PW-1:0]            in_rdata, out_rdata, ctl_rdata, seed;
  logic                     ctl_hit, load, clr, gen_en, acc_en, store;
  logic                     in_sel, out_sel;

  assign in_sel  = (32'(addr) < N_IN);
  assign out_sel = (addr >= ADR_OUT) && (32'(addr) < 32'(ADR_OUT) + N_OUT);

  in_mem #(.DEPTH(N_IN), .W(PW)) u_in_mem (
    .clk(clk), .rst_n(rst_n), .we(we && in_sel), .waddr(addr[7:0]),
    .wdata(wdata), .raddr(addr[7:0]), .rdata(in_rdata), .words(prob)
  );

  ctrl_reg #(.W(PW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata),
    .rdata(ctl_rdata), .hit(ctl_hit), .seed(seed), .load(load), .clr(clr),
    .gen_en(gen_en), .acc_en(acc_en), .store(store), .busy(busy), .done(done)
  );

  bin2sto_bank #(.N(N_IN), .W(PW)) u_b2s (
    .clk(clk), .rst_n(rst_n), .load(load), .base_seed(seed), .en(gen_en),
    .prob(prob), .bits(sbits)
  );

  bayes_machine u_bm (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(acc_en), .bits(sbits), .post(post)
  );

  for (genvar m = 0; m < N_OUT; m++) begin : g_s2b
    sto2bin #(.W(PW)) u_s2b (
      .clk(clk), .rst_n(rst_n), .clr(clr), .en(acc_en), .bit_i(post[m]),
      .count(counts[m])
    );
  end

  out_mem #(.DEPTH(N_OUT), .W(PW)) u_out_mem (
    .clk(clk), .rst_n(rst_n), .store(store), .counts(counts),
    .raddr(3'(addr - ADR_OUT)), .rdata(out_rdata)
  );

  always_comb begin
    if (in_sel)       rdata = in_rdata;
    else if (ctl_hit) rdata = ctl_rdata;
    else if (out_sel) rdata = out_rdata;
    else              rdata = '0;
  end

endmodule
