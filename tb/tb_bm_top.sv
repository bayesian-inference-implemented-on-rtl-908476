// tb_bm_top: end-to-end test of the whole machine at its default sizes
// (216 inputs, 5 outputs, 32-bit words). Through the host bus it loads a
// random robot model and soft evidence, runs inferences and reads the five
// counts back. The testbench computes the exact posterior in real
// arithmetic and checks each unnormalised density and the KL divergence of
// the normalised result. It also checks the run length (LENGTH + 3 clocks
// from start to done), that the same seed reproduces the same counts, that
// another seed gives other counts, that a start is ignored while busy, input
// memory read-back and a zero-length run. Every mechanism is counted and one
// that never happens is a failure.
module tb_bm_top;
  import bm_pkg::*;
  localparam int LEN = 131072;
  logic clk = 0, rst_n = 0, we = 0, busy, done;
  logic [8:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  real prb[216];
  // mechanism counters
  int n_load = 0, n_gen = 0, n_store = 0, n_surplus = 0, n_ignored = 0;
  int n_readback = 0, n_runs = 0;

  bm_top dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .busy, .done);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    n_load  += int'(dut.u_ctrl.load);
    n_gen   += int'(dut.u_ctrl.gen_en);
    n_store += int'(dut.u_ctrl.store);
    if (dut.u_bm.g_br[4].u_br.u_marg.pend != 0 ||
        dut.u_bm.g_br[0].u_br.g_dir[0].g_lvl[0].u_sir.pend != 0) n_surplus++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    we = 1; addr = a; wdata = d; @(negedge clk); we = 0;
  endtask

  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    addr = a; #1; d = rdata; @(negedge clk);
  endtask

  task automatic rand_dist(input int base, input int n, input int peak, input real w);
    real s, v[5];
    s = 0;
    for (int i = 0; i < n; i++) begin
      v[i] = 0.05 + real'($urandom_range(1000)) / 1000.0 + ((i == peak) ? w : 0.0);
      s += v[i];
    end
    for (int i = 0; i < n; i++) prb[base + i] = v[i] / s;
  endtask

  // one inference; returns the five counts and checks the duration
  task automatic infer(input logic [31:0] seed, input int len, output int cnt[5]);
    int cyc;
    logic [31:0] d;
    wr(ADR_SEED, seed);
    wr(ADR_LENGTH, 32'(len));
    wr(ADR_CTRL, 32'h1);
    cyc = 0;
    while (!done) begin
      if (cyc == 5) begin
        int nl0;
        nl0 = n_load;
        wr(ADR_CTRL, 32'h1);       // start while busy: must be ignored (runs of 0 bits end first)
        cyc++;
        if (busy && n_load == nl0) n_ignored++;
      end else begin
        @(negedge clk); cyc++;
      end
      if (cyc > len + 100) break;
    end
    n_runs++;
    check(cyc == len + 3, $sformatf("run of %0d bits took %0d clocks", len, cyc));
    for (int m = 0; m < 5; m++) begin
      rd(ADR_OUT + 9'(m), d);
      cnt[m] = int'(d);
    end
  endtask

  initial begin
    repeat (4 * LEN + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real q[5], qs, fj[3][3], eir, eus, kl, mean, sig;
    int  c1[5], c2[5], c3[5], tot, same, mis;
    logic [31:0] d, w[216];
    // model: peaked distributions so the posterior mass is not tiny
    for (int c = 0; c < 27; c++) begin
      real v[5], s;
      s = 0;
      for (int m = 0; m < 5; m++) begin
        v[m] = 0.05 + real'($urandom_range(1000)) / 1000.0;
        s += v[m];
      end
      for (int m = 0; m < 5; m++) prb[m*27 + c] = v[m] / s;
    end
    for (int j = 0; j < 3; j++) begin
      rand_dist(135 + j*3, 3, j % 3, 4.0);
      for (int dd = 0; dd < 3; dd++) begin
        rand_dist(144 + j*9 + dd*3, 3, dd, 6.0);
        rand_dist(171 + j*9 + dd*3, 3, dd, 6.0);
      end
      rand_dist(198 + j*3, 3, j % 3, 4.0);
      rand_dist(207 + j*3, 3, j % 3, 4.0);
    end
    for (int j = 0; j < 3; j++)
      for (int dd = 0; dd < 3; dd++) begin
        eir = 0; eus = 0;
        for (int x = 0; x < 3; x++) begin
          eir += prb[198 + j*3 + x] * prb[144 + j*9 + dd*3 + x];
          eus += prb[207 + j*3 + x] * prb[171 + j*9 + dd*3 + x];
        end
        fj[j][dd] = prb[135 + j*3 + dd] * eir * eus;
      end
    qs = 0;
    for (int m = 0; m < 5; m++) begin
      q[m] = 0;
      for (int c = 0; c < 27; c++)
        q[m] += prb[m*27 + c] * fj[0][c/9] * fj[1][(c/3)%3] * fj[2][c%3];
      qs += q[m];
    end

    @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 216; i++) begin
      longint v;
      v = longint'(prb[i] * 4294967296.0);
      if (v > 64'hFFFF_FFFF) v = 64'hFFFF_FFFF;
      w[i] = 32'(v);
      wr(9'(i), w[i]);
    end
    mis = 0;
    for (int i = 0; i < 216; i++) begin
      rd(9'(i), d);
      if (d != w[i]) mis++;
    end
    check(mis == 0, "input memory read-back");
    if (mis == 0) n_readback++;

    infer(32'h1357_9BDF, LEN, c1);
    tot = 0;
    kl = 0;
    for (int m = 0; m < 5; m++) tot += c1[m];
    for (int m = 0; m < 5; m++) begin
      mean = real'(c1[m]) / LEN;
      sig  = $sqrt(q[m] / LEN);
      $display("V%0d: exact %f measured %f", m, q[m], mean);
      check((mean - q[m]) < 5*sig + 0.04*q[m] && (q[m] - mean) < 5*sig + 0.04*q[m],
            $sformatf("V%0d density", m));
      if (c1[m] > 0) kl += (q[m]/qs) * $ln((q[m]/qs) / (real'(c1[m])/tot));
      else           kl += 1.0;
    end
    $display("KL divergence at %0d bits: %f", LEN, kl);
    check(kl < 0.01, "KL divergence");

    infer(32'h2468_ACE0, LEN, c2);
    infer(32'h1357_9BDF, LEN, c3);
    same = 0;
    for (int m = 0; m < 5; m++) same += int'(c1[m] == c2[m]);
    check(same < 5, "another seed gives other streams");
    same = 0;
    for (int m = 0; m < 5; m++) same += int'(c1[m] == c3[m]);
    check(same == 5, "same seed reproduces the counts");

    infer(32'h1, 0, c3);
    for (int m = 0; m < 5; m++) check(c3[m] == 0, "zero-length run counts nothing");
    rd(ADR_STATUS, d);
    check(d == 32'h2, "status done, not busy");

    check(n_load == n_runs, $sformatf("seed loads %0d", n_load));
    check(n_gen == 3 * LEN, $sformatf("generator clocks %0d", n_gen));
    check(n_store == n_runs, $sformatf("stores %0d", n_store));
    check(n_surplus > 0, $sformatf("OR+ surplus held on %0d clocks", n_surplus));
    check(n_ignored == n_runs - 1, $sformatf("starts ignored while busy %0d", n_ignored));
    check(n_readback > 0, "read-back");
    $display("mechanisms: runs=%0d loads=%0d gen=%0d stores=%0d surplus=%0d ignored=%0d",
             n_runs, n_load, n_gen, n_store, n_surplus, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
