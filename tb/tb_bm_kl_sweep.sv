// tb_bm_kl_sweep: accuracy against bitstream length, the experiment behind
// the accuracy table and KL-divergence plot of the design's evaluation. It
// loads one random robot model into the full-size machine, runs inferences
// of 10^3, 10^4, 10^5, 10^6 and 10^7 bits (each with its own seed) and prints
// the normalised posterior and its KL divergence from the exact posterior
// computed in real arithmetic. Checks: every run takes LENGTH + 3 clocks, the
// divergence at 10^7 bits is below the one at 10^3 bits and below 10^-4, and
// the divergence at 10^6 bits is below 10^-3. (The model is random, not the
// robot's, so the numbers are comparable in trend, not in value.)
module tb_bm_kl_sweep;
  import bm_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, busy, done;
  logic [8:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  real prb[216];

  bm_top dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .busy, .done);

  always #5 clk = ~clk;

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

  task automatic infer(input logic [31:0] seed, input int len, output int cnt[5]);
    int cyc;
    logic [31:0] d;
    wr(ADR_SEED, seed);
    wr(ADR_LENGTH, 32'(len));
    wr(ADR_CTRL, 32'h1);
    cyc = 0;
    while (!done && cyc < len + 100) begin @(negedge clk); cyc++; end
    check(cyc == len + 3, $sformatf("run of %0d bits took %0d clocks", len, cyc));
    for (int m = 0; m < 5; m++) begin
      rd(ADR_OUT + 9'(m), d);
      cnt[m] = int'(d);
    end
  endtask

  initial begin
    repeat (11200000 + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real q[5], qs, fj[3][3], eir, eus, kl, kls[5];
    int  cnt[5], tot, len;
    logic [31:0] w;
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
      w = 32'(v);
      wr(9'(i), w);
    end
    len = 1000;
    for (int k = 0; k < 5; k++) begin
      infer(32'hA5A5_0001 + 32'(k) * 32'h1111_1111, len, cnt);
      tot = 0;
      for (int m = 0; m < 5; m++) tot += cnt[m];
      kl = 0;
      for (int m = 0; m < 5; m++)
        if (cnt[m] > 0) kl += (q[m]/qs) * $ln((q[m]/qs) / (real'(cnt[m])/tot));
        else            kl += 1.0;
      kls[k] = kl;
      $display("%9d bits: %7.4f %7.4f %7.4f %7.4f %7.4f  KL %e", len,
               real'(cnt[0])/tot, real'(cnt[1])/tot, real'(cnt[2])/tot,
               real'(cnt[3])/tot, real'(cnt[4])/tot, kl);
      len = len * 10;
    end
    $display("exact     : %7.4f %7.4f %7.4f %7.4f %7.4f", q[0]/qs, q[1]/qs, q[2]/qs,
             q[3]/qs, q[4]/qs);
    check(kls[4] < kls[0], "KL falls with length");
    check(kls[3] < 1e-3, "KL below 1e-3 at 10^6 bits");
    check(kls[4] < 1e-4, "KL below 1e-4 at 10^7 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
