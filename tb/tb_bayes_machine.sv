// tb_bayes_machine: self-checking test of the stochastic Bayesian machine.
// The testbench draws a random robot model (peaked likelihoods and soft
// evidence so that the unnormalised posterior is not tiny), feeds the 216
// inputs as independent random bitstreams of those densities, counts the 5
// outputs over NB clocks and compares each density with the exact
// unnormalised posterior computed in real arithmetic, within 5 sigma plus a
// 4 % allowance for ones lost by saturating OR+ memories. The normalised
// result must also have a KL divergence below 0.01.
module tb_bayes_machine;
  localparam int NB = 200000;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [215:0] bits = '0;
  logic [4:0]   post;
  int checks = 0, failures = 0;
  real prb[216];

  bayes_machine dut (.clk, .rst_n, .clr, .en, .bits, .post);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // random distribution over n values; `peak` (or -1) gets extra weight
  task automatic rand_dist(input int base, input int n, input int peak, input real w);
    real s, v[5];
    s = 0;
    for (int i = 0; i < n; i++) begin
      v[i] = 0.05 + real'($urandom_range(1000)) / 1000.0 + ((i == peak) ? w : 0.0);
      s += v[i];
    end
    for (int i = 0; i < n; i++) prb[base + i] = v[i] / s;
  endtask

  initial begin
    repeat (NB + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real q[5], qs, fj[3][3], eir, eus, kl, mean, sig;
    int  cnt[5], tot;
    // model
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
      for (int d = 0; d < 3; d++) begin
        rand_dist(144 + j*9 + d*3, 3, d, 6.0);
        rand_dist(171 + j*9 + d*3, 3, d, 6.0);
      end
      rand_dist(198 + j*3, 3, j % 3, 4.0);
      rand_dist(207 + j*3, 3, j % 3, 4.0);
    end
    // exact unnormalised posterior
    for (int j = 0; j < 3; j++)
      for (int d = 0; d < 3; d++) begin
        eir = 0; eus = 0;
        for (int x = 0; x < 3; x++) begin
          eir += prb[198 + j*3 + x] * prb[144 + j*9 + d*3 + x];
          eus += prb[207 + j*3 + x] * prb[171 + j*9 + d*3 + x];
        end
        fj[j][d] = prb[135 + j*3 + d] * eir * eus;
      end
    qs = 0;
    for (int m = 0; m < 5; m++) begin
      q[m] = 0;
      for (int c = 0; c < 27; c++)
        q[m] += prb[m*27 + c] * fj[0][c/9] * fj[1][(c/3)%3] * fj[2][c%3];
      qs += q[m];
    end
    // run
    @(negedge clk); rst_n = 1;
    clr = 1; @(negedge clk); clr = 0;
    for (int m = 0; m < 5; m++) cnt[m] = 0;
    en = 1;
    for (int t = 0; t < NB; t++) begin
      for (int i = 0; i < 216; i++)
        bits[i] = (real'($urandom) / 4294967296.0) < prb[i];
      #1;
      for (int m = 0; m < 5; m++) cnt[m] += int'(post[m]);
      @(negedge clk);
    end
    en = 0;
    tot = 0;
    for (int m = 0; m < 5; m++) tot += cnt[m];
    kl = 0;
    for (int m = 0; m < 5; m++) begin
      mean = real'(cnt[m]) / NB;
      sig  = $sqrt(q[m] / NB);
      $display("V%0d: exact %f  measured %f", m, q[m], mean);
      check((mean - q[m]) < 5*sig + 0.04*q[m] && (q[m] - mean) < 5*sig + 0.04*q[m],
            $sformatf("V%0d density", m));
      if (cnt[m] > 0) kl += (q[m]/qs) * $ln((q[m]/qs) / (real'(cnt[m])/tot));
      else            kl += 1.0;
    end
    $display("KL divergence %f", kl);
    check(kl < 0.01, "KL divergence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
