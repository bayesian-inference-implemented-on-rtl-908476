// tb_bin2sto: self-checking test of one binary-to-stochastic converter. A
// reference LFSR in the testbench predicts each output bit exactly (bit at
// t+1 = state(t) < prob); over 20000 bits the density must also be within
// 4 sigma of prob/2^32 for several probabilities, including 0 and near 1.
module tb_bin2sto;
  logic        clk = 0, rst_n = 0, load = 0, en = 0, bit_o;
  logic [31:0] seed = '0, prob = '0;
  int checks = 0, failures = 0;

  bin2sto dut (.clk, .rst_n, .load, .seed, .en, .prob, .bit_o);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real probs[5] = '{0.0, 0.05, 0.3, 0.75, 0.9999};
    logic [31:0] st;
    int ones, mism, n;
    real p, mean, sig;
    n = 20000;
    @(negedge clk); rst_n = 1;
    foreach (probs[k]) begin
      p    = probs[k];
      prob = 32'(longint'(p * 4294967296.0));
      seed = 32'h1234_5678 + 32'(k) * 32'h0101_0101;
      load = 1; @(negedge clk); load = 0;
      check(bit_o == 1'b0, "load clears output");
      st = (seed == 0) ? 32'd1 : seed;
      en = 1; ones = 0; mism = 0;
      for (int i = 0; i < n; i++) begin
        logic expb;
        expb = (st < prob);
        @(negedge clk);
        st = ref_next(st);
        if (bit_o !== expb) mism++;
        ones += int'(bit_o);
      end
      en = 0;
      check(mism == 0, $sformatf("p=%f exact stream, %0d mismatches", p, mism));
      mean = real'(ones) / n;
      sig  = $sqrt(p * (1.0 - p) / n) + 1e-4;
      check((mean - p) < 4*sig && (p - mean) < 4*sig,
            $sformatf("p=%f density %f", p, mean));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
