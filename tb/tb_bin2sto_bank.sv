// tb_bin2sto_bank: self-checking test of the 216-converter stage. The
// testbench rebuilds each converter's seed (base seed XOR its own copy of the
// per-index hash) and its LFSR, and predicts all 216 streams bit by bit over
// 400 clocks, for two base seeds. It also checks that all seeds differ.
module tb_bin2sto_bank;
  localparam int N = 216;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [31:0] base_seed = '0;
  logic [N-1:0][31:0] prob;
  logic [N-1:0] bits;
  int checks = 0, failures = 0;

  bin2sto_bank dut (.clk, .rst_n, .load, .base_seed, .en, .prob, .bits);

  always #5 clk = ~clk;

  function automatic logic [31:0] hash(input int unsigned i);
    logic [31:0] h;
    h = 32'(i + 1) * 32'd2654435769;
    h = h ^ {16'h0, h[31:16]};
    h = h * 32'd2246822507;
    h = h ^ {13'h0, h[31:13]};
    return h;
  endfunction

  function automatic logic [31:0] ref_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st[N];
    logic [N-1:0] expb;
    int mis, dup;
    for (int i = 0; i < N; i++) prob[i] = $urandom;
    @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      base_seed = (run == 0) ? 32'h0 : 32'hC0FF_EE11;
      load = 1; @(negedge clk); load = 0;
      dup = 0;
      for (int i = 0; i < N; i++) begin
        st[i] = base_seed ^ hash(i);
        if (st[i] == 0) st[i] = 1;
        for (int k = 0; k < i; k++) if (st[k] == st[i]) dup++;
      end
      check(dup == 0, "distinct seeds");
      en = 1; mis = 0;
      for (int t = 0; t < 400; t++) begin
        for (int i = 0; i < N; i++) begin
          expb[i] = (st[i] < prob[i]);
          st[i]   = ref_next(st[i]);
        end
        @(negedge clk);
        if (bits !== expb) mis++;
        if (t % 40 == 39) begin
          check(mis == 0, $sformatf("run %0d t=%0d mismatching clocks %0d", run, t, mis));
          mis = 0;
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
