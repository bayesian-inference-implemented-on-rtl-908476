// tb_sc_lfsr: self-checking test of the 32-bit LFSR. A reference next-state
// function written from the polynomial x^32+x^22+x^2+x+1 (taps listed one by
// one, not the packed mask) predicts every state after a seed load; a 4-bit
// instance with x^4+x^3+1 must show the full period of 15. Also checks reset
// value, zero-seed replacement and hold when step is low.
module tb_sc_lfsr;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = '0, state;
  logic        load4 = 0, step4 = 0;
  logic [3:0]  state4;
  int checks = 0, failures = 0;

  sc_lfsr dut (.clk, .rst_n, .load, .seed, .step, .state);
  sc_lfsr #(.W(4), .MASK(4'b1100)) dut4 (.clk, .rst_n, .load(load4), .seed(4'd1),
                                         .step(step4), .state(state4));

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_next(input logic [31:0] s);
    logic fb;
    logic [31:0] n;
    fb = s[0];
    n  = s >> 1;
    if (fb) begin
      n[31] = n[31] ^ 1'b1;   // x^32
      n[21] = n[21] ^ 1'b1;   // x^22
      n[1]  = n[1]  ^ 1'b1;   // x^2
      n[0]  = n[0]  ^ 1'b1;   // x^1
    end
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int period;
    @(negedge clk);
    check(state == 32'd1, "reset value");
    rst_n = 1;
    // load a seed
    seed = 32'hDEAD_BEEF; load = 1;
    @(negedge clk); load = 0;
    check(state == 32'hDEAD_BEEF, "seed load");
    exp = 32'hDEAD_BEEF;
    step = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      exp = ref_next(exp);
      check(state == exp, $sformatf("step %0d", i));
    end
    step = 0;
    repeat (3) @(negedge clk);
    check(state == exp, "hold");
    // zero seed
    seed = '0; load = 1;
    @(negedge clk); load = 0;
    check(state == 32'd1, "zero seed replaced by 1");
    // small LFSR period
    load4 = 1; @(negedge clk); load4 = 0;
    step4 = 1; period = 0;
    do begin @(negedge clk); period++; end while (state4 != 4'd1 && period < 40);
    step4 = 0;
    check(period == 15, $sformatf("4-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
