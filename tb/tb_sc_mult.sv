// tb_sc_mult: self-checking test of the AND multiplier. Exhaustive truth
// table for N=3, and a statistical check that two independent streams of
// density 0.6 and 0.5 give a product stream of density 0.3.
module tb_sc_mult;
  logic [2:0] a3;
  logic       y3;
  logic [1:0] a2;
  logic       y2;
  int checks = 0, failures = 0;

  sc_mult #(.N(3)) dut3 (.a(a3), .y(y3));
  sc_mult #(.N(2)) dut2 (.a(a2), .y(y2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    real mean;
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v); #1;
      check(y3 == (v == 7), $sformatf("a=%0d y=%b", v, y3));
    end
    ones = 0;
    for (int i = 0; i < 40000; i++) begin
      a2[0] = ($urandom_range(9) < 6);
      a2[1] = ($urandom_range(1) == 1);
      #1;
      ones += int'(y2);
    end
    mean = real'(ones) / 40000.0;
    check(mean > 0.29 && mean < 0.31, $sformatf("product density %f", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
