// tb_sto2bin: self-checking test of the accumulator counter: counts ones only
// while en is high, clr zeroes it, and the count equals the testbench's own
// tally over a random stream.
module tb_sto2bin;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_i = 0;
  logic [31:0] count;
  int checks = 0, failures = 0;

  sto2bin dut (.clk, .rst_n, .clr, .en, .bit_i, .count);

  always #5 clk = ~clk;

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
    int tally;
    @(negedge clk);
    check(count == 0, "reset");
    rst_n = 1;
    tally = 0;
    for (int i = 0; i < 5000; i++) begin
      en    = ($urandom_range(3) != 0);
      bit_i = ($urandom_range(1) == 1);
      if (en && bit_i) tally++;
      @(negedge clk);
      if (i % 500 == 499) check(count == 32'(tally), $sformatf("count %0d vs %0d", count, tally));
    end
    en = 0;
    clr = 1; bit_i = 1; @(negedge clk); clr = 0;
    check(count == 0, "clr");
    en = 1; repeat (7) @(negedge clk); en = 0;
    check(count == 7, "all ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
