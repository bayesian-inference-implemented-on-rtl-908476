// tb_sc_orplus: self-checking test of the OR+ adder. A reference model of
// the surplus-one counter checks the 2-input, 1-bit-memory cell and a
// 3-input, 2-bit-memory cell cycle by cycle on random inputs; statistical
// checks show that OR+ adds densities whose sum is below 1 (where a plain
// OR would fall short), and that clr and en behave.
module tb_sc_orplus;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [1:0] a2 = '0;
  logic [2:0] a3 = '0;
  logic y2, y3;
  int checks = 0, failures = 0;

  sc_orplus #(.N(2), .PEND_W(1)) dut2 (.clk, .rst_n, .clr, .en, .a(a2), .y(y2));
  sc_orplus #(.N(3), .PEND_W(2)) dut3 (.clk, .rst_n, .clr, .en, .a(a3), .y(y3));

  always #5 clk = ~clk;

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
    int p2, p3, t, e2, e3, mis, ones2, ones3, orones, n;
    @(negedge clk); rst_n = 1; en = 1;
    p2 = 0; p3 = 0; mis = 0; ones2 = 0; ones3 = 0; orones = 0; n = 50000;
    for (int i = 0; i < n; i++) begin
      a2[0] = ($urandom_range(99) < 20);
      a2[1] = ($urandom_range(99) < 30);
      a3[0] = ($urandom_range(99) < 20);
      a3[1] = ($urandom_range(99) < 30);
      a3[2] = ($urandom_range(99) < 25);
      #1;
      t = p2 + a2[0] + a2[1]; e2 = (t > 0); p2 = (t - e2 > 1) ? 1 : t - e2;
      t = p3 + a3[0] + a3[1] + a3[2]; e3 = (t > 0); p3 = (t - e3 > 3) ? 3 : t - e3;
      if (y2 != e2[0] || y3 != e3[0]) mis++;
      ones2 += int'(y2); ones3 += int'(y3); orones += int'(|a2);
      @(negedge clk);
    end
    check(mis == 0, $sformatf("cycle model mismatches %0d", mis));
    check(real'(ones2)/n > 0.48 && real'(ones2)/n < 0.52,
          $sformatf("2-input sum density %f (0.50)", real'(ones2)/n));
    check(real'(orones)/n < 0.46, "plain OR falls short of the sum");
    check(real'(ones3)/n > 0.73 && real'(ones3)/n < 0.77,
          $sformatf("3-input sum density %f (0.75)", real'(ones3)/n));
    // surplus one is kept while en is low, then emitted
    clr = 1; @(negedge clk); clr = 0;
    a2 = 2'b11; #1; check(y2 == 1'b1, "both ones -> 1");
    @(negedge clk); a2 = 2'b00; en = 0; #1;
    check(y2 == 1'b1, "surplus one visible");
    repeat (3) @(negedge clk);
    check(y2 == 1'b1, "surplus kept while en low");
    en = 1; @(negedge clk); #1;
    check(y2 == 1'b0, "surplus emitted once");
    // clr drops a surplus
    a2 = 2'b11; @(negedge clk); a2 = 2'b00; clr = 1; @(negedge clk); clr = 0; #1;
    check(y2 == 1'b0, "clr empties memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
