// tb_in_mem: self-checking test of the 216 x 32 input memory: reset to zero,
// random writes checked through both the host read port and the parallel
// word outputs against a testbench copy, out-of-range writes ignored.
module tb_in_mem;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [215:0][31:0] words;
  logic [31:0] shadow[216];
  int checks = 0, failures = 0;

  in_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .words);

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
    @(negedge clk);
    check(words == '0, "reset");
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      we = 1; waddr = 8'($urandom_range(255)); wdata = $urandom;
      if (waddr < 216) shadow[waddr] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a); #1;
      check(rdata == ((a < 216) ? shadow[a] : 32'h0), $sformatf("read word %0d", a));
      if (a < 216) check(words[a] == shadow[a], $sformatf("parallel word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
