// tb_out_mem: self-checking test of the 5 x 32 output memory: reset to zero,
// store captures all five counts at once and holds them while the inputs
// change, out-of-range reads return 0.
module tb_out_mem;
  logic clk = 0, rst_n = 0, store = 0;
  logic [4:0][31:0] counts = '0;
  logic [2:0] raddr = '0;
  logic [31:0] rdata;
  logic [31:0] shadow[5];
  int checks = 0, failures = 0;

  out_mem dut (.clk, .rst_n, .store, .counts, .raddr, .rdata);

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
    raddr = 3'd2; #1; check(rdata == 0, "reset");
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 5; i++) counts[i] = $urandom;
      store = ($urandom_range(1) == 1);
      if (store) for (int i = 0; i < 5; i++) shadow[i] = counts[i];
      @(negedge clk); store = 0;
      for (int i = 0; i < 5; i++) counts[i] = $urandom;
      for (int a = 0; a < 8; a++) begin
        raddr = 3'(a); #1;
        check(rdata == ((a < 5) ? shadow[a] : 32'h0), $sformatf("r%0d word %0d", r, a));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
