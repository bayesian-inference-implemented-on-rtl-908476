// tb_ctrl_reg: self-checking test of the control register and run sequencer.
// Checks register write/read-back, the sequence LOAD, LENGTH clocks of
// gen_en, acc_en as gen_en delayed by one clock, STORE, done; the total of
// LENGTH + 3 clocks; a start ignored while busy; register writes ignored
// while busy; and a run of length 0.
module tb_ctrl_reg;
  import bm_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [8:0]  addr = '0;
  logic [31:0] wdata = '0, rdata, seed;
  logic hit, load, clr, gen_en, acc_en, store, busy, done;
  int checks = 0, failures = 0;

  ctrl_reg dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .hit, .seed, .load,
                .clr, .gen_en, .acc_en, .store, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    we = 1; addr = a; wdata = d; @(negedge clk); we = 0; addr = '0;
  endtask

  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    addr = a; #1; d = rdata;
  endtask

  // run of length len: check pulse counts and duration
  task automatic run(input int len);
    int cyc, nload, ngen, nacc, nstore, lag_bad;
    logic prev_gen;
    wr(ADR_LENGTH, 32'(len));
    wr(ADR_CTRL, 32'h1);
    cyc = 0; nload = 0; ngen = 0; nacc = 0; nstore = 0; lag_bad = 0; prev_gen = 0;
    while (!done && cyc < len + 20) begin
      we = 0;
      if (cyc == 2) begin we = 1; addr = ADR_CTRL;   wdata = 32'h1;   end  // ignored: busy
      if (cyc == 3) begin we = 1; addr = ADR_LENGTH; wdata = 32'd999; end  // ignored: busy
      cyc++;
      nload += int'(load && clr); ngen += int'(gen_en); nacc += int'(acc_en);
      nstore += int'(store);
      if (acc_en != prev_gen) lag_bad++;
      prev_gen = gen_en;
      @(negedge clk);
    end
    we = 0; addr = '0;
    check(cyc == len + 3, $sformatf("len %0d: %0d clocks to done", len, cyc));
    check(nload == 1, "one load/clr clock");
    check(ngen == len, $sformatf("gen_en clocks %0d", ngen));
    check(nacc == len, $sformatf("acc_en clocks %0d", nacc));
    check(nstore == 1, "one store clock");
    check(lag_bad == 0, "acc_en lags gen_en by one clock");
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    @(negedge clk); rst_n = 1;
    rd(ADR_STATUS, d); check(d == 0, "status idle after reset");
    wr(ADR_SEED, 32'hABCD_1234);
    rd(ADR_SEED, d); check(d == 32'hABCD_1234 && seed == d, "seed register");
    rd(ADR_OUT, d); check(!hit && d == 0, "not a control address");
    run(10);
    rd(ADR_LENGTH, d); check(d == 10, "length kept while busy");
    rd(ADR_STATUS, d); check(d == 32'h2, "done flag");
    run(1);
    run(257);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
