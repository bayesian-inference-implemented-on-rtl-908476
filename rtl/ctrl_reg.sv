// ctrl_reg: the control register of the machine and the sequencer of one
// inference run. The host writes a base seed and a bitstream length, then
// starts a run; the block then drives the converters, the Bayesian machine
// and the accumulators. The source shows a control register driving those
// three stages; its fields and the sequence below are this design's choice.
//
// Registers (word addresses, bm_pkg): CTRL (write bit0 = 1 to start; ignored
// while busy), SEED, LENGTH (bits per stream), STATUS (read: bit0 busy,
// bit1 done; done clears at the next start).
//
// Sequence after a start, one state per clock unless noted:
//   LOAD   seed all LFSRs (load), clear OR+ memories and counters (clr)
//   RUN    LENGTH clocks with gen_en high: one new bit per stream per clock
//   DRAIN  one clock for the last bit to leave the converters' registers
//   STORE  copy the counts to the output memory (store)
// acc_en is gen_en delayed by one clock, matching the converters' output
// register, so exactly LENGTH bits are accumulated. A run takes LENGTH + 3
// clocks from the clock after the start write to done.
module ctrl_reg #(
  parameter int unsigned W = bm_pkg::PW
) (
  input  logic         clk,
  input  logic         rst_n,
  // host register port
  input  logic         we,
  input  logic [8:0]   addr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata,
  output logic         hit,       // addr is a control register
  // run control
  output logic [W-1:0] seed,
  output logic         load,
  output logic         clr,
  output logic         gen_en,
  output logic         acc_en,
  output logic         store,
  output logic         busy,
  output logic         done
);
  import bm_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_STORE} state_t;

  state_t       st;
  logic [W-1:0] length, remain;
  logic         start;

  assign start = we && (addr == ADR_CTRL) && wdata[0] && (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed   <= '0;
      length <= '0;
    end else if (we && st == S_IDLE) begin
      if (addr == ADR_SEED)   seed   <= wdata;
      if (addr == ADR_LENGTH) length <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      remain <= '0;
      done   <= 1'b0;
      acc_en <= 1'b0;
    end else begin
      acc_en <= gen_en;
      unique case (st)
        S_IDLE:  if (start) begin st <= S_LOAD; done <= 1'b0; end
        S_LOAD:  begin
                   remain <= length;
                   st     <= (length == '0) ? S_DRAIN : S_RUN;
                 end
        S_RUN:   begin
                   remain <= remain - 1'b1;
                   if (remain == W'(1)) st <= S_DRAIN;
                 end
        S_DRAIN: st <= S_STORE;
        S_STORE: begin st <= S_IDLE; done <= 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign load   = (st == S_LOAD);
  assign clr    = (st == S_LOAD);
  assign gen_en = (st == S_RUN);
  assign store  = (st == S_STORE);
  assign busy   = (st != S_IDLE);

  // Sequencing rules: the converters and counters only run inside a run,
  // and a store is always followed by done.
  a_gen_busy:   assert property (@(posedge clk) disable iff (!rst_n) gen_en |-> busy);
  a_load_once:  assert property (@(posedge clk) disable iff (!rst_n) load |=> !load);
  a_store_done: assert property (@(posedge clk) disable iff (!rst_n) store |=> done && !busy);

  assign hit = (addr >= ADR_CTRL) && (addr <= ADR_STATUS);
  always_comb begin
    unique case (addr)
      ADR_SEED:   rdata = seed;
      ADR_LENGTH: rdata = length;
      ADR_STATUS: rdata = W'({done, busy});
      default:    rdata = '0;
    endcase
  end

endmodule
