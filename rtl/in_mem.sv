// in_mem: input memory of the machine, DEPTH words of W bits (216 x 32 in the
// robot machine), holding the binary probabilities: model parameters and
// soft evidence, laid out as in bm_pkg. The host writes and reads it one word
// at a time; all words are also presented in parallel to the converters,
// which read every word on every clock. It is therefore a register array,
// not a RAM block. Depth and width follow the source; the port scheme and
// the reset to zero are this design's choice.
//
// Timing: a write with `we` high lands at the clock edge; `rdata` is the
// combinational read of `raddr`. Out-of-range addresses are ignored / read 0.
module in_mem #(
  parameter int unsigned DEPTH = bm_pkg::N_IN,
  parameter int unsigned W     = bm_pkg::PW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [W-1:0]             wdata,
  input  logic [AW-1:0]            raddr,
  output logic [W-1:0]             rdata,
  output logic [DEPTH-1:0][W-1:0]  words
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   words <= '0;
    else if (we && (32'(waddr) < DEPTH))          words[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? words[raddr] : '0;

endmodule
