// out_mem: output memory, DEPTH words of W bits (5 x 32 in the robot
// machine). At the end of a run `store` copies all accumulator counts into it
// in one clock, so the host can read a stable result while a new run
// accumulates. Depth and width follow the source; the parallel capture is
// this design's choice.
//
// Timing: `store` captures `counts` at the clock edge; `rdata` is the
// combinational read of `raddr` (0 for addresses past DEPTH).
module out_mem #(
  parameter int unsigned DEPTH = bm_pkg::N_OUT,
  parameter int unsigned W     = bm_pkg::PW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    store,
  input  logic [DEPTH-1:0][W-1:0] counts,
  input  logic [AW-1:0]           raddr,
  output logic [W-1:0]            rdata
);

  logic [DEPTH-1:0][W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mem <= '0;
    else if (store) mem <= counts;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
