// ssm_ripple_counter: asynchronous ones-counter of one partial-product column.
//
// Each bit is a D flip-flop whose D input is its own inverted output, so it
// toggles on every rising edge of its clock. The first flip-flop is clocked by
// the AND of the clock with the column's partial-product bit, so it toggles
// once for every cycle in which that bit is one; every further flip-flop is
// clocked by the inverted output of the one before, i.e. it toggles when the
// previous bit falls from 1 to 0. The result is a binary up-counter whose only
// synchronous path is the AND gate in front of the first flip-flop: the carry
// ripples through the chain outside the clocked path, which is why the counter
// can replace a full-adder accumulator without lengthening the critical path.
// All flip-flops have an asynchronous active-low clear.
//
// The flip-flop chain, the D = not-Q feedback, the clock of each later stage
// taken from the previous stage's inverted output, the AND gate and the
// active-low clear follow the two-bit counter of the source paper; W generalises it.
// The AND gate is fed with the inverted clock: the partial-product bit changes
// just after the rising clock edge, and gating the low phase keeps the gated
// clock free of glitches. A one is therefore counted at the falling edge of the
// cycle in which it is presented, and the count has rippled to its final value
// well before the next rising edge. This choice of phase is this design's own.
//
// Interface: clk, rst_n (asynchronous clear, active low), in (the column bit),
// q (the count). q must be wide enough for the largest count; it wraps modulo
// 2^W otherwise.
module ssm_ripple_counter #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in,
  output logic [W-1:0] q
);
  logic [W-1:0] stage_clk;

  assign stage_clk[0] = ~clk & in;

  for (genvar i = 0; i < W; i++) begin : g_stage
    if (i > 0) begin : g_ripple
      assign stage_clk[i] = ~q[i-1];
    end
    logic t;  // this stage's toggle flip-flop
    always_ff @(posedge stage_clk[i] or negedge rst_n) begin
      if (!rst_n) t <= 1'b0;
      else        t <= ~t;
    end
    assign q[i] = t;
  end
endmodule
