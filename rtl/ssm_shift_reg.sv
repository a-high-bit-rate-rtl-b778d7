// ssm_shift_reg: operand history register (LSR / RSR of the multiplier).
//
// One instance keeps the X bits already received (LSR), one the Y bits (RSR).
// On every accepted operand bit the register shifts by one place, taking in the
// bit that the input flip-flop held until then, so that q[k] is always the
// operand bit that arrived k accepted bits before the one now in the input
// flip-flop. On the first bit of an operation the register is cleared instead,
// so that no bit of the previous operation can form a partial product.
//
// Interface: en shifts, clr (sampled with en) clears, d is the input
// flip-flop's output. Timing: registered, rising edge of clk, asynchronous
// active-low reset. The shift direction and the clear on the first bit are this
// design's choices; the source paper shows the two registers without their insides.
module ssm_shift_reg #(
  parameter int DEPTH = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clr,
  input  logic           d,
  output logic [DEPTH:1] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= '0;
    else if (en && clr) q <= '0;
    else if (en) begin
      q[1] <= d;
      for (int k = 2; k <= DEPTH; k++) q[k] <= q[k-1];
    end
  end
endmodule
