// ssm_rca: final carry-propagate adder of the multiplier, a ripple-carry adder.
//
// After the Dadda tree every product column holds at most two bits; this adder
// adds the two rows, the carry rippling from the least significant column up
// through a chain of full adders. The carry out of the top column is returned
// separately (for the multiplier it is always zero, because the product of two
// N-bit numbers fits in 2N bits).
//
// The source paper names a ripple-carry adder as the final adder; the full-width
// chain (rather than skipping the columns that hold one bit) is this design's
// choice. Combinational, no clock.
module ssm_rca #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    ssm_full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
