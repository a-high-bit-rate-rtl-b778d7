// ssm_counter_bank: counter block / accumulation unit of the multiplier.
//
// One asynchronous ones-counter per partial-product column. Column c receives
// one bit per row for N - |c-(N-1)| rows, so its counter is made just wide
// enough for that many ones: for N = 8 the widths from column 0 to column 14
// are 1,2,2,3,3,3,3,4,3,3,3,3,2,2,1. After the last row the counters hold the
// column sums, which replace the N-row partial-product array by a matrix of at
// most clog2(N)+1 bits per column.
//
// Interface: pp[c] is the partial-product bit of column c in the current cycle;
// cnt[c] is the count of column c, zero-extended to the width of the centre
// column's counter. Timing: a one is counted at the falling clock edge of the
// cycle in which it is presented (see ssm_ripple_counter); rst_n clears all
// counters asynchronously and is how the controller empties them between two
// multiplications. One counter per column and the widths follow the source paper;
// the zero extension of the output is this design's choice.
module ssm_counter_bank
  import ssm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [2*N-2:0]                         pp,
  output logic [2*N-2:0][cnt_width_max(N)-1:0]   cnt
);
  localparam int CW = cnt_width_max(N);

  for (genvar c = 0; c <= 2 * N - 2; c++) begin : g_col
    localparam int W = cnt_width(N, c);
    logic [W-1:0] q;
    ssm_ripple_counter #(.W(W)) u_cnt (.clk(clk), .rst_n(rst_n), .in(pp[c]), .q(q));
    assign cnt[c] = CW'(q);
  end
endmodule
