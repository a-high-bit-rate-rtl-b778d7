// ssm_ppgen: partial-product generator of the serial-serial multiplier.
//
// X arrives most significant bit first and Y least significant bit first, one
// bit of each per accepted cycle: in the i-th accepted cycle (i = 0..N-1) the
// bits are x[N-1-i] and y[i]. Both are caught in an input flip-flop (xv, yv).
// The X bits seen before are kept in the LSR and the Y bits in the RSR, so that
// lsr[k] = x[N-1-i+k] and rsr[k] = y[i-k] while row i is being formed. Row i
// is then, one bit per column (column c has weight 2^c):
//
//   column N-1      : x[N-1-i] & y[i]            (the two new bits)
//   column N-1+k    : x[N-1-i+k] & y[i]  = lsr[k] & yv, k = 1..N-1
//   column N-1-k    : x[N-1-i] & y[i-k]  = xv & rsr[k], k = 1..N-1
//
// which is every product x[a]y[b] that involves at least one of the two new
// bits and none that was formed before. Row i has 2i+1 non-zero bits and
// spans columns N-1-i..N-1+i, so the N rows hold all N*N partial products
// after N cycles; register entries not yet filled are zero and give zero
// products. The critical path is one flip-flop and one AND gate.
//
// Interface: accept marks a cycle in which x_bit and y_bit are taken, first
// marks the first bit of an operation (the history registers are cleared
// instead of shifted). pp is valid in the cycle after the bits were taken and
// is all zero in a cycle that follows no accepted bit (row_valid gates it).
//
// The input flip-flops, the two registers, the AND gates per column and the
// column assignment follow the source paper. The row_valid gating, which lets the
// sender pause between bits, and the clear on the first bit are this design's
// own.
module ssm_ppgen #(
  parameter int N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           accept,
  input  logic           first,
  input  logic           x_bit,
  input  logic           y_bit,
  output logic [2*N-2:0] pp
);
  logic           xv, yv, row_valid;
  logic [N-1:1]   lsr, rsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xv        <= 1'b0;
      yv        <= 1'b0;
      row_valid <= 1'b0;
    end else begin
      row_valid <= accept;
      if (accept) begin
        xv <= x_bit;
        yv <= y_bit;
      end
    end
  end

  ssm_shift_reg #(.DEPTH(N-1)) u_lsr (
    .clk(clk), .rst_n(rst_n), .en(accept), .clr(first), .d(xv), .q(lsr)
  );
  ssm_shift_reg #(.DEPTH(N-1)) u_rsr (
    .clk(clk), .rst_n(rst_n), .en(accept), .clr(first), .d(yv), .q(rsr)
  );

  always_comb begin
    pp[N-1] = row_valid & xv & yv;
    for (int k = 1; k < N; k++) begin
      pp[N-1+k] = row_valid & lsr[k] & yv;
      pp[N-1-k] = row_valid & xv & rsr[k];
    end
  end
endmodule
