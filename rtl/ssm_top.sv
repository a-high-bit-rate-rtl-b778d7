// ssm_top: N x N unsigned serial-serial multiplier with counter-based
// accumulation.
//
// Operand X enters most significant bit first and operand Y least significant
// bit first, one bit of each per cycle. Each cycle the partial-product
// generator forms one row that contains every product of the two new bits
// with all bits received so far, one bit per product column (N-1-i .. N-1+i
// for row i). Instead of adding the rows, each column has an asynchronous
// ones-counter that counts the ones arriving in it, so the per-cycle work is
// one flip-flop and one AND gate. After N rows, the counter outputs, bit b of
// column c's counter weighing 2^(c+b), form a matrix of at most clog2(N)+1 bits
// per column (4 for N = 8). A Dadda tree reduces it to two rows and a
// ripple-carry adder adds those into the 2N-bit product, which is registered.
//
// Interface: x_bit, y_bit with in_valid/in_ready (taken when both high; the
// sender may pause between bits); product with a one-cycle out_valid pulse;
// the product register holds its value until the next result.
// Timing: with bits offered every cycle, bit i is taken at clock edge i+1
// (counting from the first). The last row is counted during the cycle after
// edge N; at edge N+1 the column sums are registered (cnt_q) and the counters
// are then cleared during the next cycle. The Dadda tree and the adder work on
// the registered sums for one full cycle, and at edge N+2 the product is
// registered and out_valid rises. The next operation's first bit can be taken
// at edge N+2 (in_ready is low for one cycle): one result every N+1 cycles.
// Apart from the tree and the adder, every clocked path is a flip-flop and an
// AND gate (plus the counters' ripple, which has half a cycle).
//
// The structure (input flip-flops, LSR/RSR, per-column AND gates, counter
// block, Dadda stage, final adder) follows the source paper; the handshake,
// the register of column sums, the registered output and the counter
// clearing are this design's.
module ssm_top
  import ssm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic           x_bit,
  input  logic           y_bit,
  output logic           out_valid,
  output logic [2*N-1:0] product
);
  localparam int NCOL = num_cols(N);
  localparam int CW   = cnt_width_max(N);
  localparam int HMAX = max_init_height(MAT_COUNTER, N);

  logic                        accept, first, capture, cnt_rst_n;
  logic [2*N-2:0]              pp;
  logic [2*N-2:0][CW-1:0]      cnt, cnt_q;
  logic                        result_pend;
  logic [NCOL-1:0][HMAX-1:0]   mat;
  logic [NCOL-1:0]             row_a, row_b, sum;
  logic                        sum_cout;

  ssm_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .accept(accept), .first(first), .capture(capture), .cnt_rst_n(cnt_rst_n)
  );

  ssm_ppgen #(.N(N)) u_ppgen (
    .clk(clk), .rst_n(rst_n), .accept(accept), .first(first),
    .x_bit(x_bit), .y_bit(y_bit), .pp(pp)
  );

  ssm_counter_bank #(.N(N)) u_counters (
    .clk(clk), .rst_n(cnt_rst_n), .pp(pp), .cnt(cnt)
  );

  // Column sums, held from the capture edge until the next capture, so the
  // counters can be cleared while the Dadda tree and the adder work on them.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt_q <= '0;
    else if (capture) cnt_q <= cnt;
  end

  // Counter outputs placed by weight: row r of column c is bit (c - src) of
  // the counter of column src = cnt_src(N, c, r).
  for (genvar c = 0; c < NCOL; c++) begin : g_mat_col
    for (genvar r = 0; r < HMAX; r++) begin : g_mat_row
      localparam int SRC = cnt_src(N, c, r);
      if (SRC >= 0) begin : g_bit
        assign mat[c][r] = cnt_q[SRC][c-SRC];
      end else begin : g_none
        assign mat[c][r] = 1'b0;
      end
    end
  end

  ssm_dadda #(.N(N), .KIND(MAT_COUNTER)) u_dadda (
    .mat(mat), .row_a(row_a), .row_b(row_b)
  );

  ssm_rca #(.W(NCOL)) u_cpa (
    .a(row_a), .b(row_b), .sum(sum), .cout(sum_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_pend <= 1'b0;
      out_valid   <= 1'b0;
      product     <= '0;
    end else begin
      result_pend <= capture;
      out_valid   <= result_pend;
      if (result_pend) product <= sum;
    end
  end

`ifndef SYNTHESIS
  // The product of two N-bit numbers never carries out of 2N bits.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) result_pend |-> !sum_cout);
`endif
endmodule
