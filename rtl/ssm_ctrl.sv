// ssm_ctrl: sequencing of one multiplication.
//
// An operation is N accepted bit pairs. The controller counts them, marks the
// first (the operand history registers are cleared on it) and the last. In the
// cycle after the last bit has been taken, the last partial-product row is
// being counted, so that cycle is the capture cycle: at its closing clock edge
// the product is registered and the column counters are cleared for the whole
// next cycle (cnt_rst_n low). in_ready is low during the capture cycle, so the
// first bit of the next operation is taken no earlier than the cycle in which
// the counters are being cleared, and its partial products reach the counters
// only after the clear has been released.
//
// Interface: in_valid/in_ready handshake of the serial bit pair (a bit pair is
// taken when both are high); accept, first go to the partial-product
// generator; capture enables the product register; cnt_rst_n is the counters'
// asynchronous clear (active low). Timing: with no pauses, bits are taken in N consecutive cycles, the
// product is registered one cycle after the last of them, and the next
// operation can start one cycle later, i.e. one operation per N+1 cycles.
//
// The source paper only states that the rows are formed and counted in N cycles;
// the handshake, the pause support and the clear sequence are this design's.
module ssm_ctrl #(
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic accept,
  output logic first,
  output logic capture,
  output logic cnt_rst_n
);
  localparam int BW = (N > 1) ? $clog2(N) : 1;

  logic [BW-1:0] bit_cnt;
  logic          last;
  logic          init;

  assign in_ready = ~capture & ~init;
  assign accept   = in_valid & in_ready;
  assign first    = (bit_cnt == '0);
  assign last     = (bit_cnt == BW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt   <= '0;
      capture   <= 1'b0;
      init      <= 1'b1;
      cnt_rst_n <= 1'b1;
    end else begin
      init      <= 1'b0;
      capture   <= accept & last;
      cnt_rst_n <= ~(capture | init);
      if (accept) bit_cnt <= last ? '0 : bit_cnt + 1'b1;
    end
  end

`ifndef SYNTHESIS
  // A bit pair is never taken in the capture cycle.
  a_no_accept_in_capture: assert property (@(posedge clk) disable iff (!rst_n) capture |-> !accept);
  // The counters are cleared exactly in the cycle after each capture.
  a_clear_after_capture: assert property (@(posedge clk) disable iff (!rst_n) capture |=> !cnt_rst_n);
`endif
endmodule
