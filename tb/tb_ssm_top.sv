// tb_ssm_top: end-to-end test of the serial-serial multiplier at its default
// size (N = 8).
//
// A driver sends operand pairs bit-serially (X most significant bit first,
// Y least significant bit first) through the in_valid/in_ready handshake: some
// operations back to back, some with random pauses between bits. A monitor
// keeps the expected products, computed with the simulator's own '*', and
// checks every out_valid pulse: the value, the order, and that it comes two
// clock edges after the edge that took the operation's last bit (one to
// register the column sums, one for the Dadda tree and the adder). For
// operations sent without pauses it also checks that the product is
// registered N+1 edges after the first bit was taken. It counts how often the mechanisms of the
// design occurred: pauses between bits, in_ready holding the sender back,
// back-to-back operations and a full centre-column count (all-ones operands);
// one that never occurred counts as a failure. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_ssm_top;
  localparam int N    = 8;
  localparam int NOPS = 400;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid, in_ready, x_bit, y_bit, out_valid;
  logic [2*N-1:0] product;

  int checks = 0, failures = 0;
  int n_pause = 0, n_backpressure = 0, n_back_to_back = 0, n_full_count = 0;
  longint unsigned cyc = 0;

  ssm_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_bit(x_bit), .y_bit(y_bit), .out_valid(out_valid), .product(product)
  );

  always #5 clk = ~clk;

  // Expected results, in order, with the edge that took the last bit and
  // whether the operation was sent without pauses.
  typedef struct {
    logic [2*N-1:0]  prod;
    longint unsigned first_edge;
    longint unsigned last_edge;
    bit              no_pause;
  } exp_t;
  exp_t exp_q[$];
  exp_t cur;
  int   bits_taken = 0;
  bit   cur_paused = 0;
  logic [N-1:0] cur_x, cur_y;
  longint unsigned prev_last_edge = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endfunction

  // Monitor: samples the values present just before each rising edge.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_backpressure++;
      if (in_valid && in_ready) begin
        if (bits_taken == 0) begin
          cur.first_edge = cyc;
          if (cyc == prev_last_edge + 2 && prev_last_edge != 0) n_back_to_back++;
        end
        bits_taken++;
        if (bits_taken == N) begin
          cur.prod      = (2*N)'(cur_x) * (2*N)'(cur_y);
          cur.last_edge = cyc;
          cur.no_pause  = (cyc - cur.first_edge == longint'(N - 1));
          exp_q.push_back(cur);
          prev_last_edge = cyc;
          bits_taken = 0;
        end
      end
      if (out_valid) begin
        check(exp_q.size() > 0, "out_valid with no operation outstanding");
        if (exp_q.size() > 0) begin
          exp_t e;
          e = exp_q.pop_front();
          check(product == e.prod,
                $sformatf("product %0d, expected %0d", product, e.prod));
          check(cyc == e.last_edge + 3,
                $sformatf("result two edges after last bit: seen at %0d, last bit at %0d",
                          cyc, e.last_edge));
          if (e.no_pause)
            check(cyc - 1 - e.first_edge == longint'(N + 1),
                  "product registered N+1 edges after the first bit");
        end
      end
    end
  end

  // Sends one operation; pause_pct is the chance of a pause before each bit.
  task automatic send(input logic [N-1:0] x, input logic [N-1:0] y, input int pause_pct);
    int i;
    cur_x = x;
    cur_y = y;
    i = 0;
    while (i < N) begin
      @(negedge clk);
      if (i > 0 && ($urandom % 100) < pause_pct) begin
        in_valid = 1'b0;
        x_bit    = 1'($urandom);
        y_bit    = 1'($urandom);
        n_pause++;
        repeat ($urandom % 3) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 1'b1;
      x_bit    = x[N-1-i];
      y_bit    = y[i];
      @(posedge clk);
      if (in_ready) i++;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    logic [N-1:0] x, y;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_bit    = 1'b0;
    y_bit    = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < NOPS; k++) begin
      case (k % 8)
        0: begin x = '1; y = '1; end
        1: begin x = '0; y = N'($urandom); end
        2: begin x = '1; y = N'($urandom); end
        default: begin x = N'($urandom); y = N'($urandom); end
      endcase
      if (x == '1 && y == '1) n_full_count++;
      // Alternate runs of back-to-back operations with paused ones.
      if ((k / 16) % 2 == 0) begin
        // Keep in_valid high through the gap cycle: the sender is held back.
        send(x, y, 0);
        in_valid = 1'b1;
        x_bit    = 1'b0;
        y_bit    = 1'b0;
      end else begin
        send(x, y, 30);
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (N + 4) @(posedge clk);
    check(exp_q.size() == 0, "all products delivered");
    $display("mechanisms: pauses=%0d backpressure=%0d back_to_back=%0d full_count=%0d",
             n_pause, n_backpressure, n_back_to_back, n_full_count);
    check(n_pause > 0, "pause between bits happened");
    check(n_backpressure > 0, "in_ready backpressure happened");
    check(n_back_to_back > 0, "back-to-back operations happened");
    check(n_full_count > 0, "full centre-column count happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
