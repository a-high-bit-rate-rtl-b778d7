// tb_ssm_exhaustive: all 65536 pairs of 8-bit operands through the multiplier
// at its default size, sent back to back with in_valid held high, so the
// multiplier runs at its full rate of one result every N+1 cycles. Each
// product is compared with the simulator's own '*', and the total number of
// cycles is checked against 65536 * (N+1). Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_ssm_exhaustive;
  localparam int N = 8;

  logic           clk = 1'b0, rst_n, in_valid, in_ready, x_bit, y_bit, out_valid;
  logic [2*N-1:0] product;
  int             checks = 0, failures = 0, results = 0;
  longint         cyc = 0, first_out = -1, last_out = 0;
  logic [2*N-1:0] exp_q[$];

  ssm_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_bit(x_bit), .y_bit(y_bit), .out_valid(out_valid), .product(product)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      logic [2*N-1:0] e;
      e = exp_q.pop_front();
      checks++;
      if (product !== e) begin
        failures++;
        if (failures < 10) $display("FAIL product %0d expected %0d", product, e);
      end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      results++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_bit = 1'b0; y_bit = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        exp_q.push_back((2*N)'(a) * (2*N)'(b));
        for (int i = 0; i < N; i++) begin
          in_valid = 1'b1;
          x_bit    = 1'(a >> (N - 1 - i));
          y_bit    = 1'(b >> i);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
      end
    in_valid = 1'b0;
    repeat (N + 4) @(posedge clk);
    checks++;
    if (results != (1 << (2 * N))) failures++;
    checks++;
    if (last_out - first_out != longint'(results - 1) * (N + 1)) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d results", last_out - first_out, results);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
