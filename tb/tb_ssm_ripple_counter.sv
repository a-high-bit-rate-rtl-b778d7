// tb_ssm_ripple_counter: checks the asynchronous ones-counter. Random input
// bits are presented one per cycle, changing just after the rising clock edge
// as they do in the multiplier. The count must still be unchanged just before
// the falling edge of the cycle and must equal the number of ones so far
// (modulo 2^W) just before the next rising edge, i.e. each one is counted at
// the falling edge of its cycle. The asynchronous clear is exercised every
// few hundred cycles. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_ripple_counter;
  localparam int W = 4;

  logic clk = 1'b0, rst_n, in;
  logic [W-1:0] q;
  int   checks = 0, failures = 0, ones = 0, n_wrap = 0;

  ssm_ripple_counter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .in(in), .q(q));

  always #10 clk = ~clk;

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // The clear acts on its falling edge, so start with it high.
    rst_n = 1'b1;
    in    = 1'b0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      if (t % 300 == 299) begin
        #1 rst_n = 1'b0;
        #1 rst_n = 1'b1;
        ones = 0;
        check(q, '0, "after clear");
      end
      #1 in = ($urandom % 3) != 0;   // just after the rising edge
      #2 check(q, W'(ones), "before falling edge");
      if (in) ones++;
      if (in && W'(ones) == '0) n_wrap++;
      @(posedge clk);
      check(q, W'(ones), "before rising edge");
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
