// tb_ssm_ppgen: checks the partial-product generator at N = 8.
//
// For random operand pairs (and all-ones / zero corners), the bits are sent
// X most significant first and Y least significant first, with random pauses.
// In the cycle after the i-th bit pair was taken, every column c must carry
// the product predicted from the operands alone: x[c-i]y[i] for c >= N-1 (if
// c-i is a bit already received) and x[N-1-i]y[c-N+1+i] below. In a pause
// cycle all columns must be zero. Over the N rows the weighted column bits
// must add up to X*Y, i.e. every partial product appears exactly once. Ends
// with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_ppgen;
  localparam int N = 8;

  logic clk = 1'b0, rst_n, accept, first, x_bit, y_bit;
  logic [2*N-2:0] pp;
  int   checks = 0, failures = 0, n_pause = 0;

  ssm_ppgen #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .accept(accept), .first(first),
                          .x_bit(x_bit), .y_bit(y_bit), .pp(pp));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic exp_bit(logic [N-1:0] x, logic [N-1:0] y, int i, int c);
    int a, b;
    if (c >= N - 1) begin
      a = c - i; b = i;
      if (a < N - 1 - i || a > N - 1) return 1'b0;
    end else begin
      a = N - 1 - i; b = c - a;
      if (b < 0 || b >= i) return 1'b0;
    end
    return x[a] & y[b];
  endfunction

  initial begin
    logic [N-1:0] x, y;
    logic [2*N-1:0] acc;
    rst_n = 1'b0; accept = 1'b0; first = 1'b0; x_bit = 1'b0; y_bit = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      x = (op % 5 == 0) ? '1 : N'($urandom);
      y = (op % 7 == 0) ? '1 : N'($urandom);
      acc = '0;
      for (int i = 0; i < N; i++) begin
        if (i > 0 && ($urandom % 4) == 0) begin
          accept = 1'b0;
          x_bit  = 1'($urandom);
          y_bit  = 1'($urandom);
          @(negedge clk);
          check(pp == '0, "pause row must be zero");
          n_pause++;
        end
        accept = 1'b1;
        first  = (i == 0);
        x_bit  = x[N-1-i];
        y_bit  = y[i];
        @(negedge clk);
        accept = 1'b0;
        for (int c = 0; c <= 2 * N - 2; c++) begin
          check(pp[c] == exp_bit(x, y, i, c),
                $sformatf("op %0d row %0d col %0d: %b", op, i, c, pp[c]));
          if (pp[c]) acc += (2*N)'(1) << c;
        end
      end
      check(acc == (2*N)'(x) * (2*N)'(y), $sformatf("op %0d: rows add to %0d", op, acc));
      if ($urandom % 2) @(negedge clk);
    end
    check(n_pause > 0, "pauses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
