// tb_ssm_counter_bank: checks the column counters at N = 8.
//
// Each operation presents N rows of random column bits, row i covering only
// columns N-1-i .. N-1+i as in the multiplier, so no counter can overflow;
// every fifth operation uses all ones, which drives each counter to its full
// count (8 in the centre column). The bits change just after the rising edge;
// just before the next rising edge every counter must equal the number of ones
// its column has received. Between operations the bank is cleared through its
// asynchronous clear. The counter widths are checked against the column
// lengths. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_counter_bank;
  import ssm_pkg::*;
  localparam int N  = 8;
  localparam int CW = cnt_width_max(N);

  logic clk = 1'b0, rst_n;
  logic [2*N-2:0]         pp;
  logic [2*N-2:0][CW-1:0] cnt;
  int   ones [2*N-1];
  int   checks = 0, failures = 0, n_full = 0;

  ssm_counter_bank #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .pp(pp), .cnt(cnt));

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int widths [15] = '{1, 2, 2, 3, 3, 3, 3, 4, 3, 3, 3, 3, 2, 2, 1};
    for (int c = 0; c < 15; c++)
      check(cnt_width(N, c) == widths[c], $sformatf("width of column %0d", c));
    pp    = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    for (int op = 0; op < 400; op++) begin
      #1 rst_n = 1'b1;
      for (int c = 0; c <= 2 * N - 2; c++) ones[c] = 0;
      for (int i = 0; i < N; i++) begin
        for (int c = 0; c <= 2 * N - 2; c++) begin
          pp[c] = (c >= N - 1 - i && c <= N - 1 + i) &&
                  ((op % 5 == 0) || ($urandom % 2 == 1));
          if (pp[c]) ones[c]++;
        end
        @(posedge clk);
        for (int c = 0; c <= 2 * N - 2; c++)
          check(int'(cnt[c]) == ones[c],
                $sformatf("op %0d row %0d col %0d: %0d expected %0d", op, i, c, cnt[c], ones[c]));
        #1;
      end
      if (ones[N-1] == N) n_full++;
      pp    = '0;
      rst_n = 1'b0;
      @(posedge clk);
      for (int c = 0; c <= 2 * N - 2; c++) check(cnt[c] == '0, "cleared");
    end
    check(n_full > 0, "full count reached");
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
