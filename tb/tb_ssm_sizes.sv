// tb_ssm_sizes: runs the multiplier at sizes other than the default
// (N = 2, 3, 5, 12, 16, 24) side by side, to check that the elaboration-time
// Dadda plan and the counter widths give a correct multiplier for any N.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  localparam int NS = 6;
  logic done [NS];
  int   c [NS], f [NS];

  always #5 clk = ~clk;

  tb_ssm_size_run #(.N(2))  u2  (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_ssm_size_run #(.N(3))  u3  (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_ssm_size_run #(.N(5))  u5  (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_ssm_size_run #(.N(12)) u12 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_ssm_size_run #(.N(16)) u16 (.clk(clk), .rst_n(rst_n), .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_ssm_size_run #(.N(24)) u24 (.clk(clk), .rst_n(rst_n), .done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NS; i++) all &= done[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
