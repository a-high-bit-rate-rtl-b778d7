// tb_ssm_shift_reg: checks the operand history register against a reference
// model kept in a plain bit array: random shift enables, random clears and
// random data; after every edge each stage must equal the model. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_shift_reg;
  localparam int DEPTH = 7;

  logic clk = 1'b0, rst_n, en, clr, d;
  logic [DEPTH:1] q;
  bit   model [DEPTH+1];
  int   checks = 0, failures = 0, n_clr = 0;

  ssm_shift_reg #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; d = 1'b0;
    for (int k = 0; k <= DEPTH; k++) model[k] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 16) == 0;
      d   = 1'($urandom);
      @(posedge clk);
      if (en && clr) begin
        for (int k = 1; k <= DEPTH; k++) model[k] = 1'b0;
        n_clr++;
      end else if (en) begin
        for (int k = DEPTH; k >= 2; k--) model[k] = model[k-1];
        model[1] = d;
      end
      @(negedge clk);
      for (int k = 1; k <= DEPTH; k++) begin
        checks++;
        if (q[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d stage %0d: %b expected %b", t, k, q[k], model[k]);
        end
      end
    end
    checks++;
    if (n_clr == 0) failures++;
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
