// tb_ssm_rca: checks the ripple-carry adder: all pairs of 4-bit operands, and
// random and carry-chain corner cases (all ones plus one, alternating
// patterns) at 16 bits, against the simulator's own addition, sum and carry
// out. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_rca;
  logic [3:0]  a4, b4, s4;
  logic        c4;
  logic [15:0] a16, b16, s16;
  logic        c16;
  int checks = 0, failures = 0;

  ssm_rca #(.W(4))  dut4  (.a(a4),  .b(b4),  .sum(s4),  .cout(c4));
  ssm_rca #(.W(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));

  task automatic check16(logic [15:0] a, logic [15:0] b);
    logic [16:0] e;
    a16 = a; b16 = b;
    #1;
    e = 17'(a) + 17'(b);
    checks++;
    if ({c16, s16} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", a, b, {c16, s16}, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if ({c4, s4} !== 5'(i + j)) failures++;
      end
    check16(16'hffff, 16'h0001);
    check16(16'haaaa, 16'h5555);
    check16(16'h7fff, 16'h7fff);
    check16(16'hffff, 16'hffff);
    for (int k = 0; k < 2000; k++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
