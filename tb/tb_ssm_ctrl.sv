// tb_ssm_ctrl: checks the controller's sequence against a cycle-by-cycle
// reference written from the protocol: in_ready low in the first cycle after
// reset and in each capture cycle; first high exactly when the next bit taken
// is bit 0 of an operation; capture one cycle after the N-th bit is taken;
// cnt_rst_n low exactly in the cycle after reset and in the cycle after each
// capture. in_valid is random, so pauses and back-pressure both occur. Ends
// with a TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_ctrl;
  localparam int N = 8;

  logic clk = 1'b0, rst_n, in_valid, in_ready, accept, first, capture, cnt_rst_n;
  int   checks = 0, failures = 0, n_ops = 0, n_hold = 0;

  ssm_ctrl #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                         .accept(accept), .first(first), .capture(capture), .cnt_rst_n(cnt_rst_n));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int  taken;
    bit  m_init, m_capture, m_clear;
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    taken = 0; m_init = 1; m_capture = 0; m_clear = 0;
    for (int t = 0; t < 5000; t++) begin
      in_valid = ($urandom % 5) != 0;
      #1;
      check(in_ready == !(m_init || m_capture), $sformatf("t=%0d in_ready", t));
      check(capture == m_capture, $sformatf("t=%0d capture", t));
      check(cnt_rst_n == !m_clear, $sformatf("t=%0d cnt_rst_n", t));
      check(first == (taken == 0), $sformatf("t=%0d first", t));
      check(accept == (in_valid && in_ready), "accept");
      if (in_valid && !in_ready) n_hold++;
      @(posedge clk);
      // Reference for the next cycle.
      m_clear = m_capture || m_init;
      m_init  = 0;
      if (in_valid && !m_capture) begin
        taken++;
        m_capture = (taken == N);
        if (taken == N) begin taken = 0; n_ops++; end
      end else begin
        m_capture = 0;
      end
      @(negedge clk);
    end
    check(n_ops > 0 && n_hold > 0, "operations and back-pressure happened");
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
