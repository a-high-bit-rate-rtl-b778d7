// tb_ssm_size_run: drives one ssm_top of size N with random operand pairs
// (plus all-ones and zero corners), back to back and with random pauses, and
// compares every product with the simulator's own '*'. Used by tb_ssm_sizes to
// run several sizes side by side; reports its counts through its ports and
// raises done when finished.
module tb_ssm_size_run #(
  parameter int N    = 8,
  parameter int NOPS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  logic           in_valid, in_ready, x_bit, y_bit, out_valid;
  logic [2*N-1:0] product;
  logic [2*N-1:0] exp_q[$];
  int             results;

  ssm_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_bit(x_bit), .y_bit(y_bit), .out_valid(out_valid), .product(product)
  );

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [2*N-1:0] e;
      e = exp_q.pop_front();
      checks++;
      results++;
      if (product !== e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d: product %0d expected %0d", N, product, e);
      end
    end
  end

  initial begin
    logic [N-1:0] x, y;
    checks = 0; failures = 0; results = 0; done = 1'b0;
    in_valid = 1'b0; x_bit = 1'b0; y_bit = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k < NOPS; k++) begin
      x = (k % 6 == 0) ? '1 : N'({$urandom, $urandom});
      y = (k % 6 == 0) ? '1 : ((k % 6 == 1) ? '0 : N'({$urandom, $urandom}));
      exp_q.push_back((2*N)'(x) * (2*N)'(y));
      for (int i = 0; i < N; i++) begin
        if (i > 0 && k % 2 == 1 && ($urandom % 4) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        x_bit    = x[N-1-i];
        y_bit    = y[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (N + 4) @(posedge clk);
    checks++;
    if (results != NOPS) failures++;
    done = 1'b1;
  end
endmodule
