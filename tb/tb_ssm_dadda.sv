// tb_ssm_dadda: checks the Dadda reduction tree at N = 8 in both matrix
// shapes.
//
// Structure: the elaboration-time plan for the full 8 x 8 AND array must match
// the textbook Dadda multiplier (four stages with heights 6, 4, 3, 2; 35 full
// adders; 7 half adders); the plan for the counter-output matrix must have
// columns at most clog2(8)+1 = 4 high and two stages (heights 3, 2).
// Function: random bit matrices (only the rows each column really has) are
// reduced, and the two output rows must add up, modulo 2^16, to the weighted
// sum of the input bits. For the AND array the matrix is also built from
// random operands and the result must be their product. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_ssm_dadda;
  import ssm_pkg::*;
  localparam int N    = 8;
  localparam int NC   = 2 * N;
  localparam int HC   = max_init_height(MAT_COUNTER, N);
  localparam int HA   = max_init_height(MAT_AND_ARRAY, N);

  logic [NC-1:0][HC-1:0] mat_c;
  logic [NC-1:0][HA-1:0] mat_a;
  logic [NC-1:0]         ca, cb, aa, ab;
  int checks = 0, failures = 0;

  ssm_dadda #(.N(N), .KIND(MAT_COUNTER))   dut_c (.mat(mat_c), .row_a(ca), .row_b(cb));
  ssm_dadda #(.N(N), .KIND(MAT_AND_ARRAY)) dut_a (.mat(mat_a), .row_a(aa), .row_b(ab));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [NC-1:0] want;
    logic [N-1:0]  x, y;
    int            r;

    check(num_stages(MAT_AND_ARRAY, N) == 4, "8x8 AND array: 4 stages");
    check(stage_max_height(MAT_AND_ARRAY, N, 1) == 6, "8x8 AND array: height 6");
    check(stage_max_height(MAT_AND_ARRAY, N, 2) == 4, "8x8 AND array: height 4");
    check(stage_max_height(MAT_AND_ARRAY, N, 3) == 3, "8x8 AND array: height 3");
    check(stage_max_height(MAT_AND_ARRAY, N, 4) == 2, "8x8 AND array: height 2");
    check(total_fa(MAT_AND_ARRAY, N) == 35, $sformatf("8x8 AND array: %0d full adders", total_fa(MAT_AND_ARRAY, N)));
    check(total_ha(MAT_AND_ARRAY, N) == 7,  $sformatf("8x8 AND array: %0d half adders", total_ha(MAT_AND_ARRAY, N)));
    check(HC == 4, "counter matrix at most 4 high");
    check(num_stages(MAT_COUNTER, N) == 2, "counter matrix: 2 stages");
    check(stage_max_height(MAT_COUNTER, N, 1) == 3, "counter matrix: height 3");
    check(stage_max_height(MAT_COUNTER, N, 2) == 2, "counter matrix: height 2");
    $display("counter matrix: %0d full adders, %0d half adders",
             total_fa(MAT_COUNTER, N), total_ha(MAT_COUNTER, N));

    for (int k = 0; k < 3000; k++) begin
      mat_c = '0;
      mat_a = '0;
      want  = '0;
      for (int c = 0; c < NC; c++)
        for (int rr = 0; rr < init_height(MAT_COUNTER, N, c); rr++) begin
          mat_c[c][rr] = (k % 10 == 0) ? 1'b1 : 1'($urandom);
          if (mat_c[c][rr]) want += NC'(1) << c;
        end
      #1;
      check(NC'(ca + cb) == want, $sformatf("counter matrix: %h + %h != %h", ca, cb, want));

      // Random bits in the AND-array shape.
      want = '0;
      for (int c = 0; c < NC; c++)
        for (int rr = 0; rr < init_height(MAT_AND_ARRAY, N, c); rr++) begin
          mat_a[c][rr] = 1'($urandom);
          if (mat_a[c][rr]) want += NC'(1) << c;
        end
      #1;
      check(NC'(aa + ab) == want, "AND-array shape: random bits");

      // A real multiplication through the AND-array shape.
      x = (k % 10 == 0) ? '1 : N'($urandom);
      y = (k % 10 == 0) ? '1 : N'($urandom);
      mat_a = '0;
      for (int c = 0; c < NC; c++) begin
        r = 0;
        for (int i = 0; i < N; i++)
          if (c - i >= 0 && c - i < N) begin
            mat_a[c][r] = x[i] & y[c-i];
            r++;
          end
      end
      #1;
      check(NC'(aa + ab) == NC'(x) * NC'(y), "AND array: product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
