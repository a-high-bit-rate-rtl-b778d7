// ssm_dadda: Dadda reduction of a bit matrix to two rows.
//
// The input is a matrix of NCOL = 2N columns; column c holds init_height(c)
// bits of weight 2^c in mat[c][0 .. init_height(c)-1] (higher rows are
// ignored). The reduction runs in stages with the Dadda targets
// ..., 9, 6, 4, 3, 2: each stage brings every column down to its target using
// as few (3,2) counters (full adders) as possible and at most one (2,2)
// counter (half adder) per column, the carries going to the next column of the
// following stage. The number of stages and every counter's place are worked
// out at elaboration by the functions of ssm_pkg, and the tree is built by
// generate loops.
//
// In a stage, column c is wired as follows: its bits 0..3F-1 feed the F full
// adders, the next 2H bits the H half adders, the rest pass straight through.
// The next stage's column is then the pass-through bits, the sums of this
// column and the carries of column c-1, in that order.
//
// KIND selects the matrix shape: MAT_COUNTER is the counter-output matrix of
// the serial multiplier (for N = 8 at most 4 bits high, two stages with
// targets 3 and 2); MAT_AND_ARRAY is the full N x N AND array (for N = 8 four
// stages 6, 4, 3, 2 with 35 full and 7 half adders). Carries out of the top
// column are dropped: a product of two N-bit numbers fits in 2N bits, so they
// are always zero. The reduction algorithm follows the source paper; the wiring
// order inside a column is this design's choice. Purely combinational.
module ssm_dadda
  import ssm_pkg::*;
#(
  parameter int        N    = 8,
  parameter mat_kind_e KIND = MAT_COUNTER
) (
  input  logic [2*N-1:0][max_init_height(KIND, N)-1:0] mat,
  output logic [2*N-1:0]                               row_a,
  output logic [2*N-1:0]                               row_b
);
  localparam int NCOL = num_cols(N);
  localparam int HMAX = max_init_height(KIND, N);
  localparam int S    = num_stages(KIND, N);

  // m0[c]: column c of the input matrix, unused rows zero.
  logic [HMAX-1:0] m0 [NCOL];

  for (genvar c = 0; c < NCOL; c++) begin : g_in
    localparam int H0 = init_height(KIND, N, c);
    for (genvar r = 0; r < HMAX; r++) begin : g_row
      if (r < H0) begin : g_used
        assign m0[c][r] = mat[c][r];
      end else begin : g_zero
        assign m0[c][r] = 1'b0;
      end
    end
  end

  // g_stage[s].g_col[c]: column c in stage s. ci is the column at the input
  // of the stage, co at its output; cy holds the carries for column c+1.
  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < NCOL; c++) begin : g_col
      localparam int H   = dadda_query(KIND, N, Q_HEIGHT, s, c);
      localparam int F   = dadda_query(KIND, N, Q_FA, s, c);
      localparam int HA  = dadda_query(KIND, N, Q_HA, s, c);
      localparam int CIN = (c > 0) ? dadda_query(KIND, N, Q_FA, s, c - 1)
                                   + dadda_query(KIND, N, Q_HA, s, c - 1) : 0;
      localparam int P   = H - 3 * F - 2 * HA;
      localparam int HN  = P + F + HA + CIN;

      logic [HMAX-1:0] ci, co, cy;

      if (P < 0 || HN > HMAX) begin : g_bad
        $error("ssm_dadda: infeasible reduction step at stage %0d column %0d", s, c);
      end

      if (s == 0) begin : g_first
        assign ci = m0[c];
      end else begin : g_next
        assign ci = g_stage[s-1].g_col[c].co;
      end

      for (genvar f = 0; f < F; f++) begin : g_fa
        ssm_full_adder u_fa (
          .a (ci[3*f]), .b(ci[3*f+1]), .ci(ci[3*f+2]),
          .s (co[P+f]), .co(cy[f])
        );
      end
      for (genvar h = 0; h < HA; h++) begin : g_ha
        ssm_half_adder u_ha (
          .a (ci[3*F+2*h]), .b(ci[3*F+2*h+1]),
          .s (co[P+F+h]), .co(cy[F+h])
        );
      end
      for (genvar r = 0; r < HMAX; r++) begin : g_row
        if (r < P) begin : g_pass
          assign co[r] = ci[3*F+2*HA+r];
        end else if (r >= P + F + HA && r < HN) begin : g_cin
          assign co[r] = g_stage[s].g_col[c-1].cy[r-P-F-HA];
        end else if (r >= HN) begin : g_zero
          assign co[r] = 1'b0;
        end
        if (r >= F + HA) begin : g_nocy
          assign cy[r] = 1'b0;
        end
      end
    end
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_out
    if (S == 0) begin : g_direct
      assign row_a[c] = m0[c][0];
      assign row_b[c] = m0[c][1];
    end else begin : g_reduced
      assign row_a[c] = g_stage[S-1].g_col[c].co[0];
      assign row_b[c] = g_stage[S-1].g_col[c].co[1];
    end
  end
endmodule
