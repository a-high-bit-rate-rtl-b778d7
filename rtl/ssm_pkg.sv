// ssm_pkg: shared constants and elaboration-time functions of the serial-serial
// multiplier.
//
// The multiplier forms one partial-product row per cycle and counts the ones
// arriving in each of the 2N-1 product columns with a small counter. Column c
// (weight 2^c) receives one bit in each of the N rows whose span covers it,
// which is N - |c - (N-1)| bits in all, so its counter needs
// clog2(N - |c-(N-1)| + 1) bits. Bit b of the counter of column c has weight
// 2^(c+b): the counter outputs form a new bit matrix whose columns are far
// shorter than the N-row array of a parallel multiplier.
//
// That matrix is reduced to two rows by Dadda's method. The stage targets are
// d1 = 2, d(j+1) = floor(1.5 * d(j)), i.e. 2, 3, 4, 6, 9, 13, ... The first stage
// targets the largest d(j) below the tallest column; each stage then goes down
// by one step until two rows remain. In a stage, column c (heights already
// including the carries that the stage sends in from column c-1) gets as few
// (3,2) counters as bring it down to the target, plus one (2,2) counter when
// one bit too many would be left.
//
// The functions below run that algorithm at elaboration time so that the
// reduction tree can be built by generate loops for any N. Two matrix shapes
// are known: MAT_COUNTER, the counter outputs used by the multiplier, and
// MAT_AND_ARRAY, the plain N x N AND array of a parallel Dadda multiplier,
// which the reduction testbench uses to compare with the textbook 8 x 8 case
// (35 full adders, 7 half adders, heights 6-4-3-2).
package ssm_pkg;

  typedef enum int {
    MAT_COUNTER   = 0,
    MAT_AND_ARRAY = 1
  } mat_kind_e;

  localparam int MAX_COLS   = 256;

  // Number of partial-product bits column c receives over one multiplication.
  function automatic int col_bits(int n, int c);
    int k;
    k = (c >= n - 1) ? c - (n - 1) : (n - 1) - c;
    return (c < 0 || c > 2 * n - 2) ? 0 : n - k;
  endfunction

  // Width of the ones-counter of column c.
  function automatic int cnt_width(int n, int c);
    return (col_bits(n, c) == 0) ? 0 : $clog2(col_bits(n, c) + 1);
  endfunction

  // Widest counter (that of the centre column N-1).
  function automatic int cnt_width_max(int n);
    return cnt_width(n, n - 1);
  endfunction

  // Row r of column c of the counter-output matrix is bit (c - src) of the
  // counter of column src, where the contributing counters are taken from
  // column c downwards. Returns -1 past the height of the column.
  function automatic int cnt_src(int n, int c, int r);
    int found;
    found = 0;
    for (int s = c; s >= 0; s--) begin
      if (cnt_width(n, s) > c - s) begin
        if (found == r) return s;
        found++;
      end
    end
    return -1;
  endfunction

  // Number of columns of the matrix: the product has 2N bits.
  function automatic int num_cols(int n);
    return 2 * n;
  endfunction

  // Height of column c of the unreduced matrix.
  function automatic int init_height(mat_kind_e kind, int n, int c);
    int h;
    h = 0;
    if (c < 0 || c >= num_cols(n)) return 0;
    if (kind == MAT_AND_ARRAY) begin
      return (c <= n - 1) ? c + 1 : ((c <= 2 * n - 2) ? 2 * n - 1 - c : 0);
    end
    for (int s = c; s >= 0; s--) if (cnt_width(n, s) > c - s) h++;
    return h;
  endfunction

  function automatic int max_init_height(mat_kind_e kind, int n);
    int m;
    m = 2;
    for (int c = 0; c < num_cols(n); c++)
      if (init_height(kind, n, c) > m) m = init_height(kind, n, c);
    return m;
  endfunction

  // Dadda target d(j), j >= 1.
  function automatic int dadda_d(int j);
    int d;
    d = 2;
    for (int i = 1; i < j; i++) d = (3 * d) / 2;
    return d;
  endfunction

  // Number of reduction stages: the largest j with d(j) < tallest column.
  function automatic int num_stages(mat_kind_e kind, int n);
    int j;
    j = 0;
    while (dadda_d(j + 1) < max_init_height(kind, n)) j++;
    return j;
  endfunction

  // Target height after stage s (s = 0 is the first stage).
  function automatic int stage_target(mat_kind_e kind, int n, int s);
    return dadda_d(num_stages(kind, n) - s);
  endfunction

  typedef enum int {
    Q_HEIGHT = 0,  // height of column c at the input of stage s
    Q_FA     = 1,  // (3,2) counters in column c of stage s
    Q_HA     = 2   // (2,2) counters in column c of stage s
  } dadda_query_e;

  // Runs the reduction up to stage s and reports one quantity of column c.
  // s may equal num_stages for Q_HEIGHT (the final two-row matrix).
  function automatic int dadda_query(mat_kind_e kind, int n, dadda_query_e q, int s, int c);
    int h   [MAX_COLS];
    int fa  [MAX_COLS];
    int ha  [MAX_COLS];
    int d, e, ncol;
    ncol = num_cols(n);
    for (int i = 0; i < ncol; i++) h[i] = init_height(kind, n, i);
    for (int st = 0; st <= s; st++) begin
      if (st == s && q == Q_HEIGHT) return h[c];
      if (st >= num_stages(kind, n)) return 0;
      d = stage_target(kind, n, st);
      for (int i = 0; i < ncol; i++) begin
        int cin;
        cin = (i > 0) ? fa[i-1] + ha[i-1] : 0;
        e   = h[i] + cin - d;
        fa[i] = (e > 0) ? e / 2 : 0;
        ha[i] = (e > 0) ? e % 2 : 0;
      end
      if (st == s) return (q == Q_FA) ? fa[c] : ha[c];
      for (int i = 0; i < ncol; i++) begin
        int cin;
        cin  = (i > 0) ? fa[i-1] + ha[i-1] : 0;
        h[i] = h[i] - 2 * fa[i] - ha[i] + cin;
      end
    end
    return 0;
  endfunction

  function automatic int total_fa(mat_kind_e kind, int n);
    int t;
    t = 0;
    for (int s = 0; s < num_stages(kind, n); s++)
      for (int c = 0; c < num_cols(n); c++) t += dadda_query(kind, n, Q_FA, s, c);
    return t;
  endfunction

  function automatic int total_ha(mat_kind_e kind, int n);
    int t;
    t = 0;
    for (int s = 0; s < num_stages(kind, n); s++)
      for (int c = 0; c < num_cols(n); c++) t += dadda_query(kind, n, Q_HA, s, c);
    return t;
  endfunction

  // Tallest column at the input of stage s.
  function automatic int stage_max_height(mat_kind_e kind, int n, int s);
    int m;
    m = 0;
    for (int c = 0; c < num_cols(n); c++)
      if (dadda_query(kind, n, Q_HEIGHT, s, c) > m) m = dadda_query(kind, n, Q_HEIGHT, s, c);
    return m;
  endfunction

endpackage
