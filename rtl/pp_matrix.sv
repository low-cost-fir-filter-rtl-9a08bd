// pp_matrix: the single partial-product bit (PPB) matrix of all constant
// products, with deletion, truncation and the bias row.
//
// Instead of forming each product a_i * u_i separately, every partial
// product of every coefficient goes into one matrix that is later reduced as
// a whole.  Each coefficient is recoded in CSD form and every non-zero digit
// d at position k contributes one row, d * u_i * 2^k, of U_W = X_W+1 bits.
//
// Sign extension is avoided: a row's sign bit s is written as its complement
// (s = 1 - s_bar), a negative row also has its other bits complemented
// (-u = ~u + 1), and all the constants these rewrites leave behind (-2^(U_W-1+k)
// per row, +2^k per negative row) are summed into the last row, rows[NROWS].
//
// The output needs only the bits from column LSB_POS upward, so the matrix is
// trimmed while the result stays faithfully rounded (error below one output
// LSB, 2^LSB_POS):
//   * truncation: every bit below column T is removed;
//   * deletion:   in column T the bits of the first Q rows are removed too;
//   * the bias row also carries a compensation constant so that the total
//     offset E added to the exact sum S lies in [DMAX, 2^LSB_POS - 1], DMAX
//     being the largest value the removed bits can have.  Dropping the low
//     LSB_POS bits of (S + E - removed bits) then gives floor or ceil of
//     S / 2^LSB_POS, never anything else (faithful rounding).
// T is the largest column with DMAX(T) <= 2^LSB_POS - 2^T (so that a
// multiple of 2^T exists in the allowed range of E), and Q the most bits of
// column T that still keep that bound.  All of this is computed from COEF
// when the module is elaborated.  Bits above column W_ACC-1 are dropped as
// well: the sum is only needed modulo 2^W_ACC.
//
// The interface is purely combinational: u in, NROWS+1 rows of W_ACC bits out,
// whose sum modulo 2^W_ACC, shifted right by LSB_POS, is the filter output.
// The CSD recoding, the sign handling and the choice of T, Q and the
// compensation constant are this design's concrete rules for the
// deletion/truncation/rounding scheme.
module pp_matrix #(
  parameter int X_W     = fir_pkg::X_W,
  parameter int C_W     = fir_pkg::C_W,
  parameter int NCOEF   = fir_pkg::NCOEF,
  parameter int COEF [NCOEF] = fir_pkg::DEF_COEF,
  parameter int OUT_W   = fir_pkg::OUT_W,
  parameter int LSB_POS = fir_pkg::LSB_POS,
  localparam int U_W    = X_W + 1,
  localparam int W_ACC  = LSB_POS + OUT_W,
  localparam int NROWS  = count_rows()
) (
  input  logic signed [U_W-1:0] u    [NCOEF],
  output logic        [W_ACC-1:0] rows [NROWS+1]
);

  localparam int WIDE = (W_ACC > U_W + C_W + 1) ? W_ACC : U_W + C_W + 1;

  function automatic int count_rows();
    int n = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if (fir_pkg::csd_digit(COEF[p], k) != 0) n++;
    return n;
  endfunction

  // Index of the row of digit (p, k): rows are ordered by coefficient, then
  // by digit position.
  function automatic int row_index(int pp, int kk);
    int n = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if ((p < pp || (p == pp && k < kk)) && fir_pkg::csd_digit(COEF[p], k) != 0) n++;
    return n;
  endfunction

  // Largest value of all row bits below column t.
  function automatic longint dmax_cols(int t);
    longint m = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if (fir_pkg::csd_digit(COEF[p], k) != 0)
          for (int j = 0; j < U_W; j++)
            if (j + k < t && j + k < W_ACC) m += longint'(1) << (j + k);
    return m;
  endfunction

  function automatic int find_t();
    for (int t = LSB_POS; t > 0; t--)
      if (dmax_cols(t) <= (longint'(1) << LSB_POS) - (longint'(1) << t)) return t;
    return 0;
  endfunction

  localparam int TRUNC = find_t();

  // Number of row bits in column TRUNC.
  function automatic int col_bits(int c);
    int n = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if (fir_pkg::csd_digit(COEF[p], k) != 0 && c >= k && c < k + U_W && c < W_ACC) n++;
    return n;
  endfunction

  function automatic int find_q();
    longint room = (longint'(1) << LSB_POS) - (longint'(1) << TRUNC) - dmax_cols(TRUNC);
    longint q    = room >>> TRUNC;
    return (q > longint'(col_bits(TRUNC))) ? col_bits(TRUNC) : int'(q);
  endfunction

  localparam int     QDEL = find_q();
  localparam longint DMAX = dmax_cols(TRUNC) + (longint'(QDEL) << TRUNC);

  // Sum of the constants left by the sign-bit and negation rewrites.
  function automatic longint bias_sum();
    longint b = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++) begin
        int d = fir_pkg::csd_digit(COEF[p], k);
        if (d != 0) b -= longint'(1) << (U_W - 1 + k);
        if (d < 0)  b += longint'(1) << k;
      end
    return b;
  endfunction

  // Bias row: the multiple of 2^TRUNC closest to the middle of
  // [BIAS + DMAX, BIAS + 2^LSB_POS - 1].
  function automatic longint const_row();
    longint lo  = bias_sum() + DMAX;
    longint hi  = bias_sum() + (longint'(1) << LSB_POS) - 1;
    longint mid = (lo + hi) >>> 1;
    longint k   = (mid >>> TRUNC) <<< TRUNC;
    if (k < lo) k += longint'(1) << TRUNC;
    return k;
  endfunction

  localparam longint KROW = const_row();

  // Columns kept in the row of digit (p, k), as a mask over WIDE bits.
  function automatic logic [WIDE-1:0] keep_mask(int pp, int kk);
    logic [WIDE-1:0] m = '0;
    int rank = 0;
    // rank of this row among the rows that have a bit in column TRUNC
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if ((p < pp || (p == pp && k < kk)) && fir_pkg::csd_digit(COEF[p], k) != 0 &&
            TRUNC >= k && TRUNC < k + U_W)
          rank++;
    for (int c = 0; c < WIDE; c++)
      m[c] = (c >= TRUNC) && (c < W_ACC) && !(c == TRUNC && rank < QDEL);
    return m;
  endfunction

  for (genvar p = 0; p < NCOEF; p++) begin : g_coef
    for (genvar k = 0; k <= C_W; k++) begin : g_digit
      localparam int D = fir_pkg::csd_digit(COEF[p], k);
      if (D != 0) begin : g_row
        localparam logic [WIDE-1:0] KEEP = keep_mask(p, k);
        logic [U_W-1:0]  bits;
        // sign bit complemented for +u, magnitude bits complemented for -u
        assign bits   = (D > 0) ? {~u[p][U_W-1],  u[p][U_W-2:0]}
                                : { u[p][U_W-1], ~u[p][U_W-2:0]};
        assign rows[row_index(p, k)] = W_ACC'((WIDE'(bits) << k) & KEEP);
      end
    end
  end

  assign rows[NROWS] = KROW[W_ACC-1:0];

  // The coefficients must fit their width and the output must not overflow.
  function automatic longint abs_gain();
    longint g = 0;
    for (int p = 0; p < NCOEF; p++) begin
      longint a = (COEF[p] < 0) ? -longint'(COEF[p]) : longint'(COEF[p]);
      g += a;
    end
    return g;
  endfunction

  for (genvar p = 0; p < NCOEF; p++) begin : g_chk
    if (COEF[p] >= (1 << (C_W - 1)) || COEF[p] < -(1 << (C_W - 1))) begin : g_bad
      $error("pp_matrix: coefficient %0d does not fit in %0d bits", p, C_W);
    end
  end
  if ((2 * abs_gain() << (X_W - 1)) + (longint'(1) << LSB_POS) >
      (longint'(1) << (OUT_W - 1 + LSB_POS))) begin : g_ovf
    $error("pp_matrix: sum of |coefficients| can overflow the %0d-bit output", OUT_W);
  end

endmodule
