// fir_pkg: sizes, default coefficients and constant functions shared by the
// faithfully rounded truncated FIR filter.
//
// The filter is a 9-tap (order 8) linear-phase direct-form FIR with a 12-bit
// input and a 15-bit output, the sizes of the filter's port list.  Its
// coefficients are 10-bit signed integers read as fractions of 2^9.  No
// coefficient values are published for this design; the defaults below are
// this design's own: a Hamming-windowed low-pass with cut-off 0.2*fs, scaled
// to a DC gain of 512/512 and rounded to integers.  Only the five distinct
// values a0..a4 of the symmetric impulse response are stored (a4 is the centre
// tap).
//
// csd_digit() gives one digit of the canonical signed-digit (CSD) form of a
// constant.  The partial-product matrix has one row per non-zero digit, so a
// coefficient with few non-zero digits costs few rows.
package fir_pkg;

  localparam int X_W     = 12;           // input sample width
  localparam int C_W     = 10;           // coefficient width
  localparam int TAPS    = 9;            // filter length (order 8)
  localparam int NCOEF   = (TAPS + 1) / 2;
  localparam int OUT_W   = 15;           // output width
  // Weight of the output LSB in the full-precision sum of products.  With
  // sum|a_i| = 552 < 1024 the full sum stays below 2^21, so y = sum / 2^7
  // fits in 15 signed bits.
  localparam int LSB_POS = 7;

  localparam int DEF_COEF [NCOEF] = '{-3, -7, 26, 136, 208};

  // Digit k (-1, 0 or +1) of the CSD representation of c.
  function automatic int csd_digit(int c, int k);
    longint v;
    int     d;
    v = longint'(c);
    d = 0;
    for (int i = 0; i <= k; i++) begin
      if (v[0]) d = v[1] ? -1 : 1;
      else      d = 0;
      v = (v - longint'(d)) >>> 1;
    end
    return d;
  endfunction

endpackage
