// sym_preadd: pre-adders of a linear-phase (symmetric) FIR filter.
//
// Because a_i = a_{M-i}, the two samples that share a coefficient are added
// before the multiplication: u[i] = taps[i] + taps[TAPS-1-i].  For an odd
// number of taps the centre sample has no partner and is only sign-extended.
// The sums are one bit wider than the samples, so nothing overflows.
// Purely combinational.
module sym_preadd #(
  parameter int X_W   = fir_pkg::X_W,
  parameter int TAPS  = fir_pkg::TAPS,
  parameter int NCOEF = (TAPS + 1) / 2
) (
  input  logic signed [X_W-1:0] taps [TAPS],
  output logic signed [X_W:0]   u    [NCOEF]
);

  for (genvar i = 0; i < TAPS / 2; i++) begin : g_pair
    assign u[i] = (X_W+1)'(taps[i]) + (X_W+1)'(taps[TAPS-1-i]);
  end

  if (TAPS % 2 == 1) begin : g_centre
    assign u[NCOEF-1] = (X_W+1)'(taps[TAPS/2]);
  end

endmodule
