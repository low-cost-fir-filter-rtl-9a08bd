// fir_filter: low-cost linear-phase FIR filter in direct form with a
// faithfully rounded truncated MCMA.
//
// y[n] ~= sum_{i=0}^{TAPS-1} a_i * x[n-i] / 2^LSB_POS, with a_i = a_{TAPS-1-i}.
// The direct form keeps only the X_W-bit input samples in registers
// (tap_delay_line); the symmetric pairs are added first (sym_preadd), and the
// NCOEF = (TAPS+1)/2 constant products are summed in one partial-product
// matrix whose surplus low bits are removed, so that the OUT_W-bit output is
// faithfully rounded: it is the exact result rounded either up or down,
// never off by a full output LSB or more (mcmat).
//
// Ports are those of the filter's symbol: x[11:0], clk, reset, y[14:0].
// Timing: x is sampled by every rising edge of clk (one sample per clock).
// With PIPE = 1 the output for the sample captured at edge n appears after
// edge n+2; with PIPE = 0 after edge n+1.  reset is synchronous and active
// high and clears all registers, so y is 0 until real samples arrive.
// The defaults (9 taps, 12-bit input, 10-bit coefficients, 15-bit output) are
// the filter's published sizes; the coefficient values, the output scaling
// LSB_POS, the register in front of the first tap and the output register
// are this design's choices.
module fir_filter #(
  parameter int X_W     = fir_pkg::X_W,
  parameter int C_W     = fir_pkg::C_W,
  parameter int TAPS    = fir_pkg::TAPS,
  parameter int NCOEF   = (TAPS + 1) / 2,
  parameter int COEF [NCOEF] = fir_pkg::DEF_COEF,
  parameter int OUT_W   = fir_pkg::OUT_W,
  parameter int LSB_POS = fir_pkg::LSB_POS,
  parameter bit PIPE    = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic signed [X_W-1:0]   x,
  output logic signed [OUT_W-1:0] y
);

  logic signed [X_W-1:0] taps [TAPS];
  logic signed [X_W:0]   u    [NCOEF];

  tap_delay_line #(.X_W(X_W), .TAPS(TAPS)) u_delay (
    .clk  (clk),
    .reset(reset),
    .x    (x),
    .taps (taps)
  );

  sym_preadd #(.X_W(X_W), .TAPS(TAPS), .NCOEF(NCOEF)) u_preadd (
    .taps(taps),
    .u   (u)
  );

  mcmat #(
    .X_W(X_W), .C_W(C_W), .NCOEF(NCOEF), .COEF(COEF),
    .OUT_W(OUT_W), .LSB_POS(LSB_POS), .PIPE(PIPE)
  ) u_mcmat (
    .clk  (clk),
    .reset(reset),
    .u    (u),
    .y    (y)
  );

endmodule
