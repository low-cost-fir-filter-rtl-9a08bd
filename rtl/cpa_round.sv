// cpa_round: final carry-propagate adder and output rounding.
//
// Adds the sum and carry rows left by the carry-save tree (modulo 2^W) and
// keeps the bits from column LSB_POS upward as the OUT_W-bit signed result.
// The rounding constant and the compensation for the removed low bits are
// already part of the matrix (its bias row), so dropping the low bits here
// completes the faithful rounding.  The low LSB_POS sum bits are computed
// only for their carries and are otherwise unused.  Purely combinational.
module cpa_round #(
  parameter int OUT_W   = fir_pkg::OUT_W,
  parameter int LSB_POS = fir_pkg::LSB_POS,
  localparam int W      = LSB_POS + OUT_W
) (
  input  logic [W-1:0]            sum,
  input  logic [W-1:0]            carry,
  output logic signed [OUT_W-1:0] y
);

  logic [W-1:0] total;

  assign total = sum + carry;
  assign y     = total[W-1:LSB_POS];

endmodule
