// csa3: one word-wide carry-save adder (a row of full adders), a 3:2
// compressor for whole rows.
//
// a + b + c = s + co (mod 2^W): s is the bitwise sum, co the majority bits
// moved up one column.  The carry out of the top column is dropped, which is
// correct because the matrix it serves is only summed modulo 2^W.
// Purely combinational.
module csa3 #(
  parameter int W = fir_pkg::LSB_POS + fir_pkg::OUT_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign co  = {maj[W-2:0], 1'b0};

endmodule
