// tap_delay_line: the chain of sample registers of the direct-form filter.
//
// Every rising clock edge the input sample x is captured in taps[0] and each
// register passes its value to the next one, so after the edge that captures
// x[n], taps[i] holds x[n-i].  TAPS registers of X_W bits are used; with the
// defaults (9 x 12 bits) that is 108 flip-flops, the register count reported
// for the synthesised filter.  The input is registered before it reaches the
// first product (taps[0] is register R1 of the filter's block diagram).
// reset is synchronous and active high and clears every register to zero.
module tap_delay_line #(
  parameter int X_W  = fir_pkg::X_W,
  parameter int TAPS = fir_pkg::TAPS
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic signed [X_W-1:0] x,
  output logic signed [X_W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else begin
      taps[0] <= x;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
