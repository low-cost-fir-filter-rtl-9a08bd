// mcmat: faithfully rounded truncated multiple constant multiplication /
// accumulation (MCMAT), pipelined.
//
// Computes y = sum_i COEF[i] * u[i] / 2^LSB_POS with an error below one
// output LSB (faithful rounding), without forming any product on its own:
//   pp_matrix  one partial-product matrix for all coefficients, low bits
//              removed, sign extension replaced by one bias row;
//   csa_tree   carry-save reduction of that matrix to two rows;
//   pipeline   with PIPE = 1 the two rows are registered here, which cuts the
//              critical path between the reduction and the final adder;
//   cpa_round  the one carry-propagate adder, keeping the top OUT_W bits;
//   y register the rounded result is registered.
// Timing: u is combinational input, sampled by a rising edge (into the
// pipeline register with PIPE = 1, into the y register with PIPE = 0); y shows
// the result PIPE edges after that edge, i.e. after the next edge with the
// default PIPE = 1.  One result per clock.  reset is
// synchronous, active high, and clears the pipeline and output registers.
// The place of the pipeline cut and the output register are this design's
// choices; the pipelining itself follows the filter's pipelined block
// diagram.
module mcmat #(
  parameter int X_W     = fir_pkg::X_W,
  parameter int C_W     = fir_pkg::C_W,
  parameter int NCOEF   = fir_pkg::NCOEF,
  parameter int COEF [NCOEF] = fir_pkg::DEF_COEF,
  parameter int OUT_W   = fir_pkg::OUT_W,
  parameter int LSB_POS = fir_pkg::LSB_POS,
  parameter bit PIPE    = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic signed [X_W:0]     u [NCOEF],
  output logic signed [OUT_W-1:0] y
);

  localparam int W_ACC = LSB_POS + OUT_W;

  function automatic int count_rows();
    int n = 0;
    for (int p = 0; p < NCOEF; p++)
      for (int k = 0; k <= C_W; k++)
        if (fir_pkg::csd_digit(COEF[p], k) != 0) n++;
    return n;
  endfunction

  localparam int NROWS = count_rows();

  logic [W_ACC-1:0]        rows [NROWS+1];
  logic [W_ACC-1:0]        sum_c, carry_c;
  logic [W_ACC-1:0]        sum_q, carry_q;
  logic signed [OUT_W-1:0] y_c;

  pp_matrix #(
    .X_W(X_W), .C_W(C_W), .NCOEF(NCOEF), .COEF(COEF),
    .OUT_W(OUT_W), .LSB_POS(LSB_POS)
  ) u_pp (
    .u   (u),
    .rows(rows)
  );

  csa_tree #(.N(NROWS + 1), .W(W_ACC)) u_csa (
    .rows (rows),
    .sum  (sum_c),
    .carry(carry_c)
  );

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (reset) begin
        sum_q   <= '0;
        carry_q <= '0;
      end else begin
        sum_q   <= sum_c;
        carry_q <= carry_c;
      end
    end
  end else begin : g_nopipe
    assign sum_q   = sum_c;
    assign carry_q = carry_c;
  end

  cpa_round #(.OUT_W(OUT_W), .LSB_POS(LSB_POS)) u_cpa (
    .sum  (sum_q),
    .carry(carry_q),
    .y    (y_c)
  );

  always_ff @(posedge clk) begin
    if (reset) y <= '0;
    else       y <= y_c;
  end

endmodule
