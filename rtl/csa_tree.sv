// csa_tree: carry-save reduction of N rows to two (sum and carry).
//
// Each level groups its rows in threes and replaces every group by the two
// rows of a csa3; the one or two rows left over pass to the next level.  A
// level with n rows leaves 2*floor(n/3) + n mod 3, and levels follow until
// two rows remain (about log_1.5(N/2) levels, 7 for the default 31 rows).  No
// carry propagates inside the tree; the two result rows go to one
// carry-propagate adder.  The sum is kept modulo 2^W.  Purely combinational.
// The row-wise (Wallace-style) grouping is this design's choice; the filter
// only requires a carry-save reduction of the matrix to two rows.
module csa_tree #(
  parameter int N = 31,
  parameter int W = fir_pkg::LSB_POS + fir_pkg::OUT_W
) (
  input  logic [W-1:0] rows  [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows left after lvl levels.
  function automatic int rows_at(int lvl);
    int n = N;
    for (int l = 0; l < lvl; l++) if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int num_levels();
    int n = N;
    int l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Level l reads the rows of level l-1 (or the inputs) into lin and leaves
  // its NO result rows in lout.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NI = rows_at(l);
    localparam int G  = NI / 3;
    localparam int NO = 2 * G + NI % 3;
    logic [W-1:0] lin  [NI];
    logic [W-1:0] lout [NO];
    if (l == 0) begin : g_first
      assign lin = rows;
    end else begin : g_next
      assign lin = g_lvl[l-1].lout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa3 #(.W(W)) u_csa (
        .a (lin[3*g]),
        .b (lin[3*g+1]),
        .c (lin[3*g+2]),
        .s (lout[2*g]),
        .co(lout[2*g+1])
      );
    end
    for (genvar r = 0; r < NI % 3; r++) begin : g_pass
      assign lout[2*G+r] = lin[3*G+r];
    end
  end

  if (LEVELS == 0) begin : g_short
    assign sum = rows[0];
    if (N > 1) begin : g_two
      assign carry = rows[N-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_result
    assign sum   = g_lvl[LEVELS-1].lout[0];
    assign carry = g_lvl[LEVELS-1].lout[1];
  end

endmodule
