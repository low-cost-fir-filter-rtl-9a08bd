// tb_mcmat: drives a new set of pre-added samples u every clock into two
// instances, with and without the pipeline register, and checks every output
// against the exact sum of products: the result must be a faithful rounding
// (|y * 2^7 - S| < 2^7) and be visible one edge after the edge that samples
// u (PIPE = 1), or right after that same edge (PIPE = 0).  A reset in the middle must clear the results.
module tb_mcmat;
  localparam int NCOEF = 5;
  localparam int L     = 7;
  localparam int OUT_W = 15;
  localparam int A [NCOEF] = '{-3, -7, 26, 136, 208};
  localparam int NCYC  = 3000;

  logic clk = 1'b0, reset = 1'b1;
  logic signed [12:0] u [NCOEF];
  logic signed [OUT_W-1:0] y_p, y_n;
  longint s_hist [NCYC+4];   // exact sum of the u sampled at each edge
  bit     rst_hist [NCYC+4]; // reset at that edge
  int checks = 0, failures = 0;

  mcmat #(.PIPE(1'b1)) dut_p (.clk(clk), .reset(reset), .u(u), .y(y_p));
  mcmat #(.PIPE(1'b0)) dut_n (.clk(clk), .reset(reset), .u(u), .y(y_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected sum for the output register after edge e with latency lat:
  // zero if a reset happened in the last lat+1 edges.
  function automatic longint expected(int e, int lat);
    for (int d = 0; d <= lat; d++)
      if (e - d < 0 || rst_hist[e-d]) return 0;
    return s_hist[e-lat];
  endfunction

  task automatic check(string name, logic signed [OUT_W-1:0] y, longint s);
    longint err;
    err = longint'(y) * (longint'(1) << L) - s;
    checks++;
    if (err <= -(longint'(1) << L) || err >= (longint'(1) << L)) begin
      failures++;
      $display("%s: y = %0d for exact sum %0d", name, y, s);
    end
  endtask

  initial begin
    for (int i = 0; i < NCOEF; i++) u[i] = '0;
    for (int e = 0; e < NCYC; e++) begin
      @(negedge clk);
      reset = (e < 2) || (e == 1500);
      for (int i = 0; i < NCOEF; i++)
        u[i] = (i == NCOEF - 1) ? 13'(signed'(12'($urandom)))
                                : 13'(signed'(12'($urandom))) + 13'(signed'(12'($urandom)));
      s_hist[e] = 0;
      for (int i = 0; i < NCOEF; i++) s_hist[e] += longint'(A[i]) * longint'(u[i]);
      rst_hist[e] = reset;
      @(posedge clk);
      #1;
      check("PIPE=1", y_p, expected(e, 1));
      check("PIPE=0", y_n, expected(e, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
