// tb_fir_filter_msb12: end-to-end test of the filter configured for a 12-bit
// output, the top 12 bits of the 22-bit full-precision result
// (OUT_W = 12, LSB_POS = 10), otherwise as tb_fir_filter.
//
// A reference model keeps every captured input sample and computes the exact
// output S[m] = sum_i h_i * x[m-i] with the full symmetric impulse response
// h = -3 -7 26 136 208 136 26 -7 -3.  After every rising edge e the output
// must be a faithful rounding of S[e-2] / 2^10 (|y * 2^10 - S| < 2^10), which
// also fixes the latency at two edges.  Samples captured while reset is high
// count as zero.
//
// Phases: reset; an impulse of 1024 (the output must then be exactly h, two
// edges after the impulse is captured); random samples; full-scale inputs
// (constant maximum, constant minimum, and the sign pattern of h that gives
// the largest output); a reset in the middle of random data.  Each mechanism
// is counted - pipeline latency seen on the impulse, results rounded up,
// rounded down, results that differ from round-to-nearest because partial
// product bits were removed, a reset that cleared live data, full-scale
// output - and one that never happened counts as a failure.
module tb_fir_filter_msb12;
  localparam int TAPS  = 9;
  localparam int L     = 10;
  localparam int H [TAPS] = '{-3, -7, 26, 136, 208, 136, 26, -7, -3};
  localparam int MAXE  = 20000;

  logic clk = 1'b0, reset = 1'b1;
  logic signed [11:0] x = '0;
  logic signed [11:0] y;

  int     xs [MAXE];       // sample captured at each edge (0 under reset)
  int     valid_from = 0;  // first edge whose sample is live
  int     edge_no = 0;
  int     checks = 0, failures = 0;
  int     n_latency = 0, n_up = 0, n_down = 0, n_not_nearest = 0;
  int     n_reset = 0, n_fullscale = 0;

  fir_filter #(.OUT_W(12), .LSB_POS(10)) dut (.clk(clk), .reset(reset), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint exact(int m);
    longint s = 0;
    for (int i = 0; i < TAPS; i++)
      if (m - i >= valid_from && m - i >= 0) s += longint'(H[i]) * longint'(xs[m-i]);
    return s;
  endfunction

  // Drive one sample (or a reset), clock it in, check the output.
  task automatic step(input logic rst, input int v);
    longint s, err, nearest;
    @(negedge clk);
    reset = rst;
    x     = 12'(v);
    @(posedge clk);
    xs[edge_no] = rst ? 0 : v;
    if (rst) begin
      if (y != 0) n_reset++;
      valid_from = edge_no + 1;
    end
    #1;
    s = exact(edge_no - 2);
    err = longint'(y) * (longint'(1) << L) - s;
    nearest = (s + (longint'(1) << (L - 1))) >>> L;
    checks++;
    if (err <= -(longint'(1) << L) || err >= (longint'(1) << L)) begin
      failures++;
      $display("edge %0d: y = %0d, exact %0d / 2^%0d", edge_no, y, s, L);
    end
    if (err > 0) n_up++;
    if (err < 0) n_down++;
    if (longint'(y) != nearest) n_not_nearest++;
    if (y > 12'sd1050 || y < -12'sd1050) n_fullscale++;
    edge_no++;
  endtask

  initial begin
    int imp_edge;
    repeat (3) step(1'b1, 0);

    // impulse response
    step(1'b0, 0);
    imp_edge = edge_no;
    step(1'b0, 1024);
    for (int k = 0; k < TAPS + 4; k++) begin
      step(1'b0, 0);
      // after edge imp_edge + 2 + i the output is h[i] exactly
      if (edge_no - 1 - imp_edge - 2 >= 0 && edge_no - 1 - imp_edge - 2 < TAPS) begin
        checks++;
        if (int'(y) != H[edge_no - 1 - imp_edge - 2]) begin
          failures++;
          $display("impulse response %0d: %0d, expected %0d", edge_no - 1 - imp_edge - 2, y,
                   H[edge_no - 1 - imp_edge - 2]);
        end else if (edge_no - 1 - imp_edge - 2 == 0) n_latency++;
      end
    end

    // random samples
    for (int n = 0; n < 6000; n++) step(1'b0, int'(signed'(12'($urandom))));

    // full scale
    for (int n = 0; n < 12; n++) step(1'b0, 2047);
    for (int n = 0; n < 12; n++) step(1'b0, -2048);
    for (int n = 0; n < 3 * TAPS; n++)
      step(1'b0, (H[TAPS - 1 - (n % TAPS)] > 0) ? 2047 : -2048);
    for (int n = 0; n < 3 * TAPS; n++)
      step(1'b0, (H[TAPS - 1 - (n % TAPS)] > 0) ? -2048 : 2047);

    // reset in the middle of random data
    for (int n = 0; n < 50; n++) step(1'b0, int'(signed'(12'($urandom))));
    step(1'b1, 0);
    for (int n = 0; n < 500; n++) step(1'b0, int'(signed'(12'($urandom))));

    $display("latency %0d, rounded up %0d, down %0d, not nearest %0d, reset %0d, full scale %0d",
             n_latency, n_up, n_down, n_not_nearest, n_reset, n_fullscale);
    checks += 6;
    if (n_latency == 0)     failures++;
    if (n_up == 0)          failures++;
    if (n_down == 0)        failures++;
    if (n_not_nearest == 0) failures++;
    if (n_reset == 0)       failures++;
    if (n_fullscale == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
