// tb_pp_matrix: the rows of the trimmed partial-product matrix, summed modulo
// 2^22 and shifted right by 7, must be a faithful rounding of the exact
// sum of products S = sum_i a_i * u_i: |y * 2^7 - S| < 2^7.  Random and
// extreme pre-added samples are used.  The test also counts how often the
// result is not the nearest rounding, which shows that bits were removed,
// and fails if that never happens.
module tb_pp_matrix;
  localparam int NCOEF = 5;
  localparam int L     = 7;
  localparam int OUT_W = 15;
  localparam int W     = L + OUT_W;
  localparam int A [NCOEF] = '{-3, -7, 26, 136, 208};

  logic signed [12:0] u [NCOEF];
  int checks = 0, failures = 0, not_nearest = 0, up = 0, down = 0;

  // Row count of the default coefficients: CSD(-3)=-4+1, CSD(-7)=-8+1,
  // CSD(26)=32-8+2, CSD(136)=128+8, CSD(208)=256-64+16 -> 2+2+3+2+3 = 12.
  logic [W-1:0] r [13];

  pp_matrix dut (.u(u), .rows(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint s_exact, total, err, nearest;
      logic signed [OUT_W-1:0] y;
      for (int i = 0; i < NCOEF; i++) begin
        if (n == 0)      u[i] = (A[i] > 0) ? 13'sd4094 : -13'sd4096;
        else if (n == 1) u[i] = (A[i] > 0) ? -13'sd4096 : 13'sd4094;
        else if (n == 2) u[i] = '0;
        else if (i == NCOEF - 1) u[i] = 13'(signed'(12'($urandom)));
        else             u[i] = 13'(signed'(12'($urandom))) + 13'(signed'(12'($urandom)));
      end
      #1;
      s_exact = 0;
      for (int i = 0; i < NCOEF; i++) s_exact += longint'(A[i]) * longint'(u[i]);
      total = 0;
      for (int i = 0; i < 13; i++) total += longint'(r[i]);
      total = total % (longint'(1) << W);
      y = OUT_W'(total >> L);
      err = longint'(y) * (longint'(1) << L) - s_exact;
      nearest = (s_exact + (longint'(1) << (L - 1))) >>> L;
      checks++;
      if (err <= -(longint'(1) << L) || err >= (longint'(1) << L)) begin
        failures++;
        $display("S = %0d: y = %0d is not a faithful rounding", s_exact, y);
      end
      if (longint'(y) != nearest) not_nearest++;
      if (err > 0) up++;
      if (err < 0) down++;
    end
    $display("rounded up %0d, down %0d, not nearest %0d", up, down, not_nearest);
    checks += 3;
    if (up == 0 || down == 0) failures++;
    if (not_nearest == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
