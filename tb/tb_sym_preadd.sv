// tb_sym_preadd: random and extreme tap values; every pre-adder output must
// equal the exact sum of its symmetric pair (the centre tap passes alone).
module tb_sym_preadd;
  localparam int X_W   = 12;
  localparam int TAPS  = 9;
  localparam int NCOEF = 5;

  logic signed [X_W-1:0] taps [TAPS];
  logic signed [X_W:0]   u    [NCOEF];
  int checks = 0, failures = 0;

  sym_preadd #(.X_W(X_W), .TAPS(TAPS), .NCOEF(NCOEF)) dut (.taps(taps), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < TAPS; i++) begin
        case (n)
          0:       taps[i] = 12'sh7ff;
          1:       taps[i] = 12'sh800;
          2:       taps[i] = (i % 2 == 1) ? 12'sh800 : 12'sh7ff;
          default: taps[i] = X_W'($urandom);
        endcase
      end
      #1;
      for (int i = 0; i < NCOEF; i++) begin
        int expect_v;
        expect_v = (i < TAPS / 2) ? int'(taps[i]) + int'(taps[TAPS-1-i]) : int'(taps[i]);
        checks++;
        if (int'(u[i]) != expect_v) begin
          failures++;
          $display("u[%0d] = %0d, expected %0d", i, u[i], expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
