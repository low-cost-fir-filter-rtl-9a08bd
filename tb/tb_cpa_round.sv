// tb_cpa_round: the output must be bits [W-1:LSB_POS] of sum + carry, with
// random operands and with operands whose low bits carry into the output.
module tb_cpa_round;
  localparam int OUT_W = 15;
  localparam int L     = 7;
  localparam int W     = OUT_W + L;

  logic [W-1:0] s, c;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  cpa_round #(.OUT_W(OUT_W), .LSB_POS(L)) dut (.sum(s), .carry(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint total;
      if (n == 0) begin
        s = W'(64);
        c = W'(64);
      end else begin
        s = W'($urandom);
        c = W'($urandom);
      end
      #1;
      total = (longint'(s) + longint'(c)) % (longint'(1) << W);
      checks++;
      if (longint'(unsigned'(y)) != (total >> L)) begin
        failures++;
        $display("y = %h, expected %h", y, total >> L);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
