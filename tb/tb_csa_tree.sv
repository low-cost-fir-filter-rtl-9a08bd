// tb_csa_tree: the two output rows of the carry-save tree must add up to the
// sum of all input rows modulo 2^W.  Checks the filter's 31-row tree and a
// 4-row tree with random rows and with all-ones rows.
module tb_csa_tree;
  localparam int W = 22;

  logic [W-1:0] rows_a [31];
  logic [W-1:0] sum_a, carry_a;
  logic [W-1:0] rows_b [4];
  logic [W-1:0] sum_b, carry_b;
  int checks = 0, failures = 0;

  csa_tree #(.N(31), .W(W)) dut_a (.rows(rows_a), .sum(sum_a), .carry(carry_a));
  csa_tree #(.N(4),  .W(W)) dut_b (.rows(rows_b), .sum(sum_b), .carry(carry_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] ref_a, ref_b, got_a, got_b;
      ref_a = '0;
      ref_b = '0;
      for (int r = 0; r < 31; r++) begin
        rows_a[r] = (n == 0) ? '1 : W'($urandom);
        ref_a += rows_a[r];
      end
      for (int r = 0; r < 4; r++) begin
        rows_b[r] = (n == 0) ? '1 : W'($urandom);
        ref_b += rows_b[r];
      end
      #1;
      got_a = sum_a + carry_a;
      got_b = sum_b + carry_b;
      checks += 2;
      if (got_a != ref_a) begin
        failures++;
        $display("31 rows: %h, expected %h", got_a, ref_a);
      end
      if (got_b != ref_b) begin
        failures++;
        $display("4 rows: %h, expected %h", got_b, ref_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
