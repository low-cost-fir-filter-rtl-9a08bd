// tb_tap_delay_line: checks that taps[i] holds the sample captured i edges
// earlier, and that a synchronous reset clears the whole chain.
// Samples are driven on the falling edge and compared on the next one.
module tb_tap_delay_line;
  localparam int X_W  = 12;
  localparam int TAPS = 9;

  logic clk = 1'b0, reset = 1'b1;
  logic signed [X_W-1:0] x = '0;
  logic signed [X_W-1:0] taps [TAPS];
  logic signed [X_W-1:0] model [TAPS];
  int checks = 0, failures = 0;

  tap_delay_line #(.X_W(X_W), .TAPS(TAPS)) dut (.clk(clk), .reset(reset), .x(x), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic rst, input logic signed [X_W-1:0] v);
    reset = rst;
    x     = v;
    @(posedge clk);
    if (rst) for (int i = 0; i < TAPS; i++) model[i] = '0;
    else begin
      for (int i = TAPS - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = v;
    end
    @(negedge clk);
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        $display("tap %0d = %0d, expected %0d", i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    step(1'b1, 12'sd5);
    for (int n = 0; n < 200; n++) step(n == 120, X_W'($urandom));
    step(1'b0, 12'sh7ff);
    step(1'b0, 12'sh800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
