// tb_xgcd_long -- arrays for long operands of 4 and 10 32-bit words (N = 128 and
// N = 320, i.e. 129 and 321 processors), run side by side on random operand
// pairs by two xgcd_long_runner instances. Each runner checks the reduced
// fraction with wide integer arithmetic and prints the mean latency, which
// shows the linear growth of the computing time with operand length.
module tb_xgcd_long;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c4, f4, c10, f10;
  logic d4, d10;
  int   checks, failures;

  always #5ns clk = ~clk;

  xgcd_long_runner #(.N(128), .CASES(60)) u_w4  (.clk, .rst_n, .checks(c4),  .failures(f4),  .finished(d4));
  xgcd_long_runner #(.N(320), .CASES(40)) u_w10 (.clk, .rst_n, .checks(c10), .failures(f10), .finished(d10));

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst_n = 1'b1;
    wait (d4 && d10);
    checks = c4 + c10;
    failures = f4 + f10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c10, f4 + f10 + 1);
    $finish;
  end

endmodule
