// tb_lowpass_filter: checks the branch low-pass filter at its default
// time constant (2^14 clocks) and a short one (2^6 clocks).
//   step 0 -> 1: after 2^SHIFT clocks the output is 1 - 1/e = 63.2 % of
//     full scale (within 1 %); after 12 * 2^SHIFT clocks it is full scale
//     (within 0.1 %)
//   a 25 % duty input (period 64 clocks, much shorter than the time
//     constant) settles at 25 % of full scale (within 1 %)
//   step 1 -> 0: decays to 36.8 % after 2^SHIFT clocks
module tb_lowpass_filter;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic x = 1'b0;
  logic [15:0] y14, y6;

  lowpass_filter           dut14 (.clk(clk), .rst(rst), .x(x), .y(y14));
  lowpass_filter #(.SHIFT(6)) dut6 (.clk(clk), .rst(rst), .x(x), .y(y6));

  int checks = 0, failures = 0;

  task automatic check_level(input string what, input logic [15:0] y, input real expv, input real tol);
    real got;
    got = real'(y) / 65536.0;
    checks++;
    if (got < expv - tol || got > expv + tol) begin
      failures++;
      $display("FAIL %s: %f expected %f", what, got, expv);
    end else $display("ok   %s: %f", what, got);
  endtask

  task automatic run_pwm(input int ncyc, input int duty64);
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      x = ((c % 64) < duty64);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (y14 != 0 || y6 != 0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;

    // short filter: step up, one time constant
    @(negedge clk); x = 1'b1;
    repeat (64) @(posedge clk);
    #1;
    check_level("SHIFT=6 step, 1 time constant", y6, 0.632, 0.01);

    // long filter: step up
    repeat ((1 << 14) - 64) @(posedge clk);
    #1;
    check_level("SHIFT=14 step, 1 time constant", y14, 0.632, 0.01);
    repeat (11 << 14) @(posedge clk);
    #1;
    check_level("SHIFT=14 step, 12 time constants", y14, 1.0, 0.001);
    check_level("SHIFT=6 settled", y6, 1.0, 0.001);

    // step down, one time constant
    @(negedge clk); x = 1'b0;
    repeat (1 << 14) @(posedge clk);
    #1;
    check_level("SHIFT=14 decay, 1 time constant", y14, 0.368, 0.01);

    // 25 % duty
    run_pwm(12 << 14, 16);
    #1;
    check_level("SHIFT=14 25% duty", y14, 0.25, 0.01);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 << 14) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
