// tb_dpll_first_order: checks the first-order digital phase-lock loop at its
// default size (N = 8, M = 128) and the mark-loop clocks f1 = 325,120 Hz and
// g1 = 190,720 Hz (lock range g1/2M = 745 Hz to f1/2M = 1270 Hz), with a
// 10 MHz system clock. Expected values come from the loop's static
// equations, computed here:
//   no input: the feedback stays low for M/g1 and high for M/f1,
//     f_q = (1/M) g1 f1 / (g1 + f1) = 939 Hz
//   input inside the lock range: feedback frequency = input frequency and
//     mean of the gating output v = (2 M f - g1) / (f1 - g1)
//   input above the lock range: feedback frequency differs from the input
// The loop clocks run freely, so after each feedback transition the first
// pulse of the newly selected clock arrives after a random part of its
// period: a half cycle lasts M pulse periods less up to one period. The
// tolerances (one loop-clock period per half cycle, 0.02 on the mean
// gating value) allow for that.
module tb_dpll_first_order;

  localparam int unsigned CLK_HZ = 10_000_000;
  localparam real F1 = 325120.0;
  localparam real G1 = 190720.0;
  localparam real M  = 128.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic sig_in = 1'b0;
  logic feedback, gating;
  logic [7:0] count;

  dpll_first_order dut (
    .clk(clk), .rst(rst), .sig_in(sig_in),
    .feedback(feedback), .gating(gating), .count(count)
  );

  int checks = 0, failures = 0;
  real f_in = 0.0;    // 0: no input
  real ph = 0.0;

  always @(negedge clk) begin
    if (f_in > 0.0) begin
      ph = ph + f_in / CLK_HZ;
      if (ph >= 1.0) ph = ph - 1.0;
      sig_in = (ph >= 0.5);
    end else sig_in = 1'b0;
  end

  task automatic check_close(input string what, input real got, input real expv, input real tol);
    checks++;
    if (got < expv - tol || got > expv + tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f (+-%f)", what, got, expv, tol);
    end else $display("ok   %s: %f (expected %f)", what, got, expv);
  endtask

  // measure over ncyc clocks: rising edges of input and feedback, and the
  // fraction of clocks with gating high
  task automatic measure(input int ncyc, output int e_in, output int e_fb, output real duty);
    logic si_q, fb_q;
    int high;
    e_in = 0; e_fb = 0; high = 0;
    si_q = sig_in; fb_q = feedback;
    repeat (ncyc) begin
      @(posedge clk);
      #1;
      if (sig_in && !si_q) e_in++;
      if (feedback && !fb_q) e_fb++;
      high += int'(gating);
      si_q = sig_in; fb_q = feedback;
    end
    duty = real'(high) / real'(ncyc);
  endtask

  initial begin
    int e_in, e_fb;
    real duty;
    repeat (5) @(posedge clk);
    rst = 1'b0;

    // no input: quiescent oscillation
    begin
      int t_low, t_high;
      t_low = 0; t_high = 0;
      repeat (20000) @(posedge clk);
      @(posedge feedback);
      repeat (4) begin
        @(posedge clk);
        t_high++;
        while (feedback) begin @(posedge clk); t_high++; end
        while (!feedback) begin @(posedge clk); t_low++; end
      end
      check_close("no input: feedback low time (clocks)",  real'(t_low) / 4.0,  M / G1 * CLK_HZ, CLK_HZ / G1);
      check_close("no input: feedback high time (clocks)", real'(t_high) / 4.0, M / F1 * CLK_HZ, CLK_HZ / F1);
      check_close("no input: quiescent frequency (Hz)",
                  4.0 * CLK_HZ / real'(t_low + t_high), G1 * F1 / (M * (G1 + F1)), 10.0);
    end

    // inputs inside the lock range: locked, duty follows the static line
    begin
      static real fl [3] = '{1220.0, 1000.0, 800.0};
      for (int i = 0; i < 3; i++) begin
        f_in = fl[i];
        repeat (30 * int'(CLK_HZ / f_in)) @(posedge clk);
        measure(60 * int'(CLK_HZ / f_in), e_in, e_fb, duty);
        checks++;
        if (e_fb < e_in - 1 || e_fb > e_in + 1) begin
          failures++;
          $display("FAIL %0.0f Hz: not locked, %0d input vs %0d feedback edges", f_in, e_in, e_fb);
        end
        check_close($sformatf("%0.0f Hz: mean gating", f_in), duty,
                    (2.0 * M * f_in - G1) / (F1 - G1), 0.02);
      end
    end

    // input above the lock range (the space carrier): not locked
    f_in = 1490.0;
    repeat (30 * int'(CLK_HZ / f_in)) @(posedge clk);
    measure(60 * int'(CLK_HZ / f_in), e_in, e_fb, duty);
    checks++;
    if (e_fb >= e_in - 2) begin
      failures++;
      $display("FAIL 1490 Hz: loop should not lock (%0d input vs %0d feedback edges)", e_in, e_fb);
    end else $display("ok   1490 Hz: out of lock, %0d input vs %0d feedback edges, mean gating %f", e_in, e_fb, duty);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
