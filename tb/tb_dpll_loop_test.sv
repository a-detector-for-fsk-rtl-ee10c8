// tb_dpll_loop_test: the stand-alone loop test: one first-order loop with
// an eight-stage counter (M = 128) and loop clocks f1 = 363.5 kHz and
// g1 = 262.5 kHz, i.e. a lock range from g1/2M = 1025 Hz to f1/2M = 1420 Hz.
//  1. Static sweep from 950 Hz to 1500 Hz: in_range the lock range the loop
//     must lock (feedback frequency = input frequency) and the mean of the
//     gating output must follow v = (2 M f - g1)/(f1 - g1) (phase difference
//     v * pi, from 0 to pi across the range). The clocks run freely, so the
//     M-th pulse that ends a half cycle comes between M - 1 and M clock
//     periods after it starts: half a pulse short on average, which lowers
//     v by 0.5 * 2f/(f1 - g1) (about 0.012). The check allows v - 0.5 p
//     +- (0.5 p + 0.01) with p = 2f/(f1 - g1). Outside it must not lock,
//     and the gating output must then be a beat note: over 100 input
//     periods, the mean gating per input period must swing from more than
//     0.15 below its overall mean to more than 0.15 above it and back as
//     many times (to within one) as the input has cycles more or fewer than
//     the feedback.
//  2. Step response: after a step of the input frequency from 1100 Hz to
//     1350 Hz and back, the mean gating over each of the first six input
//     periods must follow v(t) = v_b - D exp(-t/T), the transient of the
//     first-order difference equation (time constant T = 1/(2 f ln(f1/g1)),
//     1.14 ms at 1350 Hz and 1.40 ms at 1100 Hz), to within 0.08.
//  3. Input switched every 1/120 s between 1100 Hz and 1350 Hz (both in
//     range): in every interval the loop must re-lock. Lock-in time is the
//     end of the last input period, counted from the switch, whose mean
//     gating is more than 0.06 away from the interval's static value; it
//     must be shorter than the interval and is printed (about 1/360 s was
//     estimated for the hardware loop).
//  4. Input switched between 1100 Hz and 1600 Hz (the second outside the
//     range): the loop must fail to lock in every 1600 Hz interval. The
//     unlocked-to-locked time in the 1100 Hz intervals is printed; at least
//     4 of 8 must complete within the interval. The counter starts each of
//     these intervals at an arbitrary phase, and from some phases the loop
//     first slips a cycle, which can push lock-in past 1/120 s.
module tb_dpll_loop_test;

  localparam int unsigned CLK_HZ = 10_000_000;
  localparam real F1 = 363500.0;
  localparam real G1 = 262500.0;
  localparam real M  = 128.0;
  localparam int  INTERVAL = CLK_HZ / 120;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic sig_in = 1'b0;
  logic feedback, gating;
  logic [7:0] count;

  dpll_first_order #(.CLK_HZ(CLK_HZ), .F_HZ(363_500), .G_HZ(262_500)) dut (
    .clk(clk), .rst(rst), .sig_in(sig_in),
    .feedback(feedback), .gating(gating), .count(count)
  );

  int checks = 0, failures = 0;
  real f_in = 1100.0;
  real ph = 0.0;

  always @(negedge clk) begin
    ph = ph + f_in / CLK_HZ;
    if (ph >= 1.0) ph = ph - 1.0;
    sig_in = (ph >= 0.5);
  end

  function automatic real v_static(input real f);
    return (2.0 * M * f - G1) / (F1 - G1);
  endfunction

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

  // out of lock: counts input and feedback cycles over nper input periods
  // and the swings of the mean gating per input period around mid (low:
  // below mid - 0.15, high: above mid + 0.15; one swing is a low-high-low
  // cycle)
  task automatic beat(input int nper, input real mid, output int e_in, output int e_fb, output int swings);
    int per, ei, ef;
    real duty;
    bit was_high;
    per = int'(CLK_HZ / f_in);
    e_in = 0; e_fb = 0; swings = 0; was_high = 1'b0;
    repeat (nper) begin
      measure(per, ei, ef, duty);
      e_in += ei; e_fb += ef;
      if (duty > mid + 0.15) was_high = 1'b1;
      if (duty < mid - 0.15 && was_high) begin swings++; was_high = 1'b0; end
    end
  endtask

  // one switching interval at frequency f; returns lock-in time in clocks
  // (-1 if the last input period is still off the static value)
  task automatic interval(input real f, output int t_lock);
    int per, nwin, last_bad, e_in, e_fb;
    real duty;
    f_in = f;
    per  = int'(CLK_HZ / f);
    nwin = INTERVAL / per;
    last_bad = 0;
    for (int w = 0; w < nwin; w++) begin
      measure(per, e_in, e_fb, duty);
      if (duty < v_static(f) - 0.06 || duty > v_static(f) + 0.06) last_bad = w + 1;
    end
    repeat (INTERVAL - nwin * per) @(posedge clk);
    t_lock = (last_bad == nwin) ? -1 : last_bad * per;
  endtask

  // Frequency step from fa to fb with continuous input phase: the mean
  // gating over each of the first 6 input periods must be within 0.08 of
  // the mean of v(t) = v_b - D exp(-t/T) over that period, with
  // D = 2M (fb - fa)/(f1 - g1) and T = 1/(2 fb ln(f1/g1)).
  task automatic step(input real fa, input real fb);
    int per, e_in, e_fb;
    real duty, d, tc, t0, t1, pred;
    f_in = fa;
    repeat (40 * int'(CLK_HZ / fa)) @(posedge clk);
    f_in = fb;
    per = int'(CLK_HZ / fb);
    d  = 2.0 * M * (fb - fa) / (F1 - G1);
    tc = 1.0 / (2.0 * fb * $ln(F1 / G1));
    for (int w = 0; w < 6; w++) begin
      measure(per, e_in, e_fb, duty);
      t0 = real'(w * per) / CLK_HZ;
      t1 = real'((w + 1) * per) / CLK_HZ;
      pred = v_static(fb) - d * (tc / (t1 - t0)) * ($exp(-t0 / tc) - $exp(-t1 / tc));
      checks++;
      if (duty < pred - 0.08 || duty > pred + 0.08) begin
        failures++;
        $display("FAIL step %0.0f->%0.0f Hz period %0d: mean gating %f, expected %f", fa, fb, w, duty, pred);
      end else
        $display("step %0.0f->%0.0f Hz period %0d: mean gating %f, expected %f", fa, fb, w, duty, pred);
    end
  endtask

  initial begin
    int e_in, e_fb, t_lock, n_lock, sum_lock, worst;
    real duty;
    repeat (5) @(posedge clk);
    rst = 1'b0;

    // 1. static sweep
    for (int fi = 950; fi <= 1500; fi += 50) begin
      bit in_range;
      f_in = real'(fi);
      in_range = (f_in > G1 / (2.0 * M) + 5.0) && (f_in < F1 / (2.0 * M) - 5.0);
      repeat (30 * int'(CLK_HZ / f_in)) @(posedge clk);
      measure(50 * int'(CLK_HZ / f_in), e_in, e_fb, duty);
      checks++;
      if (in_range) begin
        real p;
        p = 2.0 * f_in / (F1 - G1);
        if (e_fb < e_in - 1 || e_fb > e_in + 1 || duty < v_static(f_in) - p - 0.01 || duty > v_static(f_in) + 0.01) begin
          failures++;
          $display("FAIL %0d Hz: edges %0d/%0d, mean gating %f expected %f to %f", fi, e_in, e_fb, duty,
                   v_static(f_in) - p - 0.01, v_static(f_in) + 0.01);
        end else
          $display("%0d Hz locked, mean gating %f (static line %f), phase %0.0f deg", fi, duty, v_static(f_in), duty * 180.0);
      end else begin
        if (e_fb >= e_in - 2 && e_fb <= e_in + 2) begin
          failures++;
          $display("FAIL %0d Hz outside the lock range but locked", fi);
        end else
          $display("%0d Hz out of lock: %0d input, %0d feedback periods, mean gating %f", fi, e_in, e_fb, duty);
        begin
          int nb, diff;
          beat(100, duty, e_in, e_fb, nb);
          diff = (e_in > e_fb) ? e_in - e_fb : e_fb - e_in;
          checks++;
          if (nb < diff - 1 || nb > diff + 1 || diff < 2) begin
            failures++;
            $display("FAIL %0d Hz beat note: %0d swings of the gating, %0d cycles difference", fi, nb, diff);
          end else
            $display("%0d Hz beat note: %0d swings of the gating over %0d input and %0d feedback cycles", fi, nb, e_in, e_fb);
        end
      end
    end

    // 2. step response against v(t) = v_b - D exp(-t/T)
    step(1100.0, 1350.0);
    step(1350.0, 1100.0);

    // 3. switching between two in-range oscillators
    n_lock = 0; sum_lock = 0; worst = 0;
    for (int k = 0; k < 8; k++) begin
      interval(k[0] ? 1350.0 : 1100.0, t_lock);
      if (k > 0) begin
        checks++;
        if (t_lock < 0) begin
          failures++;
          $display("FAIL interval %0d: did not lock", k);
        end else begin
          n_lock++; sum_lock += t_lock;
          if (t_lock > worst) worst = t_lock;
        end
      end
    end
    if (n_lock > 0)
      $display("lock-in time: mean %0.2f ms, worst %0.2f ms (interval %0.2f ms)",
               1000.0 * sum_lock / n_lock / CLK_HZ, 1000.0 * worst / CLK_HZ, 1000.0 / 120.0);

    // 4. one oscillator outside the lock range
    n_lock = 0; sum_lock = 0; worst = 0;
    for (int k = 0; k < 17; k++) begin
      interval(k[0] ? 1600.0 : 1100.0, t_lock);
      if (k[0]) begin
        checks++;
        if (t_lock >= 0) begin
          failures++;
          $display("FAIL interval %0d at 1600 Hz locked", k);
        end
      end else if (k > 0 && t_lock >= 0) begin
        n_lock++; sum_lock += t_lock;
      end
    end
    checks++;
    if (n_lock < 4) begin
      failures++;
      $display("FAIL only %0d of 8 re-locks completed within the interval", n_lock);
    end
    if (n_lock > 0)
      $display("re-lock after 1600 Hz: %0d of 8 within the interval, mean %0.2f ms",
               n_lock, 1000.0 * sum_lock / n_lock / CLK_HZ);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
