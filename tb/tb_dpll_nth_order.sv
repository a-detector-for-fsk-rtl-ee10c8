// tb_dpll_nth_order: checks the general n-th order loop.
//  1. ORDER = 1 with f1 = 325.12 kHz, g1 = 190.72 kHz must behave exactly
//     like the first-order loop with the same clocks: on every clock cycle
//     its feedback must equal that of dpll_first_order and its register the
//     low N-1 bits of that loop's counter.
//  2. ORDER = 2 (f1 = 0, f2 = 325.12 kHz, g1 = 190.72 kHz, g2 = 0) and
//     ORDER = 3 (f1 = f2 = 0, f3 = 325.12 kHz, g1 = 190.72 kHz, g2 = g3 = 0)
//     in the low-pass setting, both with lock range 745-1270 Hz: at 1220,
//     1000 and 800 Hz they must lock (one feedback period per input period)
//     with mean gating within 0.03 of v = (2 M f - g1)/(f1 + ... + fn - g1);
//     at 1490 Hz they must not lock.
//  3. ORDER = 2 with f1 = f2 = 162.56 kHz (same sum and lock range) has a
//     root of f2 z^2 + f1 z - g1 at -1.69, outside the unit circle: it must
//     fail to lock at 1220 Hz although the frequency is in range.
// The expected values come from the static equation, not from the loop.
module tb_dpll_nth_order;

  localparam int unsigned CLK_HZ = 10_000_000;
  localparam real M = 128.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic sig_in = 1'b0;
  logic fb1, g1o, fb_ref, g_ref, fb2, g2o, fb3, g3o;
  logic [8:0] c1, c2, c3;
  logic [7:0] c_ref;

  dpll_nth_order #(.CLK_HZ(CLK_HZ), .ORDER(1), .F_HZ('{325_120, 0, 0, 0}), .G_HZ('{190_720, 0, 0, 0})) d1 (
    .clk(clk), .rst(rst), .sig_in(sig_in), .feedback(fb1), .gating(g1o), .count_last(c1)
  );
  dpll_first_order #(.CLK_HZ(CLK_HZ), .F_HZ(325_120), .G_HZ(190_720), .N(8)) dref (
    .clk(clk), .rst(rst), .sig_in(sig_in), .feedback(fb_ref), .gating(g_ref), .count(c_ref)
  );
  dpll_nth_order #(.CLK_HZ(CLK_HZ)) d2 (
    .clk(clk), .rst(rst), .sig_in(sig_in), .feedback(fb2), .gating(g2o), .count_last(c2)
  );
  dpll_nth_order #(.CLK_HZ(CLK_HZ), .ORDER(3), .F_HZ('{0, 0, 325_120, 0}),
                   .G_HZ('{190_720, 0, 0, 0})) d3 (
    .clk(clk), .rst(rst), .sig_in(sig_in), .feedback(fb3), .gating(g3o), .count_last(c3)
  );

  logic fbu, gu;
  logic [8:0] cu;
  dpll_nth_order #(.CLK_HZ(CLK_HZ), .ORDER(2), .F_HZ('{162_560, 162_560, 0, 0}),
                   .G_HZ('{190_720, 0, 0, 0})) du (
    .clk(clk), .rst(rst), .sig_in(sig_in), .feedback(fbu), .gating(gu), .count_last(cu)
  );

  int checks = 0, failures = 0;
  int mismatch = 0;
  real f_in = 1220.0;
  real ph = 0.0;

  always @(negedge clk) begin
    ph = ph + f_in / CLK_HZ;
    if (ph >= 1.0) ph = ph - 1.0;
    sig_in = (ph >= 0.5);
  end

  always @(posedge clk) begin
    if (!rst && (fb1 !== fb_ref || c1 !== 9'(c_ref[6:0]))) mismatch++;
  end

  task automatic check_loop(input string name, input int e_in, input int e_fb,
                            input real duty, input real fsum, input real f);
    real v;
    bit in_range;
    v = (2.0 * M * f - 190720.0) / (fsum - 190720.0);
    in_range = (v > 0.02 && v < 0.98);
    checks++;
    if (in_range) begin
      if (e_fb < e_in - 1 || e_fb > e_in + 1 || duty < v - 0.03 || duty > v + 0.03) begin
        failures++;
        $display("FAIL %s at %0.0f Hz: edges %0d/%0d, mean gating %f, expected %f", name, f, e_in, e_fb, duty, v);
      end else
        $display("%s at %0.0f Hz locked, mean gating %f (static line %f)", name, f, duty, v);
    end else begin
      if (e_fb >= e_in - 2 && e_fb <= e_in + 2) begin
        failures++;
        $display("FAIL %s at %0.0f Hz out of range but locked", name, f);
      end else
        $display("%s at %0.0f Hz out of lock: %0d input, %0d feedback periods", name, f, e_in, e_fb);
    end
  endtask

  initial begin
    real fl [4];
    fl = '{1220.0, 1000.0, 800.0, 1490.0};
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      int e_in, e2, e3, eu, h2, h3, ncyc;
      logic si_q, f2_q, f3_q, fu_q;
      f_in = fl[k];
      repeat (60 * int'(CLK_HZ / f_in)) @(posedge clk);
      ncyc = 60 * int'(CLK_HZ / f_in);
      e_in = 0; e2 = 0; e3 = 0; eu = 0; h2 = 0; h3 = 0;
      si_q = sig_in; f2_q = fb2; f3_q = fb3; fu_q = fbu;
      repeat (ncyc) begin
        @(posedge clk);
        #1;
        if (sig_in && !si_q) e_in++;
        if (fb2 && !f2_q) e2++;
        if (fb3 && !f3_q) e3++;
        if (fbu && !fu_q) eu++;
        h2 += int'(g2o);
        h3 += int'(g3o);
        si_q = sig_in; f2_q = fb2; f3_q = fb3; fu_q = fbu;
      end
      check_loop("order 2", e_in, e2, real'(h2) / ncyc, 325120.0, f_in);
      check_loop("order 3", e_in, e3, real'(h3) / ncyc, 325120.0, f_in);
      if (k == 0) begin
        checks++;
        if (eu >= e_in - 2 && eu <= e_in + 2) begin
          failures++;
          $display("FAIL unstable order-2 setting locked at 1220 Hz");
        end else
          $display("unstable order-2 setting at 1220 Hz: %0d input, %0d feedback periods", e_in, eu);
      end
    end
    checks++;
    if (mismatch != 0) begin
      failures++;
      $display("FAIL order 1 differs from the first-order loop in %0d cycles", mismatch);
    end else
      $display("order 1 identical to the first-order loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
