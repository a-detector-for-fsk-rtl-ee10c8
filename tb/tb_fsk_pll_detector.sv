// tb_fsk_pll_detector: end-to-end test of the FSK phase-lock-loop detector
// at its default parameters (10 MHz clock, 120 baud, 1220/1490 Hz carriers,
// lock ranges 745-1270 Hz and 1000-1560 Hz).
//
// A behavioural transmitter (fsk_source) sends bits; the testbench drives
// the bit-timing and source-data inputs and checks, at every bit_valid, the
// decided bit against the bit it sent. Phases:
//   1. alternating sequence 1010..., no noise (timing taken from the data)
//   2. random data with a separate bit-timing square wave, no noise
//   3. both carriers shifted +40 Hz, then -40 Hz (Doppler), no noise
//   4. heavy noise (E/N0 = 1): errors must occur and the detector's error
//      count must equal the count kept here
// Mechanisms counted: mark loop locked on the mark carrier, mark loop out of
// lock on the space carrier, space loop locked on the space carrier, decided
// 1s and 0s, shifted-carrier bits, counted errors, and the second-order
// general loop (fed with the limited signal) locked on the mark carrier and
// out of lock on the space carrier. A mechanism that never
// happens is a failure. Lock is judged in the second half of each bit by
// comparing the number of feedback transitions with the number of input
// transitions.
module tb_fsk_pll_detector;

  localparam int unsigned CLK_HZ  = fsk_pkg::CLK_HZ_DEFAULT;
  localparam int unsigned BAUD    = 120;
  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam real         S_RMS   = 256.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic        data = 1'b0, timing = 1'b0;
  real         f_mark = 1220.0, f_space = 1490.0, noise_rms = 0.0;
  logic signed [fsk_pkg::SAMPLE_W-1:0] rx_sample;

  logic bit_out, bit_valid, limited, fb_mark, fb_space, g_mark, g_space, err_p;
  logic fb_nth, g_nth;
  logic [15:0] u_mark, u_space;
  logic [31:0] errors, bits;

  fsk_source #(.CLK_HZ(CLK_HZ), .SAMPLE_W(fsk_pkg::SAMPLE_W), .AMPL(S_RMS)) u_src (
    .clk(clk), .data(data), .f_mark_hz(f_mark), .f_space_hz(f_space),
    .noise_rms(noise_rms), .sample(rx_sample)
  );

  fsk_pll_detector dut (
    .clk(clk), .rst(rst), .rx_sample(rx_sample), .bit_timing(timing),
    .src_bit(data), .bit_out(bit_out), .bit_valid(bit_valid),
    .u_mark(u_mark), .u_space(u_space), .limited(limited),
    .fb_mark(fb_mark), .fb_space(fb_space), .gating_mark(g_mark),
    .gating_space(g_space), .error_pulse(err_p), .errors(errors), .bits(bits),
    .nth_sig_in(limited), .nth_feedback(fb_nth), .nth_gating(g_nth)
  );

  int checks = 0, failures = 0;
  int n_mark_lock = 0, n_mark_unlock = 0, n_space_lock = 0;
  int n_dec1 = 0, n_dec0 = 0, n_shift = 0, n_err_pulse = 0;
  int n_nth_lock = 0, n_nth_unlock = 0;
  int tb_errors = 0, tb_bits = 0;
  bit check_decisions = 1'b0;
  bit shifted = 1'b0;
  logic prev_data = 1'b0;

  // lock monitor: transitions of input and feedbacks in the second half bit
  int cyc_in_bit = 0, e_in = 0, e_fm = 0, e_fs = 0, e_fn = 0;
  logic lim_q = 0, fm_q = 0, fs_q = 0, fn_q = 0;
  always @(posedge clk) begin
    lim_q <= limited; fm_q <= fb_mark; fs_q <= fb_space; fn_q <= fb_nth;
    if (cyc_in_bit >= BIT_CYC / 2) begin
      e_in += int'(limited != lim_q);
      e_fm += int'(fb_mark != fm_q);
      e_fs += int'(fb_space != fs_q);
      e_fn += int'(fb_nth != fn_q);
    end
    cyc_in_bit++;
  end

  // decision checker: each new decision belongs to the bit that just ended
  always @(posedge clk) begin
    if (!rst && bit_valid) begin
      tb_bits++;
      if (bit_out) n_dec1++; else n_dec0++;
      if (bit_out != prev_data) tb_errors++;
      if (check_decisions) begin
        checks++;
        if (bit_out != prev_data) begin
          failures++;
          $display("FAIL t=%0t decided %0b sent %0b (u_mark=%0d u_space=%0d)",
                   $time, bit_out, prev_data, u_mark, u_space);
        end
      end
    end
    if (!rst && err_p) n_err_pulse++;
  end

  // one bit: set the data, toggle the timing signal, wait a bit time,
  // then judge the loops' lock state over the second half of the bit
  task automatic send_bit(input logic b, input bit timing_is_data);
    @(negedge clk);
    prev_data = data;
    data      = b;
    if (timing_is_data) timing = b;
    else                timing = ~timing;
    cyc_in_bit = 0; e_in = 0; e_fm = 0; e_fs = 0; e_fn = 0;
    repeat (BIT_CYC) @(posedge clk);
    if (noise_rms == 0.0) begin
      if (b) begin
        if (e_fm >= e_in - 1 && e_fm <= e_in + 1) n_mark_lock++;
        if (e_fn >= e_in - 1 && e_fn <= e_in + 1) n_nth_lock++;
      end else begin
        if (e_fm < e_in - 2 || e_fm > e_in + 2) n_mark_unlock++;
        if (e_fs >= e_in - 1 && e_fs <= e_in + 1) n_space_lock++;
        if (e_fn < e_in - 2 || e_fn > e_in + 2) n_nth_unlock++;
      end
      if (shifted) n_shift++;
    end
  endtask

  task automatic check_mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", name);
    end else $display("mechanism %-28s seen %0d times", name, n);
  endtask

  initial begin
    repeat (10) @(posedge clk);
    rst = 1'b0;

    // 1. alternating sequence, timing from the data
    check_decisions = 1'b0;
    send_bit(1'b1, 1'b1);
    send_bit(1'b0, 1'b1);
    check_decisions = 1'b1;
    for (int i = 0; i < 12; i++) send_bit(i[0] ? 1'b0 : 1'b1, 1'b1);

    // 2. random data, separate timing square wave
    for (int i = 0; i < 16; i++) send_bit(1'($urandom_range(0, 1)), 1'b0);

    // 3. Doppler shift of both carriers by +40 Hz and -40 Hz
    shifted = 1'b1;
    f_mark = 1260.0; f_space = 1530.0;
    for (int i = 0; i < 8; i++) send_bit(i[0] ? 1'b0 : 1'b1, 1'b1);
    f_mark = 1180.0; f_space = 1450.0;
    for (int i = 0; i < 8; i++) send_bit(i[0] ? 1'b0 : 1'b1, 1'b1);
    shifted = 1'b0;
    f_mark = 1220.0; f_space = 1490.0;

    // 4. heavy noise: E/N0 = 1 with a 20 kHz noise bandwidth
    check_decisions = 1'b0;
    noise_rms = S_RMS * $sqrt(20000.0 / (BAUD * 1.0));
    for (int i = 0; i < 24; i++) send_bit(i[0] ? 1'b0 : 1'b1, 1'b1);
    noise_rms = 0.0;
    send_bit(1'b1, 1'b1);
    repeat (20) @(posedge clk);

    // error counter agrees with the count kept here
    checks++;
    if (errors != 32'(tb_errors) || bits != 32'(tb_bits)) begin
      failures++;
      $display("FAIL error count dut=%0d/%0d tb=%0d/%0d", errors, bits, tb_errors, tb_bits);
    end
    $display("errors %0d of %0d bits", errors, bits);

    check_mech("mark loop locked", n_mark_lock);
    check_mech("mark loop out of lock", n_mark_unlock);
    check_mech("space loop locked", n_space_lock);
    check_mech("decision 1", n_dec1);
    check_mech("decision 0", n_dec0);
    check_mech("shifted carriers", n_shift);
    check_mech("error pulse", n_err_pulse);
    check_mech("general loop locked", n_nth_lock);
    check_mech("general loop out of lock", n_nth_unlock);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * BIT_CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
