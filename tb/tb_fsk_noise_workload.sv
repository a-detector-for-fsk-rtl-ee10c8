// tb_fsk_noise_workload: bit-error measurement of the detector at its
// default parameters, in the manner of the laboratory test: alternating data
// 1010... at 120 baud, square-wave carriers with band-limited Gaussian noise
// added ahead of the limiter, the error counter counting. The signal to noise
// ratio is E/N0 = (S/N)^2 W / B with a 20 kHz noise bandwidth W and bit rate
// B = 120 /s.
//   E/N0 = 1000 (30 dB, nearly noise free), 300, 100, 24, 10.6 and 7.4
//   with the nominal carriers 1220/1490 Hz; then E/N0 = 1000 with both
//   carriers shifted by +10, +20, +30, +40 and -40 Hz (Doppler), and
//   E/N0 = 100 with shifts of +40 and -40 Hz.
// NOISY_BITS bits are sent at each point with noise on the nominal carriers
// and BITS at the others, so the error rates printed are estimates with a
// spread of a few hundredths. Checks: at every point the detector's error count equals the
// count kept here; at E/N0 = 1000 at most one error per point, with nominal
// and with shifted carriers; no fewer errors at 7.4 than at 1000.
// The rates at 300 and below are printed, not checked: with this noise
// model they are far higher than the laboratory measurements (see README).
module tb_fsk_noise_workload;

  localparam int unsigned CLK_HZ  = fsk_pkg::CLK_HZ_DEFAULT;
  localparam int unsigned BAUD    = 120;
  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam int unsigned BITS    = 80;
  localparam int unsigned NOISY_BITS = 400;
  localparam int unsigned ALL_BITS = 8 * (BITS + 2) + 5 * (NOISY_BITS + 2);
  localparam real         S_RMS   = 256.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic data = 1'b0;
  real  f_mark = 1220.0, f_space = 1490.0, noise_rms = 0.0;
  logic signed [fsk_pkg::SAMPLE_W-1:0] rx_sample;

  logic bit_out, bit_valid, limited, fb_mark, fb_space, g_mark, g_space, err_p;
  logic [15:0] u_mark, u_space;
  logic [31:0] errors, bits;

  fsk_source #(.CLK_HZ(CLK_HZ), .SAMPLE_W(fsk_pkg::SAMPLE_W), .AMPL(S_RMS)) u_src (
    .clk(clk), .data(data), .f_mark_hz(f_mark), .f_space_hz(f_space),
    .noise_rms(noise_rms), .sample(rx_sample)
  );

  fsk_pll_detector dut (
    .clk(clk), .rst(rst), .rx_sample(rx_sample), .bit_timing(data),
    .src_bit(data), .bit_out(bit_out), .bit_valid(bit_valid),
    .u_mark(u_mark), .u_space(u_space), .limited(limited),
    .fb_mark(fb_mark), .fb_space(fb_space), .gating_mark(g_mark),
    .gating_space(g_space), .error_pulse(err_p), .errors(errors), .bits(bits),
    .nth_sig_in(1'b0), .nth_feedback(), .nth_gating()
  );

  localparam real SHIFTS [5] = '{10.0, 20.0, 30.0, 40.0, -40.0};

  int checks = 0, failures = 0;
  int tb_errors = 0, tb_bits = 0;
  logic prev_data = 1'b0;

  always @(posedge clk) begin
    if (!rst && bit_valid) begin
      tb_bits++;
      if (bit_out != prev_data) tb_errors++;
    end
  end

  task automatic send_bits(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      prev_data = data;
      data = ~data;
      repeat (BIT_CYC) @(posedge clk);
    end
  endtask

  // one measurement point: returns the errors counted by the detector
  task automatic point(input real en0, input real shift_hz, input int n_bits, output int n_err);
    int e0, b0, te0;
    f_mark  = 1220.0 + shift_hz;
    f_space = 1490.0 + shift_hz;
    noise_rms = S_RMS * $sqrt(20000.0 / (BAUD * en0));
    send_bits(2);                      // let the loops settle on the new carriers
    e0 = int'(errors); b0 = int'(bits); te0 = tb_errors;
    send_bits(n_bits);
    repeat (10) @(posedge clk);
    n_err = int'(errors) - e0;
    checks++;
    if (n_err != tb_errors - te0) begin
      failures++;
      $display("FAIL E/N0=%0.1f shift %0.0f: detector counted %0d errors, testbench %0d",
               en0, shift_hz, n_err, tb_errors - te0);
    end
    $display("E/N0 = %5.1f (%4.1f dB)  carriers %0.0f/%0.0f Hz  errors %0d of %0d  P_E ~ %0.4f",
             en0, 10.0 * $log10(en0), f_mark, f_space, n_err, int'(bits) - b0,
             real'(n_err) / real'(int'(bits) - b0));
  endtask

  initial begin
    int e_clean, e_n, e7;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    point(1000.0, 0.0, BITS, e_clean);
    checks++;
    if (e_clean > 1) begin failures++; $display("FAIL errors at E/N0=1000"); end
    point(300.0, 0.0, NOISY_BITS, e_n);
    point(100.0, 0.0, NOISY_BITS, e_n);
    point(24.0, 0.0, NOISY_BITS, e_n);
    point(10.6, 0.0, NOISY_BITS, e_n);
    point(7.4, 0.0, NOISY_BITS, e7);
    checks++;
    if (e7 < e_clean) begin failures++; $display("FAIL fewer errors with more noise"); end
    foreach (SHIFTS[k]) begin
      point(1000.0, SHIFTS[k], BITS, e_n);
      checks++;
      if (e_n > 1) begin
        failures++;
        $display("FAIL errors at E/N0=1000 with %0.0f Hz shift", SHIFTS[k]);
      end
    end
    point(100.0, 40.0, BITS, e_n);
    point(100.0, -40.0, BITS, e_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((ALL_BITS + 20) * BIT_CYC) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
