// tb_fsk_detector_variants: the detector with other loop clocks, counter
// lengths and carriers. Noise-free operation should not depend on these as
// long as the two lock ranges do not coincide and each carrier lies in the
// upper half of its own loop's lock range. Three detectors run side by
// side, each fed by its own transmitter model and all with the same data
// and bit timing:
//   V1  mark loop  900-1300 Hz, space loop 1150-1600 Hz, carriers 1250/1550 Hz
//   V2  mark loop  800-1100 Hz, space loop 1200-1700 Hz, carriers 1050/1600 Hz
//       (lock ranges that do not overlap)
//   V3  the default ranges and carriers with seven-stage counters (M = 64)
// Loop clocks follow g1 = 2 M f_low and f1 = 2 M f_high. Alternating data is
// sent first, then random data; after two settling bits every decision of
// every detector must equal the bit sent, and each detector's error count
// must stay zero.
module tb_fsk_detector_variants;

  localparam int unsigned CLK_HZ  = fsk_pkg::CLK_HZ_DEFAULT;
  localparam int unsigned BIT_CYC = CLK_HZ / 120;
  localparam int unsigned NV      = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #50 clk = ~clk;

  logic data = 1'b0, timing = 1'b0;
  real  fm [NV] = '{1250.0, 1050.0, 1220.0};
  real  fs [NV] = '{1550.0, 1600.0, 1490.0};
  real  no_noise = 0.0;

  logic signed [fsk_pkg::SAMPLE_W-1:0] smp [NV];
  logic [NV-1:0] bit_out, bit_valid;
  logic [31:0]   errors [NV];
  logic [31:0]   bits [NV];

  for (genvar v = 0; v < NV; v++) begin : g_src
    fsk_source #(.CLK_HZ(CLK_HZ), .SAMPLE_W(fsk_pkg::SAMPLE_W)) u_src (
      .clk(clk), .data(data), .f_mark_hz(fm[v]), .f_space_hz(fs[v]),
      .noise_rms(no_noise), .sample(smp[v])
    );
  end

  fsk_pll_detector #(.A_G_HZ(2 * 128 * 900), .A_F_HZ(2 * 128 * 1300),
                     .B_G_HZ(2 * 128 * 1150), .B_F_HZ(2 * 128 * 1600)) dut1 (
    .clk(clk), .rst(rst), .rx_sample(smp[0]), .bit_timing(timing), .src_bit(data),
    .bit_out(bit_out[0]), .bit_valid(bit_valid[0]), .u_mark(), .u_space(), .limited(),
    .fb_mark(), .fb_space(), .gating_mark(), .gating_space(), .error_pulse(),
    .errors(errors[0]), .bits(bits[0]), .nth_sig_in(1'b0), .nth_feedback(), .nth_gating()
  );

  fsk_pll_detector #(.A_G_HZ(2 * 128 * 800), .A_F_HZ(2 * 128 * 1100),
                     .B_G_HZ(2 * 128 * 1200), .B_F_HZ(2 * 128 * 1700)) dut2 (
    .clk(clk), .rst(rst), .rx_sample(smp[1]), .bit_timing(timing), .src_bit(data),
    .bit_out(bit_out[1]), .bit_valid(bit_valid[1]), .u_mark(), .u_space(), .limited(),
    .fb_mark(), .fb_space(), .gating_mark(), .gating_space(), .error_pulse(),
    .errors(errors[1]), .bits(bits[1]), .nth_sig_in(1'b0), .nth_feedback(), .nth_gating()
  );

  fsk_pll_detector #(.N(7), .A_G_HZ(2 * 64 * 745), .A_F_HZ(2 * 64 * 1270),
                     .B_G_HZ(2 * 64 * 1000), .B_F_HZ(2 * 64 * 1560)) dut3 (
    .clk(clk), .rst(rst), .rx_sample(smp[2]), .bit_timing(timing), .src_bit(data),
    .bit_out(bit_out[2]), .bit_valid(bit_valid[2]), .u_mark(), .u_space(), .limited(),
    .fb_mark(), .fb_space(), .gating_mark(), .gating_space(), .error_pulse(),
    .errors(errors[2]), .bits(bits[2]), .nth_sig_in(1'b0), .nth_feedback(), .nth_gating()
  );

  int checks = 0, failures = 0;
  bit check_on = 1'b0;
  logic prev_data = 1'b0;

  always @(posedge clk) begin
    for (int v = 0; v < NV; v++) begin
      if (!rst && bit_valid[v] && check_on) begin
        checks++;
        if (bit_out[v] != prev_data) begin
          failures++;
          $display("FAIL variant %0d: decided %0b, sent %0b", v + 1, bit_out[v], prev_data);
        end
      end
    end
  end

  task automatic send_bit(input logic b);
    @(negedge clk);
    prev_data = data;
    data      = b;
    timing    = ~timing;
    repeat (BIT_CYC) @(posedge clk);
  endtask

  initial begin
    int e0 [NV];
    repeat (10) @(posedge clk);
    rst = 1'b0;
    send_bit(1'b1);
    send_bit(1'b0);
    for (int v = 0; v < NV; v++) e0[v] = int'(errors[v]);
    check_on = 1'b1;
    for (int i = 0; i < 8; i++) send_bit(i[0] ? 1'b0 : 1'b1);
    for (int i = 0; i < 12; i++) send_bit(1'($urandom_range(0, 1)));
    send_bit(1'b0);
    repeat (10) @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (int'(errors[v]) != e0[v]) begin
        failures++;
        $display("FAIL variant %0d: error counter rose by %0d", v + 1, int'(errors[v]) - e0[v]);
      end else
        $display("variant %0d: %0d bits, no errors", v + 1, bits[v]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * BIT_CYC) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
