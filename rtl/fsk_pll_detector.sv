// fsk_pll_detector: binary FSK detector built from two digital phase-lock
// loops.
//
// The optimum coherent FSK receiver correlates the input with a local copy of
// each carrier and compares the two results at the end of every bit. Here
// each correlator is replaced by a first-order digital phase-lock loop: a
// loop whose lock range covers only one carrier generates its own reference
// for that carrier, and its exclusive-or phase-comparator output is the
// product of input and reference. While a loop is locked near the top of its
// lock range that output is mostly 1; while the other carrier is present the
// loop is either unlocked (beat note) or locked low in its range, and its
// output averages lower. A low-pass filter on each branch, a sample at the
// end of each bit and a comparison of the two samples give the bit.
//
// Data path:
//   rx_sample -> limiter -> loop A (mark, "1") -> low-pass filter -> u_mark
//                        -> loop B (space, "0") -> low-pass filter -> u_space
//   bit_timing -> sampling-pulse generator -> strobe
//   strobe, u_mark, u_space -> comparator and hold -> bit_out
//   src_bit, bit_out -> error counter -> errors, bits
// The error counter belongs to the test arrangement; it compares the
// detected bits with the transmitted data when that is available.
//
// Beside the detector, and not connected to it, sits the general n-th order
// digital loop (dpll_nth_order, second order by default) with its own input
// and outputs. The detector itself uses first-order loops; the general loop
// is the structure they are a special case of.
//
// Defaults: 10 MHz system clock; loop A lock range 745-1270 Hz for the
// 1220 Hz mark carrier, loop B 1000-1560 Hz for the 1490 Hz space carrier,
// eight-stage counters (M = 128), 120 baud. The lock ranges, counter size,
// carriers and bit rate follow the document; the system clock, filter and
// sample format are this design's choices.
//
// Interface:
//   clk, rst          system clock, synchronous active-high reset
//   rx_sample         signed signal-plus-noise sample, one per clock
//   bit_timing        asynchronous; one transition per bit boundary
//   src_bit           asynchronous transmitted data, for error counting
//   bit_out/bit_valid decided bit, held; bit_valid pulses when it updates
//   u_mark, u_space   filtered branch levels (full scale 2^16)
//   limited, fb_mark, fb_space, gating_mark, gating_space  loop observation
//   errors, bits      error and bit counts
//   nth_sig_in        asynchronous two-level input of the general loop
//   nth_feedback, nth_gating  its feedback square wave and gating output
// Timing: the decision for a bit is made 4 clocks after its ending
// transition reaches bit_timing (2 synchronizer stages, edge detect, hold
// register).
module fsk_pll_detector #(
  parameter int unsigned CLK_HZ    = fsk_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned N         = fsk_pkg::N_STAGES_DEFAULT,
  parameter int unsigned A_F_HZ    = fsk_pkg::LOOP_A_F_HZ,
  parameter int unsigned A_G_HZ    = fsk_pkg::LOOP_A_G_HZ,
  parameter int unsigned B_F_HZ    = fsk_pkg::LOOP_B_F_HZ,
  parameter int unsigned B_G_HZ    = fsk_pkg::LOOP_B_G_HZ,
  parameter int unsigned LPF_SHIFT = 14,
  parameter int unsigned SAMPLE_W  = fsk_pkg::SAMPLE_W,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned NTH_M     = 128
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] rx_sample,
  input  logic                       bit_timing,
  input  logic                       src_bit,
  output logic                       bit_out,
  output logic                       bit_valid,
  output logic [fsk_pkg::LPF_OUT_W-1:0] u_mark,
  output logic [fsk_pkg::LPF_OUT_W-1:0] u_space,
  output logic                       limited,
  output logic                       fb_mark,
  output logic                       fb_space,
  output logic                       gating_mark,
  output logic                       gating_space,
  output logic                       error_pulse,
  output logic [CNT_W-1:0]           errors,
  output logic [CNT_W-1:0]           bits,
  input  logic                       nth_sig_in,
  output logic                       nth_feedback,
  output logic                       nth_gating
);

  localparam int unsigned OUT_W = fsk_pkg::LPF_OUT_W;

  logic         strobe, ended_level;
  logic         src_s;
  logic [N-1:0] count_mark, count_space;

  limiter #(.W(SAMPLE_W)) u_limiter (
    .clk(clk), .rst(rst), .sample(rx_sample), .limited(limited)
  );

  dpll_first_order #(.CLK_HZ(CLK_HZ), .F_HZ(A_F_HZ), .G_HZ(A_G_HZ), .N(N)) u_loop_mark (
    .clk(clk), .rst(rst), .sig_in(limited),
    .feedback(fb_mark), .gating(gating_mark), .count(count_mark)
  );

  dpll_first_order #(.CLK_HZ(CLK_HZ), .F_HZ(B_F_HZ), .G_HZ(B_G_HZ), .N(N)) u_loop_space (
    .clk(clk), .rst(rst), .sig_in(limited),
    .feedback(fb_space), .gating(gating_space), .count(count_space)
  );

  lowpass_filter #(.SHIFT(LPF_SHIFT), .OUT_W(OUT_W)) u_lpf_mark (
    .clk(clk), .rst(rst), .x(gating_mark), .y(u_mark)
  );

  lowpass_filter #(.SHIFT(LPF_SHIFT), .OUT_W(OUT_W)) u_lpf_space (
    .clk(clk), .rst(rst), .x(gating_space), .y(u_space)
  );

  sample_pulse_gen u_sampler (
    .clk(clk), .rst(rst), .timing_in(bit_timing),
    .strobe(strobe), .ended_level(ended_level)
  );

  decision_hold #(.W(OUT_W)) u_decide (
    .clk(clk), .rst(rst), .strobe(strobe),
    .u_mark(u_mark), .u_space(u_space),
    .bit_out(bit_out), .bit_valid(bit_valid)
  );

  sync2 u_src_sync (.clk(clk), .rst(rst), .d(src_bit), .q(src_s));

  error_counter #(.CNT_W(CNT_W)) u_errors (
    .clk(clk), .rst(rst), .strobe(strobe), .src_bit(src_s),
    .det_bit(bit_out), .det_valid(bit_valid),
    .error_pulse(error_pulse), .errors(errors), .bits(bits)
  );

  // General higher-order loop, standing beside the detector with its own
  // input and outputs (its default is second order, lock range 745-1270 Hz).
  logic                          nth_sig_s;
  logic [$clog2(NTH_M) + 1:0]    nth_count;

  sync2 u_nth_sync (.clk(clk), .rst(rst), .d(nth_sig_in), .q(nth_sig_s));

  dpll_nth_order #(.CLK_HZ(CLK_HZ), .M(NTH_M)) u_loop_nth (
    .clk(clk), .rst(rst), .sig_in(nth_sig_s),
    .feedback(nth_feedback), .gating(nth_gating), .count_last(nth_count)
  );

  // The counter states and the ended level are observation points only.
  logic unused;
  assign unused = ^{count_mark, count_space, ended_level, nth_count};

endmodule
