// fsk_pkg: constants shared by the FSK phase-lock-loop detector.
//
// The detector runs from one system clock (CLK_HZ). The loop clocks f1 and g1
// of each digital phase-lock loop are produced as clock-enable pulse trains
// derived from that clock. Their frequencies follow from the lock range of
// each loop through f_low = g1/2M and f_high = f1/2M, with M = 2^(N-1) and an
// eight-stage counter (M = 128). The lock ranges are 745-1270 Hz for the loop
// that follows the 1220 Hz mark carrier and 1000-1560 Hz for the loop that
// follows the 1490 Hz space carrier. The 10 MHz system clock is this design's
// own choice; the original loops were clocked directly by free-running
// oscillators.
package fsk_pkg;

  // System clock of the synchronous implementation (design choice).
  localparam int unsigned CLK_HZ_DEFAULT = 10_000_000;

  // Number of counter stages in each loop; M = 2^(N-1) = 128.
  localparam int unsigned N_STAGES_DEFAULT = 8;

  // Loop A (mark, "1", carrier 1220 Hz): lock range 745 Hz .. 1270 Hz.
  localparam int unsigned LOOP_A_G_HZ = 2 * 128 * 745;   // 190_720 Hz
  localparam int unsigned LOOP_A_F_HZ = 2 * 128 * 1270;  // 325_120 Hz

  // Loop B (space, "0", carrier 1490 Hz): lock range 1000 Hz .. 1560 Hz.
  localparam int unsigned LOOP_B_G_HZ = 2 * 128 * 1000;  // 256_000 Hz
  localparam int unsigned LOOP_B_F_HZ = 2 * 128 * 1560;  // 399_360 Hz

  // Width of the filtered branch outputs (fraction of full scale).
  localparam int unsigned LPF_OUT_W = 16;

  // Width of the signed signal-plus-noise samples entering the limiter.
  localparam int unsigned SAMPLE_W = 12;

endpackage
