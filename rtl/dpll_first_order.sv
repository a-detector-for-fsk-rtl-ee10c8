// dpll_first_order: first-order digital phase-lock loop.
//
// The loop is built from logic only: an exclusive-or phase comparator, a
// transmission gate and an N-stage binary counter, with two fixed clocks
// f1 (high) and g1 (low). The comparator output (gating) selects which clock
// the counter counts: g1 while input and feedback agree, f1 while they
// differ. The counter's last stage is the feedback square wave; it toggles
// after every M = 2^(N-1) counted pulses. A half cycle of the feedback thus
// takes M pulses of a mix of f1 and g1, and the mix settles where the
// feedback frequency equals the input frequency.
//
// Static behaviour (first-order difference equation):
//   lock range            g1/2M  <=  f_in  <=  f1/2M
//   mean of gating        v = (2 M f_in - g1) / (f1 - g1)   inside the lock range
//   free-running frequency (no input edges)  f_q = (1/M) g1 f1 / (g1 + f1)
//   time constant         1 / (2 f_in ln(f1/g1))
// Outside the lock range the gating output is a beat note.
//
// The structure, M = 2^(N-1) and the two-clock steering follow the
// document. The loop clocks are produced here by phase accumulators from the
// system clock (clock_tick_gen) instead of free-running oscillators, and the
// counter counts enable pulses synchronously.
//
// Interface: clk, rst (synchronous; clears counter, feedback starts at 0),
// sig_in (two-level input, synchronous to clk), feedback (loop reference
// square wave), gating (phase-error waveform), count (counter state).
// gating responds combinationally to sig_in; feedback changes on the clock
// edge after the M-th counted pulse.
module dpll_first_order #(
  parameter int unsigned CLK_HZ = fsk_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned F_HZ   = fsk_pkg::LOOP_A_F_HZ,
  parameter int unsigned G_HZ   = fsk_pkg::LOOP_A_G_HZ,
  parameter int unsigned N      = fsk_pkg::N_STAGES_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sig_in,
  output logic         feedback,
  output logic         gating,
  output logic [N-1:0] count
);

  logic f_tick, g_tick, count_en;

  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F_HZ)) u_f1 (
    .clk(clk), .rst(rst), .tick(f_tick)
  );

  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(G_HZ)) u_g1 (
    .clk(clk), .rst(rst), .tick(g_tick)
  );

  phase_comparator u_pd (
    .sig_in(sig_in), .feedback(feedback), .gating(gating)
  );

  transmission_gate u_gate (
    .gating(gating), .f_tick(f_tick), .g_tick(g_tick), .count_en(count_en)
  );

  binary_counter #(.N(N)) u_cnt (
    .clk(clk), .rst(rst), .en(count_en), .count(count), .msb(feedback)
  );

  initial begin
    assert (G_HZ < F_HZ) else $error("dpll_first_order: g1 must be below f1");
  end

endmodule
