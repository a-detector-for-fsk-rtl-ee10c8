// phase_comparator: exclusive-or phase detector of a digital phase-lock loop.
//
// The output (the gating waveform) is 1 while the loop input and the loop's
// feedback square wave differ and 0 while they agree. Its average over a
// cycle is proportional to the phase difference of the two square waves
// (0 at 0 rad, 1 at pi rad), which makes it the "multiplier" of the loop and
// the correlator output of the detector. Purely combinational, as in the
// original circuit.
//
// Interface: sig_in (limited input), feedback (loop reference), gating.
module phase_comparator (
  input  logic sig_in,
  input  logic feedback,
  output logic gating
);

  assign gating = sig_in ^ feedback;

endmodule
