// lowpass_filter: low-pass filter on one branch of the detector.
//
// Smooths the exclusive-or (phase-error) output of a loop so that its level
// follows the waveform's mean value, which is the correlation of the input
// with the loop's own reference. It is a first-order recursive filter
// (leaky integrator) updated every system clock:
//   acc <= acc + x * 2^OUT_W - (acc >> SHIFT),     y = acc >> SHIFT
// so y approaches mean(x) * 2^OUT_W with a time constant of 2^SHIFT clocks
// (about 1.6 ms at the default 10 MHz clock and SHIFT = 14). The filter is
// never cleared between bits. The document calls for a low-pass filter here
// without giving its circuit or cut-off; the recursive form and the time
// constant (short against the 8.3 ms bit at 120 baud, long against the
// 2.4-3 kHz ripple of the gating waveform) are this design's choice.
//
// Interface: clk, rst (synchronous, clears the filter), x (1-bit input),
// y (unsigned OUT_W bits, full scale = mean of 1, saturates at 2^OUT_W-1).
// y is registered.
module lowpass_filter #(
  parameter int unsigned SHIFT = 14,
  parameter int unsigned OUT_W = fsk_pkg::LPF_OUT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             x,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned ACC_W = SHIFT + OUT_W + 1;

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] leak;
  logic [ACC_W-1:0] step;

  assign leak = acc >> SHIFT;
  assign step = x ? (ACC_W'(1) << OUT_W) : '0;

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + step - leak;
  end

  // leak never exceeds 2^OUT_W, so saturating only the top value is enough.
  always_comb begin
    if (leak[OUT_W]) y = '1;
    else             y = leak[OUT_W-1:0];
  end

endmodule
