// transmission_gate: steers one of the two loop clocks into the counter.
//
// While the gating waveform is 0 the low-frequency clock g1 reaches the
// counter and f1 is blocked; while it is 1 the high-frequency clock f1
// reaches the counter and g1 is blocked. At no time do both clocks reach
// the counter. In this synchronous implementation the clocks are
// single-cycle enable pulses, so the gate is a two-input multiplexer on
// those pulses (the original was built of NAND gates on real clocks).
//
// Interface: gating (select), f_tick (f1 pulses), g_tick (g1 pulses),
// count_en (pulse to the counter). Combinational.
module transmission_gate (
  input  logic gating,
  input  logic f_tick,
  input  logic g_tick,
  output logic count_en
);

  always_comb begin
    if (gating) count_en = f_tick;
    else        count_en = g_tick;
  end

endmodule
