// binary_counter: the N-stage binary counter of a digital phase-lock loop.
//
// Counts the clock pulses passed by the transmission gate. It is never
// preset by the input: it wraps modulo 2^N, so its last stage toggles every
// M = 2^(N-1) pulses and is used directly as the loop's feedback square wave.
// The original was a ripple counter of cascaded four-stage TTL counters;
// here it is a synchronous counter with a count enable.
//
// Interface: clk, rst (synchronous, clears all stages), en (count one pulse),
// count (all stages), msb (last stage, the feedback). Registered outputs.
module binary_counter #(
  parameter int unsigned N = fsk_pkg::N_STAGES_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] count,
  output logic         msb
);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

  assign msb = count[N-1];

endmodule
