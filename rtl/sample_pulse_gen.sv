// sample_pulse_gen: sampling-pulse generator.
//
// Every transition of the bit-timing signal marks the end of a bit. The
// circuit turns each transition, rising or falling, into one sampling pulse
// one system clock wide (the original used a differentiator, a rectifier
// for the negative spikes and a monostable). With the alternating test
// sequence 1010... the data itself is the bit-timing signal; any signal that
// changes level once per bit boundary can be used.
//
// The input is asynchronous and is first passed through a two-flop
// synchronizer. ended_level is the timing level during the bit that has just
// ended, valid with strobe.
//
// Interface: clk, rst, timing_in (asynchronous), strobe (1-cycle pulse),
// ended_level. Latency: strobe is high in the third clock after the input
// transition is first seen.
module sample_pulse_gen (
  input  logic clk,
  input  logic rst,
  input  logic timing_in,
  output logic strobe,
  output logic ended_level
);

  logic timing_s, timing_q;

  sync2 u_sync (.clk(clk), .rst(rst), .d(timing_in), .q(timing_s));

  always_ff @(posedge clk) begin
    if (rst) timing_q <= 1'b0;
    else     timing_q <= timing_s;
  end

  assign strobe      = timing_s ^ timing_q;
  assign ended_level = timing_q;

endmodule
