// limiter: hard limiter at the detector input.
//
// The detector works on two-level signals only. The limiter maps any input
// waveform to a rectangular wave with the same zero crossings: output 1 (the
// high logic level) for a positive input and 0 for a negative one. In this
// implementation the received signal plus noise arrives as signed samples in
// the system clock domain (an A/D converter or comparator in front of it is
// assumed) and the limiter is a sign decision, registered once. A sample of
// exactly zero gives 0; the original characteristic is vertical at zero and
// says nothing about that point.
//
// Interface: clk, rst (synchronous, clears the output), sample (signed,
// W bits), limited (1 when the previous cycle's sample was > 0).
// Latency: one clock.
module limiter #(
  parameter int unsigned W = fsk_pkg::SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] sample,
  output logic                limited
);

  always_ff @(posedge clk) begin
    if (rst) limited <= 1'b0;
    else     limited <= (sample > 0);
  end

endmodule
