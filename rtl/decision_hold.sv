// decision_hold: comparator and hold circuit of the detector.
//
// At each sampling pulse the filtered outputs of the two branches are
// compared: if the mark branch (the loop that locks onto the "1" carrier)
// is larger, a 1 is decided, otherwise a 0. The decided bit is held until
// the next sampling pulse. A tie decides 0 (the document does not treat
// ties).
//
// Interface: clk, rst (clears bit_out and bit_valid), strobe (sampling
// pulse), u_mark, u_space (branch levels), bit_out (held decision),
// bit_valid (1-cycle pulse in the cycle bit_out takes a new value).
// Latency: bit_out is updated on the clock edge that ends the strobe cycle.
module decision_hold #(
  parameter int unsigned W = fsk_pkg::LPF_OUT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         strobe,
  input  logic [W-1:0] u_mark,
  input  logic [W-1:0] u_space,
  output logic         bit_out,
  output logic         bit_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= strobe;
      if (strobe) bit_out <= (u_mark > u_space);
    end
  end

endmodule
