// sync2: two-flip-flop synchronizer for a level arriving from outside the
// system clock domain (the bit-timing and source-data inputs of the
// detector). Output follows the input two clocks later. Reset clears both
// stages.
module sync2 (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
