// error_counter: bit-error counting circuit of the test arrangement.
//
// Once per bit, the transmitted bit and the detected bit are compared with
// an exclusive-or; a difference counts one error. The number of bits
// compared is counted as well, so that errors / bits estimates the
// probability of error (the original fed the error pulses to a bench
// counter).
//
// Alignment: src_bit must arrive through a synchronizer of the same depth as
// the bit-timing signal of the sampling-pulse generator. At the sampling
// pulse the previous cycle's src_bit is the bit that has just ended; it is
// stored and compared with the decision when det_valid marks it, one clock
// later.
//
// Interface: clk, rst (clears counts), strobe (sampling pulse), src_bit,
// det_bit, det_valid, error_pulse (1-cycle pulse per error), errors, bits
// (saturating CNT_W-bit counts).
module error_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             strobe,
  input  logic             src_bit,
  input  logic             det_bit,
  input  logic             det_valid,
  output logic             error_pulse,
  output logic [CNT_W-1:0] errors,
  output logic [CNT_W-1:0] bits
);

  logic src_q, expected;
  logic mismatch;

  assign mismatch = det_valid & (det_bit ^ expected);

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q       <= 1'b0;
      expected    <= 1'b0;
      error_pulse <= 1'b0;
      errors      <= '0;
      bits        <= '0;
    end else begin
      src_q       <= src_bit;
      error_pulse <= mismatch;
      if (strobe) expected <= src_q;
      if (det_valid && bits != '1) bits <= bits + 1'b1;
      if (mismatch && errors != '1) errors <= errors + 1'b1;
    end
  end

endmodule
