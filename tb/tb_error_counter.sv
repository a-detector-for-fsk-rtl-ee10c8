// tb_error_counter: emulates the detector's timing. At each bit boundary
// the synchronized source bit changes in the same clock as the sampling
// pulse; one clock later the detector presents its decision for the bit
// that has just ended. Decisions are wrong at random (about one in four);
// the number of errors, the number of bits and the error pulses must match
// the count kept here, after every decision and at the end. A second copy
// with 4-bit counters must stop at 15 (saturation), and reset must clear
// both.
module tb_error_counter;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic strobe = 1'b0, src_bit = 1'b0, det_bit = 1'b0, det_valid = 1'b0;
  logic error_pulse;
  logic [31:0] errors, bits;

  error_counter dut (.clk(clk), .rst(rst), .strobe(strobe), .src_bit(src_bit),
                     .det_bit(det_bit), .det_valid(det_valid),
                     .error_pulse(error_pulse), .errors(errors), .bits(bits));

  logic       error_pulse_s;
  logic [3:0] errors_s, bits_s;
  error_counter #(.CNT_W(4)) dut_s (
    .clk(clk), .rst(rst), .strobe(strobe), .src_bit(src_bit),
    .det_bit(det_bit), .det_valid(det_valid),
    .error_pulse(error_pulse_s), .errors(errors_s), .bits(bits_s));

  int checks = 0, failures = 0;
  int exp_err = 0, exp_bits = 0, n_pulses = 0;

  always @(posedge clk) if (!rst && error_pulse) n_pulses++;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int b = 0; b < 400; b++) begin
      logic ended, wrong;
      int gap;
      // bit boundary: new source bit and sampling pulse together
      @(negedge clk);
      ended   = src_bit;
      src_bit = 1'($urandom_range(0, 1));
      strobe  = 1'b1;
      // decision for the ended bit, one clock later
      @(negedge clk);
      strobe    = 1'b0;
      wrong     = 1'($urandom_range(0, 3) == 0);
      det_bit   = ended ^ wrong;
      det_valid = 1'b1;
      exp_bits++;
      if (wrong) exp_err++;
      @(negedge clk);
      checks++;
      if (error_pulse != wrong || errors != 32'(exp_err) || bits != 32'(exp_bits)) begin
        failures++;
        $display("FAIL bit %0d: pulse %0b errors %0d bits %0d, expected %0b %0d %0d",
                 b, error_pulse, errors, bits, wrong, exp_err, exp_bits);
      end
      det_valid = 1'b0;
      det_bit   = 1'($urandom_range(0, 1));  // ignored between decisions
      gap = $urandom_range(1, 20);
      repeat (gap) @(negedge clk);
    end
    repeat (3) @(posedge clk);
    #1;
    checks += 3;
    if (errors != 32'(exp_err)) begin failures++; $display("FAIL errors %0d expected %0d", errors, exp_err); end
    if (bits != 32'(exp_bits))  begin failures++; $display("FAIL bits %0d expected %0d", bits, exp_bits); end
    if (n_pulses != exp_err)    begin failures++; $display("FAIL error pulses %0d expected %0d", n_pulses, exp_err); end
    $display("%0d errors in %0d bits", errors, bits);
    checks++;
    if (errors_s != 4'd15 || bits_s != 4'd15) begin
      failures++;
      $display("FAIL 4-bit counters %0d/%0d, expected saturation at 15/15", errors_s, bits_s);
    end
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    checks++;
    if (errors != 0 || bits != 0 || errors_s != 0 || bits_s != 0) begin
      failures++;
      $display("FAIL reset did not clear the counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
