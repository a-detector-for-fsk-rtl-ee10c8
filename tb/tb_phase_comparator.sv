// tb_phase_comparator: checks the exclusive-or phase comparator on all four
// input combinations (truth table written out here) and on two square waves
// with a known phase offset, whose comparator output must be high for the
// offset fraction of each period.
module tb_phase_comparator;

  logic sig_in, feedback, gating;

  phase_comparator dut (.sig_in(sig_in), .feedback(feedback), .gating(gating));

  int checks = 0, failures = 0;
  // expected output for {sig_in, feedback} = 00, 01, 10, 11
  localparam logic [3:0] TRUTH = 4'b0110;

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sig_in, feedback} = 2'(i);
      #1;
      checks++;
      if (gating !== TRUTH[i]) begin
        failures++;
        $display("FAIL in=%0b fb=%0b gating=%0b", sig_in, feedback, gating);
      end
    end
    // square waves of period 100 steps, feedback lagging by 30 steps:
    // the output must be high 2 * 30 = 60 of every 100 steps
    begin
      static int high = 0;
      for (int t = 0; t < 1000; t++) begin
        sig_in   = ((t % 100) < 50);
        feedback = (((t + 100 - 30) % 100) < 50);
        #1;
        high += int'(gating);
      end
      checks++;
      if (high != 600) begin
        failures++;
        $display("FAIL phase offset: high %0d of 1000, expected 600", high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
