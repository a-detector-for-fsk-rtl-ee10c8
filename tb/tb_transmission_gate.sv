// tb_transmission_gate: checks all eight input combinations of the
// transmission gate: g1 pulses pass while gating is 0, f1 pulses while it
// is 1, and the other clock is always blocked.
module tb_transmission_gate;

  logic gating, f_tick, g_tick, count_en;

  transmission_gate dut (.gating(gating), .f_tick(f_tick), .g_tick(g_tick), .count_en(count_en));

  int checks = 0, failures = 0;
  // expected count_en for {gating, f_tick, g_tick} = 000 .. 111
  localparam logic [7:0] TRUTH = 8'b1100_1010;

  initial begin
    for (int i = 0; i < 8; i++) begin
      {gating, f_tick, g_tick} = 3'(i);
      #1;
      checks++;
      if (count_en !== TRUTH[i]) begin
        failures++;
        $display("FAIL gating=%0b f=%0b g=%0b -> %0b", gating, f_tick, g_tick, count_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
