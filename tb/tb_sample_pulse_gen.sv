// tb_sample_pulse_gen: toggles the bit-timing input at random intervals
// (rising and falling transitions) and checks that each transition gives
// exactly one sampling pulse, one clock wide, seen at the second rising
// clock edge after the transition, with ended_level equal to the level
// before the transition. No pulse may appear without a transition.
module tb_sample_pulse_gen;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic timing_in = 1'b0;
  logic strobe, ended_level;

  sample_pulse_gen dut (.clk(clk), .rst(rst), .timing_in(timing_in),
                        .strobe(strobe), .ended_level(ended_level));

  int checks = 0, failures = 0;
  int transitions = 0, pulses = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      logic lvl_before;
      int gap;
      @(negedge clk);
      lvl_before = timing_in;
      timing_in = ~timing_in;
      transitions++;
      @(posedge clk); #1;
      checks++;
      if (strobe) begin failures++; $display("FAIL pulse too early"); end
      @(posedge clk); #1;
      checks += 2;
      if (!strobe) begin failures++; $display("FAIL no pulse at transition %0d", i); end
      else pulses++;
      if (ended_level !== lvl_before) begin failures++; $display("FAIL ended_level"); end
      gap = $urandom_range(1, 40);
      repeat (gap) begin
        @(posedge clk); #1;
        checks++;
        if (strobe) begin failures++; $display("FAIL extra pulse"); end
      end
    end
    checks++;
    if (pulses != transitions) begin failures++; $display("FAIL %0d pulses for %0d transitions", pulses, transitions); end
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
