// tb_binary_counter: checks the loop counter at the default eight stages
// (M = 128) and at three stages (M = 4, the size used in the document's
// waveform example). With random count enables, the count must follow a
// model kept here, and the last stage must toggle exactly every M enabled
// pulses.
module tb_binary_counter;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic en = 1'b0;
  logic [7:0] count8;
  logic [2:0] count3;
  logic msb8, msb3;

  binary_counter            dut8 (.clk(clk), .rst(rst), .en(en), .count(count8), .msb(msb8));
  binary_counter #(.N(3))   dut3 (.clk(clk), .rst(rst), .en(en), .count(count3), .msb(msb3));

  int checks = 0, failures = 0;
  int pulses = 0, tog8 = 0, tog3 = 0;
  logic msb8_q = 1'b0, msb3_q = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 2) == 0);
      @(posedge clk);
      #1;
      if (en) pulses++;
      checks++;
      if (count8 !== 8'(pulses) || count3 !== 3'(pulses)) begin
        failures++;
        $display("FAIL after %0d pulses: count8=%0d count3=%0d", pulses, count8, count3);
      end
      if (msb8 != msb8_q) begin
        tog8++;
        checks++;
        if (pulses % 128 != 0) begin failures++; $display("FAIL msb8 toggled at %0d", pulses); end
      end
      if (msb3 != msb3_q) begin
        tog3++;
        checks++;
        if (pulses % 4 != 0) begin failures++; $display("FAIL msb3 toggled at %0d", pulses); end
      end
      msb8_q = msb8;
      msb3_q = msb3;
    end
    checks += 2;
    if (tog8 != pulses / 128) begin failures++; $display("FAIL msb8 toggles %0d", tog8); end
    if (tog3 != pulses / 4)   begin failures++; $display("FAIL msb3 toggles %0d", tog3); end
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
