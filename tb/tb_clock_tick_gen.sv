// tb_clock_tick_gen: checks the loop-clock pulse generator at the four loop
// clock frequencies of the detector (10 MHz system clock). Over 1,000,000
// clocks the number of pulses must be F * 1e6 / 1e7 within one, every pulse
// must last one clock, and the spacing between pulses must be floor or ceil
// of CLK_HZ / F.
module tb_clock_tick_gen;

  localparam int unsigned CLK_HZ = 10_000_000;
  localparam int unsigned NCYC   = 1_000_000;
  localparam int unsigned F [4]  = '{325_120, 190_720, 399_360, 256_000};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0] tick;

  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F[0])) u0 (.clk(clk), .rst(rst), .tick(tick[0]));
  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F[1])) u1 (.clk(clk), .rst(rst), .tick(tick[1]));
  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F[2])) u2 (.clk(clk), .rst(rst), .tick(tick[2]));
  clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F[3])) u3 (.clk(clk), .rst(rst), .tick(tick[3]));

  int checks = 0, failures = 0;
  int cnt [4], last [4], gap_bad [4], wide [4];
  logic [3:0] tick_q = '0;

  initial begin
    for (int i = 0; i < 4; i++) begin cnt[i] = 0; last[i] = -1; gap_bad[i] = 0; wide[i] = 0; end
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        if (tick[i]) begin
          int lo, hi;
          lo = CLK_HZ / F[i];
          hi = lo + 1;
          cnt[i]++;
          if (tick_q[i]) wide[i]++;
          if (last[i] >= 0 && (c - last[i] < lo || c - last[i] > hi)) gap_bad[i]++;
          last[i] = c;
        end
      end
      tick_q = tick;
    end
    for (int i = 0; i < 4; i++) begin
      longint expv;
      expv = longint'(F[i]) * NCYC / longint'(CLK_HZ);
      checks += 3;
      if (longint'(cnt[i]) < expv - 1 || longint'(cnt[i]) > expv + 1) begin
        failures++;
        $display("FAIL clock %0d: %0d pulses, expected %0d", F[i], cnt[i], expv);
      end
      if (gap_bad[i] != 0) begin
        failures++;
        $display("FAIL clock %0d: %0d pulse gaps out of range", F[i], gap_bad[i]);
      end
      if (wide[i] != 0) begin
        failures++;
        $display("FAIL clock %0d: pulses wider than one clock", F[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
