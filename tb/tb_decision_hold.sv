// tb_decision_hold: drives random branch levels every clock and random
// sampling pulses. After each pulse the bit must be 1 exactly when the mark
// level exceeded the space level in the pulse cycle (ties decide 0), and it
// must hold between pulses while the levels keep changing. bit_valid must
// follow each pulse by one clock.
module tb_decision_hold;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic strobe = 1'b0;
  logic [15:0] u_mark = '0, u_space = '0;
  logic bit_out, bit_valid;

  decision_hold dut (.clk(clk), .rst(rst), .strobe(strobe), .u_mark(u_mark),
                     .u_space(u_space), .bit_out(bit_out), .bit_valid(bit_valid));

  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic held = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (bit_out !== 1'b0 || bit_valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      logic s, expv;
      @(negedge clk);
      s = 1'($urandom_range(0, 9) == 0);
      strobe  = s;
      u_mark  = 16'($urandom());
      u_space = (c % 17 == 0) ? u_mark : 16'($urandom());
      expv = (u_mark > u_space);
      @(posedge clk); #1;
      if (s) begin
        held = expv;
        if (expv) ones++; else zeros++;
      end
      checks += 2;
      if (bit_out !== held) begin failures++; $display("FAIL cycle %0d: bit %0b expected %0b", c, bit_out, held); end
      if (bit_valid !== s) begin failures++; $display("FAIL cycle %0d: bit_valid", c); end
    end
    $display("decided %0d ones, %0d zeros", ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
