// tb_limiter: drives the hard limiter with random signed samples plus the
// corner values (most negative, -1, 0, 1, most positive) and checks that one
// clock later the output is 1 exactly for positive samples.
module tb_limiter;

  localparam int W = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [W-1:0] sample = '0;
  logic limited;

  limiter #(.W(W)) dut (.clk(clk), .rst(rst), .sample(sample), .limited(limited));

  int checks = 0, failures = 0;

  task automatic apply(input int v);
    int expv;
    @(negedge clk);
    sample = W'(v);
    expv = (v > 0) ? 1 : 0;
    @(posedge clk);
    #1;
    checks++;
    if (limited !== 1'(expv)) begin
      failures++;
      $display("FAIL sample %0d gave %0b", v, limited);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (limited !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;
    apply(-(1 << (W - 1)));
    apply(-1);
    apply(0);
    apply(1);
    apply((1 << (W - 1)) - 1);
    apply(0);
    for (int i = 0; i < 500; i++) apply($urandom_range(0, (1 << W) - 1) - (1 << (W - 1)));
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
