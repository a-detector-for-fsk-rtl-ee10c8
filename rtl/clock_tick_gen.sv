// clock_tick_gen: one loop clock (f1 or g1) of a digital phase-lock loop.
//
// The original loops were clocked by free-running inverter/RC oscillators.
// Here each loop clock is a single-cycle enable pulse in the system clock
// domain, produced by a phase accumulator: every system clock the accumulator
// adds INC = round(F_HZ * 2^ACC_W / CLK_HZ) and a carry out of the top bit is
// one loop-clock pulse. The mean pulse rate is F_HZ to within
// CLK_HZ / 2^ACC_W; the spacing of single pulses jitters by one system clock.
// The frequencies come from the loop's lock range; the accumulator itself is
// this design's own way of making them.
//
// Interface: clk, rst (synchronous, active high, clears the accumulator),
// tick (1 for one clk cycle per loop-clock period, registered).
// Requires F_HZ < CLK_HZ.
module clock_tick_gen #(
  parameter int unsigned CLK_HZ = fsk_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned F_HZ   = fsk_pkg::LOOP_A_F_HZ,
  parameter int unsigned ACC_W  = 32
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam longint unsigned INC_L =
      ((longint'(F_HZ) << ACC_W) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ);
  localparam logic [ACC_W-1:0] INC = INC_L[ACC_W-1:0];

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, INC};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= sum[ACC_W-1:0];
      tick <= sum[ACC_W];
    end
  end

  initial begin
    assert (F_HZ < CLK_HZ) else $error("clock_tick_gen: F_HZ must be below CLK_HZ");
  end

endmodule
