// dpll_nth_order: general n-th order digital phase-lock loop.
//
// The loop has the same exclusive-or phase comparator as the first-order
// loop, but ORDER count registers instead of one counter, each with its own
// pair of clocks: register i counts f_i pulses while the gating output is 1
// and g_i pulses while it is 0. When the last register reaches M, a shift
// moves every register's count one place on (register i+1 takes the count
// of register i), register 1 restarts from zero and the feedback flip-flop
// toggles. A count therefore travels through all ORDER registers before it
// can end a half cycle, and a new count starts every half cycle, so the
// length of a feedback half cycle depends on the gating of the last ORDER
// half cycles: the loop obeys an ORDER-th order difference equation.
//
// With ORDER = 1 this is the first-order loop. With g_i = 0 for i >= 2 (the
// low-pass setting) the loop's static behaviour is
//   lock range      g1/2M  <=  f_in  <=  (f1 + ... + fn)/2M
//   mean of gating  v = (2 M f_in - g1) / (f1 + ... + fn - g1)
// since in lock one count collects g1 (e - tau) + (f1 + ... + fn) tau = M
// pulses over ORDER half cycles of length e with gating high for tau.
// Small deviations tau(k) of the gating intervals then obey
//   fn tau(k+n) + ... + f2 tau(k+2) + f1 tau(k+1) - g1 tau(k) = excitation
// and the loop only settles if all roots of
//   fn z^n + ... + f1 z - g1 lie inside the unit circle.
// For ORDER = 2 that needs f2 > f1 + g1; f1 = 0 gives the best-damped roots
// z = +-sqrt(g1/f2). Equal f1 and f2 with the same sum and g1 put a root at
// -1.69, and such a loop never locks.
//
// The registers, the per-register clock pairs, the shift on reaching M and
// the output flip-flop follow the document's description of the general
// loop. The document gives neither its clock frequencies nor the circuit of
// the shift, so the following are this design's choices:
//  - the default values (ORDER = 2, f1 = 0, f2 = 325.12 kHz,
//    g1 = 190.72 kHz, g2 = 0: the mark loop's 745-1270 Hz lock range, with
//    roots at +-0.77);
//  - that a pulse arriving in the shift cycle travels with its register's
//    count (the pulse that completes M in the last register is consumed);
//  - that the registers saturate at 4M - 1.
// Loop clocks come from phase accumulators (clock_tick_gen); a clock of
// 0 Hz never ticks. F_HZ and G_HZ hold the clocks of registers 1..ORDER in
// their first ORDER entries (ORDER is at most 4); later entries are unused.
//
// Interface: clk, rst (synchronous; clears the registers, feedback starts
// at 0), sig_in (two-level input, synchronous to clk), feedback, gating,
// count_last (contents of the last register). gating responds
// combinationally to sig_in; feedback changes on the clock edge at which
// the last register reaches M.
module dpll_nth_order #(
  parameter int unsigned CLK_HZ       = fsk_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned ORDER        = 2,
  parameter int unsigned M            = 128,
  parameter int unsigned F_HZ [4]     = '{0, 325_120, 0, 0},
  parameter int unsigned G_HZ [4]     = '{190_720, 0, 0, 0},
  localparam int unsigned RW          = $clog2(M) + 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          sig_in,
  output logic          feedback,
  output logic          gating,
  output logic [RW-1:0] count_last
);

  localparam int unsigned LAST = ORDER - 1;
  localparam logic [RW-1:0] MAXC = '1;

  logic [ORDER-1:0] f_tick, g_tick, inc;
  logic [ORDER-1:0][RW-1:0] cnt;
  logic             reach;

  for (genvar i = 0; i < ORDER; i++) begin : g_reg
    clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(F_HZ[i])) u_f (
      .clk(clk), .rst(rst), .tick(f_tick[i])
    );
    clock_tick_gen #(.CLK_HZ(CLK_HZ), .F_HZ(G_HZ[i])) u_g (
      .clk(clk), .rst(rst), .tick(g_tick[i])
    );
    transmission_gate u_gate (
      .gating(gating), .f_tick(f_tick[i]), .g_tick(g_tick[i]), .count_en(inc[i])
    );
  end

  phase_comparator u_pd (
    .sig_in(sig_in), .feedback(feedback), .gating(gating)
  );

  // saturating add of one enable pulse
  function automatic logic [RW-1:0] bump(input logic [RW-1:0] c, input logic en);
    return (en && c != MAXC) ? c + 1'b1 : c;
  endfunction

  assign reach = ({1'b0, cnt[LAST]} + (RW+1)'(inc[LAST])) >= (RW+1)'(M);

  always_ff @(posedge clk) begin
    if (rst) begin
      feedback <= 1'b0;
      for (int i = 0; i < ORDER; i++) cnt[i] <= '0;
    end else if (reach) begin
      feedback <= ~feedback;
      cnt[0]   <= '0;
      for (int i = 1; i < ORDER; i++) cnt[i] <= bump(cnt[i-1], inc[i-1]);
    end else begin
      for (int i = 0; i < ORDER; i++) cnt[i] <= bump(cnt[i], inc[i]);
    end
  end

  assign count_last = cnt[LAST];

  initial begin
    assert (ORDER >= 1 && ORDER <= 4) else $error("dpll_nth_order: ORDER must be 1 to 4");
    assert (M >= 2) else $error("dpll_nth_order: M must be at least 2");
  end

endmodule
