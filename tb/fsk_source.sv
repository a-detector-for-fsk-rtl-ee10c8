// fsk_source: behavioural model of the FSK transmitter and noisy channel
// used by the testbenches (not synthesizable).
//
// Two free-running square-wave oscillators (mark and space) are switched by
// the data bit, as in a two-oscillator transmitter: switching does not reset
// either oscillator's phase. Zero-mean Gaussian noise, band-limited by a
// first-order low-pass with a 20 kHz equivalent noise bandwidth, is added,
// and the sum is quantized to a signed SAMPLE_W-bit sample every clock.
//
// Noise level: the caller sets noise_rms directly (0 disables noise). For a
// desired E/N0 with carrier rms S, bit rate B and noise bandwidth W:
//   noise_rms = S * sqrt(W / (B * E/N0)).
// The frequencies are runtime inputs so that a test can shift the carriers.
module fsk_source #(
  parameter int unsigned CLK_HZ   = 10_000_000,
  parameter int unsigned SAMPLE_W = 12,
  parameter real         AMPL     = 256.0
) (
  input  logic                       clk,
  input  logic                       data,
  input  real                        f_mark_hz,
  input  real                        f_space_hz,
  input  real                        noise_rms,
  output logic signed [SAMPLE_W-1:0] sample
);

  localparam real PI = 3.14159265358979;
  // First-order low-pass whose equivalent noise bandwidth is 20 kHz:
  // fc = 20 kHz * 2 / pi, alpha = 2 pi fc / CLK_HZ.
  localparam real FC    = 20000.0 * 2.0 / PI;
  localparam real ALPHA = 2.0 * PI * FC / CLK_HZ;

  real ph_mark = 0.0, ph_space = 0.31;   // phases in cycles
  real nf = 0.0;                         // filtered noise, unit variance scale
  real val;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom() / 4294967296.0;
    return s - 6.0;
  endfunction

  always @(posedge clk) begin
    real sq;
    ph_mark  = ph_mark  + f_mark_hz  / CLK_HZ;
    ph_space = ph_space + f_space_hz / CLK_HZ;
    if (ph_mark  >= 1.0) ph_mark  = ph_mark  - 1.0;
    if (ph_space >= 1.0) ph_space = ph_space - 1.0;
    if (data) sq = (ph_mark  < 0.5) ? AMPL : -AMPL;
    else      sq = (ph_space < 0.5) ? AMPL : -AMPL;
    // white N(0,1) through the low-pass has variance alpha/(2-alpha);
    // scale it back to unit variance.
    nf  = nf + ALPHA * (gauss() - nf);
    val = sq + noise_rms * nf / $sqrt(ALPHA / (2.0 - ALPHA));
    if (val >  (2.0 ** (SAMPLE_W - 1)) - 1.0) val =  (2.0 ** (SAMPLE_W - 1)) - 1.0;
    if (val < -(2.0 ** (SAMPLE_W - 1)))       val = -(2.0 ** (SAMPLE_W - 1));
    sample <= SAMPLE_W'($rtoi(val));
  end

endmodule
