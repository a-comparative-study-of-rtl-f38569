// freq_accumulator - step-size scaling and accumulator of the frequency
// estimator.
//
// The normalised frequency error d (radians per sample, Q7.24) is scaled by
// the step size mu and added to the accumulator c, which is the NCO's
// frequency control word:
//     c(n) = c(n-1) + mu * d(n) * 2^32/(2*pi)
// The factor 2^32/(2*pi) turns radians into phase-word units. c starts at
// the centre frequency word CENTER_FCW after reset, so at lock c holds the
// input frequency, c = w_i * t. mu is an unsigned 16-bit fraction
// (mu = mu_q16 / 65536), so 0 <= mu < 1 as the published scheme requires; a small
// mu settles slowly but smoothly, a large one quickly.
//
// Timing: c is a register updated on the clock edge where en is high.
// Synchronous active-low reset loads CENTER_FCW. The accumulator wraps
// modulo 2^32 like the phase it controls.
module freq_accumulator
  import cs_pkg::*;
#(
  parameter phase_t CENTER_FCW = hz_to_fcw(6000, 20000)  // 6 kHz at fs = 20 kHz
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [31:0] d,       // frequency error, rad/sample, Q7.24
  input  logic        [15:0] mu_q16,  // step size mu * 2^16
  output phase_t             c        // frequency control word
);

  // round(2^24 / (2*pi)): with d in Q.24 and mu in Q.16, the product
  // mu*d*K / 2^32 is mu*d in phase-word units.
  localparam logic signed [23:0] RAD2FCW = 24'sd2670177;

  logic signed [79:0] prod;
  phase_t             step;

  always_comb begin
    prod = 80'($signed({1'b0, mu_q16})) * 80'(d) * 80'(RAD2FCW);
    step = phase_t'(prod >>> 32);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  c <= CENTER_FCW;
    else if (en) c <= c + step;
  end

endmodule
