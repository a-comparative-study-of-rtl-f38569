// dpll - two-stage carrier synchroniser: a frequency estimator followed by a
// low-noise phase estimator.
//
// The frequency estimator locks an NCO to the frequency of the complex input
// (xi, xq) over the whole range up to half the sample rate; its frequency
// word drives the phase estimator's NCO, whose loop then only has to pull in
// the phase. The outputs are the estimated frequency and the estimated phase,
// the input power seen by the frequency detector, and the phase estimator's NCO gives the synchronised replica of the carrier.
// This two-stage structure is the published scheme's; the word formats and gains are
// this design's (see the sub-modules).
//
// Interface: one complex sample per in_valid strobe (xi = cos, xq = sin of
// the carrier, Q1.14). mu_q16 is the frequency loop step size mu*2^16.
// Timing: one sample per clock at most; est_fcw and est_phase are registers
// that update on the in_valid edge; the replica outputs are combinational
// from registers. Synchronous active-low reset; the NCO starts at CENTER_FCW.
module dpll
  import cs_pkg::*;
#(
  parameter phase_t CENTER_FCW       = hz_to_fcw(6000, 20000),
  parameter int     LPF_SHIFT        = 3,
  parameter int     PHASE_GAIN_SHIFT = 10,
  parameter int     KD_SHIFT         = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  sample_t            xi,
  input  sample_t            xq,
  input  logic        [15:0] mu_q16,
  output phase_t             est_fcw,    // estimated frequency word
  output logic signed [31:0] freq_err,   // frequency detector output, Q7.24 rad/sample
  output phase_t             est_phase,  // estimated phase offset theta_hat
  output phase_t             rep_phase,  // phase of the synchronised replica
  output sample_t            rep_sin,
  output sample_t            rep_cos,
  output logic signed [17:0] phase_err,  // filtered phase error s_i, Q3.14
  output logic        [39:0] sig_pow     // input power estimate S, Q.28
);

  freq_estimator #(.CENTER_FCW(CENTER_FCW)) u_fe (
    .clk, .rst_n,
    .en       (in_valid),
    .xi, .xq,
    .mu_q16,
    .fcw      (est_fcw),
    .freq_err (freq_err),
    .s_pow    (sig_pow),
    .nco_sin  (),
    .nco_cos  ()
  );

  phase_estimator #(
    .LPF_SHIFT        (LPF_SHIFT),
    .PHASE_GAIN_SHIFT (PHASE_GAIN_SHIFT),
    .KD_SHIFT         (KD_SHIFT)
  ) u_pe (
    .clk, .rst_n,
    .en        (in_valid),
    .x         (xq),
    .fcw       (est_fcw),
    .theta_hat (est_phase),
    .phase     (rep_phase),
    .nco_sin   (rep_sin),
    .nco_cos   (rep_cos),
    .s_i       (phase_err)
  );

endmodule
