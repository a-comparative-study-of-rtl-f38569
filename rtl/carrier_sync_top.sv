// carrier_sync_top - the two carrier synchronisers side by side.
//
// The DPLL (frequency estimator followed by a low-noise phase estimator)
// takes a complex baseband-sampled carrier and returns its frequency, its
// phase and a locked replica. The Costas loop takes a real phase-modulated
// carrier and returns the recovered symbols and its local oscillator. The two
// share no signals; each has its own sample strobe and its own ports, so
// either can be used alone. Defaults are the two operating points used for
// them: the DPLL centred on 6 kHz at a 20 kHz sample rate, the Costas loop on
// 500 kHz at 20 MHz. Timing is that of the two sub-blocks: at most one
// sample per clock each. Synchronous active-low reset for both.
module carrier_sync_top
  import cs_pkg::*;
#(
  parameter phase_t DPLL_CENTER_FCW   = hz_to_fcw(6000, 20000),
  parameter phase_t COSTAS_CENTER_FCW = hz_to_fcw(500000, 20000000)
) (
  input  logic               clk,
  input  logic               rst_n,
  // DPLL
  input  logic               dpll_valid,
  input  sample_t            dpll_xi,
  input  sample_t            dpll_xq,
  input  logic        [15:0] dpll_mu_q16,
  output phase_t             dpll_est_fcw,
  output logic signed [31:0] dpll_freq_err,
  output phase_t             dpll_est_phase,
  output phase_t             dpll_rep_phase,
  output sample_t            dpll_rep_sin,
  output sample_t            dpll_rep_cos,
  output logic signed [17:0] dpll_phase_err,
  output logic        [39:0] dpll_sig_pow,
  // Costas loop
  input  logic               costas_valid,
  input  sample_t            costas_x,
  input  logic               costas_bpsk,
  output logic signed [17:0] costas_z_i,
  output logic signed [17:0] costas_z_q,
  output logic signed [1:0]  costas_l_i,
  output logic signed [1:0]  costas_l_q,
  output logic signed [18:0] costas_err,
  output phase_t             costas_fcw,
  output phase_t             costas_lo_phase,
  output sample_t            costas_lo_sin,
  output sample_t            costas_lo_cos
);

  dpll #(.CENTER_FCW(DPLL_CENTER_FCW)) u_dpll (
    .clk, .rst_n,
    .in_valid  (dpll_valid),
    .xi        (dpll_xi),
    .xq        (dpll_xq),
    .mu_q16    (dpll_mu_q16),
    .est_fcw   (dpll_est_fcw),
    .freq_err  (dpll_freq_err),
    .est_phase (dpll_est_phase),
    .rep_phase (dpll_rep_phase),
    .rep_sin   (dpll_rep_sin),
    .rep_cos   (dpll_rep_cos),
    .phase_err (dpll_phase_err),
    .sig_pow   (dpll_sig_pow)
  );

  costas_loop #(.CENTER_FCW(COSTAS_CENTER_FCW)) u_costas (
    .clk, .rst_n,
    .en       (costas_valid),
    .x        (costas_x),
    .bpsk     (costas_bpsk),
    .z_i      (costas_z_i),
    .z_q      (costas_z_q),
    .l_i      (costas_l_i),
    .l_q      (costas_l_q),
    .err      (costas_err),
    .fcw      (costas_fcw),
    .lo_phase (costas_lo_phase),
    .lo_sin   (costas_lo_sin),
    .lo_cos   (costas_lo_cos)
  );

endmodule
