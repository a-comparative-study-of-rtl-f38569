// phase_estimator - low-noise phase-locked loop of the DPLL.
//
// The quadrature NCO runs at the frequency word `fcw` delivered by the
// frequency estimator, plus a phase correction theta_hat. The low-noise
// phase detector compares the in-phase input with the NCO sine, a
// first-order low-pass filter removes what is left of the double-frequency
// ripple, and the filtered error s_i ~ (k_d/2)*sin(theta_i - theta_hat)
// nudges theta_hat every sample:
//     theta_hat(n+1) = theta_hat(n) + s_i(n) * 2^PHASE_GAIN_SHIFT
// until the NCO sine lines up with the input (theta_hat = theta_i).
// The detector, the filter and the phase control follow the published scheme; the
// proportional phase update, its gain and the filter coefficient are this
// design's choices.
//
// Interface: one sample x = sin(w_i*n + theta_i) per en strobe. theta_hat is
// the estimated phase (phase-word units, 2^32 = one turn); phase, nco_sin and
// nco_cos are the locked replica; s_i is the filtered phase error (Q3.14).
// Timing: theta_hat and the filter update on the en edge; the NCO outputs are
// combinational from registers. Synchronous active-low reset.
module phase_estimator
  import cs_pkg::*;
#(
  parameter int LPF_SHIFT        = 3,   // LPF coefficient 2^-LPF_SHIFT
  parameter int PHASE_GAIN_SHIFT = 10,  // phase step per unit of s_i
  parameter int KD_SHIFT         = 0    // detector gain k_d = 2^KD_SHIFT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  sample_t            x,
  input  phase_t             fcw,
  output phase_t             theta_hat,
  output phase_t             phase,
  output sample_t            nco_sin,
  output sample_t            nco_cos,
  output logic signed [17:0] s_i
);

  logic signed [17:0] s_d;

  quad_nco u_nco (
    .clk, .rst_n, .en,
    .fcw,
    .phase_ofs (theta_hat),
    .phase,
    .sin_o     (nco_sin),
    .cos_o     (nco_cos)
  );

  phase_detector #(.KD_SHIFT(KD_SHIFT)) u_pd (
    .x, .nco_sin, .nco_cos, .s_d
  );

  lowpass_iir #(.W(18), .SHIFT(LPF_SHIFT)) u_lpf (
    .clk, .rst_n, .en, .x (s_d), .y (s_i)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  theta_hat <= '0;
    else if (en) theta_hat <= theta_hat + (phase_t'(s_i) << PHASE_GAIN_SHIFT);
  end

endmodule
