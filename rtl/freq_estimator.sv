// freq_estimator - frequency estimator of the DPLL (a PLL whose phase
// detector is replaced by a frequency detector, its loop filter by an
// accumulator and its VCO by a quadrature NCO).
//
// Per input sample: the NCO replica (cos, sin) mixes the complex input in
// freq_detector; fx_divider divides the cross-product output by the signal
// power, giving the frequency error in radians per sample; freq_accumulator
// adds mu times that error to the frequency word c, which drives the NCO.
// The loop settles when the NCO runs at the input frequency; it acquires
// offsets up to half the sample rate (the detector output is sin(dw), whose
// sign is right for |dw| < pi).
//
// Interface: one complex sample (xi, xq) per en strobe; mu_q16 sets the step
// size. fcw is the estimated frequency word (f = fcw/2^32 * fs), freq_err the
// current normalised error. Timing: fcw updates on the en edge of each
// sample; the other outputs are combinational from the current sample.
module freq_estimator
  import cs_pkg::*;
#(
  parameter phase_t CENTER_FCW = hz_to_fcw(6000, 20000)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  sample_t            xi,
  input  sample_t            xq,
  input  logic        [15:0] mu_q16,
  output phase_t             fcw,       // estimated frequency word
  output logic signed [31:0] freq_err,  // d = D/S, rad/sample, Q7.24
  output logic        [39:0] s_pow,     // signal power, Q.28
  output sample_t            nco_sin,
  output sample_t            nco_cos
);

  logic signed [39:0] d_num;

  quad_nco u_nco (
    .clk, .rst_n, .en,
    .fcw       (fcw),
    .phase_ofs ('0),
    .phase     (),
    .sin_o     (nco_sin),
    .cos_o     (nco_cos)
  );

  freq_detector u_det (
    .clk, .rst_n, .en,
    .xi, .xq,
    .nco_cos, .nco_sin,
    .rx_i      (),
    .rx_q      (),
    .d_num,
    .s_pow
  );

  fx_divider #(.NW(40), .DW(40), .FRAC(24), .QW(32)) u_div (
    .num (d_num),
    .den (s_pow),
    .quo (freq_err)
  );

  freq_accumulator #(.CENTER_FCW(CENTER_FCW)) u_acc (
    .clk, .rst_n, .en,
    .d      (freq_err),
    .mu_q16 (mu_q16),
    .c      (fcw)
  );

endmodule
