// phase_detector - low-noise phase detector of the DPLL phase estimator.
//
//     s_d = k_d * (x - sin(p)) * cos(p),   p = NCO phase
//
// With x = sin(w*n + th) and the NCO at the same frequency, the plain product
// x*cos(p) carries a large double-frequency term sin(2p + ...). Subtracting
// the NCO's own sine first removes most of it: what is left is
// (k_d/2)*sin(th - th_hat) plus a small residual proportional to the phase
// error, which a first-order low-pass filter can clear. The gain k_d is
// 2^KD_SHIFT. The subtraction and the product follow the published scheme; the
// power-of-two gain and the widths are this design's.
//
// Formats: x, nco_sin, nco_cos Q1.14; s_d Q3.14 (18 bits).
// Timing: purely combinational.
module phase_detector
  import cs_pkg::*;
#(
  parameter int KD_SHIFT = 0  // k_d = 2^KD_SHIFT
) (
  input  sample_t            x,
  input  sample_t            nco_sin,
  input  sample_t            nco_cos,
  output logic signed [17:0] s_d
);

  logic signed [16:0] diff;
  logic signed [33:0] prod;

  always_comb begin
    diff = 17'(x) - 17'(nco_sin);
    prod = (34'(diff) * 34'(nco_cos)) <<< KD_SHIFT;
    s_d  = 18'(prod >>> SFRAC);
  end

endmodule
