// freq_detector - frequency detector of the DPLL frequency estimator.
//
// It mixes the complex input (xi, xq) with the NCO replica (cos, sin) into
// the quadrature difference signals
//     rx_i = xi*cos + xq*sin   = cos(dw*n + dtheta)
//     rx_q = xi*sin - xq*cos   = -sin(dw*n + dtheta)
// differentiates both with a first difference against the previous sample,
// and forms
//     d_num = rx_q * (rx_i - rx_i') - rx_i * (rx_q - rx_q')  ~ sin(dw)
//     s_pow = rx_i^2 + rx_q^2                                 (signal power)
// where ' marks the previous sample and dw is the phase step between input
// and NCO, in radians per sample. d_num/s_pow is then the frequency
// difference independent of the input amplitude. The first-difference
// derivative, the two cross products and the squaring follow the published scheme;
// combining the two cross products with a subtraction (so that the result is
// exactly sin(dw) for a unit tone) is this design's reading of it.
//
// Formats: rx_i/rx_q Q3.14 (18 bits); d_num and s_pow carry 28 fractional
// bits (40 bits wide). Timing: all outputs are combinational from the inputs
// and the two delay registers, which load on en. Reset clears the delay
// registers, so d_num is zero on the first sample.
module freq_detector
  import cs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  sample_t            xi,
  input  sample_t            xq,
  input  sample_t            nco_cos,
  input  sample_t            nco_sin,
  output logic signed [17:0] rx_i,
  output logic signed [17:0] rx_q,
  output logic signed [39:0] d_num,
  output logic        [39:0] s_pow
);

  logic signed [17:0] rx_i_d, rx_q_d;
  logic signed [18:0] dif_i, dif_q;
  logic signed [33:0] mi, mq;

  always_comb begin
    mi    = 34'(xi) * 34'(nco_cos) + 34'(xq) * 34'(nco_sin);
    mq    = 34'(xi) * 34'(nco_sin) - 34'(xq) * 34'(nco_cos);
    rx_i  = 18'(mi >>> SFRAC);
    rx_q  = 18'(mq >>> SFRAC);
    dif_i = 19'(rx_i) - 19'(rx_i_d);
    dif_q = 19'(rx_q) - 19'(rx_q_d);
    d_num = 40'(rx_q) * 40'(dif_i) - 40'(rx_i) * 40'(dif_q);
    s_pow = 40'(40'(rx_i) * 40'(rx_i) + 40'(rx_q) * 40'(rx_q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_i_d <= '0;
      rx_q_d <= '0;
    end else if (en) begin
      rx_i_d <= rx_i;
      rx_q_d <= rx_q;
    end
  end

endmodule
