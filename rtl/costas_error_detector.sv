// costas_error_detector - limiters and phase-error signal of the Costas loop.
//
// The limiters turn the filtered arm signals into symbol decisions,
// l_i = sign(z_i) and l_q = sign(z_q) (+1 or -1, zero counts as +1), and the
// error is the cross product
//     err = z_q * l_i - z_i * l_q = 2*sin(phi) for unit symbols,
// which is about 2*phi for a small phase error phi. Because l_i and l_q are
// +/-1 the products are only sign changes, so the unit is two negations and
// a subtraction. With `bpsk` high there is no Q symbol: l_q is held at 0 and
// err = z_q * l_i, the error of a two-phase Costas loop, which locks at phi=0
// (mod 180 degrees) instead of the 45-degree point the four-phase error has
// for a BPSK input. The limiters and the error equation are the published scheme's;
// the BPSK mode (Q(t) = 0 in the same equations) is this design's reading.
//
// Formats: z_i, z_q Q3.14 (18 bits); err 19 bits. Timing: combinational.
module costas_error_detector (
  input  logic signed [17:0] z_i,
  input  logic signed [17:0] z_q,
  input  logic               bpsk,
  output logic signed [1:0]  l_i,
  output logic signed [1:0]  l_q,
  output logic signed [18:0] err
);

  logic signed [18:0] zq_li, zi_lq;

  always_comb begin
    l_i   = z_i[17] ? -2'sd1 : 2'sd1;
    l_q   = bpsk ? 2'sd0 : (z_q[17] ? -2'sd1 : 2'sd1);
    zq_li = (l_i < 0) ? -19'(z_q) : 19'(z_q);
    zi_lq = (l_q == 0) ? 19'sd0 : ((l_q < 0) ? -19'(z_i) : 19'(z_i));
    err   = zq_li - zi_lq;
  end

endmodule
