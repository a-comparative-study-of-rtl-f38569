// costas_loop - discrete-time Costas loop for carrier recovery of a phase-
// modulated carrier x = I*sin(w*n + th) + Q*cos(w*n + th).
//
// The input is multiplied by the local oscillator's sine and cosine (the NCO
// stands in for the VCO). One-pole low-pass arm filters remove the
// double-frequency products, leaving
//     z_i = I*cos(phi) - Q*sin(phi),  z_q = I*sin(phi) + Q*cos(phi),
// phi = th - th_LO. The limiters decide the symbols and the error detector
// forms err = z_q*l_i - z_i*l_q ~ 2*sin(phi). A proportional-plus-integral
// loop filter turns err into the NCO frequency word:
//     fcw = CENTER_FCW + err*2^KP_SHIFT + (sum err) / 2^KI_SHIFT
// so the loop tracks both a phase and a frequency offset. The mixers, the
// arm filters, the limiters, the error signal and the oscillator control
// follow the published scheme; the PI loop filter, its gains and the arm-filter
// coefficient are this design's choices (the published scheme gives none).
//
// Mixer outputs are scaled by 2 so that z_i/z_q reach the symbol amplitude.
// Interface: one real sample x (Q1.14) per en strobe; bpsk selects the
// two-phase error. l_i/l_q are the recovered symbols, z_i/z_q the filtered
// arm signals (Q3.14). Timing: the arm filters, integrator and NCO update on
// the en edge; everything else is combinational. Synchronous active-low reset.
module costas_loop
  import cs_pkg::*;
#(
  parameter phase_t CENTER_FCW = hz_to_fcw(500000, 20000000), // 500 kHz at 20 MHz
  parameter int     ARM_SHIFT  = 3,  // arm filter coefficient 2^-ARM_SHIFT
  parameter int     KP_SHIFT   = 7,  // proportional gain 2^KP_SHIFT
  parameter int     KI_SHIFT   = 2   // integral gain 2^-KI_SHIFT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  sample_t            x,
  input  logic               bpsk,
  output logic signed [17:0] z_i,
  output logic signed [17:0] z_q,
  output logic signed [1:0]  l_i,
  output logic signed [1:0]  l_q,
  output logic signed [18:0] err,
  output phase_t             fcw,
  output phase_t             lo_phase,
  output sample_t            lo_sin,
  output sample_t            lo_cos
);

  logic signed [17:0] m_i, m_q;
  logic signed [33:0] p_i, p_q;
  logic signed [39:0] integ;

  // Mixers: x * LO, doubled so the arm filters return the symbol amplitude.
  always_comb begin
    p_i = 34'(x) * 34'(lo_sin);
    p_q = 34'(x) * 34'(lo_cos);
    m_i = 18'(p_i >>> (SFRAC - 1));
    m_q = 18'(p_q >>> (SFRAC - 1));
  end

  lowpass_iir #(.W(18), .SHIFT(ARM_SHIFT)) u_arm_i (
    .clk, .rst_n, .en, .x (m_i), .y (z_i)
  );

  lowpass_iir #(.W(18), .SHIFT(ARM_SHIFT)) u_arm_q (
    .clk, .rst_n, .en, .x (m_q), .y (z_q)
  );

  costas_error_detector u_err (
    .z_i, .z_q, .bpsk, .l_i, .l_q, .err
  );

  // Loop filter: proportional plus integral path into the NCO frequency word.
  always_ff @(posedge clk) begin
    if (!rst_n)  integ <= '0;
    else if (en) integ <= integ + 40'(err);
  end

  always_comb begin
    fcw = CENTER_FCW + (phase_t'(err) << KP_SHIFT) + phase_t'(integ >>> KI_SHIFT);
  end

  quad_nco u_nco (
    .clk, .rst_n, .en,
    .fcw,
    .phase_ofs ('0),
    .phase     (lo_phase),
    .sin_o     (lo_sin),
    .cos_o     (lo_cos)
  );

endmodule
