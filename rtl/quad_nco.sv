// quad_nco - quadrature numerically controlled oscillator.
//
// A PW-bit phase accumulator advances by the frequency control word `fcw` on
// every sample strobe `en`. The output phase is the accumulator plus a phase
// offset `phase_ofs`, so the phase seen at sample n is
//     phase(n) = sum_{k<n} fcw(k) + phase_ofs(n),
// the NCO law of the frequency estimator (sum of the accumulator outputs up to
// n-1, on top of the start value). Sine and cosine are read from a 2^LUT_AW
// entry table addressed by the rounded top bits of the phase; cosine is the
// same table a quarter turn ahead. Outputs are Q1.14 (1.0 = 16384).
//
// Timing: phase, sin_o and cos_o are combinational from the accumulator
// register and phase_ofs; the accumulator updates on the clock edge where en
// is high. Synchronous active-low reset clears the accumulator to zero.
// The published scheme names a quadrature NCO without giving its insides; the phase
// accumulator with a table look-up is this design's choice.
module quad_nco
  import cs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,         // sample strobe
  input  phase_t  fcw,        // phase step per sample
  input  phase_t  phase_ofs,  // phase added after the accumulator
  output phase_t  phase,      // current output phase
  output sample_t sin_o,
  output sample_t cos_o
);

  localparam logic [(1<<LUT_AW)*SW-1:0] TABLE = sine_table();
  localparam phase_t HALF_LSB = phase_t'(1) << (PW - LUT_AW - 1);
  localparam logic [LUT_AW-1:0] QUARTER = LUT_AW'(1 << (LUT_AW - 2));

  phase_t acc;

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc + fcw;
  end

  logic [LUT_AW-1:0]  idx_s, idx_c;

  always_comb begin
    phase   = acc + phase_ofs;
    idx_s   = LUT_AW'((phase + HALF_LSB) >> (PW - LUT_AW));
    idx_c   = idx_s + QUARTER;
    sin_o   = sample_t'(TABLE[idx_s*SW +: SW]);
    cos_o   = sample_t'(TABLE[idx_c*SW +: SW]);
  end

endmodule
