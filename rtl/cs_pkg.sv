// cs_pkg - number formats and constants shared by the carrier-synchronisation
// datapaths (DPLL and Costas loop).
//
// Samples are signed 16-bit fixed point with 14 fractional bits (Q1.14):
// 1.0 is 16384 and the range is just under +/-2, so a sum of two unit-amplitude
// quadrature components still fits. NCO phase and frequency words are 32-bit
// unsigned fractions of a full turn: a phase word P stands for 2*pi*P/2^32
// radians, and a frequency control word (FCW) F makes the phase advance by F
// every sample, i.e. a frequency of F/2^32 * fs. The sine table is filled at
// elaboration time from $sin, so no data file is needed. The Q1.14 format, the
// 32-bit phase words and the table size are this design's choices; the
// published scheme works in real-valued discrete time.
package cs_pkg;

  localparam int SW     = 16;  // sample width
  localparam int SFRAC  = 14;  // fractional bits of a sample
  localparam int PW     = 32;  // phase / frequency word width
  localparam int LUT_AW = 12;  // sine table address bits (4096 entries per turn)

  typedef logic signed [SW-1:0] sample_t;
  typedef logic        [PW-1:0] phase_t;

  // Frequency control word for f_hz at sample rate fs_hz: round(f/fs * 2^32).
  // A negative frequency wraps to its two's complement, which is the same
  // phase step modulo one turn.
  function automatic phase_t hz_to_fcw(input longint f_hz, input longint fs_hz);
    longint num;
    num = (f_hz <<< PW) + ((f_hz >= 0) ? fs_hz / 2 : -(fs_hz / 2));
    return phase_t'(num / fs_hz);
  endfunction

  // One sine table entry: round(2^SFRAC * sin(2*pi*i / 2^LUT_AW)).
  function automatic sample_t sine_entry(input int i);
    real r;
    r = $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(1 << LUT_AW))
        * real'(1 << SFRAC);
    return sample_t'($rtoi(r + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // The whole table packed into one vector, entry i at bits [i*SW +: SW].
  function automatic logic [(1<<LUT_AW)*SW-1:0] sine_table();
    logic [(1<<LUT_AW)*SW-1:0] t;
    for (int i = 0; i < (1 << LUT_AW); i++) t[i*SW +: SW] = sine_entry(i);
    return t;
  endfunction

endpackage
