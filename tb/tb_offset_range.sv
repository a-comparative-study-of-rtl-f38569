// tb_offset_range - compares the two synchronisers' behaviour against the
// size of the carrier frequency offset, on the top level at its default
// parameters (DPLL 6 kHz / 20 kHz, Costas 500 kHz / 20 MHz).
//
// DPLL: unit complex tones offset by -1, +2, +3.5 and -5.5 kHz from the
// 6 kHz centre (up to 0.45 of the 10 kHz Nyquist range on either side of the
// NCO start) with mu = 0.05; every one must be acquired to within 2 Hz and
// have its replica phase within 1 degree after 2000 samples.
// Costas (BPSK mode, 100-sample symbols): offsets of 2 kHz and 20 kHz from
// the 500 kHz centre must lock (last 20 symbols decided correctly and mean
// frequency word within 1 kHz); an offset of 100 kHz must not, showing the
// narrow acquisition range of the Costas loop against the DPLL's.
// Settling times are printed for both loops.
module tb_offset_range;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic dpll_valid = 0, costas_valid = 0, costas_bpsk = 1;
  sample_t dpll_xi = '0, dpll_xq = '0, costas_x = '0;
  logic [15:0] dpll_mu_q16 = 16'd3277;
  phase_t dpll_est_fcw, dpll_est_phase, dpll_rep_phase, costas_fcw, costas_lo_phase;
  logic signed [31:0] dpll_freq_err;
  sample_t dpll_rep_sin, dpll_rep_cos, costas_lo_sin, costas_lo_cos;
  logic signed [17:0] dpll_phase_err, costas_z_i, costas_z_q;
  logic signed [1:0] costas_l_i, costas_l_q;
  logic signed [18:0] costas_err;
  logic [39:0] dpll_sig_pow;

  int checks = 0, failures = 0;

  carrier_sync_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  task automatic dpll_trial(input longint off_hz);
    phase_t inc, ph;
    real a, ferr, perr;
    int settle;
    do_reset();
    inc = hz_to_fcw(6000 + off_hz, 20000);
    ph = 32'h1000_0000;
    settle = 0;
    for (int n = 0; n < 2000; n++) begin
      a = 2.0 * PI * real'(ph) / 4294967296.0;
      dpll_xi = sample_t'($rtoi($floor(16383.0 * $cos(a) + 0.5)));
      dpll_xq = sample_t'($rtoi($floor(16383.0 * $sin(a) + 0.5)));
      dpll_valid = 1;
      @(posedge clk); #1;
      dpll_valid = 0;
      ph += inc;
      ferr = real'($signed(dpll_est_fcw - inc)) * 20000.0 / 4294967296.0;
      if (ferr > 5.0 || ferr < -5.0) settle = n + 1;
    end
    perr = real'($signed(dpll_rep_phase - ph)) * 360.0 / 4294967296.0;
    $display("DPLL   offset %6d Hz: f_err %8.3f Hz, phase_err %7.3f deg, settled after %0d samples",
             off_hz, ferr, perr, settle);
    check(ferr < 2.0 && ferr > -2.0, $sformatf("DPLL did not acquire a %0d Hz offset", off_hz));
    check(perr < 1.0 && perr > -1.0, $sformatf("DPLL phase not locked at %0d Hz offset", off_hz));
  endtask

  // Returns 1 when the Costas loop locked.
  task automatic costas_trial(input longint off_hz, output bit locked);
    phase_t inc, ph;
    real a, fsum, ferr;
    int si, bad, sign, settle_sym;
    do_reset();
    inc = hz_to_fcw(500000 + off_hz, 20000000);
    ph = phase_t'(32'd357913941);
    bad = 0; sign = 0; fsum = 0.0; settle_sym = -1;
    for (int s = 0; s < 200; s++) begin
      real fs_sym;
      fs_sym = 0.0;
      si = ($urandom % 2) ? 1 : -1;
      for (int n = 0; n < 100; n++) begin
        a = 2.0 * PI * real'(ph) / 4294967296.0;
        costas_x = sample_t'($rtoi($floor(16000.0 * real'(si) * $sin(a) + 0.5)));
        costas_valid = 1;
        @(posedge clk); #1;
        costas_valid = 0;
        ph += inc;
        fs_sym += real'($signed(costas_fcw - inc));
        if (s >= 180) fsum += real'($signed(costas_fcw - inc));
        if (s >= 180 && n == 75) begin
          if (sign == 0) sign = int'(costas_l_i) * si;
          if (int'(costas_l_i) != sign * si) bad++;
        end
      end
      fs_sym = fs_sym / 100.0 * 20.0e6 / 4294967296.0;
      if (fs_sym > 1000.0 || fs_sym < -1000.0) settle_sym = s;
    end
    ferr = fsum / 2000.0 * 20.0e6 / 4294967296.0;
    locked = (bad == 0) && ferr < 1000.0 && ferr > -1000.0;
    $display("Costas offset %7d Hz: mean f_err %10.1f Hz, %0d wrong of last 20 decisions, %s (settled after %0d samples)",
             off_hz, ferr, bad, locked ? "locked" : "NOT locked", (settle_sym + 1) * 100);
  endtask

  initial begin
    bit locked;
    dpll_trial(-1000);
    dpll_trial(2000);
    dpll_trial(3500);
    dpll_trial(-5500);
    costas_trial(2000, locked);
    check(locked, "Costas loop did not lock at a 2 kHz offset");
    costas_trial(20000, locked);
    check(locked, "Costas loop did not lock at a 20 kHz offset");
    costas_trial(100000, locked);
    check(!locked, "Costas loop locked at a 100 kHz offset, beyond its expected range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
