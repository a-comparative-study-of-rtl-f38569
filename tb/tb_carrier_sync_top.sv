// tb_carrier_sync_top - end-to-end test of both carrier synchronisers at
// their default parameters (DPLL: 6 kHz centre, 20 kHz sampling; Costas:
// 500 kHz centre, 20 MHz sampling), run side by side on one clock with
// irregular sample strobes.
//
// DPLL scenario (mu = 0.05): a unit complex tone at 5 kHz with a pi/8 phase
// offset is acquired from reset (frequency within 2 Hz, replica phase within
// 1 degree); the tone then jumps to 7.5 kHz and must be re-acquired without a
// reset; finally the input drops to zero and the frequency word must hold
// (the divider's zero-power guard).
// Costas scenario: a four-phase (I, Q = +/-1) carrier 2 kHz above the centre
// with a 30 degree offset is acquired and its decisions checked, then the
// loop is switched to BPSK mode without a reset, fed a BPSK carrier, and its
// decisions checked again (each up to the loop's rotation ambiguity).
// Every mechanism is counted; one that never happened counts as a failure.
module tb_carrier_sync_top;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic dpll_valid = 0, costas_valid = 0, costas_bpsk = 0;
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
  int n_freq_acq = 0, n_phase_lock = 0, n_freq_step = 0, n_zero_hold = 0;
  int n_qpsk_lock = 0, n_bpsk_lock = 0, n_mode_switch = 0, n_idle = 0;

  carrier_sync_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // ---------------------------------------------------------------- DPLL
  phase_t d_ph;  // phase of the next DPLL input sample

  task automatic dpll_samples(input phase_t inc, input int count, input real amp);
    real a;
    for (int n = 0; n < count; n++) begin
      while ($urandom % 3 == 0) begin
        n_idle++;
        @(posedge clk); #1;
      end
      a = 2.0 * PI * real'(d_ph) / 4294967296.0;
      dpll_xi = sample_t'($rtoi($floor(amp * $cos(a) + 0.5)));
      dpll_xq = sample_t'($rtoi($floor(amp * $sin(a) + 0.5)));
      dpll_valid = 1;
      @(posedge clk); #1;
      dpll_valid = 0;
      d_ph += inc;
    end
  endtask

  task automatic dpll_check(input phase_t inc, input string tag);
    real ferr, perr;
    ferr = real'($signed(dpll_est_fcw - inc)) * 20000.0 / 4294967296.0;
    perr = real'($signed(dpll_rep_phase - d_ph)) * 360.0 / 4294967296.0;
    $display("DPLL %s: f_err %0.3f Hz, phase_err %0.3f deg", tag, ferr, perr);
    check(ferr < 2.0 && ferr > -2.0, {tag, ": DPLL frequency not acquired"});
    check(perr < 1.0 && perr > -1.0, {tag, ": DPLL phase not locked"});
    if (ferr < 2.0 && ferr > -2.0) n_freq_acq++;
    if (perr < 1.0 && perr > -1.0) n_phase_lock++;
  endtask

  task automatic dpll_scenario();
    phase_t inc1, inc2, held;
    inc1 = hz_to_fcw(5000, 20000);
    inc2 = hz_to_fcw(7500, 20000);
    d_ph = 32'h1000_0000;  // pi/8
    dpll_samples(inc1, 2000, 16383.0);
    dpll_check(inc1, "acquire 5 kHz");
    dpll_samples(inc2, 2000, 16383.0);
    dpll_check(inc2, "step to 7.5 kHz");
    if (dpll_est_fcw - inc2 < 32'd500000 || inc2 - dpll_est_fcw < 32'd500000) n_freq_step++;
    held = dpll_est_fcw;
    dpll_samples(inc2, 200, 0.0);
    check(dpll_est_fcw == held, "DPLL frequency word moved on a zero input");
    if (dpll_est_fcw == held) n_zero_hold++;
  endtask

  // -------------------------------------------------------------- Costas
  function automatic void rotate(input int si, input int sq, input int k,
                                 output int ri, output int rq);
    case (k)
      0: begin ri =  si; rq =  sq; end
      1: begin ri = -sq; rq =  si; end
      2: begin ri = -si; rq = -sq; end
      default: begin ri =  sq; rq = -si; end
    endcase
  endfunction

  phase_t c_ph;

  // Sends nsym symbols of 100 samples; checks the last nchk of them.
  task automatic costas_symbols(input bit mode_bpsk, input int nsym, input int nchk,
                                output int bad);
    phase_t inc;
    int si, sq, k, ri, rq;
    real a, amp;
    inc = hz_to_fcw(502000, 20000000);
    amp = mode_bpsk ? 16000.0 : 11500.0;
    k = -1;
    bad = 0;
    for (int s = 0; s < nsym; s++) begin
      si = ($urandom % 2) ? 1 : -1;
      sq = mode_bpsk ? 0 : (($urandom % 2) ? 1 : -1);
      for (int n = 0; n < 100; n++) begin
        if ($urandom % 5 == 0) begin
          n_idle++;
          @(posedge clk); #1;
        end
        a = 2.0 * PI * real'(c_ph) / 4294967296.0;
        costas_x = sample_t'($rtoi($floor(amp * (real'(si) * $sin(a) + real'(sq) * $cos(a)) + 0.5)));
        costas_valid = 1;
        @(posedge clk); #1;
        costas_valid = 0;
        c_ph += inc;
        if (s >= nsym - nchk && n == 75) begin
          if (k < 0) begin
            for (int j = 0; j < 4; j++) begin
              rotate(si, sq, j, ri, rq);
              if (mode_bpsk) rq = 0;
              if (k < 0 && ri == int'(costas_l_i) && rq == int'(costas_l_q)) k = j;
            end
            if (k < 0) bad++;
          end else begin
            rotate(si, sq, k, ri, rq);
            if (mode_bpsk) rq = 0;
            if (ri != int'(costas_l_i) || rq != int'(costas_l_q)) bad++;
          end
        end
      end
    end
  endtask

  task automatic costas_scenario();
    int bad;
    c_ph = phase_t'(32'd357913941);  // 30 degrees
    costas_bpsk = 0;
    costas_symbols(1'b0, 100, 40, bad);
    $display("Costas four-phase: %0d wrong decisions of 40", bad);
    check(bad == 0, "Costas four-phase decisions wrong");
    if (bad == 0) n_qpsk_lock++;
    costas_bpsk = 1;
    n_mode_switch++;
    costas_symbols(1'b1, 100, 40, bad);
    $display("Costas BPSK: %0d wrong decisions of 40", bad);
    check(bad == 0, "Costas BPSK decisions wrong");
    if (bad == 0) n_bpsk_lock++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      dpll_scenario();
      costas_scenario();
    join
    $display("mechanisms: freq_acq=%0d phase_lock=%0d freq_step=%0d zero_hold=%0d",
             n_freq_acq, n_phase_lock, n_freq_step, n_zero_hold);
    $display("            qpsk_lock=%0d bpsk_lock=%0d mode_switch=%0d idle_strobes=%0d",
             n_qpsk_lock, n_bpsk_lock, n_mode_switch, n_idle);
    check(n_freq_acq > 0,    "frequency acquisition never happened");
    check(n_phase_lock > 0,  "phase lock never happened");
    check(n_freq_step > 0,   "frequency step never tracked");
    check(n_zero_hold > 0,   "zero-power hold never happened");
    check(n_qpsk_lock > 0,   "four-phase Costas lock never happened");
    check(n_bpsk_lock > 0,   "BPSK Costas lock never happened");
    check(n_mode_switch > 0, "Costas mode switch never happened");
    check(n_idle > 0,        "idle sample strobe never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
