// tb_dpll - self-checking test of the two-stage DPLL on the operating point
// used to evaluate it: carrier centre 6 kHz, sample rate 20 kHz, a -1 kHz
// frequency offset (input at 5 kHz) and a 22.5 degree (pi/8) phase offset.
//
// The input is a unit complex tone generated with $sin/$cos. For each of
// several step sizes mu the test resets the loop, runs 3000 samples and
// checks, from an ideal model of the input phase:
//   - the frequency estimate ends within 2 Hz of 5 kHz,
//   - the replica phase ends within 1 degree of the input phase, and the
//     phase correction theta_hat accounts for the whole gap between the
//     frequency-only NCO phase and the input,
//   - the filtered phase error is close to zero and the power estimate is
//     1.0 for the unit tone,
//   - the frequency settling time shrinks as mu grows.
// A sample is offered every other clock so the sample strobe is exercised.
module tb_dpll;
  import cs_pkg::*;

  localparam real    PI    = 3.14159265358979323846;
  localparam longint FS    = 20000;
  localparam longint FIN   = 5000;
  localparam phase_t FCW_IN = hz_to_fcw(FIN, FS);
  localparam phase_t TH_IN  = phase_t'(32'h1000_0000);  // pi/8
  localparam int     NSAMP = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t xi, xq;
  logic [15:0] mu_q16;
  phase_t est_fcw, est_phase, rep_phase;
  logic signed [31:0] freq_err;
  sample_t rep_sin, rep_cos;
  logic signed [17:0] phase_err;
  logic [39:0] sig_pow;

  int checks = 0, failures = 0;

  dpll dut (.clk, .rst_n, .in_valid, .xi, .xq, .mu_q16,
            .est_fcw, .freq_err, .est_phase, .rep_phase, .rep_sin, .rep_cos,
            .phase_err, .sig_pow);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap_deg(input phase_t a, input phase_t b);
    logic signed [31:0] d;
    d = $signed(a - b);
    return real'(d) * 360.0 / 4294967296.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one acquisition; returns the frequency settling time in samples.
  task automatic run(input logic [15:0] mu, output int settle);
    phase_t ph_in;
    real    ferr_hz, perr_deg, th_deg;
    mu_q16   = mu;
    rst_n    = 0;
    in_valid = 0;
    xi = '0; xq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    settle = 0;
    ph_in = TH_IN;
    for (int n = 0; n < NSAMP; n++) begin
      real a;
      a  = 2.0 * PI * real'(ph_in) / 4294967296.0;
      xi = sample_t'($rtoi($floor(16383.0 * $cos(a) + 0.5)));
      xq = sample_t'($rtoi($floor(16383.0 * $sin(a) + 0.5)));
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      ph_in += FCW_IN;
      ferr_hz = real'($signed(est_fcw - FCW_IN)) * real'(FS) / 4294967296.0;
      if (ferr_hz > 5.0 || ferr_hz < -5.0) settle = n + 1;
      @(posedge clk); #1;
    end
    // ph_in now is the phase of the next, not yet offered, sample: that is
    // what the replica NCO shows after the last update.
    ferr_hz  = real'($signed(est_fcw - FCW_IN)) * real'(FS) / 4294967296.0;
    perr_deg = wrap_deg(rep_phase, ph_in);
    th_deg   = wrap_deg(est_phase, ph_in - phase_t'(dut.u_pe.u_nco.acc));
    $display("mu=%0.4f settle=%0d samples  f_err=%0.3f Hz  phase_err=%0.3f deg  theta_hat=%0.2f deg",
             real'(mu) / 65536.0, settle, ferr_hz, perr_deg, real'(est_phase) * 360.0 / 4294967296.0);
    check(ferr_hz < 2.0 && ferr_hz > -2.0, $sformatf("frequency estimate off by %f Hz", ferr_hz));
    check(perr_deg < 1.0 && perr_deg > -1.0, $sformatf("replica phase off by %f deg", perr_deg));
    check(th_deg < 1.0 && th_deg > -1.0, "theta_hat does not close the gap to the input phase");
    check(phase_err < 18'sd80 && phase_err > -18'sd80, "filtered phase error not near zero at lock");
    check(settle < NSAMP / 2, "frequency did not settle in the first half of the run");
    check(real'(sig_pow) / 268435456.0 > 0.99 && real'(sig_pow) / 268435456.0 < 1.01,
          "power estimate of the unit tone not 1.0");
  endtask

  int s_small, s_mid, s_big;

  initial begin
    run(16'd1311,  s_small);  // mu = 0.02
    run(16'd3277,  s_mid);    // mu = 0.05
    run(16'd13107, s_big);    // mu = 0.2
    check(s_small > s_mid && s_mid > s_big, "settling time does not fall as mu grows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
