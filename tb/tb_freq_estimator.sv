// tb_freq_estimator - self-checking test of the frequency estimator loop.
//
// With the NCO centred on 6 kHz at a 20 kHz sample rate, unit complex tones
// at frequencies across the range the estimator claims (0 to half the sample
// rate, on both sides of the centre) are applied one after another from
// reset, with mu = 0.1. After 1500 samples the estimated frequency must be
// within 2 Hz of the tone and the normalised error near zero. A
// zero-amplitude input must leave the word at the centre frequency
// (divider guard).
module tb_freq_estimator;
  import cs_pkg::*;

  localparam real    PI = 3.14159265358979323846;
  localparam longint FS = 20000;

  logic clk = 0, rst_n = 0, en = 0;
  sample_t xi = '0, xq = '0;
  logic [15:0] mu_q16 = 16'd6554;
  phase_t fcw;
  logic signed [31:0] freq_err;
  logic [39:0] s_pow;
  sample_t nco_sin, nco_cos;
  int checks = 0, failures = 0;

  freq_estimator dut (.clk, .rst_n, .en, .xi, .xq, .mu_q16, .fcw, .freq_err,
                      .s_pow, .nco_sin, .nco_cos);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint f_hz, input real amp);
    phase_t ph, inc;
    real ferr, a;
    rst_n = 0; en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    inc = hz_to_fcw(f_hz, FS);
    ph = 32'h1234_5678;
    for (int n = 0; n < 1500; n++) begin
      a  = 2.0 * PI * real'(ph) / 4294967296.0;
      xi = sample_t'($rtoi($floor(amp * $cos(a) + 0.5)));
      xq = sample_t'($rtoi($floor(amp * $sin(a) + 0.5)));
      en = 1;
      @(posedge clk); #1;
      en = 0;
      ph += inc;
    end
    ferr = real'($signed(fcw - inc)) * real'(FS) / 4294967296.0;
    $display("tone %0d Hz amp %0.0f: f_err %0.3f Hz", f_hz, amp, ferr);
    checks++;
    if (amp > 0.0 && (ferr > 2.0 || ferr < -2.0)) begin
      failures++;
      $display("FAIL tone %0d Hz: estimate off by %f Hz", f_hz, ferr);
    end
    checks++;
    if (amp == 0.0 && fcw != hz_to_fcw(6000, FS)) begin
      failures++;
      $display("FAIL zero input moved the frequency word");
    end
  endtask

  initial begin
    run(5000, 16383.0);
    run(100, 16383.0);
    run(9800, 16383.0);
    run(3000, 8000.0);
    run(7000, 16383.0);
    run(1234, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
