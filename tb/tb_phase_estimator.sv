// tb_phase_estimator - self-checking test of the low-noise phase estimator.
//
// The frequency word is given exactly (5 kHz at a 20 kHz sample rate, as a
// locked frequency estimator would deliver it), so the NCO accumulator
// tracks the input's phase ramp and theta_hat alone must converge to the
// input's phase offset. For several offsets (including a negative one and
// one beyond 90 degrees) the test checks, after 1500 samples, that
// theta_hat is within 1 degree of the offset, that the filtered error s_i is
// near zero, and that the NCO sine reproduces the input sample.
module tb_phase_estimator;
  import cs_pkg::*;

  localparam real    PI  = 3.14159265358979323846;
  localparam phase_t INC = hz_to_fcw(5000, 20000);

  logic clk = 0, rst_n = 0, en = 0;
  sample_t x = '0;
  phase_t fcw = INC, theta_hat, phase;
  sample_t nco_sin, nco_cos;
  logic signed [17:0] s_i;
  int checks = 0, failures = 0;

  phase_estimator dut (.clk, .rst_n, .en, .x, .fcw, .theta_hat, .phase,
                       .nco_sin, .nco_cos, .s_i);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real th_deg);
    phase_t ph;
    real a, e;
    rst_n = 0; en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ph = phase_t'(longint'(th_deg / 360.0 * 4294967296.0));
    for (int n = 0; n < 1500; n++) begin
      a  = 2.0 * PI * real'(ph) / 4294967296.0;
      x  = sample_t'($rtoi($floor(16383.0 * $sin(a) + 0.5)));
      en = 1;
      #1;
      if (n == 1499) begin
        checks++;
        if (int'(nco_sin) - int'(x) > 60 || int'(x) - int'(nco_sin) > 60) begin
          failures++;
          $display("FAIL replica %0d, input %0d", nco_sin, x);
        end
      end
      @(posedge clk); #1;
      en = 0;
      ph += INC;
    end
    e = real'($signed(theta_hat - phase_t'(longint'(th_deg / 360.0 * 4294967296.0))))
        * 360.0 / 4294967296.0;
    $display("offset %0.1f deg: theta_hat error %0.3f deg, s_i %0d", th_deg, e, s_i);
    checks++;
    if (e > 1.0 || e < -1.0) begin
      failures++;
      $display("FAIL theta_hat off by %f deg", e);
    end
    checks++;
    if (s_i > 18'sd80 || s_i < -18'sd80) begin
      failures++;
      $display("FAIL s_i = %0d at lock", s_i);
    end
  endtask

  initial begin
    run(22.5);
    run(-60.0);
    run(150.0);
    run(3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
