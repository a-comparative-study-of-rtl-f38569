// tb_phase_detector - self-checking test of the low-noise phase detector.
//
// Random input and NCO samples are compared with ((x - sin)*cos) >> 14
// worked out here; then, for an input tone and an NCO at the same frequency
// with a known phase difference, the average of s_d over a whole number of
// periods must be (1/2)*sin(theta_i - theta_hat) and the detector output must
// swing far less than the plain product x*cos would.
module tb_phase_detector;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  sample_t x, nco_sin, nco_cos;
  logic signed [17:0] s_d;
  int checks = 0, failures = 0;

  phase_detector dut (.x, .nco_sin, .nco_cos, .s_d);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, pk, pk_plain, th, a, v;
    longint e;
    for (int i = 0; i < 2000; i++) begin
      x       = sample_t'($urandom);
      nco_sin = sample_t'($signed($urandom_range(0, 32768)) - 16384);
      nco_cos = sample_t'($signed($urandom_range(0, 32768)) - 16384);
      #1;
      e = ((longint'(x) - longint'(nco_sin)) * longint'(nco_cos)) >>> 14;
      checks++;
      if (longint'(s_d) != e) begin
        failures++;
        $display("FAIL x=%0d s=%0d c=%0d: %0d expected %0d", x, nco_sin, nco_cos, s_d, e);
      end
    end
    foreach (th_list[j]) begin
      th = th_list[j];
      sum = 0.0; pk = 0.0; pk_plain = 0.0;
      for (int n = 0; n < 400; n++) begin
        a = 2.0 * PI * real'(n) / 40.0;
        x       = sample_t'($rtoi($floor(16383.0 * $sin(a + th) + 0.5)));
        nco_sin = sample_t'($rtoi($floor(16383.0 * $sin(a) + 0.5)));
        nco_cos = sample_t'($rtoi($floor(16383.0 * $cos(a) + 0.5)));
        #1;
        sum += real'(s_d);
        v = real'(s_d) - 8192.0 * $sin(th);
        if (v < 0) v = -v;
        if (v > pk) pk = v;
        v = real'(x) * real'(nco_cos) / 16384.0 - 8192.0 * $sin(th);
        if (v < 0) v = -v;
        if (v > pk_plain) pk_plain = v;
      end
      sum /= 400.0;
      checks++;
      if (sum - 8192.0 * $sin(th) > 20.0 || 8192.0 * $sin(th) - sum > 20.0) begin
        failures++;
        $display("FAIL th=%f mean %f expected %f", th, sum, 8192.0 * $sin(th));
      end
      checks++;
      if (pk > 0.5 * pk_plain) begin
        failures++;
        $display("FAIL th=%f ripple %f not below plain product ripple %f", th, pk, pk_plain);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real th_list[4] = '{0.05, -0.1, 0.3927, -0.3};

endmodule
