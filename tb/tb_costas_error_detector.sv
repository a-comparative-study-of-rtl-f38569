// tb_costas_error_detector - self-checking test of the Costas limiters and
// error signal.
//
// For random arm signals (and the zero corner) it checks l_i = sign(z_i),
// l_q = sign(z_q) (0 in BPSK mode) and err = z_q*l_i - z_i*l_q, computed here
// with integer arithmetic; then that for unit symbols rotated by a small
// phase phi the error is close to 2*sin(phi).
module tb_costas_error_detector;

  logic signed [17:0] z_i, z_q;
  logic bpsk;
  logic signed [1:0] l_i, l_q;
  logic signed [18:0] err;
  int checks = 0, failures = 0;

  costas_error_detector dut (.z_i, .z_q, .bpsk, .l_i, .l_q, .err);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq, ee;
    real phi;
    for (int i = 0; i < 3000; i++) begin
      z_i  = 18'($urandom);
      z_q  = 18'($urandom);
      if (i == 0) begin z_i = '0; z_q = '0; end
      bpsk = (i % 3) == 0;
      #1;
      ei = (z_i < 0) ? -1 : 1;
      eq = bpsk ? 0 : ((z_q < 0) ? -1 : 1);
      ee = int'(z_q) * ei - int'(z_i) * eq;
      checks++;
      if (int'(l_i) != ei || int'(l_q) != eq || int'(err) != ee) begin
        failures++;
        $display("FAIL zi=%0d zq=%0d bpsk=%0d: l=%0d,%0d err=%0d expected %0d,%0d,%0d",
                 z_i, z_q, bpsk, l_i, l_q, err, ei, eq, ee);
      end
    end
    // Unit QPSK symbols (I=1, Q=-1) rotated by phi.
    bpsk = 0;
    for (int k = -8; k <= 8; k++) begin
      phi = real'(k) * 0.05;
      z_i = 18'($rtoi(16384.0 * ($cos(phi) + $sin(phi))));
      z_q = 18'($rtoi(16384.0 * ($sin(phi) - $cos(phi))));
      #1;
      checks++;
      if (real'(err) - 32768.0 * $sin(phi) > 4.0 || 32768.0 * $sin(phi) - real'(err) > 4.0) begin
        failures++;
        $display("FAIL phi=%f err=%0d expected %f", phi, err, 32768.0 * $sin(phi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
