// tb_freq_accumulator - self-checking test of the step-size scaling and
// accumulator of the frequency estimator.
//
// After reset the word must be the centre frequency (6 kHz at 20 kHz). Then
// random errors d and step sizes mu are applied with random strobes, and the
// word is compared with a real-valued model of c += mu*d*2^32/(2*pi), kept
// modulo 2^32 (within 4 LSBs plus 1e-7 of the step, the rounding of the
// radians-to-phase-word constant). Finally
// mu = 0 must freeze the word.
module tb_freq_accumulator;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [31:0] d = '0;
  logic [15:0] mu_q16 = '0;
  phase_t c;
  int checks = 0, failures = 0;

  freq_accumulator dut (.clk, .rst_n, .en, .d, .mu_q16, .c);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, diff, step;
    phase_t hold;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (c != 32'd1288490189) begin  // round(0.3 * 2^32)
      failures++;
      $display("FAIL reset value %0d", c);
    end
    m = real'(c);
    for (int n = 0; n < 3000; n++) begin
      d      = 32'($signed($urandom)) >>> ($urandom % 24);
      mu_q16 = 16'($urandom);
      en     = ($urandom % 4) != 0;
      @(posedge clk); #1;
      step = en ? real'(mu_q16) / 65536.0 * real'(d) / 16777216.0 * 4294967296.0 / (2.0 * PI) : 0.0;
      m += step;
      while (m >= 4294967296.0) m -= 4294967296.0;
      while (m < 0.0) m += 4294967296.0;
      diff = real'(c) - m;
      if (diff > 2147483648.0) diff -= 4294967296.0;
      if (diff < -2147483648.0) diff += 4294967296.0;
      checks++;
      // 2^24/(2*pi) is held to 24 bits: allow 1e-7 of the step plus rounding.
      if (step < 0.0) step = -step;
      if (diff > 4.0 + 1e-7 * step || diff < -4.0 - 1e-7 * step) begin
        failures++;
        $display("FAIL n=%0d c=%0d model=%f", n, c, m);
      end
      m = real'(c);  // re-align so rounding does not pile up
    end
    mu_q16 = '0;
    hold = c;
    en = 1;
    repeat (20) begin
      d = 32'($urandom);
      @(posedge clk); #1;
    end
    checks++;
    if (c != hold) begin
      failures++;
      $display("FAIL mu=0 moved the word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
