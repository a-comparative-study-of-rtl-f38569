// tb_freq_detector - self-checking test of the DPLL frequency detector.
//
// Part 1 drives random samples and compares rx_i, rx_q, d_num and s_pow
// with an integer model kept here (mixing, first difference, cross products,
// squaring). Part 2 feeds a unit tone and an NCO tone whose frequencies
// differ by dw radians per sample and checks that d_num/s_pow is close to
// sin(dw) and s_pow close to one, for offsets of both signs.
module tb_freq_detector;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  sample_t xi = '0, xq = '0, nco_cos = '0, nco_sin = '0;
  logic signed [17:0] rx_i, rx_q;
  logic signed [39:0] d_num;
  logic [39:0] s_pow;
  int checks = 0, failures = 0;

  freq_detector dut (.clk, .rst_n, .en, .xi, .xq, .nco_cos, .nco_sin,
                     .rx_i, .rx_q, .d_num, .s_pow);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q14(input real v);
    return sample_t'($rtoi($floor(16383.0 * v + 0.5)));
  endfunction

  longint pi_d, pq_d;  // model's previous rx_i, rx_q

  initial begin
    longint ei, eq, ed, es;
    real dw, ratio;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    pi_d = 0; pq_d = 0;
    for (int n = 0; n < 2000; n++) begin
      xi = sample_t'($signed($urandom_range(0, 40000)) - 20000);
      xq = sample_t'($signed($urandom_range(0, 40000)) - 20000);
      nco_cos = sample_t'($signed($urandom_range(0, 32768)) - 16384);
      nco_sin = sample_t'($signed($urandom_range(0, 32768)) - 16384);
      en = ($urandom % 4) != 0;
      #1;
      ei = (longint'(xi) * nco_cos + longint'(xq) * nco_sin) >>> 14;
      eq = (longint'(xi) * nco_sin - longint'(xq) * nco_cos) >>> 14;
      ed = eq * (ei - pi_d) - ei * (eq - pq_d);
      es = ei * ei + eq * eq;
      checks++;
      if (longint'(rx_i) != ei || longint'(rx_q) != eq ||
          longint'(d_num) != ed || longint'(s_pow) != es) begin
        failures++;
        $display("FAIL n=%0d rx=%0d,%0d d=%0d s=%0d expected %0d,%0d,%0d,%0d",
                 n, rx_i, rx_q, d_num, s_pow, ei, eq, ed, es);
      end
      @(posedge clk); #1;
      if (en) begin pi_d = ei; pq_d = eq; end
    end
    // Tones.
    en = 1;
    foreach (dws[j]) begin
      dw = dws[j];
      for (int n = 0; n < 50; n++) begin
        xi = q14($cos(0.7 * n + dw * n + 0.3));
        xq = q14($sin(0.7 * n + dw * n + 0.3));
        nco_cos = q14($cos(0.7 * n));
        nco_sin = q14($sin(0.7 * n));
        #1;
        if (n > 2) begin
          ratio = real'(d_num) / real'(s_pow);
          checks++;
          if (ratio - $sin(dw) > 0.002 || $sin(dw) - ratio > 0.002 ||
              real'(s_pow) / 268435456.0 > 1.001 || real'(s_pow) / 268435456.0 < 0.998) begin
            failures++;
            $display("FAIL dw=%f ratio=%f expected %f power=%f", dw, ratio, $sin(dw),
                     real'(s_pow) / 268435456.0);
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real dws[5] = '{0.0, 0.01, -0.314, 1.2, -2.5};

endmodule
