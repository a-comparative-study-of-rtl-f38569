// tb_lowpass_iir - self-checking test of the first-order low-pass filter.
//
// A step input must settle to the step value (unit DC gain) and reach
// 1 - 1/e of it after about 2^SHIFT samples; random inputs with random
// strobes are then compared, sample by sample, with the real-valued
// recursion y(n) = y(n-1) + (x - y(n-1))/2^SHIFT evaluated here (within two
// LSBs, the rounding of the fixed-point state).
module tb_lowpass_iir;

  localparam int W = 18, SHIFT = 3;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;

  lowpass_iir #(.W(W), .SHIFT(SHIFT)) dut (.clk, .rst_n, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real m;
  int  t63;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (y != 0) failures++;
    // Step response.
    x = 18'sd10000;
    en = 1;
    t63 = -1;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk); #1;
      if (t63 < 0 && y >= 6321) t63 = n;
    end
    checks++;
    if (y < 9995 || y > 10000) begin
      failures++;
      $display("FAIL step settles at %0d", y);
    end
    checks++;
    if (t63 < 7 || t63 > 10) begin
      failures++;
      $display("FAIL 63%% point after %0d samples, expected about %0d", t63, 1 << SHIFT);
    end
    // Random input against the real-valued recursion.
    m = real'(y);
    for (int n = 0; n < 2000; n++) begin
      x  = W'($signed($urandom_range(0, 100000)) - 50000);
      en = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (en) m = m + (real'(x) - m) / real'(1 << SHIFT);
      checks++;
      if (real'(y) - m > 2.0 || m - real'(y) > 2.0) begin
        failures++;
        $display("FAIL n=%0d y=%0d model=%f", n, y, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
