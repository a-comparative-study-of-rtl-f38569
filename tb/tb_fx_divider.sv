// tb_fx_divider - self-checking test of the fixed-point divider.
//
// Random numerators and denominators of several magnitudes are divided and
// compared with (num * 2^24) / den computed here in 64-bit arithmetic,
// rounded toward zero and saturated to 32 bits; a zero denominator must give
// zero. It also checks typical frequency-detector values: sin(dw) over a
// unit power must give sin(dw) in Q.24.
module tb_fx_divider;

  logic signed [39:0] num;
  logic        [39:0] den;
  logic signed [31:0] quo;
  int checks = 0, failures = 0;

  fx_divider dut (.num, .den, .quo);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_q(input longint n, input longint d);
    longint q;
    if (d == 0) return 0;
    q = (n * (longint'(1) << 24)) / d;
    if (q > 64'sd2147483647) q = 64'sd2147483647;
    if (q < -64'sd2147483648) q = -64'sd2147483648;
    return q;
  endfunction

  task automatic try(input longint n, input longint d);
    num = 40'(n);
    den = 40'(d);
    #1;
    checks++;
    if (longint'(quo) != expect_q(n, d)) begin
      failures++;
      $display("FAIL %0d / %0d = %0d, expected %0d", n, d, quo, expect_q(n, d));
    end
  endtask

  initial begin
    longint n, d;
    try(0, 0);
    try(12345, 0);
    try(1 << 28, 1 << 28);            // 1.0
    try(-(1 << 27), 1 << 28);         // -0.5
    try(longint'(0.309 * 268435456.0), 1 << 28);
    for (int i = 0; i < 3000; i++) begin
      // numerators up to 2^38 in magnitude (kept so n*2^24 fits 64 bits)
      n = longint'($signed($urandom)) <<< ($urandom % 7);
      d = longint'($urandom) >> ($urandom % 20);
      if (i % 5 == 0) d = (longint'($urandom) << 6) | 1;
      try(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
