// tb_costas_loop - self-checking test of the Costas loop at the operating
// point used to evaluate it: carrier 500 kHz, sample rate 20 MHz.
//
// The received carrier is 2 kHz above the loop's centre frequency and starts
// 30 degrees out of phase. It is generated with $sin/$cos from random symbols
// of 100 samples each. Two runs:
//   - four-phase mode: x = I*sin + Q*cos with I, Q = +/-1 (amplitude 0.7);
//   - BPSK mode: x = I*sin with I = +/-1.
// After 60 symbols for acquisition, the test checks at the middle of every
// further symbol that the decisions (l_i, l_q) equal the sent symbols up to
// one fixed rotation (the loop's 90 or 180 degree ambiguity), that the loop's
// frequency word, averaged over the last four symbols, is within 500 Hz of the carrier, and that the LO phase is
// within 10 degrees of the carrier phase modulo that ambiguity.
module tb_costas_loop;
  import cs_pkg::*;

  localparam real    PI     = 3.14159265358979323846;
  localparam longint FS     = 20000000;
  localparam longint FIN    = 502000;
  localparam phase_t FCW_IN = hz_to_fcw(FIN, FS);
  localparam phase_t TH_IN  = phase_t'(32'd357913941);  // 30 degrees
  localparam int     SYM    = 100;  // samples per symbol
  localparam int     NSYM   = 120;
  localparam int     ACQ    = 60;   // symbols left for acquisition

  logic clk = 0, rst_n = 0, en = 0, bpsk = 0;
  sample_t x;
  logic signed [17:0] z_i, z_q;
  logic signed [1:0]  l_i, l_q;
  logic signed [18:0] err;
  phase_t fcw, lo_phase;
  sample_t lo_sin, lo_cos;

  int checks = 0, failures = 0;

  costas_loop dut (.clk, .rst_n, .en, .x, .bpsk, .z_i, .z_q, .l_i, .l_q, .err,
                   .fcw, .lo_phase, .lo_sin, .lo_cos);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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

  // Decision expected for sent symbols (si, sq) when the loop sits k quarter
  // turns behind the carrier: z rotates by phi = k*90 degrees.
  function automatic void rotate(input int si, input int sq, input int k,
                                 output int ri, output int rq);
    case (k)
      0: begin ri =  si; rq =  sq; end
      1: begin ri = -sq; rq =  si; end
      2: begin ri = -si; rq = -sq; end
      default: begin ri =  sq; rq = -si; end
    endcase
  endfunction

  task automatic run(input bit mode_bpsk);
    phase_t ph_in;
    int si, sq, k, ri, rq, bad;
    real amp, ferr_hz, pdeg, step, fsum;
    bpsk  = mode_bpsk;
    amp   = mode_bpsk ? 16000.0 : 11500.0;
    step  = mode_bpsk ? 180.0 : 90.0;
    rst_n = 0; en = 0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    ph_in = TH_IN;
    k = -1;
    bad = 0;
    fsum = 0.0;
    for (int s = 0; s < NSYM; s++) begin
      si = ($urandom % 2) ? 1 : -1;
      sq = mode_bpsk ? 0 : (($urandom % 2) ? 1 : -1);
      for (int n = 0; n < SYM; n++) begin
        real a;
        a  = 2.0 * PI * real'(ph_in) / 4294967296.0;
        x  = sample_t'($rtoi($floor(amp * (real'(si) * $sin(a) + real'(sq) * $cos(a)) + 0.5)));
        en = 1;
        @(posedge clk); #1;
        en = 0;
        ph_in += FCW_IN;
        if (s >= NSYM - 4) fsum += real'($signed(fcw - FCW_IN));
        if (s >= ACQ && n == SYM * 3 / 4) begin
          if (k < 0) begin
            // Find the rotation from the first checked symbol.
            for (int j = 0; j < 4; j++) begin
              rotate(si, sq, j, ri, rq);
              if (mode_bpsk) rq = 0;
              if (k < 0 && ri == int'(l_i) && rq == int'(l_q)) k = j;
            end
            check(k >= 0, "decision matches no rotation of the sent symbol");
          end else begin
            rotate(si, sq, k, ri, rq);
            if (mode_bpsk) rq = 0;
            checks++;
            if (ri != int'(l_i) || rq != int'(l_q)) begin
              failures++;
              bad++;
            end
          end
        end
      end
    end
    ferr_hz = fsum / real'(4 * SYM) * real'(FS) / 4294967296.0;
    pdeg = real'($signed(ph_in - lo_phase)) * 360.0 / 4294967296.0;
    // Fold the phase error into (-step/2, step/2].
    while (pdeg >  step / 2.0) pdeg -= step;
    while (pdeg <= -step / 2.0) pdeg += step;
    $display("bpsk=%0d rotation=%0d wrong decisions=%0d f_err=%0.1f Hz phase_err=%0.2f deg",
             mode_bpsk, k, bad, ferr_hz, pdeg);
    check(ferr_hz < 500.0 && ferr_hz > -500.0, "loop frequency not at the carrier");
    check(pdeg < 10.0 && pdeg > -10.0, "LO phase not locked to the carrier");
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
