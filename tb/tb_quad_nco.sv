// tb_quad_nco - self-checking test of the quadrature NCO.
//
// Drives random frequency words and phase offsets, with the sample strobe on
// about three samples in four, and checks every cycle against a model kept
// in the testbench: the phase must equal the running sum of the accepted
// frequency words plus the offset, and sine and cosine must equal
// round(16384*sin/cos(2*pi*k/4096)) for the table index k nearest that
// phase, computed here with $sin/$cos.
module tb_quad_nco;
  import cs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  phase_t fcw = '0, phase_ofs = '0, phase;
  sample_t sin_o, cos_o;
  int checks = 0, failures = 0;

  quad_nco dut (.clk, .rst_n, .en, .fcw, .phase_ofs, .phase, .sin_o, .cos_o);

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(input phase_t p, input bit is_cos);
    longint k;
    real a, r;
    k = (longint'(p) + (longint'(1) << 19)) >> 20;  // nearest of 4096 steps
    a = 2.0 * PI * real'(k) / 4096.0;
    r = (is_cos ? $cos(a) : $sin(a)) * 16384.0;
    return $rtoi(r >= 0.0 ? r + 0.5 : r - 0.5);
  endfunction

  phase_t model;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    for (int i = 0; i < 3000; i++) begin
      fcw       = (i < 1000) ? phase_t'(32'd12345678) : phase_t'($urandom);
      phase_ofs = (i % 7 == 0) ? phase_t'($urandom) : phase_ofs;
      en        = ($urandom % 4) != 0;
      #1;
      checks++;
      if (phase !== model + phase_ofs) begin
        failures++;
        $display("FAIL phase %h expected %h", phase, model + phase_ofs);
      end
      checks++;
      if (int'(sin_o) != ref_val(phase, 1'b0) || int'(cos_o) != ref_val(phase, 1'b1)) begin
        failures++;
        $display("FAIL at phase %h: sin %0d/%0d cos %0d/%0d", phase,
                 sin_o, ref_val(phase, 1'b0), cos_o, ref_val(phase, 1'b1));
      end
      @(posedge clk); #1;
      if (en) model += fcw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
