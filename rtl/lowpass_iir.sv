// lowpass_iir - first-order low-pass filter (one-pole IIR).
//
//     y(n) = y(n-1) + 2^-SHIFT * (x(n) - y(n-1))
//
// The state keeps SHIFT extra fractional bits so small inputs are not lost:
// acc <= acc + x - (acc >>> SHIFT), y = acc >>> SHIFT. The DC gain is one
// and the time constant about 2^SHIFT samples.
//
// Timing: y is the registered state (one sample of delay); it advances on
// the clock edge where en is high. Synchronous active-low reset clears it.
// The published scheme asks for a first-order LPF in the phase estimator and for
// arm filters in the Costas loop; the one-pole form with a power-of-two
// coefficient is this design's choice.
module lowpass_iir #(
  parameter int W     = 18,  // input / output width
  parameter int SHIFT = 3    // filter coefficient is 2^-SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W+SHIFT:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc + (W+SHIFT+1)'(x) - (acc >>> SHIFT);
  end

  assign y = W'(acc >>> SHIFT);

endmodule
