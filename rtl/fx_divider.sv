// fx_divider - fixed-point divider d = num / den of the frequency estimator.
//
// Divides the signed frequency-detector output by the unsigned signal power
// and returns the quotient with FRAC fractional bits, so the frequency error
// no longer depends on the input amplitude. The quotient is rounded toward
// zero and saturated to QW bits. A zero denominator (no input signal) gives
// zero, so the loop holds its frequency instead of running away.
//
// Timing: purely combinational; the loop evaluates it once per sample.
// The published scheme places a divider between the detector and the accumulator;
// the word widths, saturation and divide-by-zero rule are this design's.
module fx_divider #(
  parameter int NW   = 40,  // numerator width (signed)
  parameter int DW   = 40,  // denominator width (unsigned)
  parameter int FRAC = 24,  // fractional bits added to the quotient
  parameter int QW   = 32   // quotient width (signed)
) (
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic signed [QW-1:0] quo
);

  localparam int XW = NW + FRAC;
  localparam longint QMAXL = (longint'(1) <<< (QW - 1)) - 1;
  localparam logic signed [XW:0] QMAX = (XW+1)'(QMAXL);
  localparam logic signed [XW:0] QMIN = -QMAX - 1;

  logic signed [XW-1:0] dividend;
  logic signed [XW:0]   divisor;
  logic signed [XW:0]   q;

  always_comb begin
    dividend = XW'(num) <<< FRAC;
    divisor  = (XW+1)'({1'b0, den});
    if (den == '0) q = '0;
    else           q = (XW+1)'(dividend) / divisor;
    if (q > QMAX)      quo = QW'(QMAX);
    else if (q < QMIN) quo = QW'(QMIN);
    else               quo = QW'(q);
  end

endmodule
