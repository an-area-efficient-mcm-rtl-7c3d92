// mcm_29x_43x: two constant multiplications, 29x and 43x, from shifts and adders only.
//
// The worked example of the shift-add method. Each constant is read in binary, and for
// every 1 bit the input is shifted by that bit's position and added:
//     29 = 11101b : 29x = (x << 4) + (x << 3) + (x << 2) + x
//     43 = 101011b: 43x = (x << 5) + (x << 3) + (x << 1) + x
// The additions are chained as in the example's adder diagram, so each adder output is a
// named partial product: x + (x<<2) = 5x, 5x + (x<<3) = 13x, 13x + (x<<4) = 29x, and
// x + (x<<1) = 3x, 3x + (x<<3) = 11x, 11x + (x<<5) = 43x. Six adders in all; the shifts are
// wiring. The structure follows the example; the width W and signed samples are this
// design's choices.
//
// Interface: x is a signed W-bit sample; y29 = 29*x and y43 = 43*x, exact, signed W+6 bits.
// Timing: combinational.
module mcm_29x_43x #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] x,
  output logic signed [W+5:0] y29,
  output logic signed [W+5:0] y43
);

  typedef logic signed [W+5:0] wide_t;

  wide_t xw;
  wide_t x5, x13;  // partial products of the 29x chain
  wide_t x3, x11;  // partial products of the 43x chain

  assign xw  = wide_t'(x);

  assign x5  = xw  + (xw <<< 2);
  assign x13 = x5  + (xw <<< 3);
  assign y29 = x13 + (xw <<< 4);

  assign x3  = xw  + (xw <<< 1);
  assign x11 = x3  + (xw <<< 3);
  assign y43 = x11 + (xw <<< 5);

endmodule
