// ipu_mad: the multiply-add unit of an IPU compute lane.
//
// Combinational, one result per cycle: y = ((a * b) +/- c) >>> fshift, with
// a and b signed 16-bit, c and y 32-bit.  The 16x16 multiply and 32-bit
// add/subtract follow the published lane description; the optional
// fractional shift sets the radix point of fixed-point results (0..15 bit
// positions, arithmetic).  Signed operands are this design's choice.
module ipu_mad
  import ipu_pkg::*;
(
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [2*W-1:0] c,
  input  logic           sub,
  input  logic [3:0]     fshift,
  output logic [2*W-1:0] y
);
  logic signed [2*W-1:0] prod, acc;
  assign prod = $signed(a) * $signed(b);
  assign acc  = sub ? prod - $signed(c) : prod + $signed(c);
  assign y    = acc >>> fshift;
endmodule
