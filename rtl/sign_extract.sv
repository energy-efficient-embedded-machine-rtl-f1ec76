// sign_extract: sign extractor in front of an unsigned approximate multiplier.
//
// Takes an N-bit two's complement operand and returns its sign bit and its
// magnitude as an N-bit unsigned number (the most negative value, -2^(N-1),
// gives 2^(N-1), which still fits). The approximate multipliers work on
// magnitudes because rounding to a power of two and the inexact column sums
// only behave well for positive numbers; sign_set restores the sign of the
// product. The magnitude is an exact two's complement negation of negative
// inputs; a plain bit inversion would give |x|-1 instead.
// Interface: combinational.
module sign_extract #(
  parameter int N = 8
) (
  input  logic [N-1:0] x,     // two's complement operand
  output logic         neg,   // operand was negative
  output logic [N-1:0] mag    // |x|
);
  assign neg = x[N-1];
  assign mag = neg ? (~x + 1'b1) : x;
endmodule
