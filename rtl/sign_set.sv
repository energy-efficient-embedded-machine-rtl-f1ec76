// sign_set: applies the product sign to an unsigned product magnitude.
//
// The product is negated (two's complement) when the two operand signs
// extracted by sign_extract differ, and passed unchanged otherwise.
// Interface: combinational; W is the product width (2N for an N x N
// multiplier).
module sign_set #(
  parameter int W = 16
) (
  input  logic [W-1:0] mag,     // unsigned product magnitude
  input  logic         neg_a,   // sign of operand A
  input  logic         neg_b,   // sign of operand B
  output logic [W-1:0] result   // signed product
);
  assign result = (neg_a ^ neg_b) ? (~mag + 1'b1) : mag;
endmodule
