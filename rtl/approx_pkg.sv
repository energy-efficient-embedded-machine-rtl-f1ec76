// approx_pkg: shared types and one-bit cell functions for the approximate
// arithmetic in this design.
//
// The adder kinds name the lower-part (inexact) cells that an n-bit adder can
// use below its exact ripple-carry upper part. The one-bit cells are written as
// functions returning {carry, sum} so that adders and multipliers can chain
// them in generate loops:
//   AXA    sum = A XNOR B,              carry exact (majority)
//   NANDC  sum = (A XNOR B) XOR Cin,    carry = A NAND B
//   ANDC   sum = A XOR B XOR Cin,       carry = A AND B
//   AFA    carry = Cin OR (A AND B),    sum = carry OR (A XOR B)
// LOA, IPP and ETA act on a whole lower word and are built in approx_adder.
// AFA is this design's own cell; the others are the comparison cells that the
// CORDIC study draws from. The cell equations follow the published equations
// of each cell; the enum encoding is an arbitrary choice.
package approx_pkg;

  typedef enum logic [2:0] {
    ADD_RCA   = 3'd0,  // exact ripple carry over all bits
    ADD_AXA   = 3'd1,  // XNOR-based approximate cells
    ADD_LOA   = 3'd2,  // lower-part OR
    ADD_NANDC = 3'd3,  // NAND carry-out cells
    ADD_ANDC  = 3'd4,  // AND carry-out cells
    ADD_IPP   = 3'd5,  // input pre-processing
    ADD_AFA   = 3'd6,  // approximate full adder (proposed cell)
    ADD_ETA   = 3'd7   // error-tolerant adder (control block + carry-free sum)
  } adder_kind_e;

  // Each function returns {carry_out, sum}.
  function automatic logic [1:0] fa_exact(input logic a, input logic b, input logic c);
    return {(a & b) | (c & (a ^ b)), a ^ b ^ c};
  endfunction

  function automatic logic [1:0] fa_axa(input logic a, input logic b, input logic c);
    return {(a & b) | (c & (a ^ b)), ~(a ^ b)};
  endfunction

  function automatic logic [1:0] fa_nandc(input logic a, input logic b, input logic c);
    return {~(a & b), ~(a ^ b) ^ c};
  endfunction

  function automatic logic [1:0] fa_andc(input logic a, input logic b, input logic c);
    return {a & b, a ^ b ^ c};
  endfunction

  function automatic logic [1:0] fa_afa(input logic a, input logic b, input logic c);
    logic co;
    co = c | (a & b);
    return {co, co | (a ^ b)};
  endfunction

endpackage
