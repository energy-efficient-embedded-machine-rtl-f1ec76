// meta_rounder: rounds an unsigned operand to the nearest power of two.
//
// Output bit p of the rounded value is one when
//   - M[p] is zero, M[p-1] and M[p-2] are one and every bit above p is zero
//     (numbers of the form 3*2^(p-2) and above round up), or
//   - M[p] is one, M[p-1] is zero and every bit above p is zero (round down).
// For the three lowest bits only the second rule applies, so 3 rounds to 2.
// The rule is evaluated on the operand widened by one zero bit, so that an
// operand whose top two bits are both one rounds up to 2^N instead of giving
// zero; this extra output bit is this design's choice and is never used by
// signed operands (their magnitude is at most 2^(N-1)).
// Besides the one-hot rounded value, the block gives its base-two logarithm,
// which the META multiplier uses as a shift amount. Zero rounds to zero with
// shift amount zero (the rounded value itself then makes the products zero).
// Interface: combinational.
module meta_rounder #(
  parameter int N  = 8,
  localparam int SW = $clog2(N + 1)
) (
  input  logic [N-1:0]  m,       // unsigned operand
  output logic [N:0]    mr,      // nearest power of two (one-hot or zero)
  output logic [SW-1:0] shamt    // log2(mr)
);

  logic [N:0] mx;     // operand widened by one zero bit
  logic [N:0] zup;    // zup[p]: every bit of mx above p is zero

  assign mx = {1'b0, m};

  always_comb begin
    zup[N] = 1'b1;
    for (int p = N - 1; p >= 0; p--) zup[p] = zup[p+1] & ~mx[p+1];
  end

  always_comb begin
    for (int p = 0; p <= N; p++) begin
      if (p >= 3)
        mr[p] = ((~mx[p] & mx[p-1] & mx[p-2]) | (mx[p] & ~mx[p-1])) & zup[p];
      else if (p == 2)
        mr[p] = mx[2] & ~mx[1] & zup[2];
      else
        mr[p] = mx[p] & zup[p];
    end
  end

  always_comb begin
    shamt = '0;
    for (int p = 0; p <= N; p++) if (mr[p]) shamt = SW'(p);
  end

endmodule
