// approx_bw_mult: approximate signed multiplier (Approx-BW).
//
// A signed N x N multiplier built as sign extractor -> unsigned array
// multiplier with K approximate low columns (abw_array, AFA cells) -> sign
// set. The upper 2N-K product columns are exact; the lower K columns use the
// approximate full adder chain, which saturates a column and every column
// below it to one once two of its partial products are one. The defaults,
// N = 8 and K = 8, are the configuration the design was evaluated in; K is the
// imprecision parameter (K = 0 makes the multiplier exact). SIGNED = 0 drops
// the sign handling and takes unsigned operands.
// Interface: combinational, a and b are N-bit operands, p the 2N-bit product.
module approx_bw_mult #(
  parameter int N      = 8,
  parameter int K      = 8,
  parameter bit SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic         neg_a, neg_b;
  logic [N-1:0] mag_a, mag_b;
  logic [2*N-1:0] pm;

  if (SIGNED) begin : g_sext
    sign_extract #(.N(N)) u_sa (.x(a), .neg(neg_a), .mag(mag_a));
    sign_extract #(.N(N)) u_sb (.x(b), .neg(neg_b), .mag(mag_b));
  end else begin : g_unsigned
    assign neg_a = 1'b0;
    assign neg_b = 1'b0;
    assign mag_a = a;
    assign mag_b = b;
  end

  abw_array #(.N(N), .K(K)) u_arr (.a(mag_a), .b(mag_b), .p(pm));

  if (SIGNED) begin : g_sset
    sign_set #(.W(2 * N)) u_ss (.mag(pm), .neg_a(neg_a), .neg_b(neg_b), .result(p));
  end else begin : g_uout
    assign p = pm;
  end

endmodule
