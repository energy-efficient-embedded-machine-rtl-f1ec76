// meta_mult: META approximate multiplier (rounding-based, ETA summation).
//
// With Mr and Nr the powers of two nearest to the operand magnitudes M and N,
//   M*N = Mr*N + Nr*M - Mr*Nr + (Mr-M)*(Nr-N)
// and the last term is dropped, so the product needs only shifts, one adder
// and one subtractor. Datapath (combinational):
//   sign extractor -> rounder (one per operand) -> three shifters giving
//   Mr*N, Nr*M and Mr*Nr -> adder for the first two -> exact subtractor
//   removing Mr*Nr -> sign set.
// The adder is an error-tolerant adder (ETA) over 2N bits whose lower N bits
// are inexact; USE_ETA = 0 replaces it by an exact ripple-carry adder (the
// MRCA variant). SIGNED = 0 removes the sign extractor and sign set and takes
// unsigned operands (U-META / U-MRCA). The defaults give the signed META
// multiplier for 8-bit operands. The block structure follows the published
// META architecture; internal widths of 2N+1 bits (to hold the ETA carry-out
// and the rounding of unsigned operands to 2^N) are this design's choice. The
// result is taken modulo 2^(2N).
// Interface: combinational, a and b are N-bit operands, p the 2N-bit product.
module meta_mult
  import approx_pkg::*;
#(
  parameter int N       = 8,
  parameter bit SIGNED  = 1'b1,
  parameter bit USE_ETA = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int SW = $clog2(N + 1);
  localparam int W  = 2 * N + 1;

  logic         neg_a, neg_b;
  logic [N-1:0] mag_a, mag_b;

  if (SIGNED) begin : g_sext
    sign_extract #(.N(N)) u_sa (.x(a), .neg(neg_a), .mag(mag_a));
    sign_extract #(.N(N)) u_sb (.x(b), .neg(neg_b), .mag(mag_b));
  end else begin : g_unsigned
    assign neg_a = 1'b0;
    assign neg_b = 1'b0;
    assign mag_a = a;
    assign mag_b = b;
  end

  logic [N:0]    ar, br;        // rounded magnitudes (kept for visibility)
  logic [SW-1:0] sh_a, sh_b;

  meta_rounder #(.N(N)) u_ra (.m(mag_a), .mr(ar), .shamt(sh_a));
  meta_rounder #(.N(N)) u_rb (.m(mag_b), .mr(br), .shamt(sh_b));

  // Shifters: a zero operand has a zero rounded value, so the products are
  // gated by "rounded value non-zero".
  logic [2*N-1:0] ar_b, br_a;   // M*Nr and N*Mr stay below 2^(2N)
  logic [W-1:0]   ar_br;
  assign ar_b  = (|ar) ? ((2*N)'(mag_b) << sh_a) : '0;
  assign br_a  = (|br) ? ((2*N)'(mag_a) << sh_b) : '0;
  assign ar_br = (|br) ? (W'(ar) << sh_b) : '0;

  logic [2*N:0] add_s;
  approx_adder #(
    .N(2 * N), .K(N), .KIND(USE_ETA ? ADD_ETA : ADD_RCA)
  ) u_add (
    .a(ar_b), .b(br_a), .cin(1'b0), .sum(add_s)
  );

  logic [2*N-1:0] diff;   // product modulo 2^(2N)
  assign diff = (2*N)'(add_s - ar_br);

  if (SIGNED) begin : g_sset
    sign_set #(.W(2 * N)) u_ss (
      .mag(diff), .neg_a(neg_a), .neg_b(neg_b), .result(p)
    );
  end else begin : g_uout
    assign p = diff;
  end

endmodule
