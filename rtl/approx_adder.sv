// approx_adder: N-bit adder split into an exact upper part and an inexact
// lower part of K bits.
//
// The upper N-K bits are a plain ripple-carry addition. The lower K bits are
// built from the cell kind selected by KIND:
//   AXA, NANDC, ANDC, AFA  the cell ripples from bit 0 upward; Cin enters bit 0
//                          and the carry out of bit K-1 enters the upper part.
//   LOA   sum bits are A OR B; the carry into the upper part is
//         A[K-1] AND B[K-1]; Cin is not used.
//   IPP   sum bit i is (A[i] XOR B[i]) OR (A[i-1] AND B[i-1]); the carry into
//         the upper part is A[K-1] AND B[K-1]; Cin is not used.
//   ETA   a control chain runs from bit K-1 down to bit 0: once a position has
//         both operand bits at one, that bit and every lower bit are forced to
//         one. No carry enters the upper part and Cin is not used.
//   RCA   (or K = 0) exact addition of all N bits with Cin.
// The split into two parts and every cell follow the published adder
// descriptions. The carry from the lower into the upper part of LOA and of the
// chained cells follows the general approximate-adder structure (a carry from
// the inexact block into the exact one). IPP's carry into the upper part, and
// ignoring Cin for LOA, IPP and ETA, are this design's choices.
//
// Interface: purely combinational. sum is N+1 bits, sum[N] being the carry
// out of the exact part. In LOA, IPP and ETA configurations the cin port has
// no effect, so lint reports it unused there.
module approx_adder
  import approx_pkg::*;
#(
  parameter int          N    = 16,
  parameter int          K    = 8,
  parameter adder_kind_e KIND = ADD_AFA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   sum
);

  localparam int KE = (KIND == ADD_RCA) ? 0 : K;

  if (KE == 0) begin : g_exact
    assign sum = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
  end else begin : g_split
    logic [KE-1:0] lo;     // lower (inexact) sum bits
    logic          c_up;   // carry into the exact part

    if (KIND == ADD_LOA) begin : g_loa
      assign lo   = a[KE-1:0] | b[KE-1:0];
      assign c_up = a[KE-1] & b[KE-1];
    end else if (KIND == ADD_IPP) begin : g_ipp
      logic [KE:0] gen;    // gen[i+1] = A[i] AND B[i]
      assign gen  = {a[KE-1:0] & b[KE-1:0], 1'b0};
      assign lo   = (a[KE-1:0] ^ b[KE-1:0]) | gen[KE-1:0];
      assign c_up = gen[KE];
    end else if (KIND == ADD_ETA) begin : g_eta
      logic [KE:0] ctrl;   // ctrl[i] = some bit at or above i has A = B = 1
      assign ctrl[KE] = 1'b0;
      for (genvar i = KE - 1; i >= 0; i--) begin : g_ctl
        assign ctrl[i] = ctrl[i+1] | (a[i] & b[i]);
        assign lo[i]   = (a[i] ^ b[i]) | ctrl[i];
      end
      assign c_up = 1'b0;
    end else begin : g_cells
      logic [KE:0] c;
      assign c[0] = cin;
      for (genvar i = 0; i < KE; i++) begin : g_bit
        logic [1:0] r;
        always_comb begin
          unique case (KIND)
            ADD_AXA:   r = fa_axa  (a[i], b[i], c[i]);
            ADD_NANDC: r = fa_nandc(a[i], b[i], c[i]);
            ADD_ANDC:  r = fa_andc (a[i], b[i], c[i]);
            default:   r = fa_afa  (a[i], b[i], c[i]);
          endcase
        end
        assign lo[i]  = r[0];
        assign c[i+1] = r[1];
      end
      assign c_up = c[KE];
    end

    if (KE < N) begin : g_upper
      assign sum = {({1'b0, a[N-1:KE]} + {1'b0, b[N-1:KE]} + {{(N-KE){1'b0}}, c_up}), lo};
    end else begin : g_all_lo
      assign sum = {c_up, lo};
    end
  end

endmodule
