// abw_array: unsigned N x N array multiplier whose K lowest product columns
// are summed with approximate full adders (AFA).
//
// Partial products are plain ANDs, a[i] & b[j], generated exactly.
// Approximate part (columns K-1 down to 0): inside a column the partial
// products are taken in order of decreasing i (a[j]b[0], a[j-1]b[1], ...) and
// chained through AFA cells, each cell adding the next partial product to the
// running sum bit, with the previous cell's carry as carry-in. The chain of
// column K-1 starts with carry-in 0; the final carry of each column is the
// carry-in of the chain of the next lower column. A column with a single
// partial product passes it through one AFA with a zero second operand. Since
// an AFA with carry-in one gives sum and carry one, as soon as two partial
// products of a column are one, that column and every lower column read one.
// Exact part (columns K up to 2N-1): exact sum of the partial products, plus
// the final carry of column K-1 entering column K.
// The column order, the AFA cells, the zero carry-in and the carry passed to
// the lower column follow the published Approx-BW description; feeding the
// carry of column K-1 also into the exact part is this design's reading of
// the carry from the inexact to the exact part of the general architecture.
// K = 0 gives an exact multiplier.
// Interface: combinational.
module abw_array
  import approx_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] lo;      // approximate column sums (bits below K)
  logic [2*N-1:0] hi;      // exact upper part
  logic           c_up;    // carry from column K-1 into column K

  always_comb begin
    logic c, s;
    logic [1:0] r;
    int   cnt;
    lo   = '0;
    c    = 1'b0;
    c_up = 1'b0;
    for (int j = K - 1; j >= 0; j--) begin
      s   = 1'b0;
      cnt = 0;
      for (int i = N - 1; i >= 0; i--) begin
        if (j - i >= 0 && j - i < N) begin
          if (cnt == 0) begin
            s = a[i] & b[j-i];
          end else begin
            r = fa_afa(a[i] & b[j-i], s, c);
            s = r[0];
            c = r[1];
          end
          cnt++;
        end
      end
      if (cnt == 1) begin
        r = fa_afa(s, 1'b0, c);
        s = r[0];
        c = r[1];
      end
      lo[j] = s;
      if (j == K - 1) c_up = c;
    end
  end

  always_comb begin
    hi = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j >= K && a[i] && b[j]) hi = hi + ((2*N)'(1) << (i + j));
    if (K > 0 && K < 2 * N && c_up) hi = hi + ((2*N)'(1) << K);
  end

  // hi has no bits below column K and lo none at or above it.
  assign p = hi | lo;

endmodule
