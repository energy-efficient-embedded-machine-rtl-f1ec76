// givens_rotator: plane-rotation unit of the Jacobi SVD (pre-/post-rotation
// block) with four approximate multipliers.
//
// For a pair of values (x, y) taken from two rows (pre-rotation) or two
// columns (post-rotation) of the matrix and the cosine c and sine s of the
// rotation angle, it computes
//   x' = c*x - s*y,   y' = s*x + c*y
// with four Approx-BW multipliers (K inexact low product columns) and exact
// adders and subtractors. c and s are signed fixed point with FRAC fractional
// bits; the sums are shifted right by FRAC bits, rounded to nearest, back to
// the data format. The four multipliers per rotation block, the use of Approx-BW in
// them and exact adders/subtractors follow the published approximate SVD.
// The defaults are this design's choices where the description gives no
// number: 32-bit data and 32-bit Q2.30 cosine/sine (the format the CORDIC
// phase solver delivers), so the 64-bit products take the published range of
// 8 to 28 inexact columns; K = 20 is the largest setting reported to keep the
// singular values usable.
// Interface: in_valid qualifies x, y, c, s; the rotated pair appears on
// xr, yr with out_valid one clock later (one register stage). Synchronous
// active-high reset clears out_valid.
module givens_rotator #(
  parameter int DW   = 32,
  parameter int FRAC = 30,
  parameter int K    = 20
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] y,
  input  logic [DW-1:0] c,
  input  logic [DW-1:0] s,
  output logic          out_valid,
  output logic [DW-1:0] xr,
  output logic [DW-1:0] yr
);

  localparam int PW = 2 * DW;

  logic [PW-1:0] cx, sy, sx, cy;

  approx_bw_mult #(.N(DW), .K(K)) u_cx (.a(c), .b(x), .p(cx));
  approx_bw_mult #(.N(DW), .K(K)) u_sy (.a(s), .b(y), .p(sy));
  approx_bw_mult #(.N(DW), .K(K)) u_sx (.a(s), .b(x), .p(sx));
  approx_bw_mult #(.N(DW), .K(K)) u_cy (.a(c), .b(y), .p(cy));

  // sums plus one half LSB of the result, so that the shift rounds to nearest
  // (plain truncation biases every rotation downwards, and the bias builds
  // up over the sweeps of the SVD)
  localparam logic signed [PW-1:0] HALF = PW'(1) << (FRAC - 1);
  logic signed [PW-1:0] xn, yn;
  assign xn = $signed(cx) - $signed(sy) + HALF;
  assign yn = $signed(sx) + $signed(cy) + HALF;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      xr        <= '0;
      yr        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xr <= DW'(xn >>> FRAC);
        yr <= DW'(yn >>> FRAC);
      end
    end
  end

endmodule
