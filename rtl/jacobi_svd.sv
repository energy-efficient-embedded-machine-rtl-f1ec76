// jacobi_svd: Jacobi singular value decomposition engine with approximate
// rotation multipliers.
//
// Flow for an N x N input matrix A (AW-bit signed entries):
//  1. Symmetrization: S = (A^T A) * 2^SFRAC, one exact multiply-accumulate
//     per clock (N^3 clocks), stored in a DW-bit register matrix.
//  2. For SWEEPS sweeps, for every pair p < q:
//     a. phase solve: the CORDIC in vectoring mode turns
//        (S[q][q]-S[p][p], 2*S[p][q]) into the angle 2*phi, halved to phi;
//        the CORDIC in rotation mode then gives cos(phi) and sin(phi);
//     b. pre-rotation of rows p and q of S and post-rotation of columns p and
//        q of S and of V, one element pair per clock through one
//        givens_rotator (four Approx-BW multipliers):
//          (u, v) -> (c*u - s*v, s*u + c*v).
//     The rotation R S R^T with tan(2*phi) = 2 S[p][q] / (S[q][q] - S[p][p])
//     clears S[p][q]. After the sweeps the diagonal of S holds the
//     eigenvalues of A^T A (the squared singular values of A) and the columns
//     of V (started as the identity) the right singular vectors.
// Symmetrization, storage of the symmetric matrix, a CORDIC phase solver in
// vectoring and rotation mode, pre- and post-rotation blocks with approximate
// Baugh-Wooley multipliers and exact adders follow the published approximate
// SVD; so does a fixed stopping point of a few sweeps ("five to ten iterations"
// reach convergence). The sweep order, fixed-point formats (S in DW-bit words
// with SFRAC fraction bits, V and cos/sin with DW-2 fraction bits, i.e. Q2.30
// for the default 32-bit words, so the 64-bit rotation products can take the
// published 8 to 28 inexact columns), the single shared rotator
// and the load/read ports are this design's choices. The CORDIC here uses
// exact adders by default, standing in for the exact CORDIC the published SVD
// used.
// The CORDIC's init and load state flags are not needed here (only done is
// used), so lint reports them unused.
// Interface: write A through wr_en/wr_row/wr_col/wr_data while idle; pulse
// start; busy stays high until done pulses for one clock. rd_v = 0 reads S,
// rd_v = 1 reads V, at (rd_row, rd_col), combinationally. Synchronous
// active-high reset.
module jacobi_svd
  import approx_pkg::*;
#(
  parameter int          N           = 8,
  parameter int          AW          = 8,
  parameter int          DW          = 32,
  parameter int          SFRAC       = 8,
  parameter int          SWEEPS      = 6,
  parameter int          K           = 20,
  parameter adder_kind_e CORDIC_KIND = ADD_RCA,
  localparam int         IW          = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_row,
  input  logic [IW-1:0] wr_col,
  input  logic [AW-1:0] wr_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic          rd_v,
  input  logic [IW-1:0] rd_row,
  input  logic [IW-1:0] rd_col,
  output logic [DW-1:0] rd_data,
  output logic [15:0]   rotations   // number of pair rotations performed
);

  typedef enum logic [3:0] {
    IDLE, SYM, ANG, ANG_W, SC, SC_W, ROW, ROW_D, COL, COL_D, VCOL, VCOL_D, NEXT, FIN
  } state_e;

  localparam int SCW = (SWEEPS > 1) ? $clog2(SWEEPS) : 1;
  localparam int ACC = 2 * AW + IW + 1;

  logic signed [AW-1:0] a_m [N][N];
  logic signed [DW-1:0] s_m [N][N];
  logic signed [DW-1:0] v_m [N][N];

  state_e           state;
  logic [IW-1:0]    p, q, i, j, kk, kw;
  logic [SCW-1:0]   sweep;
  logic signed [ACC-1:0] acc;
  logic [DW-1:0]    c_q, s_q;   // cos, sin in Q2.(DW-2)

  // ---------------- CORDIC phase solver ----------------
  logic        c_start, c_vec, c_done;
  logic [31:0] c_x, c_y, c_z, c_xo, c_yo, c_zo;
  logic        c_init, c_load;

  cordic_iter #(.W(32), .ITER(30), .K(16), .KIND(CORDIC_KIND)) u_cordic (
    .clk, .rst, .start(c_start), .vec_mode(c_vec),
    .x_in(c_x), .y_in(c_y), .z_in(c_z),
    .x_out(c_xo), .y_out(c_yo), .z_out(c_zo),
    .init(c_init), .load(c_load), .done(c_done));

  // Vectoring input: x = S[q][q]-S[p][p], y = 2*S[p][q], both negated when
  // x < 0 so that the CORDIC converges (atan(y/x) is unchanged), then shifted
  // left together until the larger magnitude reaches bit 28 of the Q2.30
  // word, which keeps the angle resolution independent of the data scale.
  localparam int EW = DW + 2;
  logic signed [EW-1:0] dx, dy, ux, uy;
  logic [EW-1:0]        mag_or;
  logic [5:0]           top;
  logic [31:0]          nx, ny;
  assign dx = EW'(s_m[q][q]) - EW'(s_m[p][p]);
  assign dy = EW'(s_m[p][q]) <<< 1;
  assign ux = dx[EW-1] ? -dx : dx;
  assign uy = dx[EW-1] ? -dy : dy;
  assign mag_or = ux | (uy[EW-1] ? -uy : uy);
  always_comb begin
    top = '0;
    for (int b = 0; b < EW; b++) if (mag_or[b]) top = 6'(b);
  end
  assign nx = (top >= 6'd28) ? 32'(ux >>> (top - 6'd28)) : 32'(ux <<< (6'd28 - top));
  assign ny = (top >= 6'd28) ? 32'(uy >>> (top - 6'd28)) : 32'(uy <<< (6'd28 - top));

  logic [31:0] half_phi;
  assign half_phi = 32'($signed(c_zo) >>> 1);

  always_comb begin
    c_start = 1'b0;
    c_vec   = 1'b0;
    c_x     = '0;
    c_y     = '0;
    c_z     = '0;
    if (state == ANG) begin
      c_start = 1'b1;
      c_vec   = 1'b1;
      c_x     = nx;
      c_y     = ny;
    end else if (state == SC) begin
      c_start = 1'b1;
      c_x     = 32'h26dd3b6a;           // 1/An = 0.6072529 in Q2.30
      // phi = (2*phi) / 2; a zero off-diagonal entry needs no rotation
      c_z     = (s_m[p][q] == '0) ? '0 : half_phi;
    end
  end

  // ---------------- shared rotator ----------------
  logic        r_in, r_out;
  logic [DW-1:0] r_x, r_y, r_xo, r_yo;

  always_comb begin
    r_in = 1'b0;
    r_x  = '0;
    r_y  = '0;
    unique case (state)
      ROW:  begin r_in = 1'b1; r_x = DW'(s_m[p][kk]); r_y = DW'(s_m[q][kk]); end
      COL:  begin r_in = 1'b1; r_x = DW'(s_m[kk][p]); r_y = DW'(s_m[kk][q]); end
      VCOL: begin r_in = 1'b1; r_x = DW'(v_m[kk][p]); r_y = DW'(v_m[kk][q]); end
      default: ;
    endcase
  end

  givens_rotator #(.DW(DW), .FRAC(DW - 2), .K(K)) u_rot (
    .clk, .rst, .in_valid(r_in), .x(r_x), .y(r_y), .c(c_q), .s(s_q),
    .out_valid(r_out), .xr(r_xo), .yr(r_yo));

  // ---------------- control ----------------
  state_e wb_state;   // phase of the element being written back
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      wb_state  <= IDLE;
      p <= '0; q <= '0; i <= '0; j <= '0; kk <= '0; kw <= '0;
      sweep     <= '0;
      acc       <= '0;
      c_q       <= '0;
      s_q       <= '0;
      rotations <= '0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          a_m[r][c] <= '0;
          s_m[r][c] <= '0;
          v_m[r][c] <= '0;
        end
    end else begin
      // write back of the rotator result issued one clock earlier
      if (r_out) begin
        unique case (wb_state)
          ROW:  begin s_m[p][kw] <= r_xo; s_m[q][kw] <= r_yo; end
          COL:  begin s_m[kw][p] <= r_xo; s_m[kw][q] <= r_yo; end
          VCOL: begin v_m[kw][p] <= r_xo; v_m[kw][q] <= r_yo; end
          default: ;
        endcase
      end
      wb_state <= state;
      kw       <= kk;

      unique case (state)
        IDLE: begin
          if (wr_en) a_m[wr_row][wr_col] <= $signed(wr_data);
          if (start) begin
            state <= SYM;
            i <= '0; j <= '0; kk <= '0;
            acc <= '0;
            rotations <= '0;
          end
        end
        // S[i][j] = sum_k A[k][i] * A[k][j], one product per clock
        SYM: begin
          logic signed [ACC-1:0] nacc;
          nacc = acc + ACC'(a_m[kk][i] * a_m[kk][j]);
          if (kk == IW'(N - 1)) begin
            s_m[i][j] <= DW'(nacc) <<< SFRAC;
            v_m[i][j] <= (i == j) ? (DW'(1) << (DW - 2)) : '0;
            acc <= '0;
            kk  <= '0;
            if (j == IW'(N - 1)) begin
              j <= '0;
              if (i == IW'(N - 1)) begin
                state <= ANG;
                p <= '0; q <= IW'(1); sweep <= '0;
              end else i <= i + 1'b1;
            end else j <= j + 1'b1;
          end else begin
            acc <= nacc;
            kk  <= kk + 1'b1;
          end
        end
        ANG:   state <= ANG_W;
        ANG_W: if (c_done) state <= SC;
        SC:    state <= SC_W;
        SC_W:  if (c_done) begin
          c_q   <= DW'($signed(c_xo) >>> (32 - DW));
          s_q   <= DW'($signed(c_yo) >>> (32 - DW));
          kk    <= '0;
          state <= ROW;
        end
        ROW:   if (kk == IW'(N - 1)) state <= ROW_D;  else kk <= kk + 1'b1;
        ROW_D: begin kk <= '0; state <= COL; end
        COL:   if (kk == IW'(N - 1)) state <= COL_D;  else kk <= kk + 1'b1;
        COL_D: begin kk <= '0; state <= VCOL; end
        VCOL:  if (kk == IW'(N - 1)) state <= VCOL_D; else kk <= kk + 1'b1;
        VCOL_D: state <= NEXT;
        NEXT: begin
          rotations <= rotations + 1'b1;
          state <= ANG;
          if (q == IW'(N - 1)) begin
            if (p == IW'(N - 2)) begin
              p <= '0; q <= IW'(1);
              if (sweep == SCW'(SWEEPS - 1)) state <= FIN;
              else sweep <= sweep + 1'b1;
            end else begin
              p <= p + 1'b1;
              q <= p + 2'd2;
            end
          end else q <= q + 1'b1;
        end
        FIN:     state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy    = (state != IDLE);
  assign done    = (state == FIN);
  assign rd_data = rd_v ? v_m[rd_row][rd_col] : s_m[rd_row][rd_col];

endmodule
