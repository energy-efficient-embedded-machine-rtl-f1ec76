// cordic_iter: iterative CORDIC with approximate adders, rotation and
// vectoring mode.
//
// One shift-add unit per component (x, y, z): each holds a register, a
// multiplexer choosing between the start value and the last result, a shifter
// and an adder/subtractor. The micro-rotation angles atan(2^-i),
// i = 0 .. ITER-1, come from a small constant table. Per iteration i:
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// with d = +1 when z >= 0 (rotation mode) or when y < 0 (vectoring mode) and
// d = -1 otherwise. Rotation mode started from (1/An, 0, angle), with
// 1/An = 0.6072529, returns cos(angle) in x and sin(angle) in y; vectoring
// mode returns An*sqrt(x0^2+y0^2) in x and z0 + atan(y0/x0) in z.
// The three adders are approx_adder instances of kind KIND with K inexact
// low bits; subtraction adds the bit-inverted operand with carry-in one (the
// carry-in is lost in the LOA and ETA lower parts, an error of one LSB). The
// defaults are the published main configuration: 32-bit words, 30 table
// entries, lower-part-OR adders. The number of inexact bits (16, half the
// word, as in the evenly split ETA) is this design's choice, as are the
// fixed-point format, Q2.30 (angles in radians), the vectoring mode input and
// the synchronous reset. The x, y and z registers keep W bits: the carry out
// of each adder (sum bit W) is dropped, as in two's complement arithmetic, and
// lint reports that bit unused.
// Control: three states. S0 (init high) waits; start loads x_in, y_in, z_in
// and moves to S1 (load high), which runs one iteration per clock for ITER
// clocks; S2 (done high) lasts one clock, then the block returns to S0. The
// result stays in x_out, y_out, z_out until the next start, so done rises
// ITER + 1 clocks after start is taken.
module cordic_iter
  import approx_pkg::*;
#(
  parameter int          W    = 32,
  parameter int          ITER = 30,
  parameter int          K    = 16,
  parameter adder_kind_e KIND = ADD_LOA
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         start,
  input  logic         vec_mode, // 0: rotation, 1: vectoring (taken at start)
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  input  logic [W-1:0] z_in,
  output logic [W-1:0] x_out,
  output logic [W-1:0] y_out,
  output logic [W-1:0] z_out,
  output logic         init,
  output logic         load,
  output logic         done
);

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} state_e;

  localparam int CW = $clog2(ITER + 1);

  // atan(2^-i) in Q2.30, i = 0 .. 29, rounded to nearest.
  localparam logic [31:0] ATAN_Q30 [30] = '{
    32'h3243f6a9, 32'h1dac6705, 32'h0fadbafd, 32'h07f56ea7, 32'h03feab77,
    32'h01ffd55c, 32'h00fffaab, 32'h007fff55, 32'h003fffeb, 32'h001ffffd,
    32'h00100000, 32'h00080000, 32'h00040000, 32'h00020000, 32'h00010000,
    32'h00008000, 32'h00004000, 32'h00002000, 32'h00001000, 32'h00000800,
    32'h00000400, 32'h00000200, 32'h00000100, 32'h00000080, 32'h00000040,
    32'h00000020, 32'h00000010, 32'h00000008, 32'h00000004, 32'h00000002};

  state_e        state;
  logic [CW-1:0] count;
  logic          mode_q;
  logic [W-1:0]  xr, yr, zr;

  // Micro-rotation angle for the current count, scaled to W bits.
  logic [W-1:0] atan_i;
  always_comb begin
    logic [31:0] t;
    t = (32'(count) < 32'd30) ? ATAN_Q30[count] : 32'd0;
    atan_i = W'(t >> (32 - W));
  end

  logic         d_pos;   // d = +1
  logic [W-1:0] ysh, xsh;
  assign d_pos = mode_q ? yr[W-1] : ~zr[W-1];
  assign ysh   = W'($signed(yr) >>> count);
  assign xsh   = W'($signed(xr) >>> count);

  logic [W:0] xs, ys, zs;
  approx_adder #(.N(W), .K(K), .KIND(KIND)) u_addx (
    .a(xr), .b(d_pos ? ~ysh : ysh), .cin(d_pos), .sum(xs));
  approx_adder #(.N(W), .K(K), .KIND(KIND)) u_addy (
    .a(yr), .b(d_pos ? xsh : ~xsh), .cin(~d_pos), .sum(ys));
  approx_adder #(.N(W), .K(K), .KIND(KIND)) u_addz (
    .a(zr), .b(d_pos ? ~atan_i : atan_i), .cin(d_pos), .sum(zs));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S0;
      count  <= '0;
      mode_q <= 1'b0;
      xr     <= '0;
      yr     <= '0;
      zr     <= '0;
    end else begin
      unique case (state)
        S0: if (start) begin
          xr     <= x_in;
          yr     <= y_in;
          zr     <= z_in;
          mode_q <= vec_mode;
          count  <= '0;
          state  <= S1;
        end
        S1: begin
          xr    <= xs[W-1:0];
          yr    <= ys[W-1:0];
          zr    <= zs[W-1:0];
          count <= count + 1'b1;
          if (count == CW'(ITER - 1)) state <= S2;
        end
        default: state <= S0;
      endcase
    end
  end

  assign init  = (state == S0);
  assign load  = (state == S1);
  assign done  = (state == S2);
  assign x_out = xr;
  assign y_out = yr;
  assign z_out = zr;

endmodule
