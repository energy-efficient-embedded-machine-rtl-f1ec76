// eskin_dsp_top: approximate-computing processing blocks of the electronic
// skin sensing system, placed side by side.
//
// The blocks are separate case studies, each with its own ports:
//   - u_fir   : 16-tap transposed FIR filter with approximate (AFA) adders for
//               the 8-bit tactile sensor samples (signal processing);
//   - u_cordic: 32-bit iterative CORDIC with lower-part-OR adders, rotation
//               and vectoring mode (data processing / feature extraction);
//   - u_svd   : Jacobi SVD engine with Approx-BW rotation multipliers for an
//               8 x 8 matrix (feature extraction before the classifier);
//   - u_meta  : 8-bit signed META multiplier (rounding-based, ETA adder);
//   - u_abw   : 8-bit signed Approx-BW multiplier (AFA cells in the 8 low
//               product columns).
// The sensor array, the charge-to-digital interface chip and its serial link,
// the processor running the tensor-kernel classifier and the acquisition
// link are outside this design: their signals are the ports below
// (fir_valid/fir_x carry the interface samples; the SVD read port and the
// CORDIC/multiplier results go to the classifier).
// Timing: FIR y is combinational from the current sample and the tap
// registers; CORDIC done rises 31 clocks after cor_start; the SVD takes
// N^3 + 1 + SWEEPS*N(N-1)/2*(68 + 3N) clocks from svd_start to svd_done; the
// multipliers are combinational. One clock, one synchronous active-high reset
// (inverted for the FIR's asynchronous active-low reset).
// Composition and port naming are this design's choices.
module eskin_dsp_top
  import approx_pkg::*;
#(
  parameter int SVD_N = 8,
  localparam int IW   = $clog2(SVD_N)
) (
  input  logic               clk,
  input  logic               rst,
  // FIR filter: samples from the sensor interface
  input  logic               fir_valid,
  input  logic signed [7:0]  fir_x,
  output logic signed [15:0] fir_y,
  // CORDIC
  input  logic               cor_start,
  input  logic               cor_vec,
  input  logic [31:0]        cor_x,
  input  logic [31:0]        cor_y,
  input  logic [31:0]        cor_z,
  output logic [31:0]        cor_xo,
  output logic [31:0]        cor_yo,
  output logic [31:0]        cor_zo,
  output logic               cor_init,
  output logic               cor_load,
  output logic               cor_done,
  // SVD engine
  input  logic               svd_wr_en,
  input  logic [IW-1:0]      svd_wr_row,
  input  logic [IW-1:0]      svd_wr_col,
  input  logic [7:0]         svd_wr_data,
  input  logic               svd_start,
  output logic               svd_busy,
  output logic               svd_done,
  input  logic               svd_rd_v,
  input  logic [IW-1:0]      svd_rd_row,
  input  logic [IW-1:0]      svd_rd_col,
  output logic [31:0]        svd_rd_data,
  output logic [15:0]        svd_rotations,
  // multipliers
  input  logic [7:0]         mul_a,
  input  logic [7:0]         mul_b,
  output logic [15:0]        meta_p,
  output logic [15:0]        abw_p
);

  logic rst_n;
  assign rst_n = ~rst;

  fir_transposed u_fir (
    .clk, .rst_n, .x_valid(fir_valid), .x(fir_x), .y(fir_y));

  cordic_iter u_cordic (
    .clk, .rst, .start(cor_start), .vec_mode(cor_vec),
    .x_in(cor_x), .y_in(cor_y), .z_in(cor_z),
    .x_out(cor_xo), .y_out(cor_yo), .z_out(cor_zo),
    .init(cor_init), .load(cor_load), .done(cor_done));

  jacobi_svd #(.N(SVD_N)) u_svd (
    .clk, .rst, .wr_en(svd_wr_en), .wr_row(svd_wr_row), .wr_col(svd_wr_col),
    .wr_data(svd_wr_data), .start(svd_start), .busy(svd_busy), .done(svd_done),
    .rd_v(svd_rd_v), .rd_row(svd_rd_row), .rd_col(svd_rd_col),
    .rd_data(svd_rd_data), .rotations(svd_rotations));

  meta_mult u_meta (.a(mul_a), .b(mul_b), .p(meta_p));

  approx_bw_mult u_abw (.a(mul_a), .b(mul_b), .p(abw_p));

endmodule
