// fir_transposed: fully parallel transposed-form FIR low-pass filter whose
// coefficient multipliers are approximate (Approx-BW).
//
// Every coefficient H[k] has its own multiplier fed by the current input
// sample x. The products enter a chain of adders separated by registers:
//   r[0] <= H[0]*x,  r[k] <= r[k-1] + H[k]*x  (k = 1 .. NT-2),
//   y     = r[NT-2] + H[NT-1]*x
// so y(n) = sum_k H[k] * x(n - (NT-1) + k), which equals the usual
// y(n) = sum_m H[m] x(n-m) for the symmetric coefficient sets of a linear-phase
// low-pass filter. The product and the adder chain are 2*DW bits wide, as
// drawn for the published filter; coefficients are scaled so that the sum of
// their magnitudes keeps the output in range.
// The 16 taps, 8-bit two's complement input, transposed structure and
// Approx-BW multipliers follow the published filter. The published
// coefficients were not given as numbers: the default set is a 16-tap
// Hamming-window low-pass design with its cut-off halfway between the 775 Hz
// pass-band and 990 Hz stop-band edges at a 3.1 kS/s sample rate, in Q0.7
// (sum 128 = gain 1). The sample-enable x_valid and the asynchronous
// active-low reset are this design's choices.
// Interface: x is taken when x_valid is high; y is combinational from x and
// the registers, so y is the filter output for the sample on x in the same
// cycle. APPROX_K = 0 makes all multipliers exact.
module fir_transposed #(
  parameter int NT       = 16,
  parameter int DW       = 8,
  parameter int APPROX_K = 8,
  parameter logic signed [DW-1:0] COEF [NT] = '{
    8'sd0, -8'sd1, -8'sd1, 8'sd4, 8'sd0, -8'sd12, 8'sd11, 8'sd63,
    8'sd63, 8'sd11, -8'sd12, 8'sd0, 8'sd4, -8'sd1, -8'sd1, 8'sd0}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_valid,
  input  logic signed [DW-1:0]  x,
  output logic signed [2*DW-1:0] y
);

  localparam int AW = 2 * DW;

  logic [AW-1:0] prod [NT];
  logic [AW-1:0] r    [NT-1];

  for (genvar k = 0; k < NT; k++) begin : g_tap
    approx_bw_mult #(.N(DW), .K(APPROX_K), .SIGNED(1'b1)) u_mul (
      .a(x), .b(COEF[k]), .p(prod[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT - 1; k++) r[k] <= '0;
    end else if (x_valid) begin
      r[0] <= prod[0];
      for (int k = 1; k < NT - 1; k++) r[k] <= r[k-1] + prod[k];
    end
  end

  assign y = signed'(r[NT-2] + prod[NT-1]);

endmodule
