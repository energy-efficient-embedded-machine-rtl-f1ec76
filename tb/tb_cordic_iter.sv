// tb_cordic_iter: self-checking test of the iterative CORDIC.
//
// Runs the default unit (32-bit, 30 iterations, lower-part-OR adders with 16
// inexact bits), an error-tolerant-adder unit (the other approximate variant
// compared in the published CORDIC study) and an exact ripple-carry unit on
// the same inputs, and prints the worst cos/sin/atan error of each kind.
// Checks:
//   - rotation mode from (0.6072529, 0, angle): cos and sin against $cos and
//     $sin (tolerance 1e-6 exact, 1e-3 LOA, 5e-3 ETA: an ETA lower part can
//     be off by up to 2^16 LSB = 6.1e-5 per addition, about 30 times that
//     over the iterations) and z driven to ~0;
//   - vectoring mode from (x, y, 0): x against 1.6468*sqrt(x^2+y^2) and z
//     against atan(y/x), same tolerances;
//   - both units bit-exactly against a word-level model of the iteration with
//     the adder kind's lower-part rule;
//   - the handshake: init while idle, load for exactly ITER clocks, done one
//     clock, ITER+1 clocks after start.
module tb_cordic_iter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real Q = 1073741824.0;   // 2^30

  logic rst, start, vec_mode;
  logic [31:0] x_in, y_in, z_in;
  logic [31:0] xa, ya, za, xe, ye, ze;
  logic [31:0] xt, yt, zt;
  logic init_a, load_a, done_a, init_e, load_e, done_e, init_t, load_t, done_t;
  real  worst [3] = '{0.0, 0.0, 0.0};   // exact, LOA, ETA

  cordic_iter u_apx (.clk, .rst, .start, .vec_mode, .x_in, .y_in, .z_in,
                     .x_out(xa), .y_out(ya), .z_out(za), .init(init_a), .load(load_a), .done(done_a));
  cordic_iter #(.KIND(approx_pkg::ADD_RCA)) u_ex (.clk, .rst, .start, .vec_mode, .x_in, .y_in, .z_in,
                     .x_out(xe), .y_out(ye), .z_out(ze), .init(init_e), .load(load_e), .done(done_e));
  cordic_iter #(.KIND(approx_pkg::ADD_ETA)) u_eta (.clk, .rst, .start, .vec_mode, .x_in, .y_in, .z_in,
                     .x_out(xt), .y_out(yt), .z_out(zt), .init(init_t), .load(load_t), .done(done_t));

  // word-level model; loa = lower 16 bits are OR-ed and carry a[15]&b[15]
  function automatic logic [31:0] madd(logic [31:0] a, logic [31:0] b, logic ci, bit loa);
    logic [16:0] up;
    if (!loa) return a + b + 32'(ci);
    up = 17'(a[31:16]) + 17'(b[31:16]) + 17'(a[15] & b[15]);
    return {up[15:0], a[15:0] | b[15:0]};
  endfunction

  function automatic void model(bit vm, bit loa, logic [31:0] x0, logic [31:0] y0, logic [31:0] z0,
                                output logic [31:0] xo, output logic [31:0] yo, output logic [31:0] zo);
    logic [31:0] x, y, z, xs, ys, at;
    bit d;
    x = x0; y = y0; z = z0;
    for (int i = 0; i < 30; i++) begin
      at = 32'(longint'($atan(2.0 ** (-i)) * Q));
      d  = vm ? y[31] : ~z[31];
      xs = 32'($signed(x) >>> i);
      ys = 32'($signed(y) >>> i);
      xo = d ? madd(x, ~ys, 1, loa) : madd(x, ys, 0, loa);
      yo = d ? madd(y, xs, 0, loa)  : madd(y, ~xs, 1, loa);
      zo = d ? madd(z, ~at, 1, loa) : madd(z, at, 0, loa);
      x = xo; y = yo; z = zo;
    end
  endfunction

  function automatic real q2r(logic [31:0] v);
    return real'($signed(v)) / Q;
  endfunction

  task automatic chk_real(string what, real got, real exp, real tol, int kind);
    real e = (got > exp) ? got - exp : exp - got;
    if (e > worst[kind]) worst[kind] = e;
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got=%f exp=%f", what, got, exp);
    end
  endtask

  task automatic chk_bits(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic run(bit vm, real xr, real yr, real zr);
    int cyc;
    logic [31:0] mx, my, mz;
    x_in = 32'(longint'(xr * Q)); y_in = 32'(longint'(yr * Q)); z_in = 32'(longint'(zr * Q));
    vec_mode = vm;
    checks++; if (!init_a || load_a || done_a) begin failures++; $display("FAIL not idle"); end
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 1;
    while (!done_a) begin
      checks++; if (!load_a || init_a) begin failures++; $display("FAIL load flag"); end
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != 31) begin failures++; $display("FAIL latency %0d clocks, expected 31", cyc); end
    checks++; if (!done_e || !done_t) begin failures++; $display("FAIL exact or ETA unit not done"); end
    model(vm, 1, x_in, y_in, z_in, mx, my, mz);
    chk_bits("loa x", xa, mx); chk_bits("loa y", ya, my); chk_bits("loa z", za, mz);
    model(vm, 0, x_in, y_in, z_in, mx, my, mz);
    chk_bits("rca x", xe, mx); chk_bits("rca y", ye, my); chk_bits("rca z", ze, mz);
    if (!vm) begin
      chk_real("cos exact", q2r(xe), $cos(zr), 1e-6, 0);
      chk_real("sin exact", q2r(ye), $sin(zr), 1e-6, 0);
      chk_real("cos loa",   q2r(xa), $cos(zr), 1e-3, 1);
      chk_real("sin loa",   q2r(ya), $sin(zr), 1e-3, 1);
      chk_real("cos eta",   q2r(xt), $cos(zr), 5e-3, 2);
      chk_real("sin eta",   q2r(yt), $sin(zr), 5e-3, 2);
      chk_real("z exact",   q2r(ze), 0.0, 1e-6, 0);
    end else begin
      chk_real("mag exact", q2r(xe), 1.6467602 * $sqrt(xr * xr + yr * yr), 1e-5, 0);
      chk_real("atan exact", q2r(ze), zr + $atan(yr / xr), 1e-6, 0);
      chk_real("atan loa",   q2r(za), zr + $atan(yr / xr), 1e-3, 1);
      chk_real("atan eta",   q2r(zt), zr + $atan(yr / xr), 5e-3, 2);
    end
    @(posedge clk); #1;
    checks++; if (!init_a) begin failures++; $display("FAIL not back to idle"); end
  endtask

  initial begin
    rst = 1; start = 0; vec_mode = 0; x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    for (int t = -6; t <= 6; t++) run(0, 0.6072529350, 0.0, 0.25 * t);
    for (int t = 0; t < 10; t++) run(0, 0.6072529350, 0.0, (real'($urandom % 3000) - 1500.0) / 1000.0);
    run(1, 0.3, 0.4, 0.0);
    run(1, 0.5, -0.2, 0.1);
    for (int t = 0; t < 8; t++)
      run(1, 0.05 + real'($urandom % 500) / 1000.0, (real'($urandom % 1000) - 500.0) / 1000.0, 0.0);
    $display("worst cos/sin/atan error: exact %e, LOA %e, ETA %e", worst[0], worst[1], worst[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
