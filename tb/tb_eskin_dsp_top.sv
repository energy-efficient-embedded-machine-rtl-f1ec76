// tb_eskin_dsp_top: end-to-end test of the full-size top level (no
// parameter overrides) with every block exercised through the top's ports.
//
// Mechanisms counted (each must happen at least once, else a failure):
//   fir_valid    samples taken by the FIR          fir_idle   clocks without a sample
//   cor_rot      CORDIC rotation-mode runs          cor_vec    vectoring-mode runs
//   svd_done     completed SVD runs (8 x 8)         mul_neg    signed multiplications
//                                                              with a negative product
// Checks, against values worked out by hand or from matrix identities:
//   - FIR: an impulse of 16 gives 16*H[k] on consecutive samples (single
//     partial products, so the approximate multipliers are exact here), with
//     idle clocks between samples that must not move the filter;
//   - CORDIC rotation of 0.5 rad gives cos/sin within 1e-3 (LOA adders);
//     vectoring of (0.3, 0.3) gives pi/4 within 1e-3; done 31 clocks after start;
//   - SVD: after done, the trace of S equals the squared Frobenius norm of A
//     and the eigenvalues of a block-diagonal test matrix match the worked-out
//     values within 0.1 %; off-diagonal below 0.1 % of the largest;
//     start-to-done latency 8^3 + 1 + 6*28*(68 + 3*8) = 15969 clocks;
//   - multipliers: S-META (100, -50) = -4608 (128*50 + 64*100 - 128*64),
//     S-META (-4, 8) = -31 (ETA sets bits 5..0 of 32 + 32), Approx-BW (-3, 3)
//     = -7 (column 1 has two ones: its sum and column 0 saturate to one).
module tb_eskin_dsp_top;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  int clk_count = 0;
  always @(posedge clk) clk_count <= clk_count + 1;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst;
  logic        fir_valid;
  logic [7:0]  fir_x;
  logic [15:0] fir_y;
  logic        cor_start, cor_vec, cor_init, cor_load, cor_done;
  logic [31:0] cor_x, cor_y, cor_z, cor_xo, cor_yo, cor_zo;
  logic        svd_wr_en, svd_start, svd_busy, svd_done, svd_rd_v;
  logic [2:0]  svd_wr_row, svd_wr_col, svd_rd_row, svd_rd_col;
  logic [7:0]  svd_wr_data;
  logic [31:0] svd_rd_data;
  logic [15:0] svd_rotations;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] meta_p, abw_p;

  eskin_dsp_top dut (.*);

  int n_fir_valid = 0, n_fir_idle = 0, n_cor_rot = 0, n_cor_vec = 0, n_svd_done = 0, n_mul_neg = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (fir_valid) n_fir_valid++; else n_fir_idle++;
      if (svd_done) n_svd_done++;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // 16-tap coefficients of the filter (Q0.7)
  localparam int H [16] = '{0, -1, -1, 4, 0, -12, 11, 63, 63, 11, -12, 0, 4, -1, -1, 0};

  function automatic real q30(logic [31:0] v);
    return real'($signed(v)) / 1073741824.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---------------- FIR ----------------
  task automatic run_fir();
    // y for the sample on x is seen before the clock edge that takes it
    for (int n = 0; n < 20; n++) begin
      fir_x = (n == 0) ? 8'd16 : 8'd0;
      fir_valid = 1'b1;
      #1;
      if (n < 16) check($sformatf("FIR impulse tap %0d got %0d exp %0d", n, $signed(fir_y), 16 * H[15 - n]),
                        $signed(fir_y) == 16 * H[15 - n]);
      @(posedge clk); #1;
      // idle clocks: the tap registers must hold
      fir_valid = 1'b0;
      fir_x = 8'h55;
      repeat (n % 3) @(posedge clk);
      #1;
    end
    fir_valid = 1'b0;
    fir_x = '0;
  endtask

  // ---------------- CORDIC ----------------
  task automatic run_cordic(bit vec, real x, real y, real z);
    int t0;
    cor_vec   = vec;
    cor_x     = 32'(longint'(x * 1073741824.0));
    cor_y     = 32'(longint'(y * 1073741824.0));
    cor_z     = 32'(longint'(z * 1073741824.0));
    check("CORDIC idle (init) before start", cor_init && !cor_load);
    cor_start = 1'b1;
    t0 = clk_count;
    @(posedge clk); #1;
    cor_start = 1'b0;
    check("CORDIC load during iterations", cor_load);
    while (!cor_done) begin @(posedge clk); #1; end
    check($sformatf("CORDIC latency %0d", clk_count - t0), clk_count - t0 == 31);
    if (vec) n_cor_vec++; else n_cor_rot++;
    @(posedge clk); #1;
  endtask

  // ---------------- SVD ----------------
  // A: rows/columns 0 and 1 hold the block [[3,4],[0,5]]; the diagonal
  // entries of rows 2..7 are 1..6; A[7][2] = -2 couples columns 2 and 7.
  // A^T A then splits into independent blocks (worked out in run_svd).
  function automatic int a_val(int r, int c);
    if (r == 0 && c == 0) return 3;
    if (r == 0 && c == 1) return 4;
    if (r == 1 && c == 1) return 5;
    if (r == c) return r - 1;          // 1, 2, 3, 4, 5, 6 for r = 2..7
    if (r == 7 && c == 2) return -2;   // couples rows/cols 2 and 7
    return 0;
  endfunction

  task automatic run_svd();
    int t0, frob, big_i;
    real tr, ev [8], expv [8], big, off;
    frob = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        svd_wr_en = 1'b1;
        svd_wr_row = 3'(r);
        svd_wr_col = 3'(c);
        svd_wr_data = 8'(a_val(r, c));
        frob += a_val(r, c) * a_val(r, c);
        @(posedge clk); #1;
      end
    svd_wr_en = 1'b0;
    svd_start = 1'b1;
    t0 = clk_count;
    @(posedge clk); #1;
    svd_start = 1'b0;
    check("SVD busy after start", svd_busy);
    while (!svd_done) begin @(posedge clk); #1; end
    check($sformatf("SVD latency %0d", clk_count - t0), clk_count - t0 == 15969);
    check("SVD rotations 168", svd_rotations == 16'd168);
    @(posedge clk); #1;
    check("SVD idle after done", !svd_busy);
    svd_rd_v = 1'b0;
    tr = 0.0;
    for (int k = 0; k < 8; k++) begin
      svd_rd_row = 3'(k); svd_rd_col = 3'(k); #1;
      ev[k] = real'($signed(svd_rd_data)) / 256.0;
      tr += ev[k];
    end
    for (int k = 0; k < 8; k++) $display("S[%0d][%0d] = %f", k, k, ev[k]);
    check($sformatf("SVD trace %f vs %0d", tr, frob), fabs(tr - real'(frob)) < 0.001 * frob);
    // eigenvalues of A^T A worked out by hand:
    //   block {0,1}: [[9,12],[12,41]] -> 45, 5
    //   block {2,7}: A cols 2 and 7 are (0,0,1,0,0,0,0,-2) and (0,...,0,6):
    //     [[5,-12],[-12,36]] -> (41 +- sqrt(31^2 + 24^2)) / 2 = (41 +- 39.2046)/2
    //   diagonal 3..6: 4, 9, 16, 25
    expv = '{45.0, 5.0, (41.0 - $sqrt(31.0 * 31.0 + 576.0)) / 2.0, 4.0, 9.0, 16.0, 25.0,
             (41.0 + $sqrt(31.0 * 31.0 + 576.0)) / 2.0};
    // order-free comparison: every expected value must be met by one result
    foreach (expv[e]) begin
      bit hit = 0;
      foreach (ev[k]) if (fabs(ev[k] - expv[e]) < 0.001 * expv[e] + 0.02) hit = 1;
      check($sformatf("SVD eigenvalue %f found", expv[e]), hit);
    end
    big = 0.0;
    for (int k = 0; k < 8; k++) if (ev[k] > big) begin big = ev[k]; big_i = k; end
    off = 0.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        if (r != c) begin
          svd_rd_row = 3'(r); svd_rd_col = 3'(c); #1;
          if (fabs(real'($signed(svd_rd_data)) / 256.0) > off) off = fabs(real'($signed(svd_rd_data)) / 256.0);
        end
    check($sformatf("SVD off-diagonal %f", off), off < 0.001 * big);
  endtask

  initial begin
    rst = 1'b1;
    fir_valid = 0; fir_x = 0;
    cor_start = 0; cor_vec = 0; cor_x = 0; cor_y = 0; cor_z = 0;
    svd_wr_en = 0; svd_wr_row = 0; svd_wr_col = 0; svd_wr_data = 0; svd_start = 0;
    svd_rd_v = 0; svd_rd_row = 0; svd_rd_col = 0;
    mul_a = 0; mul_b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    run_fir();

    run_cordic(1'b0, 0.6072529350, 0.0, 0.5);
    check($sformatf("CORDIC cos %f", q30(cor_xo)), fabs(q30(cor_xo) - $cos(0.5)) < 1e-3);
    check($sformatf("CORDIC sin %f", q30(cor_yo)), fabs(q30(cor_yo) - $sin(0.5)) < 1e-3);
    run_cordic(1'b1, 0.3, 0.3, 0.0);
    check($sformatf("CORDIC atan %f", q30(cor_zo)), fabs(q30(cor_zo) - 0.7853981634) < 1e-3);
    check($sformatf("CORDIC magnitude %f", q30(cor_xo)),
          fabs(q30(cor_xo) - 1.6467602 * $sqrt(0.18)) < 1e-3);
    run_cordic(1'b0, 0.6072529350, 0.0, -1.0);
    check($sformatf("CORDIC cos(-1) %f", q30(cor_xo)), fabs(q30(cor_xo) - $cos(-1.0)) < 1e-3);
    check($sformatf("CORDIC sin(-1) %f", q30(cor_yo)), fabs(q30(cor_yo) - $sin(-1.0)) < 1e-3);

    mul_a = 8'd100; mul_b = 8'($signed(-50)); #1;
    check($sformatf("S-META 100*-50 got %0d", $signed(meta_p)), $signed(meta_p) == -4608);
    if ($signed(meta_p) < 0) n_mul_neg++;
    mul_a = 8'($signed(-4)); mul_b = 8'd8; #1;
    check($sformatf("S-META -4*8 got %0d", $signed(meta_p)), $signed(meta_p) == -31);
    mul_a = 8'($signed(-3)); mul_b = 8'd3; #1;
    check($sformatf("Approx-BW -3*3 got %0d", $signed(abw_p)), $signed(abw_p) == -7);
    if ($signed(abw_p) < 0) n_mul_neg++;
    mul_a = 8'($signed(-128)); mul_b = 8'($signed(-128)); #1;
    check($sformatf("Approx-BW -128*-128 got %0d", $signed(abw_p)), abw_p == 16'h4000);

    run_svd();

    check($sformatf("mechanism fir_valid %0d", n_fir_valid), n_fir_valid > 0);
    check($sformatf("mechanism fir_idle %0d", n_fir_idle), n_fir_idle > 0);
    check($sformatf("mechanism cor_rot %0d", n_cor_rot), n_cor_rot > 0);
    check($sformatf("mechanism cor_vec %0d", n_cor_vec), n_cor_vec > 0);
    check($sformatf("mechanism svd_done %0d", n_svd_done), n_svd_done == 1);
    check($sformatf("mechanism mul_neg %0d", n_mul_neg), n_mul_neg == 2);
    $display("mechanisms: fir_valid=%0d fir_idle=%0d cor_rot=%0d cor_vec=%0d svd_done=%0d mul_neg=%0d",
             n_fir_valid, n_fir_idle, n_cor_rot, n_cor_vec, n_svd_done, n_mul_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
