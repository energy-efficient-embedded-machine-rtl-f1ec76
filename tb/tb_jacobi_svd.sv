// tb_jacobi_svd: self-checking test of the Jacobi SVD engine.
//
// Loads random 8-bit matrices (5 x 5 and 8 x 8) into an approximate engine
// (Approx-BW rotations, 20 inexact columns) and an exact one (K = 0) and
// checks:
//   - S right after symmetrization equals (A^T A) * 2^8 exactly (read while
//     the engine is in its first phase solve);
//   - the clocks from start to done equal N^3 + 1 + SWEEPS*pairs*(68 + 3N);
//   - the sorted diagonal against the eigenvalues of the same matrix from a
//     double-precision Jacobi model: exact engine within 0.5% of the largest
//     eigenvalue, approximate engine within 3%;
//   - the remaining off-diagonal entries are small (below 1% of the largest
//     eigenvalue, exact engine);
//   - the columns of V of the exact engine have unit length (2%).
// Inexact-bit sweep (the 5 x 5 accuracy study): five more 5 x 5 engines with
// K = 8, 12, 16, 24 and 28 inexact product columns run on the same matrices;
// the relative error of every eigenvalue above 1% of the largest is printed
// per K and must stay below 1% (32-bit data and 64-bit products keep the
// inexact columns far below the data LSB in this design).
module tb_jacobi_svd;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  int clk_count = 0;
  always @(posedge clk) clk_count <= clk_count + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, start, start5, start8;
  logic wr_en;
  logic [2:0] wr_row, wr_col, rd_row, rd_col;
  logic [7:0] wr_data;
  logic rd_v;
  logic [31:0] rd_a8, rd_e8, rd_a5, rd_e5;
  logic busy_a8, done_a8, busy_e8, done_e8, busy_a5, done_a5, busy_e5, done_e5;
  logic [15:0] rot_a8, rot_e8, rot_a5, rot_e5;

  jacobi_svd            u_a8 (.clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .start(start8),
                              .busy(busy_a8), .done(done_a8), .rd_v, .rd_row, .rd_col, .rd_data(rd_a8), .rotations(rot_a8));
  jacobi_svd #(.K(0))   u_e8 (.clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .start(start8),
                              .busy(busy_e8), .done(done_e8), .rd_v, .rd_row, .rd_col, .rd_data(rd_e8), .rotations(rot_e8));
  jacobi_svd #(.N(5))   u_a5 (.clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .start(start5),
                              .busy(busy_a5), .done(done_a5), .rd_v, .rd_row, .rd_col, .rd_data(rd_a5), .rotations(rot_a5));
  jacobi_svd #(.N(5), .K(0)) u_e5 (.clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .start(start5),
                              .busy(busy_e5), .done(done_e5), .rd_v, .rd_row, .rd_col, .rd_data(rd_e5), .rotations(rot_e5));

  localparam int NK = 5;
  localparam int KS [NK] = '{8, 12, 16, 24, 28};
  logic [31:0] rd_k [NK];
  for (genvar g = 0; g < NK; g++) begin : g_sweep
    logic b_k, d_k;
    logic [15:0] r_k;
    jacobi_svd #(.N(5), .K(KS[g])) u_k (.clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .start(start5),
                              .busy(b_k), .done(d_k), .rd_v, .rd_row, .rd_col, .rd_data(rd_k[g]), .rotations(r_k));
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int  am [8][8];
  real sm [8][8];
  real ev [8];

  // Reference eigenvalues of a symmetric matrix by cyclic Jacobi in double.
  task automatic ref_eig(int n);
    real m [8][8];
    real th, c, s, t1, t2;
    for (int r = 0; r < n; r++) for (int k = 0; k < n; k++) m[r][k] = sm[r][k];
    for (int sw = 0; sw < 30; sw++)
      for (int p = 0; p < n - 1; p++)
        for (int q = p + 1; q < n; q++) begin
          th = 0.5 * $atan2(2.0 * m[p][q], m[q][q] - m[p][p]);
          c = $cos(th); s = $sin(th);
          for (int k = 0; k < n; k++) begin
            t1 = m[p][k]; t2 = m[q][k];
            m[p][k] = c * t1 - s * t2; m[q][k] = s * t1 + c * t2;
          end
          for (int k = 0; k < n; k++) begin
            t1 = m[k][p]; t2 = m[k][q];
            m[k][p] = c * t1 - s * t2; m[k][q] = s * t1 + c * t2;
          end
        end
    for (int k = 0; k < n; k++) ev[k] = m[k][k];
  endtask

  task automatic sort_desc(ref real v [8], input int n);
    real t;
    for (int x = 0; x < n; x++)
      for (int y = x + 1; y < n; y++)
        if (v[y] > v[x]) begin t = v[x]; v[x] = v[y]; v[y] = t; end
  endtask

  function automatic real rd(logic [31:0] v);
    return real'($signed(v)) / 256.0;
  endfunction

  task automatic run(int n);
    int cyc, cyc0, expcyc;
    real da [8], de [8];
    real big, off, vn;
    // load
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        am[r][k] = int'($signed(8'($urandom)));
        wr_en = 1; wr_row = 3'(r); wr_col = 3'(k); wr_data = 8'(am[r][k]);
        @(posedge clk); #1;
      end
    wr_en = 0;
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        int acc;
        acc = 0;
        for (int x = 0; x < n; x++) acc += am[x][r] * am[x][k];
        sm[r][k] = real'(acc);
      end
    ref_eig(n);
    sort_desc(ev, n);
    start5 = (n == 5); start8 = (n == 8);
    @(posedge clk); #1;
    start5 = 0; start8 = 0;
    cyc0 = clk_count - 1;
    // symmetrization result, visible before the first rotation
    repeat (n * n * n + 5) @(posedge clk);
    #1;
    rd_v = 0;
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        rd_row = 3'(r); rd_col = 3'(k); #1;
        checks++;
        if ((n == 8 ? rd_e8 : rd_e5) !== 32'(int'(sm[r][k]) * 256)) begin
          failures++;
          if (failures < 10) $display("FAIL sym n=%0d (%0d,%0d) got=%0d exp=%0d", n, r, k,
                                      $signed(n == 8 ? rd_e8 : rd_e5), int'(sm[r][k]));
        end
      end
    while (!(n == 8 ? done_e8 : done_e5)) begin @(posedge clk); #1; end
    cyc = clk_count - cyc0;
    expcyc = n * n * n + 1 + 6 * (n * (n - 1) / 2) * (68 + 3 * n);
    checks++;
    if (cyc != expcyc) begin failures++; $display("FAIL n=%0d latency %0d clocks, expected %0d", n, cyc, expcyc); end
    @(posedge clk); #1;
    big = ev[0];
    for (int k = 0; k < n; k++) begin
      rd_row = 3'(k); rd_col = 3'(k); rd_v = 0; #1;
      da[k] = rd(n == 8 ? rd_a8 : rd_a5);
      de[k] = rd(n == 8 ? rd_e8 : rd_e5);
    end
    sort_desc(da, n);
    sort_desc(de, n);
    for (int k = 0; k < n; k++) begin
      checks += 2;
      if (fabs(de[k] - ev[k]) > 0.005 * big + 4.0) begin
        failures++; $display("FAIL n=%0d exact eig %0d got=%f exp=%f", n, k, de[k], ev[k]);
      end
      if (fabs(da[k] - ev[k]) > 0.03 * big + 4.0) begin
        failures++; $display("FAIL n=%0d approx eig %0d got=%f exp=%f", n, k, da[k], ev[k]);
      end
      $display("n=%0d eig %0d ref=%10.1f exact=%10.1f approx=%10.1f", n, k, ev[k], de[k], da[k]);
    end
    if (n == 5) begin
      real dk [8];
      for (int g = 0; g < NK; g++) begin
        string line;
        for (int k = 0; k < 5; k++) begin
          rd_row = 3'(k); rd_col = 3'(k); rd_v = 0; #1;
          dk[k] = rd(rd_k[g]);
        end
        sort_desc(dk, 5);
        line = $sformatf("n=5 K=%0d relative error %%:", KS[g]);
        for (int k = 0; k < 5; k++) begin
          line = {line, $sformatf(" %0.4f", 100.0 * fabs(dk[k] - ev[k]) / ev[k])};
          if (ev[k] > 0.01 * big) begin
            checks++;
            if (fabs(dk[k] - ev[k]) > 0.01 * ev[k]) begin
              failures++; $display("FAIL n=5 K=%0d eig %0d got=%f exp=%f", KS[g], k, dk[k], ev[k]);
            end
          end
        end
        $display("%s", line);
      end
    end
    off = 0;
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++)
        if (r != k) begin
          rd_row = 3'(r); rd_col = 3'(k); rd_v = 0; #1;
          if (fabs(rd(n == 8 ? rd_e8 : rd_e5)) > off) off = fabs(rd(n == 8 ? rd_e8 : rd_e5));
        end
    checks++;
    if (off > 0.01 * big + 4.0) begin failures++; $display("FAIL n=%0d off-diagonal %f", n, off); end
    for (int k = 0; k < n; k++) begin
      vn = 0;
      for (int r = 0; r < n; r++) begin
        rd_row = 3'(r); rd_col = 3'(k); rd_v = 1; #1;
        vn += (real'($signed(n == 8 ? rd_e8 : rd_e5)) / 1073741824.0) ** 2;
      end
      checks++;
      if (fabs(vn - 1.0) > 0.02) begin failures++; $display("FAIL n=%0d |v%0d|^2 = %f", n, k, vn); end
    end
  endtask

  initial begin
    rst = 1; start5 = 0; start8 = 0; wr_en = 0; wr_row = 0; wr_col = 0; wr_data = 0;
    rd_v = 0; rd_row = 0; rd_col = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(5);
    run(8);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
