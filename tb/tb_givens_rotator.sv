// tb_givens_rotator: self-checking test of the plane-rotation unit.
//
// Drives random pairs and random angles (cosine and sine in Q2.30) into the
// default unit (Approx-BW multipliers, 20 inexact columns) and into an exact
// unit (K = 0). Checks, one clock after in_valid:
//   - the exact unit against (c*x - s*y + 2^29) >>> 30 and (s*x + c*y + 2^29) >>> 30 (rounded);
//   - the approximate unit against the same sums of products from a
//     column-rule model of the approximate multiplier;
//   - the approximate result stays within 2 LSB of the exact one (the lost
//     column carries weigh less than 2^22 against the 2^30 scaling).
// Also checks that out_valid follows in_valid by exactly one clock.
module tb_givens_rotator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, in_valid, ov_a, ov_e;
  logic [31:0] x, y, c, s, xa, ya, xe, ye;

  givens_rotator             u_apx (.clk, .rst, .in_valid, .x, .y, .c, .s, .out_valid(ov_a), .xr(xa), .yr(ya));
  givens_rotator #(.K(0))    u_ex  (.clk, .rst, .in_valid, .x, .y, .c, .s, .out_valid(ov_e), .xr(xe), .yr(ye));

  function automatic longint amul(longint xs, longint ys, int k);
    longint m, n, lo, hi;
    int ones;
    bit cc, c_up;
    m = (xs < 0) ? -xs : xs;
    n = (ys < 0) ? -ys : ys;
    lo = 0; hi = 0; cc = 0; c_up = 0;
    for (int j = k - 1; j >= 0; j--) begin
      ones = 0;
      for (int i = 0; i < 32; i++)
        if (j - i >= 0 && j - i < 32) ones += int'(((m >> i) & 1) & ((n >> (j - i)) & 1));
      if (cc || ones >= 2) begin lo |= longint'(1) << j; cc = 1; end
      else if (ones == 1) lo |= longint'(1) << j;
      if (j == k - 1) c_up = cc;
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        if (i + j >= k && ((m >> i) & 1) && ((n >> j) & 1)) hi += longint'(1) << (i + j);
    if (k > 0) hi += longint'(c_up) << k;
    // operands below 2^31 in magnitude: the 64-bit product cannot wrap
    return ((xs < 0) != (ys < 0)) ? -(hi + lo) : (hi + lo);
  endfunction

  task automatic chk(string what, logic [31:0] got, longint exp);
    checks++;
    if (got !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, 32'(exp));
    end
  endtask

  initial begin
    longint lx, ly, lc, ls, ex_x, ex_y, ap_x, ap_y;
    real th;
    rst = 1; in_valid = 0; x = 0; y = 0; c = 0; s = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      th = (real'($urandom % 6283) - 3141.0) / 1000.0;
      lc = longint'($cos(th) * 1073741824.0);
      ls = longint'($sin(th) * 1073741824.0);
      lx = longint'($signed($urandom)) / 2;
      ly = longint'($signed($urandom)) / 2;
      x = 32'(lx); y = 32'(ly); c = 32'(lc); s = 32'(ls);
      in_valid = 1;
      ex_x = (lc * lx - ls * ly + (longint'(1) << 29)) >>> 30;
      ex_y = (ls * lx + lc * ly + (longint'(1) << 29)) >>> 30;
      ap_x = (amul(lc, lx, 20) - amul(ls, ly, 20) + (longint'(1) << 29)) >>> 30;
      ap_y = (amul(ls, lx, 20) + amul(lc, ly, 20) + (longint'(1) << 29)) >>> 30;
      @(posedge clk); #1;
      in_valid = (t % 5) != 4;
      checks += 2;
      if (!ov_a || !ov_e) begin failures++; $display("FAIL out_valid missing"); end
      chk("exact x", xe, ex_x);
      chk("exact y", ye, ex_y);
      chk("apx x", xa, ap_x);
      chk("apx y", ya, ap_y);
      checks++;
      if ((ap_x - ex_x) > 2 || (ex_x - ap_x) > 2 || (ap_y - ex_y) > 2 || (ex_y - ap_y) > 2) begin
        failures++; $display("FAIL approximation error too large: %0d vs %0d", ap_x, ex_x);
      end
      if (!in_valid) begin
        @(posedge clk); #1;
        checks++;
        if (ov_a) begin failures++; $display("FAIL out_valid without in_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
