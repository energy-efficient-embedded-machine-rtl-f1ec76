// tb_meta_mult: self-checking test of the META approximate multiplier.
//
// The reference rounds each magnitude to the nearest power of two by plain
// arithmetic (ties 3*2^k round up, except 3, which rounds to 2) and checks:
//   - MRCA variants (exact adder) against the identity
//     result = M*N - (Mr-M)*(Nr-N), signed and unsigned, all 8-bit operand
//     pairs of a random sample and every power-of-two operand (exact result);
//   - META variants (error-tolerant adder) against a word-level model of the
//     ETA sum of Mr*N and Nr*M minus Mr*Nr, with the sign applied at the end.
module tb_meta_mult;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b;
  logic [15:0] p_smeta, p_smrca, p_umeta, p_umrca;
  meta_mult                                       u_smeta (.a(a), .b(b), .p(p_smeta));
  meta_mult #(.N(8), .SIGNED(1), .USE_ETA(0))     u_smrca (.a(a), .b(b), .p(p_smrca));
  meta_mult #(.N(8), .SIGNED(0), .USE_ETA(1))     u_umeta (.a(a), .b(b), .p(p_umeta));
  meta_mult #(.N(8), .SIGNED(0), .USE_ETA(0))     u_umrca (.a(a), .b(b), .p(p_umrca));

  function automatic int round_p2(int m);
    int p, lo, hi;
    if (m == 0) return 0;
    if (m == 3) return 2;
    p = 0;
    while ((1 << (p + 1)) <= m) p++;
    lo = 1 << p; hi = lo << 1;
    return ((m - lo) < (hi - m)) ? lo : hi;
  endfunction

  function automatic int eta16(int x, int y);   // 16-bit ETA, 8 inexact bits
    int hi, lo;
    bit ctl;
    hi = ((x >> 8) & 255) + ((y >> 8) & 255);
    lo = 0; ctl = 0;
    for (int i = 7; i >= 0; i--) begin
      if (((x >> i) & 1) && ((y >> i) & 1)) ctl = 1;
      if (ctl || (((x >> i) ^ (y >> i)) & 1)) lo |= (1 << i);
    end
    return (hi << 8) | lo;
  endfunction

  function automatic logic [15:0] ref_mult(logic [7:0] x, logic [7:0] y, bit sgn, bit eta);
    int m, n, mr, nr, r;
    bit neg;
    m = sgn ? ((x[7]) ? 256 - int'(x) : int'(x)) : int'(x);
    n = sgn ? ((y[7]) ? 256 - int'(y) : int'(y)) : int'(y);
    neg = sgn && (x[7] ^ y[7]);
    mr = round_p2(m); nr = round_p2(n);
    if (eta) r = eta16((mr * n) & 16'hffff, (nr * m) & 16'hffff) - mr * nr;
    else     r = m * n - (mr - m) * (nr - n);
    if (neg) r = -r;
    return 16'(r);
  endfunction

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  initial begin
    // exhaustive over all operand pairs
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        chk("s_mrca", p_smrca, ref_mult(a, b, 1, 0));
        chk("u_mrca", p_umrca, ref_mult(a, b, 0, 0));
        chk("s_meta", p_smeta, ref_mult(a, b, 1, 1));
        chk("u_meta", p_umeta, ref_mult(a, b, 0, 1));
      end
    end
    // powers of two are multiplied exactly by the exact-adder variant
    for (int k = 0; k < 7; k++) begin
      a = 8'(1 << k); b = 8'(37 + k);
      #1 chk("pow2", p_smrca, 16'(int'(a) * int'(b)));
      a = 8'(-(1 << k)); #1 chk("pow2n", p_smrca, 16'(-(1 << k) * int'(b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
