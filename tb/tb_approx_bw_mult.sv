// tb_approx_bw_mult: self-checking test of the Approx-BW multiplier.
//
// Reference, written from the column rules rather than from the cell chain:
// each inexact column, visited from column K-1 down to 0, reads one and
// passes a carry of one to the next lower column when it received a carry of
// one or holds at least two partial products that are one; otherwise it reads
// the OR of its partial products and passes zero. The carry out of column K-1
// is added at column K to the exact sum of the upper columns. Signs are
// handled on magnitudes. Checked exhaustively for 8 x 8 at K = 8 and K = 0
// (which must equal the exact product), and on random 16 x 16 operands at
// K = 20.
module tb_approx_bw_mult;
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
  logic [15:0] p_def, p_k0, p_u;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  approx_bw_mult                              u_def (.a(a), .b(b), .p(p_def));
  approx_bw_mult #(.N(8), .K(0))              u_k0  (.a(a), .b(b), .p(p_k0));
  approx_bw_mult #(.N(8), .K(8), .SIGNED(0))  u_u   (.a(a), .b(b), .p(p_u));
  approx_bw_mult #(.N(16), .K(20))            u_16  (.a(a16), .b(b16), .p(p16));

  function automatic longint ref_umul(longint m, longint n, int nb, int k);
    longint lo, hi;
    bit c, c_up;
    int ones;
    lo = 0; hi = 0; c = 0; c_up = 0;
    for (int j = k - 1; j >= 0; j--) begin
      ones = 0;
      for (int i = 0; i < nb; i++)
        if (j - i >= 0 && j - i < nb) ones += int'(((m >> i) & 1) & ((n >> (j - i)) & 1));
      if (c || ones >= 2) begin lo |= (longint'(1) << j); c = 1; end
      else if (ones == 1) lo |= (longint'(1) << j);
      if (j == k - 1) c_up = c;
    end
    for (int i = 0; i < nb; i++)
      for (int j = 0; j < nb; j++)
        if (i + j >= k && ((m >> i) & 1) && ((n >> j) & 1)) hi += longint'(1) << (i + j);
    if (k > 0) hi += longint'(c_up) << k;
    return hi + lo;
  endfunction

  function automatic longint ref_smul(longint x, longint y, int nb, int k);
    longint m, n, r;
    bit neg;
    m = (x >= 0) ? x : -x;
    n = (y >= 0) ? y : -y;
    neg = (x < 0) ^ (y < 0);
    r = ref_umul(m, n, nb, k);
    return neg ? -r : r;
  endfunction

  task automatic chk(string what, longint got, longint exp, int w);
    checks++;
    if ((got & ((longint'(1) << w) - 1)) != (exp & ((longint'(1) << w) - 1))) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h (a=%h b=%h)", what, got, exp, a, b);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        chk("k8",   longint'(p_def), ref_smul(longint'($signed(a)), longint'($signed(b)), 8, 8), 16);
        chk("k0",   longint'(p_k0),  longint'($signed(a)) * longint'($signed(b)), 16);
        chk("uns",  longint'(p_u),   ref_umul(longint'(a), longint'(b), 8, 8), 16);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1 chk("n16k20", longint'(p16), ref_smul(longint'($signed(a16)), longint'($signed(b16)), 16, 20), 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
