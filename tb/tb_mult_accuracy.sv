// tb_mult_accuracy: accuracy workload of the two 8-bit approximate
// multipliers over every signed operand pair (65536 products each).
//
// For Approx-BW (K = 8) and S-META it accumulates, against the exact product
// a*b:
//   MED  = mean |approx - exact|
//   MRED = mean |approx - exact| / |exact| over pairs with a non-zero product
//   pass rate = share of pairs with an exact result
// and prints them next to the published figures (Approx-BW: MED 232.33,
// MRED 0.101; META: MED 154.15, MRED 0.09). The averages depend on details
// the published description leaves open, so the checks are properties that
// follow from the structure:
//   - Approx-BW is exact whenever one operand is 0 or +-2^i (every column
//     then holds at most one partial product, so no AFA cell saturates);
//   - S-META gives 0 when an operand is 0;
//   - the Approx-BW error is at most K*2^K + 1 = 2049: the K inexact columns
//     (at most j+1 partial products in column j, together
//     sum_j (j+1)*2^j = (K-1)*2^K + 1) are replaced by at most 2^K - 1, and
//     the carry into column K adds at most 2^K;
//   - both multipliers are sign-symmetric: p(-a, b) = -p(a, b) for a > -128;
//   - MRED below 0.2 for both.
// Timing: combinational blocks, one operand pair per time step.
module tb_mult_accuracy;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b;
  logic [15:0] p_abw, p_meta;

  approx_bw_mult u_abw  (.a, .b, .p(p_abw));
  meta_mult      u_meta (.a, .b, .p(p_meta));

  function automatic bit pow2_or_small(int v);
    int m = (v < 0) ? -v : v;
    return (m == 0) || ((m & (m - 1)) == 0);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real sum_ed_abw = 0.0, sum_red_abw = 0.0, sum_ed_meta = 0.0, sum_red_meta = 0.0;
    int  n_nz = 0, exact_abw = 0, exact_meta = 0, big_err = 0, special_bad = 0, sym_bad = 0;
    real med_abw, mred_abw, med_meta, mred_meta;
    a = 0; b = 0;
    for (int ia = -128; ia < 128; ia++)
      for (int ib = -128; ib < 128; ib++) begin
        int ex, ga, gm, ea, em;
        a = 8'(ia); b = 8'(ib);
        #1;
        ex = ia * ib;
        ga = int'($signed(p_abw));
        gm = int'($signed(p_meta));
        ea = (ga > ex) ? ga - ex : ex - ga;
        em = (gm > ex) ? gm - ex : ex - gm;
        sum_ed_abw  += real'(ea);
        sum_ed_meta += real'(em);
        if (ex != 0) begin
          n_nz++;
          sum_red_abw  += real'(ea) / real'((ex < 0) ? -ex : ex);
          sum_red_meta += real'(em) / real'((ex < 0) ? -ex : ex);
        end
        if (ea == 0) exact_abw++;
        if (em == 0) exact_meta++;
        if (ea > 2049) big_err++;
        if ((pow2_or_small(ia) || pow2_or_small(ib)) && ea != 0) special_bad++;
        if ((ia == 0 || ib == 0) && gm != 0) special_bad++;
      end
    // sign symmetry: each positive a against its negation
    for (int ia = 1; ia < 128; ia++)
      for (int ib = -128; ib < 128; ib++) begin
        int gpa, gpm;
        a = 8'(ia); b = 8'(ib);
        #1;
        gpa = int'($signed(p_abw));
        gpm = int'($signed(p_meta));
        a = 8'(-ia);
        #1;
        if (int'($signed(p_abw)) != -gpa || int'($signed(p_meta)) != -gpm) sym_bad++;
      end
    med_abw   = sum_ed_abw / 65536.0;
    mred_abw  = sum_red_abw / real'(n_nz);
    med_meta  = sum_ed_meta / 65536.0;
    mred_meta = sum_red_meta / real'(n_nz);
    $display("Approx-BW: MED %0.2f MRED %0.4f pass rate %0.2f%% (published 232.33, 0.101, 5.81%%)",
             med_abw, mred_abw, 100.0 * exact_abw / 65536.0);
    $display("S-META   : MED %0.2f MRED %0.4f pass rate %0.2f%% (published 154.15, 0.09)",
             med_meta, mred_meta, 100.0 * exact_meta / 65536.0);
    check($sformatf("exact for power-of-two / zero operands (%0d misses)", special_bad), special_bad == 0);
    check($sformatf("Approx-BW error at most K*2^K+1 (%0d misses)", big_err), big_err == 0);
    check($sformatf("sign symmetry (%0d misses)", sym_bad), sym_bad == 0);
    check($sformatf("Approx-BW MED %f non-zero", med_abw), med_abw > 0.0);
    check($sformatf("Approx-BW MRED %f below 0.2", mred_abw), mred_abw < 0.2);
    check($sformatf("S-META MRED %f below 0.2", mred_meta), mred_meta < 0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
