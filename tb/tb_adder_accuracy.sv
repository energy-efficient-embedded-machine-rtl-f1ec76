// tb_adder_accuracy: accuracy workload of the approximate adder kinds.
//
// Six 16-bit adders with 8 inexact low bits (ETA, LOA, AXA, NAND-C, AND-C,
// IPP) and an exact one see the same 10^5 uniformly random operand pairs
// (carry-in 0). For each kind the testbench accumulates, against the exact
// sum a + b:
//   MED  = mean |approx - exact|,   NMED = MED / (2^16 - 1)
//   MRED = mean |approx - exact| / exact over non-zero sums
//   pass rate = share of exact results
// and prints them. Checks, from the structure of the lower parts:
//   - the exact adder is always exact;
//   - LOA and ETA errors stay below 2^K (their upper part is exact and the
//     lower part only loses carries below bit K);
//   - LOA and ETA have a lower MED than AXA and NAND-C, the ranking that
//     makes them the choice for the CORDIC.
// Published MEDs for comparison: ETA 51.99, LOA 45.61, AXA 75.46,
// NAND-C 75.6, AND-C 60.67, IPP 89.7.
// Timing: combinational, one operand pair per time step.
module tb_adder_accuracy;
  import approx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NA = 7;
  localparam adder_kind_e KINDS [NA] = '{ADD_ETA, ADD_LOA, ADD_AXA, ADD_NANDC, ADD_ANDC, ADD_IPP, ADD_RCA};
  localparam string NAMES [NA] = '{"ETA", "LOA", "AXA", "NAND-C", "AND-C", "IPP", "RCA"};
  localparam real PUB_MED [NA] = '{51.99, 45.61, 75.46, 75.6, 60.67, 89.7, 0.0};

  logic [15:0] a, b;
  logic [16:0] s [NA];

  for (genvar g = 0; g < NA; g++) begin : g_add
    approx_adder #(.N(16), .K(8), .KIND(KINDS[g])) u_add (.a, .b, .cin(1'b0), .sum(s[g]));
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real sum_ed [NA], sum_red [NA], med [NA];
    int  n_exact [NA], big [NA];
    int  n_nz;
    n_nz = 0;
    for (int g = 0; g < NA; g++) begin
      sum_ed[g] = 0.0; sum_red[g] = 0.0; n_exact[g] = 0; big[g] = 0;
    end
    a = 0; b = 0;
    for (int t = 0; t < 100000; t++) begin
      int ex;
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      ex = int'(a) + int'(b);
      if (ex != 0) n_nz++;
      for (int g = 0; g < NA; g++) begin
        int ed;
        ed = int'(s[g]) - ex;
        if (ed < 0) ed = -ed;
        sum_ed[g] += real'(ed);
        if (ex != 0) sum_red[g] += real'(ed) / real'(ex);
        if (ed == 0) n_exact[g]++;
        if (ed >= 256) big[g]++;
      end
    end
    for (int g = 0; g < NA; g++) begin
      med[g] = sum_ed[g] / 100000.0;
      $display("%-6s MED %8.2f (published %6.2f) NMED %0.4f%% MRED %0.4f pass rate %6.2f%%", NAMES[g],
               med[g], PUB_MED[g], 100.0 * med[g] / 65535.0, sum_red[g] / real'(n_nz),
               100.0 * n_exact[g] / 100000.0);
    end
    check("exact adder always exact", n_exact[6] == 100000);
    check($sformatf("ETA error below 2^K (%0d misses)", big[0]), big[0] == 0);
    check($sformatf("LOA error below 2^K (%0d misses)", big[1]), big[1] == 0);
    for (int g = 2; g < 4; g++)
      check($sformatf("LOA and ETA MED below %s", NAMES[g]), med[0] < med[g] && med[1] < med[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
