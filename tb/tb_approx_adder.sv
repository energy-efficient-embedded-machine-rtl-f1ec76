// tb_approx_adder: self-checking test of approx_adder in every cell kind.
//
// Checks the approximate full adder against its published truth table
// (one-bit instance), the error-tolerant adder against the published worked
// example, and every kind (16 bits, 8 inexact) against a bit-level reference
// written from the cell equations, over random operands. RCA and K = 0 are
// checked against exact addition.
module tb_approx_adder;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-bit AFA
  logic a1, b1, c1;
  logic [1:0] s1;
  approx_adder #(.N(1), .K(1), .KIND(ADD_AFA)) u_afa1 (.a(a1), .b(b1), .cin(c1), .sum(s1));

  logic [15:0] a, b;
  logic        cin;
  logic [16:0] s_def, s_eta, s_loa, s_axa, s_nandc, s_andc, s_ipp, s_rca, s_k0;
  approx_adder u_def (.a(a), .b(b), .cin(cin), .sum(s_def));
  approx_adder #(.N(16), .K(8), .KIND(ADD_ETA))   u_eta   (.a(a), .b(b), .cin(cin), .sum(s_eta));
  approx_adder #(.N(16), .K(8), .KIND(ADD_LOA))   u_loa   (.a(a), .b(b), .cin(cin), .sum(s_loa));
  approx_adder #(.N(16), .K(8), .KIND(ADD_AXA))   u_axa   (.a(a), .b(b), .cin(cin), .sum(s_axa));
  approx_adder #(.N(16), .K(8), .KIND(ADD_NANDC)) u_nandc (.a(a), .b(b), .cin(cin), .sum(s_nandc));
  approx_adder #(.N(16), .K(8), .KIND(ADD_ANDC))  u_andc  (.a(a), .b(b), .cin(cin), .sum(s_andc));
  approx_adder #(.N(16), .K(8), .KIND(ADD_IPP))   u_ipp   (.a(a), .b(b), .cin(cin), .sum(s_ipp));
  approx_adder #(.N(16), .K(8), .KIND(ADD_RCA))   u_rca   (.a(a), .b(b), .cin(cin), .sum(s_rca));
  approx_adder #(.N(16), .K(0), .KIND(ADD_AFA))   u_k0    (.a(a), .b(b), .cin(cin), .sum(s_k0));

  // Reference: lower 8 bits per kind, exact upper 8 bits with the carry c_up.
  function automatic logic [16:0] ref_add(adder_kind_e kind, logic [15:0] x, logic [15:0] y, logic ci);
    logic [7:0] lo;
    logic c, cup, ctl;
    int   hi;
    c = ci; cup = 0;
    case (kind)
      ADD_LOA: begin lo = x[7:0] | y[7:0]; cup = x[7] & y[7]; end
      ADD_IPP: begin
        for (int i = 0; i < 8; i++)
          lo[i] = (x[i] ^ y[i]) | ((i > 0) ? (x[i-1] & y[i-1]) : 1'b0);
        cup = x[7] & y[7];
      end
      ADD_ETA: begin
        ctl = 0;
        for (int i = 7; i >= 0; i--) begin
          if (x[i] & y[i]) ctl = 1;
          lo[i] = ctl ? 1'b1 : (x[i] ^ y[i]);
        end
        cup = 0;
      end
      default: begin
        for (int i = 0; i < 8; i++) begin
          logic sb, cb;
          case (kind)
            ADD_AXA:   begin sb = ~(x[i] ^ y[i]);        cb = (x[i] + y[i] + c) >= 2; end
            ADD_NANDC: begin sb = ~(x[i] ^ y[i]) ^ c;    cb = ~(x[i] & y[i]); end
            ADD_ANDC:  begin sb = x[i] ^ y[i] ^ c;       cb = x[i] & y[i]; end
            default:   begin cb = c | (x[i] & y[i]);     sb = cb | (x[i] ^ y[i]); end
          endcase
          lo[i] = sb; c = cb;
        end
        cup = c;
      end
    endcase
    hi = int'(x[15:8]) + int'(y[15:8]) + int'(cup);
    return {hi[8:0], lo};
  endfunction

  task automatic chk(string what, logic [16:0] got, logic [16:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  // Approximate outputs of the AFA truth table, rows A B C = 000 .. 111: {Cout, S}
  localparam logic [1:0] AFA_TT [8] = '{2'b00, 2'b11, 2'b01, 2'b11, 2'b01, 2'b11, 2'b11, 2'b11};

  initial begin
    for (int r = 0; r < 8; r++) begin
      {a1, b1, c1} = 3'(r);
      #1;
      checks++;
      if (s1 !== AFA_TT[r]) begin failures++; $display("FAIL AFA row %0d got %b", r, s1); end
    end
    // Published ETA example
    a = 16'b1011001110011010; b = 16'b0110100100011011; cin = 0;
    #1 chk("eta_example", s_eta, 17'b1_0001_1100_1001_1111);
    for (int t = 0; t < 4000; t++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      #1;
      chk("afa",   s_def,   ref_add(ADD_AFA, a, b, cin));
      chk("eta",   s_eta,   ref_add(ADD_ETA, a, b, cin));
      chk("loa",   s_loa,   ref_add(ADD_LOA, a, b, cin));
      chk("axa",   s_axa,   ref_add(ADD_AXA, a, b, cin));
      chk("nandc", s_nandc, ref_add(ADD_NANDC, a, b, cin));
      chk("andc",  s_andc,  ref_add(ADD_ANDC, a, b, cin));
      chk("ipp",   s_ipp,   ref_add(ADD_IPP, a, b, cin));
      chk("rca",   s_rca,   17'(a) + 17'(b) + 17'(cin));
      chk("k0",    s_k0,    17'(a) + 17'(b) + 17'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
