// tb_div3b1: exhaustive self-checking test of the 1-bit division-by-3 cell.
//
// All three architectures (sum of products, truth table, division and
// remainder operators) are instantiated side by side and driven with every
// legal input, c in {0, 1, 2} and a in {0, 1}. Each output is compared with
// the quotient and remainder of 2*c + a by 3, worked out in the testbench.
// The cell is combinational; outputs are sampled 1 ns after each input change.
module tb_div3b1;
  import divconst_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [1:0] c;
  logic       a;
  logic [1:0] d_sop, d_tab, d_dr;
  logic       s_sop, s_tab, s_dr;

  div3b1 #(.ARCH(DIV3_SOP))    u_sop (.c(c), .a(a), .d(d_sop), .s(s_sop));
  div3b1 #(.ARCH(DIV3_TABLE))  u_tab (.c(c), .a(a), .d(d_tab), .s(s_tab));
  div3b1 #(.ARCH(DIV3_DIVREM)) u_dr  (.c(c), .a(a), .d(d_dr),  .s(s_dr));

  task automatic check(input string name, input logic s_got, input logic [1:0] d_got,
                       input int unsigned s_exp, input int unsigned d_exp);
    checks++;
    if (s_got !== 1'(s_exp) || d_got !== 2'(d_exp)) begin
      failures++;
      $display("FAIL %s c=%0d a=%0d: s=%0d d=%0d, expected s=%0d d=%0d",
               name, c, a, s_got, d_got, s_exp, d_exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned ci = 0; ci < 3; ci++) begin
      for (int unsigned ai = 0; ai < 2; ai++) begin
        int unsigned v;
        c = 2'(ci);
        a = 1'(ai);
        #1;
        v = 2 * ci + ai;
        check("sop",    s_sop, d_sop, v / 3, v % 3);
        check("table",  s_tab, d_tab, v / 3, v % 3);
        check("divrem", s_dr,  d_dr,  v / 3, v % 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
