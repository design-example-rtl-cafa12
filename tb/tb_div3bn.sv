// tb_div3bn: exhaustive self-checking test of the N-bit division-by-3 array.
//
// The default 4-bit array is tested with each cell architecture, and an
// 8-bit array with the default architecture. Every carry in ec in {0,1,2} and
// every dividend ea is applied; es and ed are compared with the quotient and
// remainder of 2^N*ec + ea by 3, computed in the testbench, and the identity
// 2^N*ec + ea = 3*es + ed is checked with ed < 3. Combinational: outputs are
// sampled 1 ns after each input change.
module tb_div3bn;
  import divconst_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [1:0] ec;
  logic [3:0] ea4;
  logic [7:0] ea8;
  logic [1:0] ed_sop, ed_tab, ed_dr, ed8;
  logic [3:0] es_sop, es_tab, es_dr;
  logic [7:0] es8;

  div3bn                                  u_sop (.ec(ec), .ea(ea4), .ed(ed_sop), .es(es_sop));
  div3bn #(.N(4), .ARCH(DIV3_TABLE))      u_tab (.ec(ec), .ea(ea4), .ed(ed_tab), .es(es_tab));
  div3bn #(.N(4), .ARCH(DIV3_DIVREM))     u_dr  (.ec(ec), .ea(ea4), .ed(ed_dr),  .es(es_dr));
  div3bn #(.N(8))                         u_w8  (.ec(ec), .ea(ea8), .ed(ed8),    .es(es8));

  task automatic check(input string name, input int unsigned n, input int unsigned ecv,
                       input int unsigned eav, input int unsigned es_got,
                       input int unsigned ed_got);
    int unsigned v;
    v = (ecv << n) + eav;
    checks++;
    if (es_got != v / 3 || ed_got != v % 3 || ed_got >= 3 || 3 * es_got + ed_got != v) begin
      failures++;
      $display("FAIL %s ec=%0d ea=%0d: es=%0d ed=%0d, expected es=%0d ed=%0d",
               name, ecv, eav, es_got, ed_got, v / 3, v % 3);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned e = 0; e < 3; e++) begin
      for (int unsigned x = 0; x < 256; x++) begin
        ec  = 2'(e);
        ea4 = 4'(x);
        ea8 = 8'(x);
        #1;
        if (x < 16) begin
          check("n4 sop",    4, e, x, es_sop, ed_sop);
          check("n4 table",  4, e, x, es_tab, ed_tab);
          check("n4 divrem", 4, e, x, es_dr,  ed_dr);
        end
        check("n8 sop", 8, e, x, es8, ed8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
