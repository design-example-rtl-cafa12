// tb_divk_bn: self-checking test of the N-bit division-by-BETA array.
//
// The default array (14 bits by 10) is driven with every carry in cn < 10
// and every 14-bit dividend; arrays of 8 bits by 3 and 6 bits by 7 are driven
// exhaustively as well. s and c0 are compared with the quotient and remainder
// of 2^N*cn + a by BETA, worked out in the testbench. Combinational: outputs
// are sampled 1 ns after each input change.
module tb_divk_bn;

  int checks = 0;
  int failures = 0;

  logic [3:0]  cn10, c0_10;
  logic [13:0] a14, s14;
  logic [1:0]  cn3, c0_3;
  logic [7:0]  a8, s8;
  logic [2:0]  cn7, c0_7;
  logic [5:0]  a6, s6;

  divk_bn                      u_d10 (.cn(cn10), .a(a14), .s(s14), .c0(c0_10));
  divk_bn #(.BETA(3), .N(8))   u_d3  (.cn(cn3),  .a(a8),  .s(s8),  .c0(c0_3));
  divk_bn #(.BETA(7), .N(6))   u_d7  (.cn(cn7),  .a(a6),  .s(s6),  .c0(c0_7));

  task automatic check(input int unsigned beta, input int unsigned n,
                       input int unsigned cnv, input int unsigned av,
                       input int unsigned s_got, input int unsigned c0_got);
    int unsigned v;
    v = (cnv << n) + av;
    checks++;
    if (s_got != v / beta || c0_got != v % beta) begin
      failures++;
      if (failures < 20)
        $display("FAIL beta=%0d n=%0d cn=%0d a=%0d: s=%0d c0=%0d, expected s=%0d c0=%0d",
                 beta, n, cnv, av, s_got, c0_got, v / beta, v % beta);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned cnv = 0; cnv < 10; cnv++) begin
      for (int unsigned av = 0; av < (1 << 14); av++) begin
        cn10 = 4'(cnv);
        a14  = 14'(av);
        cn3  = 2'(cnv % 3);
        a8   = 8'(av);
        cn7  = 3'(cnv % 7);
        a6   = 6'(av);
        #1;
        check(10, 14, cnv, av, s14, c0_10);
        if (av < 256 && cnv < 3) check(3, 8, cnv, av, s8, c0_3);
        if (av < 64 && cnv < 7)  check(7, 6, cnv, av, s6, c0_7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
