// tb_divk_b1: exhaustive self-checking test of the 1-bit division-by-BETA
// cell.
//
// Cells for BETA = 10 (the default), 3, 5, 7 and 16 are driven with every
// legal carry c < BETA and both values of a. The quotient bit and the carry
// out are compared with (2*c + a) / BETA and (2*c + a) mod BETA, worked out in
// the testbench. Combinational: outputs are sampled 1 ns after each change.
module tb_divk_b1;

  int checks = 0;
  int failures = 0;

  logic       a;
  logic [3:0] c10, d10, c16, d16;
  logic [1:0] c3, d3;
  logic [2:0] c5, d5, c7, d7;
  logic       s10, s3, s5, s7, s16;

  divk_b1             u_b10 (.c(c10), .a(a), .d(d10), .s(s10));
  divk_b1 #(.BETA(3)) u_b3  (.c(c3),  .a(a), .d(d3),  .s(s3));
  divk_b1 #(.BETA(5)) u_b5  (.c(c5),  .a(a), .d(d5),  .s(s5));
  divk_b1 #(.BETA(7)) u_b7  (.c(c7),  .a(a), .d(d7),  .s(s7));
  divk_b1 #(.BETA(16)) u_b16 (.c(c16), .a(a), .d(d16), .s(s16));

  task automatic check(input int unsigned beta, input int unsigned cv,
                       input int unsigned s_got, input int unsigned d_got);
    int unsigned v;
    v = 2 * cv + a;
    checks++;
    if (s_got != v / beta || d_got != v % beta) begin
      failures++;
      $display("FAIL beta=%0d c=%0d a=%0d: s=%0d d=%0d, expected s=%0d d=%0d",
               beta, cv, a, s_got, d_got, v / beta, v % beta);
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
    for (int unsigned cv = 0; cv < 16; cv++) begin
      for (int unsigned av = 0; av < 2; av++) begin
        a   = 1'(av);
        c10 = 4'(cv);
        c16 = 4'(cv);
        c3  = 2'(cv);
        c5  = 3'(cv);
        c7  = 3'(cv);
        #1;
        if (cv < 10) check(10, cv, s10, d10);
        if (cv < 3)  check(3,  cv, s3,  d3);
        if (cv < 5)  check(5,  cv, s5,  d5);
        if (cv < 7)  check(7,  cv, s7,  d7);
        check(16, cv, s16, d16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
