// tb_bin2dec: exhaustive self-checking test of the binary-to-decimal
// converter.
//
// Every 14-bit input is applied. For 0..9999 each of the four digits is
// compared with the decimal digit worked out in the testbench by repeated
// division, and in_range must be high; for 10000..16383 in_range must be low.
// Combinational: outputs are sampled 1 ns after each input change.
module tb_bin2dec;
  import divconst_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       [B2D_BIN_W-1:0]  a;
  bcd_digit_t [B2D_DIGITS-1:0] d;
  logic                        in_range;

  bin2dec u_dut (.a(a), .d(d), .in_range(in_range));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned v = 0; v < (1 << B2D_BIN_W); v++) begin
      a = B2D_BIN_W'(v);
      #1;
      checks++;
      if (in_range !== (v <= B2D_MAX)) begin
        failures++;
        if (failures < 20) $display("FAIL a=%0d: in_range=%0d", v, in_range);
      end
      if (v <= B2D_MAX) begin
        int unsigned rest;
        rest = v;
        for (int k = 0; k < B2D_DIGITS; k++) begin
          checks++;
          if (d[k] != 4'(rest % 10)) begin
            failures++;
            if (failures < 20)
              $display("FAIL a=%0d: digit %0d = %0d, expected %0d", v, k, d[k], rest % 10);
          end
          rest = rest / 10;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
