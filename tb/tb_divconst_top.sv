// tb_divconst_top: end-to-end test of the whole design at its default size.
//
// Both circuits in the top are driven exhaustively at the same time:
//   - the 4-bit division-by-3 array with every carry in 0..2 and every
//     dividend, checked against 16*ec + ea = 3*es + ed with ed < 3;
//   - the binary-to-decimal converter with every 14-bit input, checked digit
//     by digit against a decimal conversion done in the testbench, and with
//     in_range checked on both sides of 9999.
// It also counts how often each mechanism happened: a nonzero carry into the
// division-by-3 array, each remainder 0, 1 and 2 out of it, each digit value
// 0..9 at each decimal position, and an out-of-range input. A mechanism that
// never happened counts as a failure. Combinational: outputs are sampled 1 ns
// after each input change.
module tb_divconst_top;
  import divconst_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       [1:0]            div3_ec, div3_ed;
  logic       [3:0]            div3_ea, div3_es;
  logic       [B2D_BIN_W-1:0]  b2d_a;
  bcd_digit_t [B2D_DIGITS-1:0] b2d_d;
  logic                        b2d_in_range;

  divconst_top u_dut (
    .div3_ec (div3_ec), .div3_ea (div3_ea), .div3_ed (div3_ed), .div3_es (div3_es),
    .b2d_a (b2d_a), .b2d_d (b2d_d), .b2d_in_range (b2d_in_range)
  );

  int n_carry_in;
  int n_rem [3];
  int n_digit [B2D_DIGITS][10];
  int n_out_of_range;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_carry_in = 0;
    n_out_of_range = 0;
    foreach (n_rem[i]) n_rem[i] = 0;
    foreach (n_digit[k, v]) n_digit[k][v] = 0;

    for (int unsigned v = 0; v < (1 << B2D_BIN_W); v++) begin
      int unsigned e, x, num;
      // Division by 3: walk all 48 legal inputs over and over.
      e = (v / 16) % 3;
      x = v % 16;
      div3_ec = 2'(e);
      div3_ea = 4'(x);
      b2d_a   = B2D_BIN_W'(v);
      #1;

      num = 16 * e + x;
      checks++;
      if (div3_es != 4'(num / 3) || div3_ed != 2'(num % 3) || div3_ed >= 3) begin
        failures++;
        if (failures < 20)
          $display("FAIL div3 ec=%0d ea=%0d: es=%0d ed=%0d", e, x, div3_es, div3_ed);
      end
      if (e != 0) n_carry_in++;
      if (div3_ed < 3) n_rem[div3_ed]++;

      checks++;
      if (b2d_in_range !== (v <= B2D_MAX)) begin
        failures++;
        if (failures < 20) $display("FAIL b2d a=%0d: in_range=%0d", v, b2d_in_range);
      end
      if (v > B2D_MAX) begin
        if (!b2d_in_range) n_out_of_range++;
      end else begin
        int unsigned rest;
        rest = v;
        for (int k = 0; k < B2D_DIGITS; k++) begin
          checks++;
          if (b2d_d[k] != 4'(rest % 10)) begin
            failures++;
            if (failures < 20)
              $display("FAIL b2d a=%0d: digit %0d = %0d, expected %0d", v, k, b2d_d[k], rest % 10);
          end else begin
            n_digit[k][rest % 10]++;
          end
          rest = rest / 10;
        end
      end
    end

    $display("mechanism: div3 nonzero carry in: %0d", n_carry_in);
    checks++;
    if (n_carry_in == 0) begin failures++; $display("FAIL no nonzero carry in"); end
    for (int r = 0; r < 3; r++) begin
      $display("mechanism: div3 remainder %0d: %0d", r, n_rem[r]);
      checks++;
      if (n_rem[r] == 0) begin failures++; $display("FAIL remainder %0d never seen", r); end
    end
    for (int k = 0; k < B2D_DIGITS; k++) begin
      for (int v = 0; v < 10; v++) begin
        checks++;
        if (n_digit[k][v] == 0) begin
          failures++;
          $display("FAIL digit %0d never showed value %0d", k, v);
        end
      end
    end
    $display("mechanism: b2d all 10 values at each of %0d digit positions checked", B2D_DIGITS);
    $display("mechanism: b2d out-of-range inputs flagged: %0d", n_out_of_range);
    checks++;
    if (n_out_of_range == 0) begin failures++; $display("FAIL no out-of-range input flagged"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
