// bin2dec: 14-bit binary to 4-digit decimal converter.
//
// Conversion by repeated division by the target radix, 10. Three
// division-by-10 arrays are cascaded, each as wide as its input can be:
//   stage 1, 14 bits: a (<= 9999) / 10 -> remainder d[0], quotient <= 999
//   stage 2, 10 bits: quotient / 10    -> remainder d[1], quotient <= 99
//   stage 3,  7 bits: quotient / 10    -> remainder d[2], quotient d[3] <= 9
// The method, the stage widths and the digit order follow the source
// description. d[0] is the least significant digit.
//
// The input range is 0..9999. This design adds in_range, high exactly when
// a <= 9999; it is taken from the arrays' own quotients (the stage-1 quotient
// fits in 10 bits, and the stage-3 quotient is at most 9). For a > 9999 the
// digits are not meaningful.
//
// Purely combinational: the carry ripples through 14 + 10 + 7 cells.
module bin2dec
  import divconst_pkg::*;
(
  input  logic       [B2D_BIN_W-1:0]  a,        // binary input, 0..9999
  output bcd_digit_t [B2D_DIGITS-1:0] d,        // decimal digits, d[0] least significant
  output logic                        in_range  // a <= 9999
);

  localparam int unsigned W1 = B2D_BIN_W;  // 14 bits: a <= 9999
  localparam int unsigned W2 = 10;         // quotient <= 999
  localparam int unsigned W3 = 7;          // quotient <= 99
  localparam int unsigned M  = carry_width(B2D_RADIX);

  logic [W1-1:0] q1;
  logic [W2-1:0] q2;
  logic [W3-1:0] q3;

  divk_bn #(.BETA(B2D_RADIX), .N(W1)) u_stage1 (
    .cn ('0), .a (a), .s (q1), .c0 (d[0])
  );

  divk_bn #(.BETA(B2D_RADIX), .N(W2)) u_stage2 (
    .cn ('0), .a (q1[W2-1:0]), .s (q2), .c0 (d[1])
  );

  divk_bn #(.BETA(B2D_RADIX), .N(W3)) u_stage3 (
    .cn ('0), .a (q2[W3-1:0]), .s (q3), .c0 (d[2])
  );

  assign d[3] = q3[3:0];

  // a <= 9999  <=>  q1 <= 999  <=>  q2 <= 99  <=>  q3 <= 9. The quotients
  // are cut to the widths above, so q1 must also fit in 10 bits (then q2
  // fits in 7 bits on its own).
  assign in_range = (q1[W1-1:W2] == '0) && (q2[W2-1:W3] == '0)
                 && (q3 <= W3'(9));

  if (M != 4) begin : g_bad_radix
    $error("bin2dec: a decimal digit must be 4 bits wide");
  end

endmodule
