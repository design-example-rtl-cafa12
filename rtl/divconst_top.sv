// divconst_top: the two division-by-constant circuits side by side.
//
//   div3_*  a 4-bit division-by-3 array (div3bn) with its carry in:
//           16*div3_ec + div3_ea = 3*div3_es + div3_ed, div3_ec, div3_ed < 3.
//   b2d_*   a 14-bit binary to 4-digit decimal converter (bin2dec), built
//           from three cascaded division-by-10 arrays (divk_bn, divk_b1).
// The two share no signals; each has its own ports. Both are purely
// combinational, so the outputs follow the inputs after the ripple delay of
// the carry chains and there is no clock or reset.
module divconst_top
  import divconst_pkg::*;
(
  input  logic       [1:0]            div3_ec,      // carry in, 0..2
  input  logic       [3:0]            div3_ea,      // dividend
  output logic       [1:0]            div3_ed,      // remainder, 0..2
  output logic       [3:0]            div3_es,      // quotient
  input  logic       [B2D_BIN_W-1:0]  b2d_a,        // binary, 0..9999
  output bcd_digit_t [B2D_DIGITS-1:0] b2d_d,        // digits, [0] least significant
  output logic                        b2d_in_range  // b2d_a <= 9999
);

  div3bn #(.N(4), .ARCH(DIV3_SOP)) u_div3 (
    .ec (div3_ec),
    .ea (div3_ea),
    .ed (div3_ed),
    .es (div3_es)
  );

  bin2dec u_b2d (
    .a        (b2d_a),
    .d        (b2d_d),
    .in_range (b2d_in_range)
  );

endmodule
