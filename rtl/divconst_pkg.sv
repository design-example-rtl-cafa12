// divconst_pkg: types and constants shared by the division-by-constant
// circuits.
//
// A division-by-constant array divides an n-bit number by a small constant
// beta with a chain of identical 1-bit cells. Every cell passes an m-bit carry
// (a partial remainder, always below beta) to its less significant neighbour,
// with 2^m >= beta. carry_width() gives that m.
//
// The binary-to-decimal converter turns a 14-bit number of at most 9999 into
// four decimal digits; its widths and its upper bound are kept here.
//
// div3_arch_e selects one of three equivalent descriptions of the 1-bit
// division-by-3 cell: its sum-of-products equations, its truth table held as
// a constant array, or the division and remainder operators.
package divconst_pkg;

  // Carry (remainder) width m of a division-by-beta cell: smallest m with
  // 2^m >= beta. beta must be at least 2.
  function automatic int unsigned carry_width(input int unsigned beta);
    return (beta < 2) ? 1 : $clog2(beta);
  endfunction

  // Architectures of the 1-bit division-by-3 cell.
  typedef enum logic [1:0] {
    DIV3_SOP    = 2'd0,  // s, d1, d0 from sum-of-products equations
    DIV3_TABLE  = 2'd1,  // {s, d1, d0} read from a constant truth table
    DIV3_DIVREM = 2'd2   // s = (2c+a)/3, d = (2c+a) rem 3
  } div3_arch_e;

  // Binary-to-decimal conversion: 14-bit input, four digits, radix 10.
  localparam int unsigned B2D_BIN_W  = 14;
  localparam int unsigned B2D_DIGITS = 4;
  localparam int unsigned B2D_RADIX  = 10;
  localparam int unsigned B2D_MAX    = 9999;

  // One decimal digit, 0..9.
  typedef logic [3:0] bcd_digit_t;

endpackage
