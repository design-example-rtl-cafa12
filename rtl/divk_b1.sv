// divk_b1: 1-bit division-by-constant cell for any small divisor BETA.
//
// The cell takes an M-bit carry c (0 .. BETA-1) and one dividend bit a and
// produces a quotient bit s and an M-bit carry d (0 .. BETA-1) such that
//     2*c + a = BETA*s + d,   2^M >= BETA.
// Because c < BETA, 2*c + a < 2*BETA, so the quotient is a single bit: the
// cell compares {c, a} with BETA and subtracts BETA when it is not smaller.
// The relation and the carry width follow the source description; the
// compare-and-subtract structure is this design's own, the simplest circuit
// with that function. Carries of BETA or more never occur in an array and
// give an unspecified result.
//
// Purely combinational: one (M+1)-bit comparator and subtractor.
module divk_b1
  import divconst_pkg::*;
#(
  parameter int unsigned BETA = 10,
  localparam int unsigned M   = carry_width(BETA)
) (
  input  logic [M-1:0] c,  // carry in, 0 .. BETA-1
  input  logic         a,  // dividend bit
  output logic [M-1:0] d,  // carry out, 0 .. BETA-1
  output logic         s   // quotient bit
);

  localparam logic [M:0] BETA_W = (M+1)'(BETA);

  logic [M:0] t;   // 2*c + a
  logic [M:0] r;   // t - s*BETA

  always_comb begin
    t = {c, a};
    s = (t >= BETA_W);
    r = s ? (t - BETA_W) : t;
    d = r[M-1:0];
  end

  // r[M] is zero whenever c < BETA.
  logic unused_ok;
  assign unused_ok = r[M];

endmodule
