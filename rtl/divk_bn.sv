// divk_bn: N-bit division by the constant BETA (14 bits by 10 by default).
//
// An iterative one-dimensional array of N divk_b1 cells, like a ripple-carry
// adder turned around: the carry, a partial remainder below BETA, runs from
// the most significant bit to the least significant one. The ports satisfy
//     2^N * cn + a = BETA * s + c0,   cn, c0 < BETA.
// With cn = 0 the array gives a / BETA and a mod BETA; cn lets a wider
// dividend be split over several arrays. The structure and relation follow
// the source description; the defaults are those of the first stage of the
// binary-to-decimal converter (bin2dec).
//
// Purely combinational: the carry ripples through N cells.
module divk_bn
  import divconst_pkg::*;
#(
  parameter int unsigned BETA = 10,
  parameter int unsigned N    = 14,
  localparam int unsigned M   = carry_width(BETA)
) (
  input  logic [M-1:0] cn,  // carry in (upper part of the dividend), < BETA
  input  logic [N-1:0] a,   // dividend
  output logic [N-1:0] s,   // quotient
  output logic [M-1:0] c0   // remainder, < BETA
);

  // cc[i+1] enters cell i, cc[i] leaves it.
  logic [M-1:0] cc [N+1];

  assign cc[N] = cn;

  for (genvar i = 0; i < N; i++) begin : g_cell
    divk_b1 #(.BETA(BETA)) u_cell (
      .c (cc[i+1]),
      .a (a[i]),
      .d (cc[i]),
      .s (s[i])
    );
  end

  assign c0 = cc[0];

endmodule
