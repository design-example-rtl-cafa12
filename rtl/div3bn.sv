// div3bn: N-bit division by 3 (4 bits by default).
//
// N div3b1 cells are chained from the most significant dividend bit to the
// least significant one. The carry into the top cell is ec (0..2); each cell
// passes its remainder down as the carry of the next; the carry out of the
// bottom cell is the remainder ed. The ports satisfy
//     2^N * ec + ea = 3 * es + ed,   ec, ed in {0, 1, 2}.
// With ec = 0 this is ea / 3 and ea mod 3; a nonzero ec lets arrays be
// cascaded into a wider divider. The structure and the default width of four
// bits follow the source description; ARCH selects the cell architecture
// (see div3b1).
//
// Purely combinational: the carry ripples through N cells.
module div3bn
  import divconst_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter div3_arch_e  ARCH = DIV3_SOP
) (
  input  logic [1:0]   ec,  // carry in (upper part of the dividend), 0..2
  input  logic [N-1:0] ea,  // dividend
  output logic [1:0]   ed,  // remainder, 0..2
  output logic [N-1:0] es   // quotient
);

  // cc[i+1] enters cell i, cc[i] leaves it.
  logic [1:0] cc [N+1];

  assign cc[N] = ec;

  for (genvar i = 0; i < N; i++) begin : g_cell
    div3b1 #(.ARCH(ARCH)) u_cell (
      .c (cc[i+1]),
      .a (ea[i]),
      .d (cc[i]),
      .s (es[i])
    );
  end

  assign ed = cc[0];

endmodule
