// div3b1: 1-bit division-by-3 cell.
//
// The cell takes a carry c (0, 1 or 2) from its more significant neighbour
// and one dividend bit a, and produces a quotient bit s and a carry d (again
// 0, 1 or 2) for its less significant neighbour, such that
//     2*c + a = 3*s + d.
// Chaining such cells from the most to the least significant bit divides a
// binary number by 3 (see div3bn).
//
// Three equivalent descriptions are offered, chosen by ARCH:
//   DIV3_SOP    s  = c1 | a&c0
//               d1 = ~a&c0 | a&c1
//               d0 = ~a&c1 | a&~c1&~c0
//   DIV3_TABLE  {s, d1, d0} read from an 8-entry constant table indexed by
//               the 3-bit number {c1, c0, a}
//   DIV3_DIVREM s = {c,a} / 3, d = {c,a} mod 3
// The equations, the table and the choice of three architectures follow the
// source description. c = 3 never occurs in a chain (it is a "don't care");
// this design's table gives 000 there, while the equations and the operators
// give whatever they compute. The default is the sum-of-products cell.
//
// Purely combinational, no clock; the delay is one or two gate levels.
module div3b1
  import divconst_pkg::*;
#(
  parameter div3_arch_e ARCH = DIV3_SOP
) (
  input  logic [1:0] c,  // carry in, 0..2
  input  logic       a,  // dividend bit
  output logic [1:0] d,  // carry out, 0..2
  output logic       s   // quotient bit
);

  // Truth table, index {c1, c0, a}, entry {s, d1, d0}.
  localparam logic [2:0] SD_TABLE [8] = '{
    3'b000,  // c=0 a=0: 0 = 3*0 + 0
    3'b001,  // c=0 a=1: 1 = 3*0 + 1
    3'b010,  // c=1 a=0: 2 = 3*0 + 2
    3'b100,  // c=1 a=1: 3 = 3*1 + 0
    3'b101,  // c=2 a=0: 4 = 3*1 + 1
    3'b110,  // c=2 a=1: 5 = 3*1 + 2
    3'b000,  // c=3 a=0: does not occur
    3'b000   // c=3 a=1: does not occur
  };

  generate
    if (ARCH == DIV3_SOP) begin : g_sop
      always_comb begin
        s    = c[1] | (a & c[0]);
        d[1] = (~a & c[0]) | (a & c[1]);
        d[0] = (~a & c[1]) | (a & ~c[1] & ~c[0]);
      end
    end else if (ARCH == DIV3_TABLE) begin : g_table
      always_comb begin
        {s, d} = SD_TABLE[{c, a}];
      end
    end else begin : g_divrem
      logic [2:0] quo, rem;
      always_comb begin
        quo = {c, a} / 3'd3;
        rem = {c, a} % 3'd3;
        s   = quo[0];
        d   = rem[1:0];
      end
      // quo[2:1] and rem[2] are always zero for a 3-bit dividend.
      logic unused_ok;
      assign unused_ok = ^{quo[2:1], rem[2]};
    end
  endgenerate

endmodule
