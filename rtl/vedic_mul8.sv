// vedic_mul8: unsigned 8 x 8 -> 16 bit Vedic multiplier.
//
// The operands are split into 4-bit halves. Four 4 x 4 vertical and
// crosswise multipliers (vedic_mul4) form the partial products
//   PP0 = a[3:0]*b[3:0], PP1 = a[3:0]*b[7:4],
//   PP2 = a[7:4]*b[3:0], PP3 = a[7:4]*b[7:4]
// in parallel, and a carry save adder tree with 4-bit adders (csa_tree,
// H = 4) combines them into the product. That the 8-bit multiplier is
// built from 4-bit modules is the design's structure; that it combines them
// exactly like the 16-bit multiplier does, at half the width, is this
// design's choice.
//
// Interface: a, b (8 bits each, unsigned), prod (16 bits). Purely
// combinational.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] prod
);

  logic [3:0][7:0] pp;

  vedic_mul4 u_pp0 (.a(a[3:0]), .b(b[3:0]), .r(pp[0]));
  vedic_mul4 u_pp1 (.a(a[3:0]), .b(b[7:4]), .r(pp[1]));
  vedic_mul4 u_pp2 (.a(a[7:4]), .b(b[3:0]), .r(pp[2]));
  vedic_mul4 u_pp3 (.a(a[7:4]), .b(b[7:4]), .r(pp[3]));

  csa_tree #(.H(4)) u_tree (.pp(pp), .prod(prod));

endmodule
