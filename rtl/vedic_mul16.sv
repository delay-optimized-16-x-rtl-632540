// vedic_mul16: unsigned 16 x 16 -> 32 bit Vedic multiplier with a carry
// save adder tree.
//
// The multiplier splits both operands into bytes and forms the four
// partial products in parallel with four 8 x 8 Vedic multipliers
// (vedic_mul8, themselves built from 4 x 4 vertical and crosswise
// multipliers):
//   PP0 = a[7:0]*b[7:0],  PP1 = a[7:0]*b[15:8],
//   PP2 = a[15:8]*b[7:0], PP3 = a[15:8]*b[15:8].
// The partial products are combined by four 8-bit carry save adders in
// three stages (csa_tree, H = 8), so that no carry ripples across more than
// one byte before the next stage starts: PROD[7:0] is PP0[7:0] directly,
// PROD[15:8] comes from the first stage, PROD[23:16] from the second and
// PROD[31:24] from the third, whose own carry out is ignored.
//
// The split, the partial product assignment and the adder tree follow the
// published architecture. The partial products are also brought out on
// pp, because they are the intermediate values one checks in simulation.
//
// Interface: a, b (16 bits each, unsigned), pp[k] = PPk (16 bits each),
// prod (32 bits). Purely combinational, no clock: a result is valid one
// propagation delay after the operands change.
module vedic_mul16 (
  input  logic [15:0]      a,
  input  logic [15:0]      b,
  output logic [3:0][15:0] pp,
  output logic [31:0]      prod
);

  vedic_mul8 u_pp0 (.a(a[7:0]),  .b(b[7:0]),  .prod(pp[0]));
  vedic_mul8 u_pp1 (.a(a[7:0]),  .b(b[15:8]), .prod(pp[1]));
  vedic_mul8 u_pp2 (.a(a[15:8]), .b(b[7:0]),  .prod(pp[2]));
  vedic_mul8 u_pp3 (.a(a[15:8]), .b(b[15:8]), .prod(pp[3]));

  csa_tree #(.H(8)) u_tree (.pp(pp), .prod(prod));

endmodule
