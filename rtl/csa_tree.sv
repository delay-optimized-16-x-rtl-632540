// csa_tree: combines the four partial products of a split multiplication
// into the full product with four H-bit carry save adders in three stages.
//
// With operands split into H-bit halves, a = {aH, aL} and b = {bH, bL}, the
// partial products are PP0 = aL*bL, PP1 = aL*bH, PP2 = aH*bL and
// PP3 = aH*bH (2H bits each) and the product is
//   PP0 + (PP1 + PP2) * 2**H + PP3 * 2**(2H).
// The product is built H bits at a time:
//   PROD[H-1:0]    = PP0[H-1:0], passed straight through.
//   stage 1, low : PP2[H-1:0] + PP1[H-1:0] + PP0[2H-1:H] gives PROD[2H-1:H]
//                  and carry c_lo (0..2).
//   stage 1, high: PP3[H-1:0] + PP2[2H-1:H] + PP1[2H-1:H] gives sum s_hi and
//                  carry c_hi (0..2).
//   stage 2      : s_hi + c_lo gives PROD[3H-1:2H] and carry c_mid (0..1).
//   stage 3      : PP3[2H-1:H] + c_hi + c_mid gives PROD[4H-1:3H]; its carry
//                  out is dropped, since a product of two 2H-bit numbers
//                  always fits in 4H bits. It is kept as the signal c_top,
//                  which nothing reads; lint reports it as unused, which is
//                  intended.
// The operand grouping and the three stages follow the block diagram of the
// 16 x 16 multiplier (H = 8); which carry feeds which stage is read from
// that diagram and from the arithmetic above. The 8 x 8 multiplier reuses
// the same tree with H = 4.
//
// Interface: pp[k] is PPk (2H bits), prod is the 4H-bit result. For any
// pp values, prod is their weighted sum modulo 2**(4H). Purely
// combinational.
module csa_tree #(
  parameter int unsigned H = 8
) (
  input  logic [3:0][2*H-1:0] pp,
  output logic [4*H-1:0]      prod
);

  logic [H-1:0] s_hi;
  logic [1:0]   c_lo, c_hi, c_mid;
  logic [1:0]   c_top;   // carry out of stage 3, ignored (see above)
  logic [H-1:0] c_lo_ext, c_hi_ext, c_mid_ext;

  assign c_lo_ext  = H'(c_lo);
  assign c_hi_ext  = H'(c_hi);
  assign c_mid_ext = H'(c_mid);

  assign prod[H-1:0] = pp[0][H-1:0];

  // stage 1
  csa_adder #(.WIDTH(H)) u_stage1_hi (
    .x(pp[3][H-1:0]), .y(pp[2][2*H-1:H]), .z(pp[1][2*H-1:H]),
    .sum(s_hi), .cout(c_hi)
  );
  csa_adder #(.WIDTH(H)) u_stage1_lo (
    .x(pp[2][H-1:0]), .y(pp[1][H-1:0]), .z(pp[0][2*H-1:H]),
    .sum(prod[2*H-1:H]), .cout(c_lo)
  );

  // stage 2
  csa_adder #(.WIDTH(H)) u_stage2 (
    .x(s_hi), .y(c_lo_ext), .z('0),
    .sum(prod[3*H-1:2*H]), .cout(c_mid)
  );

  // stage 3
  csa_adder #(.WIDTH(H)) u_stage3 (
    .x(pp[3][2*H-1:H]), .y(c_hi_ext), .z(c_mid_ext),
    .sum(prod[4*H-1:3*H]), .cout(c_top)
  );

endmodule
