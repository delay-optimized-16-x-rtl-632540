// csa_adder: three-operand WIDTH-bit adder built as a carry save adder.
//
// A row of full adders reduces the three operands x, y and z bit by bit to
// a partial sum vector (x ^ y ^ z) and a saved carry vector (the majority
// of x, y, z), with no carry passed between bit positions. The saved
// carries, one place to the left, are then added to the partial sum bits to
// give the final WIDTH-bit sum and a 2-bit carry out; the total of three
// WIDTH-bit numbers is below 4 * 2**WIDTH, so two carry-out bits always
// suffice.
//
// In the 16 x 16 multiplier this is the "8 bit carry save adder" box, used
// four times. The operands that are carries of an earlier stage are
// narrower than WIDTH and are given zero-extended. The split into a carry
// save row and one final addition is this design's reading of the
// description that the saved carry bits are added to the partial sum bits
// to obtain the final sum; the final addition is left to synthesis.
//
// Interface: x, y, z (WIDTH bits), sum (WIDTH bits), cout (2 bits, weight
// 2**WIDTH). Purely combinational.
module csa_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [1:0]       cout
);

  logic [WIDTH-1:0] psum;    // partial sum bits of the full-adder row
  logic [WIDTH-1:0] pcarry;  // saved carries, bit i has weight 2**(i+1)

  always_comb begin
    psum   = x ^ y ^ z;
    pcarry = (x & y) | (x & z) | (y & z);
    {cout, sum} = {2'b00, psum} + {1'b0, pcarry, 1'b0};
  end

endmodule
