// vedic_mul4: unsigned 4 x 4 -> 8 bit multiplier by the vertical and
// crosswise (Urdhva Tiryagbhyam) method.
//
// The product is formed in seven column steps, least significant first.
// Step k (k = 0..6) takes every crosswise bit product a[i]&b[j] with
// i + j == k, adds the carry left over from step k-1, keeps the least
// significant bit of that sum as result bit r[k] and passes the remaining
// high bits on as the carry of step k+1:
//   r0      = a0b0
//   c1 r1   = a1b0 + a0b1
//   c2 r2   = c1 + a2b0 + a1b1 + a0b2
//   c3 r3   = c2 + a3b0 + a2b1 + a1b2 + a0b3
//   c4 r4   = c3 + a3b1 + a2b2 + a1b3
//   c5 r5   = c4 + a3b2 + a2b3
//   c6 r6   = c5 + a3b3
//   r7      = carry out of the last step
// The carry of a step is a small number, not a single bit: the widest
// column (step 4) adds four bit products and a carry of up to 3, so every
// column sum fits in 3 bits and every carry in 2 bits. The last carry is at
// most 1 because 15 * 15 = 225 fits in 8 bits.
//
// The step equations and their order are those of the method. How each
// column sum is built from gates (half and full adders) is left to
// synthesis here: each column is one small word-level addition.
//
// Interface: a, b (4 bits each, unsigned), r (8 bits). Purely
// combinational, no clock, no latency.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] r
);

  localparam int unsigned NSTEPS = 7;

  logic [1:0] carry [NSTEPS+1];   // carry into step k

  assign carry[0] = '0;

  for (genvar k = 0; k < NSTEPS; k++) begin : g_step
    logic [2:0] xsum;     // sum of the crosswise bit products of column k
    logic [2:0] col_sum;  // xsum plus the carry of the step before

    always_comb begin
      xsum = '0;
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) begin
          xsum = xsum + {2'b00, a[i] & b[k-i]};
        end
      end
    end

    assign col_sum    = xsum + {1'b0, carry[k]};
    assign r[k]       = col_sum[0];
    assign carry[k+1] = col_sum[2:1];
  end

  assign r[7] = carry[NSTEPS][0];

endmodule
