// tb_vedic_mul16: end-to-end self-checking test of the 16 x 16 Vedic
// multiplier at its default (and only) size.
//
// Applied, in order:
//   - the two worked examples of the architecture: a = 61682, b = 30345
//     (product 1871740290) and a = b = 65535 (product 4294836225), for
//     which the four partial products are checked bit for bit as well;
//   - all-zero, all-one and single-bit corners;
//   - a sweep of every value of a against a spread of b values;
//   - random operand pairs.
// Every product is compared with the integer product a*b, and every
// partial product with the byte products it stands for.
//
// It also counts how often each carry path of the adder tree is used:
// the low and high first-stage adders carrying out 1 and 2, and the
// second-stage adder carrying out 1. A path never exercised is counted as
// a failure. The carries are worked out from the byte products of the
// operands, not read from inside the multiplier.
module tb_vedic_mul16;

  logic [15:0]      a, b;
  logic [3:0][15:0] pp;
  logic [31:0]      prod;
  int unsigned      checks = 0, failures = 0;
  int unsigned      n_lo [3] = '{0, 0, 0};
  int unsigned      n_hi [3] = '{0, 0, 0};
  int unsigned      n_mid [2] = '{0, 0};

  vedic_mul16 dut (.a(a), .b(b), .pp(pp), .prod(prod));

  task automatic apply(input logic [15:0] ai, input logic [15:0] bi);
    logic [31:0] want;
    logic [15:0] r0, r1, r2, r3;
    int          c_lo, c_hi, c_mid, s_hi;
    a = ai;
    b = bi;
    #1;
    want = 32'(ai) * 32'(bi);
    checks++;
    if (prod !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d want %0d", ai, bi, prod, want);
    end
    checks++;
    if (pp[0] !== 16'(ai[7:0]) * 16'(bi[7:0])  || pp[1] !== 16'(ai[7:0]) * 16'(bi[15:8]) ||
        pp[2] !== 16'(ai[15:8]) * 16'(bi[7:0]) || pp[3] !== 16'(ai[15:8]) * 16'(bi[15:8])) begin
      failures++;
      if (failures < 10) $display("FAIL partial products for %0d * %0d", ai, bi);
    end
    // carries of the adder tree, worked out from the byte products
    r0 = 16'(ai[7:0]) * 16'(bi[7:0]);
    r1 = 16'(ai[7:0]) * 16'(bi[15:8]);
    r2 = 16'(ai[15:8]) * 16'(bi[7:0]);
    r3 = 16'(ai[15:8]) * 16'(bi[15:8]);
    c_lo  = (int'(r2[7:0]) + int'(r1[7:0]) + int'(r0[15:8])) >> 8;
    s_hi  = int'(r3[7:0]) + int'(r2[15:8]) + int'(r1[15:8]);
    c_hi  = s_hi >> 8;
    c_mid = (int'(s_hi[7:0]) + c_lo) >> 8;
    n_lo[c_lo]++;
    n_hi[c_hi]++;
    n_mid[c_mid]++;
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, got, want);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example 1
    apply(16'b1111000011110010, 16'b0111011010001001);
    expect_eq(32'(pp[0]), 32'b1000000110000010, "example 1 PP0");
    expect_eq(32'(pp[1]), 32'b0110111110001100, "example 1 PP1");
    expect_eq(32'(pp[2]), 32'b1000000001110000, "example 1 PP2");
    expect_eq(32'(pp[3]), 32'b0110111010100000, "example 1 PP3");
    expect_eq(prod, 32'b01101111100100000111110110000010, "example 1 PROD");
    expect_eq(prod, 32'd1871740290, "example 1 PROD decimal");
    // worked example 2
    apply(16'd65535, 16'd65535);
    for (int k = 0; k < 4; k++) expect_eq(32'(pp[k]), 32'b1111111000000001, "example 2 PP");
    expect_eq(prod, 32'b11111111111111100000000000000001, "example 2 PROD");
    expect_eq(prod, 32'd4294836225, "example 2 PROD decimal");

    // corners
    apply(16'd0, 16'd0);
    apply(16'd0, 16'hFFFF);
    apply(16'hFFFF, 16'd1);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1 << i), 16'(1 << j));

    // every a against a spread of b values
    for (int j = 0; j < 256; j++) begin
      logic [15:0] bj;
      bj = (j == 0) ? 16'hFFFF : (j == 1) ? 16'hFF00 : (j == 2) ? 16'h00FF : 16'($urandom);
      for (int i = 0; i < 65536; i++) apply(16'(i), bj);
    end

    // random pairs
    for (int n = 0; n < 2_000_000; n++) apply(16'($urandom), 16'($urandom));

    for (int c = 1; c < 3; c++) begin
      checks++;
      if (n_lo[c] == 0) begin failures++; $display("first-stage low carry %0d never seen", c); end
      checks++;
      if (n_hi[c] == 0) begin failures++; $display("first-stage high carry %0d never seen", c); end
    end
    checks++;
    if (n_mid[1] == 0) begin failures++; $display("second-stage carry never seen"); end
    $display("carry use: stage1 low 1:%0d 2:%0d, stage1 high 1:%0d 2:%0d, stage2 1:%0d",
             n_lo[1], n_lo[2], n_hi[1], n_hi[2], n_mid[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
