// tb_vedic_mul4: exhaustive self-checking test of the 4 x 4 vertical and
// crosswise multiplier. All 256 operand pairs are applied and the 8-bit
// result is compared with the integer product a*b.
module tb_vedic_mul4;

  logic [3:0] a, b;
  logic [7:0] r;
  int unsigned checks = 0, failures = 0;

  vedic_mul4 dut (.a(a), .b(b), .r(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (r !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
