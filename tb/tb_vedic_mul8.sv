// tb_vedic_mul8: exhaustive self-checking test of the 8 x 8 Vedic
// multiplier. All 65536 operand pairs are applied and the 16-bit product is
// compared with the integer product a*b.
module tb_vedic_mul8;

  logic [7:0]  a, b;
  logic [15:0] prod;
  int unsigned checks = 0, failures = 0;

  vedic_mul8 dut (.a(a), .b(b), .prod(prod));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (prod !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
