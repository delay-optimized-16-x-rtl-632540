// tb_csa_adder: self-checking test of the three-operand carry save adder.
// The default 8-bit adder is tested over all 2**24 operand triples, then
// with random triples; a 4-bit copy is tested exhaustively as well. The
// reference is the integer sum x + y + z, split into sum and carry out.
module tb_csa_adder;

  localparam int unsigned W = 8;

  logic [W-1:0] x, y, z, sum;
  logic [1:0]   cout;
  logic [3:0]   x4, y4, z4, sum4;
  logic [1:0]   cout4;
  int unsigned  checks = 0, failures = 0;
  int unsigned  cout_seen [4] = '{0, 0, 0, 0};

  csa_adder dut (.x(x), .y(y), .z(z), .sum(sum), .cout(cout));
  csa_adder #(.WIDTH(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(sum4), .cout(cout4));

  task automatic check8(input int unsigned xi, input int unsigned yi, input int unsigned zi);
    int unsigned total;
    x = W'(xi); y = W'(yi); z = W'(zi);
    #1;
    total = xi + yi + zi;
    checks++;
    cout_seen[cout]++;
    if ({cout, sum} !== 10'(total)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d+%0d+%0d: got cout=%0d sum=%0d", xi, yi, zi, cout, sum);
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
    check8(0, 0, 0);
    check8(255, 255, 255);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 256; k++)
          check8(i, j, k);
    for (int n = 0; n < 100000; n++)
      check8($urandom_range(255), $urandom_range(255), $urandom_range(255));
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 16; k++) begin
          x4 = 4'(i); y4 = 4'(j); z4 = 4'(k);
          #1;
          checks++;
          if ({cout4, sum4} !== 6'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL4 %0d+%0d+%0d: got cout=%0d sum=%0d", i, j, k, cout4, sum4);
          end
        end
    for (int c = 0; c < 3; c++)
      if (cout_seen[c] == 0) begin
        failures++;
        $display("carry out %0d never produced", c);
      end
    $display("carry out counts: 0:%0d 1:%0d 2:%0d", cout_seen[0], cout_seen[1], cout_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
