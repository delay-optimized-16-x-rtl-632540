// tb_csa_tree: self-checking test of the partial product adder tree. Random
// and corner partial products (not only real products) are applied to the
// default 8-bit tree and to a 4-bit tree; the reference is the weighted sum
// PP0 + (PP1 + PP2) * 2**H + PP3 * 2**(2H) modulo 2**(4H), worked out with
// 64-bit integers.
module tb_csa_tree;

  logic [3:0][15:0] pp8;
  logic [31:0]      prod8;
  logic [3:0][7:0]  pp4;
  logic [15:0]      prod4;
  int unsigned      checks = 0, failures = 0;

  csa_tree dut8 (.pp(pp8), .prod(prod8));
  csa_tree #(.H(4)) dut4 (.pp(pp4), .prod(prod4));

  function automatic logic [63:0] ref_sum(input logic [63:0] p0, input logic [63:0] p1,
                                          input logic [63:0] p2, input logic [63:0] p3,
                                          input int unsigned h);
    return p0 + ((p1 + p2) << h) + (p3 << (2 * h));
  endfunction

  task automatic check8(input logic [15:0] p0, input logic [15:0] p1,
                        input logic [15:0] p2, input logic [15:0] p3);
    logic [63:0] expct;
    pp8 = '{p3, p2, p1, p0};
    #1;
    expct = ref_sum(64'(p0), 64'(p1), 64'(p2), 64'(p3), 8);
    checks++;
    if (prod8 !== expct[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL H=8 pp=%h %h %h %h: got %h want %h", p3, p2, p1, p0, prod8, expct[31:0]);
    end
  endtask

  task automatic check4(input logic [7:0] p0, input logic [7:0] p1,
                        input logic [7:0] p2, input logic [7:0] p3);
    logic [63:0] expct;
    pp4 = '{p3, p2, p1, p0};
    #1;
    expct = ref_sum(64'(p0), 64'(p1), 64'(p2), 64'(p3), 4);
    checks++;
    if (prod4 !== expct[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL H=4 pp=%h %h %h %h: got %h want %h", p3, p2, p1, p0, prod4, expct[15:0]);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check8('0, '0, '0, '0);
    check8('1, '1, '1, '1);
    check8(16'hFE01, 16'hFE01, 16'hFE01, 16'hFE01);
    check8(16'hFF00, 16'h00FF, 16'h00FF, 16'h0000);
    check4('0, '0, '0, '0);
    check4('1, '1, '1, '1);
    for (int n = 0; n < 200000; n++) begin
      check8(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
      check4(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
