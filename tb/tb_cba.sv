// tb_cba: self-checking test of the carry-bypass adder.
// Two instances are checked: 16 bits in four full groups, and 14 bits with a
// short last group. Each gets exhaustive carry patterns on small corner
// operands (all-propagate groups, which take the bypass path) and random
// operands. The reference is the plain sum a + b + cin.
module tb_cba;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [13:0] a14, b14, s14;  logic ci14, co14;

  cba #(.N(16), .M(4)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cba #(.N(14), .M(4)) dut14 (.a(a14), .b(b14), .cin(ci14), .sum(s14), .cout(co14));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; ci16 = c; #1;
    exp = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL cba16 %h+%h+%b = %h exp %h", a, b, c, {co16, s16}, exp);
    end
  endtask

  task automatic check14(input logic [13:0] a, input logic [13:0] b, input logic c);
    logic [14:0] exp;
    a14 = a; b14 = b; ci14 = c; #1;
    exp = 15'(a) + 15'(b) + 15'(c);
    checks++;
    if ({co14, s14} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL cba14 %h+%h+%b = %h exp %h", a, b, c, {co14, s14}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full-propagate operands: every group bypasses
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'h0F0F, 16'hF0F0, 1'b1);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check14(14'h3FFF, 14'h0000, 1'b1);
    check14(14'h2AAA, 14'h1555, 1'b1);
    for (int i = 0; i < 4000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check14(14'($urandom), 14'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
