// tb_kcoef_buffer: self-checking test of the kernel coefficient buffer.
// Loads all 384 words (highest address first), reads every address back,
// checks that nothing moves while wr_en is low and that buf_reset clears.
module tb_kcoef_buffer;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        buf_reset, wr_en;
  logic [11:0] din, dout;
  logic [8:0]  rd_addr;
  logic [11:0] img [384];

  always #5 clk = ~clk;

  kcoef_buffer dut (.clk, .buf_reset, .wr_en, .din, .rd_addr, .dout);

  task automatic check(input int a, input logic [11:0] exp);
    rd_addr = 9'(a); #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, dout, exp);
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
    buf_reset = 1'b1; wr_en = 1'b0; din = '0; rd_addr = '0;
    @(posedge clk); #1;
    buf_reset = 1'b0;
    foreach (img[i]) img[i] = 12'($urandom);
    for (int a = 383; a >= 0; a--) begin
      din = img[a]; wr_en = 1'b1;
      @(posedge clk); #1;
    end
    wr_en = 1'b0; din = 12'h123;
    repeat (3) @(posedge clk);
    #1;
    for (int a = 0; a < 384; a++) check(a, img[a]);
    check(400, 12'h000);
    buf_reset = 1'b1;
    @(posedge clk); #1;
    buf_reset = 1'b0;
    check(0, 12'h000);
    check(383, 12'h000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
