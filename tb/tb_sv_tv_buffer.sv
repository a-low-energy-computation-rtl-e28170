// tb_sv_tv_buffer: self-checking test of the register-file buffer.
// Two 4 x 16 x 12b buffers are chained through shift_out, as the SV preload
// buffers are. Checks:
//  - after a full 128-word load, word e of each buffer reads the e-th word of
//    its part of the stream (the host sends the last buffer's words first,
//    each buffer's highest address first);
//  - a short load of L words into a reset buffer puts element e at address e;
//  - wr_en low holds the contents;
//  - switching bank 2 off zeroes and reads its 16 words as zero, leaves the
//    other banks intact and the data stays lost when the bank comes back;
//  - buf_reset clears everything.
module tb_sv_tv_buffer;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        buf_reset, wr_en;
  logic [11:0] din;
  logic [3:0]  bank_on;
  logic [5:0]  rd_sel;
  logic [11:0] q0, q1, so0, so1;

  always #5 clk = ~clk;

  sv_tv_buffer #(.WIDTH(12), .BANKS(4), .BANK_DEPTH(16)) dut0 (
    .clk, .buf_reset, .wr_en, .din, .bank_on, .rd_sel, .dout(q0), .shift_out(so0));
  sv_tv_buffer #(.WIDTH(12), .BANKS(4), .BANK_DEPTH(16)) dut1 (
    .clk, .buf_reset, .wr_en, .din(so0), .bank_on, .rd_sel, .dout(q1), .shift_out(so1));

  logic [11:0] img0 [64];
  logic [11:0] img1 [64];

  task automatic check(input string what, input logic [11:0] got, input logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic shift(input logic [11:0] w);
    din = w; wr_en = 1'b1;
    @(posedge clk); #1;
    wr_en = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    buf_reset = 1'b1; wr_en = 1'b0; din = '0; bank_on = 4'hF; rd_sel = '0;
    @(posedge clk); #1;
    buf_reset = 1'b0;
    for (int i = 0; i < 64; i++) begin img0[i] = 12'($urandom); img1[i] = 12'($urandom); end
    // buffer 1 (far end of the chain) first, highest address first
    for (int e = 63; e >= 0; e--) shift(img1[e]);
    for (int e = 63; e >= 0; e--) shift(img0[e]);
    for (int e = 0; e < 64; e++) begin
      rd_sel = 6'(e); #1;
      check($sformatf("buf0[%0d]", e), q0, img0[e]);
      check($sformatf("buf1[%0d]", e), q1, img1[e]);
    end
    check("shift_out", so0, img0[63]);
    // hold
    din = 12'hABC;
    repeat (5) @(posedge clk);
    #1;
    rd_sel = 6'd0; #1;
    check("hold", q0, img0[0]);
    // bank 2 off
    bank_on = 4'b1011;
    @(posedge clk); #1;
    for (int e = 0; e < 64; e++) begin
      rd_sel = 6'(e); #1;
      check($sformatf("gated buf0[%0d]", e), q0, (e >= 32 && e < 48) ? 12'h000 : img0[e]);
    end
    bank_on = 4'hF;
    @(posedge clk); #1;
    rd_sel = 6'd40; #1;
    check("lost after power-up", q0, 12'h000);
    rd_sel = 6'd50; #1;
    check("kept bank 3", q0, img0[50]);
    // reset, then a short load of 10 elements
    buf_reset = 1'b1;
    @(posedge clk); #1;
    buf_reset = 1'b0;
    rd_sel = 6'd50; #1;
    check("reset", q0, 12'h000);
    for (int e = 9; e >= 0; e--) shift(12'(e * 7 + 1));
    for (int e = 0; e < 10; e++) begin
      rd_sel = 6'(e); #1;
      check($sformatf("short[%0d]", e), q0, 12'(e * 7 + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
