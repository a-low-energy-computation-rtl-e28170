// tb_status_regs: self-checking test of the status registers.
// Checks the reset values, that every register is written and read back and
// reaches its cfg field, that writes are refused (and flagged) while busy,
// and the cfg_ok legality rules: zero sizes, D_SV x N_SV above 64, zero or
// too many MACs, an undefined precision code, and N_SV > 1 with a dot product
// split over sequences.
module tb_status_regs;
  import svm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, busy, cfg_we, wr_reject, cfg_ok;
  logic [2:0]  cfg_addr;
  logic [23:0] cfg_wdata, cfg_rdata;
  cfg_t cfg;

  always #5 clk = ~clk;

  status_regs dut (.clk, .rst_n, .busy, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
                   .wr_reject, .cfg, .cfg_ok);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int a, input int d);
    cfg_addr = 3'(a); cfg_wdata = 24'(d); cfg_we = 1'b1;
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic rd(input int a, input int exp);
    cfg_addr = 3'(a); #1;
    check($sformatf("read reg %0d", a), int'(cfg_rdata), exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; busy = 1'b0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // reset values
    check("reset dim", int'(cfg.dim), 1);
    check("reset nsv", int'(cfg.nsv), 1);
    check("reset nmac", int'(cfg.nmac), 6);
    check("reset prec", int'(cfg.prec), 2);
    check("reset sel1", int'(cfg.sel1), 1);
    check("reset bank", int'(cfg.bank_on), 15);
    check("reset dot_last", int'(cfg.dot_last), 1);
    check("reset ok", int'(cfg_ok), 1);
    // write and read back
    wr(0, 8);   rd(0, 8);   check("dim", int'(cfg.dim), 8);
    wr(1, 8);   rd(1, 8);   check("nsv", int'(cfg.nsv), 8);
    wr(2, 3);   rd(2, 3);   check("nmac", int'(cfg.nmac), 3);
    wr(3, 6);   rd(3, 6);   check("prec", int'(cfg.prec), 2); check("trunc", int'(cfg.trunc), 1);
    wr(4, 5);   rd(4, 5);   check("sel0", int'(cfg.sel0), 1); check("sel1", int'(cfg.sel1), 0);
                            check("sel2", int'(cfg.sel2), 1);
    wr(5, 12'hA5C); rd(5, 12'hA5C); check("beta", int'(cfg.beta), 12'hA5C);
    wr(6, 24'h812345); rd(6, 24'h812345); check("bias", int'(cfg.bias), 24'h812345);
    wr(7, 6'b10_0011); rd(7, 6'b10_0011); check("bank", int'(cfg.bank_on), 3);
    check("ok 8x8", int'(cfg_ok), 1);
    // writes refused while busy
    busy = 1'b1;
    wr(0, 5);
    check("busy write refused", int'(cfg.dim), 8);
    check("wr_reject", int'(wr_reject), 1);
    busy = 1'b0;
    @(posedge clk); #1;
    check("wr_reject clears", int'(wr_reject), 0);
    // legality
    wr(0, 9);  #1 check("9x8 > 64 illegal", int'(cfg_ok), 0);
    wr(0, 64); wr(1, 1); #1 check("64x1 legal", int'(cfg_ok), 1);
    wr(0, 0);  #1 check("dim 0 illegal", int'(cfg_ok), 0);
    wr(0, 4);  wr(2, 0); #1 check("nmac 0 illegal", int'(cfg_ok), 0);
    wr(2, 7);  #1 check("nmac 7 illegal", int'(cfg_ok), 0);
    wr(2, 6);  wr(3, 3); #1 check("prec 3 illegal", int'(cfg_ok), 0);
    wr(3, 0);  wr(7, 6'b01_1111); #1 check("dot_cont nsv=1 legal", int'(cfg_ok), 1);
    wr(1, 2);  #1 check("dot_cont nsv=2 illegal", int'(cfg_ok), 0);
    wr(7, 6'b00_1111); #1 check("dot_last=0 nsv=2 illegal", int'(cfg_ok), 0);
    wr(7, 6'b10_1111); #1 check("nsv=2 legal", int'(cfg_ok), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
