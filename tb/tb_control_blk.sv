// tb_control_blk: self-checking test of the sequencer.
// With the configuration driven directly it checks, for several D_SV / N_SV /
// nmac settings:
//  - the cycle count from the accepted start to done: N_SV x (D_SV + nmac),
//    or N_SV x D_SV without the kernel pass (dot_last = 0);
//  - the SEL_BUF sequence 0,1,2,... (the counter) and the TV select d;
//  - the SEL_MAC / coefficient address sequence and the number of
//    ker_en cycles, and where mac_clr is raised;
//  - write enables only in the write phase, load_reject when busy;
//  - start_reject for an illegal configuration and after 8192 sequences,
//    and that clear resets the sequence counter.
module tb_control_blk;
  import svm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, cfg_ok, clear, start, tv_valid, sv_valid, coef_valid;
  logic tv_wr_en, sv_wr_en, coef_wr_en, load_reject, start_reject, busy, done;
  logic [5:0] sel_buf, tv_sel;
  logic [2:0] sel_mac;
  logic [8:0] coef_addr;
  logic mac_clr, mac_en, ker_en, ker_clr;
  logic [13:0] seq_count;
  cfg_t cfg;

  always #5 clk = ~clk;

  control_blk dut (.clk, .rst_n, .cfg, .cfg_ok, .clear, .start, .tv_valid, .sv_valid,
                   .coef_valid, .tv_wr_en, .sv_wr_en, .coef_wr_en, .load_reject,
                   .start_reject, .busy, .done, .sel_buf, .tv_sel, .sel_mac, .coef_addr,
                   .mac_clr, .mac_en, .ker_en, .ker_clr, .seq_count);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // Run one sequence and check every control output on the way.
  task automatic run(input int dim, input int nsv, input int nmac, input logic last, input logic cont);
    int cyc, macs, kers, exp_cyc, n, d, k, clrs;
    cfg.dim = 7'(dim); cfg.nsv = 7'(nsv); cfg.nmac = 3'(nmac);
    cfg.dot_last = last; cfg.dot_cont = cont;
    start = 1'b1; #1;
    check("mac_clr at start", int'(mac_clr), int'(!cont));
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0; macs = 0; kers = 0; n = 0; d = 0; k = 0; clrs = 0;
    while (!done && cyc < 10000) begin
      check("busy", int'(busy), 1);
      if (mac_en) begin
        check("sel_buf", int'(sel_buf), n * dim + d);
        check("tv_sel", int'(tv_sel), d);
        macs++;
        d++;
        if (d == dim) begin
          d = 0;
          if (!last) n++;
        end
      end
      if (ker_en) begin
        check("sel_mac", int'(sel_mac), k);
        check("coef_addr", int'(coef_addr), n * 6 + k);
        kers++;
        k++;
        if (k == nmac) begin
          check("mac_clr after kernel", int'(mac_clr), 1);
          k = 0; n++;
        end
      end
      if (mac_clr) clrs++;
      // load attempts are refused while busy
      if (cyc == 1) begin
        tv_valid = 1'b1; #1;
        check("no tv write while busy", int'(tv_wr_en), 0);
      end
      @(posedge clk); #1;
      tv_valid = 1'b0;
      if (cyc == 1) check("load_reject", int'(load_reject), 1);
      cyc++;
    end
    exp_cyc = nsv * (dim + (last ? nmac : 0));
    check($sformatf("cycles D=%0d N=%0d M=%0d", dim, nsv, nmac), cyc, exp_cyc);
    check("mac cycles", macs, nsv * dim);
    check("ker cycles", kers, last ? nsv * nmac : 0);
    check("done pulse", int'(done), 1);
    @(posedge clk); #1;
    check("done one cycle", int'(done), 0);
    check("idle", int'(busy), 0);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_done;
    rst_n = 1'b0; cfg_ok = 1'b1; clear = 1'b0; start = 1'b0;
    tv_valid = 1'b0; sv_valid = 1'b0; coef_valid = 1'b0;
    cfg = '0; cfg.prec = BITS12; cfg.trunc = BITS12;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // write phase
    tv_valid = 1'b1; sv_valid = 1'b1; coef_valid = 1'b1; #1;
    check("tv_wr_en idle", int'(tv_wr_en), 1);
    check("sv_wr_en idle", int'(sv_wr_en), 1);
    check("coef_wr_en idle", int'(coef_wr_en), 1);
    tv_valid = 1'b0; sv_valid = 1'b0; coef_valid = 1'b0;
    clear = 1'b1; #1;
    check("ker_clr", int'(ker_clr), 1);
    @(posedge clk); #1;
    clear = 1'b0;
    run(8, 8, 6, 1'b1, 1'b0);
    run(4, 16, 3, 1'b1, 1'b0);
    run(1, 64, 1, 1'b1, 1'b0);
    run(64, 1, 6, 1'b0, 1'b0);
    run(64, 1, 6, 1'b1, 1'b1);
    run(26, 2, 6, 1'b1, 1'b0);
    check("seq_count", int'(seq_count), 6);
    // illegal configuration
    cfg_ok = 1'b0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check("start_reject illegal", int'(start_reject), 1);
    check("not busy", int'(busy), 0);
    cfg_ok = 1'b1;
    // exhaust the 8192 sequences with the shortest one
    cfg.dim = 7'd1; cfg.nsv = 7'd1; cfg.nmac = 3'd1; cfg.dot_last = 1'b1; cfg.dot_cont = 1'b0;
    n_done = int'(seq_count);
    for (int i = n_done; i < 8192; i++) begin
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done) begin @(posedge clk); #1; end
    end
    check("seq_count at limit", int'(seq_count), 8192);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check("start_reject at 8192", int'(start_reject), 1);
    check("not busy at limit", int'(busy), 0);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    check("clear resets count", int'(seq_count), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
