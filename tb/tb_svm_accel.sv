// tb_svm_accel: end-to-end test of the classification accelerator at its
// default (published) sizes: 6 MAC units, 64-word buffers, 8192 sequences.
// A host model programs the status registers, loads the TV line buffer, the
// chained SV preload buffers and the kernel coefficients with random data,
// and runs write sequences. An integer reference model computes, independently
// of the RTL, the MAC accumulators (precision p, truncation t, 16-bit wrap),
// the 12-bit DOT_PROD (top bits of the accumulator), the polynomial kernel in
// Q1.11 and the 24-bit class accumulator. After every sequence the result
// and its sign are compared, and the cycle count N_SV x (D_SV + nmac) is
// checked.
// Mechanisms exercised and counted (each must happen at least once):
// the three precisions and truncations, kernel orders 1-4, accumulation over
// several sequences, a dot product split over sequences (dot_cont/dot_last),
// fewer than 6 active MACs, a full 64-word buffer (counter saturation), bank
// power gating, load_reject, cfg_reject, start_reject for an illegal
// configuration and the 8192-sequence limit.
module tb_svm_accel;
  import svm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n;
  logic cfg_we, cfg_reject, buf_reset, tv_valid, sv_valid, coef_valid, load_reject;
  logic [2:0]  cfg_addr;
  logic [23:0] cfg_wdata, cfg_rdata;
  logic [11:0] tv_data, sv_data, coef_data;
  logic clear, start, start_reject, busy, done, class_pos;
  logic [13:0] seq_count;
  logic signed [23:0] class_res;

  always #5 clk = ~clk;

  svm_accel dut (.*);

  // ---------------- host-side images and reference state ----------------
  logic [11:0] tvw [64];
  logic [11:0] svw [6][64];
  logic [11:0] cw  [384];
  int mdl_acc [6];
  int mdl_res;
  // current configuration as the reference sees it
  int c_dim, c_nsv, c_nmac, c_p, c_t, c_order, c_beta;
  logic c_cont, c_last;

  // mechanism counters
  int m_prec [3], m_trunc [3], m_order [4];
  int m_contrib;
  int m_multiseq, m_chunk, m_partial, m_fullbuf, m_gate, m_loadrej, m_cfgrej, m_startrej, m_limit;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic int sx(input int v, input int bits);
    int r;
    r = v & ((1 << bits) - 1);
    if (r >= (1 << (bits - 1))) r -= (1 << bits);
    return r;
  endfunction

  function automatic int q11(input int a, input int b);
    int r;
    r = (a * b) >>> 11;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  // ---------------- host tasks ----------------
  task automatic wr_cfg(input int a, input int d);
    cfg_addr = 3'(a); cfg_wdata = 24'(d); cfg_we = 1'b1;
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic configure(input int dim, input int nsv, input int nmac, input int p,
                           input int t, input int order, input int beta,
                           input logic cont, input logic last, input int banks);
    int pc, tc;
    pc = (p == 8) ? 0 : (p == 10) ? 1 : 2;
    tc = (t == 8) ? 0 : (t == 10) ? 1 : 2;
    wr_cfg(REG_DIM, dim);
    wr_cfg(REG_NSV, nsv);
    wr_cfg(REG_NMAC, nmac);
    wr_cfg(REG_ARITH, (tc << 2) | pc);
    // SEL2 SEL1 SEL0
    wr_cfg(REG_KSEL, (order >= 3 ? 4 : 0) | (order == 2 ? 2 : 0) | (order == 4 ? 1 : 0));
    wr_cfg(REG_BETA, beta & 12'hFFF);
    wr_cfg(REG_CTRL, (int'(last) << 5) | (int'(cont) << 4) | banks);
    c_dim = dim; c_nsv = nsv; c_nmac = nmac; c_p = p; c_t = t; c_order = order;
    c_beta = sx(beta, 12); c_cont = cont; c_last = last;
    m_prec[pc]++; m_trunc[tc]++; m_order[order - 1]++;
    if (nmac < 6) m_partial++;
    if (dim * nsv == 64) m_fullbuf++;
  endtask

  task automatic load_tv(input int dim);
    for (int e = dim - 1; e >= 0; e--) begin
      tv_data = tvw[e]; tv_valid = 1'b1;
      @(posedge clk); #1;
    end
    tv_valid = 1'b0;
  endtask

  task automatic load_sv();
    for (int j = 5; j >= 0; j--)
      for (int e = 63; e >= 0; e--) begin
        sv_data = svw[j][e]; sv_valid = 1'b1;
        @(posedge clk); #1;
      end
    sv_valid = 1'b0;
  endtask

  task automatic load_coef();
    for (int a = 383; a >= 0; a--) begin
      coef_data = cw[a]; coef_valid = 1'b1;
      @(posedge clk); #1;
    end
    coef_valid = 1'b0;
  endtask

  task automatic randomize_images(input int mag);
    foreach (tvw[i]) tvw[i] = 12'(sx($urandom, mag));
    foreach (svw[j, i]) svw[j][i] = 12'(sx($urandom, mag));
    foreach (cw[i]) cw[i] = 12'($urandom);
  endtask

  task automatic new_classification(input int bias);
    wr_cfg(REG_BIAS, bias & 24'hFFFFFF);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    mdl_res = sx(bias, 24);
    foreach (mdl_acc[j]) mdl_acc[j] = 0;
    check("bias loaded", int'(class_res), mdl_res);
  endtask

  // reference model of one write sequence
  task automatic model_sequence();
    int xp, yp, pr, dot12, v, sq, kr;
    for (int n = 0; n < c_nsv; n++) begin
      if (n > 0 || !c_cont) foreach (mdl_acc[j]) mdl_acc[j] = 0;
      for (int d = 0; d < c_dim; d++)
        for (int j = 0; j < c_nmac; j++) begin
          xp = sx(int'(tvw[d]), c_p);
          yp = sx(int'(svw[j][n * c_dim + d]), c_p);
          pr = xp * yp;
          mdl_acc[j] = sx(mdl_acc[j] + (pr >>> (2 * c_p - c_t)), 16);
        end
      if (c_last) begin
        for (int k = 0; k < c_nmac; k++) begin
          dot12 = mdl_acc[k] >>> 4;
          v  = sx(dot12 + c_beta, 12);
          sq = q11(v, v);
          case (c_order)
            1: kr = v;
            2: kr = sq;
            3: kr = q11(sq, v);
            default: kr = q11(sq, sq);
          endcase
          mdl_res = sx(mdl_res + kr * sx(int'(cw[n * 6 + k]), 12), 24);
        end
        foreach (mdl_acc[j]) mdl_acc[j] = 0;
      end
    end
  endtask

  // start one sequence, try to disturb it, wait for done, check
  task automatic run_sequence(input string tag, input logic poke);
    int cyc, exp_cyc, prev;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100000) begin
      if (poke && cyc == 2) begin
        // a load and a register write during the compute phase must be refused
        tv_valid = 1'b1; tv_data = 12'h5A5; sv_valid = 1'b1; sv_data = 12'hA5A;
        cfg_we = 1'b1; cfg_addr = 3'(REG_BETA); cfg_wdata = 24'h000777;
      end
      @(posedge clk); #1;
      if (poke && cyc == 2) begin
        tv_valid = 1'b0; sv_valid = 1'b0; cfg_we = 1'b0;
        if (load_reject) m_loadrej++;
        if (cfg_reject)  m_cfgrej++;
        check("load_reject seen", int'(load_reject), 1);
        check("cfg_reject seen", int'(cfg_reject), 1);
      end
      cyc++;
    end
    exp_cyc = c_nsv * (c_dim + (c_last ? c_nmac : 0));
    check({tag, " cycles"}, cyc, exp_cyc);
    prev = mdl_res;
    model_sequence();
    if (mdl_res != prev) m_contrib++;
    check({tag, " class_res"}, int'(class_res), mdl_res);
    check({tag, " class_pos"}, int'(class_pos), int'(mdl_res >= 0));
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; buf_reset = 1'b0;
    tv_valid = 1'b0; sv_valid = 1'b0; coef_valid = 1'b0;
    tv_data = '0; sv_data = '0; coef_data = '0; clear = 1'b0; start = 1'b0;
    c_cont = 1'b0; c_last = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    buf_reset = 1'b1;
    @(posedge clk); #1;
    buf_reset = 1'b0;

    // 1. one classification over three sequences, every precision/truncation
    //    pair and every kernel order, D=8, N_SV=8 per buffer (48 SVs/sequence)
    for (int order = 1; order <= 4; order++) begin
      for (int pc = 0; pc < 3; pc++) begin
        new_classification(int'($urandom) >>> 10);
        for (int s = 0; s < 3; s++) begin
          randomize_images(12);
          configure(8, 8, 6, 8 + 2 * pc, 8 + 2 * ((pc + s) % 3), order,
                    int'($urandom), 1'b0, 1'b1, 4'hF);
          load_tv(8); load_sv(); load_coef();
          run_sequence($sformatf("ord%0d p%0d s%0d", order, pc, s), (s == 1 && pc == 0));
        end
        m_multiseq++;
      end
    end

    // 2. fewer MACs, other shapes (including a full 64-word buffer)
    new_classification(0);
    randomize_images(10);
    configure(4, 16, 3, 10, 12, 2, 37, 1'b0, 1'b1, 4'hF);
    load_tv(4); load_sv(); load_coef();
    run_sequence("nmac3", 1'b0);
    configure(1, 64, 5, 12, 8, 3, -100, 1'b0, 1'b1, 4'hF);
    load_tv(1);
    run_sequence("1x64", 1'b0);
    configure(26, 2, 6, 12, 10, 2, 5, 1'b0, 1'b1, 4'hF);
    randomize_images(12);
    load_tv(26); load_sv(); load_coef();
    run_sequence("26x2", 1'b0);

    // 3. dot product of 192 dimensions split over three sequences
    new_classification(-5000);
    for (int c = 0; c < 3; c++) begin
      randomize_images(8);
      configure(64, 1, 6, 8, 8, 2, 3, (c > 0), (c == 2), 4'hF);
      load_tv(64); load_sv();
      if (c == 2) load_coef();
      run_sequence($sformatf("chunk%0d", c), 1'b0);
    end
    m_chunk++;

    // 4. bank power gating: a 16-word model runs with banks 1..3 off
    new_classification(1234);
    randomize_images(12);
    configure(4, 4, 6, 12, 12, 2, 0, 1'b0, 1'b1, 4'hF);
    load_sv(); load_coef();
    configure(4, 4, 6, 12, 12, 2, 0, 1'b0, 1'b1, 4'b0001);
    load_tv(4);
    run_sequence("gated", 1'b0);
    m_gate++;

    // 5. illegal configuration is refused
    configure(16, 8, 6, 12, 12, 2, 0, 1'b0, 1'b1, 4'hF);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check("start_reject illegal", int'(start_reject), 1);
    check("illegal not busy", int'(busy), 0);
    if (start_reject) m_startrej++;

    // 6. the 8192-sequence limit (shortest sequence, no reloads)
    new_classification(0);
    configure(1, 1, 1, 12, 12, 1, 0, 1'b0, 1'b1, 4'hF);
    for (int s = 0; s < 8192; s++) begin
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done) begin @(posedge clk); #1; end
      model_sequence();
    end
    check("limit class_res", int'(class_res), mdl_res);
    check("seq_count", int'(seq_count), 8192);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check("start_reject at limit", int'(start_reject), 1);
    if (start_reject && seq_count == 14'd8192) m_limit++;

    // mechanism coverage
    for (int i = 0; i < 3; i++) begin
      check($sformatf("precision mode %0d used", i), int'(m_prec[i] > 0), 1);
      check($sformatf("truncation mode %0d used", i), int'(m_trunc[i] > 0), 1);
    end
    for (int i = 0; i < 4; i++) check($sformatf("order %0d used", i + 1), int'(m_order[i] > 0), 1);
    check("sequences change the result", int'(m_contrib > 30), 1);
    check("multi-sequence", int'(m_multiseq > 0), 1);
    check("chunked dot product", int'(m_chunk > 0), 1);
    check("partial MAC array", int'(m_partial > 0), 1);
    check("full buffer", int'(m_fullbuf > 0), 1);
    check("bank gating", int'(m_gate > 0), 1);
    check("load_reject", int'(m_loadrej > 0), 1);
    check("cfg_reject", int'(m_cfgrej > 0), 1);
    check("start_reject", int'(m_startrej > 0), 1);
    check("sequence limit", int'(m_limit > 0), 1);
    $display("result changed in %0d sequences", m_contrib);
    $display("mechanisms: prec %0d/%0d/%0d trunc %0d/%0d/%0d order %0d/%0d/%0d/%0d multiseq %0d chunk %0d partial %0d fullbuf %0d gate %0d loadrej %0d cfgrej %0d startrej %0d limit %0d",
             m_prec[0], m_prec[1], m_prec[2], m_trunc[0], m_trunc[1], m_trunc[2],
             m_order[0], m_order[1], m_order[2], m_order[3], m_multiseq, m_chunk, m_partial,
             m_fullbuf, m_gate, m_loadrej, m_cfgrej, m_startrej, m_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
