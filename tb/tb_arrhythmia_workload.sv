// tb_arrhythmia_workload: the two arrhythmia classifiers at full model size
// on the default accelerator, with random data in place of patient features.
//   wavelet:    D_SV = 256, N_SV = 10000, quadratic kernel, 8-bit precision
//               and truncation. Each group of 6 SVs needs 4 write sequences
//               of 64 dimensions chained with dot_cont/dot_last:
//               1667 groups x 4 = 6668 sequences (limit 8192).
//   morphology: D_SV = 26, N_SV = 10000, quadratic kernel, 12-bit precision,
//               10-bit truncation, 2 SVs per buffer (52 of 64 words):
//               834 sequences of up to 12 SVs, with the TV loaded once.
// For every sequence the host shifts in the SV words (384, the whole chain),
// the TV words when they change and only as many coefficient words as the
// sequence uses. The final 24-bit result and sign are compared with an integer
// reference model, and so is the cycle count of every sequence. The test prints
// the compute and load cycles per classification. At
// the throughput target of 3 classifications per second it also prints the
// clock the compute phase alone needs.
module tb_arrhythmia_workload;
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

  localparam int NSV = 10000;

  logic [11:0] tvfull [256];
  logic [11:0] svw [6][64];
  logic [11:0] cw  [12];
  int mdl_acc [6];
  int mdl_res;
  longint compute_cyc, load_cyc;
  int seq_errs;

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

  task automatic wr_cfg(input int a, input int d);
    cfg_addr = 3'(a); cfg_wdata = 24'(d); cfg_we = 1'b1;
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic shift_tv(input int base, input int dim);
    for (int e = dim - 1; e >= 0; e--) begin
      tv_data = tvfull[base + e]; tv_valid = 1'b1;
      @(posedge clk); #1; load_cyc++;
    end
    tv_valid = 1'b0;
  endtask

  task automatic shift_sv();
    for (int j = 5; j >= 0; j--)
      for (int e = 63; e >= 0; e--) begin
        sv_data = svw[j][e]; sv_valid = 1'b1;
        @(posedge clk); #1; load_cyc++;
      end
    sv_valid = 1'b0;
  endtask

  task automatic shift_coef(input int words);
    for (int a = words - 1; a >= 0; a--) begin
      coef_data = cw[a]; coef_valid = 1'b1;
      @(posedge clk); #1; load_cyc++;
    end
    coef_valid = 1'b0;
  endtask

  task automatic run(input int exp_cyc);
    int cyc;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    compute_cyc += cyc;
    if (cyc != exp_cyc) seq_errs++;
  endtask

  // reference for one sequence: tv offset, dims, SVs per buffer, MACs, p, t
  task automatic model(input int tvbase, input int dim, input int nsv, input int nmac,
                       input int p, input int t, input logic cont, input logic last);
    int pr, v, kr;
    for (int n = 0; n < nsv; n++) begin
      if (n > 0 || !cont) foreach (mdl_acc[j]) mdl_acc[j] = 0;
      for (int d = 0; d < dim; d++)
        for (int j = 0; j < nmac; j++) begin
          pr = sx(int'(tvfull[tvbase + d]), p) * sx(int'(svw[j][n * dim + d]), p);
          mdl_acc[j] = sx(mdl_acc[j] + (pr >>> (2 * p - t)), 16);
        end
      if (last) begin
        for (int k = 0; k < nmac; k++) begin
          v  = sx((mdl_acc[k] >>> 4) + 0, 12);
          kr = q11(v, v);
          mdl_res = sx(mdl_res + kr * sx(int'(cw[n * 6 + k]), 12), 24);
        end
        foreach (mdl_acc[j]) mdl_acc[j] = 0;
      end
    end
  endtask

  task automatic new_class(input int bias);
    wr_cfg(REG_BIAS, bias & 24'hFFFFFF);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    mdl_res = sx(bias, 24);
    compute_cyc = 0; load_cyc = 0; seq_errs = 0;
  endtask

  initial begin
    #4000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int groups, nm, nseq, left;
    rst_n = 1'b0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; buf_reset = 1'b0;
    tv_valid = 1'b0; sv_valid = 1'b0; coef_valid = 1'b0;
    tv_data = '0; sv_data = '0; coef_data = '0; clear = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- wavelet features, D_SV = 256 ----------------
    foreach (tvfull[i]) tvfull[i] = 12'(sx($urandom, 8));
    wr_cfg(REG_DIM, 64);
    wr_cfg(REG_NSV, 1);
    wr_cfg(REG_ARITH, (0 << 2) | 0);        // 8-bit precision, 8-bit truncation
    wr_cfg(REG_KSEL, 3'b010);               // quadratic
    wr_cfg(REG_BETA, 0);
    new_class(-20000);
    groups = (NSV + 5) / 6;
    nseq = 0;
    for (int g = 0; g < groups; g++) begin
      nm = (g == groups - 1) ? NSV - 6 * (groups - 1) : 6;
      wr_cfg(REG_NMAC, nm);
      foreach (cw[i]) cw[i] = 12'($urandom);
      for (int c = 0; c < 4; c++) begin
        foreach (svw[j, i]) svw[j][i] = 12'(sx($urandom, 8));
        wr_cfg(REG_CTRL, ((c == 3) << 5) | ((c > 0) << 4) | 4'hF);
        shift_tv(64 * c, 64);
        shift_sv();
        if (c == 3) shift_coef(6);
        run(64 + ((c == 3) ? nm : 0));
        model(64 * c, 64, 1, nm, 8, 8, (c > 0), (c == 3));
        nseq++;
      end
    end
    check("wavelet sequences", nseq, 6668);
    check("wavelet seq_count", int'(seq_count), 6668);
    check("wavelet cycle counts", seq_errs, 0);
    check("wavelet class_res", int'(class_res), mdl_res);
    check("wavelet class_pos", int'(class_pos), int'(mdl_res >= 0));
    $display("wavelet: %0d sequences, compute %0d cycles, load %0d cycles, result %0d",
             nseq, compute_cyc, load_cyc, class_res);
    $display("wavelet: compute clock for 3 classifications/s = %0d kHz",
             (compute_cyc * 3 + 999) / 1000);

    // ---------------- morphology features, D_SV = 26 ----------------
    foreach (tvfull[i]) tvfull[i] = 12'(sx($urandom, 12));
    wr_cfg(REG_DIM, 26);
    wr_cfg(REG_ARITH, (1 << 2) | 2);        // 12-bit precision, 10-bit truncation
    wr_cfg(REG_CTRL, (1 << 5) | 4'hF);
    new_class(1000);
    shift_tv(0, 26);
    left = NSV;
    nseq = 0;
    while (left > 0) begin
      int nb;
      nb = (left >= 12) ? 2 : 1;
      nm = (left >= 12) ? 6 : ((left >= 6) ? 6 : left);
      wr_cfg(REG_NSV, nb);
      wr_cfg(REG_NMAC, nm);
      foreach (svw[j, i]) svw[j][i] = 12'(sx($urandom, 12));
      foreach (cw[i]) cw[i] = 12'($urandom);
      shift_sv();
      shift_coef(6 * nb);
      run(nb * (26 + nm));
      model(0, 26, nb, nm, 12, 10, 1'b0, 1'b1);
      left -= nb * nm;
      nseq++;
    end
    check("morphology sequences", nseq, 834);
    check("morphology cycle counts", seq_errs, 0);
    check("morphology class_res", int'(class_res), mdl_res);
    check("morphology class_pos", int'(class_pos), int'(mdl_res >= 0));
    $display("morphology: %0d sequences, compute %0d cycles, load %0d cycles, result %0d",
             nseq, compute_cyc, load_cyc, class_res);
    $display("morphology: compute clock for 3 classifications/s = %0d kHz",
             (compute_cyc * 3 + 999) / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
