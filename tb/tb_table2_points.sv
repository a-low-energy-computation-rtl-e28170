// tb_table2_points: the small classifier shapes of the published energy
// measurements, run on the default accelerator with random data.
//   D_SV x N_SV = 4x5, 8x10, 16x15 (quadratic), 8x10 (cubic, quartic),
//   8x25, 8x50 (quadratic), 12-bit precision and truncation.
// The N_SV support vectors are spread over the 6 MACs, floor(64/D) per SV
// buffer and sequence. Slots left over in the last sequence get F = 0,
// so they add nothing. The reference sums only the real support vectors,
// which checks this padding too. The final result, its sign and the cycle
// count of every sequence, Nb x (D + 6), are checked. The test prints the
// sequences and compute cycles of each shape.
module tb_table2_points;
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

  logic [11:0] tvw [64];
  logic [11:0] svw [6][64];
  logic [11:0] cw  [384];
  int mdl_res;

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

  // one classification of nsv random support vectors of dimension dim
  task automatic classify(input int dim, input int nsv, input int order);
    int per_buf, left, nb, nseq, cyc, total_cyc, acc, v, sq, kr, pr, slot;
    per_buf = 64 / dim;
    foreach (tvw[i]) tvw[i] = 12'(sx($urandom, 12));
    wr_cfg(REG_DIM, dim);
    wr_cfg(REG_NMAC, 6);
    wr_cfg(REG_ARITH, (2 << 2) | 2);
    wr_cfg(REG_KSEL, (order >= 3 ? 4 : 0) | (order == 2 ? 2 : 0) | (order == 4 ? 1 : 0));
    wr_cfg(REG_BETA, 12'h100);
    wr_cfg(REG_CTRL, (1 << 5) | 4'hF);
    wr_cfg(REG_BIAS, 24'hFFF000);
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    mdl_res = sx(24'hFFF000, 24);
    for (int e = dim - 1; e >= 0; e--) begin
      tv_data = tvw[e]; tv_valid = 1'b1; @(posedge clk); #1;
    end
    tv_valid = 1'b0;
    left = nsv; nseq = 0; total_cyc = 0;
    while (left > 0) begin
      nb = (left >= 6 * per_buf) ? per_buf : (left + 5) / 6;
      foreach (svw[j, i]) svw[j][i] = 12'(sx($urandom, 12));
      foreach (cw[i]) cw[i] = 12'($urandom);
      // reference over the real SVs only; padded slots get F = 0
      for (int n = 0; n < nb; n++)
        for (int j = 0; j < 6; j++) begin
          slot = n * 6 + j;
          if (slot >= left) begin
            cw[slot] = '0;
          end else begin
            acc = 0;
            for (int d = 0; d < dim; d++) begin
              pr = sx(int'(tvw[d]), 12) * sx(int'(svw[j][n * dim + d]), 12);
              acc = sx(acc + (pr >>> 12), 16);
            end
            v  = sx((acc >>> 4) + sx(12'h100, 12), 12);
            sq = q11(v, v);
            case (order)
              1: kr = v;
              2: kr = sq;
              3: kr = q11(sq, v);
              default: kr = q11(sq, sq);
            endcase
            mdl_res = sx(mdl_res + kr * sx(int'(cw[slot]), 12), 24);
          end
        end
      wr_cfg(REG_NSV, nb);
      for (int j = 5; j >= 0; j--)
        for (int e = 63; e >= 0; e--) begin
          sv_data = svw[j][e]; sv_valid = 1'b1; @(posedge clk); #1;
        end
      sv_valid = 1'b0;
      for (int a = 6 * nb - 1; a >= 0; a--) begin
        coef_data = cw[a]; coef_valid = 1'b1; @(posedge clk); #1;
      end
      coef_valid = 1'b0;
      start = 1'b1; @(posedge clk); #1; start = 1'b0;
      cyc = 0;
      while (!done && cyc < 10000) begin @(posedge clk); #1; cyc++; end
      check($sformatf("D=%0d N=%0d seq %0d cycles", dim, nsv, nseq), cyc, nb * (dim + 6));
      total_cyc += cyc;
      left -= (nb * 6 < left) ? nb * 6 : left;
      nseq++;
    end
    check($sformatf("D=%0d N=%0d poly%0d class_res", dim, nsv, order), int'(class_res), mdl_res);
    check($sformatf("D=%0d N=%0d poly%0d class_pos", dim, nsv, order), int'(class_pos), int'(mdl_res >= 0));
    $display("D_SV=%0d N_SV=%0d poly%0d: %0d sequence(s), %0d compute cycles, %0d MACs, result %0d",
             dim, nsv, order, nseq, total_cyc, dim * nsv, class_res);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; buf_reset = 1'b0;
    tv_valid = 1'b0; sv_valid = 1'b0; coef_valid = 1'b0;
    tv_data = '0; sv_data = '0; coef_data = '0; clear = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    classify(4, 5, 2);
    classify(8, 10, 2);
    classify(16, 15, 2);
    classify(8, 10, 3);
    classify(8, 10, 4);
    classify(8, 25, 2);
    classify(8, 50, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
