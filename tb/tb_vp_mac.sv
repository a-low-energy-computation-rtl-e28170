// tb_vp_mac: self-checking test of the variable-precision MAC.
// For each of the nine precision/truncation pairs it accumulates 40 random
// products and compares, cycle by cycle, the precision-selected product and
// the accumulator with an integer model:
//   xp = x[p-1:0], yp = y[p-1:0] as signed p-bit numbers,
//   prod = xp*yp, term = prod >>> (2p - t), acc = (acc + term) mod 2^16.
// Corner operands (most negative values) are included. It also checks that
// clr zeroes, en low holds, and the accumulator updates on the next edge.
module tb_vp_mac;
  import svm_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n, clr, en;
  width_sel_e  prec, trunc;
  logic [11:0] x, y;
  logic signed [23:0] prod;
  logic signed [15:0] acc;

  always #5 clk = ~clk;

  vp_mac dut (.clk, .rst_n, .clr, .en, .prec, .trunc, .x, .y, .prod, .acc);

  function automatic int pbits_of(width_sel_e w);
    return (w == BITS8) ? 8 : (w == BITS10) ? 10 : 12;
  endfunction

  function automatic int sext(input logic [11:0] v, input int p);
    int r;
    r = int'(v) & ((1 << p) - 1);
    if (r >= (1 << (p - 1))) r -= (1 << p);
    return r;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, p, t, xp, yp, pr, term;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; x = '0; y = '0; prec = BITS12; trunc = BITS12;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset", int'(acc), 0);
    for (int ps = 0; ps < 3; ps++) begin
      for (int ts = 0; ts < 3; ts++) begin
        prec = width_sel_e'(ps); trunc = width_sel_e'(ts);
        p = pbits_of(prec); t = pbits_of(trunc);
        clr = 1'b1;
        @(posedge clk); #1;
        clr = 1'b0;
        check("clr", int'(acc), 0);
        model = 0;
        for (int i = 0; i < 40; i++) begin
          if (i == 0)      begin x = 12'h800; y = 12'h800; end
          else if (i == 1) begin x = 12'h7FF; y = 12'h800; end
          else if (i == 2) begin x = 12'hF80; y = 12'hF80; end
          else             begin x = 12'($urandom); y = 12'($urandom); end
          xp = sext(x, p); yp = sext(y, p);
          if (p == 8)  begin xp = sext(x, 8);  yp = sext(y, 8);  end
          pr = xp * yp;
          term = pr >>> (2 * p - t);
          en = 1'b1; #1;
          check($sformatf("prod p=%0d", p), int'(prod), pr);
          check("acc before edge", int'(acc), int'(16'(model)));
          @(posedge clk); #1;
          model = int'(16'(model + term));
          en = 1'b0;
          check($sformatf("acc p=%0d t=%0d i=%0d", p, t, i), int'(acc), model);
        end
        // hold with en low
        x = 12'h123; y = 12'h321;
        @(posedge clk); #1;
        check("hold", int'(acc), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
