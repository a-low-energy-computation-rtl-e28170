// tb_poly_kernel: self-checking test of the programmable polynomial kernel.
// For each order d = 1..4 (selects SEL2/SEL1/SEL0), random DOT_PROD, beta and
// F values are fed and accumulated. The reference works in integers:
//   v  = (dot + beta) wrapped to 12 bits
//   q(a,b) = clamp((a*b) >>> 11, -2048, 2047)
//   d=1: v, d=2: q(v,v), d=3: q(q(v,v),v), d=4: q(q(v,v),q(v,v))
//   acc += kr * F  (24-bit wrap), starting from bias after clr.
// It checks kr combinationally, the accumulator after every enabled edge, the
// hold with ker_en low and the sign output.
module tb_poly_kernel;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, clr, ker_en, sel0, sel1, sel2, class_pos;
  logic signed [11:0] dot_prod, beta, f, kr;
  logic signed [23:0] bias, class_res;

  always #5 clk = ~clk;

  poly_kernel dut (.clk, .rst_n, .clr, .ker_en, .dot_prod, .beta, .f, .sel0, .sel1, .sel2,
                   .bias, .kr, .class_res, .class_pos);

  function automatic int q(input int a, input int b);
    int r;
    r = (a * b) >>> 11;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  function automatic int wrap12(input int a);
    return int'(12'(a)) >= 2048 ? int'(12'(a)) - 4096 : int'(12'(a));
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
    int model, v, e, sq;
    rst_n = 1'b0; clr = 1'b0; ker_en = 1'b0; dot_prod = '0; beta = '0; f = '0;
    sel0 = 0; sel1 = 0; sel2 = 0; bias = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int d = 1; d <= 4; d++) begin
      sel2 = (d >= 3); sel1 = (d == 2); sel0 = (d == 4);
      bias = 24'($urandom) >>> 4;
      clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
      check("bias load", int'(class_res), int'(bias));
      model = int'(bias);
      beta = 12'($urandom);
      for (int i = 0; i < 50; i++) begin
        dot_prod = 12'($urandom);
        f = 12'($urandom);
        v = wrap12(int'(dot_prod) + int'(beta));
        sq = q(v, v);
        case (d)
          1: e = v;
          2: e = sq;
          3: e = q(sq, v);
          default: e = q(sq, sq);
        endcase
        ker_en = 1'b1; #1;
        check($sformatf("kr d=%0d", d), int'(kr), e);
        @(posedge clk); #1;
        ker_en = 1'b0;
        model = int'(signed'(24'(model + e * int'(f))));
        check($sformatf("acc d=%0d", d), int'(class_res), model);
        check("sign", int'(class_pos), int'(model >= 0));
      end
      @(posedge clk); #1;
      check("hold", int'(class_res), model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
