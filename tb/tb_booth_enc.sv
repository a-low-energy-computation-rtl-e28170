// tb_booth_enc: self-checking test of the radix-4 Booth encoder.
// For every one of the eight select patterns {y[2i+1], y[2i], y[2i-1]} and
// many multiplicands (corners and random), the partial product must equal
// x * (y[2i-1] + y[2i] - 2*y[2i+1]), computed here with integer arithmetic.
module tb_booth_enc;
  int checks = 0, failures = 0;

  logic signed [11:0] x;
  logic        [2:0]  ysel;
  logic signed [13:0] pp;

  booth_enc #(.XW(12)) dut (.x(x), .ysel(ysel), .pp(pp));

  task automatic check(input logic signed [11:0] xv, input logic [2:0] s);
    int delta, exp;
    x = xv; ysel = s; #1;
    delta = int'(s[0]) + int'(s[1]) - 2 * int'(s[2]);
    exp   = int'(xv) * delta;
    checks++;
    if (int'(pp) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d sel=%b pp=%0d exp=%0d", xv, s, pp, exp);
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
    for (int s = 0; s < 8; s++) begin
      check(12'sh7FF, 3'(s));
      check(12'sh800, 3'(s));
      check(12'sh000, 3'(s));
      check(12'sh001, 3'(s));
      check(-12'sh001, 3'(s));
      for (int i = 0; i < 200; i++) check(12'($urandom), 3'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
