// tb_mac_engine: self-checking test of the 6-unit MAC array.
// With 4 of 6 units enabled, 12-bit precision and 12-bit truncation, a
// random 16-dimension TV is multiplied with four random SVs. The dot products
// of units 0..3 must match an integer model of the truncated products, and
// units 4 and 5 must keep the value they had before (zero after clr). The
// run is then repeated with all six units at 8-bit precision.
module tb_mac_engine;
  import svm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, clr, en;
  logic [2:0] nmac;
  width_sel_e prec, trunc;
  logic [11:0] tv;
  logic [5:0][11:0] sv;
  logic [5:0][15:0] dot;

  always #5 clk = ~clk;

  mac_engine #(.NM(6)) dut (.clk, .rst_n, .clr, .en, .nmac, .prec, .trunc, .tv, .sv, .dot);

  function automatic int sx(input logic [11:0] v, input int p);
    int r;
    r = int'(v) & ((1 << p) - 1);
    if (r >= (1 << (p - 1))) r -= (1 << p);
    return r;
  endfunction

  task automatic run(input int active, input int p);
    int model [6];
    clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
    foreach (model[j]) model[j] = 0;
    for (int d = 0; d < 16; d++) begin
      tv = 12'($urandom);
      for (int j = 0; j < 6; j++) sv[j] = 12'($urandom);
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      for (int j = 0; j < active; j++)
        model[j] = int'(16'(model[j] + ((sx(tv, p) * sx(sv[j], p)) >>> (2 * p - 12))));
    end
    for (int j = 0; j < 6; j++) begin
      checks++;
      if (int'(signed'(dot[j])) != int'(signed'(16'(model[j])))) begin
        failures++;
        $display("FAIL mac %0d got %0d exp %0d", j, signed'(dot[j]), signed'(16'(model[j])));
      end
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
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; tv = '0; sv = '0; nmac = 3'd4;
    prec = BITS12; trunc = BITS12;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 5; r++) run(4, 12);
    nmac = 3'd6; prec = BITS8;
    for (int r = 0; r < 5; r++) run(6, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
