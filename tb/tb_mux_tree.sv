// tb_mux_tree: self-checking test of the hierarchical read multiplexer.
// A 64-word tree (the buffer size) and a 10-word tree (padded levels) are
// loaded with random words; every select value must return its word, and the
// padded selects of the small tree must return zero.
module tb_mux_tree;
  int checks = 0, failures = 0;

  logic [63:0][11:0] d64;
  logic [5:0]        s64;
  logic [11:0]       q64;
  logic [9:0][11:0]  d10;
  logic [3:0]        s10;
  logic [11:0]       q10;

  mux_tree #(.W(12), .DEPTH(64)) dut64 (.din(d64), .sel(s64), .dout(q64));
  mux_tree #(.W(12), .DEPTH(10)) dut10 (.din(d10), .sel(s10), .dout(q10));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 64; i++) d64[i] = 12'($urandom);
      for (int i = 0; i < 10; i++) d10[i] = 12'($urandom);
      for (int s = 0; s < 64; s++) begin
        s64 = 6'(s); #1;
        checks++;
        if (q64 !== d64[s]) begin
          failures++;
          if (failures < 10) $display("FAIL 64 sel=%0d got %h exp %h", s, q64, d64[s]);
        end
      end
      for (int s = 0; s < 16; s++) begin
        logic [11:0] exp;
        s10 = 4'(s); #1;
        exp = (s < 10) ? d10[s] : 12'h000;
        checks++;
        if (q10 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL 10 sel=%0d got %h exp %h", s, q10, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
