// poly_kernel: programmable polynomial kernel and classifier accumulator.
//
// For one dot product DOT_PROD = x.sv_i it computes K = F * (x.sv_i + beta)^d,
// with d = 1..4, and adds K into the 24-bit class accumulator (REG 24):
//   CBA0 (12 bit)      V  = DOT_PROD + beta
//   MUL0 (12x12x24)    R  = V * V                         (square)
//   MUL1 (12x12x24)    S  = R * (SEL0 ? R : V)            (fourth / cube)
//   SEL1 mux           SEL1 ? R : V
//   SEL2 mux           KR = SEL2 ? S : (SEL1 mux)
//   MUL2 (12x12x24)    K  = KR * F
//   CBA1 (24 bit)      REG24 <= REG24 + K   on a clock with ker_en (Ker_CLK0)
// Order select: d=1 {SEL2,SEL1}=00, d=2 01, d=3 SEL2=1 SEL0=0, d=4 SEL2=1 SEL0=1.
// The 12-bit words V, R, S and KR are Q1.11 fractions: a 24-bit product that
// is fed back into a 12-bit multiplier is shifted right by 11 and saturated
// to 12 bits. K keeps the full 24-bit product (Q2.22), so the accumulator
// counts in units of 2^-22. clr loads bias (the -b term of the SVM decision)
// into REG 24. class_pos is the sign test of the result: 1 when REG 24 >= 0.
// The datapath path from dot_prod to the register is combinational, so one
// support vector is absorbed per enabled clock.
// The multipliers, adders, selects and register widths follow the published
// kernel. The fixed-point format, which mux input each select value picks and
// the bias preload are this implementation's choices.
module poly_kernel
  import svm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,       // load bias into REG 24
  input  logic                     ker_en,    // Ker_CLK0 enable: accumulate
  input  logic signed [WORD_W-1:0] dot_prod,  // selected MAC output
  input  logic signed [WORD_W-1:0] beta,
  input  logic signed [WORD_W-1:0] f,         // scale factor of this SV
  input  logic                     sel0,
  input  logic                     sel1,
  input  logic                     sel2,
  input  logic signed [KER_W-1:0]  bias,
  output logic signed [WORD_W-1:0] kr,        // (x.sv + beta)^d, Q1.11
  output logic signed [KER_W-1:0]  class_res, // CLASS RES
  output logic                     class_pos  // sign of CLASS RES
);
  // Q1.11 renormalisation of a 24-bit product, saturating.
  function automatic logic signed [WORD_W-1:0] q11(input logic signed [23:0] p);
    logic signed [23:0] s;
    s = p >>> 11;
    if (s > 24'sd2047)       return 12'sh7FF;
    else if (s < -24'sd2048) return 12'sh800;
    else                     return s[WORD_W-1:0];
  endfunction

  logic [WORD_W-1:0]       v_u;
  logic signed [WORD_W-1:0] v, r, s, m1_in, m1_out;
  logic signed [23:0]      mul0, mul1, mul2;

  cba #(.N(WORD_W), .M(4)) u_cba0 (.a(dot_prod), .b(beta), .cin(1'b0), .sum(v_u), .cout());
  assign v = signed'(v_u);

  assign mul0  = v * v;                     // MUL0
  assign r     = q11(mul0);
  assign m1_in = sel0 ? r : v;              // SEL0 mux
  assign mul1  = r * m1_in;                 // MUL1
  assign s     = q11(mul1);
  assign m1_out = sel1 ? r : v;             // SEL1 mux
  assign kr    = sel2 ? s : m1_out;         // SEL2 mux
  assign mul2  = kr * f;                    // MUL2

  logic [KER_W-1:0] acc_next;
  cba #(.N(KER_W), .M(4)) u_cba1 (.a(class_res), .b(mul2), .cin(1'b0), .sum(acc_next), .cout());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      class_res <= '0;
    else if (clr)    class_res <= bias;
    else if (ker_en) class_res <= signed'(acc_next);
  end

  assign class_pos = ~class_res[KER_W-1];
endmodule
