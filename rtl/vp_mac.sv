// vp_mac: variable-precision multiply-accumulate unit.
//
// Multiplies a test-vector word x by a support-vector word y and adds the
// truncated product to a 16-bit accumulator. The multiplier is radix-4 Booth:
// six BOOTH ENC blocks produce PP0..PP5 = x * delta_i(y), weighted 4^i.
// Precision is scaled by moving the y operand up: a p-bit operand (p = 8, 10,
// 12, right-aligned and sign-extended in the 12-bit word) is placed in the top
// p bits of y. The lowest (12-p)/2 Booth digits are then zero, and the adder
// chain stops early:
//   PP2..PP5 -> 3:2 compressor (Wallace) tree -> CBA-0      (8-bit result)
//   CBA-0 + PP1                                -> CBA-1     (10-bit result)
//   CBA-1 + PP0                                -> CBA-2     (12-bit result)
// The precision-select multiplexer (prec) takes the 16/20/24-bit product from
// CBA-0/1/2, and the inputs of the adders that are not needed are held at zero.
// The truncation-select multiplexer (trunc) keeps the top 8/10/12 bits of that
// product. CBA-3 adds them, sign-extended, into the 16-bit accumulator.
// Timing: combinational from x/y to the adder, one register. acc is updated
// on the clock edge where en is high, and clr loads zero (clr wins over en).
// The Booth digits, the CBA-0/1/2 taps, the precision and truncation
// multiplexers and the 16-bit final adder follow the published MAC. Keeping
// the most significant bits on truncation, the two's complement operands and
// the adder widths (full product width rather than only the overlapping bits)
// are this implementation's choices.
module vp_mac
  import svm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,     // clear accumulator
  input  logic                     en,      // accumulate this cycle
  input  width_sel_e               prec,    // PR1:PR0
  input  width_sel_e               trunc,   // TR1:TR0
  input  logic        [WORD_W-1:0] x,       // multiplicand (TV word)
  input  logic        [WORD_W-1:0] y,       // multiplier (SV word)
  output logic signed [23:0]       prod,    // precision-selected product
  output logic signed [ACC_W-1:0]  acc      // MAC result
);
  localparam int unsigned NPP = WORD_W / 2;  // 6 partial products

  // ---- operand alignment for the selected precision ----
  logic signed [WORD_W-1:0] xa;
  logic        [WORD_W-1:0] ya;
  always_comb begin
    unique case (prec)
      BITS8:   begin xa = WORD_W'(signed'(x[7:0]));  ya = {y[7:0], 4'b0}; end
      BITS10:  begin xa = WORD_W'(signed'(x[9:0]));  ya = {y[9:0], 2'b0}; end
      default: begin xa = signed'(x);                ya = y;              end
    endcase
  end

  // ---- Booth encoders ----
  logic [WORD_W:0] yx;             // y with y[-1] = 0 appended
  assign yx = {ya, 1'b0};
  logic signed [NPP-1:0][WORD_W+1:0] pp;
  logic signed [NPP-1:0][23:0]       t;   // weighted partial products
  for (genvar i = 0; i < NPP; i++) begin : g_booth
    booth_enc #(.XW(WORD_W)) u_enc (.x(xa), .ysel(yx[2*i+2 -: 3]), .pp(pp[i]));
    assign t[i] = 24'(signed'(pp[i])) <<< (2 * i);
  end

  // ---- 3:2 compressor tree over PP2..PP5 ----
  logic [23:0] s1, c1, s2, c2;
  always_comb begin
    s1 = t[2] ^ t[3] ^ t[4];
    c1 = ((t[2] & t[3]) | (t[2] & t[4]) | (t[3] & t[4])) << 1;
    s2 = s1 ^ c1 ^ t[5];
    c2 = ((s1 & c1) | (s1 & t[5]) | (c1 & t[5])) << 1;
  end

  // ---- carry-bypass adder chain, tapped per precision ----
  logic [23:0] sum0, sum1, sum2, in1a, in1b, in2a, in2b;
  cba #(.N(24), .M(4)) u_cba0 (.a(s2), .b(c2), .cin(1'b0), .sum(sum0), .cout());
  // unused adders get constant-zero inputs (they are power-gated in silicon)
  assign in1a = (prec == BITS8) ? '0 : sum0;
  assign in1b = (prec == BITS8) ? '0 : t[1];
  cba #(.N(24), .M(4)) u_cba1 (.a(in1a), .b(in1b), .cin(1'b0), .sum(sum1), .cout());
  assign in2a = (prec == BITS12) ? sum1 : '0;
  assign in2b = (prec == BITS12) ? t[0] : '0;
  cba #(.N(24), .M(4)) u_cba2 (.a(in2a), .b(in2b), .cin(1'b0), .sum(sum2), .cout());

  // ---- precision-select multiplexer: 16/20/24-bit product ----
  always_comb begin
    unique case (prec)
      BITS8:   prod = signed'(sum0) >>> 4;
      BITS10:  prod = signed'(sum1) >>> 2;
      default: prod = signed'(sum2);
    endcase
  end

  // ---- truncation-select multiplexer: keep the top 8/10/12 bits ----
  int unsigned pbits, tbits;
  logic signed [23:0] tr;
  always_comb begin
    unique case (prec)
      BITS8:   pbits = 16;
      BITS10:  pbits = 20;
      default: pbits = 24;
    endcase
    unique case (trunc)
      BITS8:   tbits = 8;
      BITS10:  tbits = 10;
      default: tbits = 12;
    endcase
    tr = prod >>> (pbits - tbits);
  end

  // ---- CBA-3: 16-bit accumulation ----
  logic [ACC_W-1:0] acc_next;
  cba #(.N(ACC_W), .M(4)) u_cba3 (.a(acc), .b(tr[ACC_W-1:0]), .cin(1'b0),
                                  .sum(acc_next), .cout());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= signed'(acc_next);
  end
endmodule
