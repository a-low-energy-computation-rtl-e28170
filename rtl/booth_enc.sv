// booth_enc: one radix-4 Booth encoder (BOOTH ENC).
//
// From three multiplier bits y[2i+1], y[2i], y[2i-1] it forms the digit
// delta_i = y[2i-1] + y[2i] - 2*y[2i+1], which lies in {-2,-1,0,1,2}. It then
// outputs the partial product pp = x * delta_i as a sign-extended
// (XW+2)-bit value. The five digit values are decoded as a look-up of
// {zero, x, 2x} plus a negate. Weighting by 4^i is left to the adder tree.
// Combinational. The digit rule follows the published design; the
// output width is this implementation's.
module booth_enc #(
  parameter int unsigned XW = 12   // multiplicand width
) (
  input  logic signed [XW-1:0] x,     // multiplicand
  input  logic        [2:0]    ysel,  // {y[2i+1], y[2i], y[2i-1]}
  output logic signed [XW+1:0] pp     // x * delta_i
);
  always_comb begin
    logic signed [XW+1:0] mag;
    logic                 neg;
    mag = '0;
    neg = 1'b0;
    unique case (ysel)
      3'b000, 3'b111: begin mag = '0;                      neg = 1'b0; end
      3'b001, 3'b010: begin mag = (XW+2)'(x);              neg = 1'b0; end
      3'b011:         begin mag = (XW+2)'(x) <<< 1;        neg = 1'b0; end
      3'b100:         begin mag = (XW+2)'(x) <<< 1;        neg = 1'b1; end
      3'b101, 3'b110: begin mag = (XW+2)'(x);              neg = 1'b1; end
      default:        begin mag = '0;                      neg = 1'b0; end
    endcase
    pp = neg ? -mag : mag;
  end
endmodule
