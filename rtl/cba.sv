// cba: carry-bypass (carry-skip) adder.
//
// The N-bit addition is split into groups of M bits. Each group ripples its
// carry through full adders. When every bit of a group propagates (a ^ b all
// ones), the group's carry-in bypasses the ripple chain through a 2:1
// multiplexer. Purely combinational: sum = a + b + cin, cout = carry out of
// bit N-1. The accelerator uses this adder for CBA-0..3 in the MAC and for
// CBA0/CBA1 in the kernel, all with M = 4 as in the published design. The
// group structure is standard carry-skip design, since the published design names the
// adder type and group size but not its insides.
module cba #(
  parameter int unsigned N = 16,  // operand width
  parameter int unsigned M = 4    // ripple group size
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned G = (N + M - 1) / M;  // number of groups

  logic [G:0]   gc;     // carry into each group
  logic [N-1:0] p, g;

  assign p     = a ^ b;
  assign g     = a & b;
  assign gc[0] = cin;

  for (genvar k = 0; k < G; k++) begin : g_grp
    localparam int unsigned LO = k * M;
    localparam int unsigned HI = ((k + 1) * M > N) ? N - 1 : (k + 1) * M - 1;
    localparam int unsigned W  = HI - LO + 1;
    logic [W:0] rc;  // ripple carries inside the group
    assign rc[0] = gc[k];
    for (genvar j = 0; j < W; j++) begin : g_bit
      assign sum[LO+j] = p[LO+j] ^ rc[j];
      assign rc[j+1]   = g[LO+j] | (p[LO+j] & rc[j]);
    end
    // skip multiplexer: all bits propagate -> carry-in passes straight on
    assign gc[k+1] = (&p[HI:LO]) ? gc[k] : rc[W];
  end

  assign cout = gc[G];
endmodule
