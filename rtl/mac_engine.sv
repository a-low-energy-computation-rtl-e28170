// mac_engine: the array of N_MAC variable-precision MAC units.
//
// Every MAC unit gets the same test-vector word (tv) and its own word from
// its SV preload buffer (sv[j]). On each clock with en high, the units with
// index below nmac accumulate tv*sv[j]. The units above nmac stay idle and
// keep their value. clr zeroes all accumulators. dot[j] is MAC j's 16-bit
// dot product. Precision and truncation are common to the whole array.
// One MAC unit per SV preload buffer, with parallel operation and a
// programmable number of active units, follows the published engine.
module mac_engine
  import svm_pkg::*;
#(
  parameter int unsigned NM = N_MAC
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clr,
  input  logic                               en,
  input  logic [2:0]                         nmac,
  input  width_sel_e                         prec,
  input  width_sel_e                         trunc,
  input  logic [WORD_W-1:0]                  tv,
  input  logic [NM-1:0][WORD_W-1:0]          sv,
  output logic [NM-1:0][ACC_W-1:0]           dot
);
  for (genvar j = 0; j < NM; j++) begin : g_mac
    logic signed [23:0]      prod;
    logic signed [ACC_W-1:0] acc;
    vp_mac u_mac (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .en   (en && (j < 32'(nmac))),
      .prec (prec),
      .trunc(trunc),
      .x    (tv),
      .y    (sv[j]),
      .prod (prod),
      .acc  (acc)
    );
    assign dot[j] = acc;
  end
endmodule
