// kcoef_buffer: kernel coefficient constants buffer.
//
// Holds one 12-bit scale factor F per support vector of a write sequence,
// i.e. the product of the trained SVM weight and label (alpha_i * y_i) with
// any normalisation folded in. It has DEPTH = BUF_DEPTH x N_MAC words, one per
// SV slot: the SV held at position n of preload buffer j uses word
// n*N_MAC + j. Loading is a shift register like the SV/TV buffers: on a clock
// with wr_en, din enters word 0 and all words move up one place, so the word
// sent last ends at address 0. rd_addr reads combinationally.
// The buffer itself appears in the published block diagram, feeding the
// kernel. Its contents, size and organisation are this implementation's
// choice.
module kcoef_buffer
  import svm_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH * N_MAC
) (
  input  logic                     clk,
  input  logic                     buf_reset,
  input  logic                     wr_en,
  input  logic [WORD_W-1:0]        din,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WORD_W-1:0]        dout
);
  logic [DEPTH-1:0][WORD_W-1:0] mem;

  always_ff @(posedge clk) begin
    if (buf_reset)  mem <= '0;
    else if (wr_en) mem <= {mem[DEPTH-2:0], din};
  end

  assign dout = (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
endmodule
