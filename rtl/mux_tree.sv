// mux_tree: hierarchical read multiplexer of a register-file buffer.
//
// DEPTH words of width W are reduced to one by LEVELS = log2(DEPTH) levels of
// 2:1 multiplexers. Level k is steered by select bit sel[k]: the first level
// picks between neighbouring words, the last one between the two halves of
// the buffer. Reading through a tree of small multiplexers avoids a long bit
// line, which is the point of the published buffer read path. Combinational.
// The published figure draws the select lines as groups SEL_BUF_0..SEL_BUF_3.
// The plain binary 2:1 tree used here is this implementation's choice.
module mux_tree #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 64
) (
  input  logic [DEPTH-1:0][W-1:0]     din,
  input  logic [$clog2(DEPTH)-1:0]    sel,
  output logic [W-1:0]                dout
);
  localparam int unsigned LEVELS = $clog2(DEPTH);
  localparam int unsigned PDEPTH = 1 << LEVELS;

  // node[l] holds the PDEPTH >> l outputs of level l (level 0 = the words).
  logic [LEVELS:0][PDEPTH-1:0][W-1:0] node;

  for (genvar i = 0; i < PDEPTH; i++) begin : g_leaf
    if (i < DEPTH) begin : g_word
      assign node[0][i] = din[i];
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < PDEPTH; i++) begin : g_mux
      if (i < (PDEPTH >> (l + 1))) begin : g_used
        assign node[l+1][i] = sel[l] ? node[l][2*i+1] : node[l][2*i];
      end else begin : g_unused
        assign node[l+1][i] = '0;
      end
    end
  end

  assign dout = node[LEVELS][0];
endmodule
