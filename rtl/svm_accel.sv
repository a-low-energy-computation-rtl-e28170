// svm_accel: low-energy SVM classification accelerator (top level).
//
// The accelerator computes the decision of a polynomial-kernel support vector
// machine,
//     class = sgn( sum_i F_i * (x . sv_i + beta)^d  - b ),
// for a test vector x produced by a host processor's feature extraction.
// Datapath:
//   TV line buffer   one sv_tv_buffer, loaded from tv_data.
//   SV preload buf.  N_MAC sv_tv_buffers chained as one shift register from
//                    sv_data (words for the last buffer are sent first).
//   MAC engine       N_MAC vp_mac units. Each cycle they all take the same
//                    TV word and one word of their own SV buffer, at
//                    precision 8/10/12 bits, truncated to 8/10/12 bits into
//                    16-bit accumulators.
//   SEL_MAC mux      feeds the MAC results one per cycle to the kernel. The
//                    kernel input DOT_PROD is the top 12 bits of the 16-bit
//                    accumulator.
//   poly_kernel      (DOT_PROD + beta)^d for d = 1..4, scaled by F_i from the
//                    kcoef_buffer and summed into the 24-bit CLASS RES.
//   control_blk      sequences the write and compute phases.
//   status_regs      hold the programmable configuration.
// Use: program the status registers, load TV, SV and coefficient words
// (write phase, busy low), pulse clear, then pulse start once per write
// sequence and wait for done. A model that does not fit the 64-word buffers
// is split over up to 8192 sequences. The SVs are spread over
// sequences, and a dot product longer than 64 dimensions is split into
// chunks with dot_cont/dot_last. After the last sequence, class_pos is the
// result. One sequence takes N_SV x (D_SV + nmac) clock cycles.
// The block structure follows the published architecture. The handshakes,
// register map, fixed-point formats and 16-to-12-bit DOT_PROD selection are
// this implementation's choices.
module svm_accel
  import svm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // status register port
  input  logic                      cfg_we,
  input  logic [CFG_AW-1:0]         cfg_addr,
  input  logic [CFG_DW-1:0]         cfg_wdata,
  output logic [CFG_DW-1:0]         cfg_rdata,
  output logic                      cfg_reject,
  // buffer load ports (write phase)
  input  logic                      buf_reset,
  input  logic                      tv_valid,
  input  logic [WORD_W-1:0]         tv_data,
  input  logic                      sv_valid,
  input  logic [WORD_W-1:0]         sv_data,
  input  logic                      coef_valid,
  input  logic [WORD_W-1:0]         coef_data,
  output logic                      load_reject,
  // control
  input  logic                      clear,
  input  logic                      start,
  output logic                      start_reject,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(MAX_SEQ):0]  seq_count,
  // result
  output logic signed [KER_W-1:0]   class_res,
  output logic                      class_pos
);
  localparam int unsigned AW = $clog2(BUF_DEPTH);

  cfg_t cfg;
  logic cfg_ok;

  logic tv_wr_en, sv_wr_en, coef_wr_en;
  logic [AW-1:0] sel_buf, tv_sel;
  logic [2:0]    sel_mac;
  logic [$clog2(BUF_DEPTH*N_MAC)-1:0] coef_addr;
  logic mac_clr, mac_en, ker_en, ker_clr;

  status_regs u_status (
    .clk, .rst_n, .busy,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .wr_reject(cfg_reject), .cfg, .cfg_ok
  );

  control_blk u_ctrl (
    .clk, .rst_n, .cfg, .cfg_ok, .clear, .start,
    .tv_valid, .sv_valid, .coef_valid,
    .tv_wr_en, .sv_wr_en, .coef_wr_en,
    .load_reject, .start_reject, .busy, .done,
    .sel_buf, .tv_sel, .sel_mac, .coef_addr,
    .mac_clr, .mac_en, .ker_en, .ker_clr, .seq_count
  );

  // ---- TV line buffer ----
  logic [WORD_W-1:0] tv_word, tv_unused;
  sv_tv_buffer #(.WIDTH(WORD_W), .BANKS(BANKS), .BANK_DEPTH(BANK_DEPTH)) u_tv_buf (
    .clk, .buf_reset, .wr_en(tv_wr_en), .din(tv_data), .bank_on(cfg.bank_on),
    .rd_sel(tv_sel), .dout(tv_word), .shift_out(tv_unused)
  );

  // ---- SV preload buffers, chained ----
  logic [N_MAC:0][WORD_W-1:0]   sv_chain;
  logic [N_MAC-1:0][WORD_W-1:0] sv_word;
  assign sv_chain[0] = sv_data;
  for (genvar j = 0; j < N_MAC; j++) begin : g_sv_buf
    sv_tv_buffer #(.WIDTH(WORD_W), .BANKS(BANKS), .BANK_DEPTH(BANK_DEPTH)) u_sv_buf (
      .clk, .buf_reset, .wr_en(sv_wr_en), .din(sv_chain[j]), .bank_on(cfg.bank_on),
      .rd_sel(sel_buf), .dout(sv_word[j]), .shift_out(sv_chain[j+1])
    );
  end

  // ---- MAC engine ----
  logic [N_MAC-1:0][ACC_W-1:0] dot;
  mac_engine #(.NM(N_MAC)) u_macs (
    .clk, .rst_n, .clr(mac_clr), .en(mac_en), .nmac(cfg.nmac),
    .prec(cfg.prec), .trunc(cfg.trunc), .tv(tv_word), .sv(sv_word), .dot
  );

  // ---- SEL_MAC multiplexer ----
  logic [ACC_W-1:0] dot_sel;
  always_comb begin
    dot_sel = '0;
    for (int j = 0; j < N_MAC; j++)
      if (sel_mac == 3'(j)) dot_sel = dot[j];
  end

  // ---- kernel coefficients and programmable kernel ----
  logic [WORD_W-1:0] f_word;
  kcoef_buffer u_coef (
    .clk, .buf_reset, .wr_en(coef_wr_en), .din(coef_data),
    .rd_addr(coef_addr), .dout(f_word)
  );

  logic signed [WORD_W-1:0] kr;
  poly_kernel u_kernel (
    .clk, .rst_n, .clr(ker_clr), .ker_en,
    .dot_prod(signed'(dot_sel[ACC_W-1 -: WORD_W])),
    .beta(signed'(cfg.beta)), .f(signed'(f_word)),
    .sel0(cfg.sel0), .sel1(cfg.sel1), .sel2(cfg.sel2),
    .bias(signed'(cfg.bias)), .kr, .class_res, .class_pos
  );
endmodule
