// status_regs: the accelerator's programmable status registers.
//
// The host writes eight 24-bit registers (addresses in svm_pkg::cfg_addr_e):
// D_SV and SVs per buffer of a write sequence, MAC units in use, precision
// and truncation, the kernel selects SEL0/SEL1/SEL2, beta, the accumulator
// start value (bias) and a control word (bank power, dot_cont, dot_last).
// Writes take effect on the clock edge with cfg_we high and are refused while
// the accelerator is busy (wr_reject pulses instead). cfg_rdata reads the
// addressed register back combinationally.
// cfg_ok flags a legal configuration: D_SV and N_SV not zero,
// D_SV x N_SV <= BUF_DEPTH, 1..N_MAC MAC units, precision and truncation codes
// valid, and N_SV = 1 whenever a dot product spans several write sequences
// (dot_cont set or dot_last clear).
// Reset values: D_SV=1, N_SV=1, all MACs, 12-bit precision and truncation,
// quadratic kernel, beta=0, bias=0, all banks on, dot_last=1.
// That the listed quantities are programmable through status registers
// follows the published design. The register map, reset values and legality
// rules are this implementation's.
module status_regs
  import svm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              busy,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_wdata,
  output logic [CFG_DW-1:0] cfg_rdata,
  output logic              wr_reject,
  output cfg_t              cfg,
  output logic              cfg_ok
);
  cfg_addr_e addr;
  assign addr = cfg_addr_e'(cfg_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.dim      <= 7'd1;
      cfg.nsv      <= 7'd1;
      cfg.nmac     <= 3'(N_MAC);
      cfg.prec     <= BITS12;
      cfg.trunc    <= BITS12;
      cfg.sel0     <= 1'b0;
      cfg.sel1     <= 1'b1;
      cfg.sel2     <= 1'b0;
      cfg.beta     <= '0;
      cfg.bias     <= '0;
      cfg.bank_on  <= '1;
      cfg.dot_cont <= 1'b0;
      cfg.dot_last <= 1'b1;
      wr_reject    <= 1'b0;
    end else begin
      wr_reject <= cfg_we && busy;
      if (cfg_we && !busy) begin
        unique case (addr)
          REG_DIM:   cfg.dim  <= cfg_wdata[6:0];
          REG_NSV:   cfg.nsv  <= cfg_wdata[6:0];
          REG_NMAC:  cfg.nmac <= cfg_wdata[2:0];
          REG_ARITH: begin
            cfg.prec  <= width_sel_e'(cfg_wdata[1:0]);
            cfg.trunc <= width_sel_e'(cfg_wdata[3:2]);
          end
          REG_KSEL:  {cfg.sel2, cfg.sel1, cfg.sel0} <= cfg_wdata[2:0];
          REG_BETA:  cfg.beta <= cfg_wdata[WORD_W-1:0];
          REG_BIAS:  cfg.bias <= cfg_wdata[KER_W-1:0];
          REG_CTRL:  {cfg.dot_last, cfg.dot_cont, cfg.bank_on} <= cfg_wdata[BANKS+1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    unique case (addr)
      REG_DIM:   cfg_rdata[6:0] = cfg.dim;
      REG_NSV:   cfg_rdata[6:0] = cfg.nsv;
      REG_NMAC:  cfg_rdata[2:0] = cfg.nmac;
      REG_ARITH: cfg_rdata[3:0] = {cfg.trunc, cfg.prec};
      REG_KSEL:  cfg_rdata[2:0] = {cfg.sel2, cfg.sel1, cfg.sel0};
      REG_BETA:  cfg_rdata[WORD_W-1:0] = cfg.beta;
      REG_BIAS:  cfg_rdata[KER_W-1:0] = cfg.bias;
      REG_CTRL:  cfg_rdata[BANKS+1:0] = {cfg.dot_last, cfg.dot_cont, cfg.bank_on};
      default: ;
    endcase
  end

  always_comb begin
    logic [13:0] words;
    words  = 14'(cfg.dim) * 14'(cfg.nsv);
    cfg_ok = (cfg.dim != 0) && (cfg.nsv != 0) && (words <= 14'(BUF_DEPTH))
          && (cfg.nmac != 0) && (32'(cfg.nmac) <= N_MAC)
          && (cfg.prec != 2'd3) && (cfg.trunc != 2'd3)
          && ((cfg.dot_last && !cfg.dot_cont) || (cfg.nsv == 7'd1));
  end
endmodule
