// control_blk: sequencer of the classification accelerator.
//
// Write phase: while idle, a load request on tv_valid / sv_valid / coef_valid
// becomes the write enable (the gated TV_CLK0 / SV_CLK0 clock) of the matching
// buffer. A request that arrives while a computation runs is dropped and
// flagged on load_reject.
// Compute phase: a start pulse with a legal configuration (cfg_ok) runs one
// write sequence. It is refused, with start_reject, when the configuration is
// illegal or MAX_SEQ sequences have already run since the last clear.
//   MAC  for each SV slot n = 0..N_SV-1: D_SV cycles with mac_en. The buffer
//        counter (sel_buf) advances once per cycle and saturates at
//        D_SV x N_SV. tv_sel = dimension d reads the TV line buffer.
//   KER  if dot_last: one cycle per active MAC k = 0..nmac-1 with ker_en,
//        sel_mac = k and coef_addr = n*N_MAC + k. Then the MAC accumulators
//        are cleared for the next SV slot.
// MAC accumulators are also cleared when a sequence starts, unless dot_cont
// continues a dot product from the previous sequence. A sequence takes
// N_SV x (D_SV + nmac) cycles (nmac term only with dot_last) from the clock
// that takes start to the one that raises done for one cycle.
// clear begins a new classification: the kernel accumulator is loaded with
// bias (ker_clr) and the sequence counter is zeroed.
// The saturating counter, the SEL_BUF/SEL_MAC selects, the write-phase gating
// and the limit of 8192 write sequences follow the published control block.
// The state machine, the handshake and the chunking of long dot products over
// sequences (dot_cont/dot_last) are this implementation's design.
module control_blk
  import svm_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  cfg_t                              cfg,
  input  logic                              cfg_ok,
  input  logic                              clear,
  input  logic                              start,
  input  logic                              tv_valid,
  input  logic                              sv_valid,
  input  logic                              coef_valid,
  output logic                              tv_wr_en,    // TV_CLK0 enable
  output logic                              sv_wr_en,    // SV_CLK0 enable
  output logic                              coef_wr_en,
  output logic                              load_reject,
  output logic                              start_reject,
  output logic                              busy,
  output logic                              done,
  output logic [$clog2(BUF_DEPTH)-1:0]      sel_buf,     // SV buffer read address
  output logic [$clog2(BUF_DEPTH)-1:0]      tv_sel,      // TV buffer read address
  output logic [2:0]                        sel_mac,     // SEL_MAC
  output logic [$clog2(BUF_DEPTH*N_MAC)-1:0] coef_addr,
  output logic                              mac_clr,
  output logic                              mac_en,
  output logic                              ker_en,      // Ker_CLK0 enable
  output logic                              ker_clr,
  output logic [$clog2(MAX_SEQ):0]          seq_count
);
  typedef enum logic [1:0] {S_IDLE, S_MAC, S_KER} state_e;
  state_e state;

  localparam int unsigned AW = $clog2(BUF_DEPTH);
  logic [AW:0]   cnt;     // saturating buffer counter, 0..D_SV*N_SV
  logic [AW:0]   limit;
  logic [6:0]    d, n;
  logic [2:0]    k;
  logic          accept;

  assign limit  = (AW+1)'(cfg.dim * cfg.nsv);
  assign busy   = (state != S_IDLE);
  assign accept = (state == S_IDLE) && start && cfg_ok && (seq_count < $bits(seq_count)'(MAX_SEQ));

  assign tv_wr_en   = tv_valid   && !busy;
  assign sv_wr_en   = sv_valid   && !busy;
  assign coef_wr_en = coef_valid && !busy;

  assign sel_buf   = cnt[AW-1:0];
  assign tv_sel    = d[AW-1:0];
  assign sel_mac   = k;
  assign coef_addr = $bits(coef_addr)'(n * 7'(N_MAC) + 7'(k));
  assign mac_en    = (state == S_MAC);
  assign ker_en    = (state == S_KER);
  assign ker_clr   = clear && (state == S_IDLE);

  // clear at sequence start (unless continuing) and after each kernel pass
  assign mac_clr = (accept && !cfg.dot_cont)
                || ((state == S_KER) && (32'(k) == 32'(cfg.nmac) - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      d            <= '0;
      n            <= '0;
      k            <= '0;
      done         <= 1'b0;
      load_reject  <= 1'b0;
      start_reject <= 1'b0;
      seq_count    <= '0;
    end else begin
      done         <= 1'b0;
      load_reject  <= busy && (tv_valid || sv_valid || coef_valid);
      start_reject <= (state == S_IDLE) && start && !accept;
      unique case (state)
        S_IDLE: begin
          if (clear) seq_count <= '0;
          if (accept) begin
            state     <= S_MAC;
            cnt       <= '0;
            d         <= '0;
            n         <= '0;
            k         <= '0;
            seq_count <= seq_count + 1'b1;
          end
        end
        S_MAC: begin
          if (cnt < limit) cnt <= cnt + 1'b1;
          if (d == cfg.dim - 7'd1) begin
            d <= '0;
            if (cfg.dot_last) begin
              state <= S_KER;
              k     <= '0;
            end else if (n == cfg.nsv - 7'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              n <= n + 7'd1;
            end
          end else begin
            d <= d + 7'd1;
          end
        end
        S_KER: begin
          if (32'(k) == 32'(cfg.nmac) - 1) begin
            k <= '0;
            if (n == cfg.nsv - 7'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              n     <= n + 7'd1;
              state <= S_MAC;
            end
          end else begin
            k <= k + 3'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // buffers are written only in the write phase
  a_write_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (tv_wr_en || sv_wr_en || coef_wr_en) |-> !busy);

  // done is a one-cycle pulse that ends a busy period
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy && $past(busy) ##1 !done);

  // the configuration must not change under a running sequence
  a_cfg_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy && $past(busy) |-> cfg == $past(cfg));
endmodule
