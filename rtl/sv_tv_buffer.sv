// sv_tv_buffer: register-file buffer used as the TV line buffer and as each
// SV preload buffer.
//
// BANKS banks of BANK_DEPTH words of WIDTH bits (4 x 16 x 12b by default)
// are chained as one shift register. On a clock with wr_en high (the enabled
// SV_CLK0/TV_CLK0 write clock), din enters word 0 and every word moves up one
// place. The word leaving the top is shift_out, which feeds the next buffer of
// a chain. After L shifts the word sent last is at address 0, so a host that
// sends element L-1 first and element 0 last finds element e at address e.
// The read path is a hierarchical 2:1 multiplexer tree (mux_tree) steered by
// rd_sel (SEL_BUF); dout is combinational from rd_sel.
// Each bank has its own supply (bank_on). A bank that is switched off loses
// its contents: they are held at zero, read as zero and pass zero on up the
// chain. buf_reset clears every word synchronously.
// The organisation, the shift-register write and the multiplexer read follow
// the published buffer. The shift direction, the zero-on-power-down model and
// the synchronous reset are this implementation's choices.
module sv_tv_buffer #(
  parameter int unsigned WIDTH      = 12,
  parameter int unsigned BANKS      = 4,
  parameter int unsigned BANK_DEPTH = 16,
  localparam int unsigned DEPTH     = BANKS * BANK_DEPTH
) (
  input  logic                     clk,
  input  logic                     buf_reset,   // BUF_RESET
  input  logic                     wr_en,       // SV_CLK0 / TV_CLK0 enable
  input  logic [WIDTH-1:0]         din,         // TV/SV-IN
  input  logic [BANKS-1:0]         bank_on,     // supply of each bank (VDD0..)
  input  logic [$clog2(DEPTH)-1:0] rd_sel,      // SEL_BUF
  output logic [WIDTH-1:0]         dout,        // TV/SV-OUT
  output logic [WIDTH-1:0]         shift_out    // top word, to the next buffer
);
  logic [DEPTH-1:0][WIDTH-1:0] mem;
  logic [DEPTH-1:0][WIDTH-1:0] mem_vis;  // contents as seen with bank gating

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      mem_vis[i] = bank_on[i / BANK_DEPTH] ? mem[i] : '0;
  end

  always_ff @(posedge clk) begin
    if (buf_reset) begin
      mem <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (!bank_on[i / BANK_DEPTH])
          mem[i] <= '0;
        else if (wr_en)
          mem[i] <= (i == 0) ? din : mem_vis[i-1];
      end
    end
  end

  assign shift_out = mem_vis[DEPTH-1];

  mux_tree #(.W(WIDTH), .DEPTH(DEPTH)) u_rd (
    .din (mem_vis),
    .sel (rd_sel),
    .dout(dout)
  );
endmodule
