// svm_pkg: types and constants shared by the SVM classification accelerator.
//
// The accelerator holds support vectors (SVs) and one test vector (TV) in
// register-file buffers. It computes the SV/TV dot products on an array of
// variable-precision MAC units and passes each one through a programmable
// polynomial kernel. The scaled kernel outputs are summed into a 24-bit
// result whose sign is the class.
// The sizes here are the defaults of the design: 6 MAC units, 12-bit words,
// buffers of four 16-word banks (64 words) and a 16-bit MAC accumulator.
// Up to 8192 write sequences make up one classification. All of these come
// from the published architecture. The field layout of the configuration
// record and the encodings of precision and truncation are this
// implementation's own choice.
package svm_pkg;

  localparam int unsigned WORD_W     = 12;    // data word of buffers, MAC inputs, kernel
  localparam int unsigned N_MAC      = 6;     // MAC units in the engine
  localparam int unsigned BANKS      = 4;     // power-gated banks per buffer
  localparam int unsigned BANK_DEPTH = 16;    // words per bank
  localparam int unsigned BUF_DEPTH  = BANKS * BANK_DEPTH;  // 64 = max D_SV x N_SV
  localparam int unsigned ACC_W      = 16;    // MAC accumulator (CBA-3)
  localparam int unsigned KER_W      = 24;    // kernel accumulator (REG 24)
  localparam int unsigned MAX_SEQ    = 8192;  // write sequences per classification
  localparam int unsigned CFG_AW     = 3;     // status register address bits
  localparam int unsigned CFG_DW     = 24;    // status register data bits

  // Precision / truncation select (PR1:PR0, TR1:TR0).
  typedef enum logic [1:0] {
    BITS8  = 2'd0,
    BITS10 = 2'd1,
    BITS12 = 2'd2
  } width_sel_e;

  // Status register addresses.
  typedef enum logic [CFG_AW-1:0] {
    REG_DIM   = 3'd0,  // D_SV of one write sequence (1..64)
    REG_NSV   = 3'd1,  // SVs per preload buffer in one write sequence (1..64)
    REG_NMAC  = 3'd2,  // MAC units in use (1..N_MAC)
    REG_ARITH = 3'd3,  // [1:0] precision, [3:2] truncation
    REG_KSEL  = 3'd4,  // [0] SEL0, [1] SEL1, [2] SEL2
    REG_BETA  = 3'd5,  // [11:0] beta
    REG_BIAS  = 3'd6,  // [23:0] start value of the kernel accumulator (-b)
    REG_CTRL  = 3'd7   // [3:0] bank power, [4] dot_cont, [5] dot_last
  } cfg_addr_e;

  typedef struct packed {
    logic [6:0]        dim;       // D_SV per sequence
    logic [6:0]        nsv;       // SVs per buffer per sequence
    logic [2:0]        nmac;      // active MAC units
    width_sel_e        prec;
    width_sel_e        trunc;
    logic              sel0;      // MUL1 input: 0 = V (cube), 1 = R (fourth power)
    logic              sel1;      // 0 = V (linear), 1 = R (square)
    logic              sel2;      // 0 = SEL1 mux output, 1 = S (cube / fourth power)
    logic [WORD_W-1:0] beta;
    logic [KER_W-1:0]  bias;
    logic [BANKS-1:0]  bank_on;
    logic              dot_cont;  // keep MAC accumulators from the previous sequence
    logic              dot_last;  // dot products are complete: run the kernel
  } cfg_t;

endpackage
