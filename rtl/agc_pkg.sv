// agc_pkg: types, constants and arithmetic helpers shared by the AGC-style CPU.
//
// The machine keeps the word format of the Apollo Guidance Computer: 15-bit
// one's complement words (bit 14 is the sign) and a 12-bit logical address
// field. Instructions are a 3-bit order code in bits 14:12 and an address in
// bits 11:0; some order codes are split further by the "quarter code" in bits
// 11:10, and a preceding EXTEND selects a second table of orders. The
// encodings follow the original machine so that code assembled for it keeps
// its meaning; the subset of orders is the one this CPU supports.
//
// One's complement has two zeros: +0 (all zeros) and -0 (all ones). Adding
// uses an end-around carry; negation is bitwise inversion.
package agc_pkg;

  localparam int WORD_W = 15;   // data word width
  localparam int ADDR_W = 12;   // logical address field
  localparam int RAM_AW = 11;   // physical erasable address (0000-3777 octal)
  localparam int ROM_PW = 14;   // physical fixed address (04000-27777 octal)
  localparam int NUM_REGS = 16; // CPU registers at logical 00-17 octal
  localparam int NUM_CH = 15;   // I/O channels 0..14
  localparam int CH_W = 4;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Register numbers (logical addresses 0..7 octal)
  localparam logic [3:0] REG_A    = 4'd0;
  localparam logic [3:0] REG_L    = 4'd1;
  localparam logic [3:0] REG_Q    = 4'd2;
  localparam logic [3:0] REG_EB   = 4'd3;
  localparam logic [3:0] REG_FB   = 4'd4;
  localparam logic [3:0] REG_Z    = 4'd5;
  localparam logic [3:0] REG_BB   = 4'd6;
  localparam logic [3:0] REG_ZERO = 4'd7;

  localparam addr_t RESET_PC = 12'o4000;

  typedef enum logic [4:0] {
    OP_NOP, OP_TC, OP_TCF, OP_RETURN, OP_XLQ, OP_EXTEND, OP_INDEX,
    OP_CA, OP_CS, OP_AD, OP_SU, OP_MASK, OP_MP,
    OP_LXCH, OP_QXCH, OP_XCH, OP_TS,
    OP_INCR, OP_ADS, OP_AUG, OP_DIM,
    OP_BZF, OP_BZMF,
    OP_READ, OP_WRITE, OP_RAND, OP_WAND, OP_ROR, OP_WOR, OP_RXOR
  } op_e;

  // Decoded control word carried down the pipeline.
  typedef struct packed {
    op_e          op;
    addr_t        k;        // operand address / jump target / channel
    logic         rd_k;     // reads memory or register at k
    logic         rd_a;     // reads A
    logic         rd_l;     // reads L
    logic         rd_q;     // reads Q
    logic         rd_io;    // reads I/O channel k
    logic         wr_k;     // writes memory or register at k
    logic         wr_a;     // writes A
    logic         wr_l;     // writes L
    logic         wr_q;     // writes Q
    logic         wr_io;    // writes I/O channel k
    logic         illegal;  // order code not supported (executed as no-op)
  } ctrl_t;

  // One's complement helpers -------------------------------------------------
  function automatic word_t oc_add(word_t x, word_t y);
    logic [WORD_W:0] s;
    s = {1'b0, x} + {1'b0, y};
    return s[WORD_W-1:0] + word_t'(s[WORD_W]);
  endfunction

  function automatic word_t oc_neg(word_t x);
    return ~x;
  endfunction

  function automatic logic oc_is_zero(word_t x);
    return (x == '0) || (x == '1);
  endfunction

  localparam word_t OC_ONE  = word_t'(1);
  localparam word_t OC_MONE = ~word_t'(1);

endpackage
