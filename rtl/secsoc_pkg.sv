// secsoc_pkg: sizes, instruction decoding helpers and exception causes shared
// by the SecSoC security extensions.
//
// A sensitive variable is stored in memory as one 128-bit AES block, moved by
// LANES = 128/32 consecutive 32-bit loads or stores (a "sensitive block").
// A block is bracketed by two instructions that change no architectural state:
//   Begin  = ADDI x0, x0, serial      End = ADDI x0, x1, serial
// with the block's serial number in the 12-bit immediate.
// The marker encodings, the 128-bit key and the four accesses per variable
// follow the SecSoC architecture; the exception cause encoding is this
// design's own.
package secsoc_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NREGS     = 32;
  localparam int unsigned AES_W     = 128;
  localparam int unsigned LANES     = AES_W / XLEN;   // words per encrypted item
  localparam int unsigned SERIAL_W  = 12;             // ADDI immediate width

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [AES_W-1:0] blk_t;
  typedef logic [4:0]       reg_idx_t;

  // exceptions raised by the security extensions
  typedef enum logic [3:0] {
    EXC_NONE            = 4'd0,
    EXC_BAD_SERIAL      = 4'd1,  // Begin serial not registered in the SMU
    EXC_NESTED_BEGIN    = 4'd2,  // Begin inside an open block
    EXC_END_NO_BEGIN    = 4'd3,  // End outside a block
    EXC_SERIAL_MISMATCH = 4'd4,  // End serial differs from its Begin
    EXC_COUNT           = 4'd5,  // wrong number of loads/stores in the block
    EXC_MIXED           = 4'd6,  // block not all loads or all stores of one register
    EXC_HASH            = 4'd7,  // block hash differs from the stored one
    EXC_SENS_NORMAL     = 4'd8   // sensitive register stored in normal mode
  } exc_cause_e;

  localparam logic [6:0] OP_IMM   = 7'b0010011;
  localparam logic [6:0] OP_LOAD  = 7'b0000011;
  localparam logic [6:0] OP_STORE = 7'b0100011;
  localparam logic [2:0] F3_ADDI  = 3'b000;
  localparam logic [2:0] F3_WORD  = 3'b010;

  function automatic logic is_begin(input word_t i);
    return i[6:0] == OP_IMM && i[14:12] == F3_ADDI && i[11:7] == 5'd0 && i[19:15] == 5'd0;
  endfunction

  function automatic logic is_end(input word_t i);
    return i[6:0] == OP_IMM && i[14:12] == F3_ADDI && i[11:7] == 5'd0 && i[19:15] == 5'd1;
  endfunction

  function automatic logic is_lw(input word_t i);
    return i[6:0] == OP_LOAD && i[14:12] == F3_WORD;
  endfunction

  function automatic logic is_sw(input word_t i);
    return i[6:0] == OP_STORE && i[14:12] == F3_WORD;
  endfunction

  function automatic logic [SERIAL_W-1:0] serial_of(input word_t i);
    return i[31:20];
  endfunction

  function automatic reg_idx_t rd_of(input word_t i);
    return i[11:7];
  endfunction

  function automatic reg_idx_t rs2_of(input word_t i);
    return i[24:20];
  endfunction

endpackage
