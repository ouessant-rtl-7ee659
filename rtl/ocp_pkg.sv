// ocp_pkg -- types and constants shared by the coprocessor blocks.
//
// The coprocessor addresses memory as (bank, offset) pairs: 8 banks, whose
// base addresses are held in configuration registers, and a 14-bit word
// offset inside a bank. The bus is 32 bits wide. Instructions are 32-bit
// words with a 5-bit operation code; four instructions exist: mvtc (memory to
// coprocessor FIFO), mvfc (coprocessor FIFO to memory), execs (start the
// accelerator and wait for it) and eop (end of program, signal the CPU).
//
// The widths (5-bit opcode, 3-bit bank, 14-bit offset, 32-bit data, ten
// configuration registers) follow the published architecture. The opcode
// values, the placement of the fields inside the instruction word, the
// burst-length coding and the control-bit positions are this design's own.
package ocp_pkg;

  localparam int unsigned DATA_W      = 32;  // bus and FIFO word width
  localparam int unsigned ADDR_W      = 32;  // system address width
  localparam int unsigned OPCODE_W    = 5;   // up to 32 instructions
  localparam int unsigned BANK_W      = 3;   // 8 memory banks
  localparam int unsigned NUM_BANKS   = 1 << BANK_W;
  localparam int unsigned OFFSET_W    = 14;  // word offset inside a bank
  localparam int unsigned FIFO_ID_W   = 3;   // FIFO selector in mvtc/mvfc
  localparam int unsigned BLEN_W      = 3;   // burst length code: 2**code words
  localparam int unsigned NUM_CFG     = 2 + NUM_BANKS; // ctrl, prog size, banks
  localparam int unsigned REG_OFF_W   = 4;   // configuration register index

  // Configuration register indexes (byte offset = 4 * index)
  localparam logic [REG_OFF_W-1:0] CFG_CTRL  = 4'd0;  // 0x00
  localparam logic [REG_OFF_W-1:0] CFG_PSIZE = 4'd1;  // 0x04
  localparam logic [REG_OFF_W-1:0] CFG_BANK0 = 4'd2;  // 0x08 .. 0x24

  // Control register bit positions
  localparam int unsigned CTRL_S  = 0;  // start
  localparam int unsigned CTRL_D  = 1;  // done
  localparam int unsigned CTRL_IE = 2;  // interrupt enable

  typedef enum logic [OPCODE_W-1:0] {
    OP_NOP   = 5'd0,
    OP_MVTC  = 5'd1,
    OP_MVFC  = 5'd2,
    OP_EXECS = 5'd3,
    OP_EOP   = 5'd4
  } opcode_e;

  // Instruction word layout, MSB first
  typedef struct packed {
    logic [OPCODE_W-1:0]  opcode;   // [31:27]
    logic [BANK_W-1:0]    bank;     // [26:24]
    logic [OFFSET_W-1:0]  offset;   // [23:10]
    logic [FIFO_ID_W-1:0] fifo;     // [9:7]
    logic [BLEN_W-1:0]    blen;     // [6:4]  burst of 2**blen words
    logic [3:0]           rsvd;     // [3:0]
  } instr_t;

  // Helper used by testbenches and firmware generators
  function automatic logic [DATA_W-1:0] make_instr(opcode_e op,
      logic [BANK_W-1:0] bank, logic [OFFSET_W-1:0] offset,
      logic [BLEN_W-1:0] blen, logic [FIFO_ID_W-1:0] fifo);
    instr_t i;
    i.opcode = op;
    i.bank   = bank;
    i.offset = offset;
    i.fifo   = fifo;
    i.blen   = blen;
    i.rsvd   = '0;
    return i;
  endfunction

endpackage
