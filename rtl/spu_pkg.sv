// spu_pkg: constants and types shared by the Sub-word Permutation Unit (SPU).
//
// The SPU sits between the MMX register/memory stage and the two MMX integer
// pipes (U and V). It keeps all eight 64-bit MMX registers in one unified,
// byte-addressable register, routes any register byte to any operand byte
// through a byte crossbar, and lets a small programmed state machine choose
// that routing for every issued instruction.
//
// Sizes below follow the configuration with full byte addressability:
// 8 registers x 64 bits (64 bytes), a 64-input x 32-output byte crossbar
// (four 64-bit operands), a 128-state controller with two 16-bit loop
// counters and a 207-bit control word (15 bits of sequencing plus 192 bits
// of crossbar selects). State 127 is the idle state.
//
// The memory-mapped control space (64-bit word addresses, 12 bits) is this
// design's own choice. Bits [11:10] pick the context whose registers are
// written; bits [9:0] are the local address:
//   0x000-0x1FF  control memory, address = {state[6:0], chunk[1:0]};
//                chunk c holds control-word bits [64c+63:64c]
//   0x200/0x201  store register S1 / S2 (bits [15:0] of the data)
//   0x204        configuration register: bit 0 = GO (1 starts, 0 stops)
//   0x205        context select (any context field): bits [1:0] name the
//                context that drives the crossbar and follows issue
package spu_pkg;

  localparam int unsigned NUM_REGS   = 8;
  localparam int unsigned REG_W      = 64;
  localparam int unsigned REG_BYTES  = REG_W / 8;                // 8
  localparam int unsigned SPU_BYTES  = NUM_REGS * REG_BYTES;     // 64
  localparam int unsigned OPERANDS   = 4;                        // U.a U.b V.a V.b
  localparam int unsigned OUT_BYTES  = OPERANDS * REG_BYTES;     // 32
  localparam int unsigned SEL_W      = $clog2(SPU_BYTES);        // 6
  localparam int unsigned SEL_BITS   = OUT_BYTES * SEL_W;        // 192

  localparam int unsigned STATES     = 128;
  localparam int unsigned STATE_W    = $clog2(STATES);           // 7
  localparam int unsigned CNT_W      = 16;

  localparam int unsigned CFG_AW     = 12;
  localparam int unsigned CFG_LAW    = 10;                       // local part
  localparam int unsigned CFG_DW     = 64;
  localparam int unsigned MAX_CTX    = 4;                        // addr [11:10]
  localparam logic [CFG_LAW-1:0] CFG_S1_ADDR   = 10'h200;
  localparam logic [CFG_LAW-1:0] CFG_S2_ADDR   = 10'h201;
  localparam logic [CFG_LAW-1:0] CFG_CONF_ADDR = 10'h204;
  localparam logic [CFG_LAW-1:0] CFG_CTX_ADDR  = 10'h205;

  // Index of each write port of the SPU register.
  typedef enum logic [1:0] {
    WP_MEM = 2'd0,
    WP_U   = 2'd1,
    WP_V   = 2'd2
  } wr_port_e;

  // Index of each operand bus leaving the crossbar.
  typedef enum logic [1:0] {
    OP_UA = 2'd0,
    OP_UB = 2'd1,
    OP_VA = 2'd2,
    OP_VB = 2'd3
  } operand_e;

endpackage
