// isa_pkg: shared types and constants of the 16-bit, eight-register,
// three-address instruction set and its single-cycle datapath.
//
// Every instruction is one 16-bit word. Bits 15-9 are always the 7-bit
// opcode, bits 5-3 are always source register A (SA). Bits 8-6 are the
// destination register (DR) and bits 2-0 source register B (SB) or a 3-bit
// signed constant (OP), except in jumps and branches, where bits 8-6 and 2-0
// are the upper and lower halves of a 6-bit signed PC offset (AD). The two
// top opcode bits give the instruction category; the remaining five carry the
// ALU function code (ALU categories), the load/store select (bit 4), or the
// jump select (bit 4) and branch condition (bits 2-0). These layouts, the
// category codes, the FS table and the branch condition codes follow the
// instruction set definition; the control-word layout is this design's own.
package isa_pkg;

  localparam int unsigned INSTR_W = 16;
  localparam int unsigned REG_AW  = 3;   // 8 registers
  localparam int unsigned FS_W    = 5;
  localparam int unsigned AD_W    = 6;

  // Opcode bits 6-5: instruction category.
  typedef enum logic [1:0] {
    CAT_REG_ALU = 2'b00,  // register-format ALU operation
    CAT_MEM     = 2'b01,  // register-indirect load / store
    CAT_IMM_ALU = 2'b10,  // immediate ALU operation
    CAT_JUMP_BR = 2'b11   // PC-relative jumps and branches
  } category_e;

  // ALU function select codes (FS).
  typedef enum logic [FS_W-1:0] {
    FS_A        = 5'b00000,  // F = A
    FS_INC      = 5'b00001,  // F = A + 1
    FS_ADD      = 5'b00010,  // F = A + B
    FS_ADD_INC  = 5'b00011,  // F = A + B + 1
    FS_ADD_NOTB = 5'b00100,  // F = A + B'
    FS_SUB      = 5'b00101,  // F = A + B' + 1
    FS_DEC      = 5'b00110,  // F = A - 1
    FS_A2       = 5'b00111,  // F = A
    FS_AND      = 5'b01000,
    FS_OR       = 5'b01010,
    FS_XOR      = 5'b01100,
    FS_NOT      = 5'b01110,  // F = A'
    FS_B        = 5'b10000,  // F = B
    FS_SR       = 5'b10100,  // F = B shifted right one place
    FS_SL       = 5'b11000   // F = B shifted left one place
  } fs_e;

  // Branch condition codes, opcode bits 2-0 of a branch.
  typedef enum logic [2:0] {
    BR_C  = 3'b000,  // carry set
    BR_N  = 3'b001,  // negative
    BR_V  = 3'b010,  // overflow
    BR_Z  = 3'b011,  // zero
    BR_NC = 3'b100,  // carry clear
    BR_NN = 3'b101,  // positive (not negative)
    BR_NV = 3'b110,  // no overflow
    BR_NZ = 3'b111   // non-zero
  } cond_e;

  // Register / immediate view of an instruction word.
  typedef struct packed {
    logic [6:0]        opcode;  // bits 15-9
    logic [REG_AW-1:0] dr;      // bits 8-6 (AD bits 5-3 in jumps/branches)
    logic [REG_AW-1:0] sa;      // bits 5-3
    logic [REG_AW-1:0] sb;      // bits 2-0 (OP, or AD bits 2-0)
  } instr_t;

  // ALU status bits.
  typedef struct packed {
    logic v;
    logic c;
    logic n;
    logic z;
  } status_t;

  // Datapath control word produced by the decoder.
  typedef struct packed {
    logic [REG_AW-1:0] da;  // write address
    logic [REG_AW-1:0] aa;  // read address, port A
    logic [REG_AW-1:0] ba;  // read address, port B
    logic              mb;  // 1: constant to B operand
    logic [FS_W-1:0]   fs;  // ALU function
    logic              md;  // 1: RAM output to register file
    logic              wr;  // register write enable
    logic              mw;  // RAM write enable
  } ctrl_t;

  // Program-counter control produced by the decoder.
  typedef struct packed {
    logic            jump;    // unconditional PC-relative jump
    logic            branch;  // conditional PC-relative branch
    logic [2:0]      cond;    // branch condition code
    logic [AD_W-1:0] ad;      // signed PC offset
  } pc_ctrl_t;

  // Opcode builders, handy for programs and testbenches.
  function automatic logic [6:0] op_reg_alu(input logic [FS_W-1:0] fs);
    return {CAT_REG_ALU, fs};
  endfunction

  function automatic logic [6:0] op_imm_alu(input logic [FS_W-1:0] fs);
    return {CAT_IMM_ALU, fs};
  endfunction

  localparam logic [6:0] OP_ST  = 7'b0100000;
  localparam logic [6:0] OP_LD  = 7'b0110000;
  localparam logic [6:0] OP_JMP = 7'b1110000;

  function automatic logic [6:0] op_branch(input logic [2:0] cond);
    return {CAT_JUMP_BR, 1'b0, 1'b0, cond};
  endfunction

  // Assemble the three formats.
  function automatic logic [INSTR_W-1:0] enc_reg(input logic [6:0] op,
      input logic [2:0] dr, input logic [2:0] sa, input logic [2:0] sb);
    return {op, dr, sa, sb};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_jb(input logic [6:0] op,
      input logic [2:0] sa, input logic [AD_W-1:0] ad);
    return {op, ad[5:3], sa, ad[2:0]};
  endfunction

endpackage
