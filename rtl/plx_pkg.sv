// plx_pkg: types and constants shared by the PLX 1.1 decode and execute blocks.
//
// PLX 1.1 instructions are 32 bits wide. Every one starts with a 3-bit guarding
// predicate number (bits 31:29) and a 6-bit major opcode (bits 28:23); the
// remaining 23 bits are laid out in one of nine formats (0, 1, 2, 3, 4a, 4b,
// 4c, 5a, 5b). The opcode values, format bit positions, compare relation codes
// and the subop codes of opcodes 32 and 33 below follow the PLX 1.1 encoding.
// The decoded-instruction struct, the operation enum and its naming, and the
// split of ops into "executed here" and "offloaded" are this design's own.
package plx_pkg;

  localparam int unsigned XLEN   = 64;   // register width (loadi reaches bit 63)
  localparam int unsigned NREGS  = 32;   // 5-bit register fields
  localparam int unsigned NPREDS = 8;    // 3-bit predicate fields

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;
  typedef logic [2:0]      pred_idx_t;

  // Major opcodes (Table of opcode mappings).
  localparam logic [5:0] OPC_JMP        = 6'h00;
  localparam logic [5:0] OPC_JMP_LINK   = 6'h01;
  localparam logic [5:0] OPC_JMP_REG    = 6'h02;
  localparam logic [5:0] OPC_JMP_REG_LK = 6'h03;
  localparam logic [5:0] OPC_LOADI_Z    = 6'h04;
  localparam logic [5:0] OPC_LOADI_K    = 6'h05;
  localparam logic [5:0] OPC_TRAP       = 6'h07;
  localparam logic [5:0] OPC_CMP        = 6'h08;
  localparam logic [5:0] OPC_CMPI       = 6'h09;
  localparam logic [5:0] OPC_TESTBIT    = 6'h0A;
  localparam logic [5:0] OPC_CHANGEPR   = 6'h0B;
  localparam logic [5:0] OPC_CHANGEPR_L = 6'h0C;
  localparam logic [5:0] OPC_ADDI       = 6'h20;
  localparam logic [5:0] OPC_SUBI       = 6'h21;
  localparam logic [5:0] OPC_ANDI       = 6'h22;
  localparam logic [5:0] OPC_ORI        = 6'h23;
  localparam logic [5:0] OPC_XORI       = 6'h24;
  localparam logic [5:0] OPC_SLLI       = 6'h25;
  localparam logic [5:0] OPC_SRAI       = 6'h26;
  localparam logic [5:0] OPC_SRLI       = 6'h27;
  localparam logic [5:0] OPC_DEPOSIT    = 6'h28;
  localparam logic [5:0] OPC_EXTRACT    = 6'h29;
  localparam logic [5:0] OPC_SHRP       = 6'h2A;
  localparam logic [5:0] OPC_PALU       = 6'h30;
  localparam logic [5:0] OPC_PMUL       = 6'h31;
  localparam logic [5:0] OPC_PSHIFT     = 6'h32;
  localparam logic [5:0] OPC_PSHIFTI    = 6'h33;

  // Instruction formats.
  typedef enum logic [3:0] {
    FMT_0, FMT_1, FMT_2, FMT_3, FMT_4A, FMT_4B, FMT_4C, FMT_5A, FMT_5B, FMT_NONE
  } fmt_e;

  // Operations named by the encoding.
  typedef enum logic [6:0] {
    OP_ILLEGAL,
    OP_JMP, OP_JMP_LINK, OP_JMP_REG, OP_JMP_REG_LINK, OP_TRAP,
    OP_LOADI_Z, OP_LOADI_K,
    OP_CMP, OP_CMPI, OP_TESTBIT, OP_CHANGEPR, OP_CHANGEPR_LD,
    OP_LDX4, OP_LDX8, OP_LD4, OP_LD8, OP_LDX4U, OP_LDX8U, OP_LD4U, OP_LD8U,
    OP_ST1, OP_ST2, OP_ST4, OP_ST8, OP_ST1U, OP_ST2U, OP_ST4U, OP_ST8U,
    OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRAI, OP_SRLI,
    OP_DEPOSIT, OP_EXTRACT, OP_SHRP,
    OP_PALU, OP_PMUL,
    OP_PSHIFT_L, OP_PSHIFT_RA, OP_PSHIFT_R, OP_MIX_L, OP_MIX_R, OP_PERM,
    OP_PSHIFTI_L, OP_PSHIFTI_RA, OP_PSHIFTI_R,
    OP_MUX_REV, OP_MUX_MIX, OP_MUX_SHUF, OP_MUX_ALT, OP_MUX_BRCST
  } op_e;

  // Compare relations, coded in bits 3:0 of formats 5a and 5b.
  typedef enum logic [3:0] {
    REL_EQ = 4'd0, REL_NE = 4'd1, REL_LT = 4'd2, REL_LE = 4'd3, REL_GT = 4'd4,
    REL_GE = 4'd5, REL_LTU = 4'd6, REL_LEU = 4'd7, REL_GTU = 4'd8, REL_GEU = 4'd9
  } rel_e;

  // Compare write modes, the 3-bit subop of format 5a.
  localparam logic [2:0] CMP_NORMAL = 3'b000;
  localparam logic [2:0] CMP_W0     = 3'b100;
  localparam logic [2:0] CMP_W1     = 3'b101;

  // Subword-size field (bits 1:0 of an 8-bit subop): bytes = 1 << ss.
  localparam logic [1:0] SS_1 = 2'b00;
  localparam logic [1:0] SS_2 = 2'b01;
  localparam logic [1:0] SS_4 = 2'b10;
  localparam logic [1:0] SS_8 = 2'b11;

  // Parallel shift kinds.
  typedef enum logic [1:0] { PSH_L = 2'd0, PSH_RA = 2'd1, PSH_R = 2'd2 } psh_e;

  // All fields of one instruction, every format's view extracted at once.
  typedef struct packed {
    logic [2:0]  pred;     // 31:29 guarding predicate
    logic [5:0]  opcode;   // 28:23
    fmt_e        fmt;
    op_e         op;
    logic        illegal;  // unassigned or reserved encoding
    reg_idx_t    ra;       // 22:18 first register field (Rd, or Rs1 of compares)
    reg_idx_t    rb;       // 17:13 second register field
    reg_idx_t    rc;       // 12:8  third register field
    logic [22:0] imm23;    // format 0
    logic [1:0]  pos;      // format 1, bits 17:16 (loadi position)
    logic [15:0] imm16;    // format 1
    logic [12:0] imm13;    // format 2
    logic [6:0]  imm7;     // format 3, bits 12:6
    logic [5:0]  imm6;     // format 3, bits 5:0
    logic [4:0]  imm5;     // format 4b, bits 12:8
    logic [7:0]  imm8;     // format 4c bits 7:0, format 5b bits 17:10
    logic [7:0]  subop;    // formats 4a/4b, bits 7:0
    logic [1:0]  ss;       // subword size, bits 1:0
    logic [2:0]  subop3;   // format 5a, bits 12:10
    pred_idx_t   p1;       // formats 5a/5b, bits 9:7
    pred_idx_t   p2;       // formats 5a/5b, bits 6:4
    logic [3:0]  imm4;     // formats 5a/5b, bits 3:0
  } dec_t;

  // Number of bytes in a subword of size code ss.
  function automatic int unsigned ss_bytes(logic [1:0] ss);
    return 32'd1 << ss;
  endfunction

endpackage
