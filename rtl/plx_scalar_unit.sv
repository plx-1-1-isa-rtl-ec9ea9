// plx_scalar_unit: the 64-bit scalar operations of PLX 1.1 whose behaviour
// follows from their names and operand formats.
//
// Handles the format-2 immediate operations (addi, subi, andi, ori, xori, slli,
// srai, srli: Rd = Rs1 op imm13), the load-immediate forms (loadi.z.pos and
// loadi.k.pos: a 16-bit immediate placed at bits 16*pos+15 : 16*pos of Rd) and
// shrp (Rd = low 64 bits of the 128-bit pair {Rs1, Rs2} shifted right by imm8).
// `handled` tells whether op is one of these; result is 0 otherwise.
//
// Which operations exist and their operand fields follow the PLX 1.1 encoding.
// The exact arithmetic is this design's reading of the operation names:
//  - addi/subi sign-extend imm13; andi/ori/xori zero-extend it;
//  - shift immediates shift by the unsigned imm13 (64 or more gives 0, or all
//    sign bits for srai);
//  - loadi.z.pos ("zero upper bits") keeps the bits of Rd below the field and
//    clears those above it; loadi.k.pos ("keep upper bits") keeps all other
//    bits of Rd;
//  - shrp puts Rs1 in the upper half of the pair.
//
// Interface: op and operands in, result out. Timing: combinational.
module plx_scalar_unit
  import plx_pkg::*;
(
  input  op_e         op,
  input  word_t       rd_old,   // current value of Rd (load-immediate forms)
  input  word_t       rs1,
  input  word_t       rs2,
  input  logic [12:0] imm13,
  input  logic [15:0] imm16,
  input  logic [1:0]  pos,
  input  logic [7:0]  imm8,
  output word_t       result,
  output logic        handled
);

  word_t         sext13, zext13;
  word_t         field_mask, below_mask;
  word_t         imm_placed;
  word_t         pair_low;

  assign sext13 = {{(XLEN-13){imm13[12]}}, imm13};
  assign zext13 = {{(XLEN-13){1'b0}}, imm13};

  assign field_mask   = word_t'(16'hFFFF) << (6'(pos) * 6'd16);
  assign below_mask   = ~({XLEN{1'b1}} << (7'(pos) * 7'd16));
  assign imm_placed   = word_t'(imm16) << (6'(pos) * 6'd16);
  assign pair_low     = XLEN'({rs1, rs2} >> imm8);

  always_comb begin
    result  = '0;
    handled = 1'b1;
    unique case (op)
      OP_ADDI:    result = rs1 + sext13;
      OP_SUBI:    result = rs1 - sext13;
      OP_ANDI:    result = rs1 & zext13;
      OP_ORI:     result = rs1 | zext13;
      OP_XORI:    result = rs1 ^ zext13;
      OP_SLLI:    result = rs1 << imm13;
      OP_SRAI:    result = word_t'($signed(rs1) >>> imm13);
      OP_SRLI:    result = rs1 >> imm13;
      OP_LOADI_Z: result = (rd_old & below_mask) | imm_placed;
      OP_LOADI_K: result = (rd_old & ~field_mask) | imm_placed;
      OP_SHRP:    result = pair_low;
      default:    handled = 1'b0;
    endcase
  end

endmodule
