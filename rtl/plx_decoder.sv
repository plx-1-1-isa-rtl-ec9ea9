// plx_decoder: combinational PLX 1.1 instruction decoder.
//
// Takes one 32-bit instruction word and returns a dec_t holding the guarding
// predicate, the major opcode, the instruction format, the named operation and
// every field of that format (register numbers, immediates, subop, subword
// size, compare mode, target predicates, relation). Encodings the instruction
// set leaves unassigned or reserved (opcodes 06, 0D-0F, 2B-2F, 34-3F, unused
// subops of 32/33, compare relations above 9, compare subops other than
// 000/100/101) decode to OP_ILLEGAL with illegal = 1.
//
// Opcode values, format of each opcode, field bit positions and subop codes
// follow the PLX 1.1 encoding tables. This design's own choices: opcode 15 is
// decoded as the 8-byte indexed load with update (the pattern of opcodes
// 10-17); the subop of Permute (32, subop 0x20) is accepted with any subword
// size; Jump Register forms require bits 17:16 to be 00 as printed in the
// encoding; all fields are extracted whatever the format, and fields that do
// not belong to the decoded format are driven to zero.
//
// Interface: instr in, dec out. Timing: purely combinational, no clock.
module plx_decoder
  import plx_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);

  logic [5:0] opc;
  logic [5:0] sub_hi;
  logic [1:0] ss;

  assign opc    = instr[28:23];
  assign sub_hi = instr[7:2];
  assign ss     = instr[1:0];

  always_comb begin
    fmt_e f;
    op_e  o;
    logic ill;

    f   = FMT_NONE;
    o   = OP_ILLEGAL;
    ill = 1'b0;

    unique case (opc)
      OPC_JMP:        begin f = FMT_0; o = OP_JMP;          end
      OPC_JMP_LINK:   begin f = FMT_0; o = OP_JMP_LINK;     end
      OPC_JMP_REG:    begin f = FMT_1; o = OP_JMP_REG;      ill = (instr[17:16] != 2'b00); end
      OPC_JMP_REG_LK: begin f = FMT_1; o = OP_JMP_REG_LINK; ill = (instr[17:16] != 2'b00); end
      OPC_LOADI_Z:    begin f = FMT_1; o = OP_LOADI_Z;      end
      OPC_LOADI_K:    begin f = FMT_1; o = OP_LOADI_K;      end
      OPC_TRAP:       begin f = FMT_0; o = OP_TRAP;         end
      OPC_CMP: begin
        f = FMT_5A; o = OP_CMP;
        ill = (instr[3:0] > 4'd9) ||
              !(instr[12:10] inside {CMP_NORMAL, CMP_W0, CMP_W1});
      end
      OPC_CMPI: begin
        f = FMT_5B; o = OP_CMPI;
        ill = (instr[3:0] > 4'd9);
      end
      OPC_TESTBIT:    begin f = FMT_5B; o = OP_TESTBIT;     end
      OPC_CHANGEPR:   begin f = FMT_5B; o = OP_CHANGEPR;    end
      OPC_CHANGEPR_L: begin f = FMT_5B; o = OP_CHANGEPR_LD; end
      6'h10: begin f = FMT_4A; o = OP_LDX4;  end
      6'h11: begin f = FMT_4A; o = OP_LDX8;  end
      6'h12: begin f = FMT_2;  o = OP_LD4;   end
      6'h13: begin f = FMT_2;  o = OP_LD8;   end
      6'h14: begin f = FMT_4A; o = OP_LDX4U; end
      6'h15: begin f = FMT_4A; o = OP_LDX8U; end
      6'h16: begin f = FMT_2;  o = OP_LD4U;  end
      6'h17: begin f = FMT_2;  o = OP_LD8U;  end
      6'h18: begin f = FMT_2;  o = OP_ST1;   end
      6'h19: begin f = FMT_2;  o = OP_ST2;   end
      6'h1A: begin f = FMT_2;  o = OP_ST4;   end
      6'h1B: begin f = FMT_2;  o = OP_ST8;   end
      6'h1C: begin f = FMT_2;  o = OP_ST1U;  end
      6'h1D: begin f = FMT_2;  o = OP_ST2U;  end
      6'h1E: begin f = FMT_2;  o = OP_ST4U;  end
      6'h1F: begin f = FMT_2;  o = OP_ST8U;  end
      OPC_ADDI:    begin f = FMT_2;  o = OP_ADDI;    end
      OPC_SUBI:    begin f = FMT_2;  o = OP_SUBI;    end
      OPC_ANDI:    begin f = FMT_2;  o = OP_ANDI;    end
      OPC_ORI:     begin f = FMT_2;  o = OP_ORI;     end
      OPC_XORI:    begin f = FMT_2;  o = OP_XORI;    end
      OPC_SLLI:    begin f = FMT_2;  o = OP_SLLI;    end
      OPC_SRAI:    begin f = FMT_2;  o = OP_SRAI;    end
      OPC_SRLI:    begin f = FMT_2;  o = OP_SRLI;    end
      OPC_DEPOSIT: begin f = FMT_3;  o = OP_DEPOSIT; end
      OPC_EXTRACT: begin f = FMT_3;  o = OP_EXTRACT; end
      OPC_SHRP:    begin f = FMT_4C; o = OP_SHRP;    end
      OPC_PALU:    begin f = FMT_4A; o = OP_PALU;    end
      OPC_PMUL:    begin f = FMT_4A; o = OP_PMUL;    end
      OPC_PSHIFT: begin
        f = FMT_4A;
        unique case (sub_hi)
          6'h00: o = OP_PSHIFT_L;
          6'h01: o = OP_PSHIFT_RA;
          6'h02: o = OP_PSHIFT_R;
          6'h10: o = OP_MIX_L;
          6'h11: o = OP_MIX_R;
          6'h20: o = OP_PERM;
          default: ill = 1'b1;
        endcase
        // Shifts exist for 2-, 4- and 8-byte subwords, mixes for 1, 2 and 4.
        if (sub_hi inside {6'h00, 6'h01, 6'h02} && ss == SS_1) ill = 1'b1;
        if (sub_hi inside {6'h10, 6'h11} && ss == SS_8) ill = 1'b1;
      end
      OPC_PSHIFTI: begin
        f = FMT_4B;
        unique case (sub_hi)
          6'h00: o = OP_PSHIFTI_L;
          6'h01: o = OP_PSHIFTI_RA;
          6'h02: o = OP_PSHIFTI_R;
          6'h08: o = OP_MUX_REV;
          6'h09: o = OP_MUX_MIX;
          6'h0A: o = OP_MUX_SHUF;
          6'h0B: o = OP_MUX_ALT;
          6'h0C: o = OP_MUX_BRCST;
          6'h0D: o = OP_MUX_BRCST;
          default: ill = 1'b1;
        endcase
        if (sub_hi inside {6'h00, 6'h01, 6'h02} && ss == SS_1) ill = 1'b1;
        if (sub_hi inside {6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C} && ss != SS_1) ill = 1'b1;
        if (sub_hi == 6'h0D && ss != SS_2) ill = 1'b1;
      end
      default: ill = 1'b1;   // unassigned or reserved opcode
    endcase

    if (ill) o = OP_ILLEGAL;

    dec         = '0;
    dec.pred    = instr[31:29];
    dec.opcode  = opc;
    dec.fmt     = f;
    dec.op      = o;
    dec.illegal = ill;

    unique case (f)
      FMT_0: dec.imm23 = instr[22:0];
      FMT_1: begin
        dec.ra    = instr[22:18];
        dec.pos   = instr[17:16];
        dec.imm16 = instr[15:0];
      end
      FMT_2: begin
        dec.ra    = instr[22:18];
        dec.rb    = instr[17:13];
        dec.imm13 = instr[12:0];
      end
      FMT_3: begin
        dec.ra   = instr[22:18];
        dec.rb   = instr[17:13];
        dec.imm7 = instr[12:6];
        dec.imm6 = instr[5:0];
      end
      FMT_4A: begin
        dec.ra    = instr[22:18];
        dec.rb    = instr[17:13];
        dec.rc    = instr[12:8];
        dec.subop = instr[7:0];
        dec.ss    = instr[1:0];
      end
      FMT_4B: begin
        dec.ra    = instr[22:18];
        dec.rb    = instr[17:13];
        dec.imm5  = instr[12:8];
        dec.subop = instr[7:0];
        dec.ss    = instr[1:0];
      end
      FMT_4C: begin
        dec.ra   = instr[22:18];
        dec.rb   = instr[17:13];
        dec.rc   = instr[12:8];
        dec.imm8 = instr[7:0];
      end
      FMT_5A: begin
        dec.ra     = instr[22:18];
        dec.rb     = instr[17:13];
        dec.subop3 = instr[12:10];
        dec.p1     = instr[9:7];
        dec.p2     = instr[6:4];
        dec.imm4   = instr[3:0];
      end
      FMT_5B: begin
        dec.ra   = instr[22:18];
        dec.imm8 = instr[17:10];
        dec.p1   = instr[9:7];
        dec.p2   = instr[6:4];
        dec.imm4 = instr[3:0];
      end
      default: ;
    endcase
  end

endmodule
