// plx_compare: PLX 1.1 compare unit (cmp and cmpi).
//
// Compares Rs1 with Rs2 (cmp, format 5a) or with the 8-bit immediate (cmpi,
// format 5b) under one of ten relations: eq, ne, lt, le, gt, ge signed and
// lt, le, gt, ge unsigned, coded 0..9 in bits 3:0. It then says what to write
// into the two target predicates P1 and P2:
//   normal (cmp subop 000, and every cmpi): P1 = cond, P2 = !cond;
//   .w0 (subop 100, "parallel write zero"): if cond is false both P1 and P2
//        are written 0, otherwise neither is written;
//   .w1 (subop 101, "parallel write one"): if cond is true both are written 1,
//        otherwise neither is written.
// The relations, their codes and the three cmp forms follow the PLX 1.1
// encoding. What P1 and P2 receive in each form, and how the 8-bit immediate
// is widened (sign-extended for eq, ne and the signed relations, zero-extended
// for the unsigned ones), are this design's reading of the form names.
//
// Interface: operands, relation and form in; cond and the two predicate write
// enables and values out. Timing: combinational.
module plx_compare
  import plx_pkg::*;
(
  input  word_t       rs1,
  input  word_t       rs2,
  input  logic [7:0]  imm8,
  input  logic        use_imm,   // 1 for cmpi
  input  logic [3:0]  rel,
  input  logic [2:0]  mode,      // cmp subop; ignored when use_imm
  output logic        cond,
  output logic        p1_we,
  output logic        p1_val,
  output logic        p2_we,
  output logic        p2_val
);

  word_t b;
  logic  eq, lts, ltu;

  always_comb begin
    if (!use_imm)
      b = rs2;
    else if (rel inside {REL_LTU, REL_LEU, REL_GTU, REL_GEU})
      b = {{(XLEN-8){1'b0}}, imm8};
    else
      b = {{(XLEN-8){imm8[7]}}, imm8};
  end

  assign eq  = (rs1 == b);
  assign lts = ($signed(rs1) < $signed(b));
  assign ltu = (rs1 < b);

  always_comb begin
    unique case (rel)
      REL_EQ:  cond = eq;
      REL_NE:  cond = !eq;
      REL_LT:  cond = lts;
      REL_LE:  cond = lts || eq;
      REL_GT:  cond = !(lts || eq);
      REL_GE:  cond = !lts;
      REL_LTU: cond = ltu;
      REL_LEU: cond = ltu || eq;
      REL_GTU: cond = !(ltu || eq);
      REL_GEU: cond = !ltu;
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    p1_we = 1'b0; p1_val = 1'b0;
    p2_we = 1'b0; p2_val = 1'b0;
    if (use_imm || mode == CMP_NORMAL) begin
      p1_we = 1'b1; p1_val = cond;
      p2_we = 1'b1; p2_val = !cond;
    end else if (mode == CMP_W0) begin
      p1_we = !cond; p2_we = !cond;
    end else if (mode == CMP_W1) begin
      p1_we = cond;  p1_val = 1'b1;
      p2_we = cond;  p2_val = 1'b1;
    end
  end

endmodule
