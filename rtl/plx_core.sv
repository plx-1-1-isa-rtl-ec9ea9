// plx_core: PLX 1.1 decode-and-execute core for the register-to-register part
// of the instruction set.
//
// Each cycle in which instr_valid is high, one 32-bit instruction is decoded
// (plx_decoder), its register fields are read from the 32 x 64-bit register
// file (plx_regfile) and its guarding predicate from the predicate file
// (plx_predfile). If the guard is 0 the instruction is squashed: it changes
// nothing. Otherwise:
//   - addi, subi, andi, ori, xori, slli, srai, srli, loadi.z/.k and shrp are
//     computed by plx_scalar_unit and written to Rd;
//   - pshift and pshifti are computed by plx_pshift and written to Rd;
//   - cmp and cmpi are evaluated by plx_compare and update P1/P2;
//   - every other legal instruction (jumps, trap, loads and stores, testbit,
//     changepr, deposit, extract, packed ALU and multiply, mix, mux, perm) is
//     presented on the offload port with its decoded fields and register
//     operands, for a unit outside this core;
//   - an unassigned or reserved encoding raises illegal and changes nothing.
//
// Which instructions exist, their formats and fields follow the PLX 1.1
// encoding. Guarding every instruction by the predicate named in bits 31:29,
// the one-instruction-per-cycle organisation, the offload port and the
// operand roles of the register fields (first field = Rd, or Rs1 for
// compares; second = Rs1, or Rs2 for compares; third = Rs2) are this design's
// own.
//
// Interface: clk, rst_n (active low, asynchronous); instr_valid/instr in;
// status outputs executed, squashed, illegal, offload (all for the current
// instruction, combinational); off_dec/off_ra/off_rb/off_rc carry the
// offloaded instruction; dbg_raddr -> dbg_rdata and preds observe state.
// Timing: results are written on the rising edge that ends the cycle in which
// the instruction is presented and are readable in the next cycle, so a
// dependent instruction can follow immediately.
module plx_core
  import plx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  logic [31:0] instr,
  output logic        executed,
  output logic        squashed,
  output logic        illegal,
  output logic        offload,
  output dec_t        off_dec,
  output word_t       off_ra,
  output word_t       off_rb,
  output word_t       off_rc,
  input  reg_idx_t    dbg_raddr,
  output word_t       dbg_rdata,
  output logic [NPREDS-1:0] preds
);

  dec_t  dec;
  word_t va, vb, vc;
  logic  guard;

  plx_decoder u_dec (.instr(instr), .dec(dec));

  // Results
  word_t scalar_res, psh_res;
  logic  scalar_ok;
  logic  is_psh, is_cmp;
  psh_e  psh_kind;

  logic  p1_we, p1_val, p2_we, p2_val;
  logic  rf_we, go;
  word_t rf_wdata;

  plx_regfile u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .raddr_a (dec.ra),
    .raddr_b (dec.rb),
    .raddr_c (dec.rc),
    .raddr_d (dbg_raddr),
    .rdata_a (va),
    .rdata_b (vb),
    .rdata_c (vc),
    .rdata_d (dbg_rdata),
    .we      (rf_we),
    .waddr   (dec.ra),
    .wdata   (rf_wdata)
  );

  plx_predfile u_pf (
    .clk       (clk),
    .rst_n     (rst_n),
    .raddr     (dec.pred),
    .rdata     (guard),
    .all_preds (preds),
    .we1       (go && is_cmp && p1_we),
    .waddr1    (dec.p1),
    .wdata1    (p1_val),
    .we2       (go && is_cmp && p2_we),
    .waddr2    (dec.p2),
    .wdata2    (p2_val)
  );

  plx_scalar_unit u_scalar (
    .op      (dec.op),
    .rd_old  (va),
    .rs1     (vb),
    .rs2     (vc),
    .imm13   (dec.imm13),
    .imm16   (dec.imm16),
    .pos     (dec.pos),
    .imm8    (dec.imm8),
    .result  (scalar_res),
    .handled (scalar_ok)
  );

  always_comb begin
    is_psh   = 1'b1;
    psh_kind = PSH_L;
    unique case (dec.op)
      OP_PSHIFT_L,  OP_PSHIFTI_L:  psh_kind = PSH_L;
      OP_PSHIFT_RA, OP_PSHIFTI_RA: psh_kind = PSH_RA;
      OP_PSHIFT_R,  OP_PSHIFTI_R:  psh_kind = PSH_R;
      default:                     is_psh   = 1'b0;
    endcase
  end

  plx_pshift u_psh (
    .kind   (psh_kind),
    .ss     (dec.ss),
    .src    (vb),
    .amount ((dec.opcode == OPC_PSHIFTI) ? {1'b0, dec.imm5} : vc[5:0]),
    .result (psh_res)
  );

  assign is_cmp = (dec.op == OP_CMP) || (dec.op == OP_CMPI);

  plx_compare u_cmp (
    .rs1     (va),
    .rs2     (vb),
    .imm8    (dec.imm8),
    .use_imm (dec.op == OP_CMPI),
    .rel     (dec.imm4),
    .mode    (dec.subop3),
    .cond    (),
    .p1_we   (p1_we),
    .p1_val  (p1_val),
    .p2_we   (p2_we),
    .p2_val  (p2_val)
  );

  // Status of the current instruction
  assign illegal  = instr_valid && dec.illegal;
  assign go       = instr_valid && !dec.illegal && guard;
  assign squashed = instr_valid && !dec.illegal && !guard;
  assign executed = go && (scalar_ok || is_psh || is_cmp);
  assign offload  = go && !(scalar_ok || is_psh || is_cmp);

  assign rf_we    = go && (scalar_ok || is_psh);
  assign rf_wdata = is_psh ? psh_res : scalar_res;

  assign off_dec = dec;
  assign off_ra  = va;
  assign off_rb  = vb;
  assign off_rc  = vc;

  // At most one of the four outcomes per presented instruction.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid |-> $onehot({executed, squashed, illegal, offload}));

endmodule
