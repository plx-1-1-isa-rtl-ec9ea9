// tb_plx_decoder: self-checking test of the PLX 1.1 instruction decoder.
//
// For every one of the 64 major opcodes it builds random instructions, with
// the sub-fields that must be legal chosen from the legal codes, and checks
// the decoded format and legality against a per-opcode table, and every field
// of that format against bit slices taken here from the word. It then checks
// the operation named for a list of specific mnemonics and that reserved
// sub-encodings are flagged illegal. The decoder is combinational; a small
// clock only paces the test and drives the watchdog.
module tb_plx_decoder;
  import plx_pkg::*;

  logic [31:0] instr;
  dec_t        dec;
  int          checks = 0, failures = 0;
  logic        clk = 0;

  plx_decoder dut (.instr(instr), .dec(dec));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Format of each major opcode, "--" where unassigned or reserved.
  string fmt_tab [64] = '{
    "0 ","0 ","1 ","1 ","1 ","1 ","--","0 ","5a","5b","5b","5b","5b","--","--","--",
    "4a","4a","2 ","2 ","4a","4a","2 ","2 ","2 ","2 ","2 ","2 ","2 ","2 ","2 ","2 ",
    "2 ","2 ","2 ","2 ","2 ","2 ","2 ","2 ","3 ","3 ","4c","--","--","--","--","--",
    "4a","4a","4a","4b","--","--","--","--","--","--","--","--","--","--","--","--"};

  function automatic string fmt_name(fmt_e f);
    case (f)
      FMT_0: return "0 ";  FMT_1: return "1 ";  FMT_2: return "2 ";
      FMT_3: return "3 ";  FMT_4A: return "4a"; FMT_4B: return "4b";
      FMT_4C: return "4c"; FMT_5A: return "5a"; FMT_5B: return "5b";
      default: return "--";
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: instr=%08h", what, instr);
    end
  endtask

  function automatic logic [31:0] bits(logic [31:0] w, int hi, int lo);
    return (w >> lo) & ((32'd1 << (hi - lo + 1)) - 1);
  endfunction

  // Random word for opcode opc whose sub-fields are legal.
  function automatic logic [31:0] legal_word(int opc);
    logic [31:0] w;
    w = $urandom;
    w[28:23] = 6'(opc);
    case (opc)
      'h02, 'h03: w[17:16] = 2'b00;
      'h08: begin
        w[3:0] = 4'($urandom_range(9));
        case ($urandom_range(2)) 0: w[12:10] = 3'b000; 1: w[12:10] = 3'b100; default: w[12:10] = 3'b101; endcase
      end
      'h09: w[3:0] = 4'($urandom_range(9));
      'h32: begin
        case ($urandom_range(2))
          0: begin w[7:2] = 6'($urandom_range(2)); w[1:0] = 2'($urandom_range(3, 1)); end
          1: begin w[7:2] = 6'h10 + 6'($urandom_range(1)); w[1:0] = 2'($urandom_range(2)); end
          default: w[7:2] = 6'h20;
        endcase
      end
      'h33: begin
        case ($urandom_range(2))
          0: begin w[7:2] = 6'($urandom_range(2)); w[1:0] = 2'($urandom_range(3, 1)); end
          1: begin w[7:2] = 6'h08 + 6'($urandom_range(4)); w[1:0] = 2'b00; end
          default: begin w[7:2] = 6'h0D; w[1:0] = 2'b01; end
        endcase
      end
      default: ;
    endcase
    return w;
  endfunction

  task automatic check_fields();
    string f;
    f = fmt_tab[instr[28:23]];
    check(dec.pred == bits(instr, 31, 29), "pred");
    check(dec.opcode == bits(instr, 28, 23), "opcode");
    if (f == "0 ") check(dec.imm23 == bits(instr, 22, 0), "imm23");
    if (f == "1 ") check(dec.ra == bits(instr, 22, 18) && dec.pos == bits(instr, 17, 16) &&
                         dec.imm16 == bits(instr, 15, 0), "fmt1 fields");
    if (f == "2 ") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.imm13 == bits(instr, 12, 0), "fmt2 fields");
    if (f == "3 ") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.imm7 == bits(instr, 12, 6) && dec.imm6 == bits(instr, 5, 0), "fmt3 fields");
    if (f == "4a") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.rc == bits(instr, 12, 8) && dec.subop == bits(instr, 7, 0) &&
                         dec.ss == bits(instr, 1, 0), "fmt4a fields");
    if (f == "4b") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.imm5 == bits(instr, 12, 8) && dec.subop == bits(instr, 7, 0) &&
                         dec.ss == bits(instr, 1, 0), "fmt4b fields");
    if (f == "4c") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.rc == bits(instr, 12, 8) && dec.imm8 == bits(instr, 7, 0), "fmt4c fields");
    if (f == "5a") check(dec.ra == bits(instr, 22, 18) && dec.rb == bits(instr, 17, 13) &&
                         dec.subop3 == bits(instr, 12, 10) && dec.p1 == bits(instr, 9, 7) &&
                         dec.p2 == bits(instr, 6, 4) && dec.imm4 == bits(instr, 3, 0), "fmt5a fields");
    if (f == "5b") check(dec.ra == bits(instr, 22, 18) && dec.imm8 == bits(instr, 17, 10) &&
                         dec.p1 == bits(instr, 9, 7) && dec.p2 == bits(instr, 6, 4) &&
                         dec.imm4 == bits(instr, 3, 0), "fmt5b fields");
  endtask

  // Build an instruction from opcode and low 23 bits, predicate 0.
  function automatic logic [31:0] mk(int opc, logic [22:0] low);
    return {3'b000, 6'(opc), low};
  endfunction

  task automatic expect_op(logic [31:0] w, op_e o, string name);
    instr = w; #1;
    check(dec.op == o && !dec.illegal, name);
  endtask

  task automatic expect_illegal(logic [31:0] w, string name);
    instr = w; #1;
    check(dec.illegal && dec.op == OP_ILLEGAL, name);
  endtask

  initial begin
    instr = '0;
    @(posedge clk);
    // Format, legality and fields for every opcode.
    for (int opc = 0; opc < 64; opc++) begin
      repeat (40) begin
        instr = legal_word(opc);
        #1;
        check(fmt_name(dec.fmt) == fmt_tab[opc], $sformatf("format of opcode %02h", opc));
        check(dec.illegal == (fmt_tab[opc] == "--"), $sformatf("legality of opcode %02h", opc));
        if (fmt_tab[opc] != "--") check_fields();
      end
      @(posedge clk);
    end

    // Named operations (register and immediate fields arbitrary).
    expect_op(mk('h00, 23'h12345), OP_JMP, "jmp");
    expect_op(mk('h01, 23'h12345), OP_JMP_LINK, "jmp.link");
    expect_op(mk('h03, {5'd3, 2'b00, 16'h1}), OP_JMP_REG_LINK, "jmp.reg.link");
    expect_op(mk('h04, {5'd3, 2'b10, 16'h1}), OP_LOADI_Z, "loadi.z.2");
    expect_op(mk('h05, {5'd3, 2'b11, 16'h1}), OP_LOADI_K, "loadi.k.3");
    expect_op(mk('h07, 23'h1), OP_TRAP, "trap");
    expect_op(mk('h08, {5'd1, 5'd2, 3'b101, 3'd1, 3'd2, 4'd9}), OP_CMP, "cmp.geu.w1");
    expect_op(mk('h09, {5'd1, 8'hF0, 3'd1, 3'd2, 4'd3}), OP_CMPI, "cmpi.le");
    expect_op(mk('h0A, 23'h0), OP_TESTBIT, "testbit");
    expect_op(mk('h0C, 23'h0), OP_CHANGEPR_LD, "changepr.ld");
    expect_op(mk('h11, 23'h0), OP_LDX8, "load indexed 8 byte");
    expect_op(mk('h15, 23'h0), OP_LDX8U, "load indexed 8 byte update");
    expect_op(mk('h16, 23'h0), OP_LD4U, "load 4 byte update");
    expect_op(mk('h19, 23'h0), OP_ST2, "store 2 byte");
    expect_op(mk('h1F, 23'h0), OP_ST8U, "store 8 byte update");
    expect_op(mk('h20, 23'h0), OP_ADDI, "addi");
    expect_op(mk('h26, 23'h0), OP_SRAI, "srai");
    expect_op(mk('h27, 23'h0), OP_SRLI, "srl");
    expect_op(mk('h28, 23'h0), OP_DEPOSIT, "deposit");
    expect_op(mk('h29, 23'h0), OP_EXTRACT, "extract");
    expect_op(mk('h2A, 23'h0), OP_SHRP, "shrp");
    expect_op(mk('h30, 23'h0), OP_PALU, "packed alu");
    expect_op(mk('h31, 23'h0), OP_PMUL, "packed multiply");
    expect_op(mk('h32, {15'h0, 6'h00, 2'b01}), OP_PSHIFT_L, "pshift.2.l");
    expect_op(mk('h32, {15'h0, 6'h01, 2'b11}), OP_PSHIFT_RA, "pshift.8.ra");
    expect_op(mk('h32, {15'h0, 6'h02, 2'b10}), OP_PSHIFT_R, "pshift.4.r");
    expect_op(mk('h32, {15'h0, 6'h10, 2'b00}), OP_MIX_L, "mix.1.l");
    expect_op(mk('h32, {15'h0, 6'h11, 2'b10}), OP_MIX_R, "mix.4.r");
    expect_op(mk('h32, {15'h0, 6'h20, 2'b00}), OP_PERM, "perm");
    expect_op(mk('h33, {10'h0, 5'd7, 6'h00, 2'b11}), OP_PSHIFTI_L, "pshifti.8.l");
    expect_op(mk('h33, {10'h0, 5'd7, 6'h01, 2'b01}), OP_PSHIFTI_RA, "pshifti.2.ra");
    expect_op(mk('h33, {10'h0, 5'd7, 6'h02, 2'b10}), OP_PSHIFTI_R, "pshifti.4.r");
    expect_op(mk('h33, 23'b0000000000_00000_001000_00), OP_MUX_REV, "mux.1.rev");
    expect_op(mk('h33, 23'b0000000000_00000_001001_00), OP_MUX_MIX, "mux.1.mix");
    expect_op(mk('h33, 23'b0000000000_00000_001010_00), OP_MUX_SHUF, "mux.1.shuf");
    expect_op(mk('h33, 23'b0000000000_00000_001011_00), OP_MUX_ALT, "mux.1.alt");
    expect_op(mk('h33, 23'b0000000000_00000_001100_00), OP_MUX_BRCST, "mux.1.brcst");
    expect_op(mk('h33, 23'b0000000000_00000_001101_01), OP_MUX_BRCST, "mux.2.brcst");

    // Reserved sub-encodings.
    expect_illegal(mk('h08, {5'd1, 5'd2, 3'b000, 3'd1, 3'd2, 4'd10}), "cmp relation 10");
    expect_illegal(mk('h08, {5'd1, 5'd2, 3'b001, 3'd1, 3'd2, 4'd0}), "cmp subop 001");
    expect_illegal(mk('h08, {5'd1, 5'd2, 3'b110, 3'd1, 3'd2, 4'd0}), "cmp subop 110");
    expect_illegal(mk('h09, {5'd1, 8'h0, 3'd1, 3'd2, 4'd15}), "cmpi relation 15");
    expect_illegal(mk('h02, {5'd1, 2'b01, 16'h0}), "jmp.reg bits 17:16");
    expect_illegal(mk('h32, {15'h0, 6'h00, 2'b00}), "pshift 1-byte");
    expect_illegal(mk('h32, {15'h0, 6'h10, 2'b11}), "mix 8-byte");
    expect_illegal(mk('h32, {15'h0, 6'h03, 2'b01}), "opcode 32 subop 03");
    expect_illegal(mk('h33, {15'h0, 6'h08, 2'b01}), "mux.2.rev (reserved)");
    expect_illegal(mk('h33, {15'h0, 6'h0C, 2'b01}), "mux.1.brcst with 2-byte size");
    expect_illegal(mk('h33, {15'h0, 6'h0E, 2'b00}), "opcode 33 subop 0E");
    expect_illegal(mk('h0D, 23'h0), "reserved cmpi.rel.w0");
    expect_illegal(mk('h0E, 23'h0), "reserved cmpi.rel.w1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
