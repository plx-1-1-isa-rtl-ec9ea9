// tb_plx_scalar_unit: self-checking test of the PLX scalar operations.
//
// Drives random operands and immediates for addi, subi, andi, ori, xori,
// slli, srai, srli, loadi.z/.k at all four positions and shrp, plus edge
// values (shift amounts 0, 63, 64 and above, negative immediates), and
// compares with a reference written here bit by bit. Also checks that
// `handled` is low for an operation the unit does not execute.
module tb_plx_scalar_unit;
  import plx_pkg::*;

  op_e         op;
  word_t       rd_old, rs1, rs2, result;
  logic [12:0] imm13;
  logic [15:0] imm16;
  logic [1:0]  pos;
  logic [7:0]  imm8;
  logic        handled;
  int          checks = 0, failures = 0;
  logic        clk = 0;

  plx_scalar_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rnd64();
    return {$urandom, $urandom};
  endfunction

  // Reference model, bit by bit.
  function automatic word_t ref_model(op_e o);
    word_t r, immx;
    longint signed s;
    int    sh;
    r = '0;
    case (o)
      OP_ADDI, OP_SUBI: begin
        s = longint'($signed(imm13));           // sign extension
        r = (o == OP_ADDI) ? word_t'(longint'(rs1) + s) : word_t'(longint'(rs1) - s);
      end
      OP_ANDI, OP_ORI, OP_XORI: begin
        immx = 0;
        for (int i = 0; i < 13; i++) immx[i] = imm13[i];
        for (int i = 0; i < 64; i++)
          r[i] = (o == OP_ANDI) ? (rs1[i] & immx[i]) :
                 (o == OP_ORI)  ? (rs1[i] | immx[i]) : (rs1[i] ^ immx[i]);
      end
      OP_SLLI, OP_SRAI, OP_SRLI: begin
        sh = int'(imm13);
        for (int i = 0; i < 64; i++) begin
          if (o == OP_SLLI) r[i] = (i - sh >= 0) ? rs1[i - sh] : 1'b0;
          else if (o == OP_SRLI) r[i] = (i + sh < 64) ? rs1[i + sh] : 1'b0;
          else r[i] = (i + sh < 64) ? rs1[i + sh] : rs1[63];
        end
      end
      OP_LOADI_Z, OP_LOADI_K: begin
        for (int i = 0; i < 64; i++) begin
          if (i / 16 == int'(pos)) r[i] = imm16[i % 16];
          else if (i / 16 < int'(pos)) r[i] = rd_old[i];
          else r[i] = (o == OP_LOADI_K) ? rd_old[i] : 1'b0;
        end
      end
      OP_SHRP: begin
        for (int i = 0; i < 64; i++) begin
          sh = i + int'(imm8);
          r[i] = (sh < 64) ? rs2[sh] : (sh < 128) ? rs1[sh - 64] : 1'b0;
        end
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  op_e ops [11] = '{OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRAI,
                    OP_SRLI, OP_LOADI_Z, OP_LOADI_K, OP_SHRP};

  task automatic run_one(op_e o);
    word_t exp;
    op = o; #1;
    exp = ref_model(o);
    checks++;
    if (!handled || result !== exp) begin
      failures++;
      $display("FAIL %s: rs1=%h rs2=%h rd=%h imm13=%h imm16=%h pos=%0d imm8=%0d got %h exp %h",
               o.name(), rs1, rs2, rd_old, imm13, imm16, pos, imm8, result, exp);
    end
  endtask

  initial begin
    op = OP_ADDI; rd_old = '0; rs1 = '0; rs2 = '0; imm13 = '0; imm16 = '0; pos = '0; imm8 = '0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      rd_old = rnd64(); rs1 = rnd64(); rs2 = rnd64();
      imm13  = 13'($urandom);
      imm16  = 16'($urandom);
      pos    = 2'($urandom);
      imm8   = 8'($urandom);
      // Keep shift amounts mostly in range, with some out of range.
      if (n % 4 != 0) imm13 = 13'($urandom_range(63));
      if (n % 4 != 0) imm8  = 8'($urandom_range(127));
      foreach (ops[k]) run_one(ops[k]);
      if (n % 64 == 0) @(posedge clk);
    end
    // Edge cases.
    rs1 = 64'h8000_0000_0000_0001; rs2 = 64'hFFFF_0000_1234_5678;
    foreach (ops[k]) begin
      for (int a = 0; a < 4; a++) begin
        imm13 = (a == 0) ? 13'd0 : (a == 1) ? 13'd63 : (a == 2) ? 13'd64 : 13'h1FFF;
        imm8  = (a == 0) ? 8'd0  : (a == 1) ? 8'd64  : (a == 2) ? 8'd127 : 8'd255;
        pos   = 2'(a);
        run_one(ops[k]);
      end
    end
    // Operation not handled here.
    op = OP_CMP; #1;
    checks++;
    if (handled || result != '0) begin failures++; $display("FAIL handled for cmp"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
