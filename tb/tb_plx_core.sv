// tb_plx_core: end-to-end, self-checking test of the PLX decode-and-execute
// core at its default (full) size.
//
// The test assembles instructions with its own encoder functions, runs them
// through the core one per cycle, and keeps an instruction-level reference
// model of the 32 registers and 8 predicates. After every instruction it
// compares the core's outcome flags (executed, squashed, illegal, offload),
// the whole register file (through the observation port) and all predicates
// with the model; for offloaded instructions it also checks the decoded
// opcode and operand values on the offload port.
//
// Part 1 is a directed program: it builds a 64-bit constant with loadi.z and
// three loadi.k, runs a dependent chain of immediate operations, sets
// predicates with cmp/cmpi and uses them to guard later instructions, and
// exercises the .w0 and .w1 compare forms. Part 2 is a random stream over all
// formats. Every mechanism the core has is counted (each executed operation
// group, squash by a false guard, offload, illegal encoding, parallel compare
// writes that fire and that do not, back-to-back dependent instructions, each
// subword size) and a mechanism that never occurred counts as a failure.
module tb_plx_core;
  import plx_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        instr_valid;
  logic [31:0] instr;
  logic        executed, squashed, illegal, offload;
  dec_t        off_dec;
  word_t       off_ra, off_rb, off_rc, dbg_rdata;
  reg_idx_t    dbg_raddr;
  logic [7:0]  preds;

  int checks = 0, failures = 0;

  plx_core dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- encoder
  function automatic logic [31:0] f1(int p, int opc, int r, int pos, int imm);
    return {3'(p), 6'(opc), 5'(r), 2'(pos), 16'(imm)};
  endfunction
  function automatic logic [31:0] f2(int p, int opc, int rd, int rs, int imm);
    return {3'(p), 6'(opc), 5'(rd), 5'(rs), 13'(imm)};
  endfunction
  function automatic logic [31:0] f4a(int p, int opc, int rd, int rs1, int rs2, int sub, int ss);
    return {3'(p), 6'(opc), 5'(rd), 5'(rs1), 5'(rs2), 6'(sub), 2'(ss)};
  endfunction
  function automatic logic [31:0] f4b(int p, int rd, int rs1, int imm5, int sub, int ss);
    return {3'(p), 6'h33, 5'(rd), 5'(rs1), 5'(imm5), 6'(sub), 2'(ss)};
  endfunction
  function automatic logic [31:0] f4c(int p, int rd, int rs1, int rs2, int imm8);
    return {3'(p), 6'h2A, 5'(rd), 5'(rs1), 5'(rs2), 8'(imm8)};
  endfunction
  function automatic logic [31:0] f5a(int p, int rs1, int rs2, int mode, int p1, int p2, int rel);
    return {3'(p), 6'h08, 5'(rs1), 5'(rs2), 3'(mode), 3'(p1), 3'(p2), 4'(rel)};
  endfunction
  function automatic logic [31:0] f5b(int p, int rs1, int imm8, int p1, int p2, int rel);
    return {3'(p), 6'h09, 5'(rs1), 8'(imm8), 3'(p1), 3'(p2), 4'(rel)};
  endfunction

  // ---------------------------------------------------------- reference model
  word_t      m_r [32];
  logic [7:0] m_p;
  typedef enum int { K_EXEC, K_SQUASH, K_ILLEGAL, K_OFFLOAD } kind_t;

  // Mechanism counters.
  int n_scalar, n_loadi_z, n_loadi_k, n_shrp, n_psh2, n_psh4, n_psh8, n_pshi;
  int n_cmp, n_cmpi, n_w0_fire, n_w0_hold, n_w1_fire, n_w1_hold;
  int n_squash, n_offload, n_illegal, n_raw;
  logic [4:0] last_rd;
  logic       last_wrote;

  function automatic logic rel_true(word_t a, word_t b, int rel);
    logic signed [64:0] sa, sb;
    sa = {a[63], a}; sb = {b[63], b};
    case (rel)
      0: return a == b;       1: return a != b;
      2: return sa < sb;      3: return sa <= sb;
      4: return sa > sb;      5: return sa >= sb;
      6: return a < b;        7: return a <= b;
      8: return a > b;        default: return a >= b;
    endcase
  endfunction

  function automatic word_t lane_shift(word_t s, int bytes, int kind, int amt);
    word_t r;
    int w;
    w = bytes * 8;
    r = '0;
    for (int l = 0; l < 64 / w; l++) begin
      logic [63:0] lane, o;
      lane = (s >> (l * w)) & ((w == 64) ? '1 : ((64'd1 << w) - 1));
      if (kind == 1 && lane[w-1]) lane |= (w == 64) ? 64'd0 : ~((64'd1 << w) - 1);  // sign-extend lane
      if (amt >= w) o = (kind == 1 && lane[63]) ? '1 : '0;
      else if (kind == 0) o = lane << amt;
      else if (kind == 1) o = word_t'($signed(lane) >>> amt);
      else o = lane >> amt;
      o &= (w == 64) ? '1 : ((64'd1 << w) - 1);
      for (int b = 0; b < w; b++) r[l*w + b] = o[b];
    end
    return r;
  endfunction

  // Executes one instruction on the model; returns its expected outcome.
  function automatic kind_t model(logic [31:0] w, output logic wrote, output logic [4:0] rd);
    int opc, g, a, b, c, sub, ss, rel, mode, p1, p2;
    word_t va, vb, vc, res;
    logic cnd;
    opc = int'(w[28:23]); g = int'(w[31:29]);
    a = int'(w[22:18]); b = int'(w[17:13]); c = int'(w[12:8]);
    va = m_r[a]; vb = m_r[b]; vc = m_r[c];
    sub = int'(w[7:2]); ss = int'(w[1:0]);
    wrote = 0; rd = 5'(a);
    // Legality (independent listing of the assigned encodings).
    if (opc inside {'h06, 'h0D, 'h0E, 'h0F} || (opc >= 'h2B && opc <= 'h2F) || opc >= 'h34)
      return K_ILLEGAL;
    if (opc == 'h08 && (w[3:0] > 9 || !(w[12:10] inside {3'b000, 3'b100, 3'b101}))) return K_ILLEGAL;
    if (opc == 'h09 && w[3:0] > 9) return K_ILLEGAL;
    if (opc inside {'h02, 'h03} && w[17:16] != 0) return K_ILLEGAL;
    if (opc == 'h32 && !((sub <= 2 && ss != 0) || (sub inside {'h10, 'h11} && ss != 3) || sub == 'h20))
      return K_ILLEGAL;
    if (opc == 'h33 && !((sub <= 2 && ss != 0) || (sub >= 8 && sub <= 'hC && ss == 0) || (sub == 'hD && ss == 1)))
      return K_ILLEGAL;
    if (!m_p[g]) return K_SQUASH;
    case (opc)
      'h20: res = vb + word_t'(signed'(w[12:0]));
      'h21: res = vb - word_t'(signed'(w[12:0]));
      'h22: res = vb & word_t'(w[12:0]);
      'h23: res = vb | word_t'(w[12:0]);
      'h24: res = vb ^ word_t'(w[12:0]);
      'h25: res = (w[12:0] >= 64) ? '0 : vb << w[12:0];
      'h26: res = (w[12:0] >= 64) ? {64{vb[63]}} : word_t'($signed(vb) >>> w[12:0]);
      'h27: res = (w[12:0] >= 64) ? '0 : vb >> w[12:0];
      'h04, 'h05: begin
        int pos;
        pos = int'(w[17:16]);
        res = va;
        for (int i = 0; i < 64; i++) begin
          if (i / 16 == pos) res[i] = w[i % 16];
          else if (i / 16 > pos && opc == 'h04) res[i] = 1'b0;
        end
      end
      'h2A: begin
        logic [127:0] pr;
        pr = {vb, vc};
        for (int i = 0; i < 64; i++)
          res[i] = (i + int'(w[7:0]) < 128) ? pr[i + int'(w[7:0])] : 1'b0;
      end
      'h32: begin
        if (sub > 2) return K_OFFLOAD;
        res = lane_shift(vb, 1 << ss, sub, int'(vc[5:0]));
      end
      'h33: begin
        if (sub > 2) return K_OFFLOAD;
        res = lane_shift(vb, 1 << ss, sub, int'(w[12:8]));
      end
      'h08, 'h09: begin
        rel = int'(w[3:0]); p1 = int'(w[9:7]); p2 = int'(w[6:4]);
        mode = (opc == 'h09) ? 0 : int'(w[12:10]);
        if (opc == 'h08) cnd = rel_true(va, vb, rel);
        else cnd = rel_true(va, (rel >= 6) ? word_t'(w[17:10]) : word_t'(signed'(w[17:10])), rel);
        if (mode == 0) begin
          if (p1 != 0) m_p[p1] = cnd;
          if (p2 != 0) m_p[p2] = !cnd;
        end else if (mode == 4) begin
          if (!cnd) begin
            if (p1 != 0) m_p[p1] = 0;
            if (p2 != 0) m_p[p2] = 0;
            n_w0_fire++;
          end else n_w0_hold++;
        end else begin
          if (cnd) begin
            if (p1 != 0) m_p[p1] = 1;
            if (p2 != 0) m_p[p2] = 1;
            n_w1_fire++;
          end else n_w1_hold++;
        end
        if (opc == 'h08) n_cmp++; else n_cmpi++;
        return K_EXEC;
      end
      default: return K_OFFLOAD;
    endcase
    // Register-writing instructions.
    if (opc >= 'h20 && opc <= 'h27) n_scalar++;
    if (opc == 'h04) n_loadi_z++;
    if (opc == 'h05) n_loadi_k++;
    if (opc == 'h2A) n_shrp++;
    if (opc == 'h32 && ss == 1) n_psh2++;
    if (opc == 'h32 && ss == 2) n_psh4++;
    if (opc == 'h32 && ss == 3) n_psh8++;
    if (opc == 'h33) n_pshi++;
    m_r[a] = res;
    wrote = 1;
    return K_EXEC;
  endfunction

  // ------------------------------------------------------------- driver
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (instr %08h)", what, instr);
    end
  endtask

  task automatic run(logic [31:0] w);
    kind_t k;
    logic wrote;
    logic [4:0] rd;
    word_t exp_ra, exp_rb, exp_rc;
    @(negedge clk);
    instr = w; instr_valid = 1;
    exp_ra = m_r[w[22:18]]; exp_rb = m_r[w[17:13]]; exp_rc = m_r[w[12:8]];
    if (last_wrote && (w[17:13] == last_rd || w[12:8] == last_rd || w[22:18] == last_rd)) n_raw++;
    k = model(w, wrote, rd);
    #1;
    chk(executed == (k == K_EXEC) && squashed == (k == K_SQUASH) &&
        illegal == (k == K_ILLEGAL) && offload == (k == K_OFFLOAD),
        $sformatf("outcome: got e%0d s%0d i%0d o%0d exp %s", executed, squashed, illegal, offload, k.name()));
    if (k == K_SQUASH)  n_squash++;
    if (k == K_ILLEGAL) n_illegal++;
    if (k == K_OFFLOAD) begin
      n_offload++;
      // Register fields that the format does not have read as register 0.
      chk(off_dec.opcode == w[28:23] && off_ra == m_r[off_dec.ra] &&
          off_rb == m_r[off_dec.rb] && off_rc == m_r[off_dec.rc] &&
          (off_dec.fmt == FMT_0 || off_ra == exp_ra) &&
          (!(off_dec.fmt inside {FMT_2, FMT_3, FMT_4A, FMT_4B, FMT_4C, FMT_5A}) || off_rb == exp_rb) &&
          (!(off_dec.fmt inside {FMT_4A, FMT_4C}) || off_rc == exp_rc),
          "offload port contents");
    end
    last_wrote = wrote && (k == K_EXEC);
    last_rd    = rd;
    @(posedge clk);
    #1;
    instr_valid = 0;
    // Compare the whole architectural state.
    chk(preds == m_p, $sformatf("predicates: got %b exp %b", preds, m_p));
    for (int i = 0; i < 32; i++) begin
      dbg_raddr = 5'(i);
      #1;
      chk(dbg_rdata == m_r[i], $sformatf("r%0d: got %h exp %h", i, dbg_rdata, m_r[i]));
    end
  endtask

  // Random legal-or-not instruction.
  function automatic logic [31:0] rand_instr();
    int p, r1, r2, r3;
    p  = ($urandom_range(1) == 0) ? 0 : $urandom_range(7);
    r1 = $urandom_range(7); r2 = $urandom_range(7); r3 = $urandom_range(7);
    case ($urandom_range(11))
      0, 1: return f2(p, 'h20 + $urandom_range(7), r1, r2,
                      ($urandom_range(3) == 0) ? $urandom : $urandom_range(70));
      2:    return f1(p, 'h04 + $urandom_range(1), r1, $urandom_range(3), $urandom);
      3:    return f4c(p, r1, r2, r3, $urandom);
      4:    return f4a(p, 'h32, r1, r2, r3, $urandom_range(2), $urandom_range(3, 1));
      5:    return f4b(p, r1, r2, $urandom, $urandom_range(2), $urandom_range(3, 1));
      6:    begin
              int m;
              m = $urandom_range(2);
              return f5a(p, r1, r2, (m == 0) ? 0 : (m == 1) ? 4 : 5,
                         $urandom_range(7), $urandom_range(7), $urandom_range(9));
            end
      7:    return f5b(p, r1, $urandom, $urandom_range(7), $urandom_range(7), $urandom_range(9));
      8:    begin // offloaded: jumps, trap, loads/stores, testbit, changepr, deposit, extract, packed
              int o;
              o = $urandom_range(9);
              case (o)
                0: return {3'(p), 6'h00, 23'($urandom)};
                1: return {3'(p), 6'h07, 23'($urandom)};
                2: return {3'(p), 6'h10 + 6'($urandom_range(15)), 23'($urandom)};
                3: return {3'(p), 6'h0A + 6'($urandom_range(2)), 23'($urandom)};
                4: return {3'(p), 6'h28 + 6'($urandom_range(1)), 23'($urandom)};
                5: return {3'(p), 6'h30 + 6'($urandom_range(1)), 23'($urandom)};
                6: return f4a(p, 'h32, r1, r2, r3, 'h10 + $urandom_range(1), $urandom_range(2));
                7: return f4b(p, r1, r2, $urandom, 8 + $urandom_range(4), 0);
                8: return f1(p, 'h02, r1, 0, $urandom);
                default: return f4a(p, 'h32, r1, r2, r3, 'h20, 0);
              endcase
            end
      9:    return {3'(p), 6'h34 + 6'($urandom_range(11)), 23'($urandom)};   // unassigned
      default: return $urandom;                                                // anything
    endcase
  endfunction

  task automatic need(int n, string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    instr_valid = 0; instr = '0; dbg_raddr = '0;
    last_wrote = 0; last_rd = '0;
    foreach (m_r[i]) m_r[i] = '0;
    m_p = 8'b0000_0001;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- Part 1: directed program
    run(f1(0, 'h04, 1, 0, 'hCDEF));          // loadi.z.0 r1 = 0xCDEF
    run(f1(0, 'h05, 1, 1, 'h89AB));          // loadi.k.1
    run(f1(0, 'h05, 1, 2, 'h4567));          // loadi.k.2
    run(f1(0, 'h05, 1, 3, 'h0123));          // loadi.k.3 -> 0x0123456789ABCDEF
    chk(m_r[1] == 64'h0123_4567_89AB_CDEF, "64-bit constant built by loadi");
    run(f1(0, 'h04, 1, 1, 'h1111));          // loadi.z.1 keeps bits 15:0, clears 63:32
    chk(m_r[1] == 64'h0000_0000_1111_CDEF, "loadi.z.1 result");
    run(f2(0, 'h20, 2, 1, 13'h1FFF));        // addi r2 = r1 + (-1)
    run(f2(0, 'h25, 3, 2, 4));               // slli r3 = r2 << 4
    run(f2(0, 'h26, 4, 3, 60));              // srai
    run(f5b(0, 2, 8'hFF, 1, 2, 0));          // cmpi.eq r2, -1 -> p1 = 0, p2 = 1
    run(f2(1, 'h20, 5, 5, 7));               // (p1) addi: squashed
    run(f2(2, 'h20, 5, 5, 9));               // (p2) addi: executes
    run(f5a(0, 1, 2, 0, 3, 4, 4));           // cmp.gt r1, r2 -> p3 = 1, p4 = 0
    run(f5a(0, 1, 2, 4, 3, 5, 0));           // cmp.eq.w0: false -> p3 = p5 = 0
    run(f5a(0, 1, 1, 5, 6, 7, 0));           // cmp.eq.w1: true  -> p6 = p7 = 1
    run(f5a(0, 1, 1, 4, 6, 7, 0));           // cmp.eq.w0: true  -> no change
    run(f5a(0, 1, 2, 5, 3, 4, 0));           // cmp.eq.w1: false -> no change
    run(f4c(0, 6, 1, 2, 8));                 // shrp
    run(f4a(0, 'h32, 7, 1, 3, 1, 1));        // pshift.2.ra
    run(f4a(0, 'h32, 7, 1, 3, 0, 2));        // pshift.4.l
    run(f4a(0, 'h32, 7, 1, 3, 2, 3));        // pshift.8.r
    run(f4b(6, 8, 1, 3, 1, 2));              // (p6) pshifti.4.ra
    run({3'd0, 6'h13, 5'd9, 5'd1, 13'd16});  // load 8 byte: offloaded
    run({3'd0, 6'h3F, 23'd0});               // unassigned opcode
    // ---- Part 2: random stream
    for (int n = 0; n < 4000; n++) run(rand_instr());

    $display("mechanism counts:");
    need(n_scalar,  "immediate ALU ops");
    need(n_loadi_z, "loadi.z");
    need(n_loadi_k, "loadi.k");
    need(n_shrp,    "shrp");
    need(n_psh2,    "pshift 2-byte");
    need(n_psh4,    "pshift 4-byte");
    need(n_psh8,    "pshift 8-byte");
    need(n_pshi,    "pshifti");
    need(n_cmp,     "cmp");
    need(n_cmpi,    "cmpi");
    need(n_w0_fire, ".w0 writes");
    need(n_w0_hold, ".w0 no write");
    need(n_w1_fire, ".w1 writes");
    need(n_w1_hold, ".w1 no write");
    need(n_squash,  "squashed by predicate");
    need(n_offload, "offloaded");
    need(n_illegal, "illegal encodings");
    need(n_raw,     "back-to-back dependences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
