// tb_plx_compare: self-checking test of the PLX compare unit.
//
// For all ten relations, register and immediate forms, and the normal, .w0
// and .w1 write modes, drives random and boundary operands (equal values,
// sign boundaries, values that order differently signed and unsigned) and
// compares cond and the two predicate writes with a reference computed here
// from 65-bit extended arithmetic.
module tb_plx_compare;
  import plx_pkg::*;

  word_t      rs1, rs2;
  logic [7:0] imm8;
  logic       use_imm;
  logic [3:0] rel;
  logic [2:0] mode;
  logic       cond, p1_we, p1_val, p2_we, p2_val;
  int         checks = 0, failures = 0;
  logic       clk = 0;

  plx_compare dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: compare in 65 bits, extended signed or unsigned.
  function automatic logic ref_cond();
    logic signed [64:0] a, b;
    logic [63:0] bw;
    logic uns;
    uns = (rel >= 4'd6);
    if (use_imm) bw = uns ? 64'(imm8) : 64'(signed'(imm8));
    else         bw = rs2;
    a = uns ? {1'b0, rs1} : {rs1[63], rs1};
    b = uns ? {1'b0, bw}  : {bw[63], bw};
    case (rel)
      4'd0: return a == b;
      4'd1: return a != b;
      4'd2, 4'd6: return a <  b;
      4'd3, 4'd7: return a <= b;
      4'd4, 4'd8: return a >  b;
      default:    return a >= b;
    endcase
  endfunction

  function automatic word_t pick();
    case ($urandom_range(5))
      0: return 64'h8000_0000_0000_0000;
      1: return 64'h7FFF_FFFF_FFFF_FFFF;
      2: return 64'hFFFF_FFFF_FFFF_FFFF;
      3: return 64'(signed'(8'($urandom)));
      4: return 64'($urandom_range(3));
      default: return {$urandom, $urandom};
    endcase
  endfunction

  task automatic run_one();
    logic c, e1, v1, e2, v2;
    #1;
    c = ref_cond();
    if (use_imm || mode == 3'b000) begin e1 = 1; v1 = c; e2 = 1; v2 = !c; end
    else if (mode == 3'b100) begin e1 = !c; v1 = 0; e2 = !c; v2 = 0; end
    else begin e1 = c; v1 = 1; e2 = c; v2 = 1; end
    checks++;
    if (cond !== c || p1_we !== e1 || p2_we !== e2 ||
        (e1 && p1_val !== v1) || (e2 && p2_val !== v2)) begin
      failures++;
      $display("FAIL rel=%0d imm=%0d mode=%b rs1=%h rs2=%h imm8=%h: cond=%b we=%b%b val=%b%b exp cond=%b we=%b%b val=%b%b",
               rel, use_imm, mode, rs1, rs2, imm8, cond, p1_we, p2_we, p1_val, p2_val, c, e1, e2, v1, v2);
    end
  endtask

  initial begin
    rs1 = '0; rs2 = '0; imm8 = '0; use_imm = 0; rel = '0; mode = '0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      rs1  = pick();
      rs2  = ($urandom_range(3) == 0) ? rs1 : pick();
      imm8 = ($urandom_range(3) == 0) ? rs1[7:0] : 8'($urandom);
      for (int r = 0; r < 10; r++) begin
        rel = 4'(r);
        use_imm = 0;
        mode = 3'b000; run_one();
        mode = 3'b100; run_one();
        mode = 3'b101; run_one();
        use_imm = 1;
        mode = 3'($urandom); run_one();
      end
      if (n % 50 == 0) @(posedge clk);
    end
    // Immediate extension boundaries.
    rs1 = 64'hFFFF_FFFF_FFFF_FFF0; imm8 = 8'hF0; use_imm = 1; mode = 0;
    for (int r = 0; r < 10; r++) begin rel = 4'(r); run_one(); end
    rs1 = 64'h0000_0000_0000_00F0;
    for (int r = 0; r < 10; r++) begin rel = 4'(r); run_one(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
