// tb_plx_pshift: self-checking test of the PLX parallel subword shifter.
//
// For 2-, 4- and 8-byte subwords and the three shift kinds, drives random
// sources and every shift amount 0..63, and compares with a reference that
// shifts each subword on its own, bit by bit. Also checks that 1-byte size
// (not a legal shift) passes the source through.
module tb_plx_pshift;
  import plx_pkg::*;

  psh_e       kind;
  logic [1:0] ss;
  word_t      src, result;
  logic [5:0] amount;
  int         checks = 0, failures = 0;
  logic       clk = 0;

  plx_pshift dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_model();
    word_t r;
    int w, base, j;
    w = 8 << ss;    // subword width in bits
    for (int i = 0; i < 64; i++) begin
      base = (i / w) * w;
      case (kind)
        PSH_L: begin
          j = i - int'(amount);
          r[i] = (j >= base) ? src[j] : 1'b0;
        end
        PSH_RA: begin
          j = i + int'(amount);
          r[i] = (j < base + w) ? src[j] : src[base + w - 1];
        end
        default: begin
          j = i + int'(amount);
          r[i] = (j < base + w) ? src[j] : 1'b0;
        end
      endcase
    end
    return r;
  endfunction

  initial begin
    kind = PSH_L; ss = SS_2; src = '0; amount = '0;
    @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      src = {$urandom, $urandom};
      for (int s = 1; s < 4; s++) begin
        for (int k = 0; k < 3; k++) begin
          for (int a = 0; a < 64; a++) begin
            word_t exp;
            ss = 2'(s); kind = psh_e'(k); amount = 6'(a);
            #1;
            exp = ref_model();
            checks++;
            if (result !== exp) begin
              failures++;
              if (failures < 20)
                $display("FAIL kind=%s ss=%0d amt=%0d src=%h got %h exp %h",
                         kind.name(), ss, amount, src, result, exp);
            end
          end
        end
      end
      @(posedge clk);
    end
    ss = SS_1; amount = 6'd3; src = 64'h0123_4567_89AB_CDEF; #1;
    checks++;
    if (result !== src) begin failures++; $display("FAIL 1-byte pass-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
