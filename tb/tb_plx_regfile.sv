// tb_plx_regfile: self-checking test of the PLX register file.
//
// Checks that reset clears all 32 registers, then performs random writes and
// reads on all four read ports against a shadow array kept here, including a
// read of the register being written in the same cycle (old value before the
// edge, new value after it), and cycles with the write enable low.
module tb_plx_regfile;
  import plx_pkg::*;

  logic       clk = 0, rst_n = 0;
  reg_idx_t   raddr_a, raddr_b, raddr_c, raddr_d, waddr;
  word_t      rdata_a, rdata_b, rdata_c, rdata_d, wdata;
  logic       we;
  word_t      shadow [32];
  int         checks = 0, failures = 0;

  plx_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0;
    raddr_a = '0; raddr_b = '0; raddr_c = '0; raddr_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 32; i++) begin
      raddr_d = 5'(i); #1;
      chk(rdata_d, '0, "reset value");
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = ($urandom_range(3) != 0);
      waddr = 5'($urandom);
      wdata = {$urandom, $urandom};
      raddr_a = waddr;               // same-cycle read of the written register
      raddr_b = 5'($urandom);
      raddr_c = 5'($urandom);
      raddr_d = 5'($urandom);
      #1;
      chk(rdata_a, shadow[raddr_a], "port a before write");
      chk(rdata_b, shadow[raddr_b], "port b");
      chk(rdata_c, shadow[raddr_c], "port c");
      chk(rdata_d, shadow[raddr_d], "port d");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      chk(rdata_a, shadow[raddr_a], "port a after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
