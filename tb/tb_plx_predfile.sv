// tb_plx_predfile: self-checking test of the PLX predicate file.
//
// Checks the reset state (predicate 0 reads 1, the others 0), random writes
// through both ports against a shadow copy, that writes to predicate 0 are
// ignored, and that port 2 wins when both ports write the same predicate.
module tb_plx_predfile;
  import plx_pkg::*;

  logic       clk = 0, rst_n = 0;
  pred_idx_t  raddr, waddr1, waddr2;
  logic       rdata, we1, wdata1, we2, wdata2;
  logic [7:0] all_preds;
  logic [7:0] shadow;
  int         checks = 0, failures = 0;

  plx_predfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: preds=%b exp %b", what, all_preds, shadow);
    end
  endtask

  initial begin
    raddr = '0; waddr1 = '0; waddr2 = '0; we1 = 0; we2 = 0; wdata1 = 0; wdata2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    shadow = 8'b0000_0001;
    #1 chk(all_preds == shadow, "reset state");
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we1 = $urandom_range(1); we2 = $urandom_range(1);
      waddr1 = 3'($urandom); waddr2 = ($urandom_range(4) == 0) ? waddr1 : 3'($urandom);
      wdata1 = $urandom_range(1); wdata2 = $urandom_range(1);
      raddr = 3'($urandom);
      #1 chk(rdata == shadow[raddr], "read port");
      @(posedge clk);
      if (we1 && waddr1 != 0) shadow[waddr1] = wdata1;
      if (we2 && waddr2 != 0) shadow[waddr2] = wdata2;
      #1 chk(all_preds == shadow, "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
