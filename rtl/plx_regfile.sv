// plx_regfile: PLX general register file, NREGS registers of XLEN bits.
//
// Four asynchronous read ports (three for the register fields of an
// instruction, one for observation) and one synchronous write port. A read of
// the register being written in the same cycle returns the old value; the new
// value is visible from the next cycle. Reset clears every register.
//
// The register count and width come from the PLX 1.1 encoding (5-bit register
// fields, immediates loaded up to bit 63). The number of ports, the reset and
// the treatment of register 0 as an ordinary register are this design's own.
//
// Interface: clk, rst_n (active low, asynchronous), raddr_a/b/c/d -> rdata_a/b/c/d,
// we/waddr/wdata. Timing: reads combinational, write on the rising clock edge.
module plx_regfile
  import plx_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = XLEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr_a,
  input  logic [$clog2(N)-1:0] raddr_b,
  input  logic [$clog2(N)-1:0] raddr_c,
  input  logic [$clog2(N)-1:0] raddr_d,
  output logic [W-1:0]         rdata_a,
  output logic [W-1:0]         rdata_b,
  output logic [W-1:0]         rdata_c,
  output logic [W-1:0]         rdata_d,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
  assign rdata_c = regs[raddr_c];
  assign rdata_d = regs[raddr_d];

endmodule
