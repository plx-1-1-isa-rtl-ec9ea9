// plx_predfile: PLX predicate register file, NPREDS one-bit predicates.
//
// Predicate 0 always reads 1 and ignores writes, so that the all-zero
// predicate field means "execute unconditionally". The others reset to 0.
// One read port serves the guard of the current instruction; the whole set is
// also brought out. Two write ports take the P1 and P2 results of a compare in
// the same cycle; if both name the same predicate, port 2 wins.
//
// The count comes from the 3-bit predicate fields of the PLX 1.1 encoding.
// The constant predicate 0, the reset value and the write-port priority are
// this design's own. The encoding also names predicate register sets
// (changepr); this file holds a single set.
//
// Interface: clk, rst_n (active low, asynchronous), raddr -> rdata, all_preds,
// two write ports. Timing: read combinational, writes on the rising clock edge.
module plx_predfile
  import plx_pkg::*;
#(
  parameter int unsigned N = NPREDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr,
  output logic                 rdata,
  output logic [N-1:0]         all_preds,
  input  logic                 we1,
  input  logic [$clog2(N)-1:0] waddr1,
  input  logic                 wdata1,
  input  logic                 we2,
  input  logic [$clog2(N)-1:0] waddr2,
  input  logic                 wdata2
);

  logic [N-1:1] p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0;
    end else begin
      if (we1 && waddr1 != '0) p[waddr1] <= wdata1;
      if (we2 && waddr2 != '0) p[waddr2] <= wdata2;
    end
  end

  assign all_preds = {p, 1'b1};
  assign rdata     = all_preds[raddr];

endmodule
