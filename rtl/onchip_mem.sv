// onchip_mem: per-node table of neighbour-list base address and degree.
//
// The controller looks up every central node here before it reads the node's
// neighbour list from HBM. Each word holds {base, degree}: the byte address
// of the node's list in the neighbour-index segment of HBM and the number of
// neighbours. The table is written by the host through the write port before
// a run. The depth default (2^18 words) covers the largest evaluated graph
// (232,965 nodes) and is this design's own choice, as are the field widths.
//
// Timing: a read issued with ren is answered on rdata one cycle later (a
// plain synchronous RAM, mapped to block or ultra RAM on an FPGA).
module onchip_mem
  import gnn_pkg::*;
#(
  parameter int unsigned P_NODES  = NODES,
  parameter int unsigned P_ADDR_W = ADDR_W,
  parameter int unsigned P_POS_W  = POS_W,
  localparam int unsigned AW      = $clog2(P_NODES)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [P_ADDR_W-1:0] wbase,
  input  logic [P_POS_W-1:0]  wdegree,
  input  logic                ren,
  input  logic [AW-1:0]       raddr,
  output logic [P_ADDR_W-1:0] rbase,
  output logic [P_POS_W-1:0]  rdegree
);
  logic [P_ADDR_W+P_POS_W-1:0] mem [P_NODES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wbase, wdegree};
    if (ren) {rbase, rdegree} <= mem[raddr];
  end
endmodule
