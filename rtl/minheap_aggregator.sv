// minheap_aggregator: min-heap pipelined aggregator over all HBM segments.
//
// A complete binary tree of agg_tree_cell with N_SEG leaves (one per HBM
// segment's partial-result FIFO) and N_SEG - 1 cells. Level 0 is the root,
// level LV holds the leaf inputs. Every cell forwards the smaller-CID head of
// its two children or merges equal CIDs, so partial results of one central
// node that sit in different segments meet on their way to the root, while
// segments that are ahead simply wait. Because every leaf delivers CIDs in
// increasing order, the root emits every CID of a batch exactly once, fully
// aggregated, in increasing order, followed by one end-of-batch marker.
//
// Timing: LV register stages from leaf to root; once the pipeline is full
// the root can deliver one aggregated result per cycle. N_SEG must be a
// power of two.
module minheap_aggregator
  import gnn_pkg::*;
#(
  parameter int unsigned P_N_SEG = N_SEG,
  parameter int unsigned P_DIM   = DIM,
  parameter int unsigned P_ID_W  = ID_W,
  localparam int unsigned LV     = $clog2(P_N_SEG)
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  agg_op_e                                    op,
  input  logic [P_N_SEG-1:0]                         in_valid,
  output logic [P_N_SEG-1:0]                         in_ready,
  input  logic [P_N_SEG-1:0]                         in_eob,
  input  logic [P_N_SEG-1:0][P_ID_W-1:0]             in_cid,
  input  logic [P_N_SEG-1:0][CNT_W-1:0]              in_cnt,
  input  logic [P_N_SEG-1:0][P_DIM-1:0][ACC_W-1:0]   in_vec,
  output logic                                       o_valid,
  input  logic                                       o_ready,
  output logic                                       o_eob,
  output logic [P_ID_W-1:0]                          o_cid,
  output logic [CNT_W-1:0]                           o_cnt,
  output logic [P_DIM-1:0][ACC_W-1:0]                o_vec
);
  for (genvar l = 0; l <= LV; l++) begin : g_lv
    localparam int unsigned N = 1 << l;
    logic [N-1:0]                       v, r, e;
    logic [N-1:0][P_ID_W-1:0]           c;
    logic [N-1:0][CNT_W-1:0]            n;
    logic [N-1:0][P_DIM-1:0][ACC_W-1:0] x;
  end

  // leaves
  assign g_lv[LV].v = in_valid;
  assign g_lv[LV].e = in_eob;
  assign g_lv[LV].c = in_cid;
  assign g_lv[LV].n = in_cnt;
  assign g_lv[LV].x = in_vec;
  assign in_ready   = g_lv[LV].r;

  // root
  assign o_valid    = g_lv[0].v;
  assign o_eob      = g_lv[0].e;
  assign o_cid      = g_lv[0].c;
  assign o_cnt      = g_lv[0].n;
  assign o_vec      = g_lv[0].x;
  assign g_lv[0].r  = o_ready;

  for (genvar l = 0; l < LV; l++) begin : g_cells
    for (genvar k = 0; k < (1 << l); k++) begin : g_cell
      agg_tree_cell #(.P_DIM(P_DIM), .P_ID_W(P_ID_W)) u_cell (
        .clk, .rst_n, .op,
        .a_valid(g_lv[l+1].v[2*k]),   .a_ready(g_lv[l+1].r[2*k]),
        .a_eob  (g_lv[l+1].e[2*k]),   .a_cid  (g_lv[l+1].c[2*k]),
        .a_cnt  (g_lv[l+1].n[2*k]),   .a_vec  (g_lv[l+1].x[2*k]),
        .b_valid(g_lv[l+1].v[2*k+1]), .b_ready(g_lv[l+1].r[2*k+1]),
        .b_eob  (g_lv[l+1].e[2*k+1]), .b_cid  (g_lv[l+1].c[2*k+1]),
        .b_cnt  (g_lv[l+1].n[2*k+1]), .b_vec  (g_lv[l+1].x[2*k+1]),
        .o_valid(g_lv[l].v[k]),       .o_ready(g_lv[l].r[k]),
        .o_eob  (g_lv[l].e[k]),       .o_cid  (g_lv[l].c[k]),
        .o_cnt  (g_lv[l].n[k]),       .o_vec  (g_lv[l].x[k]));
    end
  end
endmodule
