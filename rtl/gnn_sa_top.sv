// gnn_sa_top: GNN neighbour sampling, feature acquisition and aggregation.
//
// For every central node of a batch the accelerator picks SAMPLE neighbours
// at random, fetches their feature rows from HBM and returns the lane-wise
// aggregate (sum, mean, max or min) of those rows together with the number of rows
// aggregated, one result per central node, tagged with its CID (position in
// the batch, also used as AXI ID). Dataflow:
//
//   node stream -> sampler_ctrl -> onchip_mem (base, degree)
//                               -> rand_gen (SAMPLE positions)
//                               -> HBM neighbour-index segment (AXI bursts)
//               -> streaming_sampler (samples while the list streams in)
//               -> feature_acq_array (buffer, split per segment, AXI reads
//                                     on N_SEG HBM feature segments)
//               -> partial_aggregator x N_SEG (fold rows of one CID)
//               -> minheap_aggregator (merge across segments by CID)
//               -> agg_mean (divide by the row count for AGG_MEAN)
//               -> agg_* result stream
//
// The HBM itself is outside: its neighbour-index port and N_SEG feature ports
// are AXI read ports of this module (address and data channels only; reads
// of one port must return in request order). The on-chip table is loaded
// through tbl_*. Configuration inputs must be held stable during a batch:
// op (aggregation operator), with_repl (sampling with replacement),
// acq_only (raw feature acquisition: rows of feat_beats beats are read and
// left on the HBM data ports for the consumer, nothing is aggregated),
// seg_shift (log2 of the nodes per segment) and feat_beats (beats per feature
// row; DIM*8/HBM_DW when aggregating).
//
// A batch ends with a node flagged nd_last (or after 2^ID_W nodes); the
// result stream then carries one agg_eob entry. The block structure follows
// the published system; the batch protocol, handshakes and widths are this
// design's own choices (see each block).
module gnn_sa_top
  import gnn_pkg::*;
#(
  parameter int unsigned P_N_SEG = N_SEG,
  parameter int unsigned P_DIM   = DIM,
  parameter int unsigned P_NODES = NODES,
  localparam int unsigned NAW    = $clog2(P_NODES),
  localparam int unsigned NBR_DW = WAYS * IDX_W,
  localparam int unsigned MULT_W = $clog2(SAMPLE + 1)
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // configuration
  input  agg_op_e                                  op,
  input  logic                                     with_repl,
  input  logic                                     acq_only,
  input  logic [5:0]                               seg_shift,
  input  logic [5:0]                               feat_beats,
  // on-chip table load
  input  logic                                     tbl_we,
  input  logic [NAW-1:0]                           tbl_waddr,
  input  logic [ADDR_W-1:0]                        tbl_wbase,
  input  logic [POS_W-1:0]                         tbl_wdegree,
  // central nodes
  input  logic                                     nd_valid,
  output logic                                     nd_ready,
  input  logic [IDX_W-1:0]                         nd_id,
  input  logic                                     nd_last,
  // HBM neighbour-index segment
  output logic                                     nbr_ar_valid,
  input  logic                                     nbr_ar_ready,
  output logic [ID_W-1:0]                          nbr_ar_id,
  output logic [ADDR_W-1:0]                        nbr_ar_addr,
  output logic [7:0]                               nbr_ar_len,
  input  logic                                     nbr_r_valid,
  output logic                                     nbr_r_ready,
  input  logic [NBR_DW-1:0]                        nbr_r_data,
  // HBM feature segments
  output logic [P_N_SEG-1:0]                       fa_ar_valid,
  input  logic [P_N_SEG-1:0]                       fa_ar_ready,
  output logic [P_N_SEG-1:0][ID_W-1:0]             fa_ar_id,
  output logic [P_N_SEG-1:0][ADDR_W-1:0]           fa_ar_addr,
  output logic [P_N_SEG-1:0][7:0]                  fa_ar_len,
  input  logic [P_N_SEG-1:0]                       fr_valid,
  output logic [P_N_SEG-1:0]                       fr_ready,
  input  logic [P_N_SEG-1:0][ID_W-1:0]             fr_id,
  input  logic [P_N_SEG-1:0][HBM_DW-1:0]           fr_data,
  input  logic [P_N_SEG-1:0]                       fr_last,
  // aggregated results
  output logic                                     agg_valid,
  input  logic                                     agg_ready,
  output logic                                     agg_eob,
  output logic [ID_W-1:0]                          agg_cid,
  output logic [CNT_W-1:0]                         agg_cnt,
  output logic [P_DIM-1:0][ACC_W-1:0]              agg_vec,
  output logic                                     ctrl_busy
);
  // table lookup
  logic              mem_ren;
  logic [NAW-1:0]    mem_raddr;
  logic [ADDR_W-1:0] mem_base;
  logic [POS_W-1:0]  mem_degree;
  // random numbers
  logic                           rg_req, rnd_valid;
  logic [POS_W-1:0]               rg_degree;
  logic [SAMPLE-1:0][POS_W-1:0]   rnd;
  // controller -> sampler
  logic                           s_valid, s_ready, s_eob;
  logic [WAYS-1:0][IDX_W-1:0]     s_idx;
  logic [ID_W-1:0]                s_cid;
  // sampler -> acquisition array
  logic                           m_valid, m_ready, m_eob;
  logic [WAYS-1:0][IDX_W-1:0]     m_idx;
  logic [WAYS-1:0]                m_mask;
  logic [WAYS-1:0][MULT_W-1:0]    m_mult;
  logic [ID_W-1:0]                m_cid;
  // per segment
  logic [P_N_SEG-1:0]             r_done, eob_valid, eob_ready;
  logic [P_N_SEG-1:0]             p_valid, p_ready, p_eob;
  logic [P_N_SEG-1:0][ID_W-1:0]   p_cid;
  logic [P_N_SEG-1:0][CNT_W-1:0]  p_cnt;
  logic [P_N_SEG-1:0][P_DIM-1:0][ACC_W-1:0] p_vec;
  // tree root -> mean stage
  logic                           t_valid, t_ready, t_eob;
  logic [ID_W-1:0]                t_cid;
  logic [CNT_W-1:0]               t_cnt;
  logic [P_DIM-1:0][ACC_W-1:0]    t_vec;

  onchip_mem #(.P_NODES(P_NODES)) u_mem (
    .clk, .we(tbl_we), .waddr(tbl_waddr), .wbase(tbl_wbase), .wdegree(tbl_wdegree),
    .ren(mem_ren), .raddr(mem_raddr), .rbase(mem_base), .rdegree(mem_degree));

  rand_gen u_rng (
    .clk, .rst_n, .req(rg_req), .degree(rg_degree), .rnd_valid, .rnd);

  sampler_ctrl #(.P_NODES(P_NODES)) u_ctrl (
    .clk, .rst_n,
    .nd_valid, .nd_ready, .nd_id, .nd_last,
    .mem_ren, .mem_raddr, .mem_base, .mem_degree,
    .rg_req, .rg_degree,
    .ar_valid(nbr_ar_valid), .ar_ready(nbr_ar_ready), .ar_id(nbr_ar_id),
    .ar_addr(nbr_ar_addr), .ar_len(nbr_ar_len),
    .r_valid(nbr_r_valid), .r_ready(nbr_r_ready), .r_data(nbr_r_data),
    .s_valid, .s_ready, .s_idx, .s_cid, .s_eob, .busy(ctrl_busy));

  streaming_sampler u_sampler (
    .clk, .rst_n, .load(rnd_valid), .rnd,
    .in_valid(s_valid), .in_ready(s_ready), .in_idx(s_idx), .in_cid(s_cid), .in_eob(s_eob),
    .out_valid(m_valid), .out_ready(m_ready), .out_idx(m_idx), .out_mask(m_mask),
    .out_mult(m_mult), .out_cid(m_cid), .out_eob(m_eob));

  feature_acq_array #(.P_N_SEG(P_N_SEG)) u_acq (
    .clk, .rst_n, .with_repl, .seg_shift, .feat_beats,
    .in_valid(m_valid), .in_ready(m_ready), .in_idx(m_idx), .in_mask(m_mask),
    .in_mult(m_mult), .in_cid(m_cid), .in_eob(m_eob),
    .ar_valid(fa_ar_valid), .ar_ready(fa_ar_ready), .ar_id(fa_ar_id),
    .ar_addr(fa_ar_addr), .ar_len(fa_ar_len), .r_done,
    .eob_valid, .eob_ready);

  for (genvar s = 0; s < P_N_SEG; s++) begin : g_pagg
    assign r_done[s] = fr_valid[s] && fr_ready[s] && fr_last[s];
    partial_aggregator #(.P_DIM(P_DIM)) u_pagg (
      .clk, .rst_n, .op, .acq_only,
      .r_valid(fr_valid[s]), .r_ready(fr_ready[s]), .r_id(fr_id[s]),
      .r_data(fr_data[s]), .r_last(fr_last[s]),
      .eob_valid(eob_valid[s]), .eob_ready(eob_ready[s]),
      .o_valid(p_valid[s]), .o_ready(p_ready[s]), .o_eob(p_eob[s]),
      .o_cid(p_cid[s]), .o_cnt(p_cnt[s]), .o_vec(p_vec[s]));
  end

  minheap_aggregator #(.P_N_SEG(P_N_SEG), .P_DIM(P_DIM)) u_tree (
    .clk, .rst_n, .op,
    .in_valid(p_valid), .in_ready(p_ready), .in_eob(p_eob), .in_cid(p_cid),
    .in_cnt(p_cnt), .in_vec(p_vec),
    .o_valid(t_valid), .o_ready(t_ready), .o_eob(t_eob), .o_cid(t_cid),
    .o_cnt(t_cnt), .o_vec(t_vec));

  agg_mean #(.P_DIM(P_DIM)) u_mean (
    .clk, .rst_n, .op,
    .in_valid(t_valid), .in_ready(t_ready), .in_eob(t_eob), .in_cid(t_cid),
    .in_cnt(t_cnt), .in_vec(t_vec),
    .o_valid(agg_valid), .o_ready(agg_ready), .o_eob(agg_eob), .o_cid(agg_cid),
    .o_cnt(agg_cnt), .o_vec(agg_vec));
endmodule
