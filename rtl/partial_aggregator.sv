// partial_aggregator: per-segment aggregation of features of one central node.
//
// Feature rows read from one HBM segment arrive as AXI read bursts whose RID
// is the CID (central node) they belong to. Bursts of one CID that follow
// each other are folded into one partial result: lane-wise sum, maximum or
// minimum of the INT8 features (sign-extended to ACC_W bits) plus a count of
// the folded rows. When a burst of a different CID arrives, or the segment
// signals end of batch, the partial result is pushed into the partial
// aggregation result FIFO that feeds the min-heap aggregator; the end of
// batch then follows as a marker entry. Because CIDs are issued in
// increasing order, each FIFO holds its CIDs in increasing order, which the
// aggregator tree relies on.
//
// Beat b of a row carries lanes b*DW/8 .. b*DW/8 + DW/8 - 1; only the first
// DIM lanes are aggregated. With acq_only set (raw feature acquisition of up
// to 1024 dimensions) the beats are accepted without being aggregated and
// only the end-of-batch markers go on. The FIFO depth default, 2^ID_W + 2,
// holds one full batch so a segment never stalls the others inside a batch;
// it, the counters and the widths are this design's own choices.
//
// Timing: one beat per cycle; r_ready drops while the result FIFO is full.
module partial_aggregator
  import gnn_pkg::*;
#(
  parameter int unsigned P_DIM     = DIM,
  parameter int unsigned P_DW      = HBM_DW,
  parameter int unsigned P_ID_W    = ID_W,
  parameter int unsigned OUT_DEPTH = (1 << ID_W) + 2
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  agg_op_e                               op,
  input  logic                                  acq_only,
  // AXI read data of the segment
  input  logic                                  r_valid,
  output logic                                  r_ready,
  input  logic [P_ID_W-1:0]                     r_id,
  input  logic [P_DW-1:0]                       r_data,
  input  logic                                  r_last,
  // end of batch from the segment's feature port
  input  logic                                  eob_valid,
  output logic                                  eob_ready,
  // partial results towards the aggregator tree
  output logic                                  o_valid,
  input  logic                                  o_ready,
  output logic                                  o_eob,
  output logic [P_ID_W-1:0]                     o_cid,
  output logic [CNT_W-1:0]                      o_cnt,
  output logic [P_DIM-1:0][ACC_W-1:0]           o_vec
);
  localparam int unsigned LPB = P_DW / ELEM_W;           // lanes per beat
  localparam int unsigned EW  = 1 + P_ID_W + CNT_W + P_DIM * ACC_W;

  logic                          busy, first_q;
  logic [P_ID_W-1:0]             acc_cid;
  logic [CNT_W-1:0]              acc_cnt;
  logic [P_DIM-1:0][ACC_W-1:0]   acc_vec;
  logic [7:0]                    bcnt;

  logic          f_wr_valid, f_wr_ready;
  logic [EW-1:0] f_wr_data, f_rd_data;
  logic [$clog2(OUT_DEPTH+1)-1:0] unused_cnt;

  logic beat, new_group, first_eff, push_acc, push_eob, flush;

  assign r_ready   = acq_only || f_wr_ready;
  assign beat      = r_valid && r_ready && !acq_only;
  assign new_group = !busy || (r_id != acc_cid);
  assign first_eff = (bcnt == '0) ? new_group : first_q;
  assign flush     = eob_valid && busy && f_wr_ready;
  assign push_acc  = (beat && bcnt == '0 && busy && new_group) || flush;
  assign eob_ready = !busy && f_wr_ready;
  assign push_eob  = eob_valid && eob_ready;

  assign f_wr_valid = push_acc || push_eob;
  assign f_wr_data  = push_eob ? {1'b1, {(EW-1){1'b0}}} : {1'b0, acc_cid, acc_cnt, acc_vec};

  sync_fifo #(.WIDTH(EW), .DEPTH(OUT_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(f_wr_valid), .wr_ready(f_wr_ready), .wr_data(f_wr_data),
    .rd_valid(o_valid), .rd_ready(o_ready), .rd_data(f_rd_data), .count(unused_cnt));

  assign {o_eob, o_cid, o_cnt, o_vec} = f_rd_data;

  // lanes carried by the current beat are loaded (first row of a group) or
  // combined with the accumulator; the other lanes keep their value
  logic [P_DIM-1:0][ACC_W-1:0] vec_nxt;
  always_comb begin
    for (int d = 0; d < P_DIM; d++) begin
      logic signed [ACC_W-1:0] e;
      e = ACC_W'($signed(r_data[(d % LPB) * ELEM_W +: ELEM_W]));
      if (8'(d / LPB) == bcnt) vec_nxt[d] = first_eff ? e : agg_lane(op, acc_vec[d], e);
      else                     vec_nxt[d] = acc_vec[d];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      first_q <= 1'b0;
      acc_cid <= '0;
      acc_cnt <= '0;
      acc_vec <= '0;
      bcnt    <= '0;
    end else begin
      if (flush) busy <= 1'b0;
      if (beat) begin
        if (bcnt == '0) begin
          busy    <= 1'b1;
          acc_cid <= r_id;
          acc_cnt <= new_group ? CNT_W'(1) : acc_cnt + 1'b1;
          first_q <= new_group;
        end
        acc_vec <= vec_nxt;
        bcnt <= r_last ? '0 : bcnt + 1'b1;
      end
    end
  end
endmodule
