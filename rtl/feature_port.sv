// feature_port: read-request engine of one HBM feature segment.
//
// Each HBM port reaches one 256 MB segment, which holds the feature rows of
// a contiguous block of nodes, ROW_BYTES apart. Sample requests for this
// segment are queued (REQ_DEPTH entries) and issued as single AXI bursts of
// feat_beats beats: ARADDR = SEG * 2^SEG_LOG2 + row * ROW_BYTES and ARID =
// CID of the central node, so the returned features can be told apart by
// RID. At most MAX_OUT bursts are outstanding; r_done (a handshaken last
// beat) retires one. An end-of-batch request waits until every read of the
// segment has returned and is then handed to the partial aggregator on the
// eob_valid/eob_ready pair, which keeps the batch marker behind all of the
// batch's data.
//
// Using the AXI ID as the central-node tag follows the published design; the
// queue, the outstanding limit and the end-of-batch hand-off are this
// design's own choices. The HBM port is assumed to return the bursts of a
// port in request order. Rows are ROW_BYTES aligned, so the low
// log2(ROW_BYTES) bits of ARADDR are always zero.
module feature_port
  import gnn_pkg::*;
#(
  parameter int unsigned SEG        = 0,
  parameter int unsigned P_IDX_W    = IDX_W,
  parameter int unsigned P_ID_W     = ID_W,
  parameter int unsigned P_ADDR_W   = ADDR_W,
  parameter int unsigned P_SEG_LOG2 = SEG_LOG2,
  parameter int unsigned P_ROW_BYTES = ROW_BYTES,
  parameter int unsigned REQ_DEPTH  = 8,
  parameter int unsigned MAX_OUT    = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [5:0]            feat_beats,
  // sample requests
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [P_IDX_W-1:0]    req_local,
  input  logic [P_ID_W-1:0]     req_cid,
  input  logic                  req_eob,
  // AXI read address channel of the segment
  output logic                  ar_valid,
  input  logic                  ar_ready,
  output logic [P_ID_W-1:0]     ar_id,
  output logic [P_ADDR_W-1:0]   ar_addr,
  output logic [7:0]            ar_len,
  input  logic                  r_done,
  // end-of-batch hand-off to the partial aggregator
  output logic                  eob_valid,
  input  logic                  eob_ready
);
  localparam int unsigned QW = P_IDX_W + P_ID_W + 1;
  localparam int unsigned OW = $clog2(MAX_OUT + 1);

  logic [QW-1:0]        q_rd;
  logic                 q_valid, q_pop;
  logic [P_IDX_W-1:0]   q_local;
  logic [P_ID_W-1:0]    q_cid;
  logic                 q_eob;
  logic [OW-1:0]        outst;
  logic [$clog2(REQ_DEPTH+1)-1:0] unused_cnt;
  logic                 ar_fire;

  sync_fifo #(.WIDTH(QW), .DEPTH(REQ_DEPTH)) u_q (
    .clk, .rst_n,
    .wr_valid(req_valid), .wr_ready(req_ready), .wr_data({req_local, req_cid, req_eob}),
    .rd_valid(q_valid), .rd_ready(q_pop), .rd_data(q_rd), .count(unused_cnt));

  assign {q_local, q_cid, q_eob} = q_rd;

  assign ar_valid  = q_valid && !q_eob && (outst != OW'(MAX_OUT));
  assign ar_id     = q_cid;
  assign ar_addr   = (P_ADDR_W'(SEG) << P_SEG_LOG2) + P_ADDR_W'(q_local) * P_ADDR_W'(P_ROW_BYTES);
  assign ar_len    = 8'(feat_beats) - 8'd1;
  assign ar_fire   = ar_valid && ar_ready;
  assign eob_valid = q_valid && q_eob && (outst == '0);
  assign q_pop     = ar_fire || (eob_valid && eob_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outst <= '0;
    else        outst <= outst + OW'(ar_fire) - OW'(r_done);
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(r_done && outst == '0))
    else $error("feature_port: read data without an outstanding request");
endmodule
