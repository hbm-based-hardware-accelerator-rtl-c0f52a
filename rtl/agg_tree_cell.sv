// agg_tree_cell: one cell of the min-heap pipelined aggregator.
//
// A cell looks at the heads of its two upstream streams (partial results
// tagged with a CID, the AXI ID of their central node) and, following the
// published rule:
//   - equal CIDs: the two feature vectors are aggregated lane by lane and
//     their row counts added; both upstream entries are consumed;
//   - different CIDs: the entry with the smaller CID is passed on; the other
//     side is held (its ready stays low), which also stalls everything
//     behind it upstream.
// The result goes into the cell's output register (one pipeline stage per
// tree level). An end-of-batch marker counts as a CID larger than all
// others; when both heads are markers a single marker is passed on. A cell
// fires only when both heads are present, since an empty side could still
// deliver a smaller CID; this is this design's reading of the rule, as are
// the marker and the valid/ready handshake.
//
// Timing: one result per cycle; a_ready/b_ready depend combinationally on
// o_ready (the hold signal travels up the tree in the same cycle).
module agg_tree_cell
  import gnn_pkg::*;
#(
  parameter int unsigned P_DIM  = DIM,
  parameter int unsigned P_ID_W = ID_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  agg_op_e                       op,
  input  logic                          a_valid,
  output logic                          a_ready,
  input  logic                          a_eob,
  input  logic [P_ID_W-1:0]             a_cid,
  input  logic [CNT_W-1:0]              a_cnt,
  input  logic [P_DIM-1:0][ACC_W-1:0]   a_vec,
  input  logic                          b_valid,
  output logic                          b_ready,
  input  logic                          b_eob,
  input  logic [P_ID_W-1:0]             b_cid,
  input  logic [CNT_W-1:0]              b_cnt,
  input  logic [P_DIM-1:0][ACC_W-1:0]   b_vec,
  output logic                          o_valid,
  input  logic                          o_ready,
  output logic                          o_eob,
  output logic [P_ID_W-1:0]             o_cid,
  output logic [CNT_W-1:0]              o_cnt,
  output logic [P_DIM-1:0][ACC_W-1:0]   o_vec
);
  typedef enum logic [1:0] {PICK_A, PICK_B, MERGE} pick_e;

  logic  fire, free;
  pick_e pick;
  logic [P_DIM-1:0][ACC_W-1:0] merged;

  always_comb begin
    if (a_eob && b_eob)           pick = MERGE;
    else if (a_eob)               pick = PICK_B;
    else if (b_eob)               pick = PICK_A;
    else if (a_cid == b_cid)      pick = MERGE;
    else if (a_cid < b_cid)       pick = PICK_A;
    else                          pick = PICK_B;
    for (int d = 0; d < P_DIM; d++) merged[d] = agg_lane(op, a_vec[d], b_vec[d]);
  end

  assign free    = !o_valid || o_ready;
  assign fire    = a_valid && b_valid && free;
  assign a_ready = fire && (pick != PICK_B);
  assign b_ready = fire && (pick != PICK_A);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_eob   <= 1'b0;
      o_cid   <= '0;
      o_cnt   <= '0;
      o_vec   <= '0;
    end else if (fire) begin
      o_valid <= 1'b1;
      unique case (pick)
        PICK_A: begin
          o_eob <= a_eob; o_cid <= a_cid; o_cnt <= a_cnt; o_vec <= a_vec;
        end
        PICK_B: begin
          o_eob <= b_eob; o_cid <= b_cid; o_cnt <= b_cnt; o_vec <= b_vec;
        end
        default: begin
          o_eob <= a_eob; o_cid <= a_cid; o_cnt <= a_cnt + b_cnt; o_vec <= merged;
        end
      endcase
    end else if (o_ready) begin
      o_valid <= 1'b0;
    end
  end
endmodule
