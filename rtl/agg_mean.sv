// agg_mean: output stage that turns an aggregated sum into an average.
//
// Average aggregation is the usual choice in GNN layers. Sums are cheaper to
// merge than averages, so the partial aggregators and the min-heap tree add
// rows for AGG_MEAN exactly as for AGG_SUM and keep a row count; this stage
// divides each lane by that count (signed division, rounding toward zero).
// For the other operators, for end-of-batch markers and for a zero count the
// entry passes unchanged. Placing the division after the tree is this
// design's own choice.
//
// Timing: one register stage, one result per cycle, in_ready = !o_valid ||
// o_ready.
module agg_mean
  import gnn_pkg::*;
#(
  parameter int unsigned P_DIM  = DIM,
  parameter int unsigned P_ID_W = ID_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  agg_op_e                       op,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic                          in_eob,
  input  logic [P_ID_W-1:0]             in_cid,
  input  logic [CNT_W-1:0]              in_cnt,
  input  logic [P_DIM-1:0][ACC_W-1:0]   in_vec,
  output logic                          o_valid,
  input  logic                          o_ready,
  output logic                          o_eob,
  output logic [P_ID_W-1:0]             o_cid,
  output logic [CNT_W-1:0]              o_cnt,
  output logic [P_DIM-1:0][ACC_W-1:0]   o_vec
);
  logic [P_DIM-1:0][ACC_W-1:0] quot;
  logic                        divide;

  assign divide   = (op == AGG_MEAN) && !in_eob && (in_cnt != '0);
  assign in_ready = !o_valid || o_ready;

  always_comb begin
    for (int d = 0; d < P_DIM; d++)
      quot[d] = ACC_W'($signed(in_vec[d]) / $signed({1'b0, in_cnt}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_eob   <= 1'b0;
      o_cid   <= '0;
      o_cnt   <= '0;
      o_vec   <= '0;
    end else if (in_valid && in_ready) begin
      o_valid <= 1'b1;
      o_eob   <= in_eob;
      o_cid   <= in_cid;
      o_cnt   <= in_cnt;
      o_vec   <= divide ? quot : in_vec;
    end else if (o_ready) begin
      o_valid <= 1'b0;
    end
  end
endmodule
