// sample_dispatch: sample buffer and per-sample hand-off to the HBM segments.
//
// Sampled beats from the streaming sampler (WAYS indexes with a mask and a
// multiplicity each) are buffered in a FIFO of SBUF_DEPTH beats. The head
// beat is then taken apart one sample per cycle: the lowest remaining way
// whose mask bit is set is sent out, as often as its multiplicity when
// with_repl is set (sampling with replacement) and once otherwise. Beats with
// an empty mask are dropped; an end-of-batch beat leaves as one eob request.
//
// Feature rows are spread over the segments in node-index order, a block of
// 2^seg_shift consecutive nodes per segment, so the segment of node v is
// v >> seg_shift and its row inside the segment is v mod 2^seg_shift. The
// in-order block layout is the published one; the power-of-two block size
// is this design's own choice.
//
// Interface/timing: valid/ready in (from the sampler) and out (to the
// feature ports); at most one sample per cycle leaves.
module sample_dispatch
  import gnn_pkg::*;
#(
  parameter int unsigned P_WAYS   = WAYS,
  parameter int unsigned P_SAMPLE = SAMPLE,
  parameter int unsigned P_IDX_W  = IDX_W,
  parameter int unsigned P_ID_W   = ID_W,
  parameter int unsigned P_N_SEG  = N_SEG,
  parameter int unsigned SBUF_DEPTH = 16,
  localparam int unsigned MULT_W  = $clog2(P_SAMPLE + 1),
  localparam int unsigned SEG_W   = (P_N_SEG > 1) ? $clog2(P_N_SEG) : 1,
  localparam int unsigned WSEL_W  = (P_WAYS > 1) ? $clog2(P_WAYS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              with_repl,
  input  logic [5:0]                        seg_shift,
  // from the streaming sampler
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [P_WAYS-1:0][P_IDX_W-1:0]    in_idx,
  input  logic [P_WAYS-1:0]                 in_mask,
  input  logic [P_WAYS-1:0][MULT_W-1:0]     in_mult,
  input  logic [P_ID_W-1:0]                 in_cid,
  input  logic                              in_eob,
  // one sample (or the end-of-batch marker) per cycle
  output logic                              o_valid,
  input  logic                              o_ready,
  output logic [SEG_W-1:0]                  o_seg,
  output logic [P_IDX_W-1:0]                o_local,
  output logic [P_ID_W-1:0]                 o_cid,
  output logic                              o_eob
);
  localparam int unsigned BW = P_WAYS * P_IDX_W + P_WAYS + P_WAYS * MULT_W + P_ID_W + 1;

  logic [BW-1:0] wr_d, rd_d;
  logic          h_valid, h_pop;
  logic [P_WAYS-1:0][P_IDX_W-1:0] h_idx;
  logic [P_WAYS-1:0]              h_mask;
  logic [P_WAYS-1:0][MULT_W-1:0]  h_mult;
  logic [P_ID_W-1:0]              h_cid;
  logic                           h_eob;
  logic [$clog2(SBUF_DEPTH+1)-1:0] unused_cnt;

  assign wr_d = {in_idx, in_mask, in_mult, in_cid, in_eob};
  assign {h_idx, h_mask, h_mult, h_cid, h_eob} = rd_d;

  sync_fifo #(.WIDTH(BW), .DEPTH(SBUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(wr_d),
    .rd_valid(h_valid), .rd_ready(h_pop), .rd_data(rd_d), .count(unused_cnt));

  // ways of the head beat already sent, and copies of the current way sent
  logic [P_WAYS-1:0] done_q;
  logic [MULT_W-1:0] rep_q;
  logic [P_WAYS-1:0] left;
  logic              any_left, last_copy, single_left;
  logic [WSEL_W-1:0] sel;
  logic [P_IDX_W-1:0] sel_idx;
  logic [MULT_W-1:0]  sel_mult;

  assign left = h_mask & ~done_q;
  assign any_left = |left;

  always_comb begin
    sel = '0;
    for (int w = P_WAYS - 1; w >= 0; w--) if (left[w]) sel = WSEL_W'(w);
    single_left = ((left & (left - 1'b1)) == '0);
  end

  assign sel_idx   = h_idx[sel];
  assign sel_mult  = with_repl ? h_mult[sel] : MULT_W'(1);
  assign last_copy = (rep_q + 1'b1 >= sel_mult);

  assign o_valid = h_valid && (h_eob || any_left);
  assign o_eob   = h_eob;
  assign o_cid   = h_cid;
  assign o_seg   = SEG_W'(sel_idx >> seg_shift);
  assign o_local = sel_idx & ((P_IDX_W'(1) << seg_shift) - 1'b1);

  // pop an empty or eob beat, or after the last copy of the last selected way
  assign h_pop = h_valid && (h_eob ? o_ready :
                 (!any_left || (o_ready && last_copy && single_left)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= '0;
      rep_q  <= '0;
    end else if (h_pop) begin
      done_q <= '0;
      rep_q  <= '0;
    end else if (o_valid && o_ready && !h_eob) begin
      if (last_copy) begin
        done_q[sel] <= 1'b1;
        rep_q       <= '0;
      end else begin
        rep_q <= rep_q + 1'b1;
      end
    end
  end
endmodule
