// feature_acq_array: feature acquisition array (sample buffer + HBM loaders).
//
// Takes the sampled beats of the streaming sampler, buffers them and hands
// each sample to the loader of the HBM segment that stores its feature row
// (sample_dispatch), and holds one feature_port per segment, which turns the
// samples into AXI reads tagged with the central node's CID. An end-of-batch
// marker is broadcast: it is handed to every segment in the same cycle, once
// all their queues can take it.
//
// Interface: valid/ready beats in, N_SEG AXI read-address channels out (as
// arrays), r_done per segment in (a last beat was handshaken) and an
// eob_valid/eob_ready pair per segment out to the partial aggregators.
// Throughput: one sample per cycle enters the segment queues.
module feature_acq_array
  import gnn_pkg::*;
#(
  parameter int unsigned P_WAYS      = WAYS,
  parameter int unsigned P_SAMPLE    = SAMPLE,
  parameter int unsigned P_IDX_W     = IDX_W,
  parameter int unsigned P_ID_W      = ID_W,
  parameter int unsigned P_ADDR_W    = ADDR_W,
  parameter int unsigned P_N_SEG     = N_SEG,
  parameter int unsigned P_SEG_LOG2  = SEG_LOG2,
  parameter int unsigned P_ROW_BYTES = ROW_BYTES,
  localparam int unsigned MULT_W     = $clog2(P_SAMPLE + 1),
  localparam int unsigned SEG_W      = (P_N_SEG > 1) ? $clog2(P_N_SEG) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              with_repl,
  input  logic [5:0]                        seg_shift,
  input  logic [5:0]                        feat_beats,
  // from the streaming sampler
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [P_WAYS-1:0][P_IDX_W-1:0]    in_idx,
  input  logic [P_WAYS-1:0]                 in_mask,
  input  logic [P_WAYS-1:0][MULT_W-1:0]     in_mult,
  input  logic [P_ID_W-1:0]                 in_cid,
  input  logic                              in_eob,
  // HBM feature segments
  output logic [P_N_SEG-1:0]                ar_valid,
  input  logic [P_N_SEG-1:0]                ar_ready,
  output logic [P_N_SEG-1:0][P_ID_W-1:0]    ar_id,
  output logic [P_N_SEG-1:0][P_ADDR_W-1:0]  ar_addr,
  output logic [P_N_SEG-1:0][7:0]           ar_len,
  input  logic [P_N_SEG-1:0]                r_done,
  // end of batch per segment
  output logic [P_N_SEG-1:0]                eob_valid,
  input  logic [P_N_SEG-1:0]                eob_ready
);
  logic               d_valid, d_ready, d_eob;
  logic [SEG_W-1:0]   d_seg;
  logic [P_IDX_W-1:0] d_local;
  logic [P_ID_W-1:0]  d_cid;
  logic [P_N_SEG-1:0] q_valid, q_ready;

  sample_dispatch #(
    .P_WAYS(P_WAYS), .P_SAMPLE(P_SAMPLE), .P_IDX_W(P_IDX_W), .P_ID_W(P_ID_W),
    .P_N_SEG(P_N_SEG)
  ) u_dispatch (
    .clk, .rst_n, .with_repl, .seg_shift,
    .in_valid, .in_ready, .in_idx, .in_mask, .in_mult, .in_cid, .in_eob,
    .o_valid(d_valid), .o_ready(d_ready), .o_seg(d_seg), .o_local(d_local),
    .o_cid(d_cid), .o_eob(d_eob));

  always_comb begin
    for (int s = 0; s < P_N_SEG; s++)
      q_valid[s] = d_valid && (d_eob ? (&q_ready) : (d_seg == SEG_W'(s)));
    d_ready = d_eob ? (&q_ready) : q_ready[d_seg];
  end

  for (genvar s = 0; s < P_N_SEG; s++) begin : g_port
    feature_port #(
      .SEG(s), .P_IDX_W(P_IDX_W), .P_ID_W(P_ID_W), .P_ADDR_W(P_ADDR_W),
      .P_SEG_LOG2(P_SEG_LOG2), .P_ROW_BYTES(P_ROW_BYTES)
    ) u_port (
      .clk, .rst_n, .feat_beats,
      .req_valid(q_valid[s]), .req_ready(q_ready[s]), .req_local(d_local),
      .req_cid(d_cid), .req_eob(d_eob),
      .ar_valid(ar_valid[s]), .ar_ready(ar_ready[s]), .ar_id(ar_id[s]),
      .ar_addr(ar_addr[s]), .ar_len(ar_len[s]), .r_done(r_done[s]),
      .eob_valid(eob_valid[s]), .eob_ready(eob_ready[s]));
  end
endmodule
