// sampler_ctrl: controller of the sampling front end.
//
// For each central node taken from the node stream it
//   1. reads {base, degree} from the on-chip table (1-cycle RAM),
//   2. asks rand_gen for SAMPLE positions in [0, degree) (the sampler latches
//      them one cycle later, through the rnd_valid -> load connection),
//   3. reads the neighbour list from the HBM neighbour-index segment as AXI
//      bursts of at most MAX_BURST beats with ARID = CID, and
//   4. forwards every returned beat to the streaming sampler tagged with the
//      node's CID.
// CIDs count 0, 1, 2, ... within a batch. A batch ends with a node flagged
// nd_last or when the 2^ID_W CIDs are used up; the controller then sends one
// end-of-batch beat through the sampler and restarts CIDs at 0. A node of
// degree 0 uses up its CID but produces no samples.
//
// The architecture names a controller that runs the system; the sequence,
// the batch rule and the burst splitting here are this design's own choice.
// Neighbour lists are assumed to start on a beat boundary (WAYS indexes).
// Reads of one node complete before the next node's table read starts, so
// the sampler never mixes the random numbers of two nodes. The returned
// neighbour beats pass to the sampler unchanged, only tagged and flagged.
module sampler_ctrl
  import gnn_pkg::*;
#(
  parameter int unsigned P_WAYS      = WAYS,
  parameter int unsigned P_IDX_W     = IDX_W,
  parameter int unsigned P_POS_W     = POS_W,
  parameter int unsigned P_ADDR_W    = ADDR_W,
  parameter int unsigned P_ID_W      = ID_W,
  parameter int unsigned P_MAX_BURST = MAX_BURST,
  parameter int unsigned P_NODES     = NODES,
  localparam int unsigned NAW        = $clog2(P_NODES),
  localparam int unsigned BEAT_BYTES = P_WAYS * P_IDX_W / 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // central nodes
  input  logic                          nd_valid,
  output logic                          nd_ready,
  input  logic [P_IDX_W-1:0]            nd_id,
  input  logic                          nd_last,
  // on-chip table
  output logic                          mem_ren,
  output logic [NAW-1:0]                mem_raddr,
  input  logic [P_ADDR_W-1:0]           mem_base,
  input  logic [P_POS_W-1:0]            mem_degree,
  // random number request
  output logic                          rg_req,
  output logic [P_POS_W-1:0]            rg_degree,
  // neighbour-index segment, AXI read address/data
  output logic                          ar_valid,
  input  logic                          ar_ready,
  output logic [P_ID_W-1:0]             ar_id,
  output logic [P_ADDR_W-1:0]           ar_addr,
  output logic [7:0]                    ar_len,
  input  logic                          r_valid,
  output logic                          r_ready,
  input  logic [P_WAYS*P_IDX_W-1:0]     r_data,
  // to the streaming sampler
  output logic                          s_valid,
  input  logic                          s_ready,
  output logic [P_WAYS-1:0][P_IDX_W-1:0] s_idx,
  output logic [P_ID_W-1:0]             s_cid,
  output logic                          s_eob,
  // status
  output logic                          busy
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_STREAM, S_NEXT, S_EOB} state_e;
  state_e state;

  logic [P_ID_W-1:0]   cid;
  logic                last_q;
  logic [P_ADDR_W-1:0] base_q;
  logic [P_POS_W-1:0]  beats_tot, beats_req, beats_got;
  logic [P_POS_W-1:0]  remain;
  logic [P_POS_W-1:0]  burst;

  assign busy      = (state != S_IDLE);
  assign nd_ready  = (state == S_IDLE);
  assign mem_ren   = nd_valid && nd_ready;
  assign mem_raddr = NAW'(nd_id);
  assign rg_req    = (state == S_LOOK);
  assign rg_degree = mem_degree;

  assign remain   = beats_tot - beats_req;
  assign burst    = (remain > P_POS_W'(P_MAX_BURST)) ? P_POS_W'(P_MAX_BURST) : remain;
  assign ar_valid = (state == S_STREAM) && (beats_req != beats_tot);
  assign ar_id    = cid;
  assign ar_addr  = base_q + P_ADDR_W'(beats_req) * P_ADDR_W'(BEAT_BYTES);
  assign ar_len   = 8'(burst - 1'b1);

  // R beats go straight to the sampler; the end-of-batch beat is injected
  assign r_ready  = (state == S_STREAM) && s_ready;
  assign s_valid  = ((state == S_STREAM) && r_valid) || (state == S_EOB);
  assign s_idx    = r_data;
  assign s_cid    = cid;
  assign s_eob    = (state == S_EOB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cid       <= '0;
      last_q    <= 1'b0;
      base_q    <= '0;
      beats_tot <= '0;
      beats_req <= '0;
      beats_got <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (nd_valid) begin
          last_q <= nd_last;
          state  <= S_LOOK;
        end
        S_LOOK: begin
          base_q    <= mem_base;
          beats_tot <= (mem_degree + P_POS_W'(P_WAYS - 1)) / P_POS_W'(P_WAYS);
          beats_req <= '0;
          beats_got <= '0;
          state     <= (mem_degree == '0) ? S_NEXT : S_STREAM;
        end
        S_STREAM: begin
          if (ar_valid && ar_ready) beats_req <= beats_req + burst;
          if (r_valid && r_ready) begin
            beats_got <= beats_got + 1'b1;
            if (beats_got + 1'b1 == beats_tot) state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (last_q || (cid == '1)) state <= S_EOB;
          else begin
            cid   <= cid + 1'b1;
            state <= S_IDLE;
          end
        end
        S_EOB: if (s_ready) begin
          cid   <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
