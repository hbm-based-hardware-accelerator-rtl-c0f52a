// streaming_sampler: samples neighbour nodes while their indexes stream in.
//
// Instead of addressing memory with random numbers (one sample per cycle,
// O(sample size)), the sampler lets the neighbour list of a node arrive as a
// burst of WAYS indexes per beat and decides on the fly which of them are
// taken, so sampling costs only the O(degree) burst itself.
//
// How it works (as published): SAMPLE random positions in [0, degree) are
// latched when `load` is pulsed at the start of a node; a position counter is
// cleared at the same time and steps by WAYS on every accepted beat. Way w of
// a beat stands at position counter + w and is compared with every latched
// random number. The OR of a way's SAMPLE comparator outputs is the sample
// mask (sampling without replacement); the number of matching comparators is
// the multiplicity of that neighbour (sampling with replacement). Both are
// produced for every beat so the consumer can pick either policy.
//
// Interface: one valid/ready input stream (indexes, CID, end-of-batch marker)
// and one registered output stream carrying the same beat with its mask and
// multiplicities. A beat flagged in_eob carries no indexes; it leaves with an
// all-zero mask and marks the end of a batch of central nodes (own choice).
// Timing: one register stage, one beat per cycle, in_ready = !out_valid ||
// out_ready. `load` must not coincide with an accepted input beat.
module streaming_sampler
  import gnn_pkg::*;
#(
  parameter int unsigned P_WAYS   = WAYS,
  parameter int unsigned P_SAMPLE = SAMPLE,
  parameter int unsigned P_IDX_W  = IDX_W,
  parameter int unsigned P_POS_W  = POS_W,
  parameter int unsigned P_ID_W   = ID_W,
  localparam int unsigned MULT_W  = $clog2(P_SAMPLE + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // random numbers of the next node
  input  logic                              load,
  input  logic [P_SAMPLE-1:0][P_POS_W-1:0]  rnd,
  // neighbour index beats
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [P_WAYS-1:0][P_IDX_W-1:0]    in_idx,
  input  logic [P_ID_W-1:0]                 in_cid,
  input  logic                              in_eob,
  // sampled beats
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [P_WAYS-1:0][P_IDX_W-1:0]    out_idx,
  output logic [P_WAYS-1:0]                 out_mask,
  output logic [P_WAYS-1:0][MULT_W-1:0]     out_mult,
  output logic [P_ID_W-1:0]                 out_cid,
  output logic                              out_eob
);
  logic [P_SAMPLE-1:0][P_POS_W-1:0] rnd_q;
  logic [P_POS_W-1:0]               pos_q;
  logic                             take;
  logic [P_WAYS-1:0][P_SAMPLE-1:0]  hit;
  logic [P_WAYS-1:0]                mask_d;
  logic [P_WAYS-1:0][MULT_W-1:0]    mult_d;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  // comparator array: way w against every random number
  always_comb begin
    for (int w = 0; w < P_WAYS; w++) begin
      mult_d[w] = '0;
      for (int s = 0; s < P_SAMPLE; s++) begin
        hit[w][s] = (rnd_q[s] == pos_q + P_POS_W'(w));
        mult_d[w] = mult_d[w] + MULT_W'(hit[w][s]);
      end
      mask_d[w] = |hit[w] && !in_eob;
      if (in_eob) mult_d[w] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_q     <= '0;
      pos_q     <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_mask  <= '0;
      out_mult  <= '0;
      out_cid   <= '0;
      out_eob   <= 1'b0;
    end else begin
      if (load) begin
        rnd_q <= rnd;
        pos_q <= '0;
      end else if (take && !in_eob) begin
        pos_q <= pos_q + P_POS_W'(P_WAYS);
      end
      if (take) begin
        out_valid <= 1'b1;
        out_idx   <= in_idx;
        out_mask  <= mask_d;
        out_mult  <= mult_d;
        out_cid   <= in_cid;
        out_eob   <= in_eob;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(load && take))
    else $error("streaming_sampler: load during an accepted beat");
endmodule
