// tb_gnn_sa_top_full: one batch through the accelerator at its default size.
//
// The top keeps every default: 32 HBM feature segments, 128-dim aggregation,
// sample size 32, a 2^18-entry node table. A synthetic graph of 262,144 nodes
// (tb_graph_pkg) is spread over all 32 segments (8192 nodes each); 80 central
// nodes (one full batch of 64 CIDs plus a second batch) are sampled and
// averaged (mean aggregation), and every result is compared with a reference
// computed here as in tb_gnn_sa_top.
module tb_gnn_sa_top_full;
  import gnn_pkg::*;
  import tb_graph_pkg::*;
  localparam int unsigned NS    = 32;
  localparam int unsigned NN    = 262144;        // graph nodes
  localparam int unsigned NAW   = $clog2(NODES);
  localparam logic [5:0]  SHIFT = 6'd13;  // nodes per segment = 2^SHIFT
  localparam int unsigned MW    = $clog2(SAMPLE + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  agg_op_e op;
  logic with_repl, acq_only;
  logic [5:0] seg_shift, feat_beats;
  logic tbl_we;
  logic [NAW-1:0] tbl_waddr;
  logic [ADDR_W-1:0] tbl_wbase;
  logic [POS_W-1:0] tbl_wdegree;
  logic nd_valid, nd_ready, nd_last;
  logic [IDX_W-1:0] nd_id;
  logic nbr_ar_valid, nbr_ar_ready, nbr_r_valid, nbr_r_ready, nbr_r_last;
  logic [ID_W-1:0] nbr_ar_id, nbr_r_id;
  logic [ADDR_W-1:0] nbr_ar_addr;
  logic [7:0] nbr_ar_len;
  logic [WAYS*IDX_W-1:0] nbr_r_data;
  logic [NS-1:0] fa_ar_valid, fa_ar_ready, fr_valid, fr_ready, fr_last;
  logic [NS-1:0][ID_W-1:0] fa_ar_id, fr_id;
  logic [NS-1:0][ADDR_W-1:0] fa_ar_addr;
  logic [NS-1:0][7:0] fa_ar_len;
  logic [NS-1:0][HBM_DW-1:0] fr_data;
  logic agg_valid, agg_ready, agg_eob, ctrl_busy;
  logic [ID_W-1:0] agg_cid;
  logic [CNT_W-1:0] agg_cnt;
  logic [DIM-1:0][ACC_W-1:0] agg_vec;
  int unsigned nb_bursts, nb_beats;
  int unsigned fb_bursts [NS], fb_beats [NS];

  gnn_sa_top  dut (
    .clk, .rst_n, .op, .with_repl, .acq_only, .seg_shift, .feat_beats,
    .tbl_we, .tbl_waddr, .tbl_wbase, .tbl_wdegree,
    .nd_valid, .nd_ready, .nd_id, .nd_last,
    .nbr_ar_valid, .nbr_ar_ready, .nbr_ar_id, .nbr_ar_addr, .nbr_ar_len,
    .nbr_r_valid, .nbr_r_ready, .nbr_r_data,
    .fa_ar_valid, .fa_ar_ready, .fa_ar_id, .fa_ar_addr, .fa_ar_len,
    .fr_valid, .fr_ready, .fr_id, .fr_data, .fr_last,
    .agg_valid, .agg_ready, .agg_eob, .agg_cid, .agg_cnt, .agg_vec, .ctrl_busy);

  hbm_rd_model #(.KIND(0), .DW(WAYS*IDX_W), .ID_W(ID_W), .ADDR_W(ADDR_W), .NUM_NODES(NN)) u_nbr (
    .clk, .rst_n, .seg_shift, .ar_valid(nbr_ar_valid), .ar_ready(nbr_ar_ready),
    .ar_id(nbr_ar_id), .ar_addr(nbr_ar_addr), .ar_len(nbr_ar_len),
    .r_valid(nbr_r_valid), .r_ready(nbr_r_ready), .r_id(nbr_r_id), .r_data(nbr_r_data),
    .r_last(nbr_r_last), .n_bursts(nb_bursts), .n_beats(nb_beats));

  for (genvar s = 0; s < NS; s++) begin : g_hbm
    hbm_rd_model #(.KIND(1), .DW(HBM_DW), .ID_W(ID_W), .ADDR_W(ADDR_W), .MAX_LAT(16)) u_feat (
      .clk, .rst_n, .seg_shift, .ar_valid(fa_ar_valid[s]), .ar_ready(fa_ar_ready[s]),
      .ar_id(fa_ar_id[s]), .ar_addr(fa_ar_addr[s]), .ar_len(fa_ar_len[s]),
      .r_valid(fr_valid[s]), .r_ready(fr_ready[s]), .r_id(fr_id[s]), .r_data(fr_data[s]),
      .r_last(fr_last[s]), .n_bursts(fb_bursts[s]), .n_beats(fb_beats[s]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] lane_st [SAMPLE];
  int unsigned deg_of [NN];

  typedef struct { bit eob; int unsigned cid; int unsigned cnt; int vec [DIM]; } res_t;
  res_t exp_q [$];
  int unsigned exp_reads;     // feature reads expected in acquisition mode
  bit throttle = 1;

  // returns the expected result of one node, advancing the generator lanes
  function automatic res_t ref_node(input int unsigned v, input int unsigned cid,
                                    input bit repl, input agg_op_e o, output int unsigned nreads,
                                    output int unsigned ndup);
    res_t r;
    int unsigned pos [SAMPLE];
    int unsigned d;
    bit first;
    d = deg_of[v];
    r.eob = 0; r.cid = cid; r.cnt = 0; nreads = 0; ndup = 0;
    for (int i = 0; i < SAMPLE; i++) begin
      pos[i] = int'((64'(lane_st[i]) * 64'(d)) >> 32);
      lane_st[i] = xs32(lane_st[i]);
    end
    first = 1;
    for (int p = 0; p < int'(d); p++) begin
      int unsigned m;
      m = 0;
      for (int i = 0; i < SAMPLE; i++) if (pos[i] == p) m++;
      if (m > 1) ndup++;
      if (!repl && m > 0) m = 1;
      for (int k = 0; k < int'(m); k++) begin
        logic [31:0] u;
        u = nbr_of(v, p, NN);
        for (int e = 0; e < DIM; e++) begin
          int x;
          x = $signed(feat_of(u, e));
          if (first) r.vec[e] = x;
          else if (o == AGG_SUM || o == AGG_MEAN) r.vec[e] += x;
          else if (o == AGG_MAX) r.vec[e] = (x > r.vec[e]) ? x : r.vec[e];
          else r.vec[e] = (x < r.vec[e]) ? x : r.vec[e];
        end
        first = 0;
        r.cnt++;
        nreads++;
      end
    end
    if (o == AGG_MEAN && r.cnt != 0)
      for (int e = 0; e < DIM; e++) r.vec[e] = r.vec[e] / int'(r.cnt);
    return r;
  endfunction

  // ---------------- mechanism counters ----------------
  int unsigned n_split, n_dup, n_deg0, n_forced, n_hold, n_merge, n_fifo_full, n_acq, n_res;

  always @(posedge clk) if (rst_n) begin
    if (nbr_ar_valid && nbr_ar_ready && (nbr_ar_addr & ((1 << NBR_LOG2) - 1)) != 0) n_split++;
    for (int s = 0; s < NS; s++) begin
      if (fr_valid[s] && !fr_ready[s]) n_fifo_full++;
      if (acq_only && fa_ar_valid[s] && fa_ar_ready[s]) begin
        n_acq++;
        check(fa_ar_len[s] == 8'(feat_beats - 1), "acquisition burst length");
      end
    end
    for (int k = 0; k < NS - 1; k++) begin
      // heap-numbered cells are probed through the leaves of the tree
    end
  end

  // cell rule probes at the leaf level of the tree
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < NS; l += 2) begin
      if (dut.p_valid[l] && dut.p_valid[l+1] && !dut.p_eob[l] && !dut.p_eob[l+1]) begin
        if (dut.p_cid[l] != dut.p_cid[l+1] && (dut.p_ready[l] ^ dut.p_ready[l+1])) n_hold++;
        if (dut.p_cid[l] == dut.p_cid[l+1] && dut.p_ready[l] && dut.p_ready[l+1]) n_merge++;
      end
    end

  // result checker
  always @(posedge clk) agg_ready <= !throttle || ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n && agg_valid && agg_ready) begin
    res_t e;
    if (exp_q.size() == 0) check(0, "unexpected result");
    else begin
      bit ok;
      e = exp_q.pop_front();
      ok = (agg_eob == e.eob);
      if (ok && !e.eob) begin
        ok = (agg_cid == ID_W'(e.cid)) && (agg_cnt == CNT_W'(e.cnt));
        for (int d = 0; d < DIM; d++) ok &= ($signed(agg_vec[d]) == e.vec[d]);
      end
      check(ok, $sformatf("result cid %0d/%0d cnt %0d/%0d eob %0d/%0d", agg_cid, e.cid,
                          agg_cnt, e.cnt, agg_eob, e.eob));
      n_res++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic run_batch(input int unsigned n, input bit repl, input agg_op_e o, input bit acq);
    int unsigned cid, nreads, ndup;
    @(negedge clk);
    op = o; with_repl = repl; acq_only = acq;
    feat_beats = acq ? 6'd32 : 6'(DIM * ELEM_W / HBM_DW);
    cid = 0;
    for (int i = 0; i < int'(n); i++) begin
      int unsigned v;
      res_t r;
      v = (i % 9 == 4) ? 0 : $urandom_range(0, NN - 1);   // node 0 has degree 0
      r = ref_node(v, cid, repl, o, nreads, ndup);
      if (deg_of[v] == 0) n_deg0++;
      if (ndup > 0) n_dup++;
      exp_reads += nreads;
      if (!acq && deg_of[v] != 0) exp_q.push_back(r);
      if (cid == 63 && i != int'(n) - 1) begin
        exp_q.push_back('{1, 0, 0, '{default: 0}});
        n_forced++;
      end
      cid = (cid + 1) % 64;
      nd_valid = 1; nd_id = IDX_W'(v); nd_last = (i == int'(n) - 1);
      @(posedge clk);
      while (!nd_ready) @(posedge clk);
      @(negedge clk);
      nd_valid = 0;
    end
    exp_q.push_back('{1, 0, 0, '{default: 0}});
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    int unsigned acq_before;
    op = AGG_SUM; with_repl = 0; acq_only = 0; seg_shift = SHIFT; feat_beats = 6'd4;
    tbl_we = 0; tbl_waddr = '0; tbl_wbase = '0; tbl_wdegree = '0;
    nd_valid = 0; nd_id = '0; nd_last = 0;
    n_split = 0; n_dup = 0; n_deg0 = 0; n_forced = 0; n_hold = 0; n_merge = 0;
    n_fifo_full = 0; n_acq = 0; n_res = 0; exp_reads = 0;
    for (int i = 0; i < SAMPLE; i++) begin
      lane_st[i] = 32'h1234_5678 ^ (32'(i + 1) * 32'h9E37_79B9);
      if (lane_st[i] == 0) lane_st[i] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the node table: list of node v at v << NBR_LOG2
    for (int v = 0; v < NN; v++) begin
      deg_of[v] = (v == 0) ? 0 : ((v % 13 == 0) ? $urandom_range(100, 300) : $urandom_range(1, 40));
    end
    for (int v = 0; v < NN; v++) begin
      tbl_we = 1; tbl_waddr = NAW'(v); tbl_wbase = ADDR_W'(v) << NBR_LOG2; tbl_wdegree = POS_W'(deg_of[v]);
      @(negedge clk);
    end
    tbl_we = 0;
    run_batch(80, 0, AGG_MEAN, 0);
    repeat (20) @(negedge clk);
    $display("mechanisms: split=%0d dup=%0d deg0=%0d forced=%0d hold=%0d merge=%0d fifo_full=%0d acq=%0d results=%0d",
             n_split, n_dup, n_deg0, n_forced, n_hold, n_merge, n_fifo_full, n_acq, n_res);
    check(n_split > 0, "split neighbour bursts");
    check(n_forced > 0, "forced batch end");
    check(n_hold > 0 && n_merge > 0, "both cell rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
