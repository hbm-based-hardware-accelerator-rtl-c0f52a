// tb_sampler_ctrl: self-checking test of the sampling controller.
//
// A table of random {base, degree} (degree 0..200, some 0) answers lookups
// with one cycle of latency and an HBM read model serves the neighbour lists.
// The test sends batches of central nodes (one of them longer than 2^ID_W
// nodes) and checks: every node's degree reaches rand_gen; the AXI bursts of
// a node are contiguous from its base, no longer than MAX_BURST and carry
// the node's CID; exactly ceil(degree / WAYS) beats reach the sampler side
// with the right CID and data; an end-of-batch beat follows the last node of
// a batch or the 2^ID_W-th node; CIDs restart at 0 after it.
module tb_sampler_ctrl;
  import gnn_pkg::*;
  import tb_graph_pkg::*;
  localparam int unsigned NN  = 1024;
  localparam int unsigned NAW = $clog2(NN);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic nd_valid, nd_ready, nd_last;
  logic [IDX_W-1:0] nd_id;
  logic mem_ren;
  logic [NAW-1:0] mem_raddr;
  logic [ADDR_W-1:0] mem_base;
  logic [POS_W-1:0] mem_degree;
  logic rg_req;
  logic [POS_W-1:0] rg_degree;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [ID_W-1:0] ar_id, r_id;
  logic [ADDR_W-1:0] ar_addr;
  logic [7:0] ar_len;
  logic [WAYS*IDX_W-1:0] r_data;
  logic s_valid, s_ready, s_eob, busy;
  logic [WAYS-1:0][IDX_W-1:0] s_idx;
  logic [ID_W-1:0] s_cid;
  int unsigned n_bursts, n_beats;

  sampler_ctrl #(.P_NODES(NN)) dut (
    .clk, .rst_n, .nd_valid, .nd_ready, .nd_id, .nd_last,
    .mem_ren, .mem_raddr, .mem_base, .mem_degree, .rg_req, .rg_degree,
    .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data,
    .s_valid, .s_ready, .s_idx, .s_cid, .s_eob, .busy);

  hbm_rd_model #(.KIND(0), .DW(WAYS*IDX_W), .ID_W(ID_W), .ADDR_W(ADDR_W), .NUM_NODES(NN)) u_hbm (
    .clk, .rst_n, .seg_shift(6'd0), .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len,
    .r_valid, .r_ready, .r_id, .r_data, .r_last, .n_bursts, .n_beats);

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

  // node table
  logic [POS_W-1:0] deg [NN];
  always @(posedge clk) if (mem_ren) begin
    mem_base   <= ADDR_W'(mem_raddr) << NBR_LOG2;
    mem_degree <= deg[mem_raddr];
  end

  // expectations, in node order
  int unsigned exp_node [$];
  logic [ID_W-1:0] exp_cid [$];
  bit exp_eob_after [$];
  int unsigned cur_node, beats_seen, beats_want, ar_beats;
  logic [ID_W-1:0] cur_cid;
  bit cur_eob;
  int unsigned eobs_seen;

  always @(posedge clk) s_ready <= ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if (rg_req) begin
      check(exp_node.size() > 0, "rg_req with a node pending");
      cur_node = exp_node.pop_front();
      cur_cid  = exp_cid.pop_front();
      cur_eob  = exp_eob_after.pop_front();
      check(rg_degree == deg[cur_node], "degree to rand_gen");
      beats_seen = 0; ar_beats = 0;
      beats_want = (deg[cur_node] + WAYS - 1) / WAYS;
    end
    if (ar_valid && ar_ready) begin
      check(ar_addr == (ADDR_W'(cur_node) << NBR_LOG2) + ADDR_W'(ar_beats * WAYS * 4), "burst address");
      check(ar_len < MAX_BURST, "burst length");
      check(ar_id == cur_cid, "ARID = CID");
      ar_beats += ar_len + 1;
      check(ar_beats <= beats_want, "no over-read");
    end
    if (s_valid && s_ready) begin
      if (s_eob) begin
        check(cur_eob && beats_seen == beats_want, "eob after the batch's last node");
        eobs_seen++;
      end else begin
        check(s_cid == cur_cid, "beat CID");
        for (int w = 0; w < WAYS; w++)
          check(s_idx[w] == nbr_of(cur_node, beats_seen * WAYS + w, NN), "beat data");
        beats_seen++;
        check(beats_seen <= beats_want, "beats per node");
      end
    end
  end

  task automatic send_batch(input int unsigned n);
    logic [ID_W-1:0] c;
    c = 0;
    for (int i = 0; i < n; i++) begin
      int unsigned v;
      v = $urandom_range(0, NN - 1);
      exp_node.push_back(v);
      exp_cid.push_back(c);
      exp_eob_after.push_back(i == n - 1 || c == '1);
      c++;
      @(negedge clk);
      nd_valid = 1; nd_id = IDX_W'(v); nd_last = (i == n - 1);
      @(posedge clk);
      while (!nd_ready) @(posedge clk);
      @(negedge clk);
      nd_valid = 0;
      // beats of the previous node must all have arrived before the next lookup
    end
  endtask

  initial begin
    int unsigned want_eobs;
    nd_valid = 0; nd_id = '0; nd_last = 0; eobs_seen = 0;
    for (int i = 0; i < NN; i++) deg[i] = (i % 11 == 0) ? 0 : $urandom_range(1, 200);
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_batch(5);
    send_batch(1);
    send_batch(70);   // 64 CIDs, then a forced batch end, then 6 more
    send_batch(20);
    want_eobs = 5;
    while (busy || eobs_seen < want_eobs) @(negedge clk);
    repeat (5) @(negedge clk);
    check(eobs_seen == want_eobs, "number of batch ends");
    check(exp_node.size() == 0, "all nodes processed");
    check(beats_seen == beats_want, "last node complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
