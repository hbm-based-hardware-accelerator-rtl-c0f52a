// tb_minheap_aggregator: self-checking test of the min-heap aggregator tree.
//
// Eight leaf streams are filled with partial results: in every batch each
// leaf holds a random subset of the CIDs 0..63 in increasing order (some
// leaves none, some CIDs in no leaf), each with a random count and vector,
// and ends with an end-of-batch marker. Leaves present their heads with
// random gaps and the root is throttled at random. The expected root stream,
// computed here, is every CID present in some leaf, once, in increasing
// order, with counts added and vectors combined by the operator, then one
// marker per batch. The Fig. 7 situation (unequal CIDs at a cell, the larger
// one held) is counted and must occur. A last phase with all leaves full and
// the root always ready checks one result per cycle.
module tb_minheap_aggregator;
  import gnn_pkg::*;
  localparam int unsigned NL = 8;
  localparam int unsigned D  = DIM;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  agg_op_e op;
  logic [NL-1:0] in_valid, in_ready, in_eob;
  logic [NL-1:0][ID_W-1:0] in_cid;
  logic [NL-1:0][CNT_W-1:0] in_cnt;
  logic [NL-1:0][D-1:0][ACC_W-1:0] in_vec;
  logic o_valid, o_ready, o_eob;
  logic [ID_W-1:0] o_cid;
  logic [CNT_W-1:0] o_cnt;
  logic [D-1:0][ACC_W-1:0] o_vec;

  minheap_aggregator #(.P_N_SEG(NL), .P_DIM(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit eob; int unsigned cid; int unsigned cnt; logic [D-1:0][ACC_W-1:0] vec; } ent_t;
  ent_t leaf_q [NL][$];
  ent_t exp_q [$];
  bit gaps = 1, throttle = 1;
  int unsigned n_out, holds;

  function automatic logic [ACC_W-1:0] comb(input agg_op_e o, input logic [ACC_W-1:0] a, input logic [ACC_W-1:0] b);
    int x, y;
    x = $signed(a); y = $signed(b);
    case (o)
      AGG_MAX: return ACC_W'((x > y) ? x : y);
      AGG_MIN: return ACC_W'((x < y) ? x : y);
      default: return ACC_W'(x + y);
    endcase
  endfunction

  // leaf drivers
  always @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (rst_n && in_valid[l] && in_ready[l]) void'(leaf_q[l].pop_front());
    end
    for (int l = 0; l < NL; l++) begin
      if (leaf_q[l].size() > 0 && (!gaps || $urandom_range(0, 3) != 0 || (in_valid[l] && !in_ready[l]))) begin
        in_valid[l] <= 1;
        in_eob[l] <= leaf_q[l][0].eob; in_cid[l] <= ID_W'(leaf_q[l][0].cid);
        in_cnt[l] <= CNT_W'(leaf_q[l][0].cnt); in_vec[l] <= leaf_q[l][0].vec;
      end else in_valid[l] <= 0;
    end
    o_ready <= !throttle || ($urandom_range(0, 3) != 0);
  end

  // a cell holding its larger-CID side while passing the smaller one
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < NL; l += 2)
      if (in_valid[l] && in_valid[l+1] && !in_eob[l] && !in_eob[l+1] &&
          in_cid[l] != in_cid[l+1] && (in_ready[l] ^ in_ready[l+1])) holds++;

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    ent_t e;
    n_out++;
    if (exp_q.size() == 0) check(0, "unexpected result");
    else begin
      e = exp_q.pop_front();
      check(o_eob == e.eob && (e.eob || (o_cid == ID_W'(e.cid) && o_cnt == CNT_W'(e.cnt) && o_vec == e.vec)),
            $sformatf("root result cid %0d/%0d cnt %0d/%0d eob %0d", o_cid, e.cid, o_cnt, e.cnt, e.eob));
    end
  end

  task automatic make_batch(input int unsigned density);
    for (int c = 0; c < 64; c++) begin
      ent_t acc;
      bit have;
      have = 0;
      for (int l = 0; l < NL; l++) begin
        if ($urandom_range(0, 99) < density && !(l == 3 && density < 100)) begin
          ent_t e;
          e.eob = 0; e.cid = c; e.cnt = $urandom_range(1, 4);
          for (int d = 0; d < D; d++) e.vec[d] = ACC_W'($urandom_range(0, 600) - 300);
          leaf_q[l].push_back(e);
          if (!have) acc = e;
          else begin
            acc.cnt += e.cnt;
            for (int d = 0; d < D; d++) acc.vec[d] = comb(op, acc.vec[d], e.vec[d]);
          end
          have = 1;
        end
      end
      if (have) exp_q.push_back(acc);
    end
    for (int l = 0; l < NL; l++) leaf_q[l].push_back('{1, 0, 0, '0});
    exp_q.push_back('{1, 0, 0, '0});
  endtask

  initial begin
    int t0, n0;
    in_valid = '0; in_eob = '0; in_cid = '0; in_cnt = '0; in_vec = '0;
    n_out = 0; holds = 0;
    op = AGG_SUM;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_batch(30); make_batch(5); make_batch(60);
    while (exp_q.size() != 0) @(negedge clk);
    op = AGG_MAX; make_batch(40);
    while (exp_q.size() != 0) @(negedge clk);
    op = AGG_MIN; make_batch(40);
    while (exp_q.size() != 0) @(negedge clk);
    check(holds > 0, $sformatf("unequal CIDs held at a cell (%0d times)", holds));
    // rate: every leaf holds every CID, no gaps, root always ready
    op = AGG_SUM; gaps = 0; throttle = 0;
    make_batch(100); make_batch(100);
    n0 = n_out;
    repeat (20) @(negedge clk);
    t0 = $time;
    n0 = n_out;
    repeat (64) @(negedge clk);
    check(n_out - n0 >= 60, $sformatf("root rate: %0d results in 64 cycles", n_out - n0));
    while (exp_q.size() != 0) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
