// tb_agg_tree_cell: self-checking test of one min-heap aggregator cell.
//
// Two input streams of partial results with increasing CIDs (overlapping at
// random) and a closing end-of-batch marker each are presented with random
// gaps; the output is throttled at random. The expected output is their
// merge: equal CIDs combined (counts added, lanes summed / max / min), the
// smaller CID first otherwise, and one marker when both markers meet. It
// also checks that the held side really is held (its ready stays low while
// the other side passes) and that with both sides always valid the cell
// produces one result per cycle.
module tb_agg_tree_cell;
  import gnn_pkg::*;
  localparam int unsigned D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  agg_op_e op;
  logic a_valid, a_ready, a_eob, b_valid, b_ready, b_eob, o_valid, o_ready, o_eob;
  logic [ID_W-1:0] a_cid, b_cid, o_cid;
  logic [CNT_W-1:0] a_cnt, b_cnt, o_cnt;
  logic [D-1:0][ACC_W-1:0] a_vec, b_vec, o_vec;

  agg_tree_cell #(.P_DIM(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit eob; int unsigned cid; int unsigned cnt; logic [D-1:0][ACC_W-1:0] vec; } ent_t;
  ent_t qa [$], qb [$], qe [$];
  bit gaps = 1;
  int unsigned n_out, n_hold, n_merge;

  function automatic logic [ACC_W-1:0] comb(input agg_op_e o, input logic [ACC_W-1:0] x, input logic [ACC_W-1:0] y);
    case (o)
      AGG_MAX: return ($signed(x) > $signed(y)) ? x : y;
      AGG_MIN: return ($signed(x) < $signed(y)) ? x : y;
      default: return x + y;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && a_valid && a_ready) void'(qa.pop_front());
    if (rst_n && b_valid && b_ready) void'(qb.pop_front());
    if (qa.size() > 0 && (!gaps || $urandom_range(0, 3) != 0 || (a_valid && !a_ready))) begin
      a_valid <= 1; a_eob <= qa[0].eob; a_cid <= ID_W'(qa[0].cid); a_cnt <= CNT_W'(qa[0].cnt); a_vec <= qa[0].vec;
    end else a_valid <= 0;
    if (qb.size() > 0 && (!gaps || $urandom_range(0, 3) != 0 || (b_valid && !b_ready))) begin
      b_valid <= 1; b_eob <= qb[0].eob; b_cid <= ID_W'(qb[0].cid); b_cnt <= CNT_W'(qb[0].cnt); b_vec <= qb[0].vec;
    end else b_valid <= 0;
    o_ready <= !gaps || ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_valid && b_valid && !a_eob && !b_eob && a_cid != b_cid && (a_ready || b_ready)) begin
      n_hold++;
      check((a_cid < b_cid) ? (a_ready && !b_ready) : (b_ready && !a_ready), "smaller CID passes, larger held");
    end
    if (a_valid && b_valid && a_cid == b_cid && !a_eob && !b_eob && a_ready) begin
      n_merge++;
      check(b_ready, "equal CIDs consumed together");
    end
    if (o_valid && o_ready) begin
      ent_t e;
      n_out++;
      if (qe.size() == 0) check(0, "unexpected output");
      else begin
        e = qe.pop_front();
        check(o_eob == e.eob && (e.eob || (o_cid == ID_W'(e.cid) && o_cnt == CNT_W'(e.cnt) && o_vec == e.vec)),
              $sformatf("output cid %0d/%0d", o_cid, e.cid));
      end
    end
  end

  task automatic make_batch();
    for (int c = 0; c < 64; c++) begin
      ent_t ea, eb;
      bit ha, hb;
      ha = $urandom_range(0, 2) != 0; hb = $urandom_range(0, 2) != 0;
      ea.eob = 0; ea.cid = c; ea.cnt = $urandom_range(1, 5);
      eb.eob = 0; eb.cid = c; eb.cnt = $urandom_range(1, 5);
      for (int d = 0; d < D; d++) begin
        ea.vec[d] = ACC_W'($urandom_range(0, 2000) - 1000);
        eb.vec[d] = ACC_W'($urandom_range(0, 2000) - 1000);
      end
      if (ha) qa.push_back(ea);
      if (hb) qb.push_back(eb);
      if (ha && hb) begin
        ea.cnt += eb.cnt;
        for (int d = 0; d < D; d++) ea.vec[d] = comb(op, ea.vec[d], eb.vec[d]);
        qe.push_back(ea);
      end else if (ha) qe.push_back(ea);
      else if (hb) qe.push_back(eb);
    end
    qa.push_back('{1, 0, 0, '0}); qb.push_back('{1, 0, 0, '0}); qe.push_back('{1, 0, 0, '0});
  endtask

  initial begin
    int n0;
    a_valid = 0; b_valid = 0; a_eob = 0; b_eob = 0; a_cid = '0; b_cid = '0;
    a_cnt = '0; b_cnt = '0; a_vec = '0; b_vec = '0;
    n_out = 0; n_hold = 0; n_merge = 0;
    op = AGG_SUM;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      op = agg_op_e'(k % 3);
      make_batch();
      while (qe.size() != 0) @(negedge clk);
    end
    check(n_hold > 20 && n_merge > 20, "both rules exercised");
    // rate
    gaps = 0;
    for (int c = 0; c < 64; c++) begin
      qa.push_back('{0, c, 1, '0}); qb.push_back('{0, c, 1, '0}); qe.push_back('{0, c, 2, '0});
    end
    qa.push_back('{1, 0, 0, '0}); qb.push_back('{1, 0, 0, '0}); qe.push_back('{1, 0, 0, '0});
    repeat (4) @(negedge clk);
    n0 = n_out;
    repeat (40) @(negedge clk);
    check(n_out - n0 == 40, $sformatf("one result per cycle (%0d in 40)", n_out - n0));
    while (qe.size() != 0) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
