// tb_partial_aggregator: self-checking test of the per-segment aggregator.
//
// Feature rows (4 beats of 32 INT8 lanes = 128 lanes) are driven on the AXI
// data port as runs of reads with the same RID, CIDs increasing along a
// batch, followed by an end-of-batch hand-off. The expected FIFO contents,
// computed here, are one entry per run: the run's CID, its number of rows
// and the lane-wise sum, maximum or minimum of the sign-extended rows, then
// an end-of-batch entry. All three operators are run, a phase holds the
// consumer off long enough to fill the FIFO (r_ready must drop and nothing
// may be lost), and acq_only mode must accept 32-beat rows and forward only
// the batch end.
module tb_partial_aggregator;
  import gnn_pkg::*;
  localparam int unsigned LPB = HBM_DW / 8;
  localparam int unsigned NB  = DIM / LPB;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  agg_op_e op;
  logic acq_only;
  logic r_valid, r_ready, r_last, eob_valid, eob_ready;
  logic [ID_W-1:0] r_id;
  logic [HBM_DW-1:0] r_data;
  logic o_valid, o_ready, o_eob;
  logic [ID_W-1:0] o_cid;
  logic [CNT_W-1:0] o_cnt;
  logic [DIM-1:0][ACC_W-1:0] o_vec;

  partial_aggregator dut (.*);

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

  typedef struct { bit eob; int unsigned cid; int unsigned cnt; int vec [DIM]; } ent_t;
  ent_t q [$];
  bit hold = 0;
  int unsigned n_out, stalls;

  always @(posedge clk) o_ready <= !hold && ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && r_valid && !r_ready) stalls++;

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    ent_t e;
    n_out++;
    if (q.size() == 0) check(0, "unexpected entry");
    else begin
      bit ok;
      e = q.pop_front();
      ok = (o_eob == e.eob);
      if (!e.eob) begin
        ok &= (o_cid == ID_W'(e.cid)) && (o_cnt == CNT_W'(e.cnt));
        for (int d = 0; d < DIM; d++) ok &= ($signed(o_vec[d]) == e.vec[d]);
      end
      check(ok, $sformatf("entry cid %0d/%0d cnt %0d/%0d eob %0d/%0d", o_cid, e.cid, o_cnt, e.cnt, o_eob, e.eob));
    end
  end

  task automatic send_row(input int unsigned cid, input int unsigned beats, ref int row [DIM]);
    for (int b = 0; b < beats; b++) begin
      for (int l = 0; l < LPB; l++) begin
        int v;
        v = $urandom_range(0, 255) - 128;
        r_data[l*8 +: 8] = 8'(v);
        if (b * LPB + l < DIM) row[b * LPB + l] = v;
      end
      r_id = ID_W'(cid); r_last = (b == beats - 1); r_valid = 1;
      @(posedge clk);
      while (!r_ready) @(posedge clk);
      @(negedge clk);
      r_valid = 0;
      if ($urandom_range(0, 5) == 0) @(negedge clk);
    end
  endtask

  task automatic send_eob();
    eob_valid = 1;
    @(posedge clk);
    while (!eob_ready) @(posedge clk);
    @(negedge clk);
    eob_valid = 0;
  endtask

  task automatic batch(input int unsigned ncid);
    int unsigned cid;
    cid = $urandom_range(0, 2);
    for (int g = 0; g < ncid; g++) begin
      ent_t e;
      int row [DIM];
      e.eob = 0; e.cid = cid; e.cnt = $urandom_range(1, 5);
      for (int k = 0; k < int'(e.cnt); k++) begin
        send_row(cid, NB, row);
        for (int d = 0; d < DIM; d++)
          if (k == 0) e.vec[d] = row[d];
          else if (op == AGG_SUM) e.vec[d] = e.vec[d] + row[d];
          else if (op == AGG_MAX) e.vec[d] = (row[d] > e.vec[d]) ? row[d] : e.vec[d];
          else e.vec[d] = (row[d] < e.vec[d]) ? row[d] : e.vec[d];
      end
      q.push_back(e);
      cid += $urandom_range(1, 3);
      if (cid >= 64) break;
    end
    q.push_back('{1, 0, 0, '{default: 0}});
    send_eob();
  endtask

  initial begin
    op = AGG_SUM; acq_only = 0;
    r_valid = 0; r_id = '0; r_data = '0; r_last = 0; eob_valid = 0;
    n_out = 0; stalls = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    batch(15);
    op = AGG_MAX; batch(12);
    op = AGG_MIN; batch(12);
    op = AGG_SUM; batch(20);
    while (q.size() != 0) @(negedge clk);
    // fill the FIFO: hold the consumer off for two batches of single rows
    hold = 1;
    fork
      begin batch(40); batch(40); end
      begin repeat (3000) @(negedge clk); hold = 0; end
    join
    while (q.size() != 0) @(negedge clk);
    check(stalls > 0, "r_ready dropped while the result FIFO was full");
    // acquisition only: long rows pass, only the batch end is forwarded
    acq_only = 1;
    begin
      int row [DIM];
      for (int k = 0; k < 5; k++) send_row(k, 32, row);
    end
    q.push_back('{1, 0, 0, '{default: 0}});
    send_eob();
    while (q.size() != 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(!o_valid, "nothing left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
