// tb_agg_mean: self-checking test of the averaging output stage.
//
// Random sums (positive and negative lanes) with counts 0..32 pass through
// the stage under random input gaps and output back-pressure. With AGG_MEAN
// each lane must equal sum / count rounded toward zero (count 0 and
// end-of-batch markers unchanged); with the other operators entries pass
// unchanged. Also checks one cycle of latency and one result per cycle.
module tb_agg_mean;
  import gnn_pkg::*;
  localparam int unsigned D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  agg_op_e op;
  logic in_valid, in_ready, in_eob, o_valid, o_ready, o_eob;
  logic [ID_W-1:0] in_cid, o_cid;
  logic [CNT_W-1:0] in_cnt, o_cnt;
  logic [D-1:0][ACC_W-1:0] in_vec, o_vec;

  agg_mean #(.P_DIM(D)) dut (.*);

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
  ent_t qe [$];
  bit gaps = 1;
  int unsigned n_out;

  always @(posedge clk) o_ready <= !gaps || $urandom_range(0, 2) != 0;

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    ent_t e;
    n_out++;
    e = qe.pop_front();
    check(o_eob == e.eob && o_cid == ID_W'(e.cid) && o_cnt == CNT_W'(e.cnt) && o_vec == e.vec,
          $sformatf("entry cid %0d cnt %0d", e.cid, e.cnt));
  end

  task automatic push(input agg_op_e o);
    ent_t e;
    int sum;
    e.eob = ($urandom_range(0, 9) == 0);
    e.cid = $urandom_range(0, 63);
    e.cnt = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 32);
    in_eob = e.eob; in_cid = ID_W'(e.cid); in_cnt = CNT_W'(e.cnt);
    for (int d = 0; d < D; d++) begin
      sum = $urandom_range(0, 8000) - 4000;
      in_vec[d] = ACC_W'(sum);
      if (o == AGG_MEAN && !e.eob && e.cnt != 0) e.vec[d] = ACC_W'(sum / int'(e.cnt));
      else e.vec[d] = ACC_W'(sum);
    end
    qe.push_back(e);
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int n0;
    in_valid = 0; in_eob = 0; in_cid = '0; in_cnt = '0; in_vec = '0; n_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      op = (k < 500) ? AGG_MEAN : agg_op_e'(k % 3);
      push(op);
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    while (qe.size() != 0) @(negedge clk);
    // back to back with a ready consumer
    gaps = 0; op = AGG_MEAN;
    @(negedge clk);
    n0 = n_out;
    for (int k = 0; k < 20; k++) push(op);
    @(negedge clk);
    check(n_out - n0 == 20, "one result per cycle, one cycle latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
