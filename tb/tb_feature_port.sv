// tb_feature_port: self-checking test of one segment's read-request engine.
//
// The port (segment 5) gets a random stream of sample requests with
// end-of-batch markers; an HBM read model answers, and its data channel is
// drained at random. Checks: ARs leave in request order with ARADDR =
// 5 * 2^28 + row * ROW_BYTES, ARID = CID and ARLEN = feat_beats - 1; never
// more than 16 reads are outstanding; an end-of-batch hand-off happens only
// when every read issued before it has returned, and in request order.
module tb_feature_port;
  import gnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] feat_beats;
  logic req_valid, req_ready, req_eob;
  logic [IDX_W-1:0] req_local;
  logic [ID_W-1:0] req_cid, ar_id, r_id;
  logic ar_valid, ar_ready, r_done, eob_valid, eob_ready;
  logic [ADDR_W-1:0] ar_addr;
  logic [7:0] ar_len;
  logic r_valid, r_ready, r_last;
  logic [HBM_DW-1:0] r_data;
  int unsigned n_bursts, n_beats;

  feature_port #(.SEG(5)) dut (.*);

  hbm_rd_model #(.KIND(1), .DW(HBM_DW), .ID_W(ID_W), .ADDR_W(ADDR_W), .MAX_LAT(20)) u_hbm (
    .clk, .rst_n, .seg_shift(6'd13), .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len,
    .r_valid, .r_ready, .r_id, .r_data, .r_last, .n_bursts, .n_beats);

  assign r_done = r_valid && r_ready && r_last;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit eob; int unsigned loc; int unsigned cid; } req_t;
  req_t q [$];
  int unsigned issued, returned, max_out, n_eob;

  always @(posedge clk) begin
    r_ready   <= ($urandom_range(0, 3) != 0);
    eob_ready <= ($urandom_range(0, 1) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (ar_valid && ar_ready) begin
      req_t e;
      e = q.pop_front();
      check(!e.eob, "AR where an eob was expected");
      check(ar_addr == (ADDR_W'(5) << SEG_LOG2) + ADDR_W'(e.loc) * ROW_BYTES, "ARADDR");
      check(ar_id == ID_W'(e.cid), "ARID");
      check(ar_len == 8'(feat_beats - 1), "ARLEN");
      issued++;
    end
    if (r_done) returned++;
    if (issued - returned > max_out) max_out = issued - returned;
    if (eob_valid && eob_ready) begin
      req_t e;
      e = q.pop_front();
      check(e.eob, "eob in order");
      check(issued == returned, "eob only after all data returned");
      n_eob++;
    end
  end

  initial begin
    req_valid = 0; req_eob = 0; req_local = '0; req_cid = '0; feat_beats = 4;
    issued = 0; returned = 0; max_out = 0; n_eob = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      if (i == 300) begin
        while (q.size() != 0) @(negedge clk);
        feat_beats = 32;   // full 1024-byte rows
      end
      req_eob = (i % 40 == 39);
      req_local = $urandom_range(0, 8191);
      req_cid = ID_W'((i % 40) / 2);
      q.push_back('{req_eob, req_local, req_cid});
      req_valid = 1;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 0;
    end
    while (q.size() != 0) @(negedge clk);
    repeat (50) @(negedge clk);
    check(issued == returned, "all reads returned");
    check(n_eob == 15, "batch ends");
    check(max_out <= 16 && max_out >= 4, $sformatf("outstanding limit (max %0d)", max_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
