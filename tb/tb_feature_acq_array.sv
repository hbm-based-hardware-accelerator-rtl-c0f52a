// tb_feature_acq_array: self-checking test of the feature acquisition array.
//
// Eight segments, each served by its own HBM read model. Random sampled
// beats (with end-of-batch beats) go in; the test predicts, per segment, the
// sequence of reads (row, CID) and end-of-batch hand-offs and checks each
// segment's AR channel and eob hand-off against it, and that every read
// returns. Sampling with replacement is used so repeated samples show up as
// repeated reads.
module tb_feature_acq_array;
  import gnn_pkg::*;
  localparam int unsigned NS = 8;
  localparam int unsigned MW = $clog2(SAMPLE + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic with_repl = 1'b1;
  logic [5:0] seg_shift = 6'd10, feat_beats = 6'd4;
  logic in_valid, in_ready, in_eob;
  logic [WAYS-1:0][IDX_W-1:0] in_idx;
  logic [WAYS-1:0] in_mask;
  logic [WAYS-1:0][MW-1:0] in_mult;
  logic [ID_W-1:0] in_cid;
  logic [NS-1:0] ar_valid, ar_ready, r_done, eob_valid, eob_ready;
  logic [NS-1:0][ID_W-1:0] ar_id;
  logic [NS-1:0][ADDR_W-1:0] ar_addr;
  logic [NS-1:0][7:0] ar_len;
  logic [NS-1:0] r_valid, r_ready, r_last;
  logic [NS-1:0][ID_W-1:0] r_id;
  logic [NS-1:0][HBM_DW-1:0] r_data;
  int unsigned n_bursts [NS], n_beats [NS];

  feature_acq_array #(.P_N_SEG(NS)) dut (
    .clk, .rst_n, .with_repl, .seg_shift, .feat_beats,
    .in_valid, .in_ready, .in_idx, .in_mask, .in_mult, .in_cid, .in_eob,
    .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len, .r_done, .eob_valid, .eob_ready);

  for (genvar s = 0; s < NS; s++) begin : g_hbm
    hbm_rd_model #(.KIND(1), .DW(HBM_DW), .ID_W(ID_W), .ADDR_W(ADDR_W), .MAX_LAT(12)) u_hbm (
      .clk, .rst_n, .seg_shift, .ar_valid(ar_valid[s]), .ar_ready(ar_ready[s]),
      .ar_id(ar_id[s]), .ar_addr(ar_addr[s]), .ar_len(ar_len[s]),
      .r_valid(r_valid[s]), .r_ready(r_ready[s]), .r_id(r_id[s]), .r_data(r_data[s]),
      .r_last(r_last[s]), .n_bursts(n_bursts[s]), .n_beats(n_beats[s]));
    assign r_done[s] = r_valid[s] && r_ready[s] && r_last[s];
  end

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
  req_t q [NS][$];
  int unsigned n_ar, n_eob;

  always @(posedge clk) begin
    r_ready   <= $urandom;
    eob_ready <= $urandom;
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) begin
      if (ar_valid[s] && ar_ready[s]) begin
        req_t e;
        e = q[s].pop_front();
        check(!e.eob && ar_addr[s] == (ADDR_W'(s) << SEG_LOG2) + ADDR_W'(e.loc) * ROW_BYTES &&
              ar_id[s] == ID_W'(e.cid), $sformatf("segment %0d read", s));
        n_ar++;
      end
      if (eob_valid[s] && eob_ready[s]) begin
        req_t e;
        e = q[s].pop_front();
        check(e.eob, $sformatf("segment %0d eob order", s));
        n_eob++;
      end
    end
  end

  initial begin
    int unsigned total;
    bit empty;
    in_valid = 0; in_eob = 0; in_idx = '0; in_mask = '0; in_mult = '0; in_cid = '0;
    n_ar = 0; n_eob = 0; total = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      in_eob = (b % 100 == 99);
      in_cid = ID_W'((b % 100) / 3);
      for (int w = 0; w < WAYS; w++) begin
        in_idx[w]  = $urandom_range(0, NS * 1024 - 1);
        in_mask[w] = !in_eob && $urandom_range(0, 1);
        in_mult[w] = in_mask[w] ? MW'($urandom_range(1, 2)) : '0;
        if (in_mask[w])
          for (int m = 0; m < int'(in_mult[w]); m++) begin
            q[in_idx[w] >> 10].push_back('{0, in_idx[w] & 1023, in_cid});
            total++;
          end
      end
      if (in_eob) for (int s = 0; s < NS; s++) q[s].push_back('{1, 0, 0});
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    do begin
      @(negedge clk);
      empty = 1;
      for (int s = 0; s < NS; s++) if (q[s].size() != 0) empty = 0;
    end while (!empty);
    check(n_ar == total, "every sample read once per copy");
    check(n_eob == 4 * NS, "every segment saw every batch end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
