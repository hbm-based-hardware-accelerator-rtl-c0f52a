// tb_sample_dispatch: self-checking test of the sample buffer / dispatcher.
//
// Random sampled beats (random masks, multiplicities 1..3 on selected ways,
// some empty beats, end-of-batch beats) are pushed with random gaps while the
// output is throttled at random. The expected output, built here, lists the
// selected ways of each beat in way order, each repeated by its multiplicity
// when sampling with replacement and once otherwise, with segment = index >>
// seg_shift and row = index mod 2^seg_shift; an end-of-batch beat yields one
// eob. Both sampling modes and two segment sizes are run. A final phase with
// a ready consumer checks one sample per cycle.
module tb_sample_dispatch;
  import gnn_pkg::*;
  localparam int unsigned MW = $clog2(SAMPLE + 1);
  localparam int unsigned SW = $clog2(N_SEG);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic with_repl;
  logic [5:0] seg_shift;
  logic in_valid, in_ready, in_eob;
  logic [WAYS-1:0][IDX_W-1:0] in_idx;
  logic [WAYS-1:0] in_mask;
  logic [WAYS-1:0][MW-1:0] in_mult;
  logic [ID_W-1:0] in_cid;
  logic o_valid, o_ready, o_eob;
  logic [SW-1:0] o_seg;
  logic [IDX_W-1:0] o_local;
  logic [ID_W-1:0] o_cid;

  sample_dispatch dut (.*);

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

  typedef struct { bit eob; int unsigned seg; int unsigned loc; int unsigned cid; } exp_t;
  exp_t q [$];
  bit throttle = 1;
  int unsigned n_out;

  always @(posedge clk) o_ready <= throttle ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    exp_t e;
    n_out++;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      check(o_eob == e.eob, "eob flag");
      if (!e.eob)
        check(o_seg == SW'(e.seg) && o_local == IDX_W'(e.loc) && o_cid == ID_W'(e.cid),
              $sformatf("sample seg %0d/%0d loc %0d/%0d", o_seg, e.seg, o_local, e.loc));
    end
  end

  task automatic push_beat(input bit eob, input int unsigned cid);
    in_eob = eob; in_cid = ID_W'(cid);
    for (int w = 0; w < WAYS; w++) begin
      in_idx[w]  = $urandom_range(0, (1 << 18) - 1);
      in_mask[w] = !eob && ($urandom_range(0, 2) == 0);
      in_mult[w] = in_mask[w] ? MW'($urandom_range(1, 3)) : '0;
    end
    if (eob) q.push_back('{1, 0, 0, 0});
    else for (int w = 0; w < WAYS; w++) if (in_mask[w])
      for (int m = 0; m < (with_repl ? int'(in_mult[w]) : 1); m++)
        q.push_back('{0, in_idx[w] >> seg_shift, in_idx[w] & ((1 << seg_shift) - 1), cid});
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, n0;
    in_valid = 0; in_eob = 0; in_idx = '0; in_mask = '0; in_mult = '0; in_cid = '0;
    with_repl = 0; seg_shift = 13;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      with_repl = pass[0];
      seg_shift = pass[1] ? 6'd13 : 6'd8;
      for (int b = 0; b < 300; b++) begin
        push_beat(b % 50 == 49, b / 5);
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      while (q.size() != 0) @(negedge clk);
      @(negedge clk);
    end
    // rate: all ways selected once, consumer always ready -> one sample per cycle
    throttle = 0; with_repl = 0;
    repeat (3) @(negedge clk);
    n0 = n_out; t0 = $time;
    for (int b = 0; b < 8; b++) begin
      in_eob = 0; in_cid = 1;
      for (int w = 0; w < WAYS; w++) begin
        in_idx[w] = b * 16 + w; in_mask[w] = 1; in_mult[w] = 1;
        q.push_back('{0, (b * 16 + w) >> seg_shift, (b * 16 + w) & ((1 << seg_shift) - 1), 1});
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (q.size() != 0) @(negedge clk);
    check(($time - t0) / 10 <= 8 * WAYS + 3, $sformatf("rate: %0d cycles for %0d samples",
          ($time - t0) / 10, 8 * WAYS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
