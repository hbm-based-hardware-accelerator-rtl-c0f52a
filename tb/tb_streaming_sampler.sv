// tb_streaming_sampler: self-checking test of the streaming sampler.
//
// For several nodes of random degree it latches SAMPLE random positions in
// [0, degree) (some forced to repeat), streams the neighbour list as beats
// of WAYS indexes under random output back-pressure and compares each
// output beat's mask (position hit by any random number) and multiplicity
// (number of random numbers equal to the position) with values computed here.
// It also checks the pass-through of indexes and CID, an end-of-batch beat,
// and that with a ready consumer a beat leaves one cycle after it enters and
// N beats take N cycles.
module tb_streaming_sampler;
  import gnn_pkg::*;
  localparam int unsigned MW = $clog2(SAMPLE + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                            load;
  logic [SAMPLE-1:0][POS_W-1:0]    rnd;
  logic                            in_valid, in_ready, in_eob;
  logic [WAYS-1:0][IDX_W-1:0]      in_idx;
  logic [ID_W-1:0]                 in_cid;
  logic                            out_valid, out_ready, out_eob;
  logic [WAYS-1:0][IDX_W-1:0]      out_idx;
  logic [WAYS-1:0]                 out_mask;
  logic [WAYS-1:0][MW-1:0]         out_mult;
  logic [ID_W-1:0]                 out_cid;

  streaming_sampler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values
  logic [POS_W-1:0] rq [SAMPLE];
  int unsigned beats_in, beats_out, deg;
  logic [ID_W-1:0] cur_cid;
  bit bp_on;

  always @(posedge clk) out_ready <= bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_eob) begin
      check(out_mask == '0 && out_cid == cur_cid, "eob beat");
    end else begin
      for (int w = 0; w < WAYS; w++) begin
        int unsigned p, m;
        p = beats_out * WAYS + w;
        m = 0;
        for (int s = 0; s < SAMPLE; s++) if (rq[s] == p) m++;
        check(out_mult[w] == MW'(m), $sformatf("mult beat %0d way %0d: %0d vs %0d", beats_out, w, out_mult[w], m));
        check(out_mask[w] == (m != 0), $sformatf("mask beat %0d way %0d", beats_out, w));
        check(out_idx[w] == IDX_W'(32'h1000 + p), "index pass-through");
      end
      check(out_cid == cur_cid, "cid");
      beats_out++;
    end
  end

  task automatic run_node(input int unsigned d, input bit bp);
    int unsigned nb;
    bp_on = bp;
    deg = d;
    for (int s = 0; s < SAMPLE; s++) begin
      rq[s] = POS_W'($urandom_range(0, d - 1));
      if (s > 0 && $urandom_range(0, 3) == 0) rq[s] = rq[s-1];  // duplicates
      rnd[s] = rq[s];
    end
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0;
    // wait for the previous node's last output to drain
    while (out_valid) @(negedge clk);
    beats_out = 0;
    nb = (d + WAYS - 1) / WAYS;
    for (int b = 0; b < nb; b++) begin
      in_valid = 1'b1;
      for (int w = 0; w < WAYS; w++) in_idx[w] = IDX_W'(32'h1000 + b * WAYS + w);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(0, 4) == 0 && bp) @(negedge clk);
    end
    while (beats_out != nb) @(negedge clk);
  endtask

  initial begin
    int t0, t1;
    load = 0; rnd = '0; in_valid = 0; in_idx = '0; in_cid = '0; in_eob = 0; bp_on = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      cur_cid = ID_W'(n);
      in_cid  = cur_cid;
      run_node($urandom_range(1, (n % 4 == 0) ? 300 : 40), 1'b1);
    end
    // throughput / latency with a ready consumer: 64 back-to-back beats
    cur_cid = 7; in_cid = 7; bp_on = 0;
    for (int s = 0; s < SAMPLE; s++) begin rq[s] = POS_W'(s * 7); rnd[s] = rq[s]; end
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    repeat (2) @(negedge clk);
    beats_out = 0;
    t0 = $time;
    for (int b = 0; b < 64; b++) begin
      in_valid = 1;
      for (int w = 0; w < WAYS; w++) in_idx[w] = IDX_W'(32'h1000 + b * WAYS + w);
      @(negedge clk);
      check(out_valid, "output one cycle after input");
    end
    in_valid = 0;
    t1 = $time;
    check((t1 - t0) / 10 == 64, "64 beats in 64 cycles");
    @(negedge clk);
    check(beats_out == 64, "all 64 beats out");
    // end-of-batch beat
    in_eob = 1; in_valid = 1;
    @(negedge clk);
    in_valid = 0; in_eob = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
