// tb_rand_gen: self-checking test of the parallel random position generator.
//
// Issues requests with various degrees and checks, for every lane, that the
// position arrives one cycle after the request, lies in [0, degree) and
// equals floor(x * degree / 2^32) for a xorshift32 reference sequence kept
// here. It also checks that lanes differ from each other and that over many
// draws with degree 8 every value appears with roughly equal frequency.
module tb_rand_gen;
  import gnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                           req, rnd_valid;
  logic [POS_W-1:0]               degree;
  logic [SAMPLE-1:0][POS_W-1:0]   rnd;

  rand_gen dut (.*);

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

  logic [31:0] ref_st [SAMPLE];
  int hist [8];

  function automatic logic [31:0] step(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  initial begin
    int unsigned d;
    int same;
    req = 0; degree = '0;
    for (int i = 0; i < SAMPLE; i++) begin
      ref_st[i] = 32'h1234_5678 ^ (32'(i + 1) * 32'h9E37_79B9);
      if (ref_st[i] == 0) ref_st[i] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      d = (n < 200) ? 8 : ((n % 3 == 0) ? $urandom_range(1, 100000) : $urandom_range(1, 64));
      req = 1; degree = POS_W'(d);
      @(negedge clk);
      req = 0;
      check(rnd_valid, "rnd_valid one cycle after req");
      same = 0;
      for (int i = 0; i < SAMPLE; i++) begin
        logic [63:0] prod;
        prod = 64'(ref_st[i]) * 64'(d);
        check(rnd[i] == POS_W'(prod >> 32), $sformatf("lane %0d value", i));
        check(rnd[i] < d, "in range");
        if (d == 8) hist[rnd[i]]++;
        if (i > 0 && rnd[i] == rnd[0]) same++;
        ref_st[i] = step(ref_st[i]);
      end
      if (d > 1000) check(same < SAMPLE / 2, "lanes differ");
      @(negedge clk);
      check(!rnd_valid, "rnd_valid is a pulse");
    end
    for (int v = 0; v < 8; v++)
      check(hist[v] > 200 * SAMPLE / 8 * 8 / 10 && hist[v] < 200 * SAMPLE / 8 * 12 / 10,
            $sformatf("uniformity bin %0d = %0d", v, hist[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
