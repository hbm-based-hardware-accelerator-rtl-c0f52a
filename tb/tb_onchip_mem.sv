// tb_onchip_mem: self-checking test of the node table.
//
// Writes {base, degree} words at random addresses (including the first and
// last), keeps a copy here, and reads them back in random order checking the
// one-cycle read latency and that a write does not disturb other words.
module tb_onchip_mem;
  import gnn_pkg::*;
  localparam int unsigned D  = 4096;
  localparam int unsigned AW = $clog2(D);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              we, ren;
  logic [AW-1:0]     waddr, raddr;
  logic [ADDR_W-1:0] wbase, rbase;
  logic [POS_W-1:0]  wdegree, rdegree;

  onchip_mem #(.P_NODES(D)) dut (.*);

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

  logic [ADDR_W-1:0] mb [D];
  logic [POS_W-1:0]  md [D];

  initial begin
    int a;
    we = 0; ren = 0; waddr = '0; raddr = '0; wbase = '0; wdegree = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i);
      wbase = {$urandom, $urandom}; wdegree = $urandom;
      mb[i] = wbase; md[i] = wdegree;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? D - 1 : $urandom_range(0, D - 1);
      ren = 1; raddr = AW'(a);
      // a simultaneous write elsewhere
      we = 1; waddr = AW'((a + 1) % D); wbase = {$urandom, $urandom}; wdegree = $urandom;
      mb[(a + 1) % D] = wbase; md[(a + 1) % D] = wdegree;
      @(negedge clk);
      ren = 0; we = 0;
      check(rbase == mb[a] && rdegree == md[a], $sformatf("read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
