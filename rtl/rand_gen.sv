// rand_gen: parallel generator of the random neighbour positions.
//
// The sampler needs SAMPLE random numbers in [0, degree) per central node, all
// at once. This block keeps one 32-bit xorshift generator (shifts 13, 17, 5)
// per lane, each seeded differently, and scales a raw value x into the range
// by taking the upper half of x * degree, which needs no divider and is
// uniform to within 2^-32. Which generator and which range reduction are used
// is this design's own choice; the architecture only asks for a bank of
// parallel random sources.
//
// Interface/timing: pulse `req` with `degree`; one cycle later `rnd_valid`
// pulses with all SAMPLE positions on `rnd` (held until the next request),
// and every lane's state has advanced by one step. Lane i is seeded with
// SEED xor ((i + 1) * 0x9E3779B9), forced non-zero.
module rand_gen
  import gnn_pkg::*;
#(
  parameter int unsigned P_SAMPLE = SAMPLE,
  parameter int unsigned P_POS_W  = POS_W,
  parameter logic [31:0] SEED     = 32'h1234_5678
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             req,
  input  logic [P_POS_W-1:0]               degree,
  output logic                             rnd_valid,
  output logic [P_SAMPLE-1:0][P_POS_W-1:0] rnd
);
  logic [P_SAMPLE-1:0][31:0] st;

  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] seed_of(input int unsigned i);
    logic [31:0] s;
    s = SEED ^ (32'(i + 1) * 32'h9E37_79B9);
    return (s == 32'd0) ? 32'h0000_0001 : s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P_SAMPLE; i++) st[i] <= seed_of(i);
      rnd_valid <= 1'b0;
      rnd       <= '0;
    end else begin
      rnd_valid <= req;
      if (req) begin
        for (int i = 0; i < P_SAMPLE; i++) begin
          st[i]  <= xs32(st[i]);
          rnd[i] <= P_POS_W'((64'(st[i]) * 64'(degree)) >> 32);
        end
      end
    end
  end
endmodule
