// hbm_rd_model: behavioural model of one HBM AXI read port (not synthesizable).
//
// Accepts read bursts on AR (ready toggles at random), queues up to 32 and
// returns each burst after a random latency of 1..MAX_LAT cycles, in request
// order, with random gaps between beats and respecting r_ready. The data are
// computed from the address with the synthetic graph of tb_graph_pkg:
// KIND 0 is the neighbour-index segment (WAYS 32-bit indexes per beat),
// KIND 1 a feature segment (DW/8 INT8 feature bytes per beat; the node is
// (segment << seg_shift) | row). Also counts bursts and beats.
module hbm_rd_model #(
  parameter int unsigned KIND      = 0,
  parameter int unsigned DW        = 128,
  parameter int unsigned ID_W      = 6,
  parameter int unsigned ADDR_W    = 33,
  parameter int unsigned SEG_LOG2  = 28,
  parameter int unsigned ROW_BYTES = 1024,
  parameter int unsigned NUM_NODES = 1000,
  parameter int unsigned MAX_LAT   = 8,
  parameter int unsigned GAP_PCT   = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [5:0]        seg_shift,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ID_W-1:0]   ar_id,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [7:0]        ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [ID_W-1:0]   r_id,
  output logic [DW-1:0]     r_data,
  output logic              r_last,
  output int unsigned       n_bursts,
  output int unsigned       n_beats
);
  import tb_graph_pkg::*;
  localparam int unsigned QD = 32;

  logic [ADDR_W-1:0] q_addr [QD];
  logic [ID_W-1:0]   q_id   [QD];
  logic [7:0]        q_len  [QD];
  longint unsigned   q_due  [QD];
  int unsigned wp, rp, cnt, beat;
  longint unsigned cyc;

  function automatic logic [DW-1:0] data_of(input logic [ADDR_W-1:0] a);
    logic [DW-1:0] d;
    d = '0;
    if (KIND == 0) begin
      logic [31:0] v, p;
      v = 32'(a >> NBR_LOG2);
      p = 32'((a & ((ADDR_W'(1) << NBR_LOG2) - 1)) / 4);
      for (int w = 0; w < DW / 32; w++) d[w*32 +: 32] = nbr_of(v, p + w, NUM_NODES);
    end else begin
      logic [31:0] seg, row, v;
      int unsigned off;
      seg = 32'(a >> SEG_LOG2);
      row = 32'((a & ((ADDR_W'(1) << SEG_LOG2) - 1)) / ROW_BYTES);
      off = int'(a % ROW_BYTES);
      v = (seg << seg_shift) | row;
      for (int b = 0; b < DW / 8; b++) d[b*8 +: 8] = feat_of(v, off + b);
    end
    return d;
  endfunction

  logic              act;
  logic [ADDR_W-1:0] cur_addr;
  logic [ID_W-1:0]   cur_id;
  logic [7:0]        cur_len;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp = 0; rp = 0; cnt = 0; beat = 0; cyc = 0; act = 0;
      ar_ready <= 1'b0; r_valid <= 1'b0; r_id <= '0; r_data <= '0; r_last <= 1'b0;
      n_bursts <= 0; n_beats <= 0;
    end else begin
      logic v;
      cyc = cyc + 1;
      if (ar_valid && ar_ready) begin
        q_addr[wp] = ar_addr;
        q_id[wp]   = ar_id;
        q_len[wp]  = ar_len;
        q_due[wp]  = cyc + longint'($urandom_range(1, MAX_LAT));
        wp = (wp + 1) % QD;
        cnt++;
        n_bursts <= n_bursts + 1;
      end
      ar_ready <= (cnt < QD - 1) && ($urandom_range(0, 99) >= GAP_PCT / 2);
      v = r_valid;
      if (r_valid && r_ready) begin
        v = 1'b0;
        n_beats <= n_beats + 1;
        if (r_last) act = 1'b0;
        else beat++;
      end
      if (!act && cnt > 0 && q_due[rp] <= cyc) begin
        act = 1'b1; beat = 0;
        cur_addr = q_addr[rp]; cur_id = q_id[rp]; cur_len = q_len[rp];
        rp = (rp + 1) % QD;
        cnt--;
      end
      if (!v && act && $urandom_range(0, 99) >= GAP_PCT) begin
        v = 1'b1;
        r_id   <= cur_id;
        r_data <= data_of(cur_addr + ADDR_W'(beat * (DW / 8)));
        r_last <= (beat == int'(cur_len));
      end
      r_valid <= v;
    end
  end
endmodule
