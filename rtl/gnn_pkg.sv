// gnn_pkg: constants and types shared by the GNN sampling / aggregation
// accelerator.
//
// The defaults describe the main configuration: a 4-way streaming sampler
// (four neighbour indexes per bus beat), a sample size of 32, 32 HBM feature
// segments of 256 MB each, INT8 features, aggregation of 128-dimensional
// hidden features and acquisition of up to 1024-dimensional raw features.
// Those numbers follow the published description of the architecture. Bus
// widths, the AXI ID width, the accumulator width and the FIFO depths are
// choices of this implementation and are marked as such below.
package gnn_pkg;

  // ---- streaming sampler ------------------------------------------------
  parameter int unsigned WAYS     = 4;    // neighbour indexes per beat
  parameter int unsigned SAMPLE   = 32;   // sample size (random numbers)
  parameter int unsigned IDX_W    = 32;   // node index width (own choice)
  parameter int unsigned POS_W    = 32;   // neighbour position / degree width (own choice)

  // ---- memory system ----------------------------------------------------
  parameter int unsigned ADDR_W        = 33;  // 8 GB HBM byte address
  parameter int unsigned SEG_LOG2      = 28;  // 256 MB per feature segment
  parameter int unsigned N_SEG         = 32;  // HBM feature ports / segments
  parameter int unsigned HBM_DW        = 256; // AXI data width of one HBM port (own choice)
  parameter int unsigned ID_W          = 6;   // AXI ID width = CID width (own choice)
  parameter int unsigned MAX_BURST     = 16;  // longest AXI burst on a port (own choice)
  parameter int unsigned NODES         = 262144; // on-chip table depth (own choice, >= 232,965)

  // ---- features and aggregation -----------------------------------------
  parameter int unsigned ELEM_W       = 8;    // INT8 features
  parameter int unsigned DIM          = 128;  // aggregated (hidden) dimension
  parameter int unsigned MAX_FEAT_DIM = 1024; // longest feature row
  parameter int unsigned ROW_BYTES    = MAX_FEAT_DIM * ELEM_W / 8; // row stride in HBM
  parameter int unsigned ACC_W        = 16;   // accumulator lane width (own choice)
  parameter int unsigned CNT_W        = 8;    // samples-per-result counter (own choice)

  // Aggregation operator applied lane by lane. AGG_MEAN sums through the
  // partial aggregators and the tree and divides by the row count at the end.
  typedef enum logic [1:0] {
    AGG_SUM  = 2'd0,
    AGG_MAX  = 2'd1,
    AGG_MIN  = 2'd2,
    AGG_MEAN = 2'd3
  } agg_op_e;

  // Combine one accumulator lane with another lane value.
  function automatic logic signed [ACC_W-1:0] agg_lane(
      input agg_op_e op,
      input logic signed [ACC_W-1:0] a,
      input logic signed [ACC_W-1:0] b);
    unique case (op)
      AGG_MAX: agg_lane = (a > b) ? a : b;
      AGG_MIN: agg_lane = (a < b) ? a : b;
      default: agg_lane = a + b;
    endcase
  endfunction

endpackage
