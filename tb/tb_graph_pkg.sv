// tb_graph_pkg: synthetic graph used by the testbenches.
//
// Neighbour k of node v is mix(v * 65537 + k) mod num_nodes, feature byte d of
// node v is the low byte of mix(v * 4099 + d), and mix() is a 32-bit integer
// hash (multiply / xor-shift). Neighbour lists are laid out 2^NBR_LOG2 bytes
// apart in the neighbour-index segment, node v's list at v << NBR_LOG2.
package tb_graph_pkg;
  parameter int unsigned NBR_LOG2 = 12;  // room for 1024 indexes per node

  function automatic logic [31:0] mix(input logic [31:0] x);
    x = x * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA77;
    x = x ^ (x >> 13);
    return x;
  endfunction

  function automatic logic [31:0] nbr_of(input logic [31:0] v, input logic [31:0] k,
                                         input int unsigned num_nodes);
    return mix(v * 32'd65537 + k) % num_nodes;
  endfunction

  function automatic logic [7:0] feat_of(input logic [31:0] v, input int unsigned d);
    return 8'(mix(v * 32'd4099 + d));
  endfunction

  // xorshift32 lane state, as the random generator is specified
  function automatic logic [31:0] xs32(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction
endpackage
