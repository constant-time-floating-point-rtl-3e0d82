// fpa_ffo: find the first (most significant) '1' of a bit string with a tree of 2-to-1
// multiplexers, so the delay grows with log2 of the width and does not depend on the data.
// The string is split into an upper part of ceil(n/2) bits and a lower part of floor(n/2)
// bits, again and again, down to parts of two bits (or one). A two-bit leaf picks between its
// two bit indices with its upper bit as the select. Every inner node is one multiplexer: it
// passes the upper part's answer, unless the upper part is all zero (its NOR is 1), in which
// case it passes the lower part's answer. The leaves hold absolute bit indices as constants, so
// no adders are needed on the way up. For the 53-bit ALU output the root splits bits [52:26]
// from [25:0], and the lower part splits again into [25:13] and [12:0].
// The multiplexer tree, its leaves and its NOR selects follow the published design; the even
// split at every level follows its written description of the method, and the `none` output
// is an addition of this design.
// The tree is laid out in heap order: node 1 is the root and node k has its upper part at 2k
// and its lower part at 2k+1. Constant functions give each node's bit range.
// Interface: bits (N) in; pos (index of the first '1') and none (no bit set) out. When none is
// 1, pos is 0. Combinational.
module fpa_ffo #(
  parameter int unsigned N  = 53,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  bits,
  output logic [PW-1:0] pos,
  output logic          none
);

  localparam int unsigned DEPTH = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NODES = 2 ** (DEPTH + 1);

  // Width of node k's part of the string, 0 if node k is not in the tree.
  function automatic int unsigned node_width(int unsigned k);
    int unsigned n = N;
    int unsigned top = 0;
    for (int b = 31; b >= 0; b--) if (k[b] && top == 0) top = b;
    for (int b = int'(top) - 1; b >= 0; b--) begin
      if (n <= 2) return 0;
      n = k[b] ? n / 2 : n - n / 2;
    end
    return n;
  endfunction

  // Index of the lowest bit of node k's part of the string.
  function automatic int unsigned node_low(int unsigned k);
    int unsigned n = N;
    int unsigned lo = 0;
    int unsigned top = 0;
    for (int b = 31; b >= 0; b--) if (k[b] && top == 0) top = b;
    for (int b = int'(top) - 1; b >= 0; b--) begin
      if (!k[b]) lo = lo + n / 2;
      n = k[b] ? n / 2 : n - n / 2;
    end
    return lo;
  endfunction

  for (genvar k = 1; k < NODES; k++) begin : g_node
    localparam int unsigned NW = node_width(k);
    localparam int unsigned LO = node_low(k);
    if (NW == 1) begin : g_n
      logic [PW-1:0] p;
      logic          z;
      assign p = PW'(LO);
      assign z = ~bits[LO];
    end else if (NW == 2) begin : g_n
      logic [PW-1:0] p;
      logic          z;
      assign p = bits[LO+1] ? PW'(LO + 1) : PW'(LO);
      assign z = ~(bits[LO+1] | bits[LO]);
    end else if (NW > 2) begin : g_n
      logic [PW-1:0] p;
      logic          z;
      // Select is the NOR of the upper part: all zero there means the answer lies below.
      assign p = g_node[2*k].g_n.z ? g_node[2*k+1].g_n.p : g_node[2*k].g_n.p;
      assign z = g_node[2*k].g_n.z & g_node[2*k+1].g_n.z;
    end
  end

  assign pos  = g_node[1].g_n.z ? '0 : g_node[1].g_n.p;
  assign none = g_node[1].g_n.z;

endmodule
