// ttn_pkg: shared constants, types and elaboration-time helpers for the
// tree tensor network (TTN) classifier.
//
// A TTN with N input features is a binary tree of L = log2(N) layers. Layer l
// (1..L) holds N/2^l contraction nodes; each node takes two child vectors of
// dimension X(l-1) and produces a vector of dimension X(l). The leaf dimension
// X(0) is the feature-map dimension D, inner layers use
// X(l) = min(CHI, D^(2^l)) with CHI the maximum bond dimension, and the root
// produces a scalar (X(L) = 1) for binary classification. These rules follow
// the described network; the weight ordering below is this design's choice.
//
// Weight layout (flat index into the weight register block): layer by layer
// from the leaves, node by node inside a layer, and inside a node
// V[i][j][k] at offset (i*DIN + j)*DIN + k, i the output index, j the index of
// the left child vector and k that of the right one.
package ttn_pkg;

  // Implementation style of the contraction nodes.
  typedef enum logic [0:0] {
    ARCH_FULL    = 1'b0,  // full parallel: O(X^3) multipliers, log latency
    ARCH_PARTIAL = 1'b1   // partial parallel: O(X^2) multipliers, serial
  } arch_e;

  // Bond dimension at the output of layer l (l = 0 is the feature map).
  function automatic int unsigned bond_dim(int unsigned l, int unsigned n,
                                           int unsigned d, int unsigned chi);
    int unsigned p;
    if (l == 0) return d;
    if (l >= unsigned'($clog2(n))) return 1;
    p = d;
    for (int unsigned s = 0; s < l; s++) begin
      if (p >= chi) break;
      p = p * p;            // D^(2^l) by repeated squaring
    end
    return (p < chi) ? p : chi;
  endfunction

  // Number of weights in one node of layer l (l >= 1).
  function automatic int unsigned node_weights(int unsigned l, int unsigned n,
                                               int unsigned d, int unsigned chi);
    int unsigned din;
    din = bond_dim(l - 1, n, d, chi);
    return bond_dim(l, n, d, chi) * din * din;
  endfunction

  // Flat index of the first weight of layer l (l >= 1).
  function automatic int unsigned layer_offset(int unsigned l, int unsigned n,
                                               int unsigned d, int unsigned chi);
    int unsigned off;
    off = 0;
    for (int unsigned m = 1; m < l; m++)
      off += (n >> m) * node_weights(m, n, d, chi);
    return off;
  endfunction

  // Total number of weights of the network.
  function automatic int unsigned total_weights(int unsigned n, int unsigned d,
                                                int unsigned chi);
    return layer_offset(unsigned'($clog2(n)) + 1, n, d, chi);
  endfunction

  // Largest bond dimension anywhere in the tree.
  function automatic int unsigned max_bond(int unsigned n, int unsigned d,
                                           int unsigned chi);
    int unsigned m;
    m = 1;
    for (int unsigned l = 0; l <= unsigned'($clog2(n)); l++)
      if (bond_dim(l, n, d, chi) > m) m = bond_dim(l, n, d, chi);
    return m;
  endfunction

  // Latency in cycles of one full-parallel node.
  function automatic int unsigned fp_node_latency(int unsigned din,
                                                  int unsigned dsp_lat);
    return 2 * dsp_lat + unsigned'($clog2(din * din)) + 1;
  endfunction

  // Latency in cycles of one partial-parallel node. Latencies here count the
  // cycles from the one in which an input is accepted to the first one in
  // which the result is valid.
  function automatic int unsigned pp_node_latency(int unsigned din,
                                                  int unsigned dout,
                                                  int unsigned dsp_lat);
    return din * din + dout + 2 * dsp_lat + 2;
  endfunction

  // Latency of the whole tree: the sum of its node latencies.
  function automatic int unsigned tree_latency(arch_e arch, int unsigned n,
                                               int unsigned d, int unsigned chi,
                                               int unsigned dsp_lat);
    int unsigned t;
    t = 0;
    for (int unsigned l = 1; l <= unsigned'($clog2(n)); l++)
      t += (arch == ARCH_FULL) ?
           fp_node_latency(bond_dim(l - 1, n, d, chi), dsp_lat) :
           pp_node_latency(bond_dim(l - 1, n, d, chi), bond_dim(l, n, d, chi), dsp_lat);
    return t;
  endfunction

endpackage
