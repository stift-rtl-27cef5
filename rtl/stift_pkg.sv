// stift_pkg: types, constants and topology helpers shared by the STIFT
// reduction network (RN).
//
// Node numbering. A network with N multiplier switches (MSs, the leaves) has
// N extended adder switches (eASs): N-1 of them form a binary tree and the
// last one is the second root. Tree nodes are numbered in in-order position
// p = 0..N-2. A tree node at level l (l = 1 directly above the MSs) with
// index k inside its level sits at p = k*2^l + 2^(l-1) - 1, so its level is
// one plus the number of trailing ones of p. The first root is p = N/2-1 and
// the second root is p = N-1, at level log2(N)+1.
//
// Folding links follow the link-building rule of the design: node p at level
// L is linked to p - 2^(lvl-1) for lvl = 1..L-1, which is its left child plus
// the right spine of its left subtree. Seen from a cluster that collapses at
// node c of level l, its accumulator is always c + 2^(l-1): the parent when c
// has an even index in its level (the ordinary tree link) and a higher node
// over a folding link when the index is odd.
package stift_pkg;

  // Source of the value an eAS forwards without the adder.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,
    FWD_L    = 2'd1,
    FWD_R    = 2'd2
  } fwd_sel_e;

  // Adder-switch (spatial) settings of one eAS, produced by the mapper.
  typedef struct packed {
    logic     en;          // node takes part as an adder switch
    logic     add_l;       // left child psum enters the adder
    logic     add_r;       // right child psum enters the adder
    logic     add_lat;     // lateral (augmented-link) psum enters the adder
    logic     sum_to_lat;  // adder result leaves on the lateral link, not upward
    fwd_sel_e fwd;         // child psum passed on unchanged on the other output
  } as_cfg_t;

  // Largest source-select value: the second root of a 1024-wide network has
  // 10 left-input sources.
  localparam int unsigned SEL_W = 4;

  // Level of in-order node p (tree nodes only): 1 + trailing ones of p.
  function automatic int unsigned node_level(input int unsigned p);
    int unsigned l;
    l = 1;
    while (((p >> (l - 1)) & 1) == 1) l++;
    return l;
  endfunction

  // Level of node p in a network of n leaves, second root included.
  function automatic int unsigned rn_level(input int unsigned p, input int unsigned n);
    if (p == n - 1) return $clog2(n) + 1;
    return node_level(p);
  endfunction

  // Index of a tree node inside its level.
  function automatic int unsigned node_index(input int unsigned p);
    return p >> node_level(p);
  endfunction

endpackage
