// residue_pkg - constants, types and elaboration-time helper functions shared
// by the self-checking residue generators.
//
// All residues in this design travel as 1-out-of-A codes: a residue r in
// 0..A-1 is an A-bit vector with bit r set and every other bit clear. Bit i of
// a code vector is the line called R^i (or X^i, Y^i) in the descriptions.
//
// The functions below are only evaluated while parameters are elaborated:
//   pow2_mod      |2^e|_A, the weight of a byte whose lowest bit is bit e
//   byte_count /
//   byte_lo /
//   byte_width    how a WIDTH-bit input number is cut into bytes for the
//                 first rank of |x|_A blocks (see residue_tree)
//   lvl_count /
//   lvl_offset /
//   lvl_levels    shape of a balanced tree of +A cells over N leaves
//   pow2_floor    largest power of two not above N (complete tree)
//   tree_nodes    length of a tree's flat node array, leaves included
package residue_pkg;

  // Arrangement of the +A cells that sum the byte residues.
  //   TREE_BALANCED: pairwise binary tree; every leaf passes through the same
  //                  number of cells when the leaf count is a power of two.
  //   TREE_CHAIN:    maximally unbalanced chain; the least significant byte
  //                  enters first and the most significant byte last, so the
  //                  high bits of the input see the shortest path.
  //   TREE_COMPLETE: tree of minimum depth in which only the least significant
  //                  bytes take the deepest level: with N leaves and P2 the
  //                  largest power of two not above N, bytes 0..2(N-P2)-1
  //                  are first added in pairs, and the P2 resulting nodes
  //                  form a perfect pairwise tree.
  typedef enum logic [1:0] {
    TREE_BALANCED = 2'd0,
    TREE_CHAIN    = 2'd1,
    TREE_COMPLETE = 2'd2
  } tree_shape_e;

  // |2^e| mod a, computed without overflow for any e.
  function automatic int unsigned pow2_mod(int unsigned e, int unsigned a);
    int unsigned p;
    p = 1 % a;
    for (int unsigned i = 0; i < e; i++) p = (2 * p) % a;
    return p;
  endfunction

  // Byte layout. Counting from the least significant end, the input is cut
  // into bytes of bw bits; the `wide` most significant bytes are bw+1 bits;
  // bits left over at the top are absorbed by the most significant byte.
  function automatic int unsigned narrow_count(int unsigned width, int unsigned bw,
                                               int unsigned wide);
    return (width - wide * (bw + 1)) / bw;
  endfunction

  function automatic int unsigned byte_count(int unsigned width, int unsigned bw,
                                             int unsigned wide);
    return narrow_count(width, bw, wide) + wide;
  endfunction

  function automatic int unsigned byte_lo(int unsigned b, int unsigned width,
                                          int unsigned bw, int unsigned wide);
    int unsigned nn;
    nn = narrow_count(width, bw, wide);
    if (b < nn) return b * bw;
    return nn * bw + (b - nn) * (bw + 1);
  endfunction

  function automatic int unsigned byte_width(int unsigned b, int unsigned width,
                                             int unsigned bw, int unsigned wide);
    int unsigned nb;
    nb = byte_count(width, bw, wide);
    if (b == nb - 1) return width - byte_lo(b, width, bw, wide);
    if (b < narrow_count(width, bw, wide)) return bw;
    return bw + 1;
  endfunction

  // Balanced tree: level 0 holds the n leaves, level l holds ceil(count/2) of
  // level l-1 (an odd node at the end of a level is passed down unchanged).
  function automatic int unsigned lvl_count(int unsigned l, int unsigned n);
    int unsigned c;
    c = n;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  // Index of the first node of level l in a flat array of all nodes.
  function automatic int unsigned lvl_offset(int unsigned l, int unsigned n);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < l; i++) o += lvl_count(i, n);
    return o;
  endfunction

  // Number of levels, the leaf level included, down to the single root.
  function automatic int unsigned lvl_levels(int unsigned n);
    int unsigned l;
    l = 1;
    while (lvl_count(l - 1, n) > 1) l++;
    return l;
  endfunction

  // Largest power of two that does not exceed n (n >= 1).
  function automatic int unsigned pow2_floor(int unsigned n);
    int unsigned p;
    p = 1;
    while (2 * p <= n) p *= 2;
    return p;
  endfunction

  // Number of entries in a tree's flat node array: n leaves, then the cell
  // outputs (and, for TREE_BALANCED, the pass-through copies).
  function automatic int unsigned tree_nodes(tree_shape_e shape, int unsigned n);
    return (shape == TREE_BALANCED) ? lvl_offset(lvl_levels(n), n) : 2 * n - 1;
  endfunction

endpackage
