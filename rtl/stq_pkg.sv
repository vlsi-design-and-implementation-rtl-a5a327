// stq_pkg: constants and index arithmetic shared by the systolic tree queue.
//
// The queue is a complete binary tree of identical nodes. Nodes are numbered
// in heap order: the root is node 1 and node i has its left child at 2*i and
// its right child at 2*i+1. A tree of LEVELS levels has 2**LEVELS-1 nodes, and
// that is also the number of items the queue holds (one per node data
// register). The defaults (8-bit items, 4 levels = 15 nodes) are the
// configuration of the reference design; everything else is parameterised.
package stq_pkg;

  // Item width and tree depth of the reference 15 x 8-bit queue.
  localparam int unsigned DEFAULT_WIDTH  = 8;
  localparam int unsigned DEFAULT_LEVELS = 4;

  // Number of nodes (and of storable items) in a tree of the given depth.
  function automatic int unsigned node_count(int unsigned levels);
    return (1 << levels) - 1;
  endfunction

  // Heap-order navigation.
  function automatic int unsigned left_child(int unsigned i);
    return 2 * i;
  endfunction

  function automatic int unsigned right_child(int unsigned i);
    return 2 * i + 1;
  endfunction

  // True if node i has no children in a tree of the given depth.
  function automatic bit is_leaf(int unsigned i, int unsigned levels);
    return i >= (1 << (levels - 1));
  endfunction

endpackage
