// cd_pkg: constants, width rules and types shared by the Centralized Diamond
// matrix-vector multiplier.
//
// The array multiplies an m x n matrix A by a vector U of n elements. Its
// N = 7n/4 + 1 processing elements (PEs) sit on four levels: n multiplier
// leaves (level 3), n/2 adders (level 2), n/4 adders (level 1) and one central
// adder (level 0). The number of levels and the PE counts follow the document;
// the word widths below are this design's own choice (the document works on
// plain integers): every value is signed two's complement and each adder
// level widens its result by the bits needed so that no sum can overflow.
package cd_pkg;

  // Width of a leaf product of two DATA_W-bit signed operands.
  function automatic int prod_w(input int data_w);
    return 2 * data_w;
  endfunction

  // Width of the sum leaving a level 1 PE (four products added).
  function automatic int tree_w(input int data_w);
    return 2 * data_w + 2;
  endfunction

  // Width of the central PE's result: n/4 tree sums added.
  function automatic int res_w(input int data_w, input int n_leaves);
    return tree_w(data_w) + $clog2(n_leaves / 4);
  endfunction

  // Number of PEs of the whole diamond: N = 7n/4 + 1.
  function automatic int num_pes(input int n_leaves);
    return 7 * n_leaves / 4 + 1;
  endfunction

  // Leaves served by one tree of the diamond (one level 1 PE).
  localparam int LEAVES_PER_TREE = 4;

  // States of the SIMD sequencer.
  typedef enum logic [1:0] {
    CTRL_IDLE  = 2'd0,  // waiting for start
    CTRL_RUN   = 2'd1,  // one row of A enters the leaves per step
    CTRL_DRAIN = 2'd2   // no new rows; the upper levels finish the last rows
  } ctrl_state_e;

endpackage
