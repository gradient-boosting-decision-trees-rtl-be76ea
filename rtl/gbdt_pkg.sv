// gbdt_pkg: constants and node-word layout shared by the GBDT inference engine.
//
// Every tree node lives in one 32-bit word. A non-leaf word holds the index of the
// input feature to test (bits 31..24), the 16-bit comparison value (bits 23..8), the
// distance from this node to its right child (bits 7..1) and the leaf flag (bit 0 = 0).
// The left child is always the next word, because trees are stored in pre-order.
// A leaf word holds a 16-bit fixed-point output value (bits 31..16), the absolute
// address of the root of the next tree (bits 15..2), a last-tree flag (bit 1) and the
// leaf flag (bit 0 = 1). These field positions follow the published node format; the
// two's complement reading of the leaf value and the unsigned reading of features are
// this design's choice.
package gbdt_pkg;

  localparam int NODE_W     = 32;  // node word
  localparam int FEAT_IDX_W = 8;   // @_feature field
  localparam int CMP_W      = 16;  // cmp_value field
  localparam int REL_W      = 7;   // rel@_right_child field
  localparam int NEXT_W     = 14;  // @_next_tree field
  localparam int LEAF_W     = 16;  // leaf_value field
  localparam int FEAT_W     = 16;  // one input feature (unsigned integer)
  localparam int RESULT_W   = 32;  // class score accumulator
  localparam int N_THREADS  = 3;   // interleaved tree sets per class module

  typedef logic [NODE_W-1:0] node_word_t;

  // Non-leaf node, bit 0 = 0.
  typedef struct packed {
    logic [FEAT_IDX_W-1:0] feature;
    logic [CMP_W-1:0]      cmp_value;
    logic [REL_W-1:0]      rel_right;
    logic                  is_leaf;
  } inner_node_t;

  // Leaf node, bit 0 = 1.
  typedef struct packed {
    logic signed [LEAF_W-1:0] leaf_value;
    logic [NEXT_W-1:0]        next_tree;
    logic                     is_last_tree;
    logic                     is_leaf;
  } leaf_node_t;

  // Build a non-leaf word.
  function automatic node_word_t make_inner(input logic [FEAT_IDX_W-1:0] feature,
                                            input logic [CMP_W-1:0] cmp_value,
                                            input logic [REL_W-1:0] rel_right);
    inner_node_t n;
    n.feature   = feature;
    n.cmp_value = cmp_value;
    n.rel_right = rel_right;
    n.is_leaf   = 1'b0;
    return node_word_t'(n);
  endfunction

  // Build a leaf word.
  function automatic node_word_t make_leaf(input logic signed [LEAF_W-1:0] leaf_value,
                                           input logic [NEXT_W-1:0] next_tree,
                                           input logic is_last_tree);
    leaf_node_t n;
    n.leaf_value   = leaf_value;
    n.next_tree    = next_tree;
    n.is_last_tree = is_last_tree;
    n.is_leaf      = 1'b1;
    return node_word_t'(n);
  endfunction

endpackage
