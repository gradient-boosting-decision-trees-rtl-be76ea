// node_exec: the execute logic of one tree node.
//
// For a non-leaf node the selected feature is compared with cmp_value. If the feature
// is less than or equal to cmp_value the left child, stored right after the node, is
// next (last_addr + 1); otherwise the right child at last_addr + rel@_right_child.
// For a leaf the next node is the root of the next tree, given as an absolute address
// whose low ADDR_W bits are used, and the leaf value is sign-extended for accumulation.
// Purely combinational; the class modules register around it.
module node_exec
  import gbdt_pkg::*;
#(
  parameter int ADDR_W = 13
) (
  input  node_word_t            node,
  input  logic [FEAT_W-1:0]     feature,
  input  logic [ADDR_W-1:0]     last_addr,
  output logic [ADDR_W-1:0]     next_addr,
  output logic                  is_leaf,
  output logic                  is_last_tree,
  output logic                  go_right,
  output logic [RESULT_W-1:0]   leaf_ext
);

  // The memory address must fit in the @_next_tree field, and a right-child distance
  // must fit in the address.
  if (ADDR_W > NEXT_W || ADDR_W < REL_W) begin : g_bad_addr_w
    $error("node_exec: ADDR_W must lie between REL_W and NEXT_W");
  end

  inner_node_t          inner;
  leaf_node_t           leaf;
  logic [ADDR_W-1:0]    step;
  logic [ADDR_W-1:0]    child_addr;

  assign inner = inner_node_t'(node);
  assign leaf  = leaf_node_t'(node);

  always_comb begin
    is_leaf      = node[0];
    is_last_tree = is_leaf & leaf.is_last_tree;
    go_right     = !is_leaf && (feature > inner.cmp_value);
    step         = go_right ? ADDR_W'(inner.rel_right) : ADDR_W'(1);
    child_addr   = last_addr + step;
    next_addr    = is_leaf ? leaf.next_tree[ADDR_W-1:0] : child_addr;
    leaf_ext     = {{(RESULT_W-LEAF_W){leaf.leaf_value[LEAF_W-1]}}, leaf.leaf_value};
  end

endmodule
