// apsa_tree_node -- one combinational node of the APSA sweep tree.
//
// A sweep runs in two passes through the tree in the same clock cycle. On the
// way up, the node merges the summaries of its left and right subtrees: the
// "some cell selected" bit is ORed, the word of the leftmost selected cell is
// kept (the left subtree wins), and the position-carry functions are composed
// (left part first). On the way down, the node splits the context it receives
// for its whole subtree into a context for each child: the left child gets the
// carry from the left unchanged and learns whether anything in the right
// subtree or further right is selected; the right child gets the carry pushed
// through the left subtree and the "selected to the right" bit unchanged.
//
// The tree of combinational nodes with the controller port at the root and the
// cells as leaves follows the source architecture; the particular fields the
// node computes are this implementation's choice, sized for the instructions
// of apsa_pkg. Purely combinational; no clock.
module apsa_tree_node
  import apsa_pkg::*;
(
  input  up_t l_up,    // summary from the left subtree
  input  up_t r_up,    // summary from the right subtree
  output up_t up,      // summary of this subtree, to the parent
  input  dn_t ctx,     // context of this subtree, from the parent
  output dn_t l_ctx,   // context for the left subtree
  output dn_t r_ctx    // context for the right subtree
);

  always_comb begin
    up.any_sel    = l_up.any_sel | r_up.any_sel;
    up.first_word = l_up.any_sel ? l_up.first_word : r_up.first_word;
    up.fn         = pos_compose(l_up.fn, r_up.fn);

    l_ctx.cin       = ctx.cin;
    l_ctx.sel_right = ctx.sel_right | r_up.any_sel;
    r_ctx.cin       = pos_apply(l_up.fn, ctx.cin);
    r_ctx.sel_right = ctx.sel_right;
  end

endmodule
