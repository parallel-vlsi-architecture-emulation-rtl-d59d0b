// apsa_sweep_tree -- the binary tree of combinational nodes above the cells.
//
// N_CELLS = 2**LEVELS leaves. Level 0 is the root, level LEVELS the cells.
// Each level l holds 2**l nodes; node i of level l has children 2i and 2i+1
// of level l+1. leaf_up[j] is cell j's own summary, leaf_ctx[j] is the context
// delivered back to cell j; root_up is what the controller port sees at the
// top of the tree and root_ctx the context the controller injects there
// (normally "no carry, nothing selected to the right"). The whole up and down
// sweep is combinational, so an instruction that needs both passes completes
// in the cycle it is issued, with a path of 2*LEVELS node delays.
//
// The balanced tree with cells as leaves and the controller at the root
// follows the source architecture; a 16,384-cell memory gives a tree of
// height 14, as in its largest layout.
module apsa_sweep_tree
  import apsa_pkg::*;
#(
  parameter int LEVELS  = 14,
  parameter int N_CELLS = 2**LEVELS
) (
  input  up_t leaf_up  [N_CELLS],
  output dn_t leaf_ctx [N_CELLS],
  output up_t root_up,
  input  dn_t root_ctx
);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    up_t up [2**l];
    dn_t dn [2**l];
  end

  assign root_up          = g_lvl[0].up[0];
  assign g_lvl[0].dn[0]   = root_ctx;

  for (genvar j = 0; j < N_CELLS; j++) begin : g_leaf
    assign g_lvl[LEVELS].up[j] = leaf_up[j];
    assign leaf_ctx[j]         = g_lvl[LEVELS].dn[j];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_node_lvl
    for (genvar i = 0; i < 2**l; i++) begin : g_node
      apsa_tree_node u_node (
        .l_up  (g_lvl[l+1].up[2*i]),
        .r_up  (g_lvl[l+1].up[2*i+1]),
        .up    (g_lvl[l].up[i]),
        .ctx   (g_lvl[l].dn[i]),
        .l_ctx (g_lvl[l+1].dn[2*i]),
        .r_ctx (g_lvl[l+1].dn[2*i+1])
      );
    end
  end

  initial begin
    assert (N_CELLS == 2**LEVELS) else $error("N_CELLS must be 2**LEVELS");
  end

endmodule
