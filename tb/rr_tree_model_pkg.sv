// rr_tree_model_pkg -- reference model of the hierarchic round-robin arbiter,
// for the testbenches.
//
// The model is written independently of the RTL: each node's token is an
// integer position, and a node's choice is found by scanning its inputs
// upwards from the token, cyclically, for the first one with a request. The
// tree has a root over num_mid middle nodes, each over lpm leaves with the
// given sizes (lowest candidates first). step() returns the expected one-hot
// grant for a request vector and, when the arbiter is enabled and something
// is granted, moves the token of every node on the granted path one place
// past its choice.
package rr_tree_model_pkg;

  class rr_tree_model;
    int num_mid;
    int lpm;
    int sizes[$];
    int root_tok;
    int mid_tok[$];
    int leaf_tok[$];
    int last_path[3];   // root, middle and leaf choice of the last grant

    function new(int num_mid, int lpm, int sizes[$]);
      this.num_mid = num_mid;
      this.lpm = lpm;
      this.sizes = sizes;
      reset();
    endfunction

    function void reset();
      root_tok = 0;
      mid_tok.delete();
      leaf_tok.delete();
      for (int m = 0; m < num_mid; m++) mid_tok.push_back(0);
      for (int l = 0; l < num_mid * lpm; l++) leaf_tok.push_back(0);
    endfunction

    function int width();
      int w = 0;
      for (int l = 0; l < num_mid * lpm; l++) w += sizes[l];
      return w;
    endfunction

    function int offset(int leaf);
      int o = 0;
      for (int l = 0; l < leaf; l++) o += sizes[l];
      return o;
    endfunction

    function bit leaf_any(logic [63:0] req, int leaf);
      for (int i = 0; i < sizes[leaf]; i++)
        if (req[offset(leaf) + i]) return 1'b1;
      return 1'b0;
    endfunction

    function bit mid_any(logic [63:0] req, int m);
      for (int k = 0; k < lpm; k++)
        if (leaf_any(req, m * lpm + k)) return 1'b1;
      return 1'b0;
    endfunction

    // Expected grant; tokens move only if commit is set.
    function logic [63:0] step(logic [63:0] req, bit commit);
      int m, k, leaf, i;
      m = -1;
      for (int s = 0; s < num_mid; s++)
        if (m < 0 && mid_any(req, (root_tok + s) % num_mid)) m = (root_tok + s) % num_mid;
      if (m < 0) return '0;
      k = -1;
      for (int s = 0; s < lpm; s++)
        if (k < 0 && leaf_any(req, m * lpm + (mid_tok[m] + s) % lpm)) k = (mid_tok[m] + s) % lpm;
      leaf = m * lpm + k;
      i = -1;
      for (int s = 0; s < sizes[leaf]; s++)
        if (i < 0 && req[offset(leaf) + (leaf_tok[leaf] + s) % sizes[leaf]])
          i = (leaf_tok[leaf] + s) % sizes[leaf];
      last_path[0] = m;
      last_path[1] = k;
      last_path[2] = i;
      if (commit) begin
        root_tok = (m + 1) % num_mid;
        mid_tok[m] = (k + 1) % lpm;
        leaf_tok[leaf] = (i + 1) % sizes[leaf];
      end
      return 64'd1 << (offset(leaf) + i);
    endfunction
  endclass

endpackage
