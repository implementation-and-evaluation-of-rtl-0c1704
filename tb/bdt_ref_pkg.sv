// bdt_ref_pkg: reference model of the tree ensemble for testbenches.
//
// Scores a feature vector by walking each tree from the root, one
// comparison per level, the way software evaluates a decision tree, and
// adds the leaf scores and the class bias with 18-bit wrap-around. The
// tree contents are read from bdt_pkg; the evaluation is independent of
// the parallel compare/AND/look-up circuit in bdt_top.
package bdt_ref_pkg;
  import bdt_pkg::*;

  function automatic feat_t ref_score(const ref feat_t x[$], input int unsigned c,
                                      int unsigned n_features, int unsigned n_trees,
                                      int unsigned depth);
    int signed acc;
    acc = int'(class_bias(c));
    for (int unsigned k = 0; k < n_trees; k++) begin
      int unsigned t, node;
      t    = c * n_trees + k;
      node = 0;
      for (int unsigned d = 0; d < depth; d++) begin
        int unsigned f;
        f = node_feature(t, node, n_features);
        if (x[f] <= node_threshold(t, node)) node = 2 * node + 1;
        else                                 node = 2 * node + 2;
      end
      acc += int'(leaf_score(t, node - ((1 << depth) - 1)));
    end
    return feat_t'(acc);
  endfunction

  // Random feature in about -2.5 .. +2.5 (fixed point, 10 fraction bits).
  function automatic feat_t rand_feature();
    int signed v;
    v = int'($urandom_range(5120)) - 2560;
    return feat_t'(v);
  endfunction

endpackage
