// bdt_top: a boosted-decision-tree ensemble evaluated fully in parallel, in
// the form the Conifer/hls4ml code generator gives it.
//
// Every tree is laid out as logic rather than walked: each internal node
// compares its feature with its threshold (x[f] <= t), all nodes of all
// trees at once. A leaf is reached when every comparison on its path has
// the right outcome, so each leaf's activation is the AND of the path's
// comparison results, each taken plain (left branch, x <= t) or inverted
// (right branch). Exactly one leaf per tree is active; the activations
// select that tree's score from a table of leaf scores. Each class owns
// N_TREES trees (gradient boosting adds the scores of successive trees),
// and its score is the class bias plus the sum of its trees' scores.
//
// Pipeline, all stages registered:
//   1. all node comparisons
//   2. leaf activation and score selection per tree
//   3. .. 2+LEVELS: a binary adder tree per class, LEVELS = clog2(N_TREES)
//   last: add the class bias, wrap to 18 bits, hold on y
// Latency from x_vld to y_vld is 3 + clog2(N_TREES) cycles (8 for 20 trees);
// a new vector can enter every cycle. y holds its value until the next
// result; every bit of y_vld pulses for one cycle with it.
//
// The parallel comparator/AND/look-up structure and the 18-bit signed
// format follow the original design. Trees are complete binary trees of
// depth DEPTH (a shallower trained tree fits by repeating a leaf); the tree
// contents come from bdt_pkg and stand in for a trained model. The ensemble
// size defaults (20 trees per class, depth 3) and the pipelining are this
// design's choices. Sums wrap on overflow, like the generator's default
// fixed-point type.
module bdt_top
  import bdt_pkg::*;
#(
  parameter int unsigned N_FEATURES = 4,
  parameter int unsigned N_CLASSES  = 3,
  parameter int unsigned N_TREES    = 20,  // trees per class
  parameter int unsigned DEPTH      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  feat_t x     [N_FEATURES],
  input  logic  x_vld,
  output feat_t y     [N_CLASSES],
  output logic  y_vld [N_CLASSES]
);

  localparam int unsigned NT     = N_CLASSES * N_TREES;
  localparam int unsigned NN     = (1 << DEPTH) - 1;   // internal nodes
  localparam int unsigned NL     = 1 << DEPTH;         // leaves
  localparam int unsigned LEVELS = (N_TREES > 1) ? $clog2(N_TREES) : 0;
  localparam int unsigned P      = 1 << LEVELS;        // padded tree count
  localparam int unsigned SW     = FEAT_W + LEVELS + 1;
  localparam int unsigned LAT    = 3 + LEVELS;

  typedef logic signed [SW-1:0] sum_t;

  logic [NN-1:0] cmp   [NT];          // stage 1
  feat_t         score [NT];          // stage 2
  sum_t          lf    [N_CLASSES][P];     // adder-tree inputs
  sum_t          nd    [N_CLASSES][P];     // adder-tree nodes (P-1 used)
  sum_t          total [N_CLASSES];
  logic [LAT-1:0] vld_pipe;

  // ---- stage 1: node comparisons ---------------------------------------
  for (genvar t = 0; t < NT; t++) begin : g_tree
    for (genvar n = 0; n < NN; n++) begin : g_node
      localparam int unsigned F  = node_feature(t, n, N_FEATURES);
      localparam feat_t       TH = node_threshold(t, n);
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) cmp[t][n] <= 1'b0;
        else        cmp[t][n] <= (x[F] <= TH);
    end

    // ---- stage 2: leaf activation and score look-up ---------------------
    logic [NL-1:0] act;
    always_comb begin
      for (int l = 0; l < NL; l++) begin
        int unsigned node;
        logic        right;
        node   = 0;
        act[l] = 1'b1;
        for (int d = 0; d < DEPTH; d++) begin
          right  = l[DEPTH-1-d];
          act[l] = act[l] & (right ? ~cmp[t][node] : cmp[t][node]);
          node   = 2 * node + 1 + int'(right);
        end
      end
    end

    feat_t sel;
    always_comb begin
      sel = '0;
      for (int l = 0; l < NL; l++)
        sel |= act[l] ? leaf_score(t, l) : feat_t'(0);
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) score[t] <= '0;
      else        score[t] <= sel;
  end

  // ---- adder tree per class -----------------------------------------------
  // Heap layout: node k (0 .. P-2) adds children 2k+1 and 2k+2; child
  // numbers P-1 .. 2P-2 are the P tree scores (zero beyond N_TREES).
  // Node 0 holds the class sum, LEVELS register stages after the scores.
  always_comb begin
    for (int c = 0; c < N_CLASSES; c++)
      for (int i = 0; i < P; i++)
        lf[c][i] = (i < N_TREES) ? sum_t'(score[c*N_TREES + i]) : '0;
  end

  if (LEVELS > 0) begin : g_sum
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int c = 0; c < N_CLASSES; c++)
          for (int k = 0; k < P; k++) nd[c][k] <= '0;
      end else begin
        for (int c = 0; c < N_CLASSES; c++)
          for (int k = 0; k < P - 1; k++)
            nd[c][k] <= ((2*k+1 >= P-1) ? lf[c][2*k+1-(P-1)] : nd[c][2*k+1])
                      + ((2*k+2 >= P-1) ? lf[c][2*k+2-(P-1)] : nd[c][2*k+2]);
      end
    end
    always_comb for (int c = 0; c < N_CLASSES; c++) total[c] = nd[c][0];
  end else begin : g_nosum
    always_comb for (int c = 0; c < N_CLASSES; c++) total[c] = lf[c][0];
  end

  // ---- bias, output register, valid pipeline ----------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_pipe <= '0;
      for (int c = 0; c < N_CLASSES; c++) y[c] <= '0;
    end else begin
      vld_pipe <= {vld_pipe[LAT-2:0], x_vld};
      if (vld_pipe[LAT-2])
        for (int c = 0; c < N_CLASSES; c++)
          y[c] <= feat_t'(total[c] + sum_t'(class_bias(c)));
    end
  end

  always_comb
    for (int c = 0; c < N_CLASSES; c++) y_vld[c] = vld_pipe[LAT-1];

endmodule
