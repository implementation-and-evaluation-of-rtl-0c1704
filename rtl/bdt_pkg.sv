// bdt_pkg: types and constants shared by the BDT accelerator.
//
// Holds the AMBA AHB-Lite encodings used by the bus master and the control
// slave, the fixed-point format of the model's features and class scores
// (18-bit signed, as the model generator requires), the width of the
// feature/class counters (16 bits), and the contents of the example tree
// ensemble that bdt_top is built with.
//
// The ensemble contents are placeholders: a trained model supplies its own
// split features, thresholds and leaf scores, which would replace the four
// content functions below. The functions are arithmetic formulas so that
// the same numbers can be reproduced by any reference model. Thresholds and
// scores are fixed point with FRAC_BITS fractional bits (the 18-bit word is
// read as 8 integer and 10 fractional bits, the generator's usual default;
// this split is this design's choice and only matters for interpreting the
// numbers, not for the logic).
package bdt_pkg;

  localparam int unsigned BUS_W     = 32;  // AHB data and address width
  localparam int unsigned FEAT_W    = 18;  // feature and score width
  localparam int unsigned CNT_W     = 16;  // feature / class counter width
  localparam int unsigned FRAC_BITS = 10;

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic [BUS_W-1:0]         word_t;

  // HTRANS
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // HBURST
  localparam logic [2:0] HBURST_SINGLE = 3'b000;
  localparam logic [2:0] HBURST_INCR   = 3'b001;
  // HSIZE: 32-bit word
  localparam logic [2:0] HSIZE_WORD    = 3'b010;
  // HRESP
  localparam logic       HRESP_OKAY    = 1'b0;

  // Control register map of ahb_ctrl_slave, byte offsets.
  localparam logic [4:0] REG_IN_PTR  = 5'h00;  // input (feature) address
  localparam logic [4:0] REG_OUT_PTR = 5'h04;  // output (score) address
  localparam logic [4:0] REG_WR_CYC  = 5'h08;  // cycles spent writing
  localparam logic [4:0] REG_RD_CYC  = 5'h0C;  // cycles spent reading
  localparam logic [4:0] REG_TOT_CYC = 5'h10;  // cycles for the whole run
  localparam logic [4:0] REG_CTRL    = 5'h14;  // bit0 GO_AHEAD (rw), bit1 DONE (ro)

  // ---- example ensemble contents ------------------------------------
  // Tree t (0 .. N_CLASSES*N_TREES-1, class = t / N_TREES) is a complete
  // binary tree. Internal node n is numbered in heap order (children of n
  // are 2n+1, taken when x[feature] <= threshold, and 2n+2); leaf l is
  // numbered 0 .. 2**DEPTH-1 from the left.

  function automatic int unsigned node_feature(int unsigned t, int unsigned n,
                                               int unsigned n_features);
    return (t * 3 + n * 5 + 1) % n_features;
  endfunction

  function automatic feat_t node_threshold(int unsigned t, int unsigned n);
    int signed v;
    v = int'((t * 37 + n * 91 + 11) % 512) - 256;  // -256 .. 255
    return feat_t'(v * 8);                          // about -2.0 .. +2.0
  endfunction

  function automatic feat_t leaf_score(int unsigned t, int unsigned l);
    int signed v;
    v = int'((t * 13 + l * 29 + 7) % 64) - 32;      // -32 .. 31
    return feat_t'(v * 16);                          // about -0.5 .. +0.5
  endfunction

  function automatic feat_t class_bias(int unsigned c);
    int signed v;
    v = int'((c * 53 + 19) % 128) - 64;
    return feat_t'(v * 4);
  endfunction

endpackage
