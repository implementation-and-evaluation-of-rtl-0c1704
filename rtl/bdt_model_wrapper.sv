// bdt_model_wrapper: adapts the parallel tree model to a 32-bit word bus.
//
// The data loader collects the features one bus word at a time (en/f_in)
// and presents them to the model all at once with x_vld; the model's class
// scores come back all at once, and the data unloader returns the one
// named by cnt_out on c_out and condenses the per-class valid flags into
// y_vld. The model is either the decision-tree ensemble (MODEL_RF = 0) or
// the register-file stand-in that copies inputs to outputs
// (MODEL_RF = 1, needs N_FEATURES = N_CLASSES). The three-part structure
// follows the original design; the parameter selecting the model is this
// design's (there, the model file was swapped).
//
// Latency from the last en pulse to y_vld: 1 (loader) + 3 + clog2(N_TREES)
// for the tree model, 1 + 1 for the register file.
module bdt_model_wrapper
  import bdt_pkg::*;
#(
  parameter int unsigned N_FEATURES = 4,
  parameter int unsigned N_CLASSES  = 3,
  parameter int unsigned N_TREES    = 20,
  parameter int unsigned DEPTH      = 3,
  parameter bit          MODEL_RF   = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  word_t            f_in,
  input  logic [CNT_W-1:0] cnt_out,
  output word_t            c_out,
  output logic             y_vld
);

  feat_t x     [N_FEATURES];
  logic  x_vld;
  feat_t y     [N_CLASSES];
  logic  y_vld_v [N_CLASSES];

  data_loader #(.N_FEATURES(N_FEATURES)) u_loader (
    .clk, .rst_n, .en, .f_in, .x, .x_vld
  );

  if (MODEL_RF) begin : g_rf
    regfile_model #(.N(N_FEATURES)) u_model (
      .clk, .rst_n, .x, .x_vld, .y, .y_vld(y_vld_v)
    );
  end else begin : g_bdt
    bdt_top #(
      .N_FEATURES(N_FEATURES), .N_CLASSES(N_CLASSES),
      .N_TREES(N_TREES), .DEPTH(DEPTH)
    ) u_model (
      .clk, .rst_n, .x, .x_vld, .y, .y_vld(y_vld_v)
    );
  end

  data_unloader #(.N_CLASSES(N_CLASSES)) u_unloader (
    .y, .y_vld(y_vld_v), .cnt_out, .c_out, .y_vld_all(y_vld)
  );

  if (MODEL_RF && N_FEATURES != N_CLASSES) begin : g_bad_cfg
    $error("bdt_model_wrapper: the register-file model needs N_FEATURES == N_CLASSES");
  end

endmodule
