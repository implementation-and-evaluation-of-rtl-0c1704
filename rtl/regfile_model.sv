// regfile_model: a stand-in for the decision-tree model, used to test the
// data path and to measure memory read and write speed independently of
// any trained model.
//
// It is a bank of N registers that copies its N inputs to its N outputs:
// when `x_vld` is high the feature vector is stored, and one cycle later
// it appears on `y` with every bit of `y_vld` high for that one cycle. So a
// run of the accelerator with this model writes back exactly the words it
// read (low 18 bits), which makes read and write errors easy to spot.
//
// It has the same ports as bdt_top with N_FEATURES = N_CLASSES = N. The
// one-cycle delay follows the original design; the outputs hold between
// updates.
module regfile_model
  import bdt_pkg::*;
#(
  parameter int unsigned N = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  feat_t x     [N],
  input  logic  x_vld,
  output feat_t y     [N],
  output logic  y_vld [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        y[i]     <= '0;
        y_vld[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        y_vld[i] <= x_vld;
        if (x_vld) y[i] <= x[i];
      end
    end
  end

endmodule
