// data_unloader: hands the model's class scores to the bus one at a time.
//
// The bus master puts the index of the class it is about to write on
// `cnt_out`; the unloader returns that class's 18-bit score on `c_out`,
// padded with zeros to the 32-bit bus width. It is purely combinational: a
// multiplexer over all classes. An index past the last class returns zero.
//
// The model flags each class score valid separately (`y_vld`, one bit per
// class); the unloader condenses them into one flag, `y_vld_all`, high when
// every class is valid, which tells the master the result can be written.
//
// Zero padding (rather than sign extension) and the AND used to condense
// the valid flags are this design's choices; the selection by counter is
// the original design's.
module data_unloader
  import bdt_pkg::*;
#(
  parameter int unsigned N_CLASSES = 3
) (
  input  feat_t            y     [N_CLASSES],
  input  logic             y_vld [N_CLASSES],
  input  logic [CNT_W-1:0] cnt_out,
  output word_t            c_out,
  output logic             y_vld_all
);

  always_comb begin
    c_out = '0;
    for (int i = 0; i < N_CLASSES; i++)
      if (cnt_out == CNT_W'(i)) c_out = {{(BUS_W-FEAT_W){1'b0}}, y[i]};
  end

  always_comb begin
    y_vld_all = 1'b1;
    for (int i = 0; i < N_CLASSES; i++) y_vld_all &= y_vld[i];
  end

endmodule
