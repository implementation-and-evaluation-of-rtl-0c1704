// data_loader: turns the stream of 32-bit bus words into the parallel
// feature vector the tree model needs.
//
// The bus master reads one word per feature and pulses `en` while the word
// is on `f_in`. The loader keeps the least significant 18 bits of each word
// and shifts them into a chain of N_FEATURES registers, so after
// N_FEATURES pulses the first word read sits in x[0] and the last in
// x[N_FEATURES-1]. Building it as a shift register, rather than writing a
// slot chosen by an address, is what the original design settled on: it
// needs only the feature flip-flops and a few LUTs.
//
// A counter of the pulses raises `x_vld` for one cycle, in the cycle after
// the last feature was shifted in, and then starts counting afresh. That
// the loader makes `x_vld` itself, from its own counter, is this design's
// reading of the block diagram, where the valid flag leaves the loader.
//
// Timing: one word per `en` pulse, any spacing; x_vld one cycle after the
// final pulse; x holds its value until the next pulse.
module data_loader
  import bdt_pkg::*;
#(
  parameter int unsigned N_FEATURES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,                 // shift f_in in
  input  word_t       f_in,               // bus word, bits [17:0] used
  output feat_t       x [N_FEATURES],     // x[0] = first word read
  output logic        x_vld               // one-cycle pulse, vector complete
);

  localparam int unsigned CW = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_FEATURES; i++) x[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < N_FEATURES - 1; i++) x[i] <= x[i+1];
      x[N_FEATURES-1] <= feat_t'(f_in[FEAT_W-1:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      x_vld <= 1'b0;
    end else begin
      x_vld <= 1'b0;
      if (en) begin
        if (count == CW'(N_FEATURES - 1)) begin
          count <= '0;
          x_vld <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
