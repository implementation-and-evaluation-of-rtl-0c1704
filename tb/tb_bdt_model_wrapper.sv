// tb_bdt_model_wrapper: streams feature words into two wrappers, one with
// the tree ensemble and one with the register-file stand-in, waits for
// y_vld and reads every class back through cnt_out/c_out. The ensemble's
// scores are compared with a tree-walking reference, the stand-in's with
// the words written. Checks the latency from the last word to y_vld:
// 1 + 3 + clog2(N_TREES) for the ensemble, 2 for the register file.
module tb_bdt_model_wrapper;
  import bdt_pkg::*;
  import bdt_ref_pkg::*;

  localparam int unsigned NF = 4, NC = 3, NTR = 20, D = 3;
  localparam int unsigned NR = 8;   // register-file size

  logic             clk = 0, rst_n = 0;
  logic             en_b = 0, en_r = 0;
  word_t            f_in = '0;
  logic [CNT_W-1:0] cnt_out = '0;
  word_t            c_out_b, c_out_r;
  logic             y_vld_b, y_vld_r;

  bdt_model_wrapper #(.N_FEATURES(NF), .N_CLASSES(NC), .N_TREES(NTR), .DEPTH(D), .MODEL_RF(1'b0))
    u_bdt (.clk, .rst_n, .en(en_b), .f_in, .cnt_out, .c_out(c_out_b), .y_vld(y_vld_b));
  bdt_model_wrapper #(.N_FEATURES(NR), .N_CLASSES(NR), .MODEL_RF(1'b1))
    u_rf (.clk, .rst_n, .en(en_r), .f_in, .cnt_out, .c_out(c_out_r), .y_vld(y_vld_r));

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      feat_t xv [$];
      word_t wv [$];
      int    lat;
      // ---- ensemble
      xv.delete();
      for (int i = 0; i < NF; i++) begin
        feat_t f;
        f = rand_feature();
        xv.push_back(f);
        @(negedge clk);
        en_b = 1; f_in = {$urandom_range(16383), 18'(f)};   // upper bits ignored
        @(negedge clk);
        en_b = 0;
      end
      lat = 1;
      while (!y_vld_b && lat < 50) begin @(negedge clk); lat++; end
      check(lat == 1 + 3 + $clog2(NTR), $sformatf("ensemble latency %0d", lat));
      for (int c = 0; c < NC; c++) begin
        cnt_out = CNT_W'(c);
        #1;
        check(c_out_b == {14'd0, 18'(ref_score(xv, c, NF, NTR, D))},
              $sformatf("class %0d score %h", c, c_out_b));
      end
      // ---- register file
      wv.delete();
      for (int i = 0; i < NR; i++) begin
        wv.push_back($urandom());
        @(negedge clk);
        en_r = 1; f_in = wv[i];
        @(negedge clk);
        en_r = 0;
      end
      lat = 1;
      while (!y_vld_r && lat < 50) begin @(negedge clk); lat++; end
      check(lat == 2, $sformatf("register-file latency %0d", lat));
      for (int c = 0; c < NR; c++) begin
        cnt_out = CNT_W'(c);
        #1;
        check(c_out_r == {14'd0, wv[c][17:0]}, $sformatf("rf word %0d", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
