// tb_data_unloader: random class scores and counter values; checks that
// c_out is the selected 18-bit score padded with zeros, zero past the last
// class, and that y_vld_all is high only when every class flag is.
module tb_data_unloader;
  import bdt_pkg::*;

  localparam int unsigned NC = 7;

  feat_t            y [NC];
  logic             y_vld [NC];
  logic [CNT_W-1:0] cnt_out;
  word_t            c_out;
  logic             y_vld_all;

  int checks = 0, failures = 0;

  data_unloader #(.N_CLASSES(NC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 200; r++) begin
      bit all;
      int unsigned k;
      all = 1;
      for (int i = 0; i < NC; i++) begin
        y[i] = feat_t'($urandom());
        y_vld[i] = ($urandom_range(7) != 0);
        all &= y_vld[i];
      end
      k = $urandom_range(NC + 2);
      cnt_out = CNT_W'(k);
      #1;
      if (k < NC) check(c_out == {14'd0, 18'(y[k])}, $sformatf("c_out for class %0d", k));
      else        check(c_out == 32'd0, "c_out past last class");
      check(y_vld_all == all, "y_vld_all");
    end
    for (int i = 0; i < NC; i++) y_vld[i] = 1;
    #1 check(y_vld_all, "all valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
