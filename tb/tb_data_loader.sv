// tb_data_loader: feeds the loader vectors of bus words with random gaps
// between the enable pulses and checks that the low 18 bits of each word
// land in order (first word in x[0]), that x_vld pulses exactly one cycle
// after the last word and at no other time, and that x holds afterwards.
module tb_data_loader;
  import bdt_pkg::*;

  localparam int unsigned N = 5;

  logic  clk = 0, rst_n = 0, en = 0;
  word_t f_in = '0;
  feat_t x [N];
  logic  x_vld;

  int checks = 0, failures = 0;
  int vld_seen = 0;

  data_loader #(.N_FEATURES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && x_vld) vld_seen++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t words [N];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 6; v++) begin
      for (int i = 0; i < N; i++) begin
        words[i] = $urandom();
        repeat ($urandom_range(2)) @(negedge clk);
        en = 1; f_in = words[i];
        @(negedge clk);
        en = 0; f_in = $urandom();
        if (i < N - 1) check(!x_vld, "x_vld early");
      end
      // the edge after the last pulse raised x_vld for this cycle
      check(x_vld, "x_vld one cycle after last word");
      for (int i = 0; i < N; i++)
        check(x[i] == feat_t'(words[i][17:0]), $sformatf("vector %0d x[%0d]", v, i));
      @(negedge clk);
      check(!x_vld, "x_vld is a single pulse");
      for (int i = 0; i < N; i++)
        check(x[i] == feat_t'(words[i][17:0]), "x holds");
    end
    check(vld_seen == 6, $sformatf("x_vld count %0d", vld_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
