// tb_regfile_model: checks that the register-file stand-in returns its
// inputs exactly one cycle after x_vld, pulses every y_vld bit for that
// one cycle only, and holds y while x changes without x_vld.
module tb_regfile_model;
  import bdt_pkg::*;

  localparam int unsigned N = 10;

  logic  clk = 0, rst_n = 0, x_vld = 0;
  feat_t x [N];
  feat_t y [N];
  logic  y_vld [N];

  int checks = 0, failures = 0;

  regfile_model #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    feat_t exp [N];
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < N; i++) begin x[i] = feat_t'($urandom()); exp[i] = x[i]; end
      x_vld = 1;
      @(negedge clk);
      x_vld = 0;
      for (int i = 0; i < N; i++) begin
        check(y_vld[i], "y_vld after one cycle");
        check(y[i] == exp[i], $sformatf("y[%0d]", i));
        x[i] = feat_t'($urandom());
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        check(!y_vld[i], "y_vld single pulse");
        check(y[i] == exp[i], "y holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
