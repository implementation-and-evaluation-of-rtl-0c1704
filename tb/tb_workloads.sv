// tb_workloads: the register-file workloads RF-10, RF-50 and RF-100
// (N words read, copied through a register file, N words written back),
// each on a memory with two wait states per transfer (like the fabric
// block RAM) and one with one wait state (like the embedded SRAM). Checks
// the data and that the counters grow as (W+1) cycles per word.
module tb_workloads;
  logic hclk = 0, hresetn = 0, start = 0;
  logic fin [3];
  int   chk [3], fail [3];

  always #5 hclk = ~hclk;

  accel_harness #(.N(10))  h10  (.hclk, .hresetn, .start, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  accel_harness #(.N(50))  h50  (.hclk, .hresetn, .start, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  accel_harness #(.N(100)) h100 (.hclk, .hresetn, .start, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));

  initial begin
    repeat (100000) @(posedge hclk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge hclk);
    hresetn = 1;
    @(negedge hclk);
    start = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2]);
    $finish;
  end
endmodule
