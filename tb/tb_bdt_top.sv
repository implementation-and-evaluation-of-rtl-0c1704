// tb_bdt_top: scores random feature vectors with the default ensemble
// (4 features, 3 classes, 20 trees of depth 3 per class) and compares each
// class score with a tree-walking reference. Checks the latency of
// 3 + clog2(20) = 8 cycles from x_vld to y_vld, and that back-to-back
// vectors, one per cycle, all come out in order.
module tb_bdt_top;
  import bdt_pkg::*;
  import bdt_ref_pkg::*;

  localparam int unsigned NF = 4, NC = 3, NTR = 20, D = 3;
  localparam int unsigned LAT = 3 + $clog2(NTR);

  logic  clk = 0, rst_n = 0, x_vld = 0;
  feat_t x [NF];
  feat_t y [NC];
  logic  y_vld [NC];

  int checks = 0, failures = 0;
  int cycle = 0;

  bdt_top #(.N_FEATURES(NF), .N_CLASSES(NC), .N_TREES(NTR), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  // expected results, queued as vectors enter
  logic [NC*FEAT_W-1:0] exp_q [$];   // class c in bits [c*18 +: 18]
  int    t_in_q [$];

  always @(negedge clk) if (rst_n && y_vld[0]) begin
    logic [NC*FEAT_W-1:0] e;
    int    t0;
    if (exp_q.size() == 0) begin
      check(0, "unexpected y_vld");
    end else begin
      e  = exp_q.pop_front();
      t0 = t_in_q.pop_front();
      check(cycle - t0 == LAT, $sformatf("latency %0d", cycle - t0));
      for (int c = 0; c < NC; c++) begin
        check(y_vld[c], "all class flags");
        check(y[c] == feat_t'(e[c*FEAT_W +: FEAT_W]), $sformatf("class %0d got %0d exp %0d", c, y[c], feat_t'(e[c*FEAT_W +: FEAT_W])));
      end
    end
  end

  task automatic send();
    feat_t xv [$];
    logic [NC*FEAT_W-1:0] e;
    for (int i = 0; i < NF; i++) begin x[i] = rand_feature(); xv.push_back(x[i]); end
    for (int c = 0; c < NC; c++) e[c*FEAT_W +: FEAT_W] = ref_score(xv, c, NF, NTR, D);
    x_vld = 1;
    exp_q.push_back(e);
    t_in_q.push_back(cycle);
    @(negedge clk);
    x_vld = 0;
  endtask

  initial begin
    for (int i = 0; i < NF; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // single vectors
    for (int r = 0; r < 50; r++) begin
      send();
      repeat (LAT + 2) @(negedge clk);
    end
    // back to back
    for (int r = 0; r < 100; r++) send();
    repeat (LAT + 3) @(negedge clk);
    check(exp_q.size() == 0, "all results returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
