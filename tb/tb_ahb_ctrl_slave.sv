// tb_ahb_ctrl_slave: drives the control slave as an AHB-Lite master would.
// Writes and reads back IN_PTR, OUT_PTR and CTRL, reads the three timer
// inputs and the DONE flag through their offsets, checks that writes to
// read-only offsets change nothing, and checks the timing: a read's data
// phase is one cycle (no wait state), a write's two (one wait state).
module tb_ahb_ctrl_slave;
  import bdt_pkg::*;

  logic       hclk = 0, hresetn = 0;
  logic       hsel = 0;
  word_t      haddr = '0;
  htrans_t    htrans = HTRANS_IDLE;
  logic       hwrite = 0;
  logic [2:0] hsize = HSIZE_WORD;
  word_t      hwdata = '0;
  logic       hready;
  word_t      hrdata;
  logic       hreadyout, hresp;
  word_t      in_ptr, out_ptr;
  logic       go_ahead;
  logic       done = 0;
  word_t      rd_cycles = '0, wr_cycles = '0, tot_cycles = '0;

  assign hready = hreadyout;

  ahb_ctrl_slave dut (.*);

  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // returns the number of data-phase cycles
  task automatic bus_write(input logic [4:0] a, input word_t d, output int cyc);
    @(negedge hclk);
    while (!hreadyout) @(negedge hclk);
    hsel = 1; haddr = {27'h1234567, a}; htrans = HTRANS_NONSEQ; hwrite = 1;
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; hwdata = d;
    cyc = 1;
    while (!hreadyout) begin @(negedge hclk); cyc++; end
    @(posedge hclk);
  endtask

  task automatic bus_read(input logic [4:0] a, output word_t d, output int cyc);
    @(negedge hclk);
    while (!hreadyout) @(negedge hclk);
    hsel = 1; haddr = {27'h0, a}; htrans = HTRANS_NONSEQ; hwrite = 0;
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE; hwdata = $urandom();
    cyc = 1;
    while (!hreadyout) begin @(negedge hclk); cyc++; end
    d = hrdata;
    @(posedge hclk);
  endtask

  initial begin
    word_t d, v1, v2;
    int    cyc;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    repeat (2) @(negedge hclk);

    v1 = $urandom() & ~32'h3; v2 = $urandom() & ~32'h3;
    bus_write(REG_IN_PTR, v1, cyc);  check(cyc == 2, $sformatf("write data phase %0d cycles", cyc));
    bus_write(REG_OUT_PTR, v2, cyc); check(cyc == 2, "write wait state");
    check(in_ptr == v1 && out_ptr == v2, "pointer outputs");
    bus_read(REG_IN_PTR, d, cyc);  check(d == v1, "IN_PTR readback"); check(cyc == 1, "read no wait");
    bus_read(REG_OUT_PTR, d, cyc); check(d == v2, "OUT_PTR readback");

    check(!go_ahead, "go_ahead reset");
    bus_write(REG_CTRL, 32'h1, cyc); check(go_ahead, "go_ahead set");
    done = 1;
    bus_read(REG_CTRL, d, cyc); check(d == 32'h3, $sformatf("CTRL reads %h", d));
    bus_write(REG_CTRL, 32'h0, cyc); check(!go_ahead, "go_ahead cleared");
    done = 0;
    bus_read(REG_CTRL, d, cyc); check(d == 32'h0, "CTRL clear");

    for (int r = 0; r < 10; r++) begin
      rd_cycles = $urandom(); wr_cycles = $urandom(); tot_cycles = $urandom();
      bus_read(REG_RD_CYC, d, cyc);  check(d == rd_cycles, "RD_CYC");
      bus_read(REG_WR_CYC, d, cyc);  check(d == wr_cycles, "WR_CYC");
      bus_read(REG_TOT_CYC, d, cyc); check(d == tot_cycles, "TOT_CYC");
    end
    // read-only and unmapped offsets
    bus_write(REG_RD_CYC, 32'hFFFF_FFFF, cyc);
    bus_write(5'h18, 32'hFFFF_FFFF, cyc);
    check(in_ptr == v1 && out_ptr == v2 && !go_ahead, "read-only writes ignored");
    bus_read(5'h18, d, cyc); check(d == 0, "unmapped reads zero");
    check(hresp == HRESP_OKAY, "OKAY response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
