// tb_ahbl_master: runs the bus master against a memory model. The model
// side is played by the testbench: it records the words the master hands
// over (en/f_in), raises y_vld some cycles after the last one, and returns
// a known word for each class index on c_out. Checks the words fetched,
// the words stored, the burst encoding (NONSEQ, then SEQ, a new NONSEQ at
// a 1 KB page), AHB-Lite protocol rules, the DONE/GO_AHEAD handshake, and
// the cycle counters: (W+1)*N + 1 for W wait states per transfer.
module tb_ahbl_master;
  import bdt_pkg::*;

  localparam int unsigned NF = 6, NC = 5;

  logic             hclk = 0, hresetn = 0;
  word_t            haddr, hwdata, hrdata;
  htrans_t          htrans;
  logic             hwrite, hmastlock, hready;
  logic [2:0]       hsize, hburst;
  logic [3:0]       hprot;
  logic             go_ahead = 0, done, busy, en;
  word_t            in_ptr = '0, out_ptr = '0;
  word_t            rd_cycles, wr_cycles, tot_cycles, f_in, c_out;
  logic [CNT_W-1:0] cnt_out;
  logic             y_vld = 0;
  int unsigned      nonseq_wait = 2, seq_wait = 2;

  ahbl_master #(.N_FEATURES(NF), .N_CLASSES(NC)) dut (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot,
    .hmastlock, .hwdata, .hrdata, .hready, .hresp(1'b0),
    .go_ahead, .in_ptr, .out_ptr, .done, .busy,
    .rd_cycles, .wr_cycles, .tot_cycles,
    .f_in, .en, .cnt_out, .c_out, .y_vld
  );

  ahb_mem_model #(.DEPTH_WORDS(1024)) mem (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hwdata, .hrdata,
    .hreadyout(hready), .nonseq_wait, .seq_wait
  );

  function automatic word_t class_word(int unsigned k, int unsigned run);
    return 32'hC0DE_0000 + (run << 8) + k;
  endfunction

  // one address cycle, then W+1 cycles per word; a word starts a new
  // NONSEQ burst (nonseq wait states) at the start and at each 1 KB page
  function automatic int unsigned exp_rd(word_t ip, int unsigned nw, int unsigned sw);
    int unsigned c;
    c = 1;
    for (int unsigned i = 0; i < NF; i++) begin
      word_t a;
      a = ip + 4 * i;
      c += ((i == 0 || a[9:0] == 10'd0) ? nw : sw) + 1;
    end
    return c;
  endfunction

  int    run = 0;
  assign c_out = (cnt_out < NC) ? class_word(cnt_out, run) : 32'hDEAD_BEEF;

  int checks = 0, failures = 0;
  word_t got [$];

  always #5 hclk = ~hclk;

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge hclk) if (en) got.push_back(f_in);

  // model stand-in: y_vld a few cycles after the last feature
  always @(posedge hclk) if (en && got.size() == NF - 1) begin
    repeat (3) @(posedge hclk);
    y_vld <= 1;
    @(posedge hclk);
    y_vld <= 0;
  end

  task automatic one_run(word_t ip, word_t op, int unsigned nw, int unsigned sw);
    int unsigned s0, ns0;
    nonseq_wait = nw; seq_wait = sw;
    in_ptr = ip; out_ptr = op;
    got.delete();
    for (int i = 0; i < NF; i++) mem.mem[(ip >> 2) + i] = $urandom();
    s0 = mem.n_seq; ns0 = mem.n_nonseq;
    @(negedge hclk);
    go_ahead = 1;
    fork
      begin wait (done); end
      begin repeat (2000) @(posedge hclk); end
    join_any
    disable fork;
    @(negedge hclk);
    check(done, "done raised");
    check(got.size() == NF, $sformatf("features fetched %0d", got.size()));
    for (int i = 0; i < NF && i < got.size(); i++)
      check(got[i] == mem.mem[(ip >> 2) + i], $sformatf("feature %0d", i));
    for (int k = 0; k < NC; k++)
      check(mem.mem[(op >> 2) + k] == class_word(k, run), $sformatf("class word %0d", k));
    check(rd_cycles == exp_rd(ip, nw, sw), $sformatf("rd_cycles %0d exp %0d", rd_cycles, exp_rd(ip, nw, sw)));
    check(wr_cycles == (nw + 1) * NC + 1, $sformatf("wr_cycles %0d", wr_cycles));
    check(tot_cycles > rd_cycles + wr_cycles, "total covers both");
    // go_ahead still high: no second run; clearing it clears done
    repeat (5) @(negedge hclk);
    check(!busy && done, "no restart while GO_AHEAD stays high");
    go_ahead = 0;
    @(negedge hclk); @(negedge hclk);
    check(!done, "done cleared by GO_AHEAD low");
    run++;
  endtask

  initial begin
    repeat (2) @(negedge hclk);
    hresetn = 1;
    one_run(32'h100, 32'h200, 2, 2);     // block RAM: two wait states
    check(mem.n_seq == NF - 1, $sformatf("SEQ beats %0d", mem.n_seq));
    one_run(32'h3F4, 32'h040, 1, 0);     // crosses the 1 KB page at 0x400
    one_run(32'h080, 32'h0C0, 0, 0);     // zero-wait memory
    check(mem.n_wait_cycles > 0, "wait states seen");
    check(mem.n_protocol_err == 0, $sformatf("protocol errors %0d", mem.n_protocol_err));
    check(hsize == HSIZE_WORD && !hmastlock, "word size, unlocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
