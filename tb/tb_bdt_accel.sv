// tb_bdt_accel: end-to-end test of the accelerator at its default size
// (tree ensemble, 4 features, 3 classes), with a memory on its master port
// and a processor's loads and stores played on its control port.
//
// Each run stores a random feature vector in memory, writes IN_PTR and
// OUT_PTR, sets GO_AHEAD, polls CTRL until DONE, then checks the three
// class scores written to memory against a tree-walking reference and the
// three cycle counters against the bus timing:
//   RD_CYC  = 1 + sum over words of (wait states + 1)
//   WR_CYC  = 1 + N_CLASSES * (NONSEQ wait states + 1)
//   TOT_CYC = RD_CYC + WR_CYC + model latency (3 + clog2(20)) + 2
// Runs use a block-RAM-like memory (two wait states on every transfer), a
// memory with one wait state, a zero-wait memory, and a vector that
// crosses a 1 KB page. Every mechanism must occur at least once: slave
// wait states, SEQ burst beats, a burst restarted at a page boundary, the
// control port's write wait state, and a second run after the DONE /
// GO_AHEAD handshake.
module tb_bdt_accel;
  import bdt_pkg::*;
  import bdt_ref_pkg::*;

  localparam int unsigned NF = 4, NC = 3, NTR = 20, D = 3;
  localparam int unsigned MODEL_LAT = 3 + $clog2(NTR);

  logic       hclk = 0, hresetn = 0;
  word_t      m_haddr, m_hwdata, m_hrdata;
  htrans_t    m_htrans;
  logic       m_hwrite, m_hmastlock, m_hready;
  logic [2:0] m_hsize, m_hburst;
  logic [3:0] m_hprot;
  logic       s_hsel = 0;
  word_t      s_haddr = '0, s_hwdata = '0, s_hrdata;
  htrans_t    s_htrans = HTRANS_IDLE;
  logic       s_hwrite = 0, s_hreadyout, s_hresp;
  logic [2:0] s_hsize = HSIZE_WORD;
  logic       done, busy;
  int unsigned nonseq_wait = 2, seq_wait = 2;

  bdt_accel dut (
    .hclk, .hresetn,
    .m_haddr, .m_htrans, .m_hwrite, .m_hsize, .m_hburst, .m_hprot, .m_hmastlock,
    .m_hwdata, .m_hrdata, .m_hready, .m_hresp(1'b0),
    .s_hsel, .s_haddr, .s_htrans, .s_hwrite, .s_hsize, .s_hwdata,
    .s_hready(s_hreadyout), .s_hrdata, .s_hreadyout, .s_hresp,
    .done, .busy
  );

  ahb_mem_model #(.DEPTH_WORDS(4096)) mem (
    .hclk, .hresetn, .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite),
    .hwdata(m_hwdata), .hrdata(m_hrdata), .hreadyout(m_hready),
    .nonseq_wait, .seq_wait
  );

  int checks = 0, failures = 0;
  int n_runs = 0, n_page_restart = 0, n_ctrl_wait = 0;

  always #5 hclk = ~hclk;

  initial begin
    repeat (50000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ctrl_write(input logic [4:0] a, input word_t d);
    int cyc;
    @(negedge hclk);
    while (!s_hreadyout) @(negedge hclk);
    s_hsel = 1; s_haddr = {27'h0, a}; s_htrans = HTRANS_NONSEQ; s_hwrite = 1;
    @(negedge hclk);
    s_hsel = 0; s_htrans = HTRANS_IDLE; s_hwrite = 0; s_hwdata = d;
    cyc = 1;
    while (!s_hreadyout) begin @(negedge hclk); cyc++; end
    if (cyc == 2) n_ctrl_wait++;
    @(posedge hclk);
  endtask

  task automatic ctrl_read(input logic [4:0] a, output word_t d);
    @(negedge hclk);
    while (!s_hreadyout) @(negedge hclk);
    s_hsel = 1; s_haddr = {27'h0, a}; s_htrans = HTRANS_NONSEQ; s_hwrite = 0;
    @(negedge hclk);
    s_hsel = 0; s_htrans = HTRANS_IDLE;
    while (!s_hreadyout) @(negedge hclk);
    d = s_hrdata;
    @(posedge hclk);
  endtask

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

  task automatic one_run(word_t ip, word_t op, int unsigned nw, int unsigned sw);
    feat_t xv [$];
    word_t d, rd, wr, tot;
    int    polls;
    nonseq_wait = nw; seq_wait = sw;
    for (int i = 0; i < NF; i++) begin
      feat_t f;
      f = rand_feature();
      xv.push_back(f);
      mem.mem[(ip >> 2) + i] = {14'(0), 18'(f)};
    end
    for (int k = 0; k < NC; k++) mem.mem[(op >> 2) + k] = 32'hFFFF_FFFF;
    if (((ip + 4 * (NF - 1)) >> 10) != (ip >> 10)) n_page_restart++;

    ctrl_write(REG_IN_PTR, ip);
    ctrl_write(REG_OUT_PTR, op);
    ctrl_write(REG_CTRL, 32'h1);
    polls = 0;
    do begin ctrl_read(REG_CTRL, d); polls++; end while (!d[1] && polls < 500);
    check(d[1] && done, "DONE seen in CTRL and on the pin");

    for (int k = 0; k < NC; k++)
      check(mem.mem[(op >> 2) + k] == {14'd0, 18'(ref_score(xv, k, NF, NTR, D))},
            $sformatf("run %0d class %0d wrote %h", n_runs, k, mem.mem[(op >> 2) + k]));
    ctrl_read(REG_RD_CYC, rd);
    ctrl_read(REG_WR_CYC, wr);
    ctrl_read(REG_TOT_CYC, tot);
    check(rd == exp_rd(ip, nw, sw), $sformatf("RD_CYC %0d exp %0d", rd, exp_rd(ip, nw, sw)));
    check(wr == 1 + NC * (nw + 1), $sformatf("WR_CYC %0d", wr));
    check(tot == rd + wr + MODEL_LAT + 2, $sformatf("TOT_CYC %0d", tot));
    $display("run %0d: waits %0d/%0d  read %0d  write %0d  total %0d cycles",
             n_runs, nw, sw, rd, wr, tot);

    ctrl_write(REG_CTRL, 32'h0);
    ctrl_read(REG_CTRL, d);
    check(d == 0 && !done && !busy, "DONE cleared, idle");
    n_runs++;
  endtask

  initial begin
    repeat (3) @(negedge hclk);
    hresetn = 1;
    one_run(32'h0100, 32'h0200, 2, 2);   // block-RAM-like
    one_run(32'h0300, 32'h0800, 1, 1);   // one wait state
    one_run(32'h0040, 32'h0060, 0, 0);   // zero wait
    one_run(32'h03F8, 32'h1000, 2, 1);   // crosses the page at 0x400
    for (int r = 0; r < 6; r++)
      one_run(32'h2000 + 32'h40 * r, 32'h3000 + 32'h40 * r, $urandom_range(3), $urandom_range(3));

    $display("mechanisms: wait cycles %0d, SEQ beats %0d, page restarts %0d, ctrl write waits %0d, runs %0d",
             mem.n_wait_cycles, mem.n_seq, n_page_restart, n_ctrl_wait, n_runs);
    check(mem.n_wait_cycles > 0, "slave wait states occurred");
    check(mem.n_seq > 0, "SEQ burst beats occurred");
    check(n_page_restart > 0, "burst restarted at a 1 KB page");
    check(n_ctrl_wait > 0, "control write wait state occurred");
    check(n_runs > 1, "restart after DONE handshake");
    check(mem.n_protocol_err == 0, $sformatf("AHB protocol errors %0d", mem.n_protocol_err));
    check(m_hsize == HSIZE_WORD && s_hresp == HRESP_OKAY, "word transfers, OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
