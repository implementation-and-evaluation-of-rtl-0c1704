// accel_harness: one accelerator with the register-file model, a memory
// and a control-port driver, for workload testbenches. When `start` rises
// it performs one run per memory timing in the list below: it stores N
// random words, starts the accelerator through its control registers,
// waits for DONE, and checks that the N words came back to the output
// buffer (low 18 bits) and that the cycle counters read
//   RD_CYC = 1 + N*(W+1), WR_CYC = 1 + N*(W+1), TOT_CYC = RD+WR+3
// for W wait states on every transfer. It then raises `finished` and
// reports its counts.
module accel_harness
  import bdt_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic hclk,
  input  logic hresetn,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);

  word_t      m_haddr, m_hwdata, m_hrdata;
  htrans_t    m_htrans;
  logic       m_hwrite, m_hmastlock, m_hready;
  logic [2:0] m_hsize, m_hburst;
  logic [3:0] m_hprot;
  logic       s_hsel = 0;
  word_t      s_haddr = '0, s_hwdata = '0, s_hrdata;
  htrans_t    s_htrans = HTRANS_IDLE;
  logic       s_hwrite = 0, s_hreadyout, s_hresp;
  logic       done, busy;
  int unsigned nonseq_wait = 2, seq_wait = 2;

  bdt_accel #(.N_FEATURES(N), .N_CLASSES(N), .MODEL_RF(1'b1)) dut (
    .hclk, .hresetn,
    .m_haddr, .m_htrans, .m_hwrite, .m_hsize, .m_hburst, .m_hprot, .m_hmastlock,
    .m_hwdata, .m_hrdata, .m_hready, .m_hresp(1'b0),
    .s_hsel, .s_haddr, .s_htrans, .s_hwrite, .s_hsize(HSIZE_WORD), .s_hwdata,
    .s_hready(s_hreadyout), .s_hrdata, .s_hreadyout, .s_hresp,
    .done, .busy
  );

  ahb_mem_model #(.DEPTH_WORDS(1024)) mem (
    .hclk, .hresetn, .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite),
    .hwdata(m_hwdata), .hrdata(m_hrdata), .hreadyout(m_hready),
    .nonseq_wait, .seq_wait
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL RF-%0d: %s", N, what); end
  endtask

  task automatic ctrl_write(input logic [4:0] a, input word_t d);
    @(negedge hclk);
    while (!s_hreadyout) @(negedge hclk);
    s_hsel = 1; s_haddr = {27'h0, a}; s_htrans = HTRANS_NONSEQ; s_hwrite = 1;
    @(negedge hclk);
    s_hsel = 0; s_htrans = HTRANS_IDLE; s_hwrite = 0; s_hwdata = d;
    while (!s_hreadyout) @(negedge hclk);
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

  task automatic one_run(string name, int unsigned w);
    word_t ip, op, d, rd, wr, tot;
    int    polls;
    ip = 32'h0400; op = 32'h0800;   // page aligned, N <= 256 stays in one page
    nonseq_wait = w; seq_wait = w;
    for (int i = 0; i < N; i++) begin
      mem.mem[(ip >> 2) + i] = $urandom();
      mem.mem[(op >> 2) + i] = 32'hFFFF_FFFF;
    end
    ctrl_write(REG_IN_PTR, ip);
    ctrl_write(REG_OUT_PTR, op);
    ctrl_write(REG_CTRL, 32'h1);
    polls = 0;
    do begin ctrl_read(REG_CTRL, d); polls++; end while (!d[1] && polls < 5000);
    check(d[1], "DONE");
    for (int i = 0; i < N; i++)
      check(mem.mem[(op >> 2) + i] == {14'd0, mem.mem[(ip >> 2) + i][17:0]},
            $sformatf("word %0d", i));
    ctrl_read(REG_RD_CYC, rd);
    ctrl_read(REG_WR_CYC, wr);
    ctrl_read(REG_TOT_CYC, tot);
    check(rd == 1 + N * (w + 1), $sformatf("RD_CYC %0d", rd));
    check(wr == 1 + N * (w + 1), $sformatf("WR_CYC %0d", wr));
    check(tot == rd + wr + 3, $sformatf("TOT_CYC %0d", tot));
    $display("RF-%0d on %s (%0d wait states): read %0d  write %0d  total %0d cycles",
             N, name, w, rd, wr, tot);
    ctrl_write(REG_CTRL, 32'h0);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    wait (start);
    one_run("block RAM", 2);
    one_run("embedded SRAM", 1);
    check(mem.n_protocol_err == 0, "AHB protocol");
    check(mem.n_seq == 2 * (N - 1), $sformatf("SEQ beats %0d", mem.n_seq));
    finished = 1;
  end

endmodule
