// bdt_accel: a boosted-decision-tree inference accelerator for a
// microcontroller system with an AMBA AHB-Lite bus.
//
// Software writes the address of a feature vector (one 32-bit word per
// feature, low 18 bits significant) and of a result buffer into the control
// registers and sets GO_AHEAD. The accelerator's own bus master then reads
// the features straight from memory (any memory on the bus: on-chip SRAM,
// embedded SRAM, external SDRAM behind a controller), the tree model scores
// them, and the master writes one word per class back to the result buffer
// and raises DONE. Read, write and total cycle counts are left in the
// control registers. The model needs no parameters from memory, so the
// whole inference is a burst of N_FEATURES reads and N_CLASSES writes.
//
// Blocks: ahb_ctrl_slave (control registers, AHB-Lite slave port s_*),
// ahbl_master (bus master, AHB-Lite master port m_*), bdt_model_wrapper
// (data loader, tree model or register-file stand-in, data unloader).
// `done` is also brought out as a pin so it can be watched without a bus
// read (the original system polled it through a GPIO).
//
// Defaults give the evaluated Iris-sized model: 4 features, 3 classes.
// Both bus ports run on one clock, hclk.
module bdt_accel
  import bdt_pkg::*;
#(
  parameter int unsigned N_FEATURES = 4,
  parameter int unsigned N_CLASSES  = 3,
  parameter int unsigned N_TREES    = 20,
  parameter int unsigned DEPTH      = 3,
  parameter bit          MODEL_RF   = 1'b0
) (
  input  logic       hclk,
  input  logic       hresetn,
  // AHB-Lite master port, to the memories
  output word_t      m_haddr,
  output htrans_t    m_htrans,
  output logic       m_hwrite,
  output logic [2:0] m_hsize,
  output logic [2:0] m_hburst,
  output logic [3:0] m_hprot,
  output logic       m_hmastlock,
  output word_t      m_hwdata,
  input  word_t      m_hrdata,
  input  logic       m_hready,
  input  logic       m_hresp,
  // AHB-Lite slave port, control registers
  input  logic       s_hsel,
  input  word_t      s_haddr,
  input  htrans_t    s_htrans,
  input  logic       s_hwrite,
  input  logic [2:0] s_hsize,
  input  word_t      s_hwdata,
  input  logic       s_hready,
  output word_t      s_hrdata,
  output logic       s_hreadyout,
  output logic       s_hresp,
  // status
  output logic       done,
  output logic       busy
);

  word_t            in_ptr, out_ptr;
  logic             go_ahead;
  word_t            rd_cycles, wr_cycles, tot_cycles;
  word_t            f_in, c_out;
  logic             en, y_vld;
  logic [CNT_W-1:0] cnt_out;

  ahb_ctrl_slave u_ctrl (
    .hclk, .hresetn,
    .hsel(s_hsel), .haddr(s_haddr), .htrans(s_htrans), .hwrite(s_hwrite),
    .hsize(s_hsize), .hwdata(s_hwdata), .hready(s_hready),
    .hrdata(s_hrdata), .hreadyout(s_hreadyout), .hresp(s_hresp),
    .in_ptr, .out_ptr, .go_ahead, .done,
    .rd_cycles, .wr_cycles, .tot_cycles
  );

  ahbl_master #(.N_FEATURES(N_FEATURES), .N_CLASSES(N_CLASSES)) u_master (
    .hclk, .hresetn,
    .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize),
    .hburst(m_hburst), .hprot(m_hprot), .hmastlock(m_hmastlock),
    .hwdata(m_hwdata), .hrdata(m_hrdata), .hready(m_hready), .hresp(m_hresp),
    .go_ahead, .in_ptr, .out_ptr, .done, .busy,
    .rd_cycles, .wr_cycles, .tot_cycles,
    .f_in, .en, .cnt_out, .c_out, .y_vld
  );

  bdt_model_wrapper #(
    .N_FEATURES(N_FEATURES), .N_CLASSES(N_CLASSES),
    .N_TREES(N_TREES), .DEPTH(DEPTH), .MODEL_RF(MODEL_RF)
  ) u_wrapper (
    .clk(hclk), .rst_n(hresetn),
    .en, .f_in, .cnt_out, .c_out, .y_vld
  );

endmodule
