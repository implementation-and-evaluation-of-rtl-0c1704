// ahb_ctrl_slave: the accelerator's control interface, an AHB-Lite slave
// with six 32-bit registers, so any bus master (a microcontroller core)
// can configure, start and time the accelerator by ordinary loads and
// stores.
//
// Register map (byte offsets, HADDR[4:0]; other bits are decoded by the
// bus matrix through HSEL):
//   0x00 IN_PTR   rw  address of the first feature word
//   0x04 OUT_PTR  rw  address where the first class score is written
//   0x08 WR_CYC   ro  cycles the last run spent writing
//   0x0C RD_CYC   ro  cycles the last run spent reading
//   0x10 TOT_CYC  ro  cycles of the whole last run
//   0x14 CTRL     rw  bit 0 GO_AHEAD; bit 1 DONE (read only)
// Unmapped offsets read as zero and ignore writes.
//
// Two states after INIT. In READY the slave completes a read with no wait
// state: HRDATA is selected combinationally from the address latched in
// the address phase. A write moves it to WRITE for one cycle, with
// HREADYOUT low, in which HWDATA is stored; back in READY, HREADYOUT high
// ends the data phase. So reads take one data cycle and writes two. The
// six registers, the INIT/READY/WRITE states and the single write wait
// state follow the original design; the order of the registers, the DONE
// bit in CTRL and the zero reset values are this design's choices. HRESP
// is always OKAY.
module ahb_ctrl_slave
  import bdt_pkg::*;
(
  input  logic       hclk,
  input  logic       hresetn,
  // AHB-Lite slave
  input  logic       hsel,
  input  word_t      haddr,
  input  htrans_t    htrans,
  input  logic       hwrite,
  input  logic [2:0] hsize,
  input  word_t      hwdata,
  input  logic       hready,
  output word_t      hrdata,
  output logic       hreadyout,
  output logic       hresp,
  // accelerator side
  output word_t      in_ptr,
  output word_t      out_ptr,
  output logic       go_ahead,
  input  logic       done,
  input  word_t      rd_cycles,
  input  word_t      wr_cycles,
  input  word_t      tot_cycles
);

  typedef enum logic [1:0] {S_INIT, S_READY, S_WRITE} state_t;

  state_t     state;
  logic [4:0] addr_q;
  logic       rd_q;

  wire access = hsel && hready && htrans[1] && (state == S_READY);

  assign hreadyout = (state == S_READY);
  assign hresp     = HRESP_OKAY;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state    <= S_INIT;
      addr_q   <= '0;
      rd_q     <= 1'b0;
      in_ptr   <= '0;
      out_ptr  <= '0;
      go_ahead <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: state <= S_READY;
        S_READY: begin
          rd_q <= 1'b0;
          if (access) begin
            addr_q <= haddr[4:0];
            rd_q   <= !hwrite;
            if (hwrite) state <= S_WRITE;
          end
        end
        S_WRITE: begin
          unique case (addr_q)
            REG_IN_PTR:  in_ptr   <= hwdata;
            REG_OUT_PTR: out_ptr  <= hwdata;
            REG_CTRL:    go_ahead <= hwdata[0];
            default: ;
          endcase
          state <= S_READY;
        end
        default: state <= S_READY;
      endcase
    end
  end

  always_comb begin
    hrdata = '0;
    if (rd_q)
      unique case (addr_q)
        REG_IN_PTR:  hrdata = in_ptr;
        REG_OUT_PTR: hrdata = out_ptr;
        REG_WR_CYC:  hrdata = wr_cycles;
        REG_RD_CYC:  hrdata = rd_cycles;
        REG_TOT_CYC: hrdata = tot_cycles;
        REG_CTRL:    hrdata = {30'd0, done, go_ahead};
        default:     hrdata = '0;
      endcase
  end

  // Only word accesses are meaningful to these registers.
  a_word: assert property (@(posedge hclk) disable iff (!hresetn)
    access |-> (hsize == HSIZE_WORD && haddr[1:0] == 2'b00));

endmodule
