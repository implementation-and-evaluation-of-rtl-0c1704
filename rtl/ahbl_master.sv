// ahbl_master: the accelerator's AHB-Lite bus master. It fetches the
// feature vector from memory, waits for the model, and stores the class
// scores back, with no idle cycles of its own between transfers.
//
// Sequence of one run, started when GO_AHEAD is high and DONE is low:
//   READ    N_FEATURES word reads from in_ptr, in_ptr+4, ... The first is a
//           NONSEQ transfer of an undefined-length incrementing burst
//           (HBURST=INCR); the rest are SEQ, except where the next address
//           starts a new 1 KB page, where the burst restarts with NONSEQ.
//           The next address phase overlaps the current data phase, so a
//           slave with W wait states costs W+1 cycles per word. Each word is
//           passed to the data loader in the cycle its data phase ends
//           (f_in = HRDATA, en = 1, combinationally).
//   WAIT_Y  bus idle until the model flags its result valid (y_vld).
//   WRITE   N_CLASSES single (NONSEQ) word writes to out_ptr, out_ptr+4, ...
//           cnt_out names the class whose address phase is on the bus; the
//           unloader's c_out for it is registered into HWDATA when that
//           address phase is accepted, and HWDATA then holds until the next
//           one, so it never falls back to zero during a data phase.
//   WRITE_F DONE is set; back to IDLE. DONE clears when GO_AHEAD goes low,
//           and the next run starts when GO_AHEAD is raised again.
// Three cycle counters measure the run: rd_cycles counts the cycles spent
// in READ, wr_cycles those in WRITE, and tot_cycles all cycles from the
// first read address to WRITE_F inclusive. With a slave of W wait states
// that is (W+1)*N_FEATURES + 1 and (W+1)*N_CLASSES + 1.
//
// The state sequence, the overlapped (zero extra delay) transfers, burst
// reads, the registered HWDATA and the three timers follow the original
// design. The exact timer start and stop points, the page-boundary rule,
// the GO_AHEAD/DONE handshake and single (not burst) writes are this
// design's choices. HRESP is not acted on: an error response is treated
// as a completed transfer. HPROT and HMASTLOCK are constants.
module ahbl_master
  import bdt_pkg::*;
#(
  parameter int unsigned N_FEATURES = 4,
  parameter int unsigned N_CLASSES  = 3
) (
  input  logic             hclk,
  input  logic             hresetn,
  // AHB-Lite master
  output word_t            haddr,
  output htrans_t          htrans,
  output logic             hwrite,
  output logic [2:0]       hsize,
  output logic [2:0]       hburst,
  output logic [3:0]       hprot,
  output logic             hmastlock,
  output word_t            hwdata,
  input  word_t            hrdata,
  input  logic             hready,
  input  logic             hresp,
  // control
  input  logic             go_ahead,
  input  word_t            in_ptr,
  input  word_t            out_ptr,
  output logic             done,
  output logic             busy,
  output word_t            rd_cycles,
  output word_t            wr_cycles,
  output word_t            tot_cycles,
  // model wrapper
  output word_t            f_in,
  output logic             en,
  output logic [CNT_W-1:0] cnt_out,
  input  word_t            c_out,
  input  logic             y_vld
);

  typedef enum logic [2:0] {
    S_IDLE, S_READ, S_WAIT_Y, S_WRITE, S_WRITE_F
  } state_t;

  state_t           state;
  logic             dp_valid;   // a transfer is in its data phase
  logic [CNT_W-1:0] a_cnt;      // address phases issued in this pass
  logic [CNT_W-1:0] d_cnt;      // data phases completed in this pass

  wire addr_acc = hready && (htrans != HTRANS_IDLE);
  wire data_end = hready && dp_valid;
  wire word_t next_addr = haddr + 32'd4;

  assign hsize     = HSIZE_WORD;
  assign hprot     = 4'b0011;   // data access, privileged
  assign hmastlock = 1'b0;
  assign busy      = (state != S_IDLE);

  // to the data loader: the word of a read data phase as it ends
  assign f_in = hrdata;
  assign en   = (state == S_READ) && data_end;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state      <= S_IDLE;
      haddr      <= '0;
      htrans     <= HTRANS_IDLE;
      hwrite     <= 1'b0;
      hburst     <= HBURST_SINGLE;
      hwdata     <= '0;
      dp_valid   <= 1'b0;
      a_cnt      <= '0;
      d_cnt      <= '0;
      cnt_out    <= '0;
      done       <= 1'b0;
      rd_cycles  <= '0;
      wr_cycles  <= '0;
      tot_cycles <= '0;
    end else begin
      if (hready) dp_valid <= (htrans != HTRANS_IDLE);
      if (state != S_IDLE) tot_cycles <= tot_cycles + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (!go_ahead) done <= 1'b0;
          if (go_ahead && !done) begin
            state      <= S_READ;
            haddr      <= in_ptr;
            htrans     <= HTRANS_NONSEQ;
            hwrite     <= 1'b0;
            hburst     <= HBURST_INCR;
            a_cnt      <= CNT_W'(1);
            d_cnt      <= '0;
            rd_cycles  <= '0;
            wr_cycles  <= '0;
            tot_cycles <= '0;
          end
        end

        S_READ: begin
          rd_cycles <= rd_cycles + 1'b1;
          if (addr_acc) begin
            if (a_cnt < CNT_W'(N_FEATURES)) begin
              haddr  <= next_addr;
              htrans <= (next_addr[9:0] == 10'd0) ? HTRANS_NONSEQ : HTRANS_SEQ;
              a_cnt  <= a_cnt + 1'b1;
            end else begin
              htrans <= HTRANS_IDLE;
            end
          end
          if (data_end) begin
            d_cnt <= d_cnt + 1'b1;
            if (d_cnt == CNT_W'(N_FEATURES - 1)) state <= S_WAIT_Y;
          end
        end

        S_WAIT_Y: begin
          if (y_vld) begin
            state   <= S_WRITE;
            haddr   <= out_ptr;
            htrans  <= HTRANS_NONSEQ;
            hwrite  <= 1'b1;
            hburst  <= HBURST_SINGLE;
            cnt_out <= '0;
            d_cnt   <= '0;
          end
        end

        S_WRITE: begin
          wr_cycles <= wr_cycles + 1'b1;
          if (addr_acc) begin
            hwdata  <= c_out;
            cnt_out <= cnt_out + 1'b1;
            if (cnt_out < CNT_W'(N_CLASSES - 1)) begin
              haddr  <= next_addr;
              htrans <= HTRANS_NONSEQ;
            end else begin
              htrans <= HTRANS_IDLE;
            end
          end
          if (data_end) begin
            d_cnt <= d_cnt + 1'b1;
            if (d_cnt == CNT_W'(N_CLASSES - 1)) state <= S_WRITE_F;
          end
        end

        S_WRITE_F: begin
          hwrite <= 1'b0;
          done   <= 1'b1;
          state  <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- AHB-Lite master rules ---------------------------------------------
  // An address phase that is not accepted keeps its address and control.
  a_addr_hold: assert property (@(posedge hclk) disable iff (!hresetn)
    (htrans != HTRANS_IDLE && !hready) |=> ($stable(haddr) && $stable(htrans) && $stable(hwrite)));
  // Write data is held for the whole data phase.
  a_wdata_hold: assert property (@(posedge hclk) disable iff (!hresetn)
    (dp_valid && !hready && hwrite) |=> $stable(hwdata));
  // Word transfers only, word aligned.
  a_aligned: assert property (@(posedge hclk) disable iff (!hresetn)
    (htrans != HTRANS_IDLE) |-> (haddr[1:0] == 2'b00));

endmodule
