// ahb_mem_model: behavioural AHB-Lite memory slave for testbenches.
//
// A word-addressed array of DEPTH_WORDS 32-bit words at byte address 0.
// Each transfer's data phase is stretched by a number of wait states set
// at run time: nonseq_wait for NONSEQ transfers, seq_wait for SEQ ones, so
// one model can stand for a block RAM that inserts two wait states on
// every access and for a memory that streams burst beats faster. Read
// data is driven combinationally in the last data-phase cycle; write data
// is stored at the end of it. The model counts wait cycles, SEQ and NONSEQ
// transfers, and flags protocol errors: a SEQ beat whose address does not
// follow the previous one, a burst crossing a 1 KB page, or an address
// phase that changes while HREADY is low. Not synthesizable (counters and
// checks are for simulation).
module ahb_mem_model #(
  parameter int unsigned DEPTH_WORDS = 1024
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  input  int unsigned nonseq_wait,
  input  int unsigned seq_wait
);

  logic [31:0] mem [DEPTH_WORDS];

  logic        pend;
  logic [31:0] a_q;
  logic        w_q;
  int unsigned wait_cnt;
  logic [31:0] last_addr;

  int unsigned n_wait_cycles, n_seq, n_nonseq, n_reads, n_writes, n_protocol_err;

  assign hreadyout = !(pend && wait_cnt != 0);
  assign hrdata    = (pend && !w_q) ? mem[a_q[31:2] % DEPTH_WORDS] : 32'h0;

  logic [31:0] prev_haddr;
  logic [1:0]  prev_htrans;
  logic        prev_stall;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      pend <= 1'b0; a_q <= '0; w_q <= 1'b0; wait_cnt <= 0; last_addr <= '0;
      n_wait_cycles <= 0; n_seq <= 0; n_nonseq <= 0; n_reads <= 0; n_writes <= 0;
      n_protocol_err <= 0; prev_stall <= 1'b0; prev_haddr <= '0; prev_htrans <= '0;
    end else begin
      prev_stall  <= !hreadyout && htrans[1];
      prev_haddr  <= haddr;
      prev_htrans <= htrans;
      if (prev_stall && (haddr != prev_haddr || htrans != prev_htrans))
        n_protocol_err <= n_protocol_err + 1;
      if (!hreadyout) begin
        n_wait_cycles <= n_wait_cycles + 1;
        wait_cnt <= wait_cnt - 1;
      end else begin
        if (pend && w_q) mem[a_q[31:2] % DEPTH_WORDS] <= hwdata;
        if (pend) begin
          if (w_q) n_writes <= n_writes + 1; else n_reads <= n_reads + 1;
        end
        pend <= htrans[1];
        if (htrans[1]) begin
          a_q <= haddr;
          w_q <= hwrite;
          last_addr <= haddr;
          if (htrans == 2'b11) begin
            n_seq <= n_seq + 1;
            wait_cnt <= seq_wait;
            if (haddr != last_addr + 32'd4 || haddr[9:0] == 10'd0)
              n_protocol_err <= n_protocol_err + 1;
          end else begin
            n_nonseq <= n_nonseq + 1;
            wait_cnt <= nonseq_wait;
          end
        end
      end
    end
  end

endmodule
