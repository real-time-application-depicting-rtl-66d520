// ic_xfer: the enable/acknowledge handshake of one side of the interactive
// controller, turning one processor transfer into one memory-port access.
//
// The document's processors run a four-phase handshake: with the address
// (and, for a write, the data) in place and wr_rd set, they pull en_n low,
// wait for ack_n low, then raise en_n again. This helper answers it:
//   IDLE    while the side owns the memory (granted) and en_n is low, one
//           access is put on the memory port (mem_en high for one clock,
//           mem_we = !wr_rd);
//   ACCESS  the synchronous memory returns read data; it is captured in
//           rdata_q and ack_n is pulled low at the next edge;
//   ACK     ack_n stays low until en_n is high again, then returns high.
// Timing: en_n sampled low at edge k (with grant) -> access at edge k ->
// ack_n low after edge k+2. ack_n and rdata_q are registered. rdata_q holds
// the last read value (the processors show it on their LEDs). drive is high
// in ACK after a read, for a side whose data lines are bidirectional. idle
// is high when no transfer is in progress and none is being asked for; the
// arbiter only moves the memory to the other side while idle is high.
// mem_addr, mem_wdata and mem_we are wires from addr, wdata and wr_rd; only
// mem_en is gated, so the caller must hold them steady during a transfer.
// While not granted, a low en_n simply waits (no ack): this is the wait
// state of a processor whose grant was taken away. The handshake shape and
// polarities are the document's; the state split and latency are this
// design's own.
module ic_xfer
  import dsa_pkg::*;
#(
  parameter int unsigned ADDR_W = dsa_pkg::DSA_ADDR_W,
  parameter int unsigned DATA_W = dsa_pkg::DSA_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              granted,
  input  logic              en_n,
  input  logic              wr_rd,     // low = write, high = read
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  // memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // processor side
  output logic              ack_n,
  output logic [DATA_W-1:0] rdata_q,
  output logic              drive,
  output logic              idle
);

  xfer_state_e state;
  logic        rd_q;

  assign mem_en    = (state == XF_IDLE) && granted && !en_n;
  assign mem_we    = !wr_rd;
  assign mem_addr  = addr;
  assign mem_wdata = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= XF_IDLE;
      rd_q    <= 1'b0;
      ack_n   <= 1'b1;
      rdata_q <= '0;
    end else begin
      unique case (state)
        XF_IDLE: begin
          if (mem_en) begin
            rd_q  <= wr_rd;
            state <= XF_ACCESS;
          end
        end
        XF_ACCESS: begin
          if (rd_q) rdata_q <= mem_rdata;
          ack_n <= 1'b0;
          state <= XF_ACK;
        end
        XF_ACK: begin
          if (en_n) begin
            ack_n <= 1'b1;
            state <= XF_IDLE;
          end
        end
        default: state <= XF_IDLE;
      endcase
    end
  end

  assign drive = (state == XF_ACK) && rd_q;
  assign idle  = (state == XF_IDLE) && en_n;

  a_ack_only_in_ack: assert property (@(posedge clk) disable iff (!rst_n) !ack_n |-> state == XF_ACK);

endmodule
