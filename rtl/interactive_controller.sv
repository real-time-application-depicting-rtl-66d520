// interactive_controller: connects the master and the slave to the shared
// memory, each through its own memory port, on behalf of whichever side the
// conflict resolver has given the memory to.
//
// Master side (PCI-style, multiplexed 8-bit address/data bus m_ad): as in the
// document's master test sequence, the master
//   1. puts the address on m_ad with frame_n low and irdy_n, trdy_n high:
//      the address is latched (address phase);
//   2. puts the data on m_ad with frame_n high and irdy_n, trdy_n low: the
//      data is latched (data phase);
//   3. sets wr_rd and pulls en_n low; dtack_n goes low when the access is
//      done. For a read, the data appears on the separate output bus m_rdata
//      (the master's LEDs) and stays there.
// Latching happens at a clock edge where the phase pattern is present and the
// master owns the memory; any other pattern of the three lines keeps both
// registers.
// Slave side: address on s_addr, data on s_data_i (write) or s_data_o with
// s_data_oe high (read, the two halves of a bidirectional bus), wr_rd and a
// four-phase en_n/ack_n handshake. s_en_n must already be synchronised to
// clk.
// Each side's handshake runs in an ic_xfer: an access two clocks before the
// acknowledge, which then stays low until en_n returns high. A side whose
// grant is withdrawn keeps its pending enable waiting without acknowledge.
// The slave's address and write data go to memory port B as they are (the
// slave holds them steady for the whole handshake), so b_addr and b_wdata
// are plain wires from s_addr and s_data_i.
// The phases, polarities and the separate master read bus follow the
// document; the clocked latching, latencies and hold behaviour are this
// design's own choices.
module interactive_controller
  import dsa_pkg::*;
#(
  parameter int unsigned ADDR_W = dsa_pkg::DSA_ADDR_W,
  parameter int unsigned DATA_W = dsa_pkg::DSA_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  owner_e            owner,
  // master processor
  input  logic [DATA_W-1:0] m_ad,       // multiplexed address/data
  input  logic              m_frame_n,
  input  logic              m_irdy_n,
  input  logic              m_trdy_n,
  input  logic              m_en_n,
  input  logic              m_wr_rd,
  output logic              m_dtack_n,
  output logic [DATA_W-1:0] m_rdata,
  output logic              m_idle,
  // slave processor
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [DATA_W-1:0] s_data_i,
  output logic [DATA_W-1:0] s_data_o,
  output logic              s_data_oe,
  input  logic              s_en_n,
  input  logic              s_wr_rd,
  output logic              s_ack_n,
  output logic              s_idle,
  // memory port A (master)
  output logic              a_en,
  output logic              a_we,
  output logic [ADDR_W-1:0] a_addr,
  output logic [DATA_W-1:0] a_wdata,
  input  logic [DATA_W-1:0] a_rdata,
  // memory port B (slave)
  output logic              b_en,
  output logic              b_we,
  output logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_wdata,
  input  logic [DATA_W-1:0] b_rdata
);

  logic              m_granted, s_granted;
  logic              addr_phase, data_phase;
  logic [ADDR_W-1:0] m_addr_q;
  logic [DATA_W-1:0] m_data_q;

  assign m_granted  = (owner == OWN_MASTER);
  assign s_granted  = (owner == OWN_SLAVE);
  assign addr_phase = m_granted && !m_frame_n &&  m_irdy_n &&  m_trdy_n;
  assign data_phase = m_granted &&  m_frame_n && !m_irdy_n && !m_trdy_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_addr_q <= '0;
      m_data_q <= '0;
    end else begin
      if (addr_phase) m_addr_q <= ADDR_W'(m_ad);
      if (data_phase) m_data_q <= m_ad;
    end
  end

  ic_xfer #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_master_xfer (
    .clk, .rst_n,
    .granted   (m_granted),
    .en_n      (m_en_n),
    .wr_rd     (m_wr_rd),
    .addr      (m_addr_q),
    .wdata     (m_data_q),
    .mem_en    (a_en),
    .mem_we    (a_we),
    .mem_addr  (a_addr),
    .mem_wdata (a_wdata),
    .mem_rdata (a_rdata),
    .ack_n     (m_dtack_n),
    .rdata_q   (m_rdata),
    .drive     (),  // the master reads on its own output bus
    .idle      (m_idle)
  );

  ic_xfer #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_slave_xfer (
    .clk, .rst_n,
    .granted   (s_granted),
    .en_n      (s_en_n),
    .wr_rd     (s_wr_rd),
    .addr      (s_addr),
    .wdata     (s_data_i),
    .mem_en    (b_en),
    .mem_we    (b_we),
    .mem_addr  (b_addr),
    .mem_wdata (b_wdata),
    .mem_rdata (b_rdata),
    .ack_n     (s_ack_n),
    .rdata_q   (s_data_o),
    .drive     (s_data_oe),
    .idle      (s_idle)
  );

endmodule
