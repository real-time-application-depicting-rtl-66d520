// data_sharing_top: an FPGA architecture that lets two processors share one
// 256-byte memory, the master always before the slave.
//
// The master talks a cut-down PCI protocol on the right-hand side: a bus
// request (pci_brq_n) answered by pci_busy, a multiplexed 8-bit address/data
// bus (pci_ad) qualified by frame#, irdy# and trdy#, an enable (pci_en_n), a
// write/read select and a data acknowledge (pci_dtack_n); read data comes
// back on a separate 8-bit output bus (pci_data). The master also supplies
// the clock and the reset. The slave, on the left, has a bus request
// (pro_brq_n) answered by pro_busy, an 8-bit address, an 8-bit bidirectional
// data bus (split here into pro_data_i, pro_data_o and pro_data_oe, for a
// tri-state pad outside this module), an enable (pro_en_n), a write/read
// select and an acknowledge (pro_ack_n).
//
// Inside, the conflict resolver decides who owns the memory, the interactive
// controller turns each side's bus cycle into an access to its port of the
// dual-port memory, and two synchronisers bring the slave's request and
// enable into the clock domain.
//
// Timing, from a clock edge where the request or enable is seen:
//   master: pci_brq_n low -> pci_busy low after 1 clock; pci_en_n low ->
//           pci_dtack_n low after 2 clocks;
//   slave:  2 clocks more on each, for the synchroniser.
// A master request takes the memory from the slave at the end of the slave's
// current transfer; the slave's later enables then wait without acknowledge
// until the master releases the bus. Blocks, signal names, polarities, the
// 8-bit sizes and the master priority follow the document; latencies, the
// preemption point, the synchronisers and the reset polarity are this
// design's own.
module data_sharing_top
  import dsa_pkg::*;
#(
  parameter int unsigned ADDR_W = dsa_pkg::DSA_ADDR_W,
  parameter int unsigned DATA_W = dsa_pkg::DSA_DATA_W
) (
  input  logic              clk,          // from the master
  input  logic              rst_n,        // from the master, active low
  // master (PCI-style) side
  input  logic              pci_brq_n,
  output logic              pci_busy,
  input  logic [DATA_W-1:0] pci_ad,
  input  logic              pci_frame_n,
  input  logic              pci_irdy_n,
  input  logic              pci_trdy_n,
  input  logic              pci_en_n,
  input  logic              pci_wr_rd,
  output logic              pci_dtack_n,
  output logic [DATA_W-1:0] pci_data,
  // slave side
  input  logic              pro_brq_n,
  output logic              pro_busy,
  input  logic [ADDR_W-1:0] pro_address,
  input  logic [DATA_W-1:0] pro_data_i,
  output logic [DATA_W-1:0] pro_data_o,
  output logic              pro_data_oe,
  input  logic              pro_en_n,
  input  logic              pro_wr_rd,
  output logic              pro_ack_n
);

  owner_e            owner;
  logic              s_brq_n_sync, s_en_n_sync;
  logic              m_idle, s_idle;
  logic              a_en, a_we, b_en, b_we;
  logic [ADDR_W-1:0] a_addr, b_addr;
  logic [DATA_W-1:0] a_wdata, a_rdata, b_wdata, b_rdata;

  dsa_sync2 u_sync_brq (.clk, .rst_n, .d(pro_brq_n), .q(s_brq_n_sync));
  dsa_sync2 u_sync_en  (.clk, .rst_n, .d(pro_en_n),  .q(s_en_n_sync));

  conflict_resolver u_conflict (
    .clk, .rst_n,
    .m_brq_n (pci_brq_n),
    .s_brq_n (s_brq_n_sync),
    .m_idle,
    .s_idle,
    .m_busy  (pci_busy),
    .s_busy  (pro_busy),
    .owner
  );

  interactive_controller #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ctrl (
    .clk, .rst_n,
    .owner,
    .m_ad      (pci_ad),
    .m_frame_n (pci_frame_n),
    .m_irdy_n  (pci_irdy_n),
    .m_trdy_n  (pci_trdy_n),
    .m_en_n    (pci_en_n),
    .m_wr_rd   (pci_wr_rd),
    .m_dtack_n (pci_dtack_n),
    .m_rdata   (pci_data),
    .m_idle,
    .s_addr    (pro_address),
    .s_data_i  (pro_data_i),
    .s_data_o  (pro_data_o),
    .s_data_oe (pro_data_oe),
    .s_en_n    (s_en_n_sync),
    .s_wr_rd   (pro_wr_rd),
    .s_ack_n   (pro_ack_n),
    .s_idle,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  dual_port_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

endmodule
