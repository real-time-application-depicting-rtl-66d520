// dsa_pkg: types and constants shared by the blocks of the master/slave data
// sharing architecture.
//
// The architecture lets a fast "master" processor (PCI-style, multiplexed
// address/data) and a slower "slave" processor (separate address and data
// lines) share one memory, with the master always served first. Both sides use
// 8-bit addresses and 8-bit data, which gives a 256-byte shared memory.
//
// Signal conventions used throughout (all active-low controls end in _n):
//   brq_n   bus request, low = requesting the memory
//   busy    high = bus not granted to this side, low = go ahead
//   en_n    transfer enable, low = perform one access now
//   ack_n   transfer acknowledge, low = access done (read data valid)
//   wr_rd   low = write, high = read
package dsa_pkg;

  // Widths of the document's 8-bit address and data buses.
  parameter int unsigned DSA_ADDR_W = 8;
  parameter int unsigned DSA_DATA_W = 8;

  // Who currently owns the shared memory.
  typedef enum logic [1:0] {
    OWN_NONE   = 2'd0,
    OWN_MASTER = 2'd1,
    OWN_SLAVE  = 2'd2
  } owner_e;

  // State of one side's enable/acknowledge handshake.
  //   XF_IDLE   waiting for en_n low while owning the bus
  //   XF_ACCESS memory access issued, read data arrives this cycle
  //   XF_ACK    ack_n held low until the processor raises en_n again
  typedef enum logic [1:0] {
    XF_IDLE   = 2'd0,
    XF_ACCESS = 2'd1,
    XF_ACK    = 2'd2
  } xfer_state_e;

endpackage
