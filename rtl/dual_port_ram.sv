// dual_port_ram: the shared memory of the data sharing architecture.
//
// A DEPTH x DATA_W memory with two identical, fully synchronous read/write
// ports: port A faces the master, port B the slave, as in the architecture's
// block diagram, where each processor receives its read data straight from
// the memory. The two ports and their synchronous behaviour follow the
// document; the size (8-bit address and data, so 256 bytes) follows its 8-bit
// buses. Everything else is this design's own choice:
//   * a port is active in a cycle where its en is high; with we high it writes
//     wdata to addr, otherwise it reads;
//   * reads are registered: rdata shows mem[addr] one clock after the request
//     and holds it until the port's next read (read-first when the same port
//     writes, i.e. a write does not update rdata);
//   * if both ports write the same address in the same cycle, port A (the
//     master) wins, matching the master's priority. The arbiter in front of
//     this memory normally keeps that from happening.
// There is no reset: contents are undefined until written, like a block RAM.
module dual_port_ram #(
  parameter int unsigned ADDR_W = dsa_pkg::DSA_ADDR_W,
  parameter int unsigned DATA_W = dsa_pkg::DSA_DATA_W,
  parameter int unsigned DEPTH  = 2 ** ADDR_W
) (
  input  logic              clk,
  // port A (master side)
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B (slave side)
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  // Writes: B first so that A overrides it on a same-address collision.
  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
