// tb_interactive_controller: self-checking test of the interactive
// controller with a simple two-port memory model in the testbench.
//
// The owner input is driven directly. The master side goes through the
// address phase (frame_n low, irdy_n/trdy_n high), the data phase (frame_n
// high, irdy_n/trdy_n low) and the en_n/dtack_n handshake; the slave side
// through its address/data/en_n/ack_n cycle. Checked: the memory receives the
// right address, data and write enable on the right port; read data reaches
// the master's output bus and the slave's data lines; dtack_n/ack_n fall
// exactly two clocks after the enable is seen; phases and enables are ignored
// while the side is not the owner (a pending slave enable waits and is
// served once it is granted); a non-phase pattern of the three PCI lines
// latches nothing; the idle flags.
module tb_interactive_controller;
  import dsa_pkg::*;

  localparam int unsigned AW = 8, DW = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  owner_e        owner;
  logic [DW-1:0] m_ad, m_rdata, s_data_i, s_data_o;
  logic          m_frame_n, m_irdy_n, m_trdy_n, m_en_n, m_wr_rd, m_dtack_n, m_idle;
  logic [AW-1:0] s_addr;
  logic          s_data_oe, s_en_n, s_wr_rd, s_ack_n, s_idle;
  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  int            checks = 0, failures = 0;

  // memory model: two synchronous ports, registered read
  logic [DW-1:0] mem [256];
  always_ff @(posedge clk) begin
    if (a_en &&  a_we) mem[a_addr] <= a_wdata;
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en &&  b_we) mem[b_addr] <= b_wdata;
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

  interactive_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // master: one write or read transfer; returns clocks from en_n low to dtack_n low
  task automatic master_xfer(input logic [7:0] addr, input logic [7:0] data, input logic rd, output int lat);
    m_ad = addr; m_frame_n = 0; m_irdy_n = 1; m_trdy_n = 1;       // address phase
    @(negedge clk);
    m_ad = data; m_frame_n = 1; m_irdy_n = 0; m_trdy_n = 0;       // data phase
    @(negedge clk);
    m_irdy_n = 1; m_trdy_n = 1; m_ad = 8'hEE;
    m_wr_rd = rd; m_en_n = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (m_dtack_n && lat < 20);
    m_en_n = 1;
    @(negedge clk);
    check("master dtack_n released", m_dtack_n == 1'b1);
  endtask

  task automatic slave_xfer(input logic [7:0] addr, input logic [7:0] data, input logic rd, output int lat, output logic [7:0] rdat);
    s_addr = addr; s_data_i = data; s_wr_rd = rd; s_en_n = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (s_ack_n && lat < 40);
    rdat = s_data_o;
    if (rd) check("slave data driven during read ack", s_data_oe == 1'b1);
    else    check("slave data not driven on write", s_data_oe == 1'b0);
    s_en_n = 1;
    @(negedge clk);
    check("slave ack_n released", s_ack_n == 1'b1);
    check("slave data released", s_data_oe == 1'b0);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // port activity watch: no port is used by a side that does not own it
  always @(posedge clk) if (rst_n) begin
    if (a_en && owner != OWN_MASTER) begin failures++; $display("FAIL port A used without grant"); end
    if (b_en && owner != OWN_SLAVE)  begin failures++; $display("FAIL port B used without grant"); end
  end

  initial begin
    int lat;
    logic [7:0] rdat;
    logic [7:0] exp_m [256];
    owner = OWN_NONE;
    m_ad = 0; m_frame_n = 1; m_irdy_n = 1; m_trdy_n = 1; m_en_n = 1; m_wr_rd = 0;
    s_addr = 0; s_data_i = 0; s_en_n = 1; s_wr_rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", m_idle && s_idle && m_dtack_n && s_ack_n);

    // master writes 00..FF with data = addr ^ 5A, then reads back
    owner = OWN_MASTER;
    for (int i = 0; i < 256; i++) begin
      master_xfer(8'(i), 8'(i) ^ 8'h5A, 1'b0, lat);
      check("master write dtack latency 2", lat == 2);
      exp_m[i] = 8'(i) ^ 8'h5A;
    end
    for (int i = 0; i < 256; i++) check("memory holds master write", mem[i] == exp_m[i]);
    for (int i = 255; i >= 0; i--) begin
      master_xfer(8'(i), 8'h00, 1'b1, lat);
      check("master read dtack latency 2", lat == 2);
      check("master read data", m_rdata == exp_m[i]);
    end
    check("master read data held", m_rdata == exp_m[0]);

    // a pattern that is neither phase latches nothing: frame low with irdy low
    m_ad = 8'h77; m_frame_n = 0; m_irdy_n = 0; m_trdy_n = 0;
    @(negedge clk);
    m_frame_n = 1; m_irdy_n = 1; m_trdy_n = 1;
    m_wr_rd = 1; m_en_n = 0;
    #1;
    check("non-phase pattern latches no address", a_en && a_addr == 8'h00);
    do @(negedge clk); while (m_dtack_n);
    m_en_n = 1;
    @(negedge clk);

    // slave: writes and reads while owner
    owner = OWN_SLAVE;
    for (int i = 0; i < 64; i++) begin
      slave_xfer(8'(i * 3), 8'(i + 100), 1'b0, lat, rdat);
      check("slave write ack latency 2", lat == 2);
      check("memory holds slave write", mem[8'(i * 3)] == 8'(i + 100));
    end
    for (int i = 0; i < 64; i++) begin
      slave_xfer(8'(i * 3), 8'hFF, 1'b1, lat, rdat);
      check("slave read ack latency 2", lat == 2);
      check("slave read data", rdat == 8'(i + 100));
    end

    // slave enable while not owner waits; served once granted
    owner = OWN_MASTER;
    s_addr = 8'h03; s_wr_rd = 1; s_en_n = 0;
    repeat (6) begin
      @(negedge clk);
      check("no slave ack without grant", s_ack_n == 1'b1 && !b_en);
      check("pending slave enable is not idle", s_idle == 1'b0);
    end
    // the master's phases while the slave owns the bus are ignored
    owner = OWN_SLAVE;
    m_ad = 8'h99; m_frame_n = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (s_ack_n && lat < 20);
    check("waiting slave served after grant", lat == 2 && s_data_o == 8'(101));
    s_en_n = 1; m_frame_n = 1;
    @(negedge clk);
    owner = OWN_MASTER;
    m_wr_rd = 1; m_en_n = 0;
    #1;
    check("master address not latched without grant", a_en && a_addr == 8'h00);
    do @(negedge clk); while (m_dtack_n);
    m_en_n = 1;
    @(negedge clk);
    check("master idle at end", m_idle);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
