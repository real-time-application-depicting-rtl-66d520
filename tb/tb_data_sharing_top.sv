// tb_data_sharing_top: end-to-end test of the data sharing architecture at
// its full size (256 bytes, 8-bit buses), with behavioural models of the two
// microcontrollers on its ports.
//
// It runs the five board tests of the architecture, each over all 256
// addresses 00..FF in increasing order, with data = address XOR a key that
// differs per test (so no test can pass on the previous test's contents):
//   1. continuous write by the master while the slave reads behind it,
//      the master asking for the bus for each transfer and the slave holding
//      its request, so that the two keep taking the memory from each other;
//   2. master writes, master reads back;
//   3. slave writes, slave reads back;
//   4. master writes, slave reads;
//   5. slave writes, master reads.
// Every read is compared with the value written. Checked besides: the
// master's acknowledge comes exactly 2 clocks after its enable, the two
// busy lines are never low together, the slave's data bus is never driven
// from both ends. Mechanisms counted, each of which must occur: address
// phases, data phases, master and slave writes and reads, slave read-data
// drive, master waiting for its grant, the master taking the memory from the
// slave, and a slave enable waiting while it has lost the bus.
module tb_data_sharing_top;

  logic       clk, rst_n;
  logic       pci_brq_n, pci_busy, pci_frame_n, pci_irdy_n, pci_trdy_n, pci_en_n, pci_wr_rd, pci_dtack_n;
  logic [7:0] pci_ad, pci_data;
  logic       pro_brq_n, pro_busy, pro_data_oe, pro_en_n, pro_wr_rd, pro_ack_n, slave_drive;
  logic [7:0] pro_address, pro_data_i, pro_data_o, slave_out, pro_bus;

  int checks = 0, failures = 0;
  int n_addr_phase = 0, n_data_phase = 0, n_m_write = 0, n_m_read = 0, n_s_write = 0,
      n_s_read = 0, n_s_drive = 0, n_m_wait = 0, n_preempt = 0, n_s_wait = 0;

  avr_master_model u_master (
    .clk, .rst_n, .brq_n(pci_brq_n), .busy(pci_busy), .ad(pci_ad), .frame_n(pci_frame_n),
    .irdy_n(pci_irdy_n), .trdy_n(pci_trdy_n), .en_n(pci_en_n), .wr_rd(pci_wr_rd),
    .dtack_n(pci_dtack_n), .data(pci_data)
  );

  avr_slave_model u_slave (
    .brq_n(pro_brq_n), .busy(pro_busy), .address(pro_address), .data_out(slave_out),
    .drive_en(slave_drive), .data_bus(pro_bus), .en_n(pro_en_n), .wr_rd(pro_wr_rd), .ack_n(pro_ack_n)
  );

  // the bidirectional slave data bus, resolved
  assign pro_bus    = pro_data_oe ? pro_data_o : slave_out;
  assign pro_data_i = pro_bus;

  data_sharing_top u_dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // observation of the pins, once per clock
  logic prev_slave_granted = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (!pci_busy && !pro_busy) begin failures++; $display("FAIL both busy lines low"); end
    if (pro_data_oe && slave_drive) begin failures++; $display("FAIL slave data bus driven from both ends"); end
    if (!pci_busy && !pci_frame_n &&  pci_irdy_n &&  pci_trdy_n) n_addr_phase++;
    if (!pci_busy &&  pci_frame_n && !pci_irdy_n && !pci_trdy_n) n_data_phase++;
    if (!pci_brq_n && pci_busy) n_m_wait++;
    if (prev_slave_granted && !pci_busy) n_preempt++;
    if (!pro_en_n && pro_busy && pro_ack_n) n_s_wait++;
    if (pro_data_oe) n_s_drive++;
    prev_slave_granted = !pro_busy;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic m_write_all(input logic [7:0] key);
    logic [7:0] d;
    u_master.request();
    for (int a = 0; a < 256; a++) begin
      u_master.transfer(8'(a), 8'(a) ^ key, 1'b0, d);
      check("master write acknowledge after 2 clocks", u_master.last_latency == 2);
      n_m_write++;
    end
    u_master.release_bus();
  endtask

  task automatic m_read_all(input logic [7:0] key, input string what);
    logic [7:0] d;
    u_master.request();
    for (int a = 0; a < 256; a++) begin
      u_master.transfer(8'(a), 8'h00, 1'b1, d);
      check({what, ": master reads what was written"}, d == (8'(a) ^ key));
      check("master read acknowledge after 2 clocks", u_master.last_latency == 2);
      n_m_read++;
    end
    u_master.release_bus();
  endtask

  task automatic s_write_all(input logic [7:0] key);
    logic [7:0] d;
    u_slave.request();
    for (int a = 0; a < 256; a++) begin
      u_slave.transfer(8'(a), 8'(a) ^ key, 1'b0, d);
      n_s_write++;
    end
    u_slave.release_bus();
  endtask

  task automatic s_read_all(input logic [7:0] key, input string what);
    logic [7:0] d;
    u_slave.request();
    for (int a = 0; a < 256; a++) begin
      u_slave.transfer(8'(a), 8'h00, 1'b1, d);
      check({what, ": slave reads what was written"}, d == (8'(a) ^ key));
      n_s_read++;
    end
    u_slave.release_bus();
  endtask

  initial begin
    int m_done;
    @(posedge rst_n);
    repeat (2) @(negedge clk);

    // 1. continuous master write, slave reading behind it
    m_done = 0;
    fork
      begin
        logic [7:0] d;
        for (int a = 0; a < 256; a++) begin
          u_master.request();
          u_master.transfer(8'(a), 8'(a) ^ 8'h11, 1'b0, d);
          check("master write acknowledge after 2 clocks", u_master.last_latency == 2);
          n_m_write++;
          m_done = a + 1;
          u_master.release_bus();
        end
      end
      begin
        logic [7:0] d;
        u_slave.request();
        for (int a = 0; a < 256; a++) begin
          while (m_done <= a) #7;
          u_slave.transfer(8'(a), 8'h00, 1'b1, d);
          check("continuous: slave reads in written order", d == (8'(a) ^ 8'h11));
          n_s_read++;
        end
        u_slave.release_bus();
      end
    join
    $display("test 1 (continuous write/read) done at %0t", $time);

    // 2. master write and read
    m_write_all(8'h22);
    m_read_all(8'h22, "master write/read");
    $display("test 2 (master write/read) done at %0t", $time);

    // 3. slave write and read
    s_write_all(8'h33);
    s_read_all(8'h33, "slave write/read");
    $display("test 3 (slave write/read) done at %0t", $time);

    // 4. master write, slave read
    m_write_all(8'h44);
    s_read_all(8'h44, "master write, slave read");
    $display("test 4 (master write, slave read) done at %0t", $time);

    // 5. slave write, master read
    s_write_all(8'h55);
    m_read_all(8'h55, "slave write, master read");
    $display("test 5 (slave write, master read) done at %0t", $time);

    $display("address phases %0d, data phases %0d, master writes %0d, master reads %0d",
             n_addr_phase, n_data_phase, n_m_write, n_m_read);
    $display("slave writes %0d, slave reads %0d, slave drive clocks %0d", n_s_write, n_s_read, n_s_drive);
    $display("master grant waits %0d clocks, preemptions of the slave %0d, slave enable waits %0d clocks",
             n_m_wait, n_preempt, n_s_wait);
    check("address phases seen", n_addr_phase > 0);
    check("data phases seen", n_data_phase > 0);
    check("master writes", n_m_write == 512 + 256);
    check("master reads", n_m_read == 512);
    check("slave writes", n_s_write == 512);
    check("slave reads", n_s_read == 768);
    check("slave read data driven", n_s_drive > 0);
    check("master waited for its grant", n_m_wait > 0);
    check("master took the memory from the slave", n_preempt > 0);
    check("slave enable waited without the bus", n_s_wait > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
