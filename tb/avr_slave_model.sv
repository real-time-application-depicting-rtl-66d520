// avr_slave_model: behavioural model (not synthesizable) of the
// microcontroller that plays the slave processor of the data sharing
// architecture.
//
// It runs on its own time base, STEP_NS per pin step, with no relation to
// the architecture's clock. Its tasks replay the slave test programs: pull
// the bus request low, wait while busy is high, then for each address put
// the address out, set write/read, for a write put the data on the data bus,
// pull the enable low, wait for the acknowledge, take the read data from the
// bus (its LEDs), raise the enable and wait for the acknowledge to return
// high. The data bus is bidirectional: the model drives it (drive_en) only
// for a write; the testbench resolves the bus. Wait time spent with the
// enable low is recorded in steps.
module avr_slave_model #(
  parameter int STEP_NS = 13
) (
  output logic       brq_n,
  input  logic       busy,
  output logic [7:0] address,
  output logic [7:0] data_out,
  output logic       drive_en,
  input  logic [7:0] data_bus,
  output logic       en_n,
  output logic       wr_rd,
  input  logic       ack_n
);

  int max_wait_steps = 0;
  int transfers = 0;

  initial begin
    brq_n = 1'b1; address = '0; data_out = '0; drive_en = 1'b0; en_n = 1'b1; wr_rd = 1'b1;
  end

  task automatic pause();
    #(STEP_NS);
  endtask

  task automatic request();
    brq_n = 1'b0;
    pause();
    while (busy) pause();
  endtask

  task automatic release_bus();
    brq_n = 1'b1;
    pause();
  endtask

  task automatic transfer(input logic [7:0] addr, input logic [7:0] wdata, input logic rd,
                          output logic [7:0] rdata);
    int steps;
    address = addr;
    wr_rd = rd;
    pause();
    if (!rd) begin
      data_out = wdata; drive_en = 1'b1;
      pause();
    end
    en_n = 1'b0;
    steps = 0;
    do begin pause(); steps++; end while (ack_n && steps < 100000);
    if (steps > max_wait_steps) max_wait_steps = steps;
    rdata = data_bus;
    en_n = 1'b1;
    do pause(); while (!ack_n);
    drive_en = 1'b0;
    transfers++;
  endtask

endmodule
