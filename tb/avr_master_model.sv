// avr_master_model: behavioural model (not synthesizable) of the
// microcontroller that plays the PCI-style master of the data sharing
// architecture.
//
// Like the real board it supplies the architecture's clock and reset. Its
// tasks replay the master test programs: request the bus (brq_n low), wait
// until busy is low, then for each address an address phase (address on ad,
// frame_n low, irdy_n/trdy_n high), for a write a data phase (data on ad,
// frame_n high, irdy_n/trdy_n low), the write/read select, enable low, wait
// for dtack_n low, enable high, wait for dtack_n high; the bus is released
// at the end. Each pin step lasts STEP clocks, since the microcontroller is
// slow next to the logic. Read data is taken from the separate output bus
// (the master's LEDs). The clocks from enable to acknowledge of every
// transfer and the clocks spent waiting for the grant are recorded.
module avr_master_model #(
  parameter int STEP = 2,
  parameter int HALF_PERIOD = 5
) (
  output logic       clk,
  output logic       rst_n,
  output logic       brq_n,
  input  logic       busy,
  output logic [7:0] ad,
  output logic       frame_n,
  output logic       irdy_n,
  output logic       trdy_n,
  output logic       en_n,
  output logic       wr_rd,
  input  logic       dtack_n,
  input  logic [7:0] data
);

  int last_latency = 0;
  int max_latency  = 0;
  int busy_wait_clocks = 0;
  int transfers = 0;

  initial begin
    clk = 1'b0;
    forever #HALF_PERIOD clk = ~clk;
  end

  initial begin
    rst_n = 1'b0; brq_n = 1'b1; ad = '0;
    frame_n = 1'b1; irdy_n = 1'b1; trdy_n = 1'b1; en_n = 1'b1; wr_rd = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  task automatic pause();
    repeat (STEP) @(negedge clk);
  endtask

  task automatic request();
    brq_n = 1'b0;
    @(negedge clk);
    while (busy) begin
      busy_wait_clocks++;
      @(negedge clk);
    end
  endtask

  task automatic release_bus();
    brq_n = 1'b1;
    pause();
  endtask

  // one transfer; rd = 1 for a read, whose data is returned in rdata
  task automatic transfer(input logic [7:0] addr, input logic [7:0] wdata, input logic rd,
                          output logic [7:0] rdata);
    int lat;
    ad = addr; frame_n = 1'b0; irdy_n = 1'b1; trdy_n = 1'b1;
    pause();
    if (!rd) begin
      ad = wdata; frame_n = 1'b1; irdy_n = 1'b0; trdy_n = 1'b0;
      pause();
    end
    frame_n = 1'b1; irdy_n = 1'b1; trdy_n = 1'b1;
    wr_rd = rd;
    pause();
    en_n = 1'b0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (dtack_n && lat < 1000);
    rdata = data;
    last_latency = lat;
    if (lat > max_latency) max_latency = lat;
    en_n = 1'b1;
    do @(negedge clk); while (!dtack_n);
    transfers++;
  endtask

endmodule
