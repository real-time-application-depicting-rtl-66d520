// dsa_sync2: two-flip-flop synchroniser for a control line that comes from a
// processor running on its own clock.
//
// In the data sharing architecture the master supplies the FPGA's clock, but
// the slave microcontroller runs from its own oscillator, so its bus request
// and enable lines are brought into the clock domain here before any logic
// looks at them. This costs two clocks of latency. The synchroniser is this
// design's own addition; the document does not discuss clock domains. The
// output resets to RESET_VAL (high, the idle level of the active-low lines).
module dsa_sync2 #(
  parameter bit RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
