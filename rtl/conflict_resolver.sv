// conflict_resolver: decides whether the master or the slave owns the shared
// memory, with the master always first.
//
// Each processor asks for the memory by pulling its bus request (brq_n) low
// and may start transfers once its busy line goes low. The document gives the
// rule (the master always has priority over the slave) and the signals; the
// way the rule is applied is this design's own:
//   * from no owner, a master request wins; a slave request is granted only
//     when the master is not requesting;
//   * an owner keeps the memory while it keeps brq_n low, and gives it up
//     when it raises brq_n and has no transfer in progress (its *_idle input);
//   * a master request takes the memory away from the slave as soon as the
//     slave's current transfer has finished (s_idle high). The slave's busy
//     line then goes high and any further transfer of the slave waits, with
//     its acknowledge held back, until the slave is granted again;
//   * the master is never interrupted.
// The owner and both busy lines are registered: a request seen at a clock
// edge shows as busy low one clock later. busy is high for a side that does
// not own the memory, including when nobody does.
module conflict_resolver
  import dsa_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,     // asynchronous, active low
  input  logic   m_brq_n,   // master bus request, low = requesting
  input  logic   s_brq_n,   // slave bus request, low = requesting
  input  logic   m_idle,    // master side has no transfer in progress
  input  logic   s_idle,    // slave side has no transfer in progress
  output logic   m_busy,    // to master: low = memory granted
  output logic   s_busy,    // to slave: low = memory granted
  output owner_e owner      // to the interactive controller
);

  owner_e owner_d;
  logic   m_req, s_req;

  assign m_req = !m_brq_n;
  assign s_req = !s_brq_n;

  always_comb begin
    owner_d = owner;
    unique case (owner)
      OWN_NONE: begin
        if (m_req)      owner_d = OWN_MASTER;
        else if (s_req) owner_d = OWN_SLAVE;
      end
      OWN_MASTER: begin
        if (!m_req && m_idle) owner_d = s_req ? OWN_SLAVE : OWN_NONE;
      end
      OWN_SLAVE: begin
        if (s_idle) begin
          if (m_req)       owner_d = OWN_MASTER;
          else if (!s_req) owner_d = OWN_NONE;
        end
      end
      default: owner_d = OWN_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= OWN_NONE;
    else        owner <= owner_d;
  end

  assign m_busy = (owner != OWN_MASTER);
  assign s_busy = (owner != OWN_SLAVE);

  // The memory never has two owners, and the slave never keeps it once the
  // master has asked and the slave is between transfers.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(m_busy == 1'b0 && s_busy == 1'b0));
  a_master_first: assert property (@(posedge clk) disable iff (!rst_n)
      (owner == OWN_SLAVE && m_req && s_idle) |=> owner == OWN_MASTER);

endmodule
