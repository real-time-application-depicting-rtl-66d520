// tb_conflict_resolver: self-checking test of the master-first arbiter.
//
// Drives the two bus requests and the two idle flags through directed cases
// and then a long random sequence. The expected owner is computed by a
// reference model in this file, written from the rules alone: master before
// slave, an owner keeps the memory while it requests, the slave loses it to a
// master request only between transfers, the master is never interrupted.
// Also checks the one-clock grant latency and counts how often the master
// took the memory from the slave.
module tb_conflict_resolver;
  import dsa_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   m_brq_n, s_brq_n, m_idle, s_idle;
  logic   m_busy, s_busy;
  owner_e owner;
  int     checks = 0, failures = 0, preemptions = 0, slave_waits = 0;
  int     exp_owner;  // 0 none, 1 master, 2 slave

  conflict_resolver dut (.*);

  always #5 clk = ~clk;

  task automatic expect_owner(input string what);
    checks++;
    if (int'(owner) != exp_owner || m_busy != (exp_owner != 1) || s_busy != (exp_owner != 2)) begin
      failures++;
      $display("FAIL %s: owner %0d m_busy %0b s_busy %0b, expected owner %0d", what, owner, m_busy, s_busy, exp_owner);
    end
  endtask

  // reference: next owner from the current one and this clock's inputs
  function automatic int next_owner(int cur, logic mreq, logic sreq, logic midle, logic sidle);
    case (cur)
      0: return mreq ? 1 : (sreq ? 2 : 0);
      1: return (!mreq && midle) ? (sreq ? 2 : 0) : 1;
      default: begin
        if (!sidle) return 2;
        if (mreq) return 1;
        return sreq ? 2 : 0;
      end
    endcase
  endfunction

  task automatic step(input logic mreq, input logic sreq, input logic midle, input logic sidle, input string what);
    int nxt;
    m_brq_n = !mreq; s_brq_n = !sreq; m_idle = midle; s_idle = sidle;
    nxt = next_owner(exp_owner, mreq, sreq, midle, sidle);
    if (exp_owner == 2 && nxt == 1) preemptions++;
    if (exp_owner == 1 && sreq) slave_waits++;
    @(negedge clk);
    exp_owner = nxt;
    expect_owner(what);
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_owner = 0;
    m_brq_n = 1; s_brq_n = 1; m_idle = 1; s_idle = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_owner("after reset");
    // both request together: master first, granted after one clock
    step(1, 1, 1, 1, "both request");
    checks++; if (m_busy !== 1'b0 || s_busy !== 1'b1) begin failures++; $display("FAIL master not first"); end
    step(1, 1, 0, 1, "master busy with a transfer");
    step(0, 1, 0, 1, "master released, transfer still running");
    step(0, 1, 1, 1, "master released and idle -> slave");
    checks++; if (s_busy !== 1'b0) begin failures++; $display("FAIL slave not granted"); end
    // master asks while the slave is mid-transfer: wait, then take over
    step(1, 1, 1, 0, "master asks, slave mid-transfer");
    step(1, 1, 1, 0, "slave still mid-transfer");
    checks++; if (s_busy !== 1'b0) begin failures++; $display("FAIL slave interrupted mid-transfer"); end
    step(1, 1, 1, 1, "slave between transfers -> master");
    checks++; if (m_busy !== 1'b0 || s_busy !== 1'b1) begin failures++; $display("FAIL no preemption"); end
    step(0, 1, 1, 1, "master done -> slave again");
    step(0, 0, 1, 1, "slave done -> none");
    // random
    for (int i = 0; i < 4000; i++)
      step(($urandom % 3) == 0, ($urandom % 2) == 0, ($urandom % 4) != 0, ($urandom % 4) != 0, "random");
    checks++;
    if (preemptions == 0 || slave_waits == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: preemptions %0d slave_waits %0d", preemptions, slave_waits);
    end
    $display("preemptions=%0d slave_waits=%0d", preemptions, slave_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
