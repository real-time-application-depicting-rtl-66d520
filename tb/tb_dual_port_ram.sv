// tb_dual_port_ram: self-checking test of the shared dual-port memory.
//
// Fills the whole memory through both ports at once (port A the even
// addresses, port B the odd ones) with random data kept in a reference array,
// reads every address back through both ports (checking the one-clock read
// latency), checks that a write leaves rdata alone, that the two ports can
// read different addresses in the same clock, and that port A wins when both
// write the same address in the same clock.
module tb_dual_port_ram;
  localparam int unsigned AW = 8, DW = 8, DEPTH = 256;

  logic          clk = 1'b0;
  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int            checks = 0, failures = 0;

  dual_port_ram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    @(negedge clk);
    // fill: A even, B odd, same clock
    for (int i = 0; i < DEPTH; i += 2) begin
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = DW'($urandom);
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = DW'($urandom);
      ref_mem[i] = a_wdata; ref_mem[i+1] = b_wdata;
      @(negedge clk);
    end
    // read back: A ascending, B descending, both in each clock
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_we = 0; a_addr = AW'(i);
      b_en = 1; b_we = 0; b_addr = AW'(DEPTH - 1 - i);
      @(negedge clk);
      check("port A read", a_rdata, ref_mem[i]);
      check("port B read", b_rdata, ref_mem[DEPTH-1-i]);
    end
    // rdata holds while the port is idle and while it writes
    a_en = 0; b_en = 0;
    @(negedge clk);
    check("port A hold", a_rdata, ref_mem[DEPTH-1]);
    a_en = 1; a_we = 1; a_addr = 8'h10; a_wdata = ~ref_mem[16];
    @(negedge clk);
    ref_mem[16] = a_wdata;
    check("port A write leaves rdata", a_rdata, ref_mem[DEPTH-1]);
    // same-address write collision: A wins
    a_en = 1; a_we = 1; a_addr = 8'h42; a_wdata = 8'hA5;
    b_en = 1; b_we = 1; b_addr = 8'h42; b_wdata = 8'h5A;
    @(negedge clk);
    a_we = 0; b_we = 0; a_addr = 8'h10;
    @(negedge clk);
    check("collision, A wins", b_rdata, 8'hA5);
    check("A read of A-written word", a_rdata, ref_mem[16]);
    // B writes, A reads it the following clock
    a_en = 0; b_en = 1; b_we = 1; b_addr = 8'hF0; b_wdata = 8'h3C;
    @(negedge clk);
    b_en = 0; a_en = 1; a_we = 0; a_addr = 8'hF0;
    @(negedge clk);
    check("A reads B's write", a_rdata, 8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
