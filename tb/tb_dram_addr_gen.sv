// tb_dram_addr_gen: address sequences under random back-pressure.
//
// Several runs with different bases and lengths (including 1 and 0) are
// started; the memory side accepts at random. Every accepted address must be
// the next of base, base+1, ..., the run must offer exactly len addresses,
// done must pulse once after the last one, and busy must cover the run.
module tb_dram_addr_gen;
  localparam int AW = 16, LW = 12;
  logic clk = 0, rst_n = 0, start = 0, addr_valid, addr_ready = 0, busy, done;
  logic [AW-1:0] base = '0, addr;
  logic [LW-1:0] len = '0;
  int checks = 0, failures = 0;

  dram_addr_gen #(.AW(AW), .LW(LW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("ERROR: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  int done_count = 0;
  always @(posedge clk) if (done) done_count <= done_count + 1;

  task automatic run(int b, int n);
    int taken, dones_before, cyc;
    taken = 0; dones_before = done_count; cyc = 0;
    @(negedge clk);
    base = AW'(b); len = LW'(n); start = 1;
    @(negedge clk);
    start = 0;
    while ((busy || taken < n) && cyc < 10000) begin
      addr_ready = ($urandom % 3) != 0;
      #1;
      if (addr_valid && addr_ready) begin
        check("address", int'(addr), (b + taken) % (1 << AW));
        taken++;
      end
      @(negedge clk);
      cyc++;
    end
    repeat (3) @(negedge clk);
    check("count", taken, n);
    check("done pulses", done_count - dones_before, 1);
    check("idle after", int'(busy), 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(100, 37);
    run(0, 1);
    run(65530, 20);    // wraps the address space
    run(7, 0);
    run(1234, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
