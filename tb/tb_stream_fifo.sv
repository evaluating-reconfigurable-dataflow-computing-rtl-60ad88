// tb_stream_fifo: random pushes and pops against a queue model.
//
// A 5-deep FIFO (not a power of two, so the pointers wrap early) is pushed and
// popped at random rates, including long runs that fill and empty it. Data,
// order, the full and empty flags and the count are compared with a queue
// every cycle; the clear input must empty it.
module tb_stream_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = '0, out_data;
  logic [2:0]  count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [15:0] model[$];

  stream_fifo #(.W(16), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("ERROR: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int phase;
      phase = (n / 200) % 3;   // 0: mostly push, 1: mostly pop, 2: mixed
      @(negedge clk);
      in_valid  = (phase == 0) ? ($urandom % 8 != 0) : (phase == 1) ? ($urandom % 8 == 0) : $urandom % 2;
      out_ready = (phase == 1) ? ($urandom % 8 != 0) : (phase == 0) ? ($urandom % 8 == 0) : $urandom % 2;
      in_data   = 16'($urandom);
      clear     = (n == 3000);
      #1;
      check("count", int'(count), model.size());
      check("in_ready", in_ready, model.size() < DEPTH);
      check("out_valid", out_valid, model.size() > 0);
      if (out_valid && model.size() > 0) check("data", out_data, model[0]);
      if (!in_ready) fulls++;
      if (!out_valid) empties++;
      @(posedge clk);
      if (clear) model.delete();
      else begin
        if (out_valid && out_ready) void'(model.pop_front());
        if (in_valid && in_ready) model.push_back(in_data);
      end
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("ERROR: full %0d empty %0d never both seen", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
