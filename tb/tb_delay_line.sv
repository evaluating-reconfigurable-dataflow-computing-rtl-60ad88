// tb_delay_line: checks the fixed delay of the three delay_line forms.
//
// Three lines (DELAY 0: wire, 3: register chain, 11: RAM with registered read)
// receive the same random words under random enables. After each enabled cycle
// every output must equal the word presented DELAY enabled cycles before the
// word now at the input (hist[DELAY-1] of the words taken so far), and a
// stalled line must hold its output.
module tb_delay_line;
  logic clk = 0, en;
  logic [15:0] din, d0, d3, d11;
  int checks = 0, failures = 0;
  logic [15:0] hist[$];   // hist[0] is the newest word taken

  delay_line #(.W(16), .DELAY(0))  u0  (.clk, .en, .din, .dout(d0));
  delay_line #(.W(16), .DELAY(3))  u3  (.clk, .en, .din, .dout(d3));
  delay_line #(.W(16), .DELAY(11)) u11 (.clk, .en, .din, .dout(d11));
  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("ERROR: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] held;
    en = 0; din = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 16'($urandom);
      #1 check("wire", d0, din);
      held = d11;
      @(posedge clk);
      if (en) hist.push_front(din);
      #1;
      if (hist.size() >= 3)  check("delay 3", d3, hist[2]);
      if (hist.size() >= 11) check("delay 11", d11, hist[10]);
      if (!en) check("hold", d11, held);
      if (hist.size() > 20) void'(hist.pop_back());
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
