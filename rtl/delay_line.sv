// delay_line: fixed-length FIFO delay, the hardware behind a stream offset.
//
// dout is the value din had DELAY enabled cycles earlier (en is the stall
// control: the line moves only when en is high). DELAY = 0 is a wire. Short
// lines (DELAY <= SHIFT_MAX) are a register chain; longer ones are a circular
// buffer of DELAY-1 words, written and read at the same pointer (read before
// write) with a registered read port, which maps onto block RAM.
// Using a FIFO per stream offset follows the document; the split between
// register chain and RAM and the threshold are choices of this design.
module delay_line #(
  parameter int W         = 32,
  parameter int DELAY     = 4,
  parameter int SHIFT_MAX = 4
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DELAY == 0) begin : g_wire
    assign dout = din;
  end else if (DELAY <= SHIFT_MAX) begin : g_shift
    logic [W-1:0] sr [DELAY];
    always_ff @(posedge clk) begin
      if (en) begin
        sr[0] <= din;
        for (int s = 1; s < DELAY; s++) sr[s] <= sr[s-1];
      end
    end
    assign dout = sr[DELAY-1];
  end else begin : g_ram
    localparam int DEPTH = DELAY - 1;
    localparam int AW    = $clog2(DEPTH);
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr = '0;
    logic [W-1:0]  q;
    always_ff @(posedge clk) begin
      if (en) begin
        q        <= mem[ptr];
        mem[ptr] <= din;
        ptr      <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end
    assign dout = q;
  end

  initial assert (DELAY >= 0) else $error("delay_line: negative DELAY");
endmodule
