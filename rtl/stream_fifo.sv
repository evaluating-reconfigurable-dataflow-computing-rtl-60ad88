// stream_fifo: first-in first-out stream buffer with valid/ready handshakes.
//
// Used for the host stream buffers and, with DEPTH equal to the number of
// vectors of one p array, as the internal buffer that carries one Jacobi
// sweep's output stream back to the kernel input for the next sweep.
// A word is written when in_valid && in_ready and read when out_valid &&
// out_ready; in_ready is "not full", out_valid "not empty". Storage is a memory
// with asynchronous read (first-word fall-through), so a written word can be
// read on the next cycle. Both flags come from registers only.
// Buffering the streams follows the document; the handshake and the
// fall-through read are choices of this design.
module stream_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= incr(wp);
      if (pop)  rp <= incr(rp);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  // a full FIFO never takes a word, an empty one never gives one
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> count < ($clog2(DEPTH+1))'(DEPTH);
  endproperty
  assert property (p_no_overflow);
endmodule
