// dram_addr_gen: memory address generator for a linear DRAM stream.
//
// The p array lies in on-board DRAM as NV consecutive vector words from
// address base. After start, the generator offers the addresses base,
// base+1, ..., base+len-1 one per accepted handshake (addr_valid && addr_ready)
// and raises done for one cycle after the last one was taken. busy is high from
// start to the last handshake. One instance issues read commands, another
// supplies the write address of each output vector, so the kernel writes a
// sweep's result over its input (in place).
// Address generators for the DRAM streams are named by the document; the
// linear order, the vector-word addressing and the handshake are this design's.
module dram_addr_gen #(
  parameter int AW = 24,
  parameter int LW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [LW-1:0] len,
  output logic          addr_valid,
  input  logic          addr_ready,
  output logic [AW-1:0] addr,
  output logic          busy,
  output logic          done
);
  logic [LW-1:0] left;

  assign addr_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; addr <= '0; left <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        addr <= base;
        left <= len;
        busy <= (len != '0);
        done <= (len == '0);
      end else if (busy && addr_ready) begin
        addr <= addr + 1'b1;
        left <= left - 1'b1;
        if (left == LW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the address must hold while it waits for the memory
  property p_addr_stable;
    @(posedge clk) disable iff (!rst_n)
      addr_valid && !addr_ready |=> addr_valid && $stable(addr);
  endproperty
  assert property (p_addr_stable);
endmodule
