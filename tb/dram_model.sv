// dram_model: behavioural model of the on-board DRAM and its controller.
//
// Not synthesizable; for testbenches only. Word-addressed memory of DEPTH
// words of W bits. Read commands are taken when fewer than 8 are pending and
// a random draw allows (back-pressure); each returns the word it addressed,
// read when the command is taken, in order, LAT cycles later or more, on a
// valid/ready data stream. Writes are taken at random cycles and update the
// word at once. Counters report accepted commands and refused cycles.
module dram_model #(
  parameter int W     = 64,
  parameter int AW    = 16,
  parameter int DEPTH = 1024,
  parameter int LAT   = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_cmd_valid,
  output logic          rd_cmd_ready,
  input  logic [AW-1:0] rd_cmd_addr,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [W-1:0]  rd_data,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] q_data[$];
  longint       q_due[$];
  longint       cyc = 0;
  int           reads = 0, writes = 0, rd_refused = 0, wr_refused = 0;
  logic         rd_gate = 0, wr_gate = 0;

  assign rd_cmd_ready = rd_gate && (q_data.size() < 8);
  assign wr_ready     = wr_gate;
  assign rd_valid     = (q_data.size() > 0) && (q_due[0] <= cyc);
  assign rd_data      = (q_data.size() > 0) ? q_data[0] : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rd_valid && rd_ready) begin
        void'(q_data.pop_front());
        void'(q_due.pop_front());
      end
      if (rd_cmd_valid && rd_cmd_ready) begin
        q_data.push_back(mem[int'(rd_cmd_addr) % DEPTH]);
        q_due.push_back(cyc + LAT);
        reads++;
      end else if (rd_cmd_valid) rd_refused++;
      if (wr_valid && wr_ready) begin
        mem[int'(wr_addr) % DEPTH] <= wr_data;
        writes++;
      end else if (wr_valid) wr_refused++;
    end
    rd_gate <= ($urandom % 4) != 0;
    wr_gate <= ($urandom % 4) != 0;
  end
endmodule
