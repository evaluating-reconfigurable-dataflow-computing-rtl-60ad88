// himeno_dfe: dataflow engine for the Himeno benchmark's Jacobi solver.
//
// The engine runs n_iter Jacobi sweeps of the 19-point pressure stencil over a
// p array of IMAX x JMAX x KMAX single precision values, P points per clock
// cycle. The array is a stream of NV = ceil(IMAX*JMAX*KMAX/P) vectors of P
// values (k fastest, the last vector padded). Only p is streamed: the other
// arrays of the benchmark are constants made inside the kernel.
// Blocks: two small host stream FIFOs stand for the PCIe input and output
// streams; himeno_kernel holds the stencil window and the P pipes; stream_fifo
// u_loop is the internal buffer, one whole p array deep, that feeds a sweep's
// result back to the kernel; two dram_addr_gen instances address the on-board
// DRAM; stream_ctrl picks the scenario at run time (mode, see himeno_pkg):
// PCIe-only, internal buffer, or DRAM.
// Interface: pulse start with mode and n_iter while busy is low; stream NV
// vectors into host_in (n_iter times in MODE_PCIE, once otherwise) and take NV
// vectors per sweep (MODE_PCIE) or NV vectors in all from host_out; done pulses
// at the end. The DRAM ports are a read command stream, an in-order read data
// stream and a write stream with address, in vector words from DRAM_BASE.
// The defaults are the 'S' problem (65 x 65 x 129) and 48 pipes, the largest
// configuration the document built; the internal buffer is sized for that
// problem. The PCIe core, the DRAM and its controller are outside this module.
module himeno_dfe
  import himeno_pkg::*;
#(
  parameter int    P         = 48,
  parameter int    IMAX      = 65,
  parameter int    JMAX      = 65,
  parameter int    KMAX      = 129,
  parameter int    LAT_ADD   = 2,
  parameter int    LAT_MUL   = 2,
  parameter int    HOST_FIFO = 16,
  parameter int    DRAM_AW   = 28,
  parameter int    DRAM_BASE = 0,
  parameter coef_t COEF      = HIMENO_COEF,
  localparam int   NV        = (IMAX * JMAX * KMAX + P - 1) / P,
  localparam int   VW        = P * 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command and status
  input  logic                 start,
  input  mode_e                mode,
  input  logic [15:0]          n_iter,
  output logic                 busy,
  output logic                 done,
  output logic [15:0]          sweeps_done,
  output logic                 stalled,
  output logic                 flushing,
  // host input stream
  input  logic                 host_in_valid,
  output logic                 host_in_ready,
  input  logic [P-1:0][31:0]   host_in_data,
  // host output stream
  output logic                 host_out_valid,
  input  logic                 host_out_ready,
  output logic [P-1:0][31:0]   host_out_data,
  // DRAM read command
  output logic                 dram_rd_cmd_valid,
  input  logic                 dram_rd_cmd_ready,
  output logic [DRAM_AW-1:0]   dram_rd_cmd_addr,
  // DRAM read data
  input  logic                 dram_rd_valid,
  output logic                 dram_rd_ready,
  input  logic [P-1:0][31:0]   dram_rd_data,
  // DRAM write
  output logic                 dram_wr_valid,
  input  logic                 dram_wr_ready,
  output logic [DRAM_AW-1:0]   dram_wr_addr,
  output logic [P-1:0][31:0]   dram_wr_data
);
  localparam int LW = $clog2(NV + 1);

  // ------------------------------------------------ host stream buffers
  logic          hin_valid, hin_ready, hout_valid, hout_ready;
  logic [VW-1:0] hin_data, hout_data;
  logic [$clog2(HOST_FIFO+1)-1:0] hin_count, hout_count;

  stream_fifo #(.W(VW), .DEPTH(HOST_FIFO)) u_host_in (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(host_in_valid), .in_ready(host_in_ready), .in_data(host_in_data),
    .out_valid(hin_valid), .out_ready(hin_ready), .out_data(hin_data),
    .count(hin_count)
  );
  stream_fifo #(.W(VW), .DEPTH(HOST_FIFO)) u_host_out (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(hout_valid), .in_ready(hout_ready), .in_data(hout_data),
    .out_valid(host_out_valid), .out_ready(host_out_ready), .out_data(host_out_data),
    .count(hout_count)
  );

  // ------------------------------------------------ internal buffer (nn-itr)
  logic          lp_push_valid, lp_push_ready, lp_pop_valid, lp_pop_ready, lp_clear;
  logic [VW-1:0] lp_push_data, lp_pop_data;
  logic [LW-1:0] lp_count;

  stream_fifo #(.W(VW), .DEPTH(NV)) u_loop (
    .clk, .rst_n, .clear(lp_clear),
    .in_valid(lp_push_valid), .in_ready(lp_push_ready), .in_data(lp_push_data),
    .out_valid(lp_pop_valid), .out_ready(lp_pop_ready), .out_data(lp_pop_data),
    .count(lp_count)
  );

  // ------------------------------------------------ kernel
  logic          k_en, k_in_valid, k_out_valid;
  logic [VW-1:0] k_in_vec, k_out_vec;

  himeno_kernel #(
    .P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX),
    .LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .COEF(COEF)
  ) u_kernel (
    .clk, .rst_n, .en(k_en), .in_valid(k_in_valid), .in_vec(k_in_vec),
    .out_valid(k_out_valid), .out_vec(k_out_vec)
  );

  // ------------------------------------------------ DRAM address generators
  logic rd_start, wr_start, rd_busy, wr_busy, rd_done, wr_done;

  dram_addr_gen #(.AW(DRAM_AW), .LW(LW)) u_rd_ag (
    .clk, .rst_n, .start(rd_start), .base(DRAM_AW'(DRAM_BASE)), .len(LW'(NV)),
    .addr_valid(dram_rd_cmd_valid), .addr_ready(dram_rd_cmd_ready),
    .addr(dram_rd_cmd_addr), .busy(rd_busy), .done(rd_done)
  );
  dram_addr_gen #(.AW(DRAM_AW), .LW(LW)) u_wr_ag (
    .clk, .rst_n, .start(wr_start), .base(DRAM_AW'(DRAM_BASE)), .len(LW'(NV)),
    .addr_valid(wr_busy), .addr_ready(dram_wr_valid && dram_wr_ready),
    .addr(dram_wr_addr), .busy(), .done(wr_done)
  );

  // ------------------------------------------------ controller
  mode_e cur_mode;

  stream_ctrl #(.P(P), .NV(NV), .IW(16)) u_ctrl (
    .clk, .rst_n, .start, .mode, .n_iter, .busy, .done, .sweeps_done, .cur_mode,
    .hin_valid, .hin_ready, .hin_data,
    .hout_valid, .hout_ready, .hout_data,
    .lp_push_valid, .lp_push_ready, .lp_push_data,
    .lp_pop_valid, .lp_pop_ready, .lp_pop_data, .lp_clear,
    .k_en, .k_in_valid, .k_in_vec, .k_out_valid, .k_out_vec,
    .rd_start, .wr_start,
    .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_data(dram_rd_data),
    .wr_valid(dram_wr_valid), .wr_ready(dram_wr_ready), .wr_data(dram_wr_data),
    .wr_addr_valid(wr_busy),
    .flushing, .stalled
  );

  // Back-to-back sweeps through the internal buffer need the first result of a
  // sweep to be out before the kernel asks for the next sweep's first input.
  localparam int KLAT = floor_div(JMAX * KMAX + KMAX, P) + 1 + 4 * LAT_MUL + 12 * LAT_ADD + 1;
  initial assert (NV > KLAT) else $error("himeno_dfe: array shorter than the kernel latency");
endmodule
