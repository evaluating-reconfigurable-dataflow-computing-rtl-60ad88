// tb_stream_ctrl: the three streaming scenarios around a stand-in kernel.
//
// The kernel is replaced by a pipeline of KLAT enabled stages that adds 1 to
// each 32-bit lane, so after n sweeps every element must have grown by n. The
// internal buffer is a queue of NV vectors, the DRAM the behavioural model
// with the two address generators of the design, the host a process that
// streams and collects vectors with random back-pressure. Each scenario is
// run with several sweep counts; the final array must equal the initial one
// plus the sweep count, the sweep counter must match, and stalls, flushes,
// DRAM loads and unloads and internal-buffer reuse must all have happened.
module tb_stream_ctrl;
  import himeno_pkg::*;
  localparam int P = 2, NV = 12, KLAT = 7, VW = P * 32, AW = 10;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode = MODE_PCIE;
  logic [15:0] n_iter = 1, sweeps_done;
  logic busy, done, flushing, stalled;
  mode_e cur_mode;
  logic hin_valid = 0, hin_ready, hout_valid, hout_ready = 0;
  logic [VW-1:0] hin_data = '0, hout_data;
  logic lp_push_valid, lp_push_ready, lp_pop_valid, lp_pop_ready, lp_clear;
  logic [VW-1:0] lp_push_data, lp_pop_data;
  logic k_en, k_in_valid, k_out_valid;
  logic [VW-1:0] k_in_vec, k_out_vec;
  logic rd_start, wr_start, rd_valid, rd_ready, wr_valid, wr_ready, wr_addr_valid;
  logic [VW-1:0] rd_data, wr_data;
  logic rd_cmd_valid, rd_cmd_ready;
  logic [AW-1:0] rd_cmd_addr, wr_addr;
  int checks = 0, failures = 0;

  stream_ctrl #(.P(P), .NV(NV), .IW(16)) dut (.*);
  always #5 clk = ~clk;

  // stand-in kernel
  logic [VW:0] kp [KLAT];
  always @(posedge clk) if (!rst_n) begin
    for (int s = 0; s < KLAT; s++) kp[s] <= '0;
  end else if (k_en) begin
    logic [VW-1:0] v;
    for (int l = 0; l < P; l++) v[l*32 +: 32] = k_in_vec[l*32 +: 32] + 1;
    kp[0] <= {k_in_valid, v};
    for (int s = 1; s < KLAT; s++) kp[s] <= kp[s-1];
  end
  assign k_out_valid = rst_n && kp[KLAT-1][VW];
  assign k_out_vec   = kp[KLAT-1][VW-1:0];

  // internal buffer model
  logic [VW-1:0] lq[$];
  assign lp_push_ready = lq.size() < NV;
  assign lp_pop_valid  = lq.size() > 0;
  assign lp_pop_data   = (lq.size() > 0) ? lq[0] : '0;
  int loop_pushes = 0;
  always @(posedge clk) begin
    if (lp_clear) lq.delete();
    else begin
      if (lp_pop_valid && lp_pop_ready) void'(lq.pop_front());
      if (lp_push_valid && lp_push_ready) begin lq.push_back(lp_push_data); loop_pushes++; end
    end
  end

  // DRAM and its address generators
  logic wr_busy;
  dram_addr_gen #(.AW(AW), .LW(8)) u_rd (.clk, .rst_n, .start(rd_start), .base(AW'(40)), .len(8'(NV)),
    .addr_valid(rd_cmd_valid), .addr_ready(rd_cmd_ready), .addr(rd_cmd_addr), .busy(), .done());
  dram_addr_gen #(.AW(AW), .LW(8)) u_wr (.clk, .rst_n, .start(wr_start), .base(AW'(40)), .len(8'(NV)),
    .addr_valid(wr_busy), .addr_ready(wr_valid && wr_ready), .addr(wr_addr), .busy(), .done());
  assign wr_addr_valid = wr_busy;
  dram_model #(.W(VW), .AW(AW), .DEPTH(1 << AW), .LAT(5)) u_dram (.clk, .rst_n,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_addr, .rd_valid, .rd_ready, .rd_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  // mechanism counters
  int n_stall = 0, n_flush = 0, n_done = 0;
  always @(posedge clk) begin
    if (stalled) n_stall++;
    if (flushing) n_flush++;
    if (done) n_done++;
  end

  logic [VW-1:0] cur [NV], nxt [NV];

  // Drivers change inputs at the falling edge and decide 2 time units later,
  // when everything has settled; a handshake then happens at the rising edge.
  task automatic send_all();
    int v;
    v = 0;
    while (v < NV) begin
      @(negedge clk);
      hin_valid = ($urandom % 4) != 0;
      hin_data  = cur[v];
      #2 if (hin_valid && hin_ready) v++;
    end
    @(negedge clk) hin_valid = 0;
  endtask

  task automatic recv_all();
    int v;
    v = 0;
    while (v < NV) begin
      @(negedge clk);
      hout_ready = ($urandom % 3) != 0;
      #2 if (hout_valid && hout_ready) begin
        nxt[v] = hout_data;
        v++;
      end
    end
    @(negedge clk) hout_ready = 0;
  endtask

  task automatic run(mode_e m, int n);
    logic [VW-1:0] init [NV];
    int sweeps_host, dones_before;
    for (int v = 0; v < NV; v++) begin
      init[v] = {P{32'($urandom % 1000000)}};
      cur[v] = init[v];
    end
    dones_before = n_done;
    @(negedge clk);
    mode = m; n_iter = 16'(n); start = 1;
    @(negedge clk) start = 0;
    sweeps_host = (m == MODE_PCIE) ? n : 1;
    for (int s = 0; s < sweeps_host; s++) begin
      fork
        send_all();
        recv_all();
      join
      for (int v = 0; v < NV; v++) cur[v] = nxt[v];
    end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (n_done != dones_before + 1) begin
      failures++; $display("ERROR: mode %0d: done not pulsed once", m);
    end
    checks++;
    if (int'(sweeps_done) != n) begin
      failures++; $display("ERROR: mode %0d: %0d sweeps reported, %0d run", m, sweeps_done, n);
    end
    for (int v = 0; v < NV; v++)
      for (int l = 0; l < P; l++) begin
        checks++;
        if (cur[v][l*32 +: 32] != init[v][l*32 +: 32] + 32'(n)) begin
          failures++;
          if (failures < 10) $display("ERROR: mode %0d vector %0d lane %0d: %0d expected %0d", m, v, l,
                                      cur[v][l*32 +: 32], init[v][l*32 +: 32] + 32'(n));
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(MODE_PCIE, 1);
    run(MODE_PCIE, 3);
    run(MODE_NNITR, 1);
    run(MODE_NNITR, 4);
    run(MODE_DRAM, 1);
    run(MODE_DRAM, 3);
    run(MODE_NNITR, 2);
    checks++;
    if (n_stall == 0 || n_flush == 0 || loop_pushes == 0 || u_dram.reads == 0 || u_dram.writes == 0) begin
      failures++;
      $display("ERROR: mechanism never seen: stall %0d flush %0d loop %0d dram rd %0d wr %0d",
               n_stall, n_flush, loop_pushes, u_dram.reads, u_dram.writes);
    end
    $display("stall cycles %0d, flush cycles %0d, buffer pushes %0d, dram reads %0d writes %0d",
             n_stall, n_flush, loop_pushes, u_dram.reads, u_dram.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
