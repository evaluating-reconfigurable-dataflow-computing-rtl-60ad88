// tb_himeno_dfe: end-to-end Jacobi runs of the whole engine in all scenarios.
//
// A reduced engine (grid 6 x 5 x 7, P = 4 pipes, so 53 vectors with a padded
// last one) with a coefficient set in which every term is non-zero. The host
// process streams a random initial p and collects results with random
// back-pressure; the DRAM is the behavioural model with random back-pressure
// and latency. The scenarios are run one after another (PCIe with 2 sweeps,
// internal buffer with 3, DRAM with 2, internal buffer with 1, PCIe with 1), and
// each final array must equal n reference sweeps bit for bit. Counted and
// required at least once: kernel stalls, flushes, internal-buffer reuse, DRAM
// load, in-place sweep and unload, host back-pressure, interior and boundary
// points, a padded vector, and each mode switch.
module tb_himeno_dfe;
  import himeno_pkg::*;
  localparam int P = 4, IMAX = 6, JMAX = 5, KMAX = 7;
  localparam int N = IMAX * JMAX * KMAX, NV = (N + P - 1) / P, AW = 12;
  localparam coef_t C = '{a0: 32'h3F80_0000, a1: 32'h3F90_0000, a2: 32'h3FA0_0000,
                          a3: 32'h3E2A_AAAB, b0: 32'h3DCC_CCCD, b1: 32'hBD4C_CCCD,
                          b2: 32'h3E4C_CCCD, c0: 32'h3F70_0000, c1: 32'h3F60_0000,
                          c2: 32'h3F88_0000, wrk1: 32'h3C23_D70A, bnd: 32'h3F80_0000,
                          omega: 32'h3F4C_CCCD};

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode = MODE_PCIE;
  logic [15:0] n_iter = 1, sweeps_done;
  logic busy, done, stalled, flushing;
  logic host_in_valid = 0, host_in_ready, host_out_valid, host_out_ready = 0;
  logic [P-1:0][31:0] host_in_data = '0, host_out_data;
  logic dram_rd_cmd_valid, dram_rd_cmd_ready, dram_rd_valid, dram_rd_ready;
  logic dram_wr_valid, dram_wr_ready;
  logic [AW-1:0] dram_rd_cmd_addr, dram_wr_addr;
  logic [P-1:0][31:0] dram_rd_data, dram_wr_data;
  int checks = 0, failures = 0;

  himeno_dfe #(.P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX), .LAT_ADD(1), .LAT_MUL(2),
               .HOST_FIFO(4), .DRAM_AW(AW), .DRAM_BASE(100), .COEF(C)) dut (.*);
  dram_model #(.W(P * 32), .AW(AW), .DEPTH(1 << AW), .LAT(9)) u_dram (.clk, .rst_n,
    .rd_cmd_valid(dram_rd_cmd_valid), .rd_cmd_ready(dram_rd_cmd_ready), .rd_cmd_addr(dram_rd_cmd_addr),
    .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_data(dram_rd_data),
    .wr_valid(dram_wr_valid), .wr_ready(dram_wr_ready), .wr_addr(dram_wr_addr), .wr_data(dram_wr_data));
  always #5 clk = ~clk;

  // ------------------------------------------------ reference
  function automatic int idx(int i, int j, int k);
    return (i * JMAX + j) * KMAX + k;
  endfunction

  logic [31:0] cur [NV*P], nxt [NV*P];

  task automatic ref_sweep(ref logic [31:0] a [NV*P]);
    logic [31:0] b [NV*P];
    logic [NTAP-1:0][31:0] t;
    b = a;
    for (int i = 1; i < IMAX - 1; i++)
      for (int j = 1; j < JMAX - 1; j++)
        for (int k = 1; k < KMAX - 1; k++) begin
          for (int q = 0; q < NTAP; q++) t[q] = a[idx(i + tap_di(q), j + tap_dj(q), k + tap_dk(q))];
          b[idx(i, j, k)] = tb_himeno_ref::point_update(t, C);
        end
    a = b;
  endtask

  // ------------------------------------------------ host
  int in_backpressure = 0, out_backpressure = 0;
  task automatic send_all();
    int v;
    v = 0;
    while (v < NV) begin
      @(negedge clk);
      host_in_valid = ($urandom % 5) != 0;
      for (int l = 0; l < P; l++) host_in_data[l] = cur[v * P + l];
      #2 if (host_in_valid && host_in_ready) v++;
      else if (host_in_valid) in_backpressure++;
    end
    @(negedge clk) host_in_valid = 0;
  endtask

  task automatic recv_all();
    int v;
    v = 0;
    while (v < NV) begin
      @(negedge clk);
      host_out_ready = ($urandom % 3) != 0;
      #2 if (host_out_valid && host_out_ready) begin
        for (int l = 0; l < P; l++) nxt[v * P + l] = host_out_data[l];
        v++;
      end else if (host_out_valid) out_backpressure++;
    end
    @(negedge clk) host_out_ready = 0;
  endtask

  // ------------------------------------------------ mechanism counters
  int n_stall = 0, n_flush = 0, n_loop = 0, n_done = 0, mode_switches = 0;
  mode_e last_mode = MODE_PCIE;
  always @(posedge clk) begin
    if (stalled) n_stall++;
    if (flushing) n_flush++;
    if (dut.lp_pop_valid && dut.lp_pop_ready) n_loop++;
    if (done) n_done++;
  end

  task automatic run(mode_e m, int n);
    logic [31:0] expect_p [NV*P];
    int dones_before;
    for (int e = 0; e < NV * P; e++)
      cur[e] = (e < N) ? {1'b0, 8'(125 + $urandom % 3), 23'($urandom)} : 32'd0;
    expect_p = cur;
    for (int s = 0; s < n; s++) ref_sweep(expect_p);
    if (m != last_mode) mode_switches++;
    last_mode = m;
    dones_before = n_done;
    @(negedge clk);
    mode = m; n_iter = 16'(n); start = 1;
    @(negedge clk) start = 0;
    for (int s = 0; s < ((m == MODE_PCIE) ? n : 1); s++) begin
      fork
        send_all();
        recv_all();
      join
      cur = nxt;
    end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (n_done != dones_before + 1 || int'(sweeps_done) != n) begin
      failures++;
      $display("ERROR: mode %0d: done %0d sweeps %0d", m, n_done - dones_before, sweeps_done);
    end
    for (int e = 0; e < N; e++) begin
      checks++;
      if (cur[e] !== expect_p[e]) begin
        failures++;
        if (failures < 10) $display("ERROR: mode %0d n=%0d point %0d: %h expected %h", m, n, e, cur[e], expect_p[e]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(MODE_PCIE, 2);
    run(MODE_NNITR, 3);
    run(MODE_DRAM, 2);
    run(MODE_NNITR, 1);
    run(MODE_PCIE, 1);
    $display("stalls %0d flush cycles %0d buffer reads %0d dram reads %0d writes %0d host back-pressure in %0d out %0d mode switches %0d",
             n_stall, n_flush, n_loop, u_dram.reads, u_dram.writes, in_backpressure, out_backpressure, mode_switches);
    checks++;
    if (n_stall == 0 || n_flush == 0 || n_loop == 0 || u_dram.reads == 0 || u_dram.writes == 0 ||
        in_backpressure == 0 || out_backpressure == 0 || mode_switches < 4 || N % P == 0) begin
      failures++;
      $display("ERROR: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
