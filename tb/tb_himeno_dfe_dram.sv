// tb_himeno_dfe_dram: the on-board DRAM scenario on the benchmark's 'M' array.
//
// The engine is built for the 129 x 129 x 257 array with 32 pipes, the largest
// DRAM configuration of the original evaluation (133649 vectors of 32 points, a
// window of 1045 vectors). p starts as in the benchmark, p = i*i / (IMAX-1)^2,
// with the benchmark's constant coefficients. The host loads the array into
// the behavioural DRAM (random back-pressure, in-order reads), the engine runs
// two in-place sweeps from DRAM and unloads the result; every point is compared
// bit for bit with two reference sweeps, and the DRAM must have seen exactly
// the load, the sweeps' reads and writes, and the unload.
module tb_himeno_dfe_dram;
  import himeno_pkg::*;
  localparam int P = 32, IMAX = 129, JMAX = 129, KMAX = 257;
  localparam int N = IMAX * JMAX * KMAX, NV = (N + P - 1) / P;
  localparam int NITER = 2;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode = MODE_DRAM;
  logic [15:0] n_iter = 16'(NITER), sweeps_done;
  logic busy, done, stalled, flushing;
  logic host_in_valid = 0, host_in_ready, host_out_valid, host_out_ready = 0;
  logic [P-1:0][31:0] host_in_data = '0, host_out_data;
  logic dram_rd_cmd_valid, dram_rd_valid, dram_rd_ready, dram_wr_valid;
  logic [27:0] dram_rd_cmd_addr, dram_wr_addr;
  logic [P-1:0][31:0] dram_rd_data, dram_wr_data;
  int checks = 0, failures = 0;

  logic dram_rd_cmd_ready, dram_wr_ready;

  himeno_dfe #(.P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX)) dut (.*);
  dram_model #(.W(P * 32), .AW(28), .DEPTH(NV), .LAT(12)) u_dram (.clk, .rst_n,
    .rd_cmd_valid(dram_rd_cmd_valid), .rd_cmd_ready(dram_rd_cmd_ready),
    .rd_cmd_addr(dram_rd_cmd_addr), .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready),
    .rd_data(dram_rd_data), .wr_valid(dram_wr_valid), .wr_ready(dram_wr_ready),
    .wr_addr(dram_wr_addr), .wr_data(dram_wr_data));
  always #5 clk = ~clk;

  function automatic int idx(int i, int j, int k);
    return (i * JMAX + j) * KMAX + k;
  endfunction

  logic [31:0] cur [NV*P], res [NV*P];

  task automatic ref_sweep(ref logic [31:0] a [NV*P]);
    logic [31:0] b [NV*P];
    logic [NTAP-1:0][31:0] t;
    b = a;
    for (int i = 1; i < IMAX - 1; i++)
      for (int j = 1; j < JMAX - 1; j++)
        for (int k = 1; k < KMAX - 1; k++) begin
          for (int q = 0; q < NTAP; q++) t[q] = a[idx(i + tap_di(q), j + tap_dj(q), k + tap_dk(q))];
          b[idx(i, j, k)] = tb_himeno_ref::point_update(t, HIMENO_COEF);
        end
    a = b;
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // one activation: stream cur in once and collect NV result vectors into res
  task automatic run(mode_e m, int sweeps, output longint cycles);
    longint t0;
    mode   = m;
    n_iter = 16'(sweeps);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    fork
      begin : sender
        int v;
        v = 0;
        while (v < NV) begin
          @(negedge clk);
          host_in_valid = 1;
          for (int l = 0; l < P; l++) host_in_data[l] = cur[v * P + l];
          #2 if (host_in_ready) v++;
        end
        @(negedge clk) host_in_valid = 0;
      end
      begin : receiver
        int v;
        v = 0;
        while (v < NV) begin
          @(negedge clk);
          host_out_ready = 1;
          #2 if (host_out_valid) begin
            for (int l = 0; l < P; l++) res[v * P + l] = host_out_data[l];
            v++;
          end
        end
        @(negedge clk) host_out_ready = 0;
      end
    join
    while (busy) @(negedge clk);
    cycles = cyc - t0;
  endtask

  task automatic compare(string name, int sweeps, ref logic [31:0] expect_p [NV*P]);
    int bad;
    bad = 0;
    checks++;
    if (int'(sweeps_done) != sweeps) begin
      failures++;
      $display("ERROR: %s: %0d sweeps reported", name, sweeps_done);
    end
    for (int e = 0; e < N; e++) begin
      checks++;
      if (res[e] !== expect_p[e]) begin
        failures++;
        bad++;
        if (bad < 6) $display("ERROR: %s: point %0d: %h expected %h", name, e, res[e], expect_p[e]);
      end
    end
  endtask

  initial begin
    logic [31:0] expect_p [NV*P];
    longint cycles;
    for (int i = 0; i < IMAX; i++)
      for (int j = 0; j < JMAX; j++)
        for (int k = 0; k < KMAX; k++)
          cur[idx(i, j, k)] = tb_fp_pkg::r2f(real'(i * i) / real'((IMAX - 1) * (IMAX - 1)));
    for (int e = N; e < NV * P; e++) cur[e] = 32'd0;
    expect_p = cur;

    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int s = 0; s < NITER; s++) ref_sweep(expect_p);
    run(MODE_DRAM, NITER, cycles);
    compare("DRAM", NITER, expect_p);
    $display("DRAM: load, %0d sweeps of %0d vectors and unload in %0d cycles (%0d reads, %0d writes)",
             NITER, NV, cycles, u_dram.reads, u_dram.writes);
    checks++;
    if (u_dram.reads != (NITER + 1) * NV || u_dram.writes != (NITER + 1) * NV) begin
      failures++;
      $display("ERROR: DRAM traffic %0d reads, %0d writes, expected %0d each",
               u_dram.reads, u_dram.writes, (NITER + 1) * NV);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
