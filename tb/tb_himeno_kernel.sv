// tb_himeno_kernel: two back-to-back Jacobi sweeps through a small kernel.
//
// Grid 6 x 5 x 7 (210 points, not a multiple of P = 4, so the last vector is
// padded) with random p values and a coefficient set in which every term is
// non-zero. Two independent arrays are streamed one right after the other, as
// the internal-buffer scenario does, then flush vectors, with random stalls.
// Every interior point must equal the reference update and every boundary
// point its input; each result vector must appear DC + pipe latency enabled
// cycles after its input vector, DC = floor((JK + K) / P) + 1.
module tb_himeno_kernel;
  import himeno_pkg::*;
  localparam int P = 4, IMAX = 6, JMAX = 5, KMAX = 7;
  localparam int LA = 1, LM = 2;
  localparam int N = IMAX * JMAX * KMAX, NV = (N + P - 1) / P;
  localparam int JK = JMAX * KMAX;
  localparam int DC = (JK + KMAX) / P + 1;
  localparam int LATP = 4 * LM + 12 * LA + 1;
  localparam coef_t C = '{a0: 32'h3F80_0000, a1: 32'h3F90_0000, a2: 32'h3FA0_0000,
                          a3: 32'h3E2A_AAAB, b0: 32'h3DCC_CCCD, b1: 32'hBD4C_CCCD,
                          b2: 32'h3E4C_CCCD, c0: 32'h3F70_0000, c1: 32'h3F60_0000,
                          c2: 32'h3F88_0000, wrk1: 32'h3C23_D70A, bnd: 32'h3F80_0000,
                          omega: 32'h3F4C_CCCD};

  logic clk = 0, rst_n = 0, en, in_valid, out_valid;
  logic [P-1:0][31:0] in_vec, out_vec;
  int checks = 0, failures = 0;

  himeno_kernel #(.P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX),
                  .LAT_ADD(LA), .LAT_MUL(LM), .COEF(C)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] pin [2][NV*P];
  logic [31:0] pout[2][NV*P];

  function automatic int idx(int i, int j, int k);
    return (i * JMAX + j) * KMAX + k;
  endfunction

  task automatic reference(int s);
    logic [NTAP-1:0][31:0] t;
    for (int i = 0; i < IMAX; i++)
      for (int j = 0; j < JMAX; j++)
        for (int k = 0; k < KMAX; k++) begin
          if (i == 0 || j == 0 || k == 0 || i == IMAX-1 || j == JMAX-1 || k == KMAX-1)
            pout[s][idx(i,j,k)] = pin[s][idx(i,j,k)];
          else begin
            for (int q = 0; q < NTAP; q++)
              t[q] = pin[s][idx(i + tap_di(q), j + tap_dj(q), k + tap_dk(q))];
            pout[s][idx(i,j,k)] = tb_himeno_ref::point_update(t, C);
          end
        end
  endtask

  int en_count = 0, sent = 0, got = 0, interior_pts = 0, boundary_pts = 0;
  int send_t[$];
  always @(posedge clk) if (en) en_count <= en_count + 1;

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int n = 0; n < NV * P; n++)
        pin[s][n] = (n < N) ? {1'b0, 8'(125 + $urandom % 3), 23'($urandom)} : 32'd0;
      reference(s);
    end
    en = 0; in_valid = 0; in_vec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 2 * NV || got < 2 * NV) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      in_valid = sent < 2 * NV;
      for (int l = 0; l < P; l++)
        in_vec[l] = in_valid ? pin[sent / NV][(sent % NV) * P + l] : 32'd0;
      if (en && in_valid) begin
        send_t.push_back(en_count);
        sent++;
      end
      if (en_count > 5000) break;
    end
    checks++;
    if (got != 2 * NV || interior_pts == 0 || boundary_pts == 0) begin
      failures++;
      $display("ERROR: %0d result vectors of %0d", got, 2 * NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results are checked just before an edge at which the kernel moves
  always @(negedge clk) begin
    #2;
    if (rst_n && en && out_valid) begin
      int s, v, t0;
      s = got / NV; v = got % NV;
      t0 = send_t.pop_front();
      checks++;
      if (en_count != t0 + DC + LATP) begin
        failures++;
        if (failures < 10) $display("ERROR: vector %0d at %0d, expected at %0d", got, en_count, t0 + DC + LATP);
      end
      for (int l = 0; l < P; l++) begin
        int n;
        n = v * P + l;
        if (n < N) begin
          int i, j, k;
          i = n / JK; j = (n % JK) / KMAX; k = n % KMAX;
          if (i == 0 || j == 0 || k == 0 || i == IMAX-1 || j == JMAX-1 || k == KMAX-1) boundary_pts++;
          else interior_pts++;
          checks++;
          if (out_vec[l] !== pout[s][n]) begin
            failures++;
            if (failures < 10) $display("ERROR: sweep %0d point %0d got %h expected %h", s, n, out_vec[l], pout[s][n]);
          end
        end
      end
      got++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
