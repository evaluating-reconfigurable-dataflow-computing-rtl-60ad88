// tb_stencil_pipe: checks one pipe against the reference point update.
//
// Random tap values and random coefficients (every term of the update
// non-zero, so each multiplier and adder of the graph matters) are fed one
// point per enabled cycle, with random stalls and random interior flags. An
// interior point must give the reference update bit for bit; a boundary point
// must give its centre value unchanged. Each result must come out exactly
// 4*LAT_MUL + 12*LAT_ADD + 1 enabled cycles after its point went in.
module tb_stencil_pipe;
  import himeno_pkg::*;
  localparam int LA = 2, LM = 3;
  localparam int LAT = 4 * LM + 12 * LA + 1;

  logic clk = 0, rst_n = 0, en, valid, interior, y_valid;
  logic [NTAP-1:0][31:0] taps;
  coef_t coef;
  fp32_t y;
  int checks = 0, failures = 0;

  stencil_pipe #(.LAT_ADD(LA), .LAT_MUL(LM)) dut (.*);
  always #5 clk = ~clk;

  function automatic fp32_t rnd(int emin, int emax);
    return {1'($urandom), 8'(emin + ($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  fp32_t exp_q[$];
  int    exp_t[$];
  int    en_count = 0, sent = 0, got = 0, interior_seen = 0, boundary_seen = 0;

  initial begin
    coef = '{a0: rnd(120, 130), a1: rnd(120, 130), a2: rnd(120, 130), a3: rnd(120, 130),
             b0: rnd(120, 130), b1: rnd(120, 130), b2: rnd(120, 130),
             c0: rnd(120, 130), c1: rnd(120, 130), c2: rnd(120, 130),
             wrk1: rnd(120, 130), bnd: rnd(120, 130), omega: rnd(120, 130)};
    en = 0; valid = 0; interior = 0; taps = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      valid = ($urandom % 8) != 0;
      interior = ($urandom % 4) != 0;
      for (int t = 0; t < NTAP; t++) taps[t] = rnd(124, 130);
      if (en && valid) begin
        exp_q.push_back(interior ? tb_himeno_ref::point_update(taps, coef) : taps[0]);
        exp_t.push_back(en_count + LAT);
        if (interior) interior_seen++; else boundary_seen++;
        sent++;
      end
    end
    @(negedge clk) en = 1; valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (got != sent || interior_seen == 0 || boundary_seen == 0) begin
      failures++;
      $display("ERROR: %0d results for %0d points", got, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en) en_count <= en_count + 1;

  // sample just before each edge where the pipe moves
  always @(negedge clk) begin
    #2;
    if (rst_n && en && y_valid) begin
      fp32_t e;
      int    t;
      got++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected result %h", y);
      end else begin
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (y !== e || t != en_count) begin
          failures++;
          if (failures < 10) $display("ERROR: got %h at %0d expected %h at %0d", y, en_count, e, t);
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
