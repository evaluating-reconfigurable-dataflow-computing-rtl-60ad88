// tb_fp32_mul: self-checking test of the pipelined single precision unit.
//
// Random operands (normal numbers, exponents kept clear of overflow and of the
// subnormal range, many pairs with equal or close exponents to exercise
// cancellation and rounding ties) and special cases (zeros, infinities, NaN,
// x - x) are fed one per cycle with random stall cycles. Each result is
// compared with a reference computed in double precision (a * b rounded to single), and
// it must appear exactly LAT enabled cycles after its operands.
module tb_fp32_mul;
  import himeno_pkg::*;
  localparam int LAT = 3;
  logic  clk = 0, en;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp32_mul #(.LAT(LAT)) dut (.clk, .en, .a, .b, .y);
  always #5 clk = ~clk;

  function automatic fp32_t ref_op(fp32_t x, fp32_t z);
    return tb_fp_pkg::ref_mul(x, z);
  endfunction

  function automatic fp32_t rnd_fp(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  fp32_t qa[$], qb[$], qe[$];
  int    age[$];

  task automatic push(fp32_t x, fp32_t z);
    qa.push_back(x); qb.push_back(z); qe.push_back(ref_op(x, z));
  endtask

  initial begin
    fp32_t x, z;
    // special cases
    push(32'h3F80_0000, 32'hBF80_0000);   // 1 + -1 / 1 * -1
    push(32'h0000_0000, 32'h8000_0000);
    push(32'h7F80_0000, 32'h3F80_0000);   // inf
    push(32'h7F80_0000, 32'hFF80_0000);   // inf and -inf
    push(32'h7FC0_0000, 32'h4000_0000);   // NaN
    push(32'h4B7F_FFFF, 32'h3F00_0000);   // rounding near a carry
    push(32'h3F80_0001, 32'h3380_0000);   // tie cases
    push(32'h3F80_0000, 32'h3380_0000);
    for (int n = 0; n < 6000; n++) begin
      x = rnd_fp(90, 160);
      case (n % 4)
        0: z = rnd_fp(90, 160);
        1: z = {1'($urandom), x[30:23], 23'($urandom)};            // same exponent
        2: z = {~x[31], x[30:23], x[22:0] ^ 23'($urandom % 16)};   // near cancel
        default: z = {1'($urandom), 8'(x[30:23] - 8'($urandom % 30)), 23'($urandom)};
      endcase
      push(x, z);
    end
  end

  // driver and checker
  int sent = 0, cyc = 0;
  fp32_t pend_e[$];
  int    pend_t[$];
  int    en_count = 0;
  initial begin
    en = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    while (sent < qa.size()) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      if (en) begin
        a = qa[sent]; b = qb[sent];
        pend_e.push_back(qe[sent]);
        pend_t.push_back(en_count + LAT);
        sent++;
      end
    end
    @(negedge clk) en = 1;
    repeat (LAT + 2) @(negedge clk);
    if (pend_e.size() != 0) begin
      failures++;
      $display("ERROR: %0d results never checked", pend_e.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (en) en_count <= en_count + 1;
    // after this edge, results whose time has come are at y
    #1;
    while (pend_t.size() > 0 && pend_t[0] == en_count) begin
      fp32_t e;
      e = pend_e.pop_front();
      void'(pend_t.pop_front());
      checks++;
      if (tb_fp_pkg::is_nan(e) ? !tb_fp_pkg::is_nan(y) : (y !== e)) begin
        failures++;
        if (failures < 10) $display("ERROR: got %h expected %h", y, e);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
