// tb_coeff_gen: checks the lane index, boundary flag and constants.
//
// Two generators of the 65 x 65 x 129 grid (lanes 5 and 47) are driven with
// lane-0 positions covering every k0 and the j and i wrap-arounds, plus random
// positions. The expected index comes from dividing the linear position
// i0*JK + j0*K + k0 + LANE; positions past the end of the array must read as
// boundary. Interior points must carry the benchmark constants, boundary points
// bnd = 0.
module tb_coeff_gen;
  import himeno_pkg::*;
  localparam int IMAX = 65, JMAX = 65, KMAX = 129;
  localparam int JK = JMAX * KMAX;
  localparam int IW = $clog2(IMAX + 2), JW = $clog2(JMAX + 1), KW = $clog2(KMAX + 1);

  logic [IW-1:0] i0, ia, ib;
  logic [JW-1:0] j0, ja, jb;
  logic [KW-1:0] k0, ka, kb;
  logic          inta, intb;
  coef_t         ca, cb;
  int checks = 0, failures = 0;

  coeff_gen #(.IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX), .LANE(5))  ua (.i0, .j0, .k0, .i(ia), .j(ja), .k(ka), .interior(inta), .coef(ca));
  coeff_gen #(.IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX), .LANE(47)) ub (.i0, .j0, .k0, .i(ib), .j(jb), .k(kb), .interior(intb), .coef(cb));

  task automatic expect_lane(int lane, logic [IW-1:0] gi, logic [JW-1:0] gj, logic [KW-1:0] gk,
                             logic gint, coef_t gc);
    int n, ei, ej, ek;
    logic eint;
    n  = int'(i0) * JK + int'(j0) * KMAX + int'(k0) + lane;
    ei = n / JK; ej = (n % JK) / KMAX; ek = n % KMAX;
    eint = ei >= 1 && ei <= IMAX - 2 && ej >= 1 && ej <= JMAX - 2 && ek >= 1 && ek <= KMAX - 2;
    checks++;
    if (int'(gi) != ei || int'(gj) != ej || int'(gk) != ek || gint != eint) begin
      failures++;
      if (failures < 10)
        $display("ERROR: lane %0d at (%0d,%0d,%0d): got (%0d,%0d,%0d,%b) expected (%0d,%0d,%0d,%b)",
                 lane, i0, j0, k0, gi, gj, gk, gint, ei, ej, ek, eint);
    end
    checks++;
    if (gc.bnd !== (eint ? 32'h3F80_0000 : 32'h0) || gc.a3 !== 32'h3E2A_AAAB ||
        gc.omega !== 32'h3F4C_CCCD || gc.c1 !== 32'h3F80_0000 || gc.b2 !== 32'h0) begin
      failures++;
      if (failures < 10) $display("ERROR: lane %0d constants wrong", lane);
    end
  endtask

  task automatic at(int i, int j, int k);
    i0 = IW'(i); j0 = JW'(j); k0 = KW'(k);
    #1;
    expect_lane(5, ia, ja, ka, inta, ca);
    expect_lane(47, ib, jb, kb, intb, cb);
  endtask

  initial begin
    for (int k = 0; k < KMAX; k++) begin
      at(0, 0, k); at(1, 1, k); at(3, JMAX - 1, k); at(IMAX - 2, JMAX - 1, k); at(IMAX - 1, JMAX - 1, k);
      at(IMAX - 1, JMAX - 2, k); at(30, 40, k);
    end
    for (int n = 0; n < 3000; n++)
      at($urandom % IMAX, $urandom % JMAX, $urandom % KMAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
