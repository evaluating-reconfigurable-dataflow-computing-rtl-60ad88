// coeff_gen: per-pipe constant and boundary generator.
//
// Only the array p is streamed; the read-only arrays of the benchmark
// (a, b, c, wrk1, bnd) are generated inside the kernel from the point's index
// with ternary (select) logic. Pipe LANE handles stream element i0*JK + j0*K +
// k0 + LANE, where (i0, j0, k0) is the index of lane 0 of the current vector;
// the lane's own (i, j, k) is found with one carry from k into j and from j
// into i (LANE < KMAX). A point is interior when 1 <= i <= IMAX-2, 1 <= j <=
// JMAX-2 and 1 <= k <= KMAX-2, the range of the benchmark's loops. Interior
// points get the coefficient set COEF; boundary points, and padding elements
// past the end of the array (i >= IMAX), get bnd = 0 and interior = 0, which
// makes the pipe pass p through unchanged.
// Every coefficient field except bnd is a parameter constant, so those output
// bits are constants after synthesis; they are ports so that a coefficient set
// that varies with the index can replace COEF without changing the pipe.
// Purely combinational. Generating the constants from the index follows the
// document; the default values are the benchmark's initial values, which the
// document does not list, and the carry scheme is this design's.
module coeff_gen
  import himeno_pkg::*;
#(
  parameter int    IMAX = 65,
  parameter int    JMAX = 65,
  parameter int    KMAX = 129,
  parameter int    LANE = 0,
  parameter coef_t COEF = HIMENO_COEF,
  localparam int   IW   = $clog2(IMAX + 2),
  localparam int   JW   = $clog2(JMAX + 1),
  localparam int   KW   = $clog2(KMAX + 1)
) (
  input  logic [IW-1:0] i0,
  input  logic [JW-1:0] j0,
  input  logic [KW-1:0] k0,
  output logic [IW-1:0] i,
  output logic [JW-1:0] j,
  output logic [KW-1:0] k,
  output logic          interior,
  output coef_t         coef
);
  logic [KW:0] k_sum;
  logic        k_wrap, j_wrap;

  always_comb begin
    k_sum  = {1'b0, k0} + (KW+1)'(LANE);
    k_wrap = k_sum >= (KW+1)'(KMAX);
    k      = k_wrap ? KW'(k_sum - (KW+1)'(KMAX)) : KW'(k_sum);
    j_wrap = k_wrap && (j0 == JW'(JMAX - 1));
    j      = k_wrap ? (j_wrap ? '0 : j0 + 1'b1) : j0;
    i      = j_wrap ? i0 + 1'b1 : i0;

    interior = (i >= IW'(1)) && (i <= IW'(IMAX - 2)) &&
               (j >= JW'(1)) && (j <= JW'(JMAX - 2)) &&
               (k >= KW'(1)) && (k <= KW'(KMAX - 2));

    coef     = COEF;
    coef.bnd = interior ? COEF.bnd : FP_ZERO;
  end
endmodule
