// stencil_pipe: one pipe of the kernel, the Jacobi update of one grid point.
//
// It evaluates, in IEEE single precision and in the operand order of the
// benchmark's C source (so that results are bit-identical to a CPU run):
//   s0   = a0*p[i+1] + a1*p[j+1] + a2*p[k+1]
//        + b0*(p[i+1,j+1] - p[i+1,j-1] - p[i-1,j+1] + p[i-1,j-1])
//        + b1*(p[j+1,k+1] - p[j-1,k+1] - p[j+1,k-1] + p[j-1,k-1])
//        + b2*(p[i+1,k+1] - p[i-1,k+1] - p[i+1,k-1] + p[i-1,k-1])
//        + c0*p[i-1] + c1*p[j-1] + c2*p[k-1] + wrk1          (left to right)
//   ss   = (s0*a3 - p) * bnd
//   wrk2 = p + omega*ss
// and outputs wrk2 for interior points and p for boundary points. That is 32
// floating point operations: 13 multipliers and 19 adders, each its own unit,
// as a dataflow graph with no memory access. Operands that arrive early are
// delayed (delay_line) to meet their partner, so a new point enters every
// enabled cycle. The coefficients other than bnd are constants of the run and
// are not delayed; bnd, interior and valid travel with the point.
// Latency: 4*LAT_MUL + 12*LAT_ADD + 1 en-cycles from taps/valid to y/y_valid.
// The arithmetic follows the benchmark kernel; the schedule, the latencies and
// the boundary select are choices of this design.
module stencil_pipe
  import himeno_pkg::*;
#(
  parameter int LAT_ADD = 2,
  parameter int LAT_MUL = 2,
  localparam int LAT    = 4 * LAT_MUL + 12 * LAT_ADD + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   valid,
  input  logic [NTAP-1:0][31:0]  taps,
  input  coef_t                  coef,
  input  logic                   interior,
  output logic                   y_valid,
  output fp32_t                  y
);
  localparam int M = LAT_MUL;
  localparam int A = LAT_ADD;

  // ------------------------------------------------ face products (ready at M)
  fp32_t ma0, ma1, ma2, mc0, mc1, mc2;
  fp32_mul #(.LAT(M)) u_ma0 (.clk, .en, .a(coef.a0), .b(taps[T_IP]), .y(ma0));
  fp32_mul #(.LAT(M)) u_ma1 (.clk, .en, .a(coef.a1), .b(taps[T_JP]), .y(ma1));
  fp32_mul #(.LAT(M)) u_ma2 (.clk, .en, .a(coef.a2), .b(taps[T_KP]), .y(ma2));
  fp32_mul #(.LAT(M)) u_mc0 (.clk, .en, .a(coef.c0), .b(taps[T_IM]), .y(mc0));
  fp32_mul #(.LAT(M)) u_mc1 (.clk, .en, .a(coef.c1), .b(taps[T_JM]), .y(mc1));
  fp32_mul #(.LAT(M)) u_mc2 (.clk, .en, .a(coef.c2), .b(taps[T_KM]), .y(mc2));

  // ------------------------------------------------ edge brackets (ready at 3A+M)
  fp32_t mb [3];
  for (genvar g = 0; g < 3; g++) begin : g_bracket
    // (pp - pm - mp + mm) for the pair of directions of b[g]
    localparam tap_e TPP = (g == 0) ? T_IPJP : (g == 1) ? T_JPKP : T_IPKP;
    localparam tap_e TPM = (g == 0) ? T_IPJM : (g == 1) ? T_JMKP : T_IMKP;
    localparam tap_e TMP = (g == 0) ? T_IMJP : (g == 1) ? T_JPKM : T_IPKM;
    localparam tap_e TMM = (g == 0) ? T_IMJM : (g == 1) ? T_JMKM : T_IMKM;
    fp32_t d1, d2, d3, p3, p4;
    fp32_t coef_b;
    assign coef_b = (g == 0) ? coef.b0 : (g == 1) ? coef.b1 : coef.b2;
    delay_line #(.W(32), .DELAY(A))     u_p3 (.clk, .en, .din(taps[TMP]), .dout(p3));
    delay_line #(.W(32), .DELAY(2 * A)) u_p4 (.clk, .en, .din(taps[TMM]), .dout(p4));
    fp32_add #(.LAT(A)) u_s1 (.clk, .en, .a(taps[TPP]), .b({~taps[TPM][31], taps[TPM][30:0]}), .y(d1));
    fp32_add #(.LAT(A)) u_s2 (.clk, .en, .a(d1), .b({~p3[31], p3[30:0]}), .y(d2));
    fp32_add #(.LAT(A)) u_s3 (.clk, .en, .a(d2), .b(p4), .y(d3));
    fp32_mul #(.LAT(M)) u_mb (.clk, .en, .a(coef_b), .b(d3), .y(mb[g]));
  end

  // ------------------------------------------------ sum chain for s0
  fp32_t s1, s2, s2d, s3, s4, s5, s6, s7, s8, s0;
  fp32_t ma2d, mb1d, mb2d, mc0d, mc1d, mc2d;
  delay_line #(.W(32), .DELAY(A))     u_dma2 (.clk, .en, .din(ma2),   .dout(ma2d));
  delay_line #(.W(32), .DELAY(A))     u_ds2  (.clk, .en, .din(s2),    .dout(s2d));
  delay_line #(.W(32), .DELAY(A))     u_dmb1 (.clk, .en, .din(mb[1]), .dout(mb1d));
  delay_line #(.W(32), .DELAY(2 * A)) u_dmb2 (.clk, .en, .din(mb[2]), .dout(mb2d));
  delay_line #(.W(32), .DELAY(6 * A)) u_dmc0 (.clk, .en, .din(mc0),   .dout(mc0d));
  delay_line #(.W(32), .DELAY(7 * A)) u_dmc1 (.clk, .en, .din(mc1),   .dout(mc1d));
  delay_line #(.W(32), .DELAY(8 * A)) u_dmc2 (.clk, .en, .din(mc2),   .dout(mc2d));

  fp32_add #(.LAT(A)) u_s1 (.clk, .en, .a(ma0), .b(ma1),   .y(s1));   // M+A
  fp32_add #(.LAT(A)) u_s2 (.clk, .en, .a(s1),  .b(ma2d),  .y(s2));   // M+2A
  fp32_add #(.LAT(A)) u_s3 (.clk, .en, .a(s2d), .b(mb[0]), .y(s3));   // M+4A
  fp32_add #(.LAT(A)) u_s4 (.clk, .en, .a(s3),  .b(mb1d),  .y(s4));   // M+5A
  fp32_add #(.LAT(A)) u_s5 (.clk, .en, .a(s4),  .b(mb2d),  .y(s5));   // M+6A
  fp32_add #(.LAT(A)) u_s6 (.clk, .en, .a(s5),  .b(mc0d),  .y(s6));   // M+7A
  fp32_add #(.LAT(A)) u_s7 (.clk, .en, .a(s6),  .b(mc1d),  .y(s7));   // M+8A
  fp32_add #(.LAT(A)) u_s8 (.clk, .en, .a(s7),  .b(mc2d),  .y(s8));   // M+9A
  fp32_add #(.LAT(A)) u_s0 (.clk, .en, .a(s8),  .b(coef.wrk1), .y(s0)); // M+10A

  // ------------------------------------------------ relaxation
  fp32_t pc1, pc2, pc3, bnd_d, t1, t2, ss, t3, wrk2;
  logic  int_d;
  delay_line #(.W(32), .DELAY(2*M + 10*A)) u_dpc1 (.clk, .en, .din(taps[T_C]), .dout(pc1));
  delay_line #(.W(32), .DELAY(2*M + A))    u_dpc2 (.clk, .en, .din(pc1), .dout(pc2));
  delay_line #(.W(32), .DELAY(A))          u_dpc3 (.clk, .en, .din(pc2), .dout(pc3));
  delay_line #(.W(32), .DELAY(2*M + 11*A)) u_dbnd (.clk, .en, .din(coef.bnd), .dout(bnd_d));
  delay_line #(.W(1),  .DELAY(LAT - 1))    u_dint (.clk, .en, .din(interior), .dout(int_d));

  fp32_mul #(.LAT(M)) u_t1 (.clk, .en, .a(s0), .b(coef.a3), .y(t1));                     // 2M+10A
  fp32_add #(.LAT(A)) u_t2 (.clk, .en, .a(t1), .b({~pc1[31], pc1[30:0]}), .y(t2));        // 2M+11A
  fp32_mul #(.LAT(M)) u_ss (.clk, .en, .a(t2), .b(bnd_d), .y(ss));                        // 3M+11A
  fp32_mul #(.LAT(M)) u_t3 (.clk, .en, .a(coef.omega), .b(ss), .y(t3));                   // 4M+11A
  fp32_add #(.LAT(A)) u_wk (.clk, .en, .a(pc2), .b(t3), .y(wrk2));                        // 4M+12A

  always_ff @(posedge clk) if (en) y <= int_d ? wrk2 : pc3;

  // valid travels in a resettable shift register of the same length
  logic [LAT-1:0] vsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vsr <= '0;
    else if (en) vsr <= {vsr[LAT-2:0], valid};
  end
  assign y_valid = vsr[LAT-1];
endmodule
