// himeno_pkg: types, constants and arithmetic shared by the Himeno dataflow engine.
//
// The engine computes the 19-point Jacobi update of the Himeno benchmark in IEEE
// single precision. This package holds:
//   * the 32-bit float type and the two rounding routines (add, multiply) that the
//     pipelined fp32_add / fp32_mul units wrap. Rounding is round-to-nearest-even;
//     subnormal operands and results are flushed to signed zero (a choice of this
//     design: the benchmark's data never come near the subnormal range);
//   * the numbering of the 19 stencil points and their stream offsets;
//   * the constant coefficient set of the benchmark (a, b, c, wrk1, bnd, omega);
//   * the stream scenario (PCIe, internal buffer, on-board DRAM) encoding.
package himeno_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  // ---------------------------------------------------------------- stencil taps
  // Tap numbering of the 19 stencil points used by window and pipe.
  localparam int NTAP = 19;
  typedef enum logic [4:0] {
    T_C    = 5'd0,   // p[i  ][j  ][k  ]
    T_IP   = 5'd1,   // p[i+1][j  ][k  ]
    T_JP   = 5'd2,   // p[i  ][j+1][k  ]
    T_KP   = 5'd3,   // p[i  ][j  ][k+1]
    T_IM   = 5'd4,   // p[i-1][j  ][k  ]
    T_JM   = 5'd5,   // p[i  ][j-1][k  ]
    T_KM   = 5'd6,   // p[i  ][j  ][k-1]
    T_IPJP = 5'd7,   // p[i+1][j+1][k  ]
    T_IPJM = 5'd8,   // p[i+1][j-1][k  ]
    T_IMJP = 5'd9,   // p[i-1][j+1][k  ]
    T_IMJM = 5'd10,  // p[i-1][j-1][k  ]
    T_JPKP = 5'd11,  // p[i  ][j+1][k+1]
    T_JMKP = 5'd12,  // p[i  ][j-1][k+1]
    T_JPKM = 5'd13,  // p[i  ][j+1][k-1]
    T_JMKM = 5'd14,  // p[i  ][j-1][k-1]
    T_IPKP = 5'd15,  // p[i+1][j  ][k+1]
    T_IMKP = 5'd16,  // p[i-1][j  ][k+1]
    T_IPKM = 5'd17,  // p[i+1][j  ][k-1]
    T_IMKM = 5'd18   // p[i-1][j  ][k-1]
  } tap_e;

  // Displacement (di, dj, dk) of each tap, indexed by tap number.
  function automatic int tap_di(int t);
    case (t)
      1, 7, 8, 15, 17:  return 1;
      4, 9, 10, 16, 18: return -1;
      default:          return 0;
    endcase
  endfunction
  function automatic int tap_dj(int t);
    case (t)
      2, 7, 9, 11, 13:  return 1;
      5, 8, 10, 12, 14: return -1;
      default:          return 0;
    endcase
  endfunction
  function automatic int tap_dk(int t);
    case (t)
      3, 11, 12, 15, 16: return 1;
      6, 13, 14, 17, 18: return -1;
      default:           return 0;
    endcase
  endfunction

  // Offset of a tap in the 1-D stream (k fastest, then j, then i).
  function automatic int tap_offset(int t, int jk, int k);
    return tap_di(t) * jk + tap_dj(t) * k + tap_dk(t);
  endfunction

  // Taps sorted by decreasing stream offset (valid for KMAX >= 3, JMAX >= 3):
  // JK+K, JK+1, JK, JK-1, JK-K, K+1, K, K-1, 1, 0, -1, -K+1, -K, -K-1,
  // -JK+K, -JK+1, -JK, -JK-1, -JK-K.
  function automatic int tap_by_rank(int q);
    case (q)
      0: return 7;   1: return 15;  2: return 1;   3: return 17;  4: return 8;
      5: return 11;  6: return 2;   7: return 13;  8: return 3;   9: return 0;
      10: return 6;  11: return 12; 12: return 5;  13: return 14; 14: return 9;
      15: return 16; 16: return 4;  17: return 18; default: return 10;
    endcase
  endfunction

  // Floor division for a possibly negative numerator, positive divisor.
  function automatic int floor_div(int a, int b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  // ---------------------------------------------------------------- coefficients
  typedef struct packed {
    fp32_t a0, a1, a2, a3;
    fp32_t b0, b1, b2;
    fp32_t c0, c1, c2;
    fp32_t wrk1;
    fp32_t bnd;
    fp32_t omega;
  } coef_t;

  // Values the benchmark initialises its read-only arrays with: a0..a2 = 1,
  // a3 = 1/6, b = 0, c = 1, wrk1 = 0, bnd = 1, omega = 0.8.
  localparam coef_t HIMENO_COEF = '{
    a0: FP_ONE, a1: FP_ONE, a2: FP_ONE, a3: 32'h3E2A_AAAB,
    b0: FP_ZERO, b1: FP_ZERO, b2: FP_ZERO,
    c0: FP_ONE, c1: FP_ONE, c2: FP_ONE,
    wrk1: FP_ZERO, bnd: FP_ONE, omega: 32'h3F4C_CCCD
  };

  // ---------------------------------------------------------------- scenarios
  typedef enum logic [1:0] {
    MODE_PCIE  = 2'd0,   // every iteration streamed from and to the host
    MODE_NNITR = 2'd1,   // iterations fed back through the internal buffer
    MODE_DRAM  = 2'd2    // iterations read from and written to on-board DRAM
  } mode_e;

  // ---------------------------------------------------------------- arithmetic
  function automatic fp32_t fp_pack(logic s, int e, logic [22:0] m);
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], m};
  endfunction

  // a + b, round to nearest even, subnormals flushed to zero.
  function automatic fp32_t fp_add(fp32_t a_in, fp32_t b_in);
    fp32_t a, b, x, y;
    logic [7:0] d;
    logic [26:0] mx, my, mask;
    logic [27:0] sum;
    logic [24:0] mr;
    logic inc;
    int e;
    a = (a_in[30:23] == 8'd0) ? {a_in[31], 31'd0} : a_in;
    b = (b_in[30:23] == 8'd0) ? {b_in[31], 31'd0} : b_in;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'hFF && a[22:0] != 0) return FP_QNAN;
      if (b[30:23] == 8'hFF && b[22:0] != 0) return FP_QNAN;
      if (a[30:23] == 8'hFF && b[30:23] == 8'hFF && a[31] != b[31]) return FP_QNAN;
      return (a[30:23] == 8'hFF) ? a : b;
    end
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    if (x[30:0] == 0) return {a[31] & b[31], 31'd0};
    if (y[30:0] == 0) return x;
    d  = x[30:23] - y[30:23];
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d > 8'd26) my = 27'd1;
    else begin
      mask = (27'd1 << d) - 27'd1;
      my   = (my >> d) | {26'd0, |(my & mask)};
    end
    e = int'(x[30:23]);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 0) return FP_ZERO;
      for (int n = 0; n < 26; n++) begin
        if (!sum[26]) begin
          sum = sum << 1;
          e = e - 1;
        end
      end
    end
    inc = sum[2] & (sum[1] | sum[0] | sum[3]);
    mr  = {1'b0, sum[26:3]} + {24'd0, inc};
    if (mr[24]) begin
      mr = mr >> 1;
      e = e + 1;
    end
    return fp_pack(x[31], e, mr[22:0]);
  endfunction

  // a * b, round to nearest even, subnormals flushed to zero.
  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic s;
    logic [47:0] prod;
    logic [23:0] m;
    logic g, st;
    logic [24:0] mr;
    int e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'hFF && a[22:0] != 0) return FP_QNAN;
      if (b[30:23] == 8'hFF && b[22:0] != 0) return FP_QNAN;
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_QNAN;   // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    prod = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (prod[47]) begin
      m = prod[47:24]; g = prod[23]; st = |prod[22:0];
      e = e + 1;
    end else begin
      m = prod[46:23]; g = prod[22]; st = |prod[21:0];
    end
    mr = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e = e + 1;
    end
    return fp_pack(s, e, mr[22:0]);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

endpackage
