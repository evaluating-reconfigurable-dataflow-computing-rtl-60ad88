// tb_fp_pkg: reference single precision arithmetic for the testbenches.
//
// Conversions between 32-bit float patterns and the simulator's double
// precision real, written out field by field so that the reference does not
// depend on the simulator's own single precision support. Double to single
// rounds to nearest even. A sum or product of two singles computed in double
// and then rounded once to single is the correctly rounded single result.
// Subnormal singles are flushed to zero, as in the design.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]} + {24'd0, d[28] & ((|d[27:0]) | d[29])};
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic logic is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    logic [31:0] s;
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : 32'h7FC0_0000;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};
    s = r2f(f2r(a) + f2r(b));
    if (s[30:0] == 0) return 32'd0;          // exact cancellation gives +0
    return s;
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    if (is_inf(a) || is_inf(b)) begin
      if (a[30:23] == 0 || b[30:23] == 0) return 32'h7FC0_0000;
      return {a[31] ^ b[31], 8'hFF, 23'd0};
    end
    if (a[30:23] == 0 || b[30:23] == 0) return {a[31] ^ b[31], 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_sub(logic [31:0] a, logic [31:0] b);
    return ref_add(a, {~b[31], b[30:0]});
  endfunction
endpackage
