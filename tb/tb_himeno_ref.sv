// tb_himeno_ref: reference model of the Himeno point update for testbenches.
//
// point_update evaluates the benchmark's 19-point Jacobi update for one point
// with single precision rounding after every operation, in the operand order of
// the benchmark's C source (left-to-right sums). Taps are indexed like the
// design's (himeno_pkg tap numbering); the coefficients are the coef_t fields.
package tb_himeno_ref;
  import himeno_pkg::*;
  import tb_fp_pkg::*;

  function automatic logic [31:0] point_update(logic [NTAP-1:0][31:0] p, coef_t c);
    logic [31:0] s0, br0, br1, br2, ss;
    br0 = ref_add(ref_sub(ref_sub(p[7], p[8]), p[9]), p[10]);
    br1 = ref_add(ref_sub(ref_sub(p[11], p[12]), p[13]), p[14]);
    br2 = ref_add(ref_sub(ref_sub(p[15], p[16]), p[17]), p[18]);
    s0 = ref_mul(c.a0, p[1]);
    s0 = ref_add(s0, ref_mul(c.a1, p[2]));
    s0 = ref_add(s0, ref_mul(c.a2, p[3]));
    s0 = ref_add(s0, ref_mul(c.b0, br0));
    s0 = ref_add(s0, ref_mul(c.b1, br1));
    s0 = ref_add(s0, ref_mul(c.b2, br2));
    s0 = ref_add(s0, ref_mul(c.c0, p[4]));
    s0 = ref_add(s0, ref_mul(c.c1, p[5]));
    s0 = ref_add(s0, ref_mul(c.c2, p[6]));
    s0 = ref_add(s0, c.wrk1);
    ss = ref_mul(ref_sub(ref_mul(s0, c.a3), p[0]), c.bnd);
    return ref_add(p[0], ref_mul(c.omega, ss));
  endfunction
endpackage
