// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts between fp32 bit patterns and SystemVerilog reals, with
// round-to-nearest-even and flush-to-zero exactly as the datapath does,
// and models the sigmoid look-up table from its definition, so that
// testbenches can compute expected values independently of the RTL.
package tb_fp_pkg;

  function automatic real fp2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2fp(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return 32'd0;
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    mr = {1'b0, m} + ((g && (st || m[0])) ? 25'd1 : 25'd0);
    if (mr[24]) e = e + 1;
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // Difference in units of the last place between two fp32 values of the same sign.
  function automatic int ulp_diff(logic [31:0] x, logic [31:0] y);
    int dx;
    if (x[30:0] == 31'd0 && y[30:0] == 31'd0) return 0;
    if (x[31] != y[31]) return 1000000;
    dx = int'(x[30:0]) - int'(y[30:0]);
    return dx < 0 ? -dx : dx;
  endfunction

  function automatic real sigm(real z);
    return 1.0 / (1.0 + $exp(-z));
  endfunction

  // Table sigmoid: 256 buckets of width 1/16 over [-8, 8), value at the
  // bucket centre, saturating outside.
  function automatic real sig_lut_ref(real z);
    int idx;
    real t;
    t = (z + 8.0) * 16.0;
    if (t < 0.0) idx = 0;
    else if (t >= 256.0) idx = 255;
    else idx = int'($floor(t));
    return sigm(-8.0 + (real'(idx) + 0.5) / 16.0);
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // One ALU operation: product rounded to fp32, then the sum rounded.
  function automatic logic [31:0] madd(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    return r2fp(fp2r(r2fp(fp2r(a) * fp2r(b))) + fp2r(c));
  endfunction

  function automatic logic [31:0] sig_fp(logic [31:0] z);
    return r2fp(sig_lut_ref(fp2r(z)));
  endfunction

  function automatic logic [31:0] rnd_small();   // random value in about [-2, 2]
    return r2fp((real'($urandom_range(0, 40000)) - 20000.0) / 10000.0);
  endfunction

endpackage
