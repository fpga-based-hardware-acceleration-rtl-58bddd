// fp_ref_pkg: reference float32 arithmetic for the testbenches.
//
// Values are widened to double precision, combined with the simulator's
// real arithmetic and rounded back to float32 (nearest, ties to even).
// A float32 product is exact in double precision, and for a sum double
// rounding through a 53-bit format is known to give the correctly rounded
// float32 result, so these functions give IEEE results. Like the design,
// they treat subnormals as signed zero. Special values (infinity, NaN) are
// not modelled; tests keep away from them.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [23:0] keep;
    logic [28:0] drop;
    logic [24:0] m;
    int          e;
    d    = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    keep = {1'b1, d[51:29]};
    drop = d[28:0];
    m    = {1'b0, keep};
    if (drop > 29'h1000_0000 || (drop == 29'h1000_0000 && keep[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    logic [31:0] y;
    y = r2f(f2r(a) * f2r(b));
    if (y[30:0] == 31'd0) y[31] = a[31] ^ b[31];
    return y;
  endfunction

  // Zero results are signed explicitly: -0 only for (-0) + (-0), as IEEE
  // specifies for round to nearest.
  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    logic [31:0] y;
    y = r2f(f2r(a) + f2r(b));
    if (y[30:0] == 31'd0)
      y[31] = (a[30:23] == 8'd0) && (b[30:23] == 8'd0) && a[31] && b[31];
    return y;
  endfunction

  // Random float32 with exponent field in [emin, emax] and random sign.
  function automatic logic [31:0] rand_fp(int emin, int emax);
    int unsigned e;
    e = emin + ($urandom % (emax - emin + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Sigmoid table entry k of a DEPTH-entry table over [xmin, xmax].
  function automatic logic [31:0] ref_sigmoid_entry(int k, int depth, real xmin, real xmax);
    real xk;
    xk = xmin + real'(k) * (xmax - xmin) / real'(depth - 1);
    return r2f(1.0 / (1.0 + $exp(-xk)));
  endfunction

  // Table index chosen for x: the same float32 steps as the hardware
  // specifies (add -xmin, multiply by (depth-1)/(xmax-xmin), round half up,
  // clamp), evaluated with the reference arithmetic.
  function automatic int ref_sigmoid_index(logic [31:0] x, int depth, real xmin, real xmax);
    logic [31:0] t, u;
    real         ur;
    int          k;
    t  = ref_add(x, r2f(-xmin));
    u  = ref_mul(t, r2f(real'(depth - 1) / (xmax - xmin)));
    ur = f2r(u);
    if (ur <= 0.0) return 0;
    if (ur >= real'(depth - 1)) return depth - 1;
    k = int'($floor(ur + 0.5));
    if (k > depth - 1) k = depth - 1;
    return k;
  endfunction

endpackage
