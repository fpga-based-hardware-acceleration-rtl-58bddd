// fp32_mul: combinational IEEE-754 binary32 multiplier.
//
// The 24x24-bit significand product is normalised by at most one position
// and rounded to nearest, ties to even, using the guard bit and a sticky OR
// of the remaining product bits. This design flushes subnormal inputs and
// results to signed zero (the arithmetic of the original platform is not
// specified beyond "float32"); overflow gives signed infinity; NaN or
// infinity times zero gives the default quiet NaN.
//
// Interface: a, b in; y = a*b out, same cycle.
module fp32_mul
  import mlp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, rnd_up;
  logic [24:0] mant_r;
  logic signed [10:0] ey;

  always_comb begin
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    sy = sa ^ sb;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (a[22:0] == 23'd0);
    ib = (eb == 8'hff) && (b[22:0] == 23'd0);
    na = (ea == 8'hff) && (a[22:0] != 23'd0);
    nb = (eb == 8'hff) && (b[22:0] != 23'd0);

    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    ey   = 11'(ea) + 11'(eb) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      ey     = ey + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd_up = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      ey     = ey + 11'sd1;
    end

    if (na || nb || ((ia || ib) && (za || zb)))
      y = 32'h7fc0_0000;
    else if (ia || ib)
      y = {sy, 8'hff, 23'd0};
    else if (za || zb)
      y = {sy, 31'd0};
    else if (ey >= 11'sd255)
      y = {sy, 8'hff, 23'd0};
    else if (ey <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, ey[7:0], mant_r[22:0]};
  end

endmodule
