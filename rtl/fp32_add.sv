// fp32_add: combinational IEEE-754 binary32 adder.
//
// The operand with the larger magnitude is taken as the base; the other is
// shifted right to align, keeping guard, round and sticky bits. Equal signs
// add the significands (at most one right shift to normalise), different
// signs subtract them (a leading-zero count and left shift normalise).
// Rounding is to nearest, ties to even. As in fp32_mul, subnormal inputs
// and results are flushed to signed zero (this design's choice); an exact
// cancellation gives +0; overflow gives infinity; inf - inf and NaN inputs
// give the default quiet NaN.
//
// Interface: a, b in; y = a+b out, same cycle.
module fp32_add
  import mlp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        swap;
  logic        sb_, ss_;
  logic [7:0]  eb_, es_;
  logic [22:0] fb_, fs_;
  logic [7:0]  d;
  logic [26:0] mb, ms, ms_sh;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [10:0] ey;
  logic        guard, sticky, rnd_up;
  logic [24:0] mant_r;
  logic        za, zb, ia, ib, na, nb;

  always_comb begin
    za = (a[30:23] == 8'd0);
    zb = (b[30:23] == 8'd0);
    ia = (a[30:23] == 8'hff) && (a[22:0] == 23'd0);
    ib = (b[30:23] == 8'hff) && (b[22:0] == 23'd0);
    na = (a[30:23] == 8'hff) && (a[22:0] != 23'd0);
    nb = (b[30:23] == 8'hff) && (b[22:0] != 23'd0);

    // Base operand: larger magnitude.
    swap = (b[30:0] > a[30:0]);
    sb_ = swap ? b[31] : a[31];
    eb_ = swap ? b[30:23] : a[30:23];
    fb_ = swap ? b[22:0] : a[22:0];
    ss_ = swap ? a[31] : b[31];
    es_ = swap ? a[30:23] : b[30:23];
    fs_ = swap ? a[22:0] : b[22:0];

    d  = eb_ - es_;
    mb = {1'b1, fb_, 3'b000};
    ms = {1'b1, fs_, 3'b000};
    if (d >= 8'd27)
      ms_sh = 27'd1;
    else begin
      ms_sh = ms >> d;
      // sticky: anything shifted out
      if ((ms & ((27'd1 << d) - 27'd1)) != 27'd0) ms_sh[0] = 1'b1;
    end

    ey   = 11'(eb_);
    norm = '0;
    lz   = '0;
    if (sb_ == ss_) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
      if (sum[27]) begin
        norm = {sum[27:2], sum[1] | sum[0]};
        ey   = ey + 11'sd1;
      end else begin
        norm = sum[26:0];
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms_sh};
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      norm = sum[26:0] << lz;
      ey   = ey - 11'(lz);
    end

    guard  = norm[2];
    sticky = norm[1] | norm[0];
    rnd_up = guard & (sticky | norm[3]);
    mant_r = {1'b0, norm[26:3]} + 25'(rnd_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      ey     = ey + 11'sd1;
    end

    if (na || nb || (ia && ib && (a[31] != b[31])))
      y = 32'h7fc0_0000;
    else if (ia)
      y = a;
    else if (ib)
      y = b;
    else if (za && zb)
      y = {a[31] & b[31], 31'd0};
    else if (za)
      y = b;
    else if (zb)
      y = a;
    else if ((sb_ != ss_) && (sum[26:0] == 27'd0))
      y = 32'd0;
    else if (ey >= 11'sd255)
      y = {sb_, 8'hff, 23'd0};
    else if (ey <= 11'sd0)
      y = {sb_, 31'd0};
    else
      y = {sb_, ey[7:0], mant_r[22:0]};
  end

endmodule
