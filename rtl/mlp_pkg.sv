// mlp_pkg: types and constants shared by the float32 MLP inference engine.
//
// The network is a multi-layer perceptron with two inputs (pixel x and y),
// a first hidden layer of 50 sigmoid neurons, a second hidden layer of 43
// sigmoid neurons that also sees the two inputs (skip connection) and one
// sigmoid output neuron. All arithmetic is IEEE-754 binary32. Matrix-vector
// products are done eight rows at a time, so row counts are padded to a
// multiple of eight (50 -> 56, 43 -> 48, 1 -> 8) in the weight memory.
//
// Weight memory layout (this design's choice): a layer with R rows and C
// inputs occupies ceil(R/8)*(C+1) words; word (base + g*(C+1) + j) holds
// column j of rows 8g..8g+7, lane l in bits [32l+31:32l]. Column 0 is the
// bias, multiplied by a constant 1.0.
package mlp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_ONE  = 32'h3f80_0000;

  // Vector width of the multiply-accumulate unit (float32 elements).
  localparam int unsigned MLP_LANES = 8;

  // Network shape.
  localparam int unsigned MLP_N_IN  = 2;
  localparam int unsigned MLP_N_H1  = 50;
  localparam int unsigned MLP_N_H2  = 43;
  localparam int unsigned MLP_N_OUT = 1;

  // Sigmoid table: MLP_LUT_DEPTH samples over the symmetric range
  // [-XMAX, XMAX], XMAX = MLP_LUT_XMAX_NUM / MLP_LUT_XMAX_DEN = 7.5.
  localparam int unsigned MLP_LUT_DEPTH    = 1024;
  localparam int unsigned MLP_LUT_XMAX_NUM = 15;
  localparam int unsigned MLP_LUT_XMAX_DEN = 2;

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Round the positive ratio num/den to binary32, nearest even. Integer
  // arithmetic only, so constant tables built with it need no real-number
  // support from the tool. Operands must stay below 2^90.
  function automatic fp32_t ratio_to_fp32(logic [127:0] num, logic [127:0] den);
    logic [127:0] q, r, n, d;
    int           e;
    logic         up;
    if (num == '0 || den == '0) return FP32_ZERO;
    n = num;
    d = den;
    e = 0;
    while (n >= (d << 1)) begin d = d << 1; e++; end
    while (n < d)         begin n = n << 1; e--; end
    // d <= n < 2d: significand = n/d in [1, 2)
    q  = (n << 23) / d;
    r  = (n << 23) % d;
    up = ((r << 1) > d) || (((r << 1) == d) && q[0]);
    q  = q + 128'(up);
    if (q[24]) begin q = q >> 1; e++; end
    if (e + 127 <= 0)   return FP32_ZERO;
    if (e + 127 >= 255) return {1'b0, 8'hff, 23'd0};
    return {1'b0, 8'(e + 127), q[22:0]};
  endfunction

  // Q2.62 fixed point used to build the sigmoid table.
  localparam logic [127:0] FX_ONE = 128'd1 << 62;

  // exp(-num/den) in Q2.62 for 0 <= num/den < 0.1, by its Taylor series.
  function automatic logic [127:0] fx_exp_neg_small(int unsigned num, int unsigned den);
    logic [127:0] t, s;
    t = FX_ONE;
    s = FX_ONE;
    for (int i = 1; i <= 14; i++) begin
      t = (t * 128'(num)) / (128'(den) * 128'(i));
      if (i % 2 == 1) s = s - t;
      else            s = s + t;
    end
    return s;
  endfunction

endpackage
