// sigmoid_lut: sigmoid activation by table look-up.
//
// The table holds DEPTH float32 samples of sigma(x) = 1 / (1 + exp(-x)),
// taken uniformly over [XMIN, XMAX] = [-XMAX, XMAX], XMAX = XMAX_NUM /
// XMAX_DEN, with both ends included: sample k is at
// x_k = XMIN + k * (XMAX - XMIN) / (DEPTH - 1). The defaults (1024 samples
// over -7.5 .. 7.5, a step of about 0.0147, float32 entries, 4 KiB) follow
// the original design. The table is computed from the formula at start-up
// with integer arithmetic only (see the initial block), so no data file
// and no real-number support is needed.
//
// An input x is mapped to the nearest sample with float32 arithmetic:
//   stage 1: t = x + XMAX
//   stage 2: u = t * (DEPTH - 1) / (XMAX - XMIN)
//   stage 3: k = round(u) (halves up), clamped to 0 .. DEPTH-1; read table.
// Inputs below XMIN or above XMAX therefore saturate to the first or last
// sample. How the index is formed is this design's choice.
//
// Interface: in_valid/in_data/in_tag in, out_valid/out_data/out_tag out;
// the tag (the element index) travels with the value.
// Timing: fully pipelined, one input per cycle, latency 3 cycles.
module sigmoid_lut
  import mlp_pkg::*;
#(
  parameter int unsigned DEPTH    = mlp_pkg::MLP_LUT_DEPTH,
  parameter int unsigned XMAX_NUM = mlp_pkg::MLP_LUT_XMAX_NUM,
  parameter int unsigned XMAX_DEN = mlp_pkg::MLP_LUT_XMAX_DEN,
  parameter int unsigned TAG_W    = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            out_data,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned IDX_W  = $clog2(DEPTH);
  // -XMIN = XMAX, and (DEPTH-1) / (XMAX - XMIN), as binary32
  localparam fp32_t       OFFSET = ratio_to_fp32(128'(XMAX_NUM), 128'(XMAX_DEN));
  localparam fp32_t       SCALE  = ratio_to_fp32(128'(int'(DEPTH - 1) * int'(XMAX_DEN)), 128'(2 * XMAX_NUM));

  fp32_t rom [DEPTH];

  // Table build. x_k = XMAX * (2k - (DEPTH-1)) / (DEPTH-1), so |x_k| = m*c
  // with m = |2k - (DEPTH-1)| and c = XMAX / (DEPTH-1). Walking m upwards,
  // p^m = e^-(m*c) is kept in Q2.62 fixed point (p = e^-c from its Taylor
  // series) and gives sigma(x_k) = 1/(1+p^m) for x_k >= 0 and
  // p^m/(1+p^m) for x_k < 0, each rounded to binary32.
  initial begin
    logic [127:0] p, pm;
    logic [IDX_W-1:0] kp, kn;
    p  = fx_exp_neg_small(XMAX_NUM, XMAX_DEN * (DEPTH - 1));
    pm = FX_ONE;
    for (int m = 0; m < int'(DEPTH); m++) begin
      if ((m % 2) == ((int'(DEPTH) - 1) % 2)) begin
        kp = IDX_W'((int'(DEPTH) - 1 + m) / 2);
        kn = IDX_W'((int'(DEPTH) - 1 - m) / 2);
        rom[kp] = ratio_to_fp32(FX_ONE, FX_ONE + pm);
        if (m != 0) rom[kn] = ratio_to_fp32(pm, FX_ONE + pm);
      end
      pm = (pm * p + (FX_ONE >> 1)) >> 62;
    end
  end

  // Round a non-negative float32 to the nearest integer (halves up) and
  // clamp it to the table range; negative values give 0.
  function automatic logic [IDX_W-1:0] to_index(fp32_t u);
    int          e;
    logic [23:0] m;
    logic [23:0] v2;
    logic [24:0] r;
    if (u[31]) return '0;
    e = int'(u[30:23]) - 127;
    if (e < -1) return '0;
    if (e >= int'(IDX_W)) return IDX_W'(DEPTH - 1);
    m  = {1'b1, u[22:0]};
    v2 = m >> (22 - e);            // value * 2, truncated
    r  = ({1'b0, v2} + 25'd1) >> 1; // round half up
    if (r >= 25'(DEPTH - 1)) return IDX_W'(DEPTH - 1);
    return IDX_W'(r);
  endfunction

  fp32_t            t_d, u_d;
  fp32_t            s1_t, s2_u;
  logic             s1_v, s2_v;
  logic [TAG_W-1:0] s1_tag, s2_tag;

  fp32_add u_add (.a(in_data), .b(OFFSET), .y(t_d));
  fp32_mul u_mul (.a(s1_t),    .b(SCALE),  .y(u_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      out_valid <= 1'b0;
      s1_t      <= '0;
      s2_u      <= '0;
      s1_tag    <= '0;
      s2_tag    <= '0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      s1_v      <= in_valid;
      s1_t      <= t_d;
      s1_tag    <= in_tag;
      s2_v      <= s1_v;
      s2_u      <= u_d;
      s2_tag    <= s1_tag;
      out_valid <= s2_v;
      out_tag   <= s2_tag;
      out_data  <= rom[to_index(s2_u)];
    end
  end

endmodule
