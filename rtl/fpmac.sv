// fpmac: eight-lane float32 multiply-accumulate unit.
//
// Each enabled cycle every lane l computes acc[l] <= acc[l] + w[l] * x, with
// the scalar x broadcast to all lanes. This is the vector operation the
// matrix-vector kernel is built on: eight float32 products and eight sums
// per cycle, i.e. sixteen floating-point operations per cycle. With
// `first` set the old accumulator is replaced by +0 before the add, which
// starts a new dot product without a separate clear cycle.
//
// The multiply and the add are two separately rounded binary32 operations
// (fp32_mul, fp32_add), done in the same cycle; fusing them, and flushing
// subnormals to zero, are this design's choices.
//
// Interface: en, first, w[LANES], x in; acc[LANES] out, registered.
// Timing: acc shows the result of an enabled cycle on the next cycle.
module fpmac
  import mlp_pkg::*;
#(
  parameter int unsigned LANES = mlp_pkg::MLP_LANES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first,
  input  fp32_t w   [LANES],
  input  fp32_t x,
  output fp32_t acc [LANES]
);

  fp32_t prod [LANES];
  fp32_t base [LANES];
  fp32_t sum  [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign base[l] = first ? FP32_ZERO : acc[l];
    fp32_mul u_mul (.a(w[l]),   .b(x),       .y(prod[l]));
    fp32_add u_add (.a(base[l]), .b(prod[l]), .y(sum[l]));

    always_ff @(posedge clk) begin
      if (!rst_n)  acc[l] <= FP32_ZERO;
      else if (en) acc[l] <= sum[l];
    end
  end

endmodule
