// matvec_kernel: one MLP layer's matrix-vector product, W * [1; x].
//
// The layer's weights sit in the weight memory as LANES-wide words, one
// word per (row group, column). For each group of LANES rows the kernel
// walks the columns, one per cycle: it reads the weight word and the vector
// element and lets the fpmac unit add w*x to the LANES accumulators, so
// LANES multiply-accumulates are done per cycle. Column 0 is the bias,
// multiplied by a constant 1.0 instead of a vector element. When a group is
// complete its accumulators are sent out one element per cycle on the
// y_* stream, then the next group starts. Rows beyond n_rows in the last
// group are padding (zero weights): they are computed but never sent out.
//
// Interface:
//   start, w_base, n_cols (inputs + 1), n_rows: start a layer from IDLE.
//   wmem_raddr/wmem_rdata, vbuf_raddr/vbuf_rdata: memory read ports, both
//     with one cycle of read latency; vector element j-1 feeds column j.
//   y_valid, y_idx, y_data: one pre-activation per cycle, in row order.
//   busy while a layer runs; done pulses with the last y_valid.
// Timing: counting the start cycle as 0, group g takes
//   n_cols (reads) + 1 (last accumulate) + rows_g (drain) cycles, and done
//   comes in cycle sum_g(n_cols + 1 + rows_g).
// The sequencing and the one-element-per-cycle drain are this design's
// choices; the column-by-column accumulation over LANES rows follows the
// original kernel.
module matvec_kernel
  import mlp_pkg::*;
#(
  parameter int unsigned LANES   = mlp_pkg::MLP_LANES,
  parameter int unsigned WADDR_W = 10,
  parameter int unsigned VADDR_W = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [WADDR_W-1:0]     w_base,
  input  logic [VADDR_W:0]       n_cols,
  input  logic [VADDR_W:0]       n_rows,
  output logic [WADDR_W-1:0]     wmem_raddr,
  input  logic [LANES-1:0][31:0] wmem_rdata,
  output logic [VADDR_W-1:0]     vbuf_raddr,
  input  fp32_t                  vbuf_rdata,
  output logic                   y_valid,
  output logic [VADDR_W-1:0]     y_idx,
  output fp32_t                  y_data,
  output logic                   busy,
  output logic                   done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT, S_DRAIN} state_t;

  localparam int unsigned LW = $clog2(LANES) > 0 ? $clog2(LANES) : 1;

  state_t             state;
  logic [WADDR_W-1:0] base_g;
  logic [VADDR_W:0]   col;
  logic [VADDR_W:0]   row0;
  logic [LW-1:0]      lane;
  logic [VADDR_W:0]   ncols_r, nrows_r;
  logic               rd_v, rd_first, rd_bias;

  fp32_t mac_w   [LANES];
  fp32_t mac_acc [LANES];
  fp32_t mac_x;

  logic [VADDR_W:0] cur_row;
  logic             last_lane, last_group;

  assign wmem_raddr = base_g + WADDR_W'(col);
  assign vbuf_raddr = (col == '0) ? '0 : VADDR_W'(col - 1'b1);

  for (genvar l = 0; l < LANES; l++) begin : g_w
    assign mac_w[l] = wmem_rdata[l];
  end
  assign mac_x = rd_bias ? FP32_ONE : vbuf_rdata;

  fpmac #(.LANES(LANES)) u_mac (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (rd_v),
    .first (rd_first),
    .w     (mac_w),
    .x     (mac_x),
    .acc   (mac_acc)
  );

  assign cur_row    = row0 + (VADDR_W+1)'(lane);
  assign last_lane  = (lane == LW'(LANES - 1)) || (cur_row + 1'b1 == nrows_r);
  assign last_group = (32'(row0) + LANES >= 32'(nrows_r));

  assign busy    = (state != S_IDLE);
  assign y_valid = (state == S_DRAIN);
  assign y_idx   = VADDR_W'(cur_row);
  assign y_data  = mac_acc[lane];
  assign done    = (state == S_DRAIN) && last_lane && last_group;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      base_g   <= '0;
      col      <= '0;
      row0     <= '0;
      lane     <= '0;
      ncols_r  <= '0;
      nrows_r  <= '0;
      rd_v     <= 1'b0;
      rd_first <= 1'b0;
      rd_bias  <= 1'b0;
    end else begin
      rd_v <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_RUN;
            base_g  <= w_base;
            ncols_r <= n_cols;
            nrows_r <= n_rows;
            col     <= '0;
            row0    <= '0;
          end
        end
        S_RUN: begin
          rd_v     <= 1'b1;
          rd_first <= (col == '0);
          rd_bias  <= (col == '0);
          col      <= col + 1'b1;
          if (col + 1'b1 == ncols_r) state <= S_WAIT;
        end
        S_WAIT: begin
          state <= S_DRAIN;
          lane  <= '0;
        end
        S_DRAIN: begin
          lane <= lane + 1'b1;
          if (last_lane) begin
            if (last_group) begin
              state <= S_IDLE;
            end else begin
              state  <= S_RUN;
              row0   <= row0 + (VADDR_W+1)'(LANES);
              base_g <= base_g + WADDR_W'(ncols_r);
              col    <= '0;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
