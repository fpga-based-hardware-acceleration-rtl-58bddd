// mlp_graph: float32 inference engine for a small multi-layer perceptron
// with a skip connection (top level).
//
// The network maps N_IN inputs (pixel coordinates x, y) through a hidden
// layer of N_H1 sigmoid neurons, a second hidden layer of N_H2 sigmoid
// neurons whose input is the first layer's output plus the network inputs,
// and N_OUT sigmoid output neurons. The defaults 2-50-43-1 are the network
// of the original design, which was trained to tell whether a pixel lies in
// the Mandelbrot set.
//
// One inference runs these kernels in turn:
//   L1    matvec_kernel over buffer A = (x, y)           -> sigmoid -> B
//   SKIP  skip_kernel in B: B = (x, y, h1_0 .. h1_49)
//   L2    matvec_kernel over buffer B                    -> sigmoid -> A
//   L3    matvec_kernel over buffer A = (h2_0 .. h2_42)  -> sigmoid -> out
// Each matvec reads its layer's weights (bias column first) from the shared
// weight memory; the layout is described in mlp_pkg. Between a layer and
// the next kernel the sequencer waits for the 3-cycle sigmoid pipeline to
// empty. The kernel split, the float32 arithmetic, the eight-lane MAC, the
// 1024-entry sigmoid table and the scalar skip shift follow the original
// design; running the kernels strictly one after another on one sample at
// a time, the two ping-pong buffers and the host ports are this design's
// choices. Every inference takes the same number of cycles.
//
// Interface:
//   wl_we, wl_addr, wl_data: weight memory write port (load while idle).
//   in_valid, in_ready, in_vec: one sample; taken when both are high.
//   out_valid (one-cycle pulse), out_vec: the network output.
module mlp_graph
  import mlp_pkg::*;
#(
  parameter int unsigned N_IN   = mlp_pkg::MLP_N_IN,
  parameter int unsigned N_H1   = mlp_pkg::MLP_N_H1,
  parameter int unsigned N_H2   = mlp_pkg::MLP_N_H2,
  parameter int unsigned N_OUT  = mlp_pkg::MLP_N_OUT,
  parameter int unsigned LANES  = mlp_pkg::MLP_LANES,
  parameter int unsigned WDEPTH = 1024,
  parameter int unsigned VDEPTH = 56,
  parameter int unsigned WADDR_W = $clog2(WDEPTH),
  parameter int unsigned VADDR_W = $clog2(VDEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wl_we,
  input  logic [WADDR_W-1:0]     wl_addr,
  input  logic [LANES-1:0][31:0] wl_data,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  fp32_t                  in_vec  [N_IN],
  output logic                   out_valid,
  output fp32_t                  out_vec [N_OUT]
);

  // Weight memory map.
  localparam int unsigned L1_BASE  = 0;
  localparam int unsigned L2_BASE  = L1_BASE + ceil_div(N_H1, LANES) * (N_IN + 1);
  localparam int unsigned L3_BASE  = L2_BASE + ceil_div(N_H2, LANES) * (N_IN + N_H1 + 1);
  localparam int unsigned W_WORDS  = L3_BASE + ceil_div(N_OUT, LANES) * (N_H2 + 1);
  localparam int unsigned SIG_LAT  = 3;
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned OW = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  if (W_WORDS > WDEPTH || N_IN + N_H1 > VDEPTH || N_H2 > VDEPTH || N_OUT > VDEPTH)
    begin : g_size_check
      $error("mlp_graph: network does not fit the weight memory or the vector buffers");
    end

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_L1, S_F1, S_SKIP, S_L2, S_F2, S_L3, S_F3, S_OUT
  } state_t;

  state_t             state;
  logic               entry;     // first cycle in the current state
  logic [VADDR_W:0]   cnt;
  fp32_t              in_r [N_IN];

  // Kernel wiring
  logic [WADDR_W-1:0]     mv_wbase;
  logic [VADDR_W:0]       mv_ncols, mv_nrows;
  logic [WADDR_W-1:0]     wm_raddr;
  logic [LANES-1:0][31:0] wm_rdata;
  logic [VADDR_W-1:0]     mv_vraddr;
  fp32_t                  mv_vrdata;
  logic                   mv_start, mv_yv, mv_busy, mv_done;
  logic [VADDR_W-1:0]     mv_yidx;
  fp32_t                  mv_y;

  logic                   sg_v;
  logic [VADDR_W-1:0]     sg_tag;
  fp32_t                  sg_y;

  logic                   sk_start, sk_we, sk_busy, sk_done;
  logic [VADDR_W-1:0]     sk_raddr, sk_waddr;
  fp32_t                  sk_wdata;

  logic                   a_we, b_we;
  logic [VADDR_W-1:0]     a_waddr, a_raddr, b_waddr, b_raddr;
  fp32_t                  a_wdata, a_rdata, b_wdata, b_rdata;

  weight_mem #(.LANES(LANES), .DEPTH(WDEPTH), .ADDR_W(WADDR_W)) u_wmem (
    .clk(clk), .we(wl_we), .waddr(wl_addr), .wdata(wl_data),
    .raddr(wm_raddr), .rdata(wm_rdata)
  );

  vector_buffer #(.DEPTH(VDEPTH), .ADDR_W(VADDR_W)) u_buf_a (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .raddr(a_raddr), .rdata(a_rdata)
  );

  vector_buffer #(.DEPTH(VDEPTH), .ADDR_W(VADDR_W)) u_buf_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .raddr(b_raddr), .rdata(b_rdata)
  );

  matvec_kernel #(.LANES(LANES), .WADDR_W(WADDR_W), .VADDR_W(VADDR_W)) u_matvec (
    .clk(clk), .rst_n(rst_n), .start(mv_start),
    .w_base(mv_wbase), .n_cols(mv_ncols), .n_rows(mv_nrows),
    .wmem_raddr(wm_raddr), .wmem_rdata(wm_rdata),
    .vbuf_raddr(mv_vraddr), .vbuf_rdata(mv_vrdata),
    .y_valid(mv_yv), .y_idx(mv_yidx), .y_data(mv_y),
    .busy(mv_busy), .done(mv_done)
  );

  sigmoid_lut #(.TAG_W(VADDR_W)) u_sigmoid (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mv_yv), .in_data(mv_y), .in_tag(mv_yidx),
    .out_valid(sg_v), .out_data(sg_y), .out_tag(sg_tag)
  );

  skip_kernel #(.N_SRC(N_H1), .N_IN(N_IN), .ADDR_W(VADDR_W)) u_skip (
    .clk(clk), .rst_n(rst_n), .start(sk_start), .in_vec(in_r),
    .raddr(sk_raddr), .rdata(b_rdata),
    .we(sk_we), .waddr(sk_waddr), .wdata(sk_wdata),
    .busy(sk_busy), .done(sk_done)
  );

  // Layer selection
  always_comb begin
    mv_wbase = WADDR_W'(L1_BASE);
    mv_ncols = (VADDR_W+1)'(N_IN + 1);
    mv_nrows = (VADDR_W+1)'(N_H1);
    if (state == S_L2) begin
      mv_wbase = WADDR_W'(L2_BASE);
      mv_ncols = (VADDR_W+1)'(N_IN + N_H1 + 1);
      mv_nrows = (VADDR_W+1)'(N_H2);
    end else if (state == S_L3) begin
      mv_wbase = WADDR_W'(L3_BASE);
      mv_ncols = (VADDR_W+1)'(N_H2 + 1);
      mv_nrows = (VADDR_W+1)'(N_OUT);
    end
  end

  assign mv_start  = entry && (state == S_L1 || state == S_L2 || state == S_L3);
  assign sk_start  = entry && (state == S_SKIP);
  assign mv_vrdata = (state == S_L2) ? b_rdata : a_rdata;
  assign in_ready  = (state == S_IDLE);

  // Buffer A: inputs during load, second hidden layer's activations.
  always_comb begin
    a_raddr = mv_vraddr;
    a_we    = 1'b0;
    a_waddr = sg_tag;
    a_wdata = sg_y;
    if (state == S_LOAD) begin
      a_we    = 1'b1;
      a_waddr = VADDR_W'(cnt);
      a_wdata = in_r[IW'(cnt)];
    end else if (state == S_L2 || state == S_F2) begin
      a_we = sg_v;
    end
  end

  // Buffer B: first hidden layer's activations, then the skip shift.
  always_comb begin
    b_raddr = (state == S_SKIP) ? sk_raddr : mv_vraddr;
    b_we    = 1'b0;
    b_waddr = sg_tag;
    b_wdata = sg_y;
    if (state == S_SKIP) begin
      b_we    = sk_we;
      b_waddr = sk_waddr;
      b_wdata = sk_wdata;
    end else if (state == S_L1 || state == S_F1) begin
      b_we = sg_v;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      entry     <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_IN; i++)  in_r[i]    <= FP32_ZERO;
      for (int i = 0; i < N_OUT; i++) out_vec[i] <= FP32_ZERO;
    end else begin
      entry     <= 1'b0;
      out_valid <= 1'b0;
      if ((state == S_L3 || state == S_F3) && sg_v)
        out_vec[OW'(sg_tag)] <= sg_y;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (in_valid) begin
            in_r  <= in_vec;
            state <= S_LOAD;
          end
        end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == (VADDR_W+1)'(N_IN - 1)) begin
            state <= S_L1;
            entry <= 1'b1;
          end
        end
        S_L1, S_L2, S_L3: begin
          cnt <= '0;
          if (mv_done) state <= state_t'(state + 1'b1);
        end
        S_F1, S_F2, S_F3: begin
          cnt <= cnt + 1'b1;
          if (cnt == (VADDR_W+1)'(SIG_LAT - 1)) begin
            state <= state_t'(state + 1'b1);
            entry <= 1'b1;
          end
        end
        S_SKIP: begin
          if (sk_done) begin
            state <= S_L2;
            entry <= 1'b1;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The sequencer never starts a kernel that is still busy.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(mv_start && mv_busy) && !(sk_start && sk_busy));

endmodule
