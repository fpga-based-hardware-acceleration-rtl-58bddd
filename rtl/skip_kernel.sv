// skip_kernel: builds the second hidden layer's input for the skip
// connection from the network inputs to the second hidden layer.
//
// The first hidden layer's N_SRC outputs sit in elements 0 .. N_SRC-1 of a
// vector buffer. The kernel moves them, one element per cycle, up by N_IN
// positions (element k to k + N_IN), working from the top element down so
// the move can be done in place through one read and one write port.
// It then writes the N_IN network inputs into elements 0 .. N_IN-1, so the
// buffer holds (in_0 .. in_{N_IN-1}, h_0 .. h_{N_SRC-1}). The scalar,
// element-by-element shift follows the original design; the in-place order
// and the placement of the inputs in front are this design's choices.
//
// Interface: start in; raddr/rdata and we/waddr/wdata drive the buffer
// (read latency one cycle); in_vec holds the network inputs; busy; done
// pulses with the last write.
// Timing: counting the start cycle as 0, done comes in cycle
// N_SRC + 1 + N_IN.
module skip_kernel
  import mlp_pkg::*;
#(
  parameter int unsigned N_SRC  = mlp_pkg::MLP_N_H1,
  parameter int unsigned N_IN   = mlp_pkg::MLP_N_IN,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fp32_t             in_vec [N_IN],
  output logic [ADDR_W-1:0] raddr,
  input  fp32_t             rdata,
  output logic              we,
  output logic [ADDR_W-1:0] waddr,
  output fp32_t             wdata,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_INS} state_t;

  localparam int unsigned CW = $clog2(N_SRC + N_IN + 1);
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  state_t        state;
  logic [CW-1:0] k;        // element being read in S_SHIFT / input index in S_INS
  logic          rd_v;
  logic [CW-1:0] rd_k;

  assign raddr = ADDR_W'(k);
  assign busy  = (state != S_IDLE);

  always_comb begin
    we    = 1'b0;
    waddr = '0;
    wdata = rdata;
    done  = 1'b0;
    if (rd_v) begin
      we    = 1'b1;
      waddr = ADDR_W'(rd_k + CW'(N_IN));
      wdata = rdata;
    end else if (state == S_INS) begin
      we    = 1'b1;
      waddr = ADDR_W'(k);
      wdata = in_vec[IW'(k)];
      done  = (k == CW'(N_IN - 1));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      rd_v  <= 1'b0;
      rd_k  <= '0;
    end else begin
      rd_v <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_SHIFT;
            k     <= CW'(N_SRC - 1);
          end
        end
        S_SHIFT: begin
          rd_v <= 1'b1;
          rd_k <= k;
          if (k == '0) state <= S_INS;
          else         k <= k - 1'b1;
        end
        S_INS: begin
          // the last shifted element is written in the first cycle here
          if (!rd_v) begin
            if (k == CW'(N_IN - 1)) state <= S_IDLE;
            else                    k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
