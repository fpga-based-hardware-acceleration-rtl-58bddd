// vector_buffer: float32 vector store between kernels.
//
// Holds one layer's input or output vector, element by element. DEPTH
// defaults to 56, the padded vector length of the first hidden layer,
// which is also enough for the second hidden layer's input (2 inputs plus
// 50 hidden outputs). One write port and one read port with a registered
// output; a read of the element being written returns the old value.
//
// Timing: rdata shows buf[raddr] one cycle after raddr is presented.
module vector_buffer
  import mlp_pkg::*;
#(
  parameter int unsigned DEPTH  = 56,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  fp32_t             wdata,
  input  logic [ADDR_W-1:0] raddr,
  output fp32_t             rdata
);

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
