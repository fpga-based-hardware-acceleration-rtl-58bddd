// weight_mem: weight storage for the matrix-vector kernel.
//
// A simple dual-port RAM of DEPTH words, each word holding LANES float32
// weights (one per lane of the multiply-accumulate unit). The default of
// 1024 words x 8 x 32 bits is 32 KiB, the size of the local data memory of
// one AI Engine tile. One write port (loaded by the host) and one read port
// with a registered output; a read of the address being written returns the
// old contents. Contents are undefined until written.
//
// Timing: rdata shows mem[raddr] one cycle after raddr is presented.
module weight_mem
  import mlp_pkg::*;
#(
  parameter int unsigned LANES  = mlp_pkg::MLP_LANES,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [ADDR_W-1:0]       waddr,
  input  logic [LANES-1:0][31:0]  wdata,
  input  logic [ADDR_W-1:0]       raddr,
  output logic [LANES-1:0][31:0]  rdata
);

  logic [LANES-1:0][31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
