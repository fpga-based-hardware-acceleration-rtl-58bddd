// tb_matvec_kernel: self-checking testbench for the matrix-vector kernel.
//
// Testbench arrays with one-cycle read latency stand in for the weight
// memory and the vector buffer. Each run picks a layer shape (the three
// layers of the default network first, then random shapes), fills the
// weights with random float32 values in the layout the kernel expects
// (padding rows zero) and the vector with random values, and starts the
// kernel. Every result on the y stream is compared, in order, with a dot
// product computed by the reference arithmetic in the same order
// (bias first, then columns 1..n_cols-1). Also checked: exactly n_rows
// results (padding rows never appear), the row index of each, and the
// cycle of done, sum over groups of (n_cols + 1 + rows in group), i.e. one
// column of eight multiply-accumulates per cycle.
module tb_matvec_kernel;
  import fp_ref_pkg::*;

  localparam int LANES = 8;
  localparam int WAW   = 10;
  localparam int VAW   = 6;

  logic                   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [WAW-1:0]         w_base = '0;
  logic [VAW:0]           n_cols = '0, n_rows = '0;
  logic [WAW-1:0]         wmem_raddr;
  logic [LANES-1:0][31:0] wmem_rdata = '0;
  logic [VAW-1:0]         vbuf_raddr;
  logic [31:0]            vbuf_rdata = '0;
  logic                   y_valid, busy, done;
  logic [VAW-1:0]         y_idx;
  logic [31:0]            y_data;

  logic [LANES-1:0][31:0] wmem [1 << WAW];
  logic [31:0]            vbuf [1 << VAW];

  int checks = 0, failures = 0;
  int padded_runs = 0;

  matvec_kernel #(.LANES(LANES), .WADDR_W(WAW), .VADDR_W(VAW)) dut (
    .clk, .rst_n, .start, .w_base, .n_cols, .n_rows, .wmem_raddr, .wmem_rdata,
    .vbuf_raddr, .vbuf_rdata, .y_valid, .y_idx, .y_data, .busy, .done);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    wmem_rdata <= wmem[wmem_raddr];
    vbuf_rdata <= vbuf[vbuf_raddr];
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(input int base, input int cols, input int rows);
    int          groups, expect_cycles, cyc, got, r;
    logic [31:0] acc, xj;
    logic [31:0] expect_y [64];
    groups = (rows + LANES - 1) / LANES;
    for (int g = 0; g < groups; g++)
      for (int j = 0; j < cols; j++)
        for (int l = 0; l < LANES; l++)
          wmem[base + g * cols + j][l] = (g * LANES + l < rows) ? rand_fp(110, 135) : 32'h0;
    for (int i = 0; i < 64; i++) vbuf[i] = rand_fp(110, 135);
    for (r = 0; r < rows; r++) begin
      acc = 32'h0;
      for (int j = 0; j < cols; j++) begin
        xj  = (j == 0) ? 32'h3f80_0000 : vbuf[j - 1];
        acc = ref_add(acc, ref_mul(wmem[base + (r / LANES) * cols + j][r % LANES], xj));
      end
      expect_y[r] = acc;
    end
    expect_cycles = 0;
    for (int g = 0; g < groups; g++)
      expect_cycles += cols + 1 + ((rows - g * LANES) < LANES ? rows - g * LANES : LANES);
    if (rows % LANES != 0) padded_runs++;

    @(negedge clk);
    w_base = WAW'(base); n_cols = (VAW+1)'(cols); n_rows = (VAW+1)'(rows);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; got = 0;
    forever begin
      if (y_valid) begin
        checks++;
        if (got >= rows || y_idx != VAW'(got) || y_data !== expect_y[got]) begin
          failures++;
          if (failures < 10)
            $display("cols %0d rows %0d: result %0d idx %0d got %h expected %h",
                     cols, rows, got, y_idx, y_data, expect_y[got]);
        end
        got++;
      end
      if (done) break;
      if (cyc > 5000) break;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (got != rows) begin
      failures++;
      $display("cols %0d rows %0d: %0d results", cols, rows, got);
    end
    checks++;
    if (cyc != expect_cycles) begin
      failures++;
      $display("cols %0d rows %0d: done after %0d cycles, expected %0d", cols, rows, cyc, expect_cycles);
    end
    @(negedge clk);
    checks++;
    if (busy || y_valid) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_layer(0, 3, 50);     // first hidden layer: bias + x, y; 50 rows -> 7 groups
    run_layer(21, 53, 43);   // second hidden layer: bias + 2 + 50 inputs
    run_layer(339, 44, 1);   // output layer
    for (int n = 0; n < 60; n++)
      run_layer($urandom % 400, 1 + $urandom % 20, 1 + $urandom % 30);
    checks++;
    if (padded_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
