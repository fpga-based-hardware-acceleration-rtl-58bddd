// tb_skip_kernel: self-checking testbench for the skip-connection kernel.
//
// A testbench array with one-cycle read latency stands in for the vector
// buffer. It is filled with random hidden-layer outputs in elements
// 0..N_SRC-1 and random guard values above; after the kernel runs, the
// array must read (x, y, h_0 .. h_{N_SRC-1}) with the guard values above
// untouched, and done must come N_SRC + 1 + N_IN cycles after start.
// Runs at the default size (50 hidden outputs, 2 inputs) and repeats with
// fresh data.
module tb_skip_kernel;
  localparam int N_SRC = 50;
  localparam int N_IN  = 2;
  localparam int DEPTH = 56;
  localparam int AW    = 6;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0]   in_vec [N_IN];
  logic [AW-1:0] raddr, waddr;
  logic [31:0]   rdata = '0, wdata;
  logic          we, busy, done;
  logic [31:0]   mem [DEPTH];
  logic [31:0]   expect_q [DEPTH];

  int checks = 0, failures = 0;

  skip_kernel #(.N_SRC(N_SRC), .N_IN(N_IN), .ADDR_W(AW)) dut (
    .clk, .rst_n, .start, .in_vec, .raddr, .rdata, .we, .waddr, .wdata, .busy, .done);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < N_IN; i++) in_vec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) mem[i] = $urandom;
      for (int i = 0; i < N_IN; i++) in_vec[i] = $urandom;
      for (int i = 0; i < DEPTH; i++) expect_q[i] = mem[i];
      for (int i = 0; i < N_SRC; i++) expect_q[i + N_IN] = mem[i];
      for (int i = 0; i < N_IN; i++) expect_q[i] = in_vec[i];
      start = 1'b1;
      cyc = 0;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != N_SRC + 1 + N_IN) begin
        failures++;
        $display("done after %0d cycles, expected %0d", cyc, N_SRC + 1 + N_IN);
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (mem[i] !== expect_q[i]) begin
          failures++;
          if (failures < 10) $display("run %0d elem %0d: got %h expected %h", run, i, mem[i], expect_q[i]);
        end
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
