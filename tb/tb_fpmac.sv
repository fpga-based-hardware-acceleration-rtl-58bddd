// tb_fpmac: self-checking testbench for the eight-lane float32 MAC.
//
// Drives random dot-product sequences (random lengths, `first` at the start
// of each, idle cycles in between) plus directed cases (exact cancellation,
// signed zeros, rounding carries, large exponent gaps) and compares every
// lane's accumulator after each step with the reference arithmetic of
// fp_ref_pkg. Also checks that a disabled cycle leaves the accumulators
// unchanged.
module tb_fpmac;
  import fp_ref_pkg::*;

  localparam int LANES = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0, first = 1'b0;
  logic [31:0] w [LANES];
  logic [31:0] x;
  logic [31:0] acc [LANES];
  logic [31:0] model [LANES];

  int checks = 0, failures = 0;

  fpmac #(.LANES(LANES)) dut (.clk, .rst_n, .en, .first, .w, .x, .acc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic f, input logic [31:0] xv, input logic [31:0] wv [LANES]);
    en = 1'b1; first = f; x = xv; w = wv;
    @(posedge clk); #1;
    en = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      model[l] = ref_add(f ? 32'h0 : model[l], ref_mul(wv[l], xv));
      checks++;
      if (acc[l] !== model[l]) begin
        failures++;
        if (failures < 20)
          $display("lane %0d: w=%h x=%h got %h expected %h", l, wv[l], xv, acc[l], model[l]);
      end
    end
  endtask

  logic [31:0] wv [LANES];

  initial begin
    for (int l = 0; l < LANES; l++) begin w[l] = '0; model[l] = '0; end
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Directed: a*b then -(a*b) cancels to +0; 1.0*1.0 sums; rounding carry.
    for (int l = 0; l < LANES; l++) wv[l] = 32'h3fc0_0000;     // 1.5
    step(1'b1, 32'h4000_0000, wv);                              // 3.0
    step(1'b0, 32'hc000_0000, wv);                              // -3.0 -> 0
    for (int l = 0; l < LANES; l++) wv[l] = 32'h3f7f_ffff;      // 1 - 2^-24
    step(1'b1, 32'h3f80_0001, wv);
    step(1'b0, 32'h3f80_0001, wv);
    for (int l = 0; l < LANES; l++) wv[l] = {1'b0, 8'(120 + l), 23'h7fffff};
    step(1'b1, 32'h4b00_0000, wv);                              // large gaps
    step(1'b0, 32'h3380_0000, wv);
    for (int l = 0; l < LANES; l++) wv[l] = 32'h8000_0000;      // -0
    step(1'b1, 32'h3f80_0000, wv);
    step(1'b0, 32'h3f80_0000, wv);

    // Disabled cycle keeps the accumulators.
    en = 1'b0; x = 32'h4000_0000;
    @(posedge clk); #1;
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (acc[l] !== model[l]) failures++;
    end

    // Random dot products.
    for (int s = 0; s < 600; s++) begin
      int len;
      len = 1 + ($urandom % 12);
      for (int j = 0; j < len; j++) begin
        for (int l = 0; l < LANES; l++) wv[l] = rand_fp(100, 150);
        step(j == 0, rand_fp(100, 150), wv);
      end
      if ($urandom % 4 == 0) @(posedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
