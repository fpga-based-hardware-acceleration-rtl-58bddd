// tb_sigmoid_lut: self-checking testbench for the sigmoid look-up unit.
//
// Feeds a back-to-back stream of inputs (random values in and beyond
// -7.5 .. 7.5, both range ends, zero and values far outside) with random
// gaps, and checks for each output: the tag, the three-cycle latency, and
// the value, which must be sigma(x_k) rounded to float32 for the table
// index k the index rule picks. The expected entry is computed from the
// sigmoid formula here, independently of the table in the design. The
// chosen index is also checked to be within half a step of the ideal
// (x + 7.5) / step, both saturation ends must occur, and every one of the
// 1024 entries must have been read and found correct (one input is sent at
// each sample point).
module tb_sigmoid_lut;
  import fp_ref_pkg::*;

  localparam int  DEPTH = 1024;
  localparam real XMIN  = -7.5;
  localparam real XMAX  = 7.5;
  localparam int  TW    = 6;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0;
  logic [31:0]   in_data = '0;
  logic [TW-1:0] in_tag = '0;
  logic          out_valid;
  logic [31:0]   out_data;
  logic [TW-1:0] out_tag;

  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;
  bit hit [DEPTH];
  int cycle = 0;

  // Expected outputs, indexed by the cycle they are due.
  logic [31:0]   exp_val [int];
  logic [TW-1:0] exp_tag [int];

  sigmoid_lut #(.DEPTH(DEPTH), .TAG_W(TW)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_tag, .out_valid, .out_data, .out_tag);

  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker, sampled just after each clock edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (exp_val.exists(cycle)) begin
        checks++;
        if (!out_valid || out_tag !== exp_tag[cycle] || out_data !== exp_val[cycle]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: got v=%0b tag %0d %h expected tag %0d %h",
                     cycle, out_valid, out_tag, out_data, exp_tag[cycle], exp_val[cycle]);
        end
        exp_val.delete(cycle);
      end else begin
        checks++;
        if (out_valid) failures++;
      end
    end
  end

  task automatic send(input logic [31:0] x);
    int  k;
    real ideal;
    k = ref_sigmoid_index(x, DEPTH, XMIN, XMAX);
    ideal = (f2r(x) - XMIN) * real'(DEPTH - 1) / (XMAX - XMIN);
    if (ideal < 0.0) ideal = 0.0;
    if (ideal > real'(DEPTH - 1)) ideal = real'(DEPTH - 1);
    checks++;
    if (real'(k) - ideal > 0.5001 || ideal - real'(k) > 0.5001) begin
      failures++;
      $display("index %0d too far from %f", k, ideal);
    end
    hit[k] = 1'b1;
    if (k == 0) sat_lo++;
    if (k == DEPTH - 1) sat_hi++;
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = x;
    in_tag   = TW'($urandom);
    // accepted at the next edge (cycle value c+1 after it); output 3 edges later
    exp_val[cycle + 3] = ref_sigmoid_entry(k, DEPTH, XMIN, XMAX);
    exp_tag[cycle + 3] = in_tag;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic send_stream(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] x;
      case ($urandom % 4)
        0: x = r2f((real'($urandom % 20001) - 10000.0) / 1000.0);    // -10 .. 10
        1: x = r2f((real'($urandom % 15001) - 7500.0) / 1000.0);     // -7.5 .. 7.5
        2: x = rand_fp(100, 132);
        default: x = r2f(XMIN + real'($urandom % DEPTH) * (XMAX - XMIN) / real'(DEPTH - 1));
      endcase
      send(x);
      if ($urandom % 4 == 0) idle();
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(32'h0000_0000);        // 0
    send(32'hc0f0_0000);        // -7.5
    send(32'h40f0_0000);        // 7.5
    send(32'h4120_0000);        // 10
    send(32'hc120_0000);        // -10
    send(32'h3f80_0000);        // 1.0
    idle();
    // Every table entry: one input at each sample point.
    for (int k = 0; k < DEPTH; k++) send(r2f(XMIN + real'(k) * (XMAX - XMIN) / real'(DEPTH - 1)));
    idle();
    send_stream(3000);
    idle();
    repeat (6) @(posedge clk);
    checks++;
    if (sat_lo == 0 || sat_hi == 0) failures++;
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (!hit[k]) begin
        failures++;
        $display("table entry %0d never read", k);
      end
    end
    checks++;
    if (exp_val.num() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
