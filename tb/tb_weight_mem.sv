// tb_weight_mem: self-checking testbench for the weight memory.
//
// Writes random eight-lane words to random addresses while reading others,
// keeps a shadow copy, and checks every read one cycle after its address,
// including reads of the address being written (old contents expected).
module tb_weight_mem;
  localparam int LANES = 8;
  localparam int DEPTH = 1024;
  localparam int AW    = 10;

  logic                   clk = 1'b0;
  logic                   we = 1'b0;
  logic [AW-1:0]          waddr = '0, raddr = '0;
  logic [LANES-1:0][31:0] wdata = '0, rdata;
  logic [LANES-1:0][31:0] shadow [DEPTH];
  logic                   known [DEPTH];

  int checks = 0, failures = 0;

  weight_mem #(.LANES(LANES), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LANES-1:0][31:0] rand_word();
    logic [LANES-1:0][31:0] v;
    for (int l = 0; l < LANES; l++) v[l] = $urandom;
    return v;
  endfunction

  initial begin
    logic [LANES-1:0][31:0] expect_q;
    logic                   expect_known;
    for (int i = 0; i < DEPTH; i++) known[i] = 1'b0;
    // Fill every word once.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = rand_word();
      shadow[i] = wdata; known[i] = 1'b1;
    end
    @(negedge clk); we = 1'b0;
    // Random mixed traffic.
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom % DEPTH);
      we    = ($urandom % 2) == 1;
      waddr = ($urandom % 4 == 0) ? raddr : AW'($urandom % DEPTH);
      wdata = rand_word();
      expect_q     = shadow[raddr];
      expect_known = known[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      if (expect_known) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("addr %0d: got %h expected %h", raddr, rdata, expect_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
