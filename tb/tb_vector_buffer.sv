// tb_vector_buffer: self-checking testbench for the float32 vector buffer.
//
// Same scheme as the weight memory test: fill, then random reads and
// writes against a shadow copy, each read checked one cycle after its
// address, reads of the address being written returning the old value.
module tb_vector_buffer;
  localparam int DEPTH = 56;
  localparam int AW    = 6;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0]   wdata = '0, rdata;
  logic [31:0]   shadow [DEPTH];

  int checks = 0, failures = 0;

  vector_buffer #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom;
      shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom % DEPTH);
      we    = ($urandom % 2) == 1;
      waddr = ($urandom % 4 == 0) ? raddr : AW'($urandom % DEPTH);
      wdata = $urandom;
      expect_q = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("elem %0d: got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
