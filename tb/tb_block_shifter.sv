// tb_block_shifter: self-checking testbench for block_shifter.
//
// Two instances, 3 and 16 bits wide. Each random block is loaded and then
// shifted out; sout must present the block MSB first, one bit per shift clock,
// hold while shift_en is low, and a load must win over a shift.
module tb_block_shifter;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        load, shift_en;
  logic [2:0]  din3;
  logic [15:0] din16;
  logic        s3, s16;

  block_shifter dut3 (.clk, .load, .shift_en, .din(din3), .sout(s3));
  block_shifter #(.BITS(16)) dut16 (.clk, .load, .shift_en, .din(din16), .sout(s16));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [2:0]  b3;
    logic [15:0] b16;
    load = 1'b0; shift_en = 1'b0; din3 = '0; din16 = '0;
    @(negedge clk);
    for (int t = 0; t < 50; t++) begin
      b3  = 3'($urandom);
      b16 = 16'($urandom);
      load <= 1'b1; shift_en <= 1'($urandom); din3 <= b3; din16 <= b16;
      @(posedge clk);
      load <= 1'b0;
      @(negedge clk);
      for (int i = 15; i >= 0; i--) begin
        if (i >= 13) check($sformatf("b3 bit %0d", i - 13), s3, b3[i-13]);
        check($sformatf("b16 bit %0d", i), s16, b16[i]);
        // Random stall: sout must not move.
        if ($urandom_range(0, 2) == 0) begin
          shift_en <= 1'b0;
          @(posedge clk);
          @(negedge clk);
          check("hold b16", s16, b16[i]);
        end
        shift_en <= 1'b1;
        @(posedge clk);
        shift_en <= 1'b0;
        @(negedge clk);
      end
      // All bits shifted out: zeros follow.
      check("drained b16", s16, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
