// tb_parallel_crc: self-checking testbench for parallel_crc.
//
// Default instance: three CRC-3 lanes (x^3+x+1, seed 111). The worked example
// splits 100111101 into blocks 100, 111, 101; lane remainders must be 101,
// 000, 110 and the final CRC their XOR, 011, all shown one clock after the
// third bit. A second instance has four CRC-16 lanes of 16 bits each (a 64-bit
// message). Random blocks are checked against polynomial long division of each
// block and the XOR of the results; the 3- and 16-clock processing times are
// checked by sampling exactly one clock after the last block bit.
module tb_parallel_crc;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                         rst, init, crc_en;
  logic [2:0]                   sin3;
  logic [3:0]                   sin16;
  logic [2:0][CRC3_W-1:0]       out3;
  logic [CRC3_W-1:0]            fin3;
  logic [3:0][CRC16_W-1:0]      out16;
  logic [CRC16_W-1:0]           fin16;

  parallel_crc dut3 (.clk, .rst, .init, .crc_en, .sin(sin3), .crc_out(out3), .crc_final(fin3));
  parallel_crc #(.WIDTH(CRC16_W), .POLY(CRC16_POLY), .SEED(CRC16_SEED), .LANES(4)) dut16
    (.clk, .rst, .init, .crc_en, .sin(sin16), .crc_out(out16), .crc_final(fin16));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The two instances share crc_en, so each is run in its own phase.
  task automatic run3(input logic [2:0][2:0] b3);
    logic [CRC3_W-1:0] x;
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    for (int i = 2; i >= 0; i--) begin
      crc_en <= 1'b1;
      for (int j = 0; j < 3; j++) sin3[j] <= b3[j][i];
      @(posedge clk);
    end
    crc_en <= 1'b0;
    // One clock later the registered outputs show the result.
    @(posedge clk);
    @(negedge clk);
    x = '0;
    for (int j = 0; j < 3; j++) begin
      logic [CRC3_W-1:0] r;
      r = CRC3_W'(crc_ref(64'(CRC3_POLY), CRC3_W, 64'(CRC3_SEED), vec_bits(64'(b3[j]), 3)));
      check($sformatf("crc3 lane %0d", j), 64'(out3[j]), 64'(r));
      x ^= r;
    end
    check("crc3 final", 64'(fin3), 64'(x));
  endtask

  task automatic run16(input logic [3:0][15:0] b16);
    logic [CRC16_W-1:0] x;
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    for (int i = 15; i >= 0; i--) begin
      crc_en <= 1'b1;
      for (int j = 0; j < 4; j++) sin16[j] <= b16[j][i];
      @(posedge clk);
    end
    crc_en <= 1'b0;
    @(posedge clk);
    @(negedge clk);
    x = '0;
    for (int j = 0; j < 4; j++) begin
      logic [CRC16_W-1:0] r;
      r = CRC16_W'(crc_ref(64'(CRC16_POLY), CRC16_W, 64'(CRC16_SEED), vec_bits(64'(b16[j]), 16)));
      check($sformatf("crc16 lane %0d", j), 64'(out16[j]), 64'(r));
      x ^= r;
    end
    check("crc16 final", 64'(fin16), 64'(x));
  endtask

  initial begin : main
    logic [2:0][2:0]  b3;
    logic [3:0][15:0] b16;
    rst = 1'b1; init = 1'b0; crc_en = 1'b0; sin3 = '0; sin16 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check("reset crc3 final (three seeds of 111)", 64'(fin3), 64'(3'b111));

    // Worked example.
    b3[0] = 3'b100; b3[1] = 3'b111; b3[2] = 3'b101;
    run3(b3);
    check("example lane 1", 64'(out3[0]), 64'(3'b101));
    check("example lane 2", 64'(out3[1]), 64'(3'b000));
    check("example lane 3", 64'(out3[2]), 64'(3'b110));
    check("example final",  64'(fin3),    64'(3'b011));

    for (int t = 0; t < 40; t++) begin
      for (int j = 0; j < 3; j++) b3[j] = 3'($urandom);
      run3(b3);
      for (int j = 0; j < 4; j++) b16[j] = 16'($urandom);
      run16(b16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
