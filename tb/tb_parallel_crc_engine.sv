// tb_parallel_crc_engine: self-checking testbench for parallel_crc_engine.
//
// Two engines: CRC-3 with 3 lanes of 3 bits (the defaults) and CRC-16 with 4
// lanes of 16 bits (a 64-bit message). For each message the testbench checks
// every lane remainder and the XOR-combined CRC against polynomial long
// division of the blocks, that done arrives exactly BLOCK_BITS+1 clocks after
// start was taken, that busy covers that interval, that a start while busy is
// ignored, and that back-to-back messages (start on the done clock) work.
module tb_parallel_crc_engine;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                    rst;
  logic                    st3, st16;
  logic [8:0]              msg3;
  logic [63:0]             msg16;
  logic                    busy3, done3, busy16, done16;
  logic [CRC3_W-1:0]       fin3;
  logic [CRC16_W-1:0]      fin16;
  logic [2:0][CRC3_W-1:0]  lane3;
  logic [3:0][CRC16_W-1:0] lane16;

  parallel_crc_engine dut3 (.clk, .rst, .start(st3), .msg(msg3), .busy(busy3),
                            .done(done3), .crc_final(fin3), .crc_lane(lane3));
  parallel_crc_engine #(.WIDTH(CRC16_W), .POLY(CRC16_POLY), .SEED(CRC16_SEED),
                        .LANES(4), .BLOCK_BITS(16)) dut16
    (.clk, .rst, .start(st16), .msg(msg16), .busy(busy16), .done(done16),
     .crc_final(fin16), .crc_lane(lane16));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Expected lane remainders and final CRC for a message word.
  function automatic logic [63:0] exp_lane(input logic [63:0] poly, input int unsigned w,
                                           input logic [63:0] seed, input logic [63:0] word,
                                           input int unsigned lanes, input int unsigned bb,
                                           input int unsigned j);
    logic [63:0] blk;
    blk = (word >> ((lanes - 1 - j) * bb)) & ((64'd1 << bb) - 1);
    return crc_ref(poly, w, seed, vec_bits(blk, bb));
  endfunction

  // Latency monitor. It runs on rising edges and sees the values from just
  // before each edge (the design updates its registers after it): an edge
  // takes a start if start was high and busy low; done seen before edge k
  // was raised by edge k-1.
  int cyc = 0;
  int t_start3 = 0, t_start16 = 0, lat3 = -1, lat16 = -1;
  always @(posedge clk) begin
    cyc++;
    if (done3)  lat3  = cyc - 1 - t_start3;
    if (done16) lat16 = cyc - 1 - t_start16;
    if (st3 && !busy3 && !rst)   t_start3  = cyc;
    if (st16 && !busy16 && !rst) t_start16 = cyc;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CRC-3 engine: one message; start held high for 'extra' clocks after it is
  // taken (these extra starts arrive while busy and must be ignored).
  task automatic run3(input logic [8:0] m, input int extra);
    int lat = 0;
    logic [CRC3_W-1:0] x = '0;
    lat3 = -1;
    st3 <= 1'b1; msg3 <= m;
    @(posedge clk);
    for (int i = 0; i < extra; i++) begin
      msg3 <= 9'($urandom);
      @(posedge clk);
      lat++;
    end
    st3 <= 1'b0;
    while (!done3) begin
      @(posedge clk);
      lat++;
      if (lat > 50) break;
    end
    repeat (2) @(negedge clk);
    check("crc3 start-to-done clocks", 64'(lat3), 64'd4);
    for (int j = 0; j < 3; j++) begin
      logic [CRC3_W-1:0] r = CRC3_W'(exp_lane(64'(CRC3_POLY), CRC3_W, 64'(CRC3_SEED), 64'(m), 3, 3, j));
      check($sformatf("crc3 lane %0d", j), 64'(lane3[j]), 64'(r));
      x ^= r;
    end
    check("crc3 final", 64'(fin3), 64'(x));
    check("crc3 idle at done", 64'(busy3), 64'd0);
  endtask

  initial begin : main
    rst = 1'b1; st3 = 1'b0; st16 = 1'b0; msg3 = '0; msg16 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check("idle after reset", 64'({busy3, done3, busy16, done16}), 64'd0);

    // Worked example 100111101 -> lanes 101, 000, 110, final 011.
    run3(9'b100111101, 0);
    check("example lane 1", 64'(lane3[0]), 64'(3'b101));
    check("example lane 2", 64'(lane3[1]), 64'(3'b000));
    check("example lane 3", 64'(lane3[2]), 64'(3'b110));
    check("example final", 64'(fin3), 64'(3'b011));

    // Random CRC-3 messages, some with start held while busy.
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      if (t % 3 == 0) repeat ($urandom_range(0, 3)) @(negedge clk);
      run3(9'($urandom), (t % 5 == 0) ? 2 : 0);
    end

    // CRC-16 engine, 64-bit messages, back to back.
    for (int t = 0; t < 20; t++) begin
      automatic logic [63:0]        m   = {$urandom, $urandom};
      automatic logic [CRC16_W-1:0] x   = '0;
      automatic int                 lat = 0;
      lat16 = -1;
      @(negedge clk);
      st16 <= 1'b1; msg16 <= m;
      @(posedge clk);
      st16 <= 1'b0;
      #1 check("crc16 busy after start", 64'(busy16), 64'd1);
      while (!done16) begin
        @(posedge clk);
        lat++;
        if (!done16 && !busy16) begin
          failures++;
          $display("FAIL crc16 busy dropped early");
          break;
        end
        if (lat > 100) break;
      end
      repeat (2) @(negedge clk);
      check("crc16 start-to-done clocks", 64'(lat16), 64'd17);
      for (int j = 0; j < 4; j++) begin
        automatic logic [CRC16_W-1:0] r = CRC16_W'(exp_lane(64'(CRC16_POLY), CRC16_W, 64'(CRC16_SEED), m, 4, 16, j));
        check($sformatf("crc16 lane %0d", j), 64'(lane16[j]), 64'(r));
        x ^= r;
      end
      check("crc16 final", 64'(fin16), 64'(x));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
