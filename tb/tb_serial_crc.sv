// tb_serial_crc: self-checking testbench for serial_crc.
//
// One serial stream drives seven generators at once (CRC-3, CRC-12, CRC-16,
// SDLC, reversed CRC-16, reversed SDLC, CRC-32). Checks:
//   - the worked CRC-3 example: message 100111101, seed 111, gives 101 after
//     exactly nine enabled clocks, and 001 after one more zero bit;
//   - a CRC-12 and a CRC-16 register trace started from a given state with
//     data_in held at 1;
//   - random messages with random crc_en gaps, against polynomial long
//     division (crc_ref_pkg), for every generator;
//   - that crc_en low holds the register, and that init and rst load the seed;
//   - that appending the remainder to the message drives the register to zero.
module tb_serial_crc;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, init, crc_en, datain;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [CRC3_W-1:0]  o3;
  logic [CRC12_W-1:0] o12;
  logic [CRC16_W-1:0] o16, osdlc, o16r, osdlcr;
  logic [CRC32_W-1:0] o32;
  logic [CRC12_W-1:0] f12;
  logic [CRC16_W-1:0] f16;

  serial_crc dut3 (.clk, .rst, .init, .crc_en, .datain, .crc_out(o3));
  serial_crc #(.WIDTH(CRC12_W), .POLY(CRC12_POLY), .SEED(CRC12_SEED)) dut12
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(o12));
  serial_crc #(.WIDTH(CRC16_W), .POLY(CRC16_POLY), .SEED(CRC16_SEED)) dut16
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(o16));
  serial_crc #(.WIDTH(CRC16_W), .POLY(SDLC_POLY), .SEED(CRC16_SEED)) dutsdlc
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(osdlc));
  serial_crc #(.WIDTH(CRC16_W), .POLY(CRC16_REV_POLY), .SEED(CRC16_SEED)) dut16r
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(o16r));
  serial_crc #(.WIDTH(CRC16_W), .POLY(SDLC_REV_POLY), .SEED(CRC16_SEED)) dutsdlcr
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(osdlcr));
  serial_crc #(.WIDTH(CRC32_W), .POLY(CRC32_POLY), .SEED(CRC32_SEED)) dut32
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(o32));
  // Register traces: these two start from the first state of each trace.
  serial_crc #(.WIDTH(CRC12_W), .POLY(CRC12_POLY), .SEED(12'b111100111110)) dutf12
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(f12));
  serial_crc #(.WIDTH(CRC16_W), .POLY(CRC16_POLY), .SEED(16'b1001101100010011)) dutf16
    (.clk, .rst, .init, .crc_en, .datain, .crc_out(f16));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Send a message; crc_en drops for random idle clocks if gaps is set.
  // Returns the number of enabled clocks used.
  task automatic send(input bitq_t msg, input bit gaps, output int n_en);
    n_en = 0;
    foreach (msg[i]) begin
      while (gaps && ($urandom_range(0, 3) == 0)) begin
        crc_en <= 1'b0;
        datain <= 1'($urandom);
        @(posedge clk);
      end
      crc_en <= 1'b1;
      datain <= msg[i];
      @(posedge clk);
      n_en++;
    end
    crc_en <= 1'b0;
    datain <= 1'b0;
    @(negedge clk);
  endtask

  task automatic do_init();
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    @(negedge clk);
  endtask

  task automatic check_all(input bitq_t msg, input string tag);
    check({tag, " crc3"},    64'(o3),     crc_ref(64'(CRC3_POLY), CRC3_W, 64'(CRC3_SEED), msg));
    check({tag, " crc12"},   64'(o12),    crc_ref(64'(CRC12_POLY), CRC12_W, 64'(CRC12_SEED), msg));
    check({tag, " crc16"},   64'(o16),    crc_ref(64'(CRC16_POLY), CRC16_W, 64'(CRC16_SEED), msg));
    check({tag, " sdlc"},    64'(osdlc),  crc_ref(64'(SDLC_POLY), CRC16_W, 64'(CRC16_SEED), msg));
    check({tag, " crc16r"},  64'(o16r),   crc_ref(64'(CRC16_REV_POLY), CRC16_W, 64'(CRC16_SEED), msg));
    check({tag, " sdlcr"},   64'(osdlcr), crc_ref(64'(SDLC_REV_POLY), CRC16_W, 64'(CRC16_SEED), msg));
    check({tag, " crc32"},   64'(o32),    crc_ref(64'(CRC32_POLY), CRC32_W, 64'(CRC32_SEED), msg));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bitq_t msg, tail;
    int    n_en;
    logic [CRC32_W-1:0] hold32;
    logic [CRC12_W-1:0] trace12 [6];

    rst = 1'b1; init = 1'b0; crc_en = 1'b0; datain = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check("reset seed crc3", 64'(o3), 64'(3'b111));
    check("reset seed crc32", 64'(o32), 64'(CRC32_SEED));

    // Worked CRC-3 example: 100111101, seed 111 -> 101 after nine clocks.
    msg = vec_bits(64'b100111101, 9);
    send(msg, 1'b0, n_en);
    check("crc3 example clocks", 64'(n_en), 64'd9);
    check("crc3 example value", 64'(o3), 64'(3'b101));
    check_all(msg, "example");
    msg.push_back(1'b0);
    send(vec_bits(64'b0, 1), 1'b0, n_en);
    check("crc3 example +1 zero", 64'(o3), 64'(3'b001));

    // Register traces with data_in held at 1.
    do_init();
    check("trace12 start", 64'(f12), 64'(12'b111100111110));
    trace12 = '{12'b111001111100, 12'b110011111000, 12'b100111110000,
                12'b001111100000, 12'b111111001111, 12'b111110011110};
    for (int i = 0; i < 6; i++) begin
      send(vec_bits(64'b1, 1), 1'b0, n_en);
      check($sformatf("trace12 step %0d", i + 1), 64'(f12), 64'(trace12[i]));
      if (i == 0) check("trace16 step 1", 64'(f16), 64'(16'b0011011000100110));
    end

    // crc_en low holds the register.
    do_init();
    send(vec_bits(64'hA5, 8), 1'b0, n_en);
    hold32 = o32;
    datain <= 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    check("hold with crc_en low", 64'(o32), 64'(hold32));

    // Random messages with gaps.
    for (int t = 0; t < 60; t++) begin
      automatic int len = $urandom_range(1, 80);
      msg = {};
      repeat (len) msg.push_back(1'($urandom));
      do_init();
      send(msg, 1'b1, n_en);
      check("random clocks", 64'(n_en), 64'(len));
      check_all(msg, $sformatf("random %0d", t));
      // Append the CRC-16 remainder: the CRC-16 register must then read zero.
      if (t % 4 == 0) begin
        tail = vec_bits(64'(o16), CRC16_W);
        send(tail, 1'b1, n_en);
        check("crc16 codeword remainder zero", 64'(o16), 64'd0);
      end
    end

    // Synchronous reset in mid-message.
    send(vec_bits(64'h3C, 8), 1'b0, n_en);
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check("mid reset crc12", 64'(o12), 64'(CRC12_SEED));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
