// tb_crc_top: end-to-end testbench for crc_top at its default parameters.
//
// Runs the whole design: the four serial generators on one shared bit stream
// and both parallel engines (CRC-3, 3 x 3 bits; CRC-16, 4 x 16 bits = 64-bit
// message). Everything is compared with polynomial long division
// (crc_ref_pkg). Mechanisms exercised and counted, each of which must occur:
//   serial_msg   - a message run through all four serial generators
//   stall        - crc_en low in mid-message (register must hold)
//   init         - seed reload by init between messages
//   rx_ok        - message followed by its CRC-16 leaves remainder zero
//   rx_error     - the same codeword with one bit flipped leaves non-zero
//   p3_run       - a 9-bit message through the parallel CRC-3 engine
//   p16_run      - a 64-bit message through the parallel CRC-16 engine
//   busy_start   - start raised while an engine is busy (must be ignored)
//   back2back    - a new start taken on the clock done is high
// Also checked: the worked CRC-3 example (serial 101 after nine clocks,
// parallel lanes 101/000/110 and final 011 after three shift clocks) and the
// engines' start-to-done times (4 and 17 clocks).
module tb_crc_top;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                    rst, init, crc_en, datain;
  logic [CRC3_W-1:0]       crc3_out;
  logic [CRC12_W-1:0]      crc12_out;
  logic [CRC16_W-1:0]      crc16_out;
  logic [CRC32_W-1:0]      crc32_out;
  logic                    p3_start, p3_busy, p3_done;
  logic [8:0]              p3_msg;
  logic [CRC3_W-1:0]       p3_crc_final;
  logic [2:0][CRC3_W-1:0]  p3_crc_lane;
  logic                    p16_start, p16_busy, p16_done;
  logic [63:0]             p16_msg;
  logic [CRC16_W-1:0]      p16_crc_final;
  logic [3:0][CRC16_W-1:0] p16_crc_lane;

  crc_top dut (.*);

  typedef enum int {M_SERIAL, M_STALL, M_INIT, M_RX_OK, M_RX_ERR, M_P3, M_P16,
                    M_BUSY_START, M_BACK2BACK, M_COUNT} mech_t;
  int    mech [M_COUNT];
  string mech_name [M_COUNT] = '{"serial_msg", "stall", "init", "rx_ok", "rx_error",
                                 "p3_run", "p16_run", "busy_start", "back2back"};

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- latency monitor (values just before each rising edge)
  int cyc = 0, t3 = 0, t16 = 0, lat3 = -1, lat16 = -1;
  always @(posedge clk) begin
    cyc++;
    if (p3_done)  lat3  = cyc - 1 - t3;
    if (p16_done) lat16 = cyc - 1 - t16;
    if (p3_start && p3_busy)   mech[M_BUSY_START]++;
    if (p16_start && p16_busy) mech[M_BUSY_START]++;
    if (p3_start && p3_done)   mech[M_BACK2BACK]++;
    if (p16_start && p16_done) mech[M_BACK2BACK]++;
    if (p3_start && !p3_busy && !rst)   t3  = cyc;
    if (p16_start && !p16_busy && !rst) t16 = cyc;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- serial part
  task automatic s_init();
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    mech[M_INIT]++;
  endtask

  task automatic s_send(input bitq_t msg, input bit stalls, output int n_en);
    n_en = 0;
    foreach (msg[i]) begin
      if (stalls && $urandom_range(0, 4) == 0) begin
        logic [CRC32_W-1:0] held;
        crc_en <= 1'b0;
        datain <= ~msg[i];
        @(posedge clk);
        @(negedge clk);
        held = crc32_out;
        @(posedge clk);
        @(negedge clk);
        check("stall holds crc32", 64'(crc32_out), 64'(held));
        mech[M_STALL]++;
      end
      crc_en <= 1'b1;
      datain <= msg[i];
      @(posedge clk);
      n_en++;
    end
    crc_en <= 1'b0;
    @(negedge clk);
  endtask

  task automatic s_check(input bitq_t msg, input string tag);
    check({tag, " crc3"},  64'(crc3_out),  crc_ref(64'(CRC3_POLY),  CRC3_W,  64'(CRC3_SEED),  msg));
    check({tag, " crc12"}, 64'(crc12_out), crc_ref(64'(CRC12_POLY), CRC12_W, 64'(CRC12_SEED), msg));
    check({tag, " crc16"}, 64'(crc16_out), crc_ref(64'(CRC16_POLY), CRC16_W, 64'(CRC16_SEED), msg));
    check({tag, " crc32"}, 64'(crc32_out), crc_ref(64'(CRC32_POLY), CRC32_W, 64'(CRC32_SEED), msg));
    mech[M_SERIAL]++;
  endtask

  // ---------------- parallel part
  function automatic logic [63:0] lane_ref(input logic [63:0] poly, input int unsigned w,
                                           input logic [63:0] seed, input logic [63:0] word,
                                           input int unsigned lanes, input int unsigned bb,
                                           input int unsigned j);
    logic [63:0] blk;
    blk = (word >> ((lanes - 1 - j) * bb)) & ((64'd1 << bb) - 1);
    return crc_ref(poly, w, seed, vec_bits(blk, bb));
  endfunction

  task automatic p3_check(input logic [8:0] m);
    logic [CRC3_W-1:0] x = '0;
    for (int j = 0; j < 3; j++) begin
      logic [CRC3_W-1:0] r;
      r = CRC3_W'(lane_ref(64'(CRC3_POLY), CRC3_W, 64'(CRC3_SEED), 64'(m), 3, 3, j));
      check($sformatf("p3 lane %0d", j), 64'(p3_crc_lane[j]), 64'(r));
      x ^= r;
    end
    check("p3 final", 64'(p3_crc_final), 64'(x));
    check("p3 start-to-done clocks", 64'(lat3), 64'd4);
    mech[M_P3]++;
  endtask

  task automatic p16_check(input logic [63:0] m);
    logic [CRC16_W-1:0] x = '0;
    for (int j = 0; j < 4; j++) begin
      logic [CRC16_W-1:0] r;
      r = CRC16_W'(lane_ref(64'(CRC16_POLY), CRC16_W, 64'(CRC16_SEED), m, 4, 16, j));
      check($sformatf("p16 lane %0d", j), 64'(p16_crc_lane[j]), 64'(r));
      x ^= r;
    end
    check("p16 final", 64'(p16_crc_final), 64'(x));
    check("p16 start-to-done clocks", 64'(lat16), 64'd17);
    mech[M_P16]++;
  endtask

  // Wait for done (seen at a falling edge) with a limit.
  task automatic wait_done3();
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!p3_done && n < 40);
  endtask

  task automatic wait_done16();
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!p16_done && n < 80);
  endtask

  initial begin : main
    bitq_t msg, tail;
    int    n_en;
    rst = 1'b1; init = 1'b0; crc_en = 1'b0; datain = 1'b0;
    p3_start = 1'b0; p3_msg = '0; p16_start = 1'b0; p16_msg = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);

    // Worked example, serial and parallel side by side.
    msg = vec_bits(64'b100111101, 9);
    fork
      s_send(msg, 1'b0, n_en);
      begin
        p3_start <= 1'b1; p3_msg <= 9'b100111101;
        @(posedge clk);
        p3_start <= 1'b0;
        wait_done3();
      end
    join
    wait (lat3 >= 0);
    check("example serial clocks", 64'(n_en), 64'd9);
    check("example serial crc3", 64'(crc3_out), 64'(3'b101));
    s_check(msg, "example");
    check("example lane 1", 64'(p3_crc_lane[0]), 64'(3'b101));
    check("example lane 2", 64'(p3_crc_lane[1]), 64'(3'b000));
    check("example lane 3", 64'(p3_crc_lane[2]), 64'(3'b110));
    check("example final",  64'(p3_crc_final),   64'(3'b011));
    p3_check(9'b100111101);

    // Random traffic on all parts at once.
    for (int t = 0; t < 12; t++) begin
      automatic logic [8:0]  m3  = 9'($urandom);
      automatic logic [63:0] m16 = {$urandom, $urandom};
      msg = {};
      repeat ($urandom_range(8, 64)) msg.push_back(1'($urandom));
      s_init();
      fork
        begin
          s_send(msg, 1'b1, n_en);
          check("serial clocks", 64'(n_en), 64'(msg.size()));
          s_check(msg, $sformatf("msg %0d", t));
          // Receiver: message + CRC-16 must leave remainder zero (CRC-16
          // generator only; the other generators see a different tail).
          tail = vec_bits(64'(crc16_out), CRC16_W);
          s_send(tail, 1'b0, n_en);
          check("rx codeword remainder", 64'(crc16_out), 64'd0);
          mech[M_RX_OK]++;
          // Same codeword with one bit flipped must be caught.
          begin
            bitq_t cw = msg;
            int    k;
            foreach (tail[i]) cw.push_back(tail[i]);
            k = $urandom_range(0, cw.size() - 1);
            cw[k] = ~cw[k];
            s_init();
            s_send(cw, 1'b0, n_en);
            checks++;
            if (crc16_out == '0) begin
              failures++;
              $display("FAIL rx error not detected");
            end
            mech[M_RX_ERR]++;
          end
        end
        begin
          // Two CRC-3 messages back to back, start held a clock into busy
          // on odd rounds.
          lat3 = -1;
          p3_start <= 1'b1; p3_msg <= m3;
          @(posedge clk);
          if (t % 2 == 1) begin
            p3_msg <= ~m3;
            @(posedge clk);
          end
          p3_start <= 1'b0;
          wait_done3();
          repeat (2) @(negedge clk);
          p3_check(m3);
          // Start again exactly on the done clock.
          lat3 = -1;
          p3_start <= 1'b1; p3_msg <= ~m3;
          @(posedge clk);
          p3_start <= 1'b0;
          wait_done3();
          p3_start <= 1'b1; p3_msg <= m3;
          @(posedge clk);
          p3_start <= 1'b0;
          @(negedge clk);
          lat3 = -1;
          wait_done3();
          repeat (2) @(negedge clk);
          p3_check(m3);
        end
        begin
          lat16 = -1;
          p16_start <= 1'b1; p16_msg <= m16;
          @(posedge clk);
          p16_start <= 1'b0;
          repeat (5) @(posedge clk);
          // A stray start while busy.
          p16_start <= 1'b1; p16_msg <= ~m16;
          @(posedge clk);
          p16_start <= 1'b0;
          wait_done16();
          repeat (2) @(negedge clk);
          p16_check(m16);
        end
      join
    end

    foreach (mech[i]) begin
      $display("mechanism %-10s occurred %0d times", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
