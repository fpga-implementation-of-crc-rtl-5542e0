// parallel_crc_engine: complete parallel CRC unit for one message word.
//
// The message word of LANES*BLOCK_BITS bits is cut into LANES blocks; block j
// (lane j) holds message bits j*BLOCK_BITS .. (j+1)*BLOCK_BITS-1 counted from
// the first message bit, which is msg[MSG_BITS-1]. Each block is loaded into a
// block_shifter, and the shifters feed the execution units of parallel_crc one
// bit per clock. After BLOCK_BITS clocks every lane holds the remainder of its
// block, and the XOR of the lane remainders is reported as the CRC. A message
// of k bits therefore takes k/LANES shift clocks instead of the k clocks of a
// serial generator.
//
// Interface:
//   clk, rst   - rising-edge clock, synchronous active-high reset
//   start      - accepted when busy is low: captures msg and starts a message
//   msg        - message word, msg[MSG_BITS-1] is the first bit
//   busy       - high from the clock after start until done
//   done       - one-clock pulse; crc_final and crc_lane are valid with it and
//                stay valid until the next start is accepted
//   crc_final  - XOR of the lane remainders
//   crc_lane   - remainder of each lane
//
// Timing: start sampled on edge E0 (lanes loaded with the seed, shifters
// loaded), edges E1..E_BLOCK_BITS absorb the bits, edge E_BLOCK_BITS+1 updates
// the output registers and raises done. Start-to-done latency is therefore
// BLOCK_BITS+1 clocks, and a new message can be accepted on the clock done is
// high. The splitting of the word, the shift registers, execution units and
// final XOR follow the parallel structure; the start/busy/done control is this
// design's own, since only the data path is specified.
module parallel_crc_engine #(
  parameter int unsigned      WIDTH      = crc_pkg::CRC3_W,
  parameter logic [WIDTH-1:0] POLY       = crc_pkg::CRC3_POLY,
  parameter logic [WIDTH-1:0] SEED       = crc_pkg::CRC3_SEED,
  parameter int unsigned      LANES      = 3,
  parameter int unsigned      BLOCK_BITS = 3,
  localparam int unsigned     MSG_BITS   = LANES * BLOCK_BITS
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [MSG_BITS-1:0]         msg,
  output logic                        busy,
  output logic                        done,
  output logic [WIDTH-1:0]            crc_final,
  output logic [LANES-1:0][WIDTH-1:0] crc_lane
);

  localparam int unsigned CNT_W = (BLOCK_BITS > 1) ? $clog2(BLOCK_BITS) : 1;

  typedef enum logic [1:0] {
    ST_IDLE,   // waiting for start
    ST_SHIFT,  // lanes absorb one bit per clock
    ST_FLUSH   // lane registers final, output registers capture them
  } state_t;

  state_t           state_q;
  logic [CNT_W-1:0] cnt_q;
  logic             accept;
  logic             shift_en;
  logic [LANES-1:0] lane_bit;

  assign accept   = (state_q == ST_IDLE) && start;
  assign shift_en = (state_q == ST_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (start) begin
            state_q <= ST_SHIFT;
            cnt_q   <= '0;
          end
        end
        ST_SHIFT: begin
          if (cnt_q == CNT_W'(BLOCK_BITS - 1)) begin
            state_q <= ST_FLUSH;
          end
          cnt_q <= cnt_q + 1'b1;
        end
        ST_FLUSH: begin
          state_q <= ST_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);

  // Lane 0 takes the first (most significant) block of the word.
  for (genvar j = 0; j < LANES; j++) begin : g_shift
    block_shifter #(
      .BITS (BLOCK_BITS)
    ) u_shift (
      .clk      (clk),
      .load     (accept),
      .shift_en (shift_en),
      .din      (msg[MSG_BITS-1-j*BLOCK_BITS -: BLOCK_BITS]),
      .sout     (lane_bit[j])
    );
  end

  parallel_crc #(
    .WIDTH (WIDTH),
    .POLY  (POLY),
    .SEED  (SEED),
    .LANES (LANES)
  ) u_units (
    .clk       (clk),
    .rst       (rst),
    .init      (accept),
    .crc_en    (shift_en),
    .sin       (lane_bit),
    .crc_out   (crc_lane),
    .crc_final (crc_final)
  );

  // done is a single-clock pulse and is only raised once the engine is idle.
  a_done_pulse : assert property (@(posedge clk) disable iff (rst) done |=> !done);
  a_done_idle  : assert property (@(posedge clk) disable iff (rst) done |-> !busy);

endmodule
