// parallel_crc: LANES serial CRC execution units working side by side, and
// the XOR that merges their results into one CRC.
//
// A message of k bits is cut into LANES blocks of k/LANES bits; lane j gets
// block j on its own serial input sin[j], one bit per enabled clock, so the
// whole message is absorbed in k/LANES clocks instead of k. Every lane is a
// serial_crc with the same generator polynomial and seed. The final CRC is the
// bitwise XOR of the lane remainders. Note that this combination is the one the
// parallel structure defines; it is not, in general, equal to the serial CRC
// of the whole message (that would need each lane remainder multiplied by
// x^(bits that follow it) mod P(x) before the XOR).
//
// Interface:
//   clk, rst, init, crc_en - as for serial_crc, shared by all lanes
//   sin[j]                 - serial message bit for lane j
//   crc_out[j]             - lane j remainder, registered (one clock behind
//                            the lane register)
//   crc_final              - XOR of all lane remainders, registered, aligned
//                            with crc_out
//
// Timing: after the last block bit is taken on edge E, crc_out and crc_final
// show the result from edge E+1. The lanes, the per-lane output registers and
// the registered XOR follow the original parallel CRC-3 design, whose output
// registers capture every clock without enable or reset; the same is done
// here, which is where the one-clock output delay comes from.
module parallel_crc #(
  parameter int unsigned      WIDTH = crc_pkg::CRC3_W,
  parameter logic [WIDTH-1:0] POLY  = crc_pkg::CRC3_POLY,
  parameter logic [WIDTH-1:0] SEED  = crc_pkg::CRC3_SEED,
  parameter int unsigned      LANES = 3
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        init,
  input  logic                        crc_en,
  input  logic [LANES-1:0]            sin,
  output logic [LANES-1:0][WIDTH-1:0] crc_out,
  output logic [WIDTH-1:0]            crc_final
);

  logic [LANES-1:0][WIDTH-1:0] lane_crc;
  logic [WIDTH-1:0]            lane_xor;

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    serial_crc #(
      .WIDTH (WIDTH),
      .POLY  (POLY),
      .SEED  (SEED)
    ) u_unit (
      .clk     (clk),
      .rst     (rst),
      .init    (init),
      .crc_en  (crc_en),
      .datain  (sin[j]),
      .crc_out (lane_crc[j])
    );
  end

  always_comb begin
    lane_xor = '0;
    for (int j = 0; j < LANES; j++) begin
      lane_xor ^= lane_crc[j];
    end
  end

  always_ff @(posedge clk) begin
    crc_out   <= lane_crc;
    crc_final <= lane_xor;
  end

endmodule
