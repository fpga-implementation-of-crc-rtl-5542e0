// crc_top: all CRC generators of the design, side by side.
//
// Serial part: four bit-serial LFSR generators (CRC-3 with P(x) = x^3+x+1,
// CRC-12, CRC-16 and CRC-32) share one serial message stream and one set of
// control inputs, so the same bit stream is checked under all four
// polynomials at once; each brings out its own remainder.
//
// Parallel part: two parallel CRC engines, each splitting a message word into
// blocks handled by separate execution units whose remainders are XORed:
//   - p3 : CRC-3, 3 lanes of 3 bits (9-bit message, 3 clocks instead of 9),
//          the parallel counterpart of the serial CRC-3 generator;
//   - p16: CRC-16 (x^16+x^15+x^2+1), 4 lanes of 16 bits (64-bit message,
//          16 clocks instead of 64).
//
// Interface:
//   clk, rst            - shared clock and synchronous active-high reset
//   init, crc_en,
//   datain              - serial generators: reload seed / absorb one bit
//   crcN_out            - serial remainders
//   p3_* / p16_*        - start, msg, busy, done, crc_final, crc_lane of the
//                         two parallel engines (see parallel_crc_engine)
//
// Timing: serial remainders update on the clock after each enabled bit; the
// engines answer BLOCK_BITS+1 clocks after start. Which generators are
// grouped here and the shared serial stream are this design's choices.
module crc_top
  import crc_pkg::*;
#(
  parameter int unsigned P3_LANES       = 3,
  parameter int unsigned P3_BLOCK_BITS  = 3,
  parameter int unsigned P16_LANES      = 4,
  parameter int unsigned P16_BLOCK_BITS = 16
) (
  input  logic                                   clk,
  input  logic                                   rst,
  // serial generators
  input  logic                                   init,
  input  logic                                   crc_en,
  input  logic                                   datain,
  output logic [CRC3_W-1:0]                      crc3_out,
  output logic [CRC12_W-1:0]                     crc12_out,
  output logic [CRC16_W-1:0]                     crc16_out,
  output logic [CRC32_W-1:0]                     crc32_out,
  // parallel CRC-3
  input  logic                                   p3_start,
  input  logic [P3_LANES*P3_BLOCK_BITS-1:0]      p3_msg,
  output logic                                   p3_busy,
  output logic                                   p3_done,
  output logic [CRC3_W-1:0]                      p3_crc_final,
  output logic [P3_LANES-1:0][CRC3_W-1:0]        p3_crc_lane,
  // parallel CRC-16
  input  logic                                   p16_start,
  input  logic [P16_LANES*P16_BLOCK_BITS-1:0]    p16_msg,
  output logic                                   p16_busy,
  output logic                                   p16_done,
  output logic [CRC16_W-1:0]                     p16_crc_final,
  output logic [P16_LANES-1:0][CRC16_W-1:0]      p16_crc_lane
);

  serial_crc #(.WIDTH(CRC3_W),  .POLY(CRC3_POLY),  .SEED(CRC3_SEED)) u_crc3 (
    .clk, .rst, .init, .crc_en, .datain, .crc_out(crc3_out)
  );

  serial_crc #(.WIDTH(CRC12_W), .POLY(CRC12_POLY), .SEED(CRC12_SEED)) u_crc12 (
    .clk, .rst, .init, .crc_en, .datain, .crc_out(crc12_out)
  );

  serial_crc #(.WIDTH(CRC16_W), .POLY(CRC16_POLY), .SEED(CRC16_SEED)) u_crc16 (
    .clk, .rst, .init, .crc_en, .datain, .crc_out(crc16_out)
  );

  serial_crc #(.WIDTH(CRC32_W), .POLY(CRC32_POLY), .SEED(CRC32_SEED)) u_crc32 (
    .clk, .rst, .init, .crc_en, .datain, .crc_out(crc32_out)
  );

  parallel_crc_engine #(
    .WIDTH      (CRC3_W),
    .POLY       (CRC3_POLY),
    .SEED       (CRC3_SEED),
    .LANES      (P3_LANES),
    .BLOCK_BITS (P3_BLOCK_BITS)
  ) u_p3 (
    .clk, .rst,
    .start     (p3_start),
    .msg       (p3_msg),
    .busy      (p3_busy),
    .done      (p3_done),
    .crc_final (p3_crc_final),
    .crc_lane  (p3_crc_lane)
  );

  parallel_crc_engine #(
    .WIDTH      (CRC16_W),
    .POLY       (CRC16_POLY),
    .SEED       (CRC16_SEED),
    .LANES      (P16_LANES),
    .BLOCK_BITS (P16_BLOCK_BITS)
  ) u_p16 (
    .clk, .rst,
    .start     (p16_start),
    .msg       (p16_msg),
    .busy      (p16_busy),
    .done      (p16_done),
    .crc_final (p16_crc_final),
    .crc_lane  (p16_crc_lane)
  );

endmodule
