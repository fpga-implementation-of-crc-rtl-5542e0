// serial_crc: bit-serial CRC generator built as a Galois (internal-XOR) LFSR.
//
// The register c[WIDTH-1:0] holds the running remainder. Each enabled clock
// takes one message bit, most significant message bit first:
//   fb      = c[WIDTH-1] ^ datain
//   c[0]   <= fb                       (coefficient p0 is always 1)
//   c[i]   <= c[i-1] ^ (p_i & fb)      for i = 1 .. WIDTH-1
// which is one step of dividing x^WIDTH * m(x) by P(x). After the last message
// bit the register holds the remainder, i.e. the CRC; an m-bit message takes
// m enabled clocks. The structure (one XOR per non-zero coefficient, feedback
// taken from the last stage and added to the input) follows the serial LFSR of
// the design; the polynomial comes in through POLY.
//
// Interface:
//   clk     - rising-edge clock
//   rst     - synchronous, active high: loads SEED
//   init    - synchronous, active high: loads SEED (starts a new message
//             without a full reset); has priority over crc_en
//   crc_en  - one message bit is absorbed on each clock where it is high
//   datain  - serial message bit
//   crc_out - current register contents; c[i] is bit i (coefficient of x^i)
//
// The synchronous reset to the seed follows the original design (its CRC-3
// registers are synchronous with a set input, seed 111). crc_en and init
// exist there by name only; their exact behaviour (clock enable; seed reload
// with priority over crc_en) is this design's choice.
module serial_crc #(
  parameter int unsigned       WIDTH = crc_pkg::CRC3_W,
  parameter logic [WIDTH-1:0]  POLY  = crc_pkg::CRC3_POLY,
  parameter logic [WIDTH-1:0]  SEED  = crc_pkg::CRC3_SEED
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init,
  input  logic             crc_en,
  input  logic             datain,
  output logic [WIDTH-1:0] crc_out
);

  if (WIDTH < 2) begin : g_width_check
    $error("serial_crc: WIDTH must be at least 2");
  end
  if (POLY[0] !== 1'b1) begin : g_poly_check
    $error("serial_crc: a generator polynomial must have p0 = 1");
  end

  logic [WIDTH-1:0] lfsr_q;
  logic [WIDTH-1:0] lfsr_d;
  logic             fb;

  always_comb begin
    fb     = lfsr_q[WIDTH-1] ^ datain;
    lfsr_d = {lfsr_q[WIDTH-2:0], 1'b0} ^ (POLY & {WIDTH{fb}});
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      lfsr_q <= SEED;
    end else if (crc_en) begin
      lfsr_q <= lfsr_d;
    end
  end

  assign crc_out = lfsr_q;

endmodule
