// crc_pkg: generator polynomials shared by the CRC generators.
//
// Each polynomial is stored the way the Galois LFSR of serial_crc uses it:
// bit i is the coefficient of x^i for i = 0 .. n-1, and the leading x^n term
// is implied by the register width n. For example x^3 + x + 1 becomes 3'b011.
// The set is the one the design is built around: the degree-3 polynomial used
// for the serial/parallel comparison, and the CRC-12, CRC-16, SDLC, reversed
// CRC-16, reversed SDLC and CRC-32 generators. The seed is this design's own
// choice for all generators except CRC-3, whose seed of 111 is given.
package crc_pkg;

  // Register widths (polynomial degrees).
  localparam int unsigned CRC3_W  = 3;
  localparam int unsigned CRC12_W = 12;
  localparam int unsigned CRC16_W = 16;
  localparam int unsigned CRC32_W = 32;

  // P(x) = x^3 + x + 1
  localparam logic [CRC3_W-1:0]  CRC3_POLY       = 3'b011;
  // x^12 + x^11 + x^3 + x^2 + x + 1
  localparam logic [CRC12_W-1:0] CRC12_POLY      = 12'h80F;
  // x^16 + x^15 + x^2 + 1
  localparam logic [CRC16_W-1:0] CRC16_POLY      = 16'h8005;
  // x^16 + x^12 + x^5 + 1
  localparam logic [CRC16_W-1:0] SDLC_POLY       = 16'h1021;
  // x^16 + x^14 + x + 1
  localparam logic [CRC16_W-1:0] CRC16_REV_POLY  = 16'h4003;
  // x^16 + x^11 + x^4 + 1
  localparam logic [CRC16_W-1:0] SDLC_REV_POLY   = 16'h0811;
  // x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7 + x^5
  //      + x^4 + x^2 + x + 1
  localparam logic [CRC32_W-1:0] CRC32_POLY      = 32'h04C1_1DB7;

  // Seed loaded by reset and by init. 111 for CRC-3; all ones is assumed for
  // the wider generators as well.
  localparam logic [CRC3_W-1:0]  CRC3_SEED  = '1;
  localparam logic [CRC12_W-1:0] CRC12_SEED = '1;
  localparam logic [CRC16_W-1:0] CRC16_SEED = '1;
  localparam logic [CRC32_W-1:0] CRC32_SEED = '1;

endpackage
