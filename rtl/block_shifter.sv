// block_shifter: the per-lane shift register in front of each execution unit
// of the parallel CRC.
//
// A message block of BITS bits is loaded in parallel and then presented one
// bit per clock on sout, most significant (earliest) bit first, so that the
// execution unit behind it sees the block in the same order a serial
// generator would. While shift_en is high the register moves one place
// towards its MSB each clock; zeros enter at the LSB.
//
// Interface:
//   clk      - rising-edge clock
//   load     - loads din on the next edge (has priority over shift_en)
//   shift_en - advances the register by one bit
//   din      - block to load, din[BITS-1] is sent first
//   sout     - bit currently offered to the execution unit
//
// sout is valid from the cycle after load. No reset: the register is only read
// after a load. Loading and bit order are this design's choices; the shift
// register itself is part of the parallel structure.
module block_shifter #(
  parameter int unsigned BITS = 3
) (
  input  logic            clk,
  input  logic            load,
  input  logic            shift_en,
  input  logic [BITS-1:0] din,
  output logic            sout
);

  logic [BITS-1:0] sr_q;

  always_ff @(posedge clk) begin
    if (load) begin
      sr_q <= din;
    end else if (shift_en) begin
      sr_q <= sr_q << 1;
    end
  end

  assign sout = sr_q[BITS-1];

endmodule
