# Serial and parallel LFSR CRC generators

A cyclic redundancy check treats a message as a polynomial over GF(2) and
appends the remainder of dividing it by a fixed generator polynomial. The
receiver divides message and remainder again and expects zero. In hardware the
division is a linear feedback shift register (LFSR): one flip-flop per degree
of the generator, and one XOR in front of every stage whose coefficient is 1.
Such a generator takes one message bit per clock, so an m-bit message costs m
clocks.

This RTL provides that serial generator for several standard polynomials. It
also provides a parallel arrangement that cuts the message into equal blocks
and gives each block to its own serial LFSR ("execution unit"). The
arrangement then XORs the per-block remainders into one result. With L lanes
an m-bit message is absorbed in m/L clocks.

Everything is plain synthesizable SystemVerilog in `rtl/`, with self-checking
testbenches in `tb/`.

## The serial generator (`serial_crc`)

The register `c[n-1:0]` is a Galois (internal-XOR) LFSR. On each clock where
`crc_en` is high it takes one message bit, most significant first:

```
fb   = c[n-1] ^ datain
c[0] <= fb
c[i] <= c[i-1] ^ (p[i] & fb)      i = 1 .. n-1
```

`p[i]` is the coefficient of x^i in the generator P(x) = x^n + ... + 1. The
x^n term is implied and p[0] must be 1. After the last message bit the
register holds

```
R(x) = ( S(x)·x^m + M(x)·x^n ) mod P(x)
```

where M(x) is the m-bit message and S(x) is the seed the register started
from. With a seed of zero this is the textbook CRC. `crc_out[i]` is the
coefficient of x^i.

There is no bit reflection and no final XOR. Standard checksums that use those
(such as the Ethernet CRC-32) will not come out bit-identical to library values.

Control:

| signal   | behaviour |
|----------|-----------|
| `rst`    | synchronous, active high, loads `SEED` |
| `init`   | synchronous seed reload, for starting the next message; wins over `crc_en` |
| `crc_en` | clock enable; while low the register holds |
| `datain` | message bit |

Receiver check: after the message, feed the n remainder bits into the same
generator, MSB first. The register then reads zero, whatever the seed. A
corrupted codeword leaves a non-zero register. Single-bit errors are always
caught.

### Polynomials (`crc_pkg`)

| name            | P(x)                                                  | `POLY` constant |
|-----------------|-------------------------------------------------------|-----------------|
| CRC-3           | x^3 + x + 1                                           | `3'b011`        |
| CRC-12          | x^12 + x^11 + x^3 + x^2 + x + 1                       | `12'h80F`       |
| CRC-16          | x^16 + x^15 + x^2 + 1                                 | `16'h8005`      |
| SDLC            | x^16 + x^12 + x^5 + 1                                 | `16'h1021`      |
| CRC-16 reverse  | x^16 + x^14 + x + 1                                   | `16'h4003`      |
| SDLC reverse    | x^16 + x^11 + x^4 + 1                                 | `16'h0811`      |
| CRC-32          | x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1 | `32'h04C11DB7` |

Seeds are all ones: 111 for CRC-3, which is the value the original design
uses, and all ones for the wider generators, which is a choice made here. Pass
`SEED` to change it.

Worked example, CRC-3 with seed 111 and message `100111101`: after nine
enabled clocks the register reads `101`. One more zero bit makes it `001`.

## The parallel structure

```
            +-----------+   +---------------+
  block 0 ->| shift reg |-->| exec. unit 0  |--+
            +-----------+   +---------------+  |
  block 1 ->| shift reg |-->| exec. unit 1  |--+--> XOR --> crc_final
              ...               ...            |
  block L-1>| shift reg |-->| exec. unit L-1|--+
            +-----------+   +---------------+
```

Three modules build it:

- **`block_shifter`** is loaded with one block in parallel. It then offers the
  block bit by bit, first bit first.
- **`parallel_crc`** holds L `serial_crc` lanes. All lanes use the same
  polynomial and seed and share `rst`, `init` and `crc_en`. Each lane has its
  own serial input `sin[j]`. Both the lane remainders (`crc_out[j]`) and their
  XOR (`crc_final`) are registered. These output registers capture every clock
  and have no enable or reset, so results appear one clock after the last bit.
- **`parallel_crc_engine`** wraps the two for a whole message word of
  `LANES*BLOCK_BITS` bits. Lane 0 gets the first block:
  `msg[MSG_BITS-1 -: BLOCK_BITS]`, because `msg[MSG_BITS-1]` is the first
  message bit.

### What the combined value is, and what it is not

The XOR of the lane remainders is the result this structure defines. It is
cheap and it is still a linear function of the message. However, it is **not
the serial CRC of the whole message**. Block j's remainder would have to be
multiplied by x^(bits that follow block j) mod P(x) before the XOR. The seed
terms would also need correcting. Neither is done here, and positional
information between blocks is lost.

For example, swapping two blocks gives the same result. The same 9-bit example
shows the difference:

| lane | block | lane remainder (seed 111) |
|------|-------|---------------------------|
| 0    | 100   | 101 |
| 1    | 111   | 000 |
| 2    | 101   | 110 |
| XOR  |       | **011** |

The serial CRC-3 of `100111101` is **101**.

So a sender and receiver must both use the same parallel structure with the
same block split. It cannot be checked against a serial CRC. If an
interchangeable CRC is needed, this structure needs the alignment step
described above. That step is not part of this RTL.

### Engine control and timing

`parallel_crc_engine` runs IDLE → SHIFT → FLUSH:

- **Start edge (E0).** `start` is sampled high while `busy` is low. The
  shifters load `msg` and the lanes are re-seeded (`init`).
- **E1 … E_B.** The lanes take one bit each. B = `BLOCK_BITS` = message
  bits / lanes.
- **E_B+1.** The output registers capture the lane values and `done` pulses
  high for one clock. `crc_final` and `crc_lane` are valid from this edge.
  They stay valid until the clock after the next accepted start.

The start-to-done time is therefore `BLOCK_BITS + 1` clocks: 4 for the 3×3
CRC-3 engine and 17 for the 4×16 CRC-16 engine. A `start` while busy is
ignored. A new start may be given on the clock where `done` is high, so
messages can follow back to back, one every `BLOCK_BITS + 1` clocks.
Assertions check that `done` is a one-clock pulse and that `busy` is low when
`done` is high.

## The top level (`crc_top`)

`crc_top` puts all generators side by side.

- **Serial generators.** Four serial generators (CRC-3, CRC-12, CRC-16 and
  CRC-32) share one bit stream and one set of controls (`rst`, `init`,
  `crc_en`, `datain`). They bring out `crc3_out`, `crc12_out`, `crc16_out`
  and `crc32_out`.
- **`p3_*`.** A parallel CRC-3 engine with 3 lanes × 3 bits. It takes a 9-bit
  message in 3 shift clocks instead of 9, and is the parallel counterpart of
  the serial CRC-3 generator.
- **`p16_*`.** A parallel CRC-16 engine with 4 lanes × 16 bits. It takes a
  64-bit message in 16 shift clocks instead of 64.

Each engine brings out `start`, `msg`, `busy`, `done`, `crc_final` and
`crc_lane`. The lane counts and block sizes are parameters of `crc_top`
(`P3_LANES`, `P3_BLOCK_BITS`, `P16_LANES`, `P16_BLOCK_BITS`).

Size after generic synthesis: 313 flip-flop bits and about 115 word-level
cells. The serial generators need exactly one flip-flop per polynomial degree
(3, 12, 16, 32).

## Where this RTL makes its own choices

These points are design decisions, not inherited from the original design:

- **Register form.** A Galois LFSR with feedback `c[n-1] ^ datain`, MSB-first
  input and `crc_out[i]` = coefficient of x^i. This form reproduces the
  original CRC-12 and CRC-3 register traces bit for bit.
- **Reset and control.** The reset is synchronous and loads the seed, as in
  the original CRC-3 design. `crc_en` (clock enable) and `init` (seed reload)
  behave as described above. Only their names come from the original design.
- **Wide-generator seeds.** All ones for CRC-12/16/32.
- **Engine around the lanes.** The block order (lane 0 = first bits), the
  start/busy/done handshake and the single flush clock are this design's own.
- **CRC-16 engine polynomial.** The 4×16 engine uses x^16 + x^15 + x^2 + 1.
- **Table-only polynomials.** SDLC and the two reversed polynomials exist as
  constants and are verified, but are not instantiated in the top.

Not provided:

- the state-space transformed parallel LFSR, with its transformation matrix
  chosen by search;
- the direct A^p / B_p matrix form of a p-bit-per-clock LFSR.

Both would give a true whole-message CRC at p bits per clock. They are not
part of this design.

## Verification

Every testbench compares against a polynomial long-division model
(`tb/crc_ref_pkg.sv`). It implements the formula for R(x) above and does not
step an LFSR. Each testbench ends with a line `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_serial_crc` | all seven polynomials on random messages with random `crc_en` gaps; the 9-clock CRC-3 example; a CRC-12 register trace; hold, `init`, mid-message reset; zero remainder after appending the CRC |
| `tb_block_shifter` | 3- and 16-bit shifters: bit order, hold, drain |
| `tb_parallel_crc` | 3×CRC-3 example (101/000/110 → 011) and random blocks; 4×CRC-16 random blocks; one-clock output delay |
| `tb_parallel_crc_engine` | both engine sizes, random words, exact start-to-done time, start while busy, back-to-back messages |
| `tb_crc_top` | the whole top at its default parameters, all parts running together (see below) |

`tb_crc_top` counts each mechanism and fails if one never happens:

- serial messages;
- `crc_en` stalls;
- `init` reloads;
- receiver zero-remainder checks;
- detected single-bit errors;
- CRC-3 and CRC-16 engine runs;
- starts while busy;
- back-to-back starts.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_crc_top.sv --top-module tb_crc_top
./obj_dir/Vtb_crc_top
```

Replace `tb_crc_top` with any other testbench name. Each run takes well under
a second.

To lint a module: `verilator --lint-only -Wall -y rtl rtl/crc_pkg.sv rtl/<module>.sv`.
The only warnings are for package constants a given module does not use.

To add a generator, instantiate `serial_crc` with `WIDTH`, `POLY` (without
the x^n term) and `SEED`. To change the parallel split, set `LANES` and
`BLOCK_BITS` on `parallel_crc_engine`.
