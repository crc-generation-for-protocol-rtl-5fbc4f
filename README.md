# Radix-16 configurable CRC unit

A CRC functional unit for a protocol processor. The unit computes the cyclic
redundancy check of a bit stream at four bits per clock. The generator
polynomial is not built into the logic. It is an input, so one piece of
hardware serves any CRC of degree 16, 24 or 32: for example CRC-16-CCITT,
the CRCs of wireless LANs such as HIPERLAN, and the Ethernet CRC-32. Fixed
parallel CRC circuits are faster, but they must be redesigned for every new
polynomial. A table-driven
configurable design is about twice as fast, but has several times the area and
a much higher power draw. This design sits between them: it costs little more
area than a fixed parallel circuit and still carries traffic at a few hundred
Mbit/s. The original 0.35 µm implementation reached about 150 to 166 MHz, or
roughly 0.6 Gbit/s.

The design has only a handful of ideas. Each is explained below, followed by
the interface, the verification and the places where this RTL makes its own
choices.

## 1. A shift register with switches on the feedback wires

A CRC is the remainder of the message polynomial divided by the generator g(x)
over GF(2). The classic circuit for it is a shift register that takes one data
bit per clock. The bit that leaves the top of the register, XORed with the
incoming data bit, is the *feedback bit*. It is XORed into every register
position where g(x) has a coefficient of 1.

For a fixed g(x), the XORs sit only at the taps. For a configurable unit, every
position has an XOR and a *switch*. The switch at position k passes the
feedback bit when coefficient k is 1 and passes 0 otherwise. A switch is a
single two-input gate. Here it is a NAND, as in the original design. Each
register bit XORs an even number (four) of NAND terms, so the inversions cancel
in pairs and the result is the same as with AND switches.

## 2. Four bits per clock (radix 16)

To take a nibble per clock, four serial steps are unrolled into one. Two facts
keep this cheap.

* **The feedback bits depend only on the top of the register.** Within four
  steps, only register bits N-1..N-4 can reach the top. So the four feedback bits
  f0..f3 (f0 is the first step) need only those four bits, the four input bits
  d3..d0 (d3 first) and the polynomial coefficients p(N-1)..p(N-3). With the
  register r MSB-aligned at bit 31:

      f0 = r31 ^ d3
      f1 = r30 ^ d2 ^ f0·p31
      f2 = r29 ^ d1 ^ f0·p30 ^ f1·p31
      f3 = r28 ^ d0 ^ f0·p29 ^ f1·p30 ^ f2·p31

  This is the small "logic" block at the top of the register
  (`crc_r16_feedback`). It is the only place where a signal passes through
  more than one level of switches.

* **Every other bit is one XOR away from bit k-4.** After four shifts, bit k
  holds the old bit k-4, plus each feedback bit switched in by the coefficient
  that it met on its way:

      next[k] = r[k-4] ^ f0·p[k-3] ^ f1·p[k-2] ^ f2·p[k-1] ^ f3·p[k]

  (terms with a negative index are 0). This is `crc_r16_switch_net`: a column
  of 32 five-input XORs, each fed by four switch gates.

The critical path is the feedback chain (f0 → f1 → f2 → f3), then one switch
and one XOR tree. It does not grow with N.

## 3. One register for three lengths: MSB alignment and shut-down

The register is 32 bits. A CRC of degree N always sits in its **top** N bits.
The four feedback taps therefore stay at bits 31..28 for every length, and the
feedback path needs no multiplexer. The polynomial and the preset value are
shifted up by 32-N on the way in. The result is shifted down by 32-N on the way
out, so at the ports all three are right-justified (bit 0 is x^0).

For N = 24 the lowest 8 bits are unused, and for N = 16 the lowest 16.
`crc_r16_shutdown` decodes the length into per-segment enables. The register
is built from four 8-bit segments (`crc_r16_state_reg`). An unused segment
gets no clock enable, so it does not toggle. Its output is forced to 0, so the
lowest active bit correctly reads 0 as its "bit k-4".

## 4. Encoding and decoding

The same unit serves both ends of a link:

* **Transmit:** preset the register, stream the message U(x), and read the
  remainder S(x) from `crc`. S(x) is appended to the message.
* **Receive:** preset with the same value, stream the message followed by
  its S(x), most significant nibble first. `crc_zero` is 1 if the remainder
  is zero over the N active bits, which means no error was detected.
  Alternatively, stream only U(x) and compare `crc` with the received S(x).

Many standard CRCs add a final inversion and/or bit reflection. Those are left
to the user of `crc` because they are free in software or in wiring. The
Ethernet case is shown in the testbenches:

* preset 0xFFFFFFFF;
* feed each byte least significant bit first, as the nibbles
  `{b0,b1,b2,b3}` and then `{b4,b5,b6,b7}`;
* reverse the 32 result bits and invert them.

## 5. Interface and timing (`crc_r16_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `cfg_we` | in | 1 | write `cfg_len` and `cfg_poly` into the configuration register |
| `cfg_len` | in | 2 | `crc_pkg::crc_len_e`: `CRC_LEN_16`, `CRC_LEN_24`, `CRC_LEN_32` |
| `cfg_poly` | in | 32 | g(x) without its x^N term, right-justified (e.g. 0x04C11DB7) |
| `init`, `init_val` | in | 1, 32 | preset the CRC register (start of a frame), right-justified |
| `din_valid`, `din` | in | 1, 4 | one nibble; `din[3]` is the first bit in time |
| `crc` | out | 32 | remainder so far, right-justified, zero above bit N-1 |
| `crc_zero` | out | 1 | `crc` is zero over N bits |
| `cfg_len_q`, `seg_on` | out | 2, 4 | configured length; register segments in use |

* A nibble is accepted on every clock where `din_valid` is 1. There are no
  bubbles, so M nibbles take M clocks. Idle cycles in between are allowed,
  and the register holds its value during them.
* `crc` is registered. It shows the effect of a nibble from the clock edge
  that takes it, so a frame's CRC is available the cycle after its last
  nibble.
* `init` takes priority over `din_valid`. A nibble offered in the same cycle
  as `init` is not taken.
* After a configuration write, the new length and polynomial apply from the
  next cycle on. They must not change during a frame. An assertion flags
  `cfg_we` together with `din_valid`.
* Reset sets N = 32 with the Ethernet polynomial.

The engine (`crc_r16_engine`) has the same interface without the
configuration register: `len` and `poly` are direct inputs.

## 6. Files

All sources are SystemVerilog 2017, and the RTL is synthesizable.

| file | content |
|---|---|
| `rtl/crc_pkg.sv` | widths (32-bit register, 4-bit input, 8-bit segments), length enum, configuration struct |
| `rtl/crc_r16_feedback.sv` | the four feedback bits (section 2) |
| `rtl/crc_r16_switch_net.sv` | the NAND switch and XOR column (section 2) |
| `rtl/crc_r16_shutdown.sv` | length decode: segment enables, mask, alignment shift (section 3) |
| `rtl/crc_r16_state_reg.sv` | segmented register with preset (section 3) |
| `rtl/crc_r16_engine.sv` | the radix-16 configurable engine |
| `rtl/crc_zero_check.sv` | zero-remainder test over N bits |
| `rtl/crc_r16_unit.sv` | top: configuration register, engine, zero check |
| `tb/crc_ref_pkg.sv` | bit-serial reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

`crc_r16_feedback` and `crc_r16_switch_net` take the register width and the
input width as parameters, and the package holds the unit's widths. The
equations above hold for any input width. The shut-down decode, however, is
written for the 32-bit, four-segment layout.

## 7. Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a fixed time if the design hangs.

* `tb_crc_r16_feedback`: all 2048 input combinations against four steps of a
  bit-serial register.
* `tb_crc_r16_switch_net`: 4000 random vectors against the word-level form
  `(r<<4) ^ Σ fb[j]·(poly<<j)`.
* `tb_crc_r16_shutdown`, `tb_crc_zero_check`, `tb_crc_r16_state_reg`: the
  length decode, the zero test at each length, and the segment enables,
  preset priority and isolation against a model.
* `tb_crc_r16_engine`: four published check values of the string
  "123456789":
  * CRC-16/CCITT-FALSE 0x29B1
  * CRC-24/OpenPGP 0x21CF02
  * CRC-32/BZIP2 0xFC891918
  * Ethernet CRC-32 0xCBF43926

  It also runs 60 random polynomials, presets and messages at all three
  lengths with random idle cycles, checked after every nibble. Finally, 375
  back-to-back nibbles must take 375 clocks, with the result there one cycle
  later.
* `tb_crc_r16_unit` (the whole unit at its only size): configures CRC-16,
  CRC-24 and CRC-32 in turn. For each, it encodes a random frame, decodes the
  frame with its CRC appended (which must give zero), and decodes a copy with
  one flipped bit (which must not). Data arrive with random stalls. The test
  ends with a 1500-byte Ethernet payload streamed back to back, which must
  take exactly 3000 clocks and match the reference FCS. The test counts mode
  switches, 16- and 24-bit shut-downs, stalls, good decodes, detected errors
  and full-rate frames, and fails if any count is zero.

To run one test with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_crc_r16_unit.sv --top-module tb_crc_r16_unit
    ./obj_dir/Vtb_crc_r16_unit

Replace the testbench name to run the others. All of them finish in
well under a second.

The Verilator lint reports one warning, SYNCASYNCNET: the reset is used
asynchronously by the flip-flops and synchronously by the `disable iff` of the
assertions. It is harmless.

## 8. What is given and what is chosen

These parts follow the original design:

* a register with a switch on every reconnecting wire, the switches as NAND
  gates;
* a 4-bit input per clock;
* bit k of the next value formed from bit k-4 and a feedback logic block fed by
  the top four register bits, the input bits and the polynomial;
* shut-down logic that configures N as 16, 24 or 32;
* a zero-remainder check at the receiver.

The equations in section 2 are derived here from the serial register. The
original gives only which signals each bit depends on.

Choices made in this RTL, where the original is silent:

* The CRC is MSB-aligned in the register, and shut-down is done per 8-bit
  segment by clock enable plus output isolation. The original power gating
  may have been done differently.
* Within a nibble, `din[3]` is first in time. Reflected CRCs are served by
  the bit order in which the user feeds the data.
* There is a preset port and an asynchronous reset to zero.
* There is no built-in final XOR or bit reflection.
* The `din_valid`/`init` handshake is this RTL's own.
* The configuration register, its reset value and its write strobe are this
  RTL's own. The original only calls the polynomial an input.

Out of scope: the original work also compares this unit with other CRC
circuits. Those are a serial shift register (fixed or configurable), 8-bit
parallel fixed-logic circuits, a table-driven configurable unit and a software
routine. They are baselines, not part of this design, and are not included.
Clock frequency, area and power depend on the technology and cannot be
reproduced from RTL.
