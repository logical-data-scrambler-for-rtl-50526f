# Word-parallel additive scrambler and descrambler

A long run of identical bits on a serial line leaves the receiver's clock
recovery with no edges to lock to. A scrambler prevents this by XORing the data
with a pseudo-noise (PN) sequence before transmission; the receiver XORs the
same sequence off again. This design is such a scrambler/descrambler pair for a
high-speed transport link of the OTN kind: an 8-bit plain text word
D0..D7 is XORed with eight bits of a linear feedback shift register (LFSR) in
every clock. An optional pipeline stage raises the clock rate.

```
            scrambler                            descrambler
  plain  +--------------+   key     crypto  +--------------+   key
  text ->| plain text   |--(XOR)--> word -->| crypto word  |--(XOR)--> plain text
         | register     |    ^              | register     |    ^
         +--------------+    |              +--------------+    |
                         +--------+                         +--------+
                         |  LFSR  |                         |  LFSR  |
                         +--------+                         +--------+
```

Both halves are the same circuit. XOR undoes itself, so the descrambler returns
the plain text as long as its LFSR is in the same state as the scrambler's for
the same word.

## The key generator (`pn_lfsr`)

The generator is an N-stage shift register, with stages numbered 1..N and a tap
vector a1..aN. One bit step works like this:

1. The key bit K is the modulo-2 sum of the stages whose tap is set.
2. K keys the current data bit.
3. K shifts into stage 1, and every stage moves one place towards stage N.

A serial scrambler would do one step per data bit: D0, then D1, and so on up to
D7. Here the W steps of one word are unrolled into combinational logic. Each
clock therefore yields a W-bit key word, where `keystream[0]` keys D0, and the
register jumps W steps ahead. The bits are the same as the serial order, just
delivered in parallel. That is what gives 8 bits per clock at W = 8.

Defaults, set in `scrambler_pkg`:

| constant    | value                 | meaning                                 |
|-------------|-----------------------|-----------------------------------------|
| `DATA_W`    | 8                     | word width, D0..D7                      |
| `LFSR_N`    | 16                    | register stages                         |
| `LFSR_TAPS` | `16'h8805`            | taps on stages 1, 3, 12, 16: 1 + x + x^3 + x^12 + x^16 |
| `LFSR_SEED` | `16'hFFFF`            | state after reset and at each frame start |

This polynomial and the all-ones seed are those of the OTN frame-synchronous
scrambler (ITU-T G.709), because OTN is the target. The sequence repeats after
2^16 - 1 bits, and the generator's test checks this. From the seed, the first key
words are `8'h72`, `8'h89`, `8'ha0` and `8'h4b`, with D0 as bit 0.

The N, TAPS and SEED parameters of every module change the generator. TAPS and
SEED are declared `LFSR_N` bits wide, so for N below 16 only their low N bits
are used. For N above 16, change `LFSR_N` in the package instead.

## Keeping the two ends in step: frame start

Nothing inside the link ties the descrambler's LFSR to the scrambler's, so an
explicit resynchronisation point is needed. A word sent with the frame-start
flag (`frame_start` at the top, `din_sync` on the halves) is keyed from the
seed, and its generator continues from there. The flag travels with the word
through both halves. The descrambler therefore reseeds on exactly the same
word, so any slip is repaired at the next frame start.

Only clocks with a valid word advance a generator. Idle cycles
(`plain_valid` low) leave the key where it was, so gaps in the traffic do not
desynchronise the ends.

## With and without pipelining (`PIPELINE`)

| `PIPELINE` | key word computed                                      | XOR result     | latency per half |
|-----------|---------------------------------------------------------|----------------|------------------|
| 0         | in the same cycle as the XOR, from the LFSR register    | combinational  | 1 clock          |
| 1 (default)| one cycle earlier, while the data word is registered, into a key register | registered | 2 clocks |

In the unpipelined form, the critical path runs from the LFSR register through
the W unrolled steps, then through the XOR, and ends at whatever follows. The
pipelined form puts key generation and the XOR in different cycles. Both forms
take one word every clock, so throughput is W bits per clock in both. The
pipeline buys clock frequency, not bits per cycle.

Reference figures for an 8-bit implementation on an FPGA:

| form              | clock    | throughput | area   |
|-------------------|----------|------------|--------|
| without pipelining | 95 MHz  | 0.76 Gbit/s | 16 LEs |
| with pipelining    | 130 MHz | 1.06 Gbit/s | 17 LEs |

The throughput in both rows is consistent with 8 bits per clock. The register
placement here is this design's own. It adds a key register and an output
register, which is more than one logic element, so do not expect the area
figures above to be reproduced.

## Modules and interfaces

All registers reset asynchronously on `rst_n` low. Words are W bits with
D0 in bit 0.

* `scrambler_link` (top): a scrambler whose crypto word feeds a descrambler
  directly.
  * Ports: `plain_in`/`plain_valid`/`frame_start` go in.
  * `crypto_out`/`crypto_valid`/`crypto_sync` come out: the line signal.
  * `plain_out`/`plain_out_valid`/`plain_out_sync` come out: the recovered data.
  * Latency from plain in to crypto out is L, and from plain in to plain out
    is 2L, where L = 1 + `PIPELINE`.
  * The clock comes from outside.
* `scrambler`, `descrambler`: one half each, with ports `din`/`din_valid`/
  `din_sync` and `dout`/`dout_valid`/`dout_sync`.
  * The flags leave with their word, L clocks later.
  * An assertion flags `din_sync` without `din_valid`.
* `pn_lfsr`: the key generator described above.
  * Inputs `advance` and `reseed`; output `keystream`, which is combinational
    from the current state, or from the seed while `reseed` is high.
* `word_register`: the plain text register (scrambler side) or crypto word
  register (descrambler side), W bits wide.
  * Loads only on `d_valid`; the valid and sync flags travel with the word.
  * The pipelined forms also use it as their output register.
* `scrambler_pkg`: the shared constants.

Verilator's lint reports `SYNCASYNCNET` on `rst_n`. This is because the
handshake assertions use `rst_n` in `disable iff` while the flops use it as an
asynchronous reset. It does not affect the logic.

## Departures and open points

* The generator polynomial, register length and seed are taken from the OTN
  scrambler, not derived from requirements of this design. The frame-start
  reseeding, valid flag, reset style and exact pipeline register positions are
  also this design's own choices.
* This is the additive (synchronous) form: the LFSR runs free of the data. The
  self-synchronising form, in which the register is fed from the cryptogram,
  is not part of this design.
* The clock generator is not modelled; `clk` is a port.
* No line or channel sits between the two halves. To put one in, split the
  top, or use `scrambler` and `descrambler` directly.

## Verification

The testbenches in `tb/` check themselves and print
`TB_RESULT checks=N failures=M`. Each has a watchdog.

* `scr_ref_pkg` holds an independent bit-serial model of the generator. It
  keeps an unpacked array of stages, sums the listed taps and shifts by one
  bit per call. The word-level checks compare against this model.
* `pn_lfsr_tb`:
  * the two fixed key words from the seed;
  * random advance/reseed patterns, checked against the model;
  * a full period of 65535 words, after which the generator must be back at
    its seed word.
* `word_register_tb`: load, hold, flags and reset.
* `scrambler_tb`, `descrambler_tb`: both forms side by side, with random data,
  idle cycles and frame starts. The exact latency (1 or 2 clocks) is checked
  on every word.
* `scrambler_link_tb`: end to end, both forms.
  * Checks the crypto words against the model and plain out against plain in,
    at exact latencies.
  * Counts words, frame starts (including restarts in mid-traffic) and idle
    cycles; each must occur.
* `scrambler_link_wide_tb`: the same with 32-bit words.
* `scrambler_link_full_tb`: the top at its default parameters. It sends one
  OTN-sized frame (4 x 4080 = 16320 bytes) back to back and requires it to
  leave in 16320 + 4 clocks.

To run a test with plain Verilator from the repository root (shown for the
end-to-end test):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/scrambler_pkg.sv tb/scr_ref_pkg.sv rtl/pn_lfsr.sv rtl/word_register.sv \
  rtl/scrambler.sv rtl/descrambler.sv rtl/scrambler_link.sv \
  tb/scrambler_link_tb.sv --top-module scrambler_link_tb -o sim
./obj_dir/sim
```

For another test, swap the testbench file and the top module. Files a test
does not use may stay on the command line.
