# PRBS scrambler and descrambler on an 8-stage LFSR

A scrambler makes a data stream look random on the wire: it XORs the data
with a pseudo-random bit sequence (PRBS). The receiver XORs the received
stream with the same sequence and gets the data back, because
`(d ^ k) ^ k = d`. So one circuit does both jobs. The one condition is that
both ends produce the same sequence, aligned word for word. That means the
same shift register, the same feedback taps, the same starting value and
the same number of steps.

This RTL implements the scrambler cell of a published teaching design: an
eight-stage linear feedback shift register (LFSR), an output XOR and a
three-row truth table for reset, pass-through and scrambling. It also
provides a top level that connects a scrambler to a descrambler.

## Files

| File | Contents |
|------|----------|
| `rtl/prbs_pkg.sv` | LFSR length, taps, seed and data width |
| `rtl/prbs_lfsr.sv` | the keystream generator |
| `rtl/prbs.sv` | the scrambler / descrambler cell |
| `rtl/prbs_link.sv` | top level: scrambler and descrambler back to back |
| `tb/*_tb.sv` | self-checking testbenches, one per module |

## The keystream generator (`prbs_lfsr`)

The register has stages a7 down to a0. On each step:

- every stage takes the value of the stage above it (a7 → a6 → … → a0);
- a7 takes `a7 ^ a5 ^ a3 ^ a1`.

The keystream bit is a0. Written as a sequence of output bits, this is

    s[n+8] = s[n+7] ^ s[n+5] ^ s[n+3] ^ s[n+1]

The testbenches use this formula as their reference model.

The register length and the taps come from the published design. The
feedback polynomial x^8 + x^7 + x^5 + x^3 + x is **not primitive**, because
a0 is not part of the feedback:

- a0 only delays a1 by one step;
- the sequence repeats every 127 steps, not 255;
- from the all-ones seed, the register takes one step and then enters its
  127-state cycle;
- the state `8'h01` steps to all-zero and stays there, so an elaboration-time
  assertion refuses that seed, and the all-zero seed too.

This is the structure as published. If you want a maximal-length sequence,
change `LFSR_TAPS` in `prbs_pkg.sv`, for example to `8'b0001_1101`. These
taps are a4, a3, a2 and a0, which gives the primitive polynomial
x^8+x^4+x^3+x^2+1 and a period of 255. Change it at both ends.

Each stage is a separate flip-flop built in a `generate` loop, as in the
published design. The register moves only when `step` is 1.

## The cell (`prbs`)

Pins: `clk`, `rstn` (active low), `en`, `din[DATA_W-1:0]`,
`dout[DATA_W-1:0]`.

| rstn | en | dout after the next rising edge |
|------|----|---------------------------------|
| 0 | – | 0 (asynchronous) |
| 1 | 0 | din |
| 1 | 1 | din ^ {DATA_W{a0}}, and the LFSR steps |

`DATA_W` is 8. The published truth table is written for one data bit, but the
published example runs 8-bit words. In that example all eight bits of a word
are inverted together, so all eight bits use the **same** keystream bit. This
RTL does the same. As a result, each word is either passed unchanged or
inverted as a whole. This spreads the spectrum much less than a true 8-bit
parallel scrambler, which needs eight keystream bits per clock. The source
names such a scrambler only as future work. It is not implemented here.

`dout` is registered, so the cell has one clock of latency and takes one word
per clock. Reset clears `dout` and reloads the seed at once, without waiting
for a clock edge.

## Keeping both ends in step (`prbs_link`)

The two LFSRs must take their n-th step on the same word. The scrambler's
output register delays each word by one clock on its way to the receiver. So
the descrambler's enable is the scrambler's enable passed through one
flip-flop (`en_rx`). Both cells share `clk` and `rstn`, so a reset brings both
ends back to the seed at the same time.

Timing:

- `line`, the scrambled stream, shows `din` one clock later;
- `dout` equals `din` exactly, two clocks later;
- while `en` is 0, both LFSRs hold, so gaps in the enable do not break the
  alignment.

A real link would also need a way to resynchronise if a bit is lost or added
on the wire. The source gives no such mechanism, beyond requiring the same
seed and polynomial at both ends. This top level relies on the shared reset.

## What comes from the source and what is chosen here

Taken from the published design:

- the eight stages and the taps a7, a5, a3, a1;
- the keystream bit taken from a0;
- the pin set and the truth table;
- the 8-bit data width;
- one cell type used for both scrambling and descrambling;
- both ends using the same seed and polynomial.

Choices made here, where the source says nothing:

- seed `8'hFF`. It matches the published example: the first enabled words
  come out inverted, which means keystream bit 1.
- the LFSR steps only while `en` is 1;
- asynchronous reset;
- registered `dout`;
- the one-clock enable delay in `prbs_link`;
- the name and direct wiring of `line`.

## Verification

| Testbench | What it checks |
|-----------|----------------|
| `prbs_lfsr_tb` | the register against the bit recurrence, plus 24 bits worked out by hand; holding while `step` is 0; the 127-step period, with no period of 126; asynchronous reset in the middle of a clock cycle |
| `prbs_tb` | every truth-table row; the published example (`aa→55`, `cc→33`, `f0→0f` while enabled, `f0→f0` while disabled); that the keystream bit turns 0 on the ninth enabled word; 1000 random words against the model; a scramble-then-descramble round trip through a second cell |
| `prbs_link_tb` | 4000 clocks of random data and enable patterns at the default parameters; `line` against the model and `dout` against the input two clocks earlier, on every clock; two resets in the middle of the stream |

`prbs_link_tb` also counts how often each mechanism happens: reset,
pass-through, keystream bit 1, keystream bit 0, a full keystream period and
long disabled runs. It counts a failure for any mechanism that never happens.

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a
watchdog that ends the run with a failure. Run one with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal -Irtl \
        rtl/prbs_pkg.sv rtl/prbs_lfsr.sv rtl/prbs.sv rtl/prbs_link.sv \
        tb/prbs_link_tb.sv --top-module prbs_link_tb
    ./obj_dir/Vprbs_link_tb

The testbenches initialise everything they read, and the design resets all of
its state. So results do not depend on the simulator's initial values.

## Changing it

- **Data width:** the `DATA_W` parameter on `prbs` or `prbs_link`. Every bit
  still uses the same keystream bit.
- **Seed:** the `SEED` parameter. Use the same value at both ends. A seed
  whose bits above a0 are all zero would lock the register at zero, and an
  assertion refuses it.
- **Register length or taps:** `WIDTH` and `TAPS` on `prbs_lfsr`, or
  `LFSR_W` and `LFSR_TAPS` in the package. The testbenches' reference
  recurrence is written for the default taps, so update it too.
