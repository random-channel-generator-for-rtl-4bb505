# Random channel generator for a power-line channel emulator

A power-line communication (PLC) channel emulator stands between two PLC
modems in place of a live mains network, so a modem can be stress-tested
safely and the same test can be repeated. Real power lines do not keep one
transfer function: appliances switch, loads are plugged in and out, and the
network changes with the time of day. This random channel generator (RCG)
gives the emulator that variability. Each time it is triggered, it draws a
new pseudo-random number and uses it to choose which channel transfer
functions (TFs) make up the emulated channel.

The RCG draws from three families of channel models:

| model | transfer functions |
|---|---|
| transmission-line (TL) model | 22 |
| Zimmermann multipath model | 10 |
| linear periodically time-varying (LPTV) model | 2 types, 5 steps each (10) |

The filters that implement those TFs are not part of this RTL. Each TF's
current output sample enters `rcg_top` on an input port. The RCG only
decides which of these samples reach the output.

## Structure

```
             tl_tf[22] ──► model_mux (22) ──┐
             zm_tf[10] ──► model_mux (10) ──┼──► channel_adder ──► chan_out
        lptv_tf[2][5]  ──► model_mux (10) ──┘
                              ▲ enable / sel
 advance ──► lfsr_rng ──► selection logic (in rcg_top)
 seed    ──►   (32-bit LFSR, 3-bit random number register)
```

| file | module | role |
|---|---|---|
| `rtl/rcg_pkg.sv` | package | model counts, widths, sample types |
| `rtl/lfsr_rng.sv` | `lfsr_rng` | 32-bit LFSR and 3-bit random number register |
| `rtl/model_mux.sv` | `model_mux` | one multiplexer per model, with a grounded (zero) input |
| `rtl/channel_adder.sv` | `channel_adder` | summing node, registered |
| `rtl/rcg_top.sv` | `rcg_top` | top: RNG, selection rule, three multiplexers, adder |

## The random number generator

`lfsr_rng` is a 32-bit Fibonacci linear feedback shift register. On each
step the register shifts one place towards bit 0. The XOR of bits 0, 1, 2
and 22 enters at bit 31. That tap set is the primitive polynomial
x^32 + x^22 + x^2 + x + 1. From any non-zero seed, the register passes
through all 2^32 − 1 non-zero states before it repeats.

- **Seed.** Reset loads the `SEED` parameter. `seed_load` loads any 32-bit
  value. An all-zero seed would lock an LFSR for good, so it is replaced by
  `SEED`. An assertion checks that the state never becomes zero.
- **Random number.** Three XOR trees each fold three register bits into one
  output bit:
  - bit 0 = b0 ^ b3 ^ b6
  - bit 1 = b2 ^ b5 ^ b8
  - bit 2 = b4 ^ b7 ^ b29

  The 3-bit result is captured in the random number register (`rn`) on the
  same clock edge as the shift. So `rn` is the fold of the state before the
  step. Each fold is a linear combination of bits of a maximal-length
  sequence, so all eight values appear almost equally often. Over 1000 draws
  the testbench sees between 109 and 139 of each value.
- **Stepping.** The register steps once per clock cycle in which `advance`
  is high. In the emulator this strobe is a press of the front-panel button,
  and the button press is the event that changes the channel. `seed_load`
  takes priority over `advance`.

## How a channel is chosen

The selection logic is the part of this design that goes furthest beyond
what the source material states. The source says only that the 3-bit random
number drives the multiplexers that choose the channel models. It also shows
each multiplexer with a grounded input and a summing node after them. This
design reads that as follows:

1. **Which models take part.** Bits 0, 1 and 2 of `rn` enable the TL, the
   Zimmermann and the LPTV multiplexer. A disabled multiplexer passes its
   grounded input, which is zero. So the eight random numbers give the eight
   subsets of the three models. This includes `rn = 0`, which gives an
   all-zero channel.
2. **Which TF inside a model.** A separate field of the LFSR state picks the
   TF index:

   | model | index |
   |---|---|
   | TL | `state[23:16] mod 22` |
   | Zimmermann | `state[31:24] mod 10` |
   | LPTV | `state[15:9] mod 10` |

   The LPTV inputs are type-major: index = type × 5 + step. Taking an 8-bit
   or 7-bit field modulo the count leaves a small bias. Some TFs come up
   as much as about 9 % more often than others.
3. **Output.** `channel_adder` adds the three multiplexer outputs as signed
   numbers. The sum is two bits wider than a sample, so it cannot overflow.

The selection changes only on an `advance` and then stays fixed. Samples
flow through on every clock in between.

### Timing

- **Selection.** `rn`, `model_en`, `tl_sel`, `zm_sel`, `lptv_sel` and
  `rng_state` change on the clock edge at which `advance` is sampled high.
- **Multiplexers.** They are combinational.
- **Output.** `chan_out` and `chan_valid` appear one clock after `tf_valid`
  and the TF samples.
- **Reset.** It is synchronous and active low (`rst_n`). It loads `SEED`
  and clears `rn`, so the channel is all-zero until the first `advance`.

## Parameters of `rcg_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_TL` | 22 | TL model TFs |
| `NUM_ZM` | 10 | Zimmermann model TFs |
| `NUM_TYPES` | 2 | LPTV types |
| `NUM_STEPS` | 5 | steps per LPTV type |
| `DW` | 16 | sample width (two's complement) |
| `SEED` | `32'hACE1_2D5B` | seed loaded at reset |

The model counts, the 32-bit register and the 3-bit random number come from
the original design. The sample width, the seed, the tap set and the XOR
grouping are this design's own choices. `lfsr_rng` has its own parameters
(`WIDTH`, `RN_W`, `TAPS`, `SEED`, `RN_MASKS`), so a shorter register can be
used, for example to check the period in simulation.

## Departures and open points

- **Tap set.** The original describes a 32-bit register with three taps and
  feedback into the MSB. Its drawing also shows a second XOR output fed back
  into bit 29. This design uses a standard maximal-length tap set instead and
  has no second injection at bit 29. Its period is therefore known:
  2^32 − 1.
- **Shift direction.** The original text speaks of a left shift, but its
  feedback goes into the MSB. This design shifts towards bit 0 and feeds the
  MSB, which is the only arrangement consistent with MSB feedback.
- **Width of the RNG link.** The drawing shows more than three lines from
  the RNG to the multiplexers. This design uses the 3-bit random number
  stated in the text, plus the LFSR state fields described above for the TF
  index.
- **LPTV steps.** An LPTV channel normally steps through its states in step
  with the mains cycle. How the five steps are sequenced is not specified.
  Here the ten LPTV TFs are simply ten selectable inputs, picked at random
  like the others.
- **Not included.** The TF filters of the three models are not included,
  because their coefficients and filter structure are not specified. Button debouncing and
  synchronisation are not included either: `advance` must already be a
  clean one-cycle strobe.
- **Future work.** The weighted-probability generator, which would favour
  loads that are used more often, is not implemented.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb/tb_lfsr_rng.sv` | each of 2000 steps and random numbers against a bit-level reference; hold, seed load, all-zero seed; two logged 24-press trials; histogram of 1000 draws (each bin within 125 ± 50); an 8-bit instance with taps x^8+x^6+x^5+x^4+1 that has period 255 and visits all 255 states |
| `tb/tb_model_mux.sv` | every select value, both enable states, out-of-range selects |
| `tb/tb_channel_adder.sv` | 1000 random sums, including the extreme values, with latency and valid |
| `tb/tb_rcg_top.sv` | the whole generator at default sizes, see below |

`tb_rcg_top` runs the whole generator at its default sizes. It makes 3000
button presses with random gaps and reloads the seed once. Every TF input
carries fresh random samples on every clock. The testbench compares
`chan_out` and the selection outputs with its own model. It also checks that
each mechanism occurs:

- all eight random numbers;
- each model both enabled and grounded;
- all 42 TFs picked at least once;
- the all-zero channel;
- a seed reload;
- the selection holding between presses.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rcg_pkg.sv rtl/lfsr_rng.sv \
  rtl/model_mux.sv rtl/channel_adder.sv rtl/rcg_top.sv tb/tb_rcg_top.sv \
  --top-module tb_rcg_top -o tb_rcg_top
./obj_dir/tb_rcg_top
```

For the other testbenches, list the package, the module under test and its
testbench, and change `--top-module`. Each testbench finishes in well under
a second.
