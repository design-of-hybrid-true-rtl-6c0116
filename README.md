# Hybrid true random number generator (HTRNG)

Ring-oscillator TRNGs are cheap but awkward: identical rings placed side by
side lock to one another, the XOR of their outputs stays mostly zero, and the
oscillators themselves are hard to handle in a digital flow. This design
drops the ring oscillator. In its place is an *encoder*: a ring of three
inverting stages, d1, d2 and d3, built from flip-flops, each with its own
programmable delay. Two flip-flops sample the ring. Next to it runs a seeded
shift-register generator. A multiplexer picks one of the two bit streams, an
optional post-processor conditions it, and an 8-bit register packs it into
bytes. The bytes go into a 256-byte FIFO and then out on a serial line to a
host, which reaches it through a USB-to-serial bridge.

Everything is synchronous to one reference clock. The reference
implementation closed timing at 70.062 MHz (14.273 ns) on a Spartan-IIE
(XC2S600E), using 341 four-input LUTs, 132 flip-flops and one block RAM. This
RTL has about 116 flip-flop bits plus the 2048-bit FIFO memory.

## Data path

```
            en ──► htrng_ctrl ── run ───────────────────────────┐ (clears partial pairs/bytes)
                      │ sample_tick (every sample_div+1 clocks)  │
                      ▼                                          │
 dly[3] ─► htrng_encoder ─ro_out─► htrng_sampler ─┐              │
           (d1→d2→d3 ring)         (2 D-FFs)      │ SRC_SAMPLED   │
                                                  ├─► htrng_mux ─► htrng_postproc ─► htrng_byte_reg
 seed ──► htrng_serial_gen (8-bit LFSR) ──────────┘ SRC_SERIAL       (XOR pairs     (8 bits → byte)
                                                                     or bypass)          │
                                                                                         ▼
                                          txd ◄── htrng_uart_tx ◄── read ctl ◄── htrng_fifo (256 x 8)
```

| File | Block |
|------|-------|
| `rtl/htrng_pkg.sv` | shared constants (byte width, FIFO depth, stage count, setting widths), `src_sel_e`, `dly_t` |
| `rtl/htrng_ctrl.sv` | enable register and programmable sampling strobe |
| `rtl/htrng_encoder.sv` | three-stage flip-flop delay ring that stands in for the ring oscillator |
| `rtl/htrng_sampler.sv` | two sampling flip-flops, with no reset on the data path |
| `rtl/htrng_serial_gen.sv` | seeded 8-bit Galois LFSR serial bit generator |
| `rtl/htrng_mux.sv` | registered selector between the sampled bit and the serial bit |
| `rtl/htrng_postproc.sv` | XOR-pair corrector with a bypass |
| `rtl/htrng_byte_reg.sv` | collects 8 bits into a byte |
| `rtl/htrng_fifo.sv` | 256 x 8 FIFO with registered read; drops bytes written while it is full |
| `rtl/htrng_uart_tx.sv` | 8N1 serial transmitter |
| `rtl/htrng_top.sv` | top level: wires the blocks together and moves bytes from the FIFO to the transmitter |

## The encoder ring

This block is the least obvious part of the design. A ring oscillator is an
odd number of inverters in a loop, and an edge runs around it for ever. The
encoder keeps that behaviour but spends clock cycles where the inverters
spend gate delay:

* stage *i* has a target, which is the inverse of the stage before it. Stage 0
  takes the inverse of stage 2;
* when a stage differs from its target, it counts clock cycles. After
  `dly[i] + 1` cycles it takes on the target value;
* while disabled, the ring is held at `3'b010` (bits d3 d2 d1). In that state
  only d1 differs from its target, so exactly one edge travels the ring once
  it is enabled.

Enabled, the stage code steps through `010 → 011 → 001 → 101 → 100 → 110 → 010`.
Each code lasts as long as the delay of the stage that switches next. The
output `ro_out` is stage d3. It is high for `S` cycles and low for `S`
cycles, where `S = Σ (dly[i] + 1)`, so the period is `2·S` clock cycles
(from 6 to 96 with 4-bit delays). There is no combinational loop, so the ring
synthesizes and times like any other logic.

**How far this can be trusted as an entropy source:** in a fully synchronous
implementation the ring is deterministic. With fixed delays and sampling
rate, the sampled stream is periodic, and the end-to-end test relies on that.
In hardware, any unpredictability has to come from outside this logic:
jitter between the reference clock and external events, changing `dly` and
`sample_div` at run time, or reseeding the serial generator. The RTL models
none of these effects, and this design does not claim them. Before using the
output cryptographically, check it on silicon with a statistical test suite
such as NIST SP 800-22.

## Sampling and pacing

`htrng_ctrl` registers `en` into `run` and, while running, pulses
`sample_tick` once every `sample_div + 1` reference-clock cycles. That one
strobe paces the whole bit pipeline. It advances the serial generator and
clocks the second sampling flip-flop, so both sources give one bit per
strobe, and they stay aligned whichever source the multiplexer picks.

`htrng_sampler` is two D flip-flops. The first takes `ro_out` on every clock.
The second takes the first only on the strobe. The two data flip-flops have
no reset, on purpose; only the valid flag is reset.

## Serial generator

`htrng_serial_gen` is an 8-bit Galois LFSR shifting right, with feedback mask
`8'hB8` (x⁸ + x⁶ + x⁵ + x⁴ + 1). The output bit is the bit shifted out at the
low end. The register passes through all 255 non-zero states before it
repeats, so a byte is not repeated until the whole cycle has been used. Its
output bits obey `s[n+8] = s[n] ^ s[n+2] ^ s[n+3] ^ s[n+4]`. `seed_load`
copies `seed` into the register; a zero seed becomes 1. After reset it holds
the parameter `SEED` (`8'h5A`).

## Post-processing, bytes, buffer and link

* **Post-processor.** With `pp_en` high it takes the bits in pairs and emits
  their XOR, one bit per pair. This halves the rate and reduces bias. With
  `pp_en` low, bits pass through unchanged. A half-collected pair is dropped
  when `pp_en` changes or the generator stops.
* **Byte register.** Shifts bits in from the LSB side, so the first bit of a
  byte ends up in bit 7. It emits a byte every 8 bits and discards a partial
  byte while stopped.
* **FIFO.** Holds 256 bytes, one block RAM's worth. The read is registered.
  A byte that arrives while the FIFO is full is dropped. `overflow` on the top
  then stays set until reset. `fifo_level` gives the fill level.
* **Link.** When the transmitter is idle and the FIFO holds data, the top
  reads one byte and starts a frame on the next cycle. Frames are 8N1, LSB
  first, `CLKS_PER_BIT` cycles per bit. The default of 608 gives 115200 baud
  from 70.062 MHz.

## Top-level interface (`htrng_top`)

| Port | Dir | Meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | reference clock; asynchronous active-low reset |
| `en` | in | Enable: starts and stops generation |
| `src_sel` | in | `SRC_SAMPLED` (0): sampled encoder ring; `SRC_SERIAL` (1): LFSR |
| `pp_en` | in | switch the XOR corrector in |
| `dly[0:2]` | in | 4-bit delays of stages d1, d2, d3 |
| `sample_div` | in | 8 bits; one sample per `sample_div + 1` clocks |
| `seed_load`, `seed` | in | load an 8-bit seed into the LFSR |
| `txd` | out | serial line to the host (idles high) |
| `fifo_full`, `fifo_empty`, `fifo_level` | out | FIFO state |
| `overflow` | out | sticky: a byte was dropped |

Parameters: `CLKS_PER_BIT` (608), `DEPTH` (256), `SEED` (`8'h5A`).

**Rates.** The first strobe comes `sample_div + 1` cycles after `run` rises.
From then on a byte leaves the byte register every `8·(sample_div + 1)`
cycles, or every `16·(sample_div + 1)` cycles with the corrector on. The bit
pipeline adds a few cycles of latency: two in the sampler, then one each in
the multiplexer, the post-processor and the byte register. The link sends a
byte every `10·CLKS_PER_BIT` cycles, which is 6080 cycles, or 86.8 µs at
70.062 MHz. At fast sampling rates the generator outruns the link. The FIFO
absorbs the difference for 256 bytes and drops bytes after that.

## Where this RTL departs from, or fills in, the original design

The original design gives the chain of blocks and their roles: an encoder
replacing inverter delays d1–d3 under an Enable pin, two sampling
flip-flops, a serial shift-register generator, a MUX between the two, an
optional post-processor, an 8-bit register, a 256-entry FIFO and a USB path
to a host. It gives no internals for most of them. The following are choices
made here:

* the encoder as a flip-flop ring with a cycle counter per stage, its rest
  state, and its 4-bit delay settings;
* the second sampling rate, implemented as a strobe on the reference clock.
  There is no second clock domain;
* the LFSR polynomial, its width and its reset seed;
* an XOR-pair corrector as the post-processor, whose function the original
  does not state;
* the bit order within a byte, and dropping bytes when the FIFO is full;
* a serial 8N1 transmitter at 115200 baud, standing in for the USB
  interface, which is external;
* every control setting brought out as a pin, and an asynchronous active-low
  reset everywhere except the sampler's data flip-flops.

The reference implementation also contains a serial *receiver*, but its role
is not described, so it is not included here.
The original design also says the FIFO "checks the possible combinations",
but it does not describe such a check, so none is built.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. They need Verilator 5
with `--timing`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/htrng_pkg.sv tb/tb_htrng_top.sv --top-module tb_htrng_top -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_htrng_encoder` | code sequence and the dwell time of each stage, for random delays; rest state |
| `tb_htrng_ctrl` | strobe spacing and first-strobe delay for random dividers; stop |
| `tb_htrng_sampler` | each sampled bit against the input two edges earlier; one valid per strobe |
| `tb_htrng_serial_gen` | seed load, zero-seed fix, period 255, polynomial recurrence |
| `tb_htrng_mux`, `tb_htrng_postproc`, `tb_htrng_byte_reg` | outputs against reference models, with random gaps, clears and mode changes |
| `tb_htrng_fifo` | 256-deep FIFO against a queue model, through full, overflow and empty |
| `tb_htrng_uart_tx` | frames decoded by a receiver model; frame length of 10 bit times |
| `tb_htrng_top` | end to end, with a 4-cycle bit time and an 8-byte FIFO |
| `tb_htrng_top_full` | the same scenario with every parameter at its default (about 1.7 M cycles, a few seconds) |

The two top-level tests share `tb/tb_htrng_top_body.svh` and look only at the
top's ports. A receiver model decodes `txd`. Four phases then check:

1. the serial source at full rate. The FIFO overflows. The bytes received
   must be an in-order subsequence of a reference LFSR stream, and the first
   `DEPTH` bytes must match it exactly;
2. the serial source through the corrector. Each bit must be the XOR of a
   pair of reference bits;
3. the sampled ring with delays 1, 2, 0. The stream must be runs of six ones
   and six zeros;
4. the sampled ring every third cycle through the corrector. Every byte must
   be `8'hFF`.

Each test also counts starts, reseeds, both sources, the corrector on and
off, FIFO-full cycles, dropped bytes and link-idle periods. Any of these
mechanisms that never occurs is reported as a failure.
