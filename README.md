# Combined ring-oscillator random bit generator

A ring oscillator (RO) is an inverter fed back on itself through a small
delay. It runs freely at several hundred MHz, and its edges wander by a few
picoseconds from period to period (jitter). Sample it with a much slower
clock and you get a bit stream with some true randomness in it. One such
stream is a poor random source, though: it is biased, and its bits follow the
mostly regular beat between ring and clock. This design XORs many
independently sampled rings into one bit per clock. Each stream brings its
own jitter, and the XOR cancels the bias and the regular part. The result is
a true random bit generator (TRNG) built only from ordinary FPGA logic.

The architecture follows the published design "Digital random bit generators
implemented in FPGAs offered by various manufacturers". There, the same
generator was built on eight Xilinx, Altera and Lattice FPGAs at 100 MHz and
tested with the NIST SP 800-22 suite. With 10 rings it failed on every device.
With 15, 20 or 30 rings it passed on every device. This RTL uses 15 rings by
default.

```
  ring 0 ──► DFF ─┐
  ring 1 ──► DFF ─┼─ XOR ─► DFF ─┐
  ring 2 ──► DFF ─┤              │
  ring 3 ──► DFF ─┘              ├─ XOR ─► DFF ──► bit_buffer ──► ftdi_tx ──► FTDI USB chip ──► PC
   ...                          ...                (fill, send,   (FIFO write)
  ring 14 ─► DFF ─── XOR ─► DFF ─┘                  flush)
          sampling      XOR step 1     XOR step 2
          (ro_sampler)  (xor_stage)    (xor_stage)
  └─────────────────── combined_trng ─────────────┘
```

All flip-flops and the buffer run on one clock, `clk`, which is 100 MHz in
the reference design. There is no post-processing anywhere. The PC gets the
raw XOR output.

## Files

| file | what it is |
|---|---|
| `rtl/trng_pkg.sv` | ring kinds, XOR-tree width arithmetic, buffer states |
| `rtl/ro_model.sv` | **behavioural** model of one ring oscillator (timed, not synthesizable) |
| `rtl/ro_sampler.sv` | one D flip-flop per ring |
| `rtl/xor_stage.sv` | one registered XOR step |
| `rtl/xor_combiner.sv` | pipelined XOR tree made of `xor_stage`s |
| `rtl/combined_trng.sv` | N rings, samplers and the XOR tree |
| `rtl/bit_buffer.sv` | on-chip memory that fills with bits, then sends them as bytes |
| `rtl/ftdi_tx.sv` | writes bytes into an FTDI USB FIFO chip |
| `rtl/trng_top.sv` | the whole chain |
| `tb/ftdi_fifo_model.sv` | behavioural model of the FTDI chip's write FIFO, for testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## The ring oscillators

This is the part that needs the most care when moving from simulation to
silicon.

**In hardware.** A ring is one inverter and one delay element τ in a closed
loop. Two constructions are supported (`ro_kind_t` in `trng_pkg`):

* `RO_INV_LATCH`: τ is a transparent latch, so the loop has two elements.
  This was the construction on the Xilinx and Altera parts.
* `RO_INV3`: τ is two more inverters, so the loop has three elements. This was
  the construction on Lattice ECP3. Its logic cell has no latch, and a latch
  built from LUT logic adds too much delay.

Any gate may serve as τ. The ring only has to oscillate much faster than the
sampling clock. On an FPGA the loop is a combinational cycle through LUTs.
Its nets must carry the synthesis tool's `keep` attribute, or the loop gets
optimised away. The tools then place and route it like any other logic. Per
element delay, placement and routing set the ring frequency.

**In this RTL.** A combinational loop cannot oscillate in a zero-delay
simulator. `ro_model` therefore replaces the loop with a timed process. After
a random start phase, the output toggles every half period:

```
half period = elements(KIND) * STAGE_PS + SKEW_PS + jitter
jitter      = u1 + u2 - JITTER_PS,   u1, u2 uniform on [0, JITTER_PS]
```

The defaults are `STAGE_PS = 450` ps and `JITTER_PS = 20` ps. The jitter is
triangular and drawn fresh each half period. With these defaults an
inverter-plus-latch ring runs near 555 MHz and a three-inverter ring near
370 MHz. `combined_trng` gives ring *i* an extra `13 ps * ((7 i) mod 11)`, so
that no two rings share a period. All of these numbers are this model's
assumptions. The reference design gives no ring timing.

The rest of the design is synthesizable. For an FPGA build, replace
`ro_model` with a LUT loop of the chosen construction, under `keep`
attributes, keeping the same single output `ro_out`. `ro_model` has a
`timeunit` of 1 ps; every other module uses 1 ns / 1 ps.

## Sampling and the XOR tree

`ro_sampler` is a single D flip-flop per ring, clocked by `clk`. No
synchroniser chain is added. A metastable sample only adds to the randomness,
and the reference design shows one flop per ring.

`xor_combiner` folds the N sampled streams in registered steps. Each step
(`xor_stage`) splits its inputs into consecutive groups of `FANIN` streams
and registers the XOR of each group. The last group may be smaller. There are
as many steps as it takes to reach one stream. In the reference design the
FPGA tools decided how many streams went into one step. Here that number is
the parameter `FANIN`, 4 by default, the LUT width of most of the parts tried:

| rings N | levels (FANIN 4) | XOR steps S | latency 1 + S |
|---|---|---|---|
| 10 | 10 → 3 → 1 | 2 | 3 clocks |
| 15 | 15 → 4 → 1 | 2 | 3 clocks |
| 20 | 20 → 5 → 2 → 1 | 3 | 4 clocks |
| 30 | 30 → 8 → 2 → 1 | 3 | 4 clocks |

`rnd_bit` after clock edge *t* is the XOR of all ring levels seen at edge
*t − S*. One bit leaves the tree every clock: 100 Mbit/s at 100 MHz.
`rnd_valid` follows the data through a shift register of the same length. It
goes high 1 + S clocks after reset is released and stays high.

## The buffer: fill, send, flush, repeat

The generator makes bits far faster than the USB link can carry them.
`bit_buffer` therefore works in bursts, as in the reference design:

1. **FILL**: every valid bit is shifted into a byte. The first bit received
   goes to the LSB. Each completed byte is written to the next memory word.
   `filling` is high. After exactly `8 * DEPTH` valid bits the buffer is full.
2. **READ / SEND**: the bytes are read in order, one clock per memory read,
   and offered on `out_data`. `out_valid` is high, and the byte stays
   unchanged until `out_ready` (an assertion checks this). Sending costs at
   least two clocks per byte.
3. **Flush**: after the last byte is taken, both pointers and the partial
   byte are cleared, and FILL starts again.

Bits produced during SEND are dropped. Each buffer therefore holds
`8 * DEPTH` consecutive generator bits, but there are gaps between
buffers. The reference design sizes the buffer to the memory each FPGA has and
gives no number. `DEPTH` defaults to 8192 bytes (64 kbit). Reduce it for
parts with less block RAM. A NIST test sequence of 10^6 bits spans
15.3 such buffers.

## FTDI interface

`ftdi_tx` writes bytes to an FTDI USB chip in FT245-style FIFO mode. The
reference design names only "an FTDI device and USB 2.0", so the mode and
timing here are assumed:

* `ftdi_txe_n` low means the chip can take a byte. It passes through a
  two-flop synchroniser.
* In IDLE, when a byte is offered and the chip is free, the byte is taken
  (`in_ready` is high for that clock) and latched onto `ftdi_data`.
* `ftdi_wr` goes high for `WR_CYCLES` clocks (5, so 50 ns). The chip stores
  the byte on the falling edge. Data stays on the bus for at least one more
  clock.
* The writer then waits `RECOVER_CYCLES + 1` clocks (9, so 90 ns) before it
  looks at `ftdi_txe_n` again, so the chip's busy flag after a write is seen.

That comes to at least about 16 clocks per byte, roughly 6 MB/s at 100 MHz.
A real FT245-type chip keeps `ftdi_txe_n` high for longer, and that sets the
actual rate. The chip's read direction is not used. If the chip's read strobe
pin is wired to the FPGA, hold it inactive.

## Top level: `trng_top`

| parameter | default | meaning |
|---|---|---|
| `N_RO` | 15 | number of rings (the reference design tried 10, 15, 20, 30) |
| `XOR_FANIN` | 4 | streams folded per XOR step (own choice) |
| `RO_KIND` | `RO_INV_LATCH` | ring construction, or `RO_INV3` |
| `DEPTH_BYTES` | 8192 | buffer size in bytes (own choice) |
| `WR_CYCLES` | 5 | FTDI write strobe length in clocks (own choice) |
| `RECOVER_CYCLES` | 8 | wait after a write, minus one (own choice) |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 100 MHz system clock (from a PLL doubling 50 MHz, or a 100 MHz oscillator) |
| `rst_n` | in | 1 | synchronous active-low reset |
| `ftdi_data` | out | 8 | FTDI FIFO data |
| `ftdi_wr` | out | 1 | FTDI write strobe |
| `ftdi_txe_n` | in | 1 | FTDI FIFO can accept a byte |
| `rnd_bit`, `rnd_valid` | out | 1, 1 | raw generator output, for observation |
| `filling` | out | 1 | buffer is collecting bits |

The clock source, the FTDI chip and the PC are outside the design.

## Where this RTL departs from the reference design or fills gaps

* The rings are behavioural timed models with assumed delays and jitter (see
  above). Their statistics reflect the model, not any FPGA.
* The XOR fan-in per step is a fixed parameter. In the reference design the
  vendor synthesis tools chose it.
* A synchronous reset was added to every register, along with the
  `rnd_valid` flag. The reference design shows neither.
* The buffer size, byte packing, buffer handshake and the whole FTDI protocol
  and timing are this design's own choices.
* The ring count is fixed when the design is built. There is no run-time
  switch between 10, 15, 20 and 30 rings.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | checks |
|---|---|
| `tb_ro_model` | every half period within nominal ± jitter, for both ring kinds; mean period; rings much faster than 100 MHz |
| `tb_ro_sampler` | outputs equal the inputs at the previous edge; reset |
| `tb_xor_stage` | group parities for 15/4, 30/6 and 7/3 |
| `tb_xor_combiner` | output is the parity from S clocks before, and the valid latency, for N = 15, 30, 20, 10 |
| `tb_combined_trng` | output against the parity of the rings as the testbench samples them; valid after 3 clocks; every ring toggles; output balance |
| `tb_bit_buffer` | 16-byte buffer, random input gaps and output stalls: phase, byte contents, stalled byte held, 2 clocks from full to the first byte, three rounds |
| `tb_ftdi_tx` | 300 bytes through the chip model: order, strobe width 50 ns, no write into a busy chip, data stable under the strobe, back-pressure seen |
| `tb_trng_top` | end to end with a 32-byte buffer, three rounds: raw bits against the ring parity, buffer phase, every byte the chip receives. Also counts that buffer-full, flush-and-refill, chip back-pressure and dropped bits each happen. |
| `tb_trng_top_full` | all defaults: one full 8192-byte buffer through the chip model, checked byte by byte; the fill takes 65,536 clocks; NIST monobit and runs statistics of the received bits |
| `tb_ring_counts` | 10, 15, 20 and 30 inverter-plus-latch rings and 15 three-inverter rings, 32,768 bits each: output against ring parity; monobit and runs statistics |

The statistical checks pass at p ≥ 0.0001 for 15 rings and more. Whether
p ≥ 0.01 was met is printed but not enforced, because even an ideal source
misses that level on one sequence in a hundred. These statistics only show
that the modelled system works. Only the full NIST suite run on real hardware
can judge the generator.

To run a testbench with Verilator 5 from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/trng_pkg.sv \
    tb/tb_trng_top.sv --top-module tb_trng_top
./obj_dir/Vtb_trng_top
```

Replace `tb_trng_top` with any testbench name. `-Wno-fatal` is needed because
Verilator warns that the variable delays in the timed models might be zero.
They never are. The full-size testbench takes about 10 s. Add
`+verilator+seed+<n>` to the run to change the ring start phases and jitter.
