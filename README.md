# WiMAX channel interleaver with a division-free address generator

IEEE 802.16e (mobile WiMAX) interleaves every block of coded bits before
modulation, so that a burst of channel errors ends up spread over many code
words. The standard defines the permutation in two steps, each with floor
and modulo operations on the block size. Computed directly, that needs
dividers. This design makes the same addresses from a column counter, a row
counter, one multiply-add and a correction of at most ±2 rows. It has no divider.

The design is an RTL implementation of the address generator described in
"Implementation of Resource Efficient Address Generating Circuit for WiMAX
Interleaver". It adds the interleaver memory and the sequencing around it, so
the result is a working interleaver and deinterleaver.
Every permitted block size, modulation and code rate of 802.16e is supported.

## The permutation and why it needs no division

A block has `Ncbps` bits, between 96 and 576. Write the bits row by row into a
matrix of `d = 16` columns and `r = Ncbps/16` rows. Bit `k` then sits in row
`j = k / 16` and column `i = k % 16`. Let `s` be half the number of bits per
subcarrier: 1 for QPSK, 2 for 16-QAM and 3 for 64-QAM. The standard gives the
output position of bit `k` as

    m  = r*(k % 16) + k/16                          (read the matrix by columns)
    jk = s*floor(m/s) + (m + Ncbps - floor(16*m/Ncbps)) % s

The first step is simply `m = r*i + j`. Because `j < r`, `floor(16*m/Ncbps)`
equals the column index `i`. Because `s` divides both `Ncbps` and, for every
permitted depth, `r`, `m % s` equals `j % s`. The second step therefore
becomes

    jk = r*i + j - (j % s) + ((j - i) % s)

This keeps `r*i` and changes only the row, by an amount that depends on
`i % s` and `j % s`:

| modulation | column `i`        | row term                                  |
|------------|-------------------|-------------------------------------------|
| QPSK       | any               | `j`                                       |
| 16-QAM     | even              | `j`                                       |
| 16-QAM     | odd               | `j+1` if `j` even, `j-1` if `j` odd (flip bit 0 of `j`) |
| 64-QAM     | `i%3 = 0`         | `j`                                       |
| 64-QAM     | `i%3 = 1`         | `j+2` if `j%3 = 0`, otherwise `j-1`       |
| 64-QAM     | `i%3 = 2`         | `j-2` if `j%3 = 2`, otherwise `j+1`       |

The address is `kn = r*i + row term`. Inside each group of `s` rows, the
correction only rotates the rows, so `kn` stays a permutation of
`0 .. Ncbps-1`. For example, with `Ncbps = 192` and 16-QAM, the first row gives
0 13 24 37 48 61 72 85 96 109 120 133 144 157 168 181, and the second row
starts 1 12 25 36 49 60.

The preconditions are that `s` divides `r`: `r` must be even for 16-QAM and
a multiple of 3 for 64-QAM. Every depth the standard allows for those
modulations meets this. The depth table admits no other depth.

## Address generator core (`kn_gen`)

- **Counters.** `column_counter` counts `i` from 0 to 15. `row_counter`
  counts `j` from 0 to `r-1` and steps when the column counter wraps.
  Together they visit the bits in input order: `j` is the outer loop and `i`
  the inner one. The linear address `k = 16*j + i` is just the
  concatenation `{j, i}`.
- **Modulation units.** `qpsk_block`, `qam16_block` and `qam64_block` each
  form `r*i + row term` from the table above. Each unit is combinational and
  has its own small multiplier (6 × 4 bits).
- **Multiplexer.** The modulation type (0 = QPSK, 1 = 16-QAM, 2 = 64-QAM)
  selects one unit's result.

A `start` pulse latches the modulation and `r` and clears the counters.
After that, `busy` is high and `kn` is valid. Each cycle with `step` high moves
on to the next bit. `last` marks the final bit of the block. One address is
produced per clock, so a block takes `Ncbps` cycles.

## Interleaving and deinterleaving with one generator

`interleaver_memory` stores single bits at 576 addresses. It has a synchronous
write port and a registered read port. `addr_generator` runs each block in two
phases and reports the phase on `sel`:

1. **Write phase** (`sel = 0`, `in_ready = 1`): one input bit is written each
   cycle that `in_valid` is high. The input may stall for any number of cycles.
2. **Read phase** (`sel = 1`): one bit is read each clock for `Ncbps` clocks.
   There is no stall.

The core runs once per phase. It restarts in the same cycle as the last
write, so there is no idle cycle between the phases. The mode decides which
phase uses the permuted address:

- **Interleave.** Input bit `k` is written at `kn` and the block is read
  in linear order, so the output at position `jk` is input bit `k`.
- **Deinterleave.** The block is written in linear order and read back at
  `kn`. Output bit `k` is then received bit `jk`, which is exactly the
  standard's deinterleaver (its inverse formulas are what the testbench
  checks against).

Only one block is in the memory at a time. A block takes `Ncbps` write cycles
plus `Ncbps` read cycles, and the next one may start once `busy` has fallen.
A start pulse during a block is ignored.

## Configuration

`depth_rom` turns `(mod_typ, code_rate, depth_idx)` into `Ncbps` and `r`.
`code_rate` is 3 bits: 0 = 1/2, 1 = 2/3, 2 = 3/4. `depth_idx` picks an entry
from the list for that pair:

| modulation / rate | permitted `Ncbps` (index 0, 1, …) |
|-------------------|-----------------------------------|
| QPSK 1/2          | 96 192 288 384 480 576             |
| QPSK 3/4          | 144 288 432 576                    |
| 16-QAM 1/2        | 192 384 576                        |
| 16-QAM 3/4        | 288 576                            |
| 64-QAM 1/2        | 288 576                            |
| 64-QAM 2/3        | 384                                |
| 64-QAM 3/4        | 432                                |

Each list holds the multiples of its first entry up to 576. The table is
therefore stored as a first row count and an entry count. A start with any
other combination is refused and pulses `cfg_err` for one cycle. Because
`Ncbps = 16*r`, the four low bits of the `ncbps` outputs are always zero.

## Top level: `wimax_interleaver`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin a block (only while idle) |
| `mode` | in | 1 | 0 interleave, 1 deinterleave |
| `mod_typ` | in | 2 | 0 QPSK, 1 16-QAM, 2 64-QAM |
| `code_rate` | in | 3 | 0 = 1/2, 1 = 2/3, 2 = 3/4 |
| `depth_idx` | in | 3 | entry in the depth table |
| `in_bit`, `in_valid` | in | 1 | input bit stream |
| `in_ready` | out | 1 | write phase: input bits are taken |
| `out_bit`, `out_valid` | out | 1 | output bit stream, no back-pressure |
| `out_last` | out | 1 | last output bit of the block |
| `busy` | out | 1 | a block is in progress |
| `cfg_err` | out | 1 | refused configuration |
| `ncbps` | out | 10 | depth of the current block |

Timing:
1. The configuration inputs are sampled with `start`.
2. `in_ready` rises on the next clock.
3. After the last input bit, `out_valid` rises one clock later and stays high
   for `Ncbps` consecutive clocks.
4. `busy` falls on the same clock edge at which `out_last` rises, with the
   last output bit.

The types and constants (`D = 16`, `NCBPS_MAX = 576` and the encodings) are in
the package `wimax_il_pkg`.

Hierarchy:

    wimax_interleaver
    ├── addr_generator
    │   ├── depth_rom
    │   └── kn_gen
    │       ├── column_counter
    │       ├── row_counter
    │       └── qpsk_block, qam16_block, qam64_block
    └── interleaver_memory

## Where this RTL departs from the published design

- **Multipliers.** The published block diagram draws one multiplier and
  one adder after the modulation multiplexer. Its synthesis report, however,
  uses three hardware multipliers, one in each modulation sub-module. Here
  each modulation unit forms its full address, as the per-modulation
  formulas do, and the multiplexer selects the address.
- **Code rate.** The published diagram feeds a code-rate input to each
  modulation unit. The code rate only matters through `r = Ncbps/16`, so the
  units here take `r`.
- **Address width.** The published simulation shows a 16-bit address. Here
  the address is 10 bits, which is enough for 575.
- **Depth selection.** The published generator has only a 3-bit code-rate
  input and a 2-bit modulation select, and does not say how one of the
  several depths of a rate is chosen. The separate `depth_idx`, and the
  codes for 2/3 and 3/4, are this design's own choice. Only 0 = rate 1/2 is
  taken from the published waveform.
- **Memory and sequencing.** The published work only says that the generator
  supplies read and write addresses and a select line to a bit-addressable
  memory. The two-phase single buffer, the two modes, the handshake and the
  reset are this design's own choices.
- **Column count.** The standard also allows 12 columns. Like the published
  work, this design fixes the column count at 16.
- **Surrounding transceiver.** The randomizer, FEC encoder, mapper and
  (I)FFT of the transceiver are not part of this design.
- **Speed and size not checked.** The published implementation reports a
  Spartan-3E implementation at 82.88 MHz. No FPGA mapping or timing was
  done for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. The shared package
`tb/tb_wimax_ref_pkg.sv` computes the permutations straight from the
standard's floor/modulo formulas, so the division-free RTL is checked against
an independent model. The package also lists the permitted depths.

- `tb_qpsk_block`, `tb_qam16_block`, `tb_qam64_block` check every address of
  every permitted depth of their modulation. They also check a table of
  sample addresses for 96, 192 and 288 bits.
- `tb_kn_gen` checks every permitted configuration, with and without random
  stalls. It checks:
  - `kn`, `lin` and `last`;
  - that each block is a permutation;
  - that one address is made per clock;
  - the 192-bit 16-QAM sequence quoted above.
- `tb_addr_generator` checks the write and read address streams, the phases,
  `done`, refused configurations and ignored starts, in both modes.
- `tb_wimax_interleaver` runs the whole design at its default size. For each
  of the 19 configurations it:
  - interleaves a random block and checks it against the standard's
    interleaver;
  - deinterleaves a fresh block and checks it against the standard's
    deinterleaver;
  - deinterleaves the interleaved block and checks that the original
    comes back.

  It also checks the block timing. It counts every mechanism that runs (both
  modes, each modulation, input stalls, refused configurations, ignored
  starts) and fails if any count is zero.
- `tb_depth_rom`, `tb_column_counter`, `tb_row_counter` and
  `tb_interleaver_memory` check those units exhaustively or with random
  stimulus against software models.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -y rtl -y tb \
      rtl/wimax_il_pkg.sv tb/tb_wimax_ref_pkg.sv tb/tb_wimax_interleaver.sv \
      --top-module tb_wimax_interleaver -Mdir obj -o sim
    ./obj/sim

The packages are named explicitly; `-y` finds every module in its own file.
Replace the testbench name to run another one.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The full end-to-end run takes well under a second.

The RTL lints cleanly with `verilator --lint-only -Wall`, apart from one
warning. That warning is about the two assertions in `addr_generator`, which
use the asynchronous reset as their `disable iff` condition.
