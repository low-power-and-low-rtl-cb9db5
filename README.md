# Low-power, low-data-volume scan test hardware

Scan test loads every flip-flop of a chip through long shift registers. That
causes two problems. First, shifting toggles far more logic than normal
operation does, so power and current peaks during test exceed what the chip
was designed for. Second, the tester has to store and send every bit of every
pattern. This repository holds synthesizable SystemVerilog for four on-chip
schemes that attack one or both problems:

| Scheme | Attacks | Idea | Files |
|---|---|---|---|
| Scan Matrix | shift power | The scan cells form a matrix. Two token rings address one cell per cycle, and the cell stores the bit in a pre-latch, so nothing else toggles. | `rtl/sm_*.sv` |
| Cocktail random access scan | power, data, time | Every cell is addressable. Pseudo-random patterns are loaded as counted seeds, then later patterns by flipping only the cells that differ. | `rtl/ras_*.sv`, `rtl/cocktail_ras.sv` |
| Adaptive Encoding | data, time | A pattern is sent as its difference to the previous one, in variable-size packets. It is rebuilt in an on-chip memory and unloaded into many chains. | `rtl/ae_*.sv` |
| Multilayer Data Copy (MDC) | data, shift power | A decoder for many scan chains builds each slice (one bit per chain) from a stream of *copy* and *shift* commands. Copies repeat earlier bits, so neighbouring bits and slices match. | `rtl/mdc_*.sv` |

The four schemes are independent. `rtl/lpt_top.sv` places them side by side
at their main sizes, and they share only clock and reset. Each one keeps its
own tester-side and circuit-side ports, prefixed `sm_`, `ras_`, `ae_` and
`mdc_`. The circuits under test and the tester are outside the design. In the
testbenches they are replaced by small models.

All logic runs on one rising-edge clock `clk` with an asynchronous active-low
reset `rst_n`. The tester-side streams use a valid/ready handshake: a bit
moves in a cycle where both are high.

## Scan Matrix (`sm_scan_matrix`, `sm_smr`, `sm_ring_generator`)

**Organisation.** The R × C cells (default 41 × 40 = 1640 cells, enough for a
1636-flip-flop circuit) are arranged as R rows of C cells.

- Each row is a short scan path.
- The scan input `si` reaches the start of every row.
- A column ring puts a one-hot *SEL* on one column.
- A row ring puts a one-hot token on one row.

**Cell (`sm_smr`).** Each cell has a *pre-latch* and a *master*.

- When its SEL is low, the cell is a plain wire on the row's path: `so = si`.
- When its SEL is high, the cell drives its master value onto the path. If
  its row also holds the token, the pre-latch takes the incoming bit.
- Shifting writes only pre-latches. The master bits, which feed the circuit,
  hold still during the whole scan-in. This is the toggle suppression.
- The master's clock is gated outside the update and capture cycles. Here the
  gating is written as enables.

**Order and timing.** In shift cycle *t*, the cell at row `t mod R`, column
`t div R` takes `si`. That is the row ring advancing every cycle, and the
column ring advancing each time the row ring wraps. In the same cycle `so`
shows that cell's previous master value, read through the AND-OR of the row
outputs. So the responses of the previous pattern come out while the next
pattern goes in. After R·C shift cycles come:

- one *update* cycle: every pre-latch is copied into its master, and the
  pattern is applied;
- one *capture* cycle: the masters take the responses `d`.

`done` pulses, and `ready` returns. Cell (r, c) is bit `r*C + c` of `q` and `d`.

**Polarity.** A path of many pass-through cells is slow, so an inverting
buffer follows every `INV_EVERY` (4) cells of a row. Cells after an odd number
of inverters are *negative-polarity* cells. They store the inverse of what
arrives and drive out the inverse of their master, so stored and observed
values are the true ones. If a row has an odd number of internal inverters,
one more sits at its end.

The test shows that the cell outputs `q` never move during shift, and that
`so`, update and capture are correct. The one-hot property of both rings is an
assertion.

## Cocktail random access scan (`cocktail_ras` and `ras_*`)

**Addressing.** N cells (default 1636) are individually addressable. Each
cell is a flip-flop that loads:

- the datum `din`, when the decoder enables it and the write strobe `sclk_en`
  is high;
- the response `d`, on `capture` (capture has priority).

An 11-bit address register feeds a flat one-hot decoder. The register has two
modes:

- **Mode 1, count.** The address counts up once per cycle. A whole N-bit
  seed can therefore be written in N cycles, one bit per cell, with no
  address bits sent.
- **Mode 0, shift.** The tester shifts an address in, MSB first.

A 32-bit MISR compacts the N response lines. It uses polynomial
x³² + x²² + x² + x + 1, and input i feeds stage i mod 32.

**Test phases.** `ras_scan_controller` runs the whole test from one tester pin.

1. **SRST (segmented random phase).** For each of `num_seeds` seeds:
   - N cycles write the seed into cells 0…N-1, with the address register
     counting;
   - then `test_len` capture cycles follow. Each response becomes the next
     pattern, and the MISR observes every response.

   Seed and response length are run-time inputs.
2. **RAS (deterministic phase).** For each of `num_ras` patterns:
   - a 12-bit flip count is sent;
   - for each flip: 11 address bits (shifted), 1 datum bit, and one write
     cycle. That is AW + 1 tester bits and AW + 2 cycles per flip.
   - then one cycle in which the MISR samples the responses.

   The cells do **not** capture here (*test response abandonment*). The next
   pattern is coded as flips of the current *pattern*, not of the response.
   This keeps the flip counts small, and at most one cell changes per cycle.

`phase` reports `PH_IDLE`, `PH_SRST`, `PH_RAS` or `PH_DONE`. `done` stays
high until the next `start`.

**Cycle count.** A test takes
`num_seeds·(N + test_len) + Σ over patterns of (FCW + 1 + flips·(AW + 2))`
cycles. The testbenches check this exactly.

## Adaptive Encoding (`ae_system` = `ae_decoder` + `ae_pattern_memory`)

**Memory.** The pattern memory holds one whole pattern: N_BITS = 2048 bits as
128 blocks of M = 16 bits. M is also the number of scan chains. Pattern bit
*a* sits in block `a / M`, bit `a % M`. In the unload step, block *r* goes to
the chains in shift cycle *r*, so chain *j* receives bit `r·M + j`. After
reset the decoder writes zeros into every block. The first pattern is
therefore coded against an all-zero pattern. Each later one is coded against
the pattern before it.

**Stream format.** Every field is sent MSB first. For one deterministic
pattern:

```
header:  packets (8 bits) | AW = address field width (4 bits) | LW = length field width (4 bits)
packet:  difference address (AW bits) | length - 1 (LW bits) | data (length bits)
```

- The *difference address* counts the unchanged bits skipped since the end of
  the previous packet.
- The data bits are the positions to flip: 1 = flip.
- An encoder may merge two runs of changes separated by a few unchanged bits
  into one packet carrying zeros. This is cheaper than a second packet header.
- Zero-width fields are allowed. For example, AW = 0 when every packet
  follows the previous one directly.

**Decoding.**

- An adder accumulates the bit address.
- The block part of the address selects a memory block, and the offset part
  selects a flip-flop of a 16-bit buffer.
- Each data bit goes straight into its flip-flop.
- When the buffer reaches the last offset of a block, or the packet ends, the
  block is updated: it is read in one cycle and written back XOR the buffer
  in the next.
- During that write-back cycle `si_ready` is low. A tester sending one bit
  every second cycle, or slower, therefore never waits. A tester at the full
  clock rate sees one stall per block update.
- A long packet just continues into the next block.

When all packets are in, the memory is unloaded: 128 consecutive shift cycles
on 16 chains (`scan_out`, `scan_en`), then a one-cycle `capture`.

**Random mode.** With `random_mode` high while its bits arrive, a pattern is
only 16 seed bits. Chain *j* gets seed bit *j* in every shift cycle, and the
memory is not touched.

## Multilayer Data Copy (`mdc_decoder` + `mdc_decoding_buffer`)

The buffer has A = 100 flip-flops, one per scan chain. It is organised in
layers of decreasing group size: 100, 20, 4. Each size must divide the one
above it. The buffer supports two operations:

- **Shift** one raw bit in. The newest bit is `q[0]`.
- **Copy at layer i.** The last `GS[i]` bits loaded are repeated, so the
  buffer moves on by a whole group. A copy at layer 0 repeats the entire
  previous slice. After reset that slice is all zeros.

**Coding rule.** The decoder keeps `c`, the number of bits of the current
slice loaded so far. The *current layer* is the lowest-numbered layer whose
group size divides `c` (layer 0 when `c = 0`). It then reads the stream:

- `1`: Copy at the current layer; `c += GS[layer]`.
- `0`: try the next layer down. At the last layer, a `0` is followed by
  `GS[L-1]` raw bits, which are shifted in.

When `c` reaches A, the slice is complete. The chains shift once (`scan_en`,
with `slice` on the chain inputs), and the next slice starts. After
`CHAIN_LEN` = 67 slices (6700 cells, enough for a 6689-flip-flop design) one
`capture` cycle follows.

Example, on an 8-4-2 buffer: the 8-bit stream `000 01 1 1 1` is read as

- `0` at layer 0, `0` at layer 1, and `0` at the last layer (Shift);
- the raw bits `01`;
- copy at layer 2 (`1`), copy at layer 1 (`1`), copy the whole slice (`1`).

The result is two slices of `10101010`. Since a copy is executed in the cycle
its control bit arrives, the decoder takes one bit per clock. The only wait is
one cycle per pattern, while the last slice shifts. Copies keep neighbouring
chain bits, and consecutive slices, equal. That is where the shift-power
saving comes from. `copy_done`/`copy_layer` report each copy.

## Where this design departs from the scheme as published

- **Timing elements.** Latches and transistor-level cells are edge-triggered
  flip-flops with enables. This covers the Scan Matrix pre-latch, the
  half-clock ring cells and the RAS multiplexer cells. Clock gating is written
  as enables.
- **Scan Matrix.** The broadcast scan input, the AND-OR collection of row
  outputs and the row-end inverter are this design's choices.
- **Cocktail scan.**
  - The 12-bit flip count that closes each RAS pattern is this design's own.
    The published data-volume figures count only AW + 1 bits per flip.
  - The MISR width and polynomial are chosen here.
  - The address decoder is flat.
- **Adaptive Encoding.**
  - The 8-bit packet-count field is chosen here, so a pattern may use at most
    255 packets. The 4-bit width fields follow ⌈log2 log2 N⌉.
  - Field order and bit order, the bit-to-chain mapping, the memory clear
    after reset and the `random_mode` pin are choices.
  - The memory is a dedicated array rather than a reused system memory.
- **MDC.** The capture cycle, the end-of-pattern handshake and the buffer
  reset are choices. The scheme as published never stops the tester. Here
  the tester waits one cycle per pattern, so that no slice shift can meet
  the capture cycle.
- **Cocktail scan cycle count.** A flip costs AW + 2 cycles, as in the
  classic random access scan: the address, then the datum, then a separate
  write cycle. Published cycle counts for the scheme assume AW + 1.
- **Outside the design.** The circuits under test, the tester, the encoders,
  the test generators and the alternative small cell are not built.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `sm_scan_matrix` | `R`, `C`, `INV_EVERY` | 41, 40, 4 | rows, columns, cells per inverting buffer |
| `cocktail_ras` | `N`, `AW`, `FCW`, `W` | 1636, 11, 12, 32 | cells, address width, flip-count width, signature width |
| `ae_system` | `N_BITS`, `M`, `NPKT_W`, `HDR_W` | 2048, 16, 8, 4 | pattern bits, chains/block width, packet-count width, width-field width |
| `mdc_decoder` | `L`, `GS`, `CHAIN_LEN` | 3, '{100,20,4}, 67 | layers, group sizes (GS[0] = chains), slices per pattern |
| `lpt_top` | prefixed copies of the above | same | |

The defaults are sized for one benchmark per scheme. The matrix and the
random access scan hold s38417 (1636 cells). The pattern memory is 2K bits.
The MDC buffer and chain length hold b19_1 (6689 cells). Larger circuits
need larger parameters: s35932 (1728 cells) fits neither the default matrix
nor the default random access scan.

Other sizes come from changing the parameters. For example:

- a 42 × 42 matrix;
- `N_BITS = 8192` for an 8K-bit memory;
- `GS = '{250,50,5}` with a larger `CHAIN_LEN`.

Assertions check the constraints at elaboration, such as divisible MDC group
sizes.

## Files

- `rtl/lpt_pkg.sv`: the shared phase type of the RAS controller.
- `rtl/lpt_top.sv`: the top level.
- One file per module, named after it.

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- `tb/ae_tb_pkg.sv` is a reference packet encoder.
- `tb/mdc_tb_pkg.sv` is a reference MDC encoder that fills don't-care bits by
  the coding rule.
- `tb/sm_matrix_check.sv` drives one matrix of any size.
- `tb/tb_lpt_top.sv` runs all four schemes at their default sizes at once:
  - Adaptive Encoding: random-mode patterns, full-rate streams that stall,
    and packets spanning several blocks;
  - MDC: 6700-bit cubes at three care-bit densities;
  - Cocktail scan: 1636 cells with two seeds and five flip patterns;
  - Scan Matrix: three 1640-cell patterns.

  It counts every mechanism: stalls, random-mode unloads, multi-block
  packets, copies per layer, raw shifts, SRST and RAS cycles, and matrix
  shift, update and capture. It fails if one of them never occurred. It runs
  in about a minute.
- Four testbenches run the schemes at the per-circuit sizes of the
  evaluation by parameter override. Each uses a checker module that drives
  one instance of any size: `ae_check`, `mdc_check`, `ras_check` or
  `sm_matrix_check`.
  - `tb/tb_ras_workloads.sv`: the eight benchmark circuits of the Cocktail
    Scan evaluation, from 74 to 1728 cells, each with its own number of
    seeds and test length.
  - `tb/tb_ae_workloads.sv`: memories from 1K to 128K bits with 16, 256
    or 1024 chains, at several tester clock ratios.
  - `tb/tb_mdc_workloads.sv`: buffers 250-50-5, 600-60-6, 64-16-4, 36-9-3
    and 50-10-5 with the slice counts of the matching circuits.
  - `tb/tb_sm_workloads.sv`: matrices from 9 x 9 up to 42 x 42.

## Simulating

Verilator 5 with timing support is enough. Packages must come first on the
command line. For example, for the whole design:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lpt_pkg.sv tb/ae_tb_pkg.sv tb/mdc_tb_pkg.sv tb/tb_lpt_top.sv --top-module tb_lpt_top
./obj_dir/Vtb_lpt_top
```

A single block works the same way. This runs the matrix test on three sizes,
including one whose rows need the end inverter:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb tb/tb_sm_scan_matrix.sv --top-module tb_sm_scan_matrix
```

The testbenches initialise everything they read, so they also work on
two-state simulators with random initial values.
