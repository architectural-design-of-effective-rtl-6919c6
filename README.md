# 6x6 edge-preserving median filter with DMR error correction

A median filter removes salt-and-pepper noise. A large window removes more noise
and processes more pixels per operation, but it blurs edges: one median replaces a
big area. This filter takes a 6x6 block of 8-bit pixels (36 pixels) per operation,
but does not compute one 36-pixel median. It splits the block into four 3x3
windows and computes four independent 9-pixel medians. Each median then replaces
the nine pixels of its own quadrant. Throughput is that of a 6x6 filter, and edge
behaviour is that of a 3x3 filter.

Three further ideas are built around the four 3x3 filters:

* **Streaming row sort with padded multiplexers.** The pixels of a window are sent
  one per clock. The multiplexers pad the stream with all-ones and all-zero words,
  so a single AND gate and three comparators sort each row of three as it arrives.
* **Data-driven clock gating.** Every FIFO and SISO register clocks each 4-bit
  nibble only when the new nibble differs from the stored one. The padding words
  and repeated medians therefore cost no switching.
* **Double modular redundancy (DMR) with correction.** Every window is filtered by
  two identical modules. A true median is always one of the window's own pixels.
  A module whose result matches none of the nine pixels must have been hit by a
  soft error, and its result is discarded. The other module's result goes out.

## Structure

```
 pix_in[6][6] ──► block register ──► four 3x3 windows (lane 0 TL, 1 TR, 2 BL, 3 BR)
                                         │
                   control_unit ──sel,E1──► mux_unit  (MUX A + MUX B per lane)
                        │                    │ p[l], q[l]
                        │ E2, med_load       ▼
                        ├──────────► median9_filter (module 1) ─┐
                        │            median9_filter (module 2) ─┤ per lane
                        │ dmr_load                              ▼
                        ├──────────────────────────────► dmr_corrector
                        │ E3, E4                                │
                        └──────────────────────────────► siso_out: SISO(n) ─► SISO(n)a ─► pix_out[6][6]
```

`median9_filter` = `row_sort_unit` (FIFO1, FIFO2, AND gate, comparators CU1–CU3,
two pipeline ranks, SISO a–i) + `median9_network` (comparators CU4–CU13) + a
median register.

## How one window is sorted

This is the least obvious part of the design.

### MUX padding

For window pixels Z0..Z8 (row-major), the two 9:1 multiplexers of a lane output:

| sel | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  |
|-----|----|----|----|----|----|----|----|----|----|
| p (MUX A) | Z0 | Z1 | FF | Z3 | Z4 | FF | Z6 | Z7 | FF |
| q (MUX B) | 00 | 00 | Z2 | 00 | 00 | Z5 | 00 | 00 | Z8 |
| p & q     | 00 | 00 | Z2 | 00 | 00 | Z5 | 00 | 00 | Z8 |

### Delay line and row comparators

Bus `p` enters a two-register delay line: FIFO1, then FIFO2. At select 2, 5 and 8,
three values are available together:

* FIFO2 holds the first pixel of the row.
* FIFO1 holds the second.
* `p & q` is the third.

Three comparators sort that triple. CU1 sorts FIFO1 against FIFO2. CU2 sorts the
AND output against CU1's low output, so CU2's low output is the row minimum. CU3
sorts CU2's high output against CU1's high output, giving the middle and the
maximum. The sorted row passes through two pipeline ranks of three registers
(`LATCH_STAGES`). A strobe marking the rows of select 2, 5 and 8 travels with it.
The row is then shifted into three chains of three storing registers
(a→d→g, b→e→h, c→f→i), with a, b and c taking the minimum, middle and maximum.
Three clock edges after select 8, the nine storing registers hold the window as
three sorted rows:

| name | a0 | a1 | a2 | a3 | a4 | a5 | a6 | a7 | a8 |
|------|----|----|----|----|----|----|----|----|----|
| row / rank | 0 max | 0 mid | 0 min | 1 max | 1 mid | 1 min | 2 max | 2 mid | 2 min |

### Median network

With the rows sorted, the median of the nine values is the median of three values:

* the smallest of the row maxima (CU4, CU5);
* the median of the row middles (CU7, CU8, CU9);
* the largest of the row minima (CU10, CU11).

Comparators CU6, CU12 and CU13 take the median of those three. That is 10
comparators, and 13 per module with the row comparators. The network is
combinational and is captured in the median register on `med_load`.

The original numbering of comparators 4–13 is kept. Two connections differ from
the original sorting network, whose printed wiring does not always produce the
median:
* CU9 compares h7 with h8.
* CU6 compares l5 with l9.

The network delivers only the median. It is not a full sort of the nine values.

## Error correction (DMR)

`dmr_corrector` performs these steps for each module:

1. It compares the module's median with each of the nine window pixels: bitwise
   XNOR, then AND over the 8 bits.
2. It ORs the nine results into a match bit.
3. On `dmr_load`, it stores the median if the match bit is set, and zero otherwise.
4. It ORs the two stored values to give the corrected median.

What this does:
* It corrects any upset that leaves one module with a value that is not a pixel
  of the window.
* It does not detect an upset that turns a median into another pixel of the same
  window.
* If both modules fail, the output is 0.
* If both modules produce different window pixels, the OR of the two is meaningless.

`dmr_match1` and `dmr_match2` report the match bits of the last block for each lane.
To make an upset happen in simulation, set bits in `seu_mask1`/`seu_mask2`. Those
bits are inverted in the module's median register when it loads. Tie both to zero
in normal use.

## Clock gating

`gated_fifo` is an 8-bit parallel-in/parallel-out register built from two 4-bit
groups (LSB and MSB). Each group has its own latch-based clock-gating cell
(`clock_gate`). The cell opens when the stage enable is high and some bit of the
new nibble differs from the stored one (XOR per bit, OR over the nibble). The
following registers are gated this way:
* FIFO1 and FIFO2;
* the pipeline ranks;
* the nine storing registers;
* both SISO ranks.

The only ungated registers are the input block register, the median and DMR
registers, the row strobes, the control unit and `out_valid`.

The original circuit produces the gated clock with a flip-flop. Here a standard
latch-and-AND gating cell is used, so the gated edge coincides with the system
clock edge. The latch inside `clock_gate` is intentional. Physical design needs
to treat `gclk` as a generated clock.

## Control and timing

`control_unit` runs a fixed 19-cycle schedule per block, following the original
budget of 9 + 8 + 1 + 1 clock edges:

| cycles after accept | phase | signals |
|---|---|---|
| 1–9   | MUX/FIFO | E1 = E2 = 1, sel = 0..8 |
| 10–17 | sorting (SORT_EDGES = 8) | last row crosses the pipeline ranks in cycles 10–11; med_load in cycle 12, dmr_load in cycle 13; the rest is slack |
| 18    | SISO(n)  | E3: all four corrected medians loaded together |
| 19    | SISO(n)a | E4: copied to the output rank |
| 20    | —        | out_valid pulses; pix_out and medians valid |

The sorting network settles within one clock. The remaining sorting cycles keep
the original timing budget and leave slack for a slower implementation.
`SORT_EDGES` (top parameter, `LATCH_STAGES`+2 .. 16) shortens or lengthens this
phase.

## Top-level interface (`median6x6_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid / in_ready | in / out | 1 | block accepted on a rising edge when both are high; in_ready is low for the 19 busy cycles |
| pix_in | in | [6][6] x 8 | input block, `pix_in[row][col]` |
| seu_mask1, seu_mask2 | in | [4] x 8 | soft-error injection per lane (normally 0) |
| out_valid | out | 1 | one-cycle pulse, 20 cycles after acceptance |
| pix_out | out | [6][6] x 8 | each 3x3 quadrant filled with its window median; held until the next result |
| medians | out | [4] x 8 | the four medians (SISO(n)a) |
| dmr_match1/2 | out | 4 | per lane: module 1/2 median found among the window pixels |

Blocks are not overlapped: one 36-pixel block every 20 cycles, at most. An image
is filtered by sending its 6x6 tiles one after another.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `median_pkg` | pixel type, sizes, phase enum |
| `median6x6_top` | the whole filter |
| `control_unit` | the sequencer |
| `mux_unit` | the multiplexers, using `mux9` |
| `median9_filter` | one 3x3 median module |
| `row_sort_unit` | the row sorter |
| `median9_network` | the median comparator network |
| `cmp_swap` | a compare-and-swap unit |
| `dmr_corrector` | the DMR corrector |
| `siso_out` | the output ranks |
| `gated_fifo` | the clock-gated register |
| `clock_gate` | the gating cell |

`tb/` holds a self-checking testbench `tb_<module>` for each block. Each prints
`TB_RESULT checks=N failures=M`. `tb_image_workload` runs image data through the
full filter.

## Simulating

With Verilator 5, for example for the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/median_pkg.sv \
          tb/tb_median6x6_top.sv --top-module tb_median6x6_top -o sim
./obj_dir/sim
```

The same command works for any other testbench. Substitute its name in both places.
The package must be read first.

The tests compare every result with an independent software sort:
* `tb_median6x6_top` runs the full-size design, with default parameters, through
  34 blocks. It checks the 19-cycle busy time and 20-cycle latency, the
  request held off while busy, corrected soft errors in module 1 and in module 2,
  the zero output when both modules are hit,
  gated FIFO nibbles and a gated SISO on a repeated block.
* `tb_image_workload` filters a 6x6 block of a natural-image segment. It also
  filters a 12x12 step-edge image with salt-and-pepper noise, and checks that the
  noise is removed and the edge kept.

Concurrent assertions (run with `--assert`) check that the control unit's stage
enables never overlap, that the select stays within 0..8, and that `out_valid`
only occurs while the filter is idle.

The clock-gated registers use an asynchronous reset. A testbench must apply a real
falling edge on `rst_n` for them to reset; the existing testbenches do.

## Where this implementation departs from the original, and what it adds

* The two corrected connections of the median network (see above).
* A latch-based clock-gating cell instead of a flip-flop-generated gated clock.
* The original puts pipeline "latches" between the row comparators and the
  storing registers. They are built as two ranks of three edge-triggered
  registers, the arrangement the original describes in detail. It also quotes a
  total of 18 latches, which this arrangement does not reach.
* These parts are this implementation's own; the original leaves them
  unspecified:
  * the select counter and the exact position of `med_load`/`dmr_load` inside the
    sorting phase;
  * the in_valid/in_ready handshake and the input block register;
  * the reset style;
  * the quadrant numbering;
  * the SEU injection ports.
* A DMR module that does not match loads zero rather than keeping its old value.
* Only the configuration with four 3x3 windows is built. A 9x9 (81-pixel) variant
  is mentioned as an extension but is not built: it would need nine lanes instead
  of four, and `LANES` is fixed in `median_pkg`.
