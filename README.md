# Hybrid scan test decompression: compacted scan network + dictionary decoder

Scan test data for a full-scan circuit is mostly don't-care bits, and it has
to cross a narrow tester channel. This design cuts both the data volume and the
number of test clocks in two stages that sit on the chip:

1. **Compacted scan network.** Scan cells whose test values never conflict
   across the whole test set are put in one *group* and loaded with the same
   bit in the same clock. The scan path becomes a chain of groups, stitched
   with fan-outs (a small group feeding a larger one) and odd-input XOR gates
   (a large group feeding a smaller one). The scan depth drops from the number
   of cells to the number of groups.
2. **Dictionary decoder.** The compacted network is split into `m` balanced
   chains that are loaded in parallel. Each clock of those chains needs one
   `m`-bit *slice*. The tester sends a codeword per slice over a single pin:
   either a short index into an on-chip dictionary of frequent slices, or the
   slice itself.

Responses leave the chains into a multiple-input signature register (MISR).
The whole test interface is therefore one serial input, a few control pins and
the signature.

```
            +--------------------+      m       +-------------------------+      +------+
 ate_si --->| dictionary_decoder |--- slice --->| m x compacted_scan_     |----->| misr |--> signature
 scan_en -->|  decoder_control   |  slice_valid | network (one per chain) | m    |      |
            |  dictionary_logic  |------------->|  shift / capture        |----->|      |
            +--------------------+              +-------------------------+      +------+
                                                   ^ func_d       | cut_q
                                                   | (circuit under test, outside)
```

## Codewords and decoder timing

This is the part that sets the test time, so it is described exactly.

A codeword is a 1-bit prefix followed by a tail, sent most significant bit
first:

| prefix | tail | length | slice delivered |
|---|---|---|---|
| `1` | `IDX_W`-bit dictionary index | `1 + IDX_W` (8 by default) | `DICT[index]` |
| `0` | the `M`-bit slice itself | `1 + M` (129 by default) | the tail |

Bit `i` of a slice goes to scan chain `i`.

`decoder_control` has three states (prefix, index tail, raw tail), a shift
register for the tail and a down-counter of the tail bits still to come. In the
clock in which the *last* tail bit is on `ate_si`, `slice_valid` is high and
the slice is formed combinationally: the register contents, plus that bit,
passed through the dictionary or not. All chains shift on that same clock edge.
So a codeword of `L` bits costs exactly `L` clocks. No clock is spent per slice
beyond its codeword, there is no second clock domain, and there is no handshake
with the tester. The longest path runs from `ate_si` through the dictionary
multiplexer to the scan cell inputs.

`scan_en` low freezes the decoder (FSM, register and counter). The tester uses
that to insert capture cycles or to pause.

Example: with the defaults, a test pattern that needs two slices, both in the
dictionary, takes 16 clocks. If one of them is raw, it takes 8 + 129 = 137.

### The dictionary

`dictionary_logic` is a constant table with no storage and no clock:
`DICT_SIZE` words of `M` bits, read by the index. Its contents belong to the
test set. Offline, the slices of the test set are sorted by frequency. Slices
whose specified bits agree are merged, and the most frequent survivors become
the entries. Don't-cares left over are filled with 0. This selection is
software; it is not part of the RTL. Pass the resulting table in through the
`DICT` parameter of `hybrid_compression_top` (or of `dictionary_decoder`).
The default table holds only placeholder words, and it covers at most
16,384 bits (128 x 128). Bit `b` of entry `e` is bit
`b mod 32` of the `(b div 32 + 1)`-th output of a xorshift32 generator
(`s ^= s<<13; s ^= s>>17; s ^= s<<5`) seeded with `0x9E3779B9 ^ (e * 0x01000193)`.
The placeholder lets the design elaborate and be simulated without a real
test set.

## The compacted scan network

`compacted_scan_network` describes one network of `NCELLS` scan cells entirely
through parameters:

* `SRC[i][0..2]` lists up to three sources of cell `i`'s scan input. Each is a
  16-bit two's-complement code: another cell's index, `hdc_pkg::SRC_SI` (-1,
  the network's scan-in) or `hdc_pkg::SRC_NONE` (-2, unused). One source is a
  wire; three make a 3-input XOR. The table is a packed array, so that it can
  be passed per chain and replicated. `hdc_pkg::EXAMPLE_SRC` holds the example
  in readable form, and `hdc_pkg::EXAMPLE_SRC_PACKED` holds it as the
  parameter takes it. An elaboration-time assertion rejects an even number
  of sources. An even XOR fed with identical bits would output a constant 0 and lose the test
  value; an odd one passes the bit through.
* `INV` bit `i` marks an inverse-compatible cell: one whose required values are
  always the opposite of its group's. It gets an inverter on its scan input and
  another on its output. It stores the complement, and the rest of the network
  sees the group value.
* `SO_CELL` selects the cell that drives `scan_out`.

Each cell is a mux-D scan flip-flop. `shift_en` loads it from the network.
Otherwise `capture_en` loads the functional value `func_d[i]`. Otherwise it
holds. Scan cells have no reset.

The default parameters are a 13-cell example (cells F1..F13 are indices 0..12)
whose test cubes compact into five groups:

```
            +-> F11 -+
            +-> F6  -+-XOR-> F5 -> F13 -+
 scan-in ---+-> F2  -+                  |
            +-> F12 ---------> F9 -> F7 -+-XOR-> F4 -> F1 -> scan-out
            +-> F10 ---------> F3 -> F8 -+
 groups:   {F2,F6,F10,F11,F12} {F3,F5,F9} {F7,F8,F13}  {F4}  {F1}
```

Loading a cube takes five shift clocks. The first bit shifted in is the value
of the last group, {F1}; the fifth is the value of the first group. The
network's five test cubes therefore need 25 clocks, where a plain 13-cell chain
needs 65. Unloading works because the XORs are linear: captured responses that
differ within a group are folded together on their way to `scan_out`, and the
MISR sees that fold.

Grouping cells and ordering the groups is done offline, by colouring a conflict
graph: two cells conflict if some cube gives them opposite specified values.
Each colour is kept to an odd number of cells, and the groups are ordered by
size. Only the resulting `SRC`/`INV` tables enter the RTL.

In `hybrid_compression_top` each of the `M` chains is an instance of this
module with its own stitching: `CHAIN_SRC[c]`, `CHAIN_INV[c]` and `SO_CELL[c]`.
A real circuit's compacted network is split into `M` chains of equal depth,
padded with dummy cells where needed, so the chains differ from each other.
All chains have `NCELLS` cells; a chain that needs fewer can leave the rest as
dummy cells with an unused `func_d`. By default every chain is the 13-cell
example.

## MISR

`misr` is a `W`-bit (default 128, one bit per chain) internal-XOR signature
register. When `en` is high:

```
sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0) ^ d
```

The default polynomial is x^128 + x^7 + x^2 + x + 1. For other widths, set
`POLY`. `hybrid_compression_top` clocks the MISR on every chain shift while
`misr_en` is high. Keep `misr_en` low during the first load, because the chains
then shift out their unknown power-up contents.

## Top level: `hybrid_compression_top`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of decoder and MISR |
| `scan_en` | in | 1 | a tester bit is on `ate_si` this clock |
| `ate_si` | in | 1 | serial compressed test data |
| `capture_en` | in | 1 | all scan cells capture `func_d` (ignored while a slice shifts) |
| `misr_en` | in | 1 | fold chain outputs into the signature |
| `func_d` | in | `M x NCELLS` | functional next-state values from the circuit under test, `[chain][cell]` |
| `cut_q` | out | `M x NCELLS` | scan cell contents, to the circuit under test |
| `signature` | out | `M` | MISR contents |
| `slice_valid` | out | 1 | the chains shift this clock |
| `slice_from_dict` | out | 1 | the current codeword is an index codeword |

Parameters: `M` = 128, `DICT_SIZE` = 128, `IDX_W` = 7, `DICT` (placeholder),
`NCELLS` = 13, `CHAIN_SRC`/`CHAIN_INV`/`SO_CELL` (per chain, each the example
network by default) and `MISR_POLY`.
The benchmark configurations use M = 128 (s13207), 101 (s15850), 115 (s35932,
s38417) and 32 (s38584). All of them use a 128-entry dictionary with 7-bit
indices.

A test sequence per pattern is: stream the pattern's codewords with `scan_en`
high (pauses allowed), drop `scan_en`, pulse `capture_en` for one clock, and
stream the next pattern, which unloads the previous responses into the MISR.
After the last pattern, stream one more load and read `signature`.

The design was synthesised at its defaults. It has 1,928 flip-flops: 1,664 scan
cells, a 128-bit MISR and 136 in the decoder. The dictionary is a
16,384-bit constant table.

## How far it matches the published numbers

Test application time is the number of compressed bits, because one bit
arrives per clock. The published clock counts follow from that rule:

| circuit | chains | slices (vectors x ceil(depth/chains)) | index + raw codewords | clocks |
|---|---|---|---|---|
| s13207 | 128 | 108 x 2 = 216 | 216 + 0 | 1,728 |
| s15850 | 101 | 95 x 3 = 285 | 235 + 50 | 6,980 |
| s35932 | 115 | 28 x 7 = 196 | 183 + 13 | 2,972 |
| s38584 | 32 | 140 x 27 = 3,780 | 2,700 + 1,080 | 57,240 |

The index/raw splits are derived: they are the only integer solutions of
`8k + (1+m)(S-k) = clocks`. The fact that each one is an integer supports the
timing model above. `tb_table3_cycles` streams each mix through a decoder of
that width and checks the clock counts exactly. For s38417 (115 chains, 142
vectors of depth 830, 62,832 clocks) no integer split exists, so that count is
not reproduced.

The benchmark circuits, their test sets, their networks and their
dictionaries are not available. Those runs therefore use random slice contents
and check only delivery and timing.

## Design choices not fixed by the method

* Tail bit order (MSB first), slice bit `i` to chain `i`, and the state encoding.
* The `scan_en` qualifier for tester pauses, the separate `capture_en` and
  `misr_en` controls, and synchronous active-low reset.
* A slice is produced in the clock of its last codeword bit, with no pipeline
  register.
* An index at or beyond `DICT_SIZE` returns an all-zero slice.
* The MISR's width, form, polynomial and clear.
* Scan cell type: mux-D, shift over capture, no reset.
* All chains have the same number of cells (`NCELLS`), and XORs have at most
  three inputs.
* The test response leaves the chip as a parallel signature. No serial unload
  pin is built.

## Files

| file | contents |
|---|---|
| `rtl/hdc_pkg.sv` | FSM state type, prefix values, network source codes, placeholder dictionary bit |
| `rtl/decoder_control.sv` | codeword FSM, tail register, bit counter |
| `rtl/dictionary_logic.sv` | combinational dictionary |
| `rtl/dictionary_decoder.sv` | control + dictionary + output multiplexer |
| `rtl/compacted_scan_network.sv` | parameterised compacted scan network |
| `rtl/misr.sv` | signature register |
| `rtl/hybrid_compression_top.sv` | decoder, `M` chains, MISR |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_hybrid_compression_top.sv` | end to end at 12 chains, 16 entries, 13 patterns |
| `tb/tb_hybrid_compression_top_full.sv` | end to end at the defaults, 5 patterns |
| `tb/tb_table3_cycles.sv`, `tb/tb_table3_run.sv` | benchmark clock counts |

The end-to-end testbenches encode random patterns in the testbench, stream
them with random pauses, and check every scan cell after each load and
capture. They also run a gate-level reference of the example network and a
bit-level MISR model, and compare the final signature. They count each
mechanism: index and raw codewords, pauses, captures, XOR folding of unequal
responses, and MISR updates. A mechanism that never occurs counts as a failure.
The network testbench loads the example's five test cubes and checks every
specified bit. It also exercises inverse-compatible cells.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself, with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hybrid_compression_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/hdc_pkg.sv tb/tb_hybrid_compression_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for the other testbenches. `rtl/hdc_pkg.sv`
must come first, because the modules import from it. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/hdc_pkg.sv rtl/<module>.sv`.
