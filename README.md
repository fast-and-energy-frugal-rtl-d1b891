# Bit-flip location test decompressor

Scan-based test of a core normally loads every test vector serially: a core
with M inputs and N vectors costs about N x M shift cycles, and every shift
ripples through all the core inputs, burning power for nothing. Consecutive
deterministic test vectors, however, tend to be very similar, because faults
in the same region of a circuit need the same lines set to the same values.
This design exploits that. The vector already held at the core inputs is
turned into the next one by flipping, one at a time, only the bits in which
the two differ. The tester sends only the positions of those bits. Each
position is a ceil(log2 M)-bit number, and on-chip a plain decoder turns it
into a flip of one cell.

If the whole test set needs W flips in all, loading it costs W x ceil(log2 M)
clock cycles and as many bits of tester memory, and the core inputs make
exactly W transitions. The gain over serial loading is N x M / (W x ceil(log2 M)).
For example, a core with 1664 inputs, 882 vectors and 4811 flips needs 52,921
cycles instead of 1,467,648, which is 27.7 times fewer. The test set is ordered
and its don't-care bits are filled off-line so that W is as small as possible.
That step is software and is not part of this RTL.

The scheme is the bit-flip location encoding of Sinanoglu and Orailoglu. The
RTL here is an independent implementation. Where the scheme leaves details open,
this implementation makes its own choices, and they are listed below.

## Structure

```
            shift_en                        +-------------+
               |                            |  toggle     |  core_in[M-1:0]
  tdi ---> correlation register ---code---> | decoder --> cells (XOR+FF) ---> core
           (L bits, LSB first)     ^        +-------------+
                                   |                           core_out
           enable generator ---dec_en                            |
           (one pulse per L shifts)                     MISR <---+
                                                         |
                                                  tdo <--+ (MSB of signature)
```

| module | role |
|---|---|
| `vc_test_top` | The wrapper around one core (or several cores that share it). It holds the decompression unit on the core inputs and the MISR on the core outputs. |
| `decomp_unit` | The correlation register, the enable generator, one of three decoders, and the toggle cells. |
| `corr_reg` | An L-bit serial shift register, loaded from `tdi`. |
| `dec_enable_gen` | A counter of shifts modulo L. It gives a one-cycle `dec_en` once per complete location. |
| `flip_decoder` | A flat L-to-M decoder with enable. |
| `tree_decoder`, `dec1x2` | The same decoder built as a tree of 1-to-2 decoders. |
| `pair_flip_decoder` | A half-size decoder plus pair selection by the LSB. |
| `toggle_cells` | M flip-flops with XOR feedback. These drive the core inputs. |
| `misr` | A multiple-input signature register for the core responses. It unloads serially on `tdo`. |
| `vc_pkg` | The decoder style enum and `code_width(M)` = max(1, ceil(log2 M)). |

## How a vector is built, cycle by cycle

The timing is what most needs understanding before the unit is driven.

1. The tester holds `shift_en` high and sends the L bits of a location, least
   significant bit first. Each bit enters at the top of the correlation
   register, which shifts towards bit 0. After L shifts, the first bit sent is in `code[0]`.
2. The enable generator counts the shifts. On the clock edge that shifts in the
   L-th bit, it raises `dec_en` for the following cycle. The decoder therefore
   sees only a complete, registered code. While a location is still arriving,
   the decoder is disabled, and no cell flips on a partial code.
3. During that enabled cycle, the decoder raises the flip strobe of cell `code`.
   That cell inverts at the end of the cycle. An assertion in `decomp_unit`
   checks that at most one cell flips per clock.
4. The same edge already shifts in the first bit of the next location, so
   locations can be sent back to back. `dec_en` is then a periodic pulse with
   period L.

As a result, W locations sent without gaps finish W x L + 1 cycles after the
first shift. The extra cycle is the final flip. It is paid once per run, not
once per flip. The tester may insert idle cycles (`shift_en` low) between
locations. The counter then simply waits, and a pending flip still happens
in the cycle after its last bit.

The first vector is built like any other. Reset clears all cells to zero, and
the first vector's ones are sent as flips. If the first vector is all zeros, it
is already in place after reset.

Codes from M to 2^L - 1 exist when M is not a power of two. They select no cell and act as no-operations.

The tester knows where each vector ends, because it knows how many flips each
vector needs. It raises `capture` in any cycle after the last flip of a vector
and before the first flip of the next one. In that cycle the MISR folds the core
outputs into the signature. With a gapless stream, that window is the L cycles
that follow the flip. After the test, `unload` shifts the signature out on
`tdo`, most significant bit first, with zero fill.

## The three decoder styles

`STYLE` (type `vc_pkg::dec_style_e`) selects how the decoder is built. All three
produce identical flip strobes, and the testbenches check all three against the same references.

- `DEC_FLAT` (default): one L-to-M decoder with enable, written as a comparison per output.
- `DEC_TREE`: L levels of `dec1x2` cells. The root takes `dec_en` and the MSB of
  the code. Each cell's two outputs enable two cells of the next level, which
  decode the next lower bit. The leaves are the strobes, in code order. A tree
  can be spread out next to the cells it drives, which eases routing for large M.
- `DEC_PAIR`: the LSB of the code is not decoded. An (L-1)-to-ceil(M/2)
  decoder selects the pair of cells 2j and 2j+1. Two gates per pair then pass the
  strobe to cell 2j when the LSB is 0, and to cell 2j+1 when it is 1. This
  halves the decoder at the cost of a few gates per pair. It needs L >= 2. With
  an odd M, the last pair has a single cell.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | The number of core inputs (toggle cells). 8 is the 3-to-8 example size. |
| `L` | `code_width(M)` | The location width. It is derived from M and is a localparam on the top. |
| `STYLE` | `DEC_FLAT` | The decoder implementation. |
| `N_OUT` | 8 | The number of core outputs and the MISR width. |
| `POLY` | `'h1D` | The MISR feedback taps, x^8+x^4+x^3+x^2+1 (primitive for N_OUT = 8). For another width, supply a suitable polynomial. |

For a real core, set `M` to its input count. Sizes from the published benchmark
results, all simulated in `benchmark_workload_tb`:

| circuit | M | L | flips W | shift cycles W x L |
|---|---|---|---|---|
| c3540 | 50 | 6 | 403 | 2418 |
| c5315 | 178 | 8 | 439 | 3512 |
| c6288 | 32 | 5 | 130 | 650 |
| c7552 | 207 | 8 | 851 | 6808 |
| s953 | 45 | 6 | 118 | 708 |
| s5378 | 214 | 8 | 415 | 3320 |
| s9234 | 247 | 8 | 344 | 2752 |
| s13207 | 700 | 10 | 971 | 9710 |
| s15805 | 611 | 10 | 1044 | 10440 |
| s38417 | 1664 | 11 | 4811 | 52921 |
| s38584 | 1464 | 11 | 2019 | 22209 |

Several cores can share one unit. Concatenate their inputs into one `core_in`
vector and send their flip streams one after the other. For example, s15805,
s38417 and s38584 together need M = 3739 and L = 12. The cost is that the cores
are tested one after another, which a single serial test input imposes anyway.

## Choices made in this implementation

The following points are design choices, not part of the scheme itself:

- the LSB-first bit order and the shift direction of the correlation register;
- the placement of the enable pulse, in the cycle after the L-th shift;
- the ability to pause between locations;
- the reset of all registers to zero, and the building of the first vector from that reset state;
- the treatment of unused codes as no-operations;
- in the tree decoder, the MSB at the root;
- in the pair decoder, the enable kept on the half-size decoder, and the AND gates used to select the cell within a pair;
- the MISR: its Galois structure, its polynomial, the `capture` and `unload`
  controls, and the unload order.

The following parts are not in this RTL:

- The core itself. Its inputs and outputs are ports of the top.
- The off-line ordering and padding of test cubes. A greedy minimum-weight
  Hamiltonian path over a graph whose edge weights count conflicting specified
  bits produces the order. Padding then fills each don't-care bit with a value
  from its column that adds no flip.
- The test power and area figures of the published results. They depend on the
  actual test sets and on a cell library.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `corr_reg_tb` | Shift contents against the bit history, at L = 3 and L = 11. It also checks LSB-first assembly. |
| `dec_enable_gen_tb` | The first pulse after 3 shifts and a period of 3. Under random pauses, it checks a pulse after exactly every L-th shift. |
| `flip_decoder_tb`, `tree_decoder_tb`, `pair_flip_decoder_tb` | Exhaustive tests at M = 8, 32, 45 and 50, including the spare codes. |
| `toggle_cells_tb` | Toggle behaviour, and that the output transitions equal the strobes. |
| `misr_tb` | A bit-by-bit reference MISR, serial unload, and detection of a single-bit error. |
| `decomp_unit_tb` | Six units: M = 8 and 45, each in all three styles. The test sets are random and correlated, and some runs have gaps and spare codes. Each cycle is compared with a queue-based reference. It checks W x L + 1 cycles and W transitions at the core inputs. |
| `vc_test_top_tb` | The end-to-end test for all three styles. It uses a five-vector example set: five test cubes, padded by the testbench itself, which give 6 flips. It checks 18 shift cycles plus one, every vector at capture time, and the signature, both in parallel and through `tdo`. It also checks that the core inputs change exactly 6 times. A plain 8-bit scan chain loading the same five vectors would change 78 times. |
| `vc_full_tb` | The same test on the top at its default parameters. |
| `benchmark_workload_tb` | The unit at the eleven benchmark sizes and the shared size. For each, it checks the exact published W, the cycle count, the transitions, the encoded bit volume, and the speed-up N x M / (W x L) against the published values. |

Published speed-ups are reproduced to within one unit in the second decimal.
The published values mix rounding and truncation.

## Simulating

With Verilator 5 (`--timing` is needed for the testbenches). Run from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vc_pkg.sv tb/vc_test_top_tb.sv \
          --top-module vc_test_top_tb -Mdir obj_top
./obj_top/Vvc_test_top_tb
```

Any other testbench is run the same way, with its own name. To lint the design:

```
verilator --lint-only -Wall -Irtl rtl/vc_pkg.sv rtl/vc_test_top.sv --top-module vc_test_top
```

Verilator reports two unused-signal warnings on `vc_test_top`. They concern the
correlation register contents and the shift phase, which `decomp_unit` brings
out for observation.
