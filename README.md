# Symbolic cache: load values from the syntax of loads and stores

A load's value is usually not known until late in the pipeline: register
read, address generation, translation and a multi-cycle L1 access all come
first, and dependent instructions wait. The symbolic cache (SC) gives a load a
*speculative* value right after it is fetched, by indexing a small cache with
something that is already known at that point: the text of the instruction.

The idea rests on two properties of compiled code:

* A store and the load that later reads the same data usually name it the
  same way, as the same `displacement(base register)`. A register saved with
  `sw $31,64($sp)` is restored with `lw $31,64($sp)`.
* Neighbouring data is named by neighbouring displacements from the same
  base register (a procedure saves `$31,$fp,$18,$17,$16` at 64, 60, 56, 52,
  48 of `$sp`), so a cache line in this "symbolic" address space captures
  spatial locality just as a real cache line does.

So the SC is an ordinary set-associative data cache, except that it is
addressed by a *symbolic address* built from the base register ID and the
displacement. Every store writes its data into the SC under its symbolic
address, and a later load with the same syntax finds it there. The value is
only a prediction. The processor still performs the real load and checks the
value, so the SC keeps no coherence with the L1 cache.

This repository holds synthesizable SystemVerilog for the SC and its parts,
with self-checking testbenches.

## The symbolic address

```
 31     27 26       21 20      16 15                     0
+---------+-----------+----------+------------------------+
| 0 (5)   | P-color(6)| base (5) |   displacement (16)    |
+---------+-----------+----------+------------------------+
```

`lw $3,12($sp)` with P-color `010010` becomes `0x025D000C`
(`$sp` is register 29 = `11101`).

Two problems arise from using this as an address. The design handles each
with a simple mechanism.

### Procedure colouring (P-color)

Every activation of every procedure addresses its stack frame through
`$sp` with the same small offsets. A callee's saves therefore land on the
same symbolic words as its caller's and overwrite them. The caller's restores
then get the callee's values.

The fix is a global up/down counter, the P-color. It goes up on every call
and down on every return, and it is inserted into the symbolic address of
`$sp`-based accesses only. Other base registers get no colour, so globals and
heap data stay shared between procedures. The counter (`pcolor_counter`) is
6 bits wide by default and wraps around. The measured benefit saturates at 2
bits, so `PCOLOR_W` may be set to 2 or 4.

The colour is applied when the instruction is *fetched*. A store writes the
SC later, from the back end, after more calls or returns may have been
fetched. The symbolic address is therefore formed once, at the front end
(`fe_sym_o`), and the pipeline carries it along with the instruction.

### Index randomization

Most displacements are small. The bits just above the line offset are
therefore nearly always zero, and a plain index crowds a few sets.
`sc_index_hash` XORs those bits (from bit 6 up) with the same number of bits
from bit 16 up, i.e. the base register ID and, if the index is wide enough,
the low P-color bits:

```
index = sym[6 +: IDX_W] ^ sym[16 +: IDX_W]
tag   = sym[31 : 6+IDX_W]
```

With 64 sets this XORs bits 11:6 with bits 21:16. The example above then gets
index `011101`. At the default 8 KB, 4-way size there are only 32 sets, so
the XOR takes bits 20:16, the base register alone. There the P-color keeps
activations apart in the tag but not in the index. All activations' saves
then compete for the same sets (see `tb_sc_configs` below). With 64 or more
sets, colour bits reach the index as well. The tag keeps every bit above the
index field. Bits 16.. are among them, so the line is identified uniquely.

## Line fills and word alignment

This is the subtle part of the design. On a miss, the load goes on to the
memory hierarchy with its real address. The L1 line that holds the target
word is then fetched into the SC. But the target's position in the L1 line
(real address bits 5:2) generally differs from its position in the SC line
(symbolic address bits 5:2). The line must therefore be *shifted*, not
copied. `sc_line_align` places the target word at its symbolic offset, and
every other word keeps its distance from the target:

```
SC word j  <-  L1 word  j + (real_offset - symbolic_offset)
```

Example with 8 words per line, real offset 5, symbolic offset 2:

```
L1 line:  w7 w6 w5 w4 w3 | w2 w1 w0      <- w2..w0 do not fit: dropped
SC line:   -  -  - w7 w6 w5 w4 w3         <- SC words 7..5 stay unfilled
```

Words that fall off either end are dropped, and SC words with no source
stay invalid. There is no second L1 fetch to complete the line. Alignment is
at word (4-byte) granularity. Sub-word accesses use the word that contains
them, and byte selection is left to the processor. For this reason every
SC word has its own valid bit.

## Storage and replacement (`sc_array`)

* `SETS x WAYS` lines of `WORDS` 32-bit words, a tag per line and a valid
  bit per word. A line is present when any of its words is valid.
* Lookup: tag compare in the indexed set. A hit needs a tag match *and*
  a valid addressed word. The answer comes one clock after the request.
  A write in the same cycle is not seen.
* Store (every store): the enabled bytes are written. On a tag miss, the
  least recently used way (an invalid way first) is taken over and cleared,
  without fetching anything. A word becomes valid when all four bytes are
  written or when it was valid before.
* Fill: the masked words of the aligned line are written and made valid,
  taking over the LRU way on a tag miss.
* LRU is exact, kept as per-way ages. Lookups that match a tag, stores and
  fills count as uses. When a write and a lookup happen in the same cycle,
  only the write counts.

## The top level (`symbolic_cache`)

```
           call_i/ret_i ──> pcolor_counter ──┐
fe_base_i, fe_disp_i ───────────────────> sc_symaddr ──> fe_sym_o ──> (carried by the pipeline)
                                             │
                                      sc_index_hash ──> sc_array lookup ──> pred_hit_o, pred_data_o (+1 cycle)
st_sym_i, st_data_i, st_be_i ──┐
fill_sym_i, fill_real_addr_i,  ├──> sc_index_hash ──> sc_array write
fill_line_i ──> sc_line_align ─┘
```

| port group | direction | meaning |
|---|---|---|
| `call_i`, `ret_i` | in | one-cycle pulses from decode |
| `fe_valid_i`, `fe_is_load_i`, `fe_base_i[4:0]`, `fe_disp_i[15:0]` | in | a fetched load or store |
| `fe_sym_o[31:0]`, `fe_is_stack_o` | out | its symbolic address, same cycle |
| `pred_valid_o`, `pred_hit_o`, `pred_data_o[31:0]` | out | the prediction, one cycle after a load |
| `st_valid_i`, `st_sym_i`, `st_data_i`, `st_be_i[3:0]` | in | store update from the back end |
| `fill_valid_i`/`fill_ready_o`, `fill_sym_i`, `fill_real_addr_i`, `fill_line_i[16]` | in/out | line fill after a miss |
| `alloc_o`, `evict_o` | out | a write took over a way / replaced a valid line |

Only one write per cycle is possible. A store takes priority over a fill:
`fill_ready_o` drops and the fill must be held, stable, until it is accepted.
An assertion checks this. Reset (`rst_n`, asynchronous, active low)
clears the P-color, the valid bits and the LRU state.

Parameters (defaults): `SETS = 32`, `WAYS = 4`, `LINE_BYTES = 64`,
`PCOLOR_W = 6`, i.e. an 8 KB, 4-way SC with index randomization. This is
the organisation whose accuracy was found to approach that of a
fully-associative SC of the same size. `SETS` may be any power of two from 2 to
1024. The L1 line is assumed to be as long as the SC line.

## What is not here

* The processor around the SC: decoding of loads, stores, calls and returns,
  address generation, the check of the predicted value against the real
  one, and recovery from a wrong prediction. The ports above are where
  they connect. The SC is not corrected after a wrong hit. It is only
  updated by stores and by fills after misses.
* The L1/L2 memory hierarchy that supplies fill lines.
* Fetching two L1 lines to fill a whole SC line, or placing the overflow
  words in the neighbouring SC line. These were considered and rejected
  for giving little benefit, and only the partial fill is built.
* Choices made here without guidance: LRU replacement, per-word valid
  bits, store-miss allocation without fetch, byte-enable handling, the
  one-cycle lookup, the store-over-fill priority, the handshakes, wrapping
  of the P-color and the reset state.

## Expected accuracy

Published measurements of this organisation over ten SPEC95/SPEC2000
integer programs give roughly 70% correct load values from a 2 KB SC, and
about 72% from an 8 KB 4-way randomized SC. With six sizes from 16 to 512
lines, the SC beat a last/stride value predictor and memory renaming of
comparable storage, most clearly at the small sizes. These figures are not
reproduced here. The testbenches use synthetic programs.

## Files

| file | content |
|---|---|
| `rtl/sc_pkg.sv` | field positions, widths, `$sp` register number, types |
| `rtl/pcolor_counter.sv` | P-color up/down counter |
| `rtl/sc_symaddr.sv` | symbolic address formation |
| `rtl/sc_index_hash.sv` | XOR index, tag and word offset |
| `rtl/sc_line_align.sv` | word alignment of a fill line |
| `rtl/sc_array.sv` | tags, valid bits, data, LRU |
| `rtl/symbolic_cache.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_sc_configs.sv`, `tb/sc_frame_harness.sv` | save/restore pattern on five cache sizes |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, for the end-to-end test at the default size:

```
verilator --binary --timing --assert rtl/sc_pkg.sv rtl/*.sv \
    tb/tb_symbolic_cache.sv --top-module tb_symbolic_cache -Mdir obj -o sim
./obj/sim
```

`tb_sc_configs` also needs `tb/sc_frame_harness.sv`. Verilator may warn about
unused bits and about the assertion's use of reset. These warnings are
expected.

What the tests cover:

* `tb_symbolic_cache` (default size) runs three phases. First, three nested
  procedures save and restore at the same `$sp` offsets, and every restore
  must return the procedure's own value. Second, a global load misses, its
  line is filled around the target word, and the neighbouring symbolic words
  must hit with the memory contents while the word beyond the fitted part
  must miss. Third, 3000 random calls, returns, loads and stores run, and
  every hit must equal the last value stored or filled to that symbolic word.
  Each mechanism must occur at least once: hit, miss, fill, partial fill,
  eviction, fill held back by a store, coloured stack access. The prediction
  latency of one cycle is checked on every load.
* `tb_sc_configs` shows the capacity effect described under index
  randomization. At 32 sets, only the 4 innermost of 8 nested frames
  survive. At 64 and 128 sets, all 8 do.
* The unit testbenches compare against independent models: arithmetic for
  the address fields, a shift-and-place loop for the alignment, and a
  time-stamp LRU cache model for `sc_array`.
