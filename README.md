# A testable ternary CAM block

A ternary content-addressable memory (TCAM) answers the question "which stored
words match this key?" in one step. Each stored bit can be 0, 1 or "don't
care" (X), and every word is compared with the key at once. Routers use this for
longest-prefix and classification lookups. Because every word is compared at
once, a search can match several words, so behind the array sit a
**multiple-match resolver** (MMR), which keeps only the highest-priority match,
and a **match address encoder** (MAE), which turns that match into an address.

Testing such a device is expensive. It has millions of match-line discharge
paths, and a resolver and encoder that no RAM test touches. This RTL models one
TCAM block together with the scan chains and multiplexers that let those parts
be tested back to front:

1. the encoder is tested from a scan chain;
2. the resolver tree is tested first node by node, then as a whole;
3. once both are trusted, the array is tested through ordinary searches, with
   the returned addresses serving as a compact result.

The default configuration is one block of 256 words of 144 bits, resolved by
16-input MMR nodes in two levels. Its first 36 bits form a pre-search segment
that gates the rest.

## Organisation

```
 cmd ──► tcam_ctrl ──► tcam_array ──ml──► mlsa_latch ──► Mux-1 ──► mmr_tree ──grant──► Mux-3 ──► mae ──► address
            ▲          (wl_decoder,                          ▲          │  │               ▲
            │           tcam_word_cmp)              scan_chain_a        │  └─grant_all─► scan_chain_b
            └──────────── match_found, mmd, address ◄───────────────────┘      (Mux-2)        │
                                                                                     scan_out ◄┘
```

| file | part |
|---|---|
| `rtl/tcam_pkg.sv` | default sizes, cell code, command type, tree geometry functions |
| `rtl/tcam_word_cmp.sv` | comparison logic of one word, pre-search and main match lines |
| `rtl/wl_decoder.sv` | address decoder / word lines |
| `rtl/tcam_array.sv` | storage, read, write, parallel search |
| `rtl/mlsa_latch.sv` | match-line sense latches |
| `rtl/mmr_node.sv` | one P-input resolver node |
| `rtl/mmr_tree.sv` | the resolver tree, with Mux-1 and node isolation |
| `rtl/mae.sv` | match address encoder |
| `rtl/scan_chain_a.sv` | scan chain a (SC-a) with the test-bus multiplexers (Mux-TB) |
| `rtl/scan_chain_b.sv` | scan chain b (SC-b) with its capture/shift multiplexers (Mux-2) |
| `rtl/tcam_ctrl.sv` | read/write/search controller that returns every match in turn |
| `rtl/tcam_top.sv` | the block; holds Mux-3 |

## The ternary cell and the match line

Each cell stores two bits, BL1 and BL2. A search drives two search lines, SL1
and SL2, per column with the same code:

| value | BL1/SL1 | BL2/SL2 |
|---|---|---|
| 0 | 0 | 1 |
| 1 | 1 | 0 |
| X | 0 | 0 |
| unused | 1 | 1 |

A cell pulls its word's match line low when `(SL2 & BL1) | (SL1 & BL2)`. This is
deliberately not an XOR: a stored X or a searched X turns both paths off, so it
never mismatches. A word matches only if no cell pulls its line down.

The commands carry the two bit vectors directly (`cmd_d1` = BL1 or SL1,
`cmd_d2` = BL2 or SL2), so every storage node can be written on its own, as RAM
tests need. `tcam_pkg::tern(value, care)` gives the code for one bit.

The match line is split. Bits [35:0] form a pre-search line. The main line over
bits [143:36] is precharged only when the pre-search matched. A word that
misses in its first 36 bits therefore never evaluates the remaining 108, which
is where a real array saves most of its search energy. Logically the result is
the same as one long match line. Which 36 bits form the pre-search segment is
this design's choice.

## The resolver tree

Resolving 256 lines in one piece is impractical, so 16 L1 nodes each resolve 16
lines. A single L2 node resolves the 16 "match found" signals of the L1 nodes.
Its one-hot output is the **enable** of the L1 nodes, so only the
highest-priority L1 node with a match passes anything to the encoder. Address 0
has the highest priority. For example, if addresses 3, 15 and 240 all match:

* L1 node 0 and L1 node 15 both report a match;
* the L2 node enables only node 0;
* node 0 passes address 3.

Each node also reports multiple-match detection (MMD). The tree's MMD is the
OR over all nodes.

Raising `N_WORDS` to another power of `MMR_P` adds levels automatically: 4096
words gives 3 levels and 65 536 gives 4. All per-level vectors are flattened
level by level. Level k takes bits `[level_off(k) +: level_width(k)]`, with
`T = chain_len(N, P)` bits in total, which is 272 at the defaults.

## Returning every match

Most of the array tests need *all* matching addresses of a search, not just
the first. The match-line latches hold the search result. In each following
cycle the tree picks the highest remaining match, the encoder gives its
address, and that latch bit is cleared. The controller keeps going while MMD
says more than one match is left. The results stream out on `res_*`, one per
cycle, with `res_more` high on all but the last. A search with no match gives
a single result with `res_hit = 0`.

Timing, counted from the clock edge that accepts a command (`cmd_valid &&
cmd_ready`):

| command | result | ready again |
|---|---|---|
| write | array written on the next edge | after 2 cycles |
| read | `rd_valid`, `rd_q1/rd_q2` after 2 edges | after 2 cycles |
| search, k ≥ 1 matches | results on edges 3 … k+2 | after k+2 cycles |
| search, no match | one no-hit result on edge 3 | after 3 cycles |

A command must be held until it is accepted, and an assertion checks this.
These latencies are this design's choices. The circuit it is modelled on uses
an asynchronous four-state machine (idle, read, write, search). Here that is a
synchronous machine with the same states plus a result state.

## Test structures and how to drive them

| test | `mux1_sel` | `node_test` | `mux_tb` | `mux2_sel` | `mux3_sel` | stimulus | observe |
|---|---|---|---|---|---|---|---|
| normal operation | 0 | 0 | – | – | 0 | commands | `res_*`, `rd_*` |
| encoder | – | – | – | 1 (shift) | 1 | `scb_in` | `mae_addr` |
| resolver nodes | 1 | 1 | 0 (parallel) | 0 capture, then 1 shift | 0 | `tb_in` | `scb_out` |
| resolver full tree | 1 | 0 | 1 (serial) | – | 0 | `tb_in` | `mae_addr` |

A multiplexer in position "a" is encoded as 0 and position "b" as 1.

**Encoder test.** Clear SC-b with `scb_clr`, then shift a single 1 followed by
zeros (`scb_en`, `mux2_sel = 1`). After shift j the encoder must show address
j. This takes n shifts. With SC-b all zero, the encoder's precharged outputs
read all ones.

**Node test.** SC-a holds one register per input of every node. With `mux_tb =
0`, every 16-bit segment loads from the shared 1-bit test bus `tb_in`, so all
17 nodes receive the same vector. The tree is cut and every node enabled. Shift
in 1s: they enter at each node's lowest-priority input (bit 15) and move
towards bit 0. After k shifts every node must grant input 16−k. Capture all
node outputs into SC-b (`mux2_sel = 0`, one `scb_en` cycle), then shift them
out of `scb_out`. The first bit out is the last register.

**Full-tree test.** With `mux_tb = 1`, SC-a is one serial chain. It starts at
L1 input 255 and runs down to L1 input 0, then on through the L2 segment. The
order of the upper levels is this design's reading of the structure. With the
tree reconnected, each new 1 must move the encoded address one step towards 0:
255, 254, …, 0, which is n+1 patterns.

**Array tests.** In normal mode, two tests run through ordinary commands:

* the intra-cell test fills every 8-bit logical column of word a with a. It
  then searches each column for each value with the other columns masked, and
  repeats with complemented data.
* the inter-cell test writes alternating all-0/all-1 words and then all-zero
  words. It searches with walking-1, all-0 and all-1 keys.

The returned addresses locate faulty rows. The XOR of an expected and an
unexpected address gives the faulty bit within a column.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.
`tb/tb_tcam_top.sv` runs the whole flow above on the default 256 × 144 block. It
checks every returned address against a reference copy of the stored words. It
also checks the operation counts against the expected formulas:

* n encoder shifts;
* T·(p+1) node read-out shifts;
* n+1 full-tree patterns;
* 2n + 4n writes;
* 2n·l/log2 n intra-cell searches;
* 6l walking-bit inter-cell searches plus six all-0/all-1 searches;
* 4n inter-cell returned addresses.

It also checks the cycle count of every write and search. It counts
multiple-match searches, no-match searches, pre-search gating, reads, captures
and both scan-chain modes, and fails if any of them never happened. It
finishes in about a second of simulation time.

`tb/tb_tcam_diag.sv` exercises the fault-location part of the intra-cell
test. It uses the 16-word × 16-bit configuration with 4-bit logical columns
and, from the testbench, forces one cell's discharge term to model a single
transistor that is stuck open (SOP) or stuck on (SON). One fault is injected
at a time, of one of six kinds: SOP on the BL1 or BL2 path, SON on the BL1 or
BL2 path, or SON on the SL1 or SL2 path. The testbench then runs the
diagnosis:

* an unexpected address u in the search for value a is a stuck-open fault at
  relative bit log2(a XOR u) of word u;
* a missing expected address is searched again with one column bit masked at a
  time, which locates a stuck-on BL transistor;
* a word that still fails is located by a binary search in which parts of the
  stored word are masked, which finds a stuck-on SL transistor.

Thirty random faults are each reported with exactly the right kind, word and
bit, and a fault-free run reports nothing.

To run the end-to-end testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tcam_pkg.sv tb/tb_tcam_top.sv --top-module tb_tcam_top
./obj_dir/Vtb_tcam_top
```

The testbenches include `tb/tb_check.svh` by the path `tb/…`, so run
Verilator from the directory that holds `rtl/` and `tb/`. Other sizes are set
through the parameters of `tcam_top`: `N_WORDS` (a power of `MMR_P`),
`WORD_BITS`, `MMR_P` and `PRE_BITS`.

## What is modelled and what is not

* Storage is flip-flops that reset to X in every cell. The original cell is
  dynamic, with no reset and no modelled retention or refresh.
* The analog parts are reduced to their logic function: the current-mode
  match-line sense amplifier, the bit-line sense amplifier, the line drivers and
  the delay chains that time them. The dummy rows used for sense timing are
  absent.
* The encoder is written as static logic with the same result as its
  precharge/pull-down ROM.
* Programmable priority is not built; priority is fixed by address.
* Not built: redundancy and repair, banking and clock gating, a standard test
  access controller, and an on-chip BIST engine that would run the test flow.
  The test flow is run from outside the block, here by the testbench.
* The test structures give observability. They do not inject faults.
  `tb_tcam_top` runs the test algorithms on a fault-free block and checks that
  they report nothing. Faults exist only in `tb_tcam_diag`, which forces them
  from outside the RTL.
* The storage nodes are meant to be covered by an ordinary DRAM (or SRAM)
  march test. The separate BL1/BL2 write and read paths allow that, but no
  march test is included; the testbenches check reads with random data only.
* Only the intra-cell diagnosis is run against injected faults. The
  inter-cell test is run fault-free only.
* Coarse synthesis of the full-size array and top module is slow, because of
  the 256 × 144 × 2 storage bits and the 256-way read multiplexer. Lint and
  elaboration are fast.
