# GEA motion-estimation core

A block-matching motion estimator for video encoders. It finds, for one 16x16 block
of the current frame, the best-matching 16x16 block of the reference frame within a
search range of [-16,+15] pixels in each direction. It gives a result close to full
search at a fraction of the hardware, because it uses the **global elimination
algorithm** (GEA):

1. For every one of the 32 x 32 = 1024 search positions, compute a cheap *subsampled*
   SAD (SSAD). The block is cut into sixteen 4x4 subblocks, each reduced to the sum of its
   pixels. SSAD is the sum of |current subblock sum - candidate subblock sum| over the
   sixteen subblocks. It is a lower bound of the true SAD.
2. Keep the M = 7 positions with the smallest SSAD.
3. Compute the true SAD (sum of absolute pixel differences) for those 7 positions only.
4. The position with the smallest SAD is the motion vector.

Unlike successive-elimination schemes, no decision depends on intermediate results:
every macroblock takes exactly the same number of cycles (1637), the scan is plain
raster order, and no initial guess is needed. The result equals full search whenever
the full-search winner is among the 7 best SSADs. That is the usual case for natural
images, but it is not guaranteed.

## Data flow and schedule

```
 current-block RAM (4 x 16x32) ---------------------------------+----------------+
        |                                                       |                |
        +--> MUX A --> systolic part --+--> csum registers --> MUX B --> SAD tree --+--> comparator tree
 search-area RAM (16 banks x 144x8)    |  (16 subblock sums)       |   (16 |a-b|,   |    (7 smallest SSADs)
        |--> mux network 1 --> MUX A   +--> rsum ----------------> MUX C   adder tree) |
        +--> mux network 2 ------------------------------------> MUX C             +--> SAD accumulator
                                                                                          (final MV, SAD)
 control unit: addresses, selects, valid flags, MVs for all of the above
```

Macroblock schedule, in cycles after `start` (N = 16, P = 16, M = 7):

| phase | cycles | what happens |
|---|---|---|
| current block | N = 16 | the 16 columns of the current block go through the systolic part; their 16 subblock sums are captured in the csum registers |
| search pass | 2P(2P+N-1) = 32 x 47 = 1504 | for each row of search positions (top to bottom), 47 search-area columns of 16 pixels stream through the systolic part. Once 16 columns are in, each new column completes one search position. The SAD tree turns csum and rsum into its SSAD, and the comparator tree takes one SSAD per cycle |
| drain | 3 | the last SSADs reach the comparator |
| SAD pass | M x N = 112 | for each of the 7 candidates, 16 cycles. Each cycle the SAD tree gets one current-block column and one candidate column (16 pixel pairs). The accumulator adds the 16 column SADs and keeps the best candidate |
| finish | 2 | last accumulation, then `done` |

Total: N + 2P(2P+N-1) + MN + 5 = 1637 cycles per motion vector. At 30 CIF frames per
second (396 macroblocks per frame) this needs a 19.45 MHz clock.

### The bubble cycles

The systolic part is a sliding window of 16 columns. Its outputs are only meaningful
after 16 columns of the *same* row of search positions have entered. The first 15
columns of each row therefore give meaningless sums. The control unit marks these
cycles invalid, and the comparator then takes 0xFFFF instead of the tree output. That is
larger than any real SSAD (at most 16 x 4080 = 65280), so an invalid cycle never
displaces a stored candidate. These 15 x 32 = 480 bubble cycles per macroblock are part
of the fixed schedule.

## Blocks

| module | role |
|---|---|
| `gea_me` | top level: the whole core |
| `control_unit` | phase sequencer, address generators, pipeline-aligned control flags |
| `sram_search_area` | 16 banks (RAM00..RAM15) of 144 x 8 bits; one column of 16 rows per cycle |
| `sram_current_block` | 4 banks of 16 x 32 bits, one shared address; one block column per cycle |
| `sram_sp` | single-port synchronous RAM used by both memories |
| `mux_network` | rotator that puts the 16 bank outputs in row order (two instances) |
| `operand_muxes` | MUX A (systolic input), MUX B and MUX C (SAD-tree operands) |
| `systolic_part` | four 4-row units: 4-pixel column adder, 16-stage shift register, four 4-column adders; 16 subblock sums |
| `csum_registers` | the current block's 16 subblock sums |
| `sad_tree` | 16 absolute-difference units and a 4-level adder tree |
| `compare_tree` | keeps the M smallest SSADs and their MVs, without sorting |
| `sad_accumulator` | adds column SADs, keeps the minimum SAD and its MV |
| `gea_pkg` | pixel width and width helper functions |

### Search-area memory organisation

The search area is 47 x 47 pixels: the block position plus [-16,+15] in both
directions, plus 15. Row y is stored in bank y mod 16, at word (y div 16) x 48 + c. So
any 16 vertically adjacent pixels of one column lie in 16 different banks and can be
read in one cycle. For a window whose top row is t, bank k reads band t div 16 when
k >= t mod 16, and the next band otherwise. The outputs then arrive rotated by t mod 16,
and the mux networks undo that rotation. Three bands of 48 columns give the 144-word
banks.

Columns are stored circularly. Search-area column x is held in memory column
(`sa_col_base` + x) mod 48. For the next macroblock to the right, the search area moves
by 16 columns. The host adds 16 to `sa_col_base` and writes only the 16 new columns. The
other 31 columns are reused, which cuts the load from 141 to 48 write cycles.

### Comparator tree

The comparator tree holds SSAD1..SSAD7 and mv1..mv7, all initialised to 0xFFFF at `start`.
Each cycle a MAX tree finds the largest of the incoming SSAD (held in `SSAD_in_reg`) and
the seven stored values:

* If the incoming value is strictly the largest, nothing changes.
* Otherwise every stored value equal to that maximum raises its EQU flag.
* CHECK passes on only the lowest-numbered flag.
* That one entry takes the incoming SSAD and its MV.

This is a single-cycle loop, so one SSAD is accepted per clock. Two properties follow
and are kept on purpose:

* If the incoming SSAD ties with the largest stored one, the newer position replaces the
  older one.
* The final 7 are in slot order, not in sorted order.

In the SAD pass, candidates are visited in slot order. On equal SADs the earlier slot
wins.

## Interface of `gea_me`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control state only) |
| `cur_we`, `cur_waddr`, `cur_wdata` | in | 1, 4, 16x8 | write column `cur_waddr` of the current block; byte i = row i |
| `sa_we`, `sa_wband`, `sa_wcol`, `sa_wdata` | in | 1, 2, 6, 16x8 | write rows 16*`sa_wband`+i (byte i) of one search-area column into memory column `sa_wcol`. Row 0 is vertical offset -16 |
| `sa_col_base` | in | 6 | memory column that holds search-area column 0 (offset -16); sampled with `start` |
| `start` | in | 1 | begin one macroblock (only while `busy` is low) |
| `busy` | out | 1 | high from the cycle after `start` until `done` |
| `done` | out | 1 | one-cycle pulse 1637 cycles after the `start` cycle |
| `mv_x`, `mv_y` | out | 5 signed | motion vector in [-16,+15]; valid from `done` until the next `start` |
| `sad_min` | out | 16 | SAD at that motion vector |

The memories are single-port: write only while `busy` is low. An assertion flags
violations. Byte 15 of band 2 (row 47) is not used; its value does not matter.

Parameters: `N` (block size, 16), `P` (search range [-P, P-1], 16), `SB` (subblock size,
4), `M` (candidates, 7). `P` must be a power of two. `(N/SB)^2` must equal `N`, because
the same 16-lane tree serves both passes. `N` must be a multiple of 4. For example,
`P = 32` gives the [-32,+31] range with 5 bands of 80 columns and 5189 cycles per
macroblock.

## Where this design departs from, or adds to, the reference architecture

* Pipeline depth is this design's own: 1637 cycles per macroblock. The reference
  architecture is quoted as N + 2p(2p+N-1) + MN = 1632 plus a few pipeline cycles
  (1635). Here the memories have a one-cycle read, the window sums are read from the
  shift registers, and the SAD pass only starts after the comparator has settled
  (3 cycles).
* The row-to-bank mapping of both memories, the band-column write format, the circular
  column scheme for search-area reuse, the start/busy/done handshake and the reset are
  choices of this design. Only the memory sizes (16 x 144 x 8 and 4 x 16 x 32) are
  taken from the reference chip.
* The "ping-pong" systolic-register variant, which removes the bubble cycles at the
  cost of twice as many memory ports, is not built.
* Only the level-3 subsampling (sixteen 4x4 subblocks) is supported. Other levels need
  a differently sized tree.
* No timing closure or gate count was done. The achievable clock rate is unknown.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The main ones:

* `tb_gea_me` runs the full-size core on 15 macroblocks: random, shifted-copy, gradient
  and flat scenes, plus a strip of 5 adjacent macroblocks that uses search-area reuse.
  For each block it checks the 7 stored SSADs and MVs slot by slot, the final MV and
  SAD, and the latency against a reference model in the testbench. It counts bubble
  cycles, csum captures, replacements, multi-EQU ties, rejected SSADs, SAD_min updates
  and reuse loads, and fails if any never occurs. It also reports how often the result
  matches full search.
* `tb_gea_workloads` runs the core with p = 32 / M = 7 (the [-32,+31] case, 5189 cycles
  per macroblock). It also sweeps M = 1, 3, 15, 31 and 63 at p = 16, which takes
  1541 + 16(M-1) cycles per macroblock.
* `tb_control_unit` checks every address and control flag of a macroblock cycle by
  cycle.
* `tb_compare_tree` checks the replacement rule, including ties, after every cycle.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/gea_pkg.sv tb/tb_gea_me.sv --top-module tb_gea_me
./obj_dir/Vtb_gea_me
```
