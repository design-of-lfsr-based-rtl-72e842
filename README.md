# Error-resilient ternary CAM with parity detection and background repair

A ternary content-addressable memory (TCAM) built from ordinary RAM is fast and
cheap on an FPGA. The catch is that its contents sit in block RAM, and block RAM is
exposed to single-event upsets. One flipped bit makes a TCAM word match a key it
should not match, or miss one it should. This design protects such a RAM-based TCAM
in three steps:

* **Detection on the lookup path.** Every RAM word carries one parity bit. Each
  lookup checks the parity of the words it reads. The check adds one XOR tree beside
  the match logic.
* **A second copy in compact form.** The TCAM keeps a small *binary table* that
  holds each stored word as value and mask. The table is needed anyway to update
  the TCAM.
* **Repair in the background.** When a lookup finds a damaged RAM word, a small
  engine rebuilds that one word from the binary table, one TCAM word per cycle.
  It then writes the result through the RAM's write port. Lookups keep using the
  read port the whole time.

The approach comes from a published design for LFSR-named, RAM-based
error-resilient TCAMs. That publication describes the mechanism and its block
diagrams, but gives almost no sizes or timing. Everything below marked as a
*choice* was filled in for this RTL.

## How the TCAM is stored

Take a TCAM of `D` words, each `KEY_W` bits wide. The key is cut into `N_BLK` slices
of `C = KEY_W / N_BLK` bits. Each slice has its own RAM, `lfsr_mem`, with `2^C`
rows (the publication calls these RAM blocks "LFSRs"; the module name keeps that
term). Row `a` of block `i` holds one match bit per TCAM word. The bit is 1 when
word `w`'s slice `i` (value and mask) accepts the pattern `a`. Bit `D` of the row
is an even-parity bit over the `D` match bits.

```
 key = | slice N-1 | ... | slice 1 | slice 0 |        (slice i = key[i*C +: C])
              |               |         |
              v               v         v
         block N-1  ...   block 1   block 0           each: 2^C rows x (D+1) bits
              |               |         |
              +------ bitwise AND of the D match bits ------> match vector
              each row: XOR of all D+1 bits ------------------> parity error of block i
```

A lookup reads one row from every block in the same cycle and ANDs the rows. Bit
`w` of the result is 1 when every slice of word `w` matches. The lowest set bit is
the match address. A word whose mask bit is 1 accepts both values of that key bit
("don't care"). A word that is not valid matches nothing.

At the default size (16-bit keys, two blocks of 8 bits, 16 words) that is two RAMs
of 256 x 17 bits, plus a 32 x 17-bit binary table.

The binary table (`bin_table`) holds `{valid, mask[C-1:0], value[C-1:0]}` for every
(block, word) pair. It is addressed as `{block ID, word index}`, with the block ID
in the high bits. So the `D` entries of one block form one contiguous sub-block.

## Detecting an upset (`err_detect`)

The lookup pipeline has three cycles. The key is applied in cycle t and the RAMs
are read at the end of t. In t+1 the unit combines the rows, XORs each row and
registers the results. The result is valid in t+2.

For every block, the XOR of the whole (D+1)-bit row is that block's error signal.
An odd number of flipped bits in the row makes it 1. The error signals go to an
N-to-log2(N) encoder. If several blocks are damaged, the lowest block ID wins
(*choice*). The encoder output drives a multiplexer that picks the key slice of the
damaged block. That slice is the row address of the damaged word. The block ID is
loaded into the **base address register** and the slice into the **bit pattern
register**. Together they are all the repair needs to know.

Every lookup result comes with `err` and `err_vec`. A result read from a damaged
row is still delivered, but flagged, so the user can drop or retry it (*choice*).
The publication does not say what happens to such a result.

Errors are captured only while no repair is running. An error found during a
repair is not queued. The next lookup that reads the damaged row finds it again
(*choice*).

## Repairing in the background (`agu`, `bin_table`, `ecv_unit`)

A repair recomputes the damaged row from scratch. Say block `b`, row `p` is
damaged. Bit `w` of that row must equal the ternary match of pattern `p` against
word `w`'s slice `b`, and that slice is in the binary table at `{b, w}`.

```
cycle   s      s+1 .. s+D              s+2 .. s+D+1               s+D+2
        cap    AGU reads {b, 0..D-1}   ECV unit: match bit, shift, P ^= bit
                                                                  write {P, bits} to block b, row p
```

* `agu`: a Mod-D counter runs 0..D-1 and forms the table address `{b, count}`. A
  comparator flags count = D-1. When the vector is ready, the block ID is decoded
  into a one-hot write enable, so only block `b` is written.
* `ecv_unit` (error correction vector): the table answers one cycle after each
  read. `matching_module` compares each entry with `p` and yields one match bit per
  cycle. The bit is shifted into a D-bit register and XORed into the parity bit `P`.
  After D entries, `{P, bits}` is the correct row.
* The row is written through the RAM's write port. The read port stays with the
  lookups, so lookups are never stalled by a repair.

The repair writes `D + 2` cycles after the lookup result that found the error
(18 cycles at D = 16). A lookup issued in that write cycle still reads the old
row, because the RAM returns old data on a simultaneous read and write. A lookup
issued one cycle later reads the repaired row. `corr_busy` is high from s+1 to
s+D+2, and `corr_done` pulses in s+D+2.

The binary table itself is not parity protected. The publication argues that it is
much smaller than the TCAM RAM and so rarely hit.

## Updating words and starting up (`rw_ctrl`)

The publication says the binary table exists for updates, but not how an update
runs. Here (*choice*) an update of word `w` works as follows:

1. The request is accepted while `ready` is high. From then on, lookups are
   refused.
2. The controller waits until lookups in flight have drained and any repair has
   finished.
3. It sweeps all `2^C` rows of every block as a read-modify-write. It reads row
   `r`, and a cycle later writes it back with bit `w` replaced by the new match
   bit. The other bits are kept.
4. During the first `N_BLK` cycles of the sweep it also writes the word's slices
   into the binary table.

The parity bit is not recomputed from the row. Instead it is flipped when bit `w`
changes. So an upset already sitting in some other bit of a row is still caught
after the update.

An update keeps `ready` low for `2^C + 2` cycles when nothing is in flight.

After reset, the controller writes zero to every RAM row and table entry. That
takes `max(2^C, N_BLK*D)` cycles, 256 at the default size. The result is an empty
TCAM with good parity. The RAM arrays themselves are never reset, as in block RAM.

## Interface of `ertcam_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `ready` | out | 1 | lookups and updates accepted (low during start-up clear and updates) |
| `en`, `din` | in | 1, KEY_W | lookup request and key |
| `match_valid` | out | 1 | result valid, 2 cycles after an accepted lookup |
| `match`, `match_addr`, `match_vec` | out | 1, log2 D, D | any match, lowest matching word, all matching words |
| `err`, `err_vec` | out | 1, N_BLK | this lookup read a row with a parity error (and in which blocks) |
| `we`, `wr_addr`, `wr_mask`, `wr_valid` | in | 1, log2 D, KEY_W, 1 | update word `wr_addr` with value `din` and mask `wr_mask` (1 = don't care); `wr_valid = 0` deletes the word |
| `corr_busy`, `corr_done` | out | 1 | repair running; repaired row written this cycle |
| `inj_en`, `inj_blk`, `inj_addr`, `inj_bit` | in | 1, log2 N_BLK, C, log2(D+1) | invert one stored bit (upset model for testing; tie `inj_en` low) |

The port names `clk`, `reset`, `en`, `din`, `we`, `match` and `match_addr`, the
16-bit key and the 4-bit match address match the published simulation trace.

Parameters: `KEY_W` = 16, `N_BLK` = 2, `D` = 16. `C = KEY_W / N_BLK` must divide
exactly. `D` must be at least 2, and `N_BLK` must not exceed `2^C`. Raising `C`
doubles the RAM depth and the update time for every added bit. Raising `D` widens
the RAM rows and lengthens a repair by one cycle per word.

## Files

| file | content |
|---|---|
| `rtl/ertcam_pkg.sv` | controller state type |
| `rtl/ertcam_top.sv` | the complete TCAM |
| `rtl/lfsr_mem.sv` | one RAM block: 1 read + 1 write port, read-first, upset port |
| `rtl/err_detect.sv` | AND of the rows, parity check, encoder, slice mux, base address and bit pattern registers |
| `rtl/prio_encoder.sv` | lowest-set-bit encoder (damaged block ID, match address) |
| `rtl/bin_table.sv` | binary-encoded table `{valid, mask, value}` |
| `rtl/matching_module.sv` | ternary match of a table entry with a pattern |
| `rtl/agu.sv` | Mod-D counter, last-count comparator, write-enable steering |
| `rtl/ecv_unit.sv` | correction vector: match bits and running parity |
| `rtl/rw_ctrl.sv` | port arbitration, start-up clear, update sweep |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example,
the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ertcam_pkg.sv tb/tb_ertcam_top.sv --top-module tb_ertcam_top
./obj_dir/Vtb_ertcam_top +verilator+rand+reset+2
```

Replace `tb_ertcam_top` with any other `tb_<module>` to test a single block.

`tb_ertcam_top` keeps a reference model of the stored words and of every bit it
inverts. It predicts each lookup result, including wrong match bits from damaged
rows, the parity flags, and which error gets captured. It checks:

* the 2-cycle lookup latency;
* the 256-cycle start-up clear and the 258-cycle update;
* that each repair lands exactly D+2 cycles after its detection;
* that a repaired row reads clean afterwards.

It makes each of these happen at least once: match, miss, multiple match,
don't-care match, insert, delete, detection, repair, lookups during a repair, an
error seen while busy, errors in both blocks at once, a parity-bit upset, an update
held back by a repair, an upset carried through an update sweep, and two flips in
one row, which parity cannot see. It runs in well under a second.

The unit testbenches check each block against its own model:

* the RAM and the table against arrays;
* the encoder and the matching module exhaustively;
* the detector against a behavioural RAM with planted parity errors;
* the controller's sweep row by row.

## How far to trust it, and what differs from the publication

* The publication's text calls the TCAM RAM blocks "LFSRs" and states that they are
  dual-port RAMs. Its introduction and conclusion also speak of LFSRs generating
  pseudo-random patterns, but no such generator is specified (no polynomial,
  width or connection). None is built here; the RAM blocks keep the name.
* The following are this design's own choices:
  * the sizes;
  * the lookup pipeline depth;
  * the parity sense (even);
  * the lowest-index priorities;
  * the mask encoding and valid bit;
  * the update procedure, including refusing lookups while it runs;
  * the start-up clear;
  * flagging rather than suppressing results read from a damaged row;
  * not queueing errors found during a repair.
* Only upsets that flip an odd number of bits in a row are detected, as with any
  single parity bit. Two flips in one row go unseen.
* The publication reports FPGA resource, delay and power figures (around 830 LUTs,
  0.24 ns, 2.1 W on its device). These come from a vendor flow and were not
  reproduced. This RTL synthesises to roughly 130 flip-flops and 9.2 kbit of
  memory at the default size.
* The `inj_*` port exists only to model upsets in simulation. It is not part of the
  published design.
