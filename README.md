# OCTT: locating several defective TSVs on a live 3D-IC link

Through-silicon vias (TSVs) carry signals between the dies of a 3D stack, and they fail more
often than ordinary wires: a TSV may leak to the substrate (it then reads 0) or be partly open
(it then charges too slowly and the receiver sees the previous value). Such defects are
*hidden* most of the time: a shorted TSV is only wrong when it carries a 1, an open one only
when its value changes.

This RTL implements an on-communication TSV test (OCTT, after K. N. Dang, "TSV-OCT: An
on-communication multiple-TSV defects detection and localization for 3D-ICs", IEEE SEACAS
2019). The link carries its normal traffic protected by a parity product code. The code on its
own can locate one faulty TSV per flit. OCTT watches the code's checks over many flits and
locates several faulty TSVs, without stopping the traffic or sending test patterns. It works in
two steps:

1. **Statistical detection** collects the positions the code points at over a period of T
   cycles. It marks them greedily, so a few healthy TSVs get marked too.
2. **Isolate-and-check** takes every marked TSV out of the code. It then puts them back one at
   a time and keeps out only those that the code still shows as faulty.

The result is a map of faulty TSVs for a repair or re-routing scheme to use. Repair is not
part of this design.

## The code word

The default link carries 32 data bits over 45 TSVs: a 4 x 8 data grid plus a parity column, a
parity row and one all-bit parity bit. Code position `r*(N+1)+c` is row `r`, column `c`:

```
          c=0 ... c=7   c=8
  r=0     d0  ... d7    row parity 0
  ...
  r=3     d24 ... d31   row parity 3
  r=4     col parity 0..7   all-bit parity
```

Every row and every column of the 5 x 9 word has even parity. If one TSV is wrong, exactly one
row check and one column check fail, and the TSV sits where they cross. The decoder corrects
that bit on the fly. If two or more rows or columns fail, several TSVs are wrong. The code then
only knows the rows and columns involved: the crossings include the real faults and some
healthy TSVs.

*Isolation* removes a TSV from the code but not from the link. It still carries its data bit.
Both the encoder and the decoder replace the bit by 0 before any parity is computed, so the TSV
no longer affects any check. The decoder delivers an isolated data bit as received, without
correction.

## Statistical detection (`stat_det`)

For T cycles, every flit's failing rows and columns are crossed. Every crossing that is not
isolated is ORed into the *suspicious* map. This is the greedy rule: when two faults show in the
same flit, their two real positions and the two ghost crossings are all marked. Because defects
are hidden most of the time, they tend to appear alone in some flits. An accumulation over a
period therefore finds many more faulty TSVs than any single flit shows. `GREEDY = 0` gives the
cautious variant, which only marks a position when exactly one row and one column fail. The top
level uses the greedy variant.

## Isolate-and-check (`isol_check`)

This is the part that turns a suspicious map into a faulty map. A test runs in rounds:

1. **Detect.** Run one detection period. The TSVs already confirmed faulty stay isolated.
   Candidates are the suspicious TSVs not yet known to be faulty. With no candidates, the test
   ends.
2. **Isolate.** Isolate all candidates at once. Faults they were hiding (two faults in one row
   cancel in that row's check) can now show.
3. **Check.** For each candidate in turn, lowest position first, re-enable it for a window of
   up to T cycles while the other candidates stay isolated.
   - The candidate is **faulty** if, in some flit of the window, the code locates it alone: its
     row and its column fail, and no other check fails. The window then ends at once and the
     TSV stays isolated for good.
   - The candidate is a **false positive** if the window passes without that. It stays enabled.
4. **Repeat.** Start a new round. With the confirmed faults isolated, a new round can expose
   faults that were hidden behind them. The test stops when a round finds nothing new, or after
   `MAX_ROUNDS` (4) rounds.

Two rules here are choices of this design, and they matter in practice:

- **Lone localization.** A candidate only counts as faulty when no other check fails in the same
  flit. Otherwise, an undiscovered fault in the candidate's row and another in its column,
  failing in the same flit, could condemn a healthy TSV. Random tests showed this happening
  before the rule was added.
- **Parity TSVs are never isolated.** Isolating a parity TSV switches off the check it serves.
  With two checks off, other faults look exactly like the candidate. Suspicious parity TSVs are
  therefore checked in place and reported in `faulty_o`, but they stay in the code. The
  isolation mask `iso_o` only ever covers data TSVs.

**Remaining limit.** Three faulty parity TSVs at three corners of a rectangle (row parity `r`,
column parity `c`, the all-bit parity) failing together look exactly like data TSV `(r, c)`. No
check can tell the two apart, and such fault sets can end with a healthy data TSV marked faulty.
In the end-to-end test this happens in about 1 % of random fault sets of 2 to 6 defects.

The faulty map is kept across tests and cleared only by reset. A new `test_start_i` refines it.

## Timing

The data path is combinational: a flit entering at `data_i` leaves at `data_o` in the same
cycle. The only register on the path is the TSV model's previous-value register, used for open
defects. The test timing counts clock edges from the edge that samples `test_start_i`:

| situation | cycles until `test_done_o` |
| --- | --- |
| no suspicious TSV | T + 2 |
| one defect, caught in the first flit of its check | 2T + 7 |
| each further candidate | 1 + up to T |
| each further round | T + 2 + its candidates |

The published scheme gives a best case of T cycles and a worst case near 4T². This
implementation's schedule is its own. At T = 128, the longest test seen in the sweep below was
about 8,800 cycles, with 9 defects.

## Measured localization rate

A fault set counts as localized when the final faulty map equals the injected set exactly. The
defects are random shorts and opens on any of the TSVs, with random traffic every cycle.
`tb_octt_sweep` ran 100 fault sets per point; the table below is from one such run:

| defects | 4x8 T=8 | T=16 | T=32 | T=64 | T=128 | 2x4 T=128 | 4x4 T=128 | 8x8 T=128 |
| --- | --- | --- | --- | --- | --- | --- | --- | --- |
| 1 | 98 | 100 | 100 | 100 | 100 | 100 | 100 | 100 |
| 2 | 100 | 100 | 100 | 100 | 100 | 100 | 100 | 100 |
| 3 | 95 | 100 | 99 | 99 | 100 | 93 | 100 | 100 |
| 4 | 94 | 100 | 98 | 99 | 100 | 84 | 98 | 100 |
| 5 | 83 | 93 | 97 | 97 | 98 | 76 | 97 | 99 |
| 6 | 76 | 90 | 96 | 97 | 96 | 52 | 95 | 100 |
| 7 | 57 | 87 | 84 | 94 | 92 | | 86 | 97 |
| 8 | 41 | 67 | 85 | 88 | 95 | | 73 | 97 |
| 9 | 28 | 59 | 72 | 84 | 85 | | 55 | 98 |

The same trends were reported for the published scheme: close to 100 % up to six defects and
still high (>90 %) at eight or nine. The figures here are from a small sample and are meant for
comparison between configurations, not as exact rates.

## Modules

| file | role |
| --- | --- |
| `rtl/octt_pkg.sv` | default shape (4 x 8), default period (128), controller state type |
| `rtl/ppc_encoder.sv` | parity product encoder with isolation mux |
| `rtl/tsv_bundle.sv` | behavioural model of the TSVs with injectable short and open defects (not for synthesis into a product) |
| `rtl/ppc_decoder.sv` | row/column checks, single-fault correction, multi-fault flag |
| `rtl/stat_det.sv` | statistical detection |
| `rtl/isol_check.sv` | isolate-and-check controller |
| `rtl/octt_link.sv` | top: encoder -> TSVs -> decoder, with the two test units |

Parameters of `octt_link`:

- `M`, `N`: data grid size; the link has `(M+1)(N+1)` TSVs.
- `T`: the detection period, which is also the length of a check window.
- `MAX_ROUNDS`: the maximum number of detection rounds per test.

Top-level ports:

| port | direction | purpose |
| --- | --- | --- |
| `data_i`, `valid_i` | in | transmit side |
| `data_o`, `valid_o` | out | receive side |
| `corr_o`, `corr_pos_o` | out | a single fault was corrected in this flit, and where |
| `multi_o` | out | several faults were seen in this flit |
| `short_i`, `open_i` | in | defect injection into the TSV model |
| `test_start_i` | in | start a test |
| `test_busy_o`, `test_done_o` | out | test state |
| `faulty_o` | out | the faulty TSV map |
| `iso_o` | out | the isolation mask |
| `test_round_o`, `sd_busy_o` | out | test progress |
| `sd_single_ev_o`, `sd_multi_ev_o`, `confirm_ev_o`, `clear_ev_o` | out | one-cycle event pulses for monitoring |

The isolation mask is fed straight to the encoder. In a real stack it must cross back to the
transmitting die; how it gets there, and in which cycle, is left to the integration.

## What follows the scheme and what is chosen here

**Follows the published scheme:**

- the parity product code with row, column and all-bit parity, in the 4 x 8 / 45-TSV size
  whose area is reported;
- the fault model: stuck-at-0 shorts and opens delayed by one cycle;
- greedy marking of row/column crossings accumulated over a period of T cycles;
- isolation by removing a TSV from encoding and decoding while it keeps carrying data;
- re-enabling suspicious TSVs one by one to confirm or clear them.

**Choices made here:**

- the bit layout;
- T = 128 as the default, the longest of the evaluated periods;
- a check window of T cycles, ending early at the first localization;
- the lone-localization rule;
- keeping parity TSVs out of isolation;
- repeated rounds with `MAX_ROUNDS` = 4;
- handling checks whose parity TSV is isolated: the check is disabled; for the parity row and
  column, an isolated parity bit is replaced by its value recomputed from the data;
- a combinational data path;
- asynchronous active-low reset;
- a test started by a pulse.

The area, delay and power figures of the published design were obtained with a 45 nm library
and are not reproduced here.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_octt_link \
    rtl/octt_pkg.sv tb/tb_octt_link.sv
./obj_dir/Vtb_octt_link
```

Replace `tb_octt_link` with any of the testbenches below:

| testbench | what it checks |
| --- | --- |
| `tb_ppc_encoder` | code bits against a reference, including isolation |
| `tb_ppc_decoder` | every single-fault position, double faults, isolated TSVs ignored |
| `tb_tsv_bundle` | short and open behaviour |
| `tb_stat_det` | greedy and cautious maps, and the period length |
| `tb_isol_check` | the controller against an abstract link with hidden data-TSV faults: the faulty map must be exact |
| `tb_octt_link` | the whole link at default size (see below) |
| `tb_octt_sweep` | the rate table above, using the helper `tb/octt_sweep_point.sv` |

`tb_octt_link` runs the whole link at its default size. It covers:

- a clean link, checked against the T + 2 best case;
- a single defect on each of the 45 TSVs, with every flit checked for correct data;
- 150 random sets of 2 to 6 defects.

It also counts that every mechanism happened at least once: correction, multi-fault detection,
greedy marking, simultaneous isolation, a false positive cleared, a defect confirmed,
multi-round tests, and both defect kinds.

To try another configuration, override the parameters of `octt_link`. `tb_octt_sweep` shows
how.
