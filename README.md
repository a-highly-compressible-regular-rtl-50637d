# ECD-NFA: a regular-expression matcher driven by byte classes

Network intrusion detection has to find attack signatures, written as regular
expressions, in traffic at line rate. An NFA built as one flip-flop per state
handles one character per clock no matter how many states are active, but
every transition needs its own character comparator, and an expression's
character classes multiply those comparators.

This design cuts that cost by compressing the input before it reaches the
automaton. Bytes that affect the NFA in exactly the same way form an
*equivalence class*. Each class is given a small integer, its **ECD**
(equivalence class descriptor). One 256-entry look-up table turns each input
byte into its ECD. The NFA's transitions are then labelled with ECDs instead
of characters, so every transition tests a single bit of a one-hot class
vector.

The matcher takes one byte per clock. At 8 bits per clock, a 460 MHz clock
would give 3.68 Gbit/s, counting 1 Gbit as 10^9 bits.

## Worked example: `(a|b)*(cd)`

The reference expression is `(a|b)*(cd)`. Its bytes fall into four classes:

| ECD | bytes                        |
|-----|------------------------------|
| 0   | `a`, `b`                     |
| 1   | `c`                          |
| 2   | `d`                          |
| 3   | every other byte (`[^abcd]`) |

After ε-transitions and redundant self-loops are removed, five states and
seven ECD-labelled edges remain:

```
  0 --{0,1,2,3}--> 0     start state; loops on every byte, so the search is unanchored
  0 --{0}--------> 1
  0 --{0}--------> 2
  1 --{0}--------> 1
  1 --{0}--------> 2
  2 --{1}--------> 3
  3 --{2}--------> 4     state 4 accepts
```

State 0 stays active all the time. An `a` or `b` activates states 1 and 2.
A `c` then moves state 2 to state 3, and a `d` moves state 3 to state 4, the
accepting state. So a match is reported on the `d` of every `a|b`, `c`, `d`
sequence in the stream. For example, `aacd`, `bacd` and `abcd` match.
`caaacd` also matches, because it contains `aacd`. On its own, `cd` does not
match, because the edges need at least one `a` or `b` before the `c`.

## Pipeline of one REM block

A REM (regular-expression matching) block holds one expression. It has three
stages, each one clock long:

```
 in_byte[7:0] ──► ecd_bram ──ecd[6:0]──► ecd_decoder ──ecd_vec[127:0]──► ecd_nfa ──► match
                  256 x 8 table          7-bit → one-hot                 one FF per state
```

1. **`ecd_bram`**: the byte is the read address of a 256 × 8 block RAM. The
   read is synchronous.
2. **`ecd_decoder`**: only the low 7 bits of the entry are decoded, into a
   registered one-hot vector of 128 bits (`NUM_ECDS`).
3. **`ecd_nfa`**: the next state is the OR of the destinations of every edge
   whose source is active and whose ECD set contains the current ECD:

   ```
   next[d] = OR over edges k with dst = d of ( state[src_k] & |(ecd_vec & ecds_k) )
   ```

   `match` is the OR of the active accepting states.

A `valid` flag travels with the data. The NFA only steps on a valid input, so
idle clocks leave the automaton's state unchanged. `match_valid` pulses
**3 clocks** after the byte it belongs to.

## Top level: `ecd_nfa_top`

`NUM_REM` REM blocks all watch the same byte stream. A **match encoder**
registers their 1-bit matches as follows:

- `match_vec[r]`: expression `r` matched on a substring ending at that byte.
- `match_all`: the AND of all the matches, so every expression matched at the
  same position.
- `match_any`: at least one expression matched.
- `match_id`: the lowest index `r` that matched.

Timing: a byte accepted with `in_valid` in clock *t* gives `out_valid` in
clock *t + 4*, and a new byte can be accepted every clock. The outputs hold
their values between valid results.

Class tables can be rewritten while the matcher runs. The write port is
`tbl_wr_en`, `tbl_rem`, `tbl_addr` and `tbl_data`. A write changes the class
of the byte `tbl_addr` in the table of block `tbl_rem`. The new class applies
to bytes presented after the clock of the write. If a byte reads the same
entry in the same clock as the write, it gets the old class.

## Describing an expression

Expressions are not compiled in hardware. A software step (not included)
classifies the bytes and builds the ECD-labelled NFA. Its results are passed
as parameters of `ecd_nfa_top`:

| parameter    | meaning                                                                                   | default                        |
|--------------|-------------------------------------------------------------------------------------------|--------------------------------|
| `NUM_REM`    | number of REM blocks (expressions), up to 16                                              | 1                              |
| `NUM_STATES` | states per block (the largest of all blocks)                                              | 5                              |
| `NUM_ECDS`   | width of the one-hot class vector, up to 128                                              | 128                            |
| `NUM_EDGES`  | total number of edges in `EDGES`                                                          | 7                              |
| `TABLES`     | one `ecd_table_t` (256 × 8-bit ECDs) per block; block 0 in the lowest bits                | `ex_abcd_table()`              |
| `EDGES`      | packed array of `nfa_edge_t` = `{rem[3:0], src[7:0], dst[7:0], ecds[127:0]}`              | `ex_abcd_edges(0)`             |
| `START`      | per block, the state mask that reset activates                                            | state 0                        |
| `ACCEPT`     | per block, the accepting-state mask                                                       | state `NUM_STATES-1`           |

Each block uses only the edges whose `rem` field equals its own index. One
edge can carry several ECDs in its `ecds` mask, like the `{0,1,2,3}` self-loop
above.

The requirement for a valid table is that two bytes may share an ECD only if
they fire exactly the same set of edges. If the start state has to stay
active, every byte must map to an ECD below `NUM_ECDS`, and that ECD must
appear in the start state's self-loop. A byte whose ECD appears on no edge
clears every state.

The package `ecd_nfa_pkg` provides `ecd_set()` for building masks. It also
holds two examples: `(a|b)*(cd)` (`ex_abcd_table`, `ex_abcd_edges`) and
`c+d` (`ex_cd_table`, `ex_cd_edges`). The testbenches use the second one to
exercise two blocks together.

## Where this RTL departs from, or goes beyond, the source design

- **Unanchored search.** The state diagram has state 0 loop on every class,
  so a match is found anywhere in the stream. The RTL follows the diagram.
  The source also says `caaacd` would be rejected, which is true only for a
  match anchored at the start of the stream; here it matches. The source's
  class table also lists next states `{0,1,2}` for state 0 on every class.
  That contradicts the diagram and its count of seven transitions, so the
  diagram was followed.
- **Decoder width.** The decoder's output is given both as "≤127 bits" and as
  one bit for each of 128 ECDs. This RTL uses 128 bits, one for each value of
  the 7-bit ECD.
- **Own choices.** The source does not describe the following, so they are
  design decisions here:
  - the valid handshake;
  - the asynchronous active-low reset, which activates the start states;
  - the one-hot decoding;
  - the table write port;
  - the encoder's OR flag and index output.
- **Not built.** The 2- and 4-byte class tables and the multi-character,
  multi-pattern version are future work in the source. The software flow is
  also not included: rule extraction, parsing, NFA construction and
  minimisation, class-table construction and HDL generation.
- **Not verified.** No clock rate has been measured. The 460 MHz figure comes
  from an FPGA implementation and cannot be checked in simulation.

## Verification

Every testbench checks the RTL against independent reference rules in
`tb/ecd_ref_pkg.sv`, which do not simulate an automaton. For
`(a|b)*(cd)`, a match ends at a byte exactly when the last three bytes are
of the classes a|b, c and d, in that order. For `c+d`, a match needs a `c`
followed by a `d`. Each testbench stops itself with a watchdog and prints
`TB_RESULT checks=N failures=M`.

| testbench             | what it covers                                                                                                   |
|-----------------------|------------------------------------------------------------------------------------------------------------------|
| `tb_ecd_bram`         | all 256 entries, 1-clock latency, a write, and a read during a write returning the old value                     |
| `tb_ecd_decoder`      | all 128 codes, every output bit, and the valid flag                                                              |
| `tb_ecd_nfa`          | the state sets for `aacd` traced by hand, `cd` alone not matching, and 4000 random steps with idle clocks        |
| `tb_match_encoder`    | random match vectors with idle clocks; checks the vector, AND, OR and index                                      |
| `tb_reme_block`       | a 6000-clock random stream, the 3-clock latency, and class updates in mid-stream                                 |
| `tb_ecd_nfa_top`      | two blocks end to end; see the list below                                                                         |
| `tb_ecd_nfa_top_full` | default parameters: `aacd bacd cd abcd caaacd` back to back, the 4-clock latency, one result per clock, and the match positions |

`tb_ecd_nfa_top` runs two blocks end to end over 8000 clocks. Each of the
following events must occur at least once:

- a match of each expression;
- both expressions matching on the same byte;
- an idle clock;
- a 32-byte burst delivered at one result per clock;
- a match that depends on a class updated in mid-stream.

To simulate with Verilator (5.x), for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ecd_nfa_pkg.sv tb/ecd_ref_pkg.sv rtl/ecd_bram.sv rtl/ecd_decoder.sv \
  rtl/ecd_nfa.sv rtl/reme_block.sv rtl/match_encoder.sv rtl/ecd_nfa_top.sv \
  tb/tb_ecd_nfa_top_full.sv --top-module tb_ecd_nfa_top_full
./obj_dir/Vtb_ecd_nfa_top_full
```

For another testbench, change the last file and `--top-module`; the
single-block testbenches need only the package files and their own block.
`verilator --lint-only -Wall` reports the following warnings, all expected:

- two unused signals in `reme_block`: table bit 7 and the internal state
  vector;
- `SYNCASYNCNET`, because the reset is used both as an asynchronous reset
  and in the `disable iff` of the one-hot assertion in `ecd_nfa`.

## Files

- `rtl/ecd_nfa_pkg.sv`: widths, types (`nfa_edge_t`, `ecd_table_t`) and the
  example tables and edge lists.
- `rtl/ecd_bram.sv`, `rtl/ecd_decoder.sv`, `rtl/ecd_nfa.sv`: the three stages.
- `rtl/reme_block.sv`: one REM block.
- `rtl/match_encoder.sv`: combines the matches.
- `rtl/ecd_nfa_top.sv`: the top level.
- `tb/`: the reference package and one testbench per module, plus the
  full-size test.
