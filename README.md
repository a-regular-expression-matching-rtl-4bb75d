# Regular expression matching with a decomposed MNFAU

A plain NFA matcher needs one flip-flop and one LUT for every character of
every rule. A DFA matcher needs only a state register, but its transition
table grows exponentially with the rule set. This design sits between the
two. Each rule is first written as an NFA. Then every run of NFA states that
has no epsilon transition inside it is merged into one state. The merged state
moves on a whole *string* instead of a single character. The result is a
modular NFA with unbounded string transitions (MNFAU). The MNFAU is then split
into two parts:

* **String detection.** All transition strings are found by one
  Aho-Corasick DFA. It is a state register plus a transition table, and the
  table is in an external SRAM. This part is exact string matching, so its
  table stays practical. Character classes such as `[AB]` are allowed in a
  string.
* **State transition.** A cascade of small cells, one per MNFAU state. They
  handle what the DFA cannot do cheaply: epsilon transitions, loops,
  alternation and anchors. A string of length p is one cell, not p cells.

Between the two sits a **decoder memory**. It turns the DFA state number into
a vector with one bit per MNFAU state, saying "your string has just ended
here".

The architecture is the decomposed-MNFAU matcher of "A Regular Expression
Matching Circuit Based on a Decomposed Automaton". Its reference implementation
scans one 8-bit character per clock (1.6 Gbps at 200 MHz). It has 1,114 rules,
12,673 MNFAU states, and an AC-DFA of 10,066 states with a 14-bit state
register. The RTL here keeps that structure and those widths. The rule set
itself is data, and the default build carries the small example rule
`A+[AB]{3}D`.

## From rule to MNFAU: a worked example

`A+[AB]{3}D` as an NFA has states for `A` (with a loop), `[AB]`, `[AB]`,
`[AB]` and `D`. The `A` state has an epsilon transition (its loop), so it
stays alone. The last four states have none, so they merge into one state
with the string `[AB][AB][AB]D`. The MNFAU therefore has:

| state | string          | length p | entered from            | accepts |
|-------|-----------------|----------|-------------------------|---------|
| 0     | `A`             | 1        | initial state, state 0  | –       |
| 1     | `[AB][AB][AB]D` | 4        | state 0                 | rule 0  |

The AC-DFA detects the two strings `A` and `[AB][AB][AB]D` anywhere in the
input. The state transition circuit only checks that they occur in the right
order and right next to each other.

## Lining up a string transition with its detection

This is the central timing idea of the design. Read this section before you
change the state cell.

Let `active_i(t)` mean "state i has been reached with the input ending at
character t". Let `det_i(t)` mean "the string of state i ends at character t".
A string of length p that ends at t begins at t-p+1. So it continues the path
only if one of the state's sources was active at t-p. The rule is:

    active_i(t) = det_i(t) AND ( OR over sources j of active_j(t-p) )

The OR of the sources, the *enable*, is available one clock after character
t-p. It must wait p-1 more clocks for the detection. `mnfau_state_cell`
therefore pushes the enable into a shift register of p-1 stages
(`srl_delay`). It ANDs the shift register's output with `det_i` and stores
the result in the state flip-flop. In all, a transition of length p takes p
clocks, while the DFA reads one character per clock. On FPGAs of the kind the
design was made for, a 4-input LUT in shift-register mode (SRL16) gives up to
16 stages. Because of that, `srl_delay` has no reset.

Loops and epsilon transitions need no extra hardware. They are just entries
in a cell's list of sources. For example, `A+` gives state 0 itself as a
source, and `C[0-9]?K` gives the `K` state both `C` and `[0-9]` as sources.

**New inputs.** Every input (a packet, say) is matched from scratch. On its
first character the cells ignore the activity of all states, which is left
over from the previous input. The shift registers still hold enables from the
previous input and cannot be cleared. So a cell with length p ignores its
shift register until p-1 characters of the new input have been seen.
`state_transition_circuit` keeps the character index `pos`, which saturates
at 255. It is shared by all cells.

**Initial state and anchors.**
* `SRC_INIT` is an initial state that is active before every character. A
  rule that starts from it may start anywhere in the input.
* `SRC_SOP` is active only before the first character of an input. It gives
  `^`.
* A state marked `at_end` reports its rule only on the last character of an
  input. It gives `$`.

## The AC-DFA machine and its SRAM

`acdfa_sequencer` is a state register and an address mux. The SRAM address
is `{state, character}`, which is `14 + 8 = 22` bits. The word read back is
the next state. On the first character of an input the address uses the root
state (`INIT_STATE`, 0) instead of the register. The SRAM is assumed to be
flow-through: the address depends on the register and the incoming
character, and the data must be back before the next edge. That lets the loop
close in one clock, which one character per clock requires. A pipelined SRAM
would need the loop restructured, for example by interleaving several
streams.

The Aho-Corasick failure paths are folded into the table, so there is never
any backtracking. A DFA state may also stand for several strings at once, for
example a string and one of its suffixes. Its decoder word then has several
bits set.

## Decoder memory

`detect_decoder` is a RAM of `2^STATE_W` words of U bits each. Word a holds
the detection vector of DFA state a. It is read synchronously. Its address is
the next state coming from the SRAM, so the word is registered on the same
edge as the state register. This is one clock earlier than reading it from
the state register. Its contents are written through the `dec_*` port before
matching starts.

## Describing a rule set

The structure of the state transition circuit is a parameter: `CFG`, a packed
array of `mnfau_pkg::state_cfg_t`, one record per MNFAU state.

| field    | meaning |
|----------|---------|
| `plen`   | string length p (1–255) |
| `src[4]` | source states: a state number, `SRC_INIT`, `SRC_SOP`, or `SRC_NONE` |
| `rule`   | rule index reported on `match` while the state is active, or `SRC_NONE` |
| `at_end` | report the rule only on the last character (`$`) |

`mnfau_pkg::state_cfg()` builds one record. `EX_CFG` is the example above.
Repetition counts such as `{3}` are expanded when the rule set is compiled, so
no counter is needed. A state with more than four sources must be split, or
`FANIN` raised. The rule compiler must produce three things that agree with
each other: `CFG`, the SRAM table, and the decoder words. Bit i of the decoder
word is the detection of the string of `CFG[i]`.

The testbench package `tb/mnfau_tb_pkg.sv` contains a compact compiler for
the DFA half. It represents a DFA state as the set of string positions that
have just been matched. State 0 is the empty set. On character c, the next
set holds position 0 of every string whose first class contains c. It also
holds position k+1 of a string whenever position k was in the set and class
k+1 contains c. A string is detected in a state that contains its last
position. This yields the same detections as an Aho-Corasick automaton with
failure paths.

## Interface and timing of `mnfau_matcher`

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | a character is presented; low = stall |
| `in_sop`, `in_eop` | in | 1 | first / last character of an input |
| `in_char` | in | 8 | character |
| `sram_addr` | out | STATE_W+8 | SRAM address `{state, char}` |
| `sram_rdata` | in | STATE_W | next DFA state, same cycle |
| `dec_we`, `dec_waddr`, `dec_wdata` | in | 1, STATE_W, U | decoder loading |
| `match` | out | N_RULES | rules that match a substring ending at this character |
| `match_valid` | out | 1 | one pulse per character |

```
cycle   k          k+1                 k+2
        char in    DFA state + det     match / match_valid
        SRAM read  state cells update
```

Every character gives exactly one `match_valid`, two clocks after it. With
`in_valid` held high, one character is accepted per clock. A stall freezes
every register, including the shift registers.

Parameters: `STATE_W` (14), `U` (2), `N_RULES` (1), `CFG` (`EX_CFG`) and
`INIT_STATE` (0). The same parameters appear on the submodules.

## Where this RTL departs from the reference design, and how far to trust it

* **Decoder size.** The reference design puts the decoder for 12,673 MNFAU
  states into 1,585 Kbit of block RAM. One bit per state for 2^14 DFA states
  would take 207 Mbit. So the reference design must encode the detection
  vector in some way that is not described. Here the decoder word is one-hot
  per MNFAU state. That is exact, but it is only practical for small U.
* **SRAM size.** A table of 2^22 words × 14 bits is 56 Mbit. The reference
  design quotes a 16-Mbit SRAM, so its table layout is presumably packed.
  Here the full address space is used.
* **Decoder address.** The decoder here is addressed by the next state. The
  reference design draws it after the state register. Only the latency
  differs.
* **Input framing and anchors.** `in_sop`/`in_eop`, the masking of stale
  shift-register contents, `FANIN = 4`, the reset values and the loading ports
  are all choices of this design.
* **Not included.** The conversion from regular expression to NFA to MNFAU,
  and the rule set of the reference implementation. The SRAM is an external
  part, and `tb/sram_model.sv` is a behavioural model of it.

Verification is by simulation only:
* Every module has a self-checking testbench.
* Three end-to-end testbenches compare each character's match vector with
  reference matchers written directly from the regular expressions. They do
  not reuse the MNFAU.
* The end-to-end tests cover stalls, restarts, both anchors, alternation,
  optional parts, `.*` and `+` loops, several strings detected by one DFA
  state, and the two-clock latency with one character per clock.

Nothing has been run on an FPGA, and timing closure at 200 MHz has not been
checked.

## Files

| file | contents |
|------|----------|
| `rtl/mnfau_pkg.sv` | `state_cfg_t`, source codes, default widths, example rule |
| `rtl/srl_delay.sv` | shift register used for string transitions |
| `rtl/mnfau_state_cell.sv` | one MNFAU state |
| `rtl/state_transition_circuit.sv` | the cascade of cells and the rule outputs |
| `rtl/acdfa_sequencer.sv` | DFA state register and SRAM addressing |
| `rtl/detect_decoder.sv` | DFA state to detection vector RAM |
| `rtl/mnfau_matcher.sv` | top level |
| `tb/mnfau_tb_pkg.sv` | DFA construction, test rule sets, reference matchers |
| `tb/sram_model.sv` | behavioural model of the transition SRAM |
| `tb/tb_*.sv` | testbenches; each prints `TB_RESULT checks=N failures=M` |

The end-to-end testbenches are:
* `tb_mnfau_full`: every default, including the 2^22-word SRAM.
* `tb_mnfau_matcher`: five rules, `A+[AB]{3}D`, `^GET`, `(XY|Z)W$`,
  `C[0-9]?K` and `AB.*CD`, in 12 MNFAU states.
* `tb_mnfau_many_rules`: 40 rules of the form `P.*Q`, in 120 MNFAU states.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Mdir obj_top \
  rtl/mnfau_pkg.sv rtl/srl_delay.sv rtl/mnfau_state_cell.sv \
  rtl/state_transition_circuit.sv rtl/acdfa_sequencer.sv rtl/detect_decoder.sv \
  rtl/mnfau_matcher.sv tb/mnfau_tb_pkg.sv tb/sram_model.sv tb/tb_mnfau_matcher.sv \
  --top-module tb_mnfau_matcher
./obj_top/Vtb_mnfau_matcher
```

Replace the last testbench file and `--top-module` to run another test. Each
test takes well under a second to run.

To add a rule set:
1. Write its `CFG` table.
2. Give the testbench the transition string of each state, in the same order.
3. Let `ac_dfa` build the SRAM and decoder contents.
4. Add a reference function for the expected matches.

`tb_mnfau_many_rules` shows how to generate all of this from a formula.
