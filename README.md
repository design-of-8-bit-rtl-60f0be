# 8-bit dedicated content-matching processors for intrusion detection

Deep packet inspection in a network intrusion detection and prevention system
(NIDPS) has to find known attack signatures ("content") inside the byte stream
of the traffic. Hard-wired string matchers are fast but cannot take a new
signature without rebuilding the circuit. The processors here keep the speed of
a brute-force hardware matcher, one character per clock cycle, but hold the
signature in a small register file that can be rewritten at run time, and
walk through it with a tiny control unit instead of a fixed chain of
comparators.

Two processors are provided, each matching one signature:

* **exact matcher** – reports every occurrence of the stored pattern that the
  brute-force scan below finds;
* **approximate matcher** – also reports occurrences in which one character
  was inserted, deleted or substituted (edit distance k ≤ 1), the usual trick
  of attacks that try to slip past a signature ("axcd", "acd" or "aybcd"
  for the pattern "abcd").

`content_match_top` puts one of each on a shared character stream.

## The building blocks

Every processor is a control unit (a finite state machine) plus a datapath:

```
              +------------- control unit --------------+
  status  --> | address counter i   (+1 adder: j = i+1)  |  --> RA (PortA addr)
  (Next,      | k FSM (approximate matcher only)         |  --> RB (PortB addr)
   Restart,   +------------------------------------------+
   Jump)
              +---------------- datapath ----------------+
  din ------> | input register y (loads every clock)     |
  we/waddr/   | L x 8 register file: pattern + end code  |
  wdata ----> |   PortA -> x[i]   PortB -> x[j]   x[0]   |
              | comparators: y==x[i], y==x[j], y==x[0]   |  --> status
              | end detector: x[i] == 8'hFF              |  --> match
              +------------------------------------------+
```

* **Comparator** (`char_comparator`): eight XNOR gates, one per bit pair, and
  one 8-input AND. Its output is 1 when the two characters are equal.
* **Register file** (`pattern_regfile`): L = 16 entries of 8 bits. It has one
  synchronous write port and two asynchronous read ports, PortA and PortB.
  A third output always shows address 0.
  A pattern of N characters sits at addresses 0..N−1. The end code `8'hFF`
  sits at address N, so N ≤ L − 1 = 15.
* **End detector** (`end_detector`): flags PortA reading the end code. This
  is the match output.
* **Address counter** (`exact_ctrl`, `approx_ctrl`): a binary up counter whose
  value i is the PortA address, i.e. how much of the pattern has been seen.
* **+1 adder** (`addr_incr`) and **k FSM** (`k_fsm`): the approximate
  matcher's extras, giving the neighbour address j = i + 1 and remembering
  whether the current attempt has already used its one difference.

## How the exact matcher walks the pattern

Each cycle the input register holds one stream character y. The comparators
produce **Next** = (y == x[i]) and **Restart** = (y == x[0]). In the exact
matcher PortB's address lines are tied to 0, so PortB supplies x[0]. At the
clock edge the counter moves, in this priority:

| condition                     | new i | meaning                                   |
|-------------------------------|-------|-------------------------------------------|
| x[i] is the end code          | 1 if Restart, else 0 | match reported this cycle |
| Next                          | i + 1 | one more pattern character matched        |
| Restart                       | 1     | mismatch, but y can start a new attempt   |
| otherwise                     | 0     | mismatch                                  |

Example, pattern "abcd", stream `z a b c d a b c d`: i runs 0, 0, 1, 2, 3, 4
(match), 1, 2, 3, 4 (match). In the cycle that reports a match, the character
in the input register is already checked against x[0]. That is why
back-to-back occurrences are both found.

The scan restarts at position 1 at most. It is not a full brute-force search:
an occurrence that begins inside an abandoned attempt further back than one
character is missed. For example, "aab" is not found in "aaab".

## How the approximate matcher tolerates one difference

PortA reads x[i] and PortB reads the neighbour x[i+1]. Comparator A gives
**Next** = (y == x[i]). Comparator B gives **Jump** = (y == x[i+1]).
Comparator C gives **Restart** = (y == x[0]). The k FSM has three states:
s_0 (no difference), s_{0-1} (a pattern character is being repeated) and s_2
(a pattern character was skipped). k = 1 in the last two. Priority at each
clock edge:

| condition                 | new i                 | k FSM    | what it models                   |
|---------------------------|-----------------------|----------|----------------------------------|
| x[i] is the end code      | 1 if Restart, else 0  | s_0      | match reported this cycle        |
| Next                      | i + 1                 | s_0      | regular match                    |
| Jump                      | i + 2                 | s_2      | x[i] was deleted from the stream |
| neither, k = 0            | i (x[i] repeated)     | s_{0-1}  | y was inserted (or substituted)  |
| neither, k = 1            | 1 if Restart, else 0  | s_0      | second difference: give up       |

A substitution is a repetition followed by a jump. The example "axcd"
against "abcd" runs cycle by cycle as follows (values while y is in the
input register):

| y   | i (PortA) | j (PortB) | Next | Jump | action        | match |
|-----|-----------|-----------|------|------|---------------|-------|
| a   | 0         | 1         | 1    | 0    | i := 1        | 0     |
| x   | 1         | 2         | 0    | 0    | repeat, k = 1 | 0     |
| c   | 1         | 2         | 0    | 1    | i := 3        | 0     |
| d   | 3         | 4         | 1    | 0    | i := 4        | 0     |
| r   | 4         | 5         | 0    | 0    | end           | **1** |

Things to know about this rule set:

* k returns to 0 after every regular match. Differences separated by at
  least one regular match are each tolerated: "axbcyd" (two insertions)
  matches "abcd". Only two differences in a row end an attempt.
* A Jump is taken whatever k is. That is what lets a repetition followed by a
  jump form a substitution.
* Deleting the last pattern character is not detected ("abc" for "abcd"):
  nothing follows it for the Jump comparator to see.
* Deleting the first character ("bcd") is detected from i = 0. Substituting
  the first character ("xbcd") is detected only if k was 0 when the "x"
  arrived. While idle at i = 0, k toggles on every non-matching character.
* Jump is suppressed when PortB reads the end code, so the counter cannot
  step past the end of the pattern.

## Timing

One character is accepted on `din` every clock cycle. There is no valid or
stall signal.

* Edge t: the character presented before edge t is loaded into the input
  register.
* Cycle after t: that character is compared.
* Edge t + 1: the counter moves.
* If the character completed an occurrence, `match` is high from edge t + 1
  to edge t + 2. It is high for exactly one cycle per occurrence.

At one character per cycle, a 1 Gbit/s stream needs a 125 MHz clock. No
timing closure has been done for any device.

## Loading and replacing patterns

Write the characters at addresses 0..N−1 and `8'hFF` at address N through the
unit's `we`/`waddr`/`wdata` port, one character per clock.

* After reset every entry holds `8'hFF`. A unit whose address 0 holds the end
  code is empty: its counter stays at 0 and it never reports a match.
* Writes take effect at the clock edge. The unit keeps matching while it is
  written, so its output is meaningless until the new pattern and its end
  code are complete.
* A character outside the pattern then brings the counter back to 0, two for
  the approximate unit.
* Each unit has its own write port. Rewriting one unit does not disturb the
  other.
* Stream characters equal to `8'hFF` cannot be part of a pattern.

## Top level: `content_match_top`

| port                          | dir | width | meaning                                  |
|-------------------------------|-----|-------|------------------------------------------|
| `clk`, `rst_n`                | in  | 1     | clock, asynchronous active-low reset     |
| `din`                         | in  | 8     | stream character, one per clock          |
| `ex_we`, `ex_waddr`, `ex_wdata` | in | 1/4/8 | exact unit's pattern write port         |
| `ap_we`, `ap_waddr`, `ap_wdata` | in | 1/4/8 | approximate unit's pattern write port   |
| `ex_match`, `ap_match`        | out | 1     | occurrence found (one-cycle pulse)       |
| `ex_addr`, `ap_addr_a`, `ap_addr_b` | out | 4 | pattern addresses i (and i+1)          |
| `ex_next`, `ex_restart`, `ap_next`, `ap_jump` | out | 1 | status signals, for observation |
| `ap_k`, `ap_k_state`          | out | 1/2   | error count and k FSM state              |

Parameter `L` (default 16) sets the register file depth, and `AW` = clog2(L)
sets the address width. The observation outputs can be left open.

Hierarchy:

```
content_match_top
├── exact_matcher
│   ├── exact_ctrl
│   └── exact_datapath ── pattern_regfile, char_comparator ×2, end_detector
└── approx_matcher
    ├── approx_ctrl ── addr_incr, k_fsm
    └── approx_datapath ── pattern_regfile, char_comparator ×4, end_detector
```

`cm_pkg` holds the character type, the default depth, the end code and the k
FSM state type. Synthesised at the defaults, the top comes to about 150
word-level cells and 274 flip-flop bits, most of them in the two 16 × 8
register files.

## What is this implementation's own

The comparator, the register file organisation (16 × 8, one write port, two
read ports), the counter-based control units, both step rules, the three-state
k FSM, the end code `8'hFF` and the one-cycle match pulse are the design as
described. The following were chosen here:

* In the cycle that reports a match, the current character is checked
  against x[0]. The plain rule returns to 0 and would lose a directly
  following occurrence.
* The approximate matcher has a third comparator for Restart. The design
  calls for one, but does not say where it acts. Here it acts where the exact
  matcher uses it: when an attempt is abandoned, and in the end cycle. It
  reads x[0] from an extra, hard-wired read output of the register file.
* Jump is suppressed when PortB reads the end code.
* Empty units: the reset value of the register file is the end code, and an
  empty unit never matches.
* The reset is asynchronous and active low.
* The input register resets to `8'h00`.
* The k FSM's transitions are derived from the step rules. Its states are
  encoded as 0, 1, 2.
* The top holds one unit of each kind on one stream. The design's intent is
  many single-pattern units side by side, but it fixes no count. More units
  are more instances of `exact_matcher` or `approx_matcher` fed from the same
  `din`.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends it with a failure
if it hangs. `tb/cm_ref_pkg.sv` holds software models of both step rules,
which the matcher testbenches compare with cycle by cycle.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cm_pkg.sv tb/cm_ref_pkg.sv tb/tb_content_match_top.sv \
    --top-module tb_content_match_top
./obj_dir/Vtb_content_match_top
```

Replace the testbench name to run another one (`tb_exact_matcher`,
`tb_approx_matcher`, `tb_k_fsm`, …). All of them finish in well under a
second.

What the tests cover:

* `tb_content_match_top` runs at the default size with no parameter
  overrides. It covers:
  * both units empty;
  * loading "abcd";
  * back-to-back occurrences;
  * a long random stream with inserted exact and one-difference occurrences;
  * six rounds of reloading one unit with a random pattern of up to 15
    characters while the other keeps running.

  It counts each mechanism: Next, Restart, end-cycle restart, Jump,
  repetition, give-up, matches of both units, and matches during a reload.
  A mechanism that never occurs counts as a failure.
* `tb_approx_matcher` runs three parts:
  * the "r r a x c d r r" example, checked against the table above;
  * the variants "acd", "abd", "axcd", "abxd", "aybcd", "abycd", "abcd",
    "bcd", each of which must match once;
  * "axyd", "abxyd", "ad", which must not match.
* `tb_exact_matcher` checks the match cycle of each occurrence in a directed
  stream, which also checks the two-edge latency.
