# Regular-expression matching with generated NFA circuits

A regular expression can be matched in hardware without ever building its
deterministic automaton. Instead, the expression's *nondeterministic* finite
automaton (NFA) is laid out directly as a circuit: every literal of the
expression becomes one flip-flop (one NFA state), and the operators `|`,
concatenation, `*`, `?`, `.`, `[^...]`, `^` and `$` become a few gates that
route "activation" from one state to the next. All states update in
parallel on every clock, so the circuit takes one input character per clock
whatever the pattern, and its size grows linearly with the length of the
expression. A software DFA for the same pattern can need memory exponential
in the pattern length; the classic example is `(a|b)*a(a|b)^k`, "the
(k+1)-th symbol from the end is an `a`", whose DFA has 2^(k+1) states while
the circuit here has k+1 state flip-flops.

This repository holds the library of circuit "bricks" from which such a
matcher is assembled, a shared-decoder variant of the literal state meant for
ASICs, three matchers assembled from the bricks by hand, a matcher that
assembles itself at elaboration from a pattern string, and a top level that
runs them side by side on one input stream.

## The timing model: one state, one flip-flop, one character per clock

Everything hinges on how a literal state works (`nfa_comparator`):

```
          en ──►[D  Q]── active ──┐
                 clk              AND ──► hit
  data ──► (data == CHAR) ────────┘
```

* `en` says "the match has reached the point just before this character".
  It is captured by the flip-flop on the rising edge.
* In the next cycle, with the next character on `data`, `hit` is 1 if the
  state is active and the character is `CHAR`: the character has been
  consumed.
* `hit` is combinational and drives the `en` of whatever follows, which
  captures it on the following edge.

So the flip-flops hold the NFA's set of active states, and the gates between
them compute the next set from the current character. Every brick other than
a literal (or `.`) is pure combinational glue. A matcher's `match` output is
combinational too: it is 1 *in the cycle of the character that completes a
match*. There is no extra pipeline latency, and the rate is one character per
clock.

The outermost brick of every matcher has its activation tied to 1. That makes
the first state of the pattern active in every cycle, so a match may start at
any position of the text: the matcher finds substrings, not whole strings,
unless the pattern is anchored.

**Reset and the first character.** `rst_n` (asynchronous, active low) clears
every state. The first rising edge after reset loads the constant activation
into the first state(s), so the first character of the text must be
presented in the cycle *after* that edge. All testbenches do this: release
reset, let one edge pass, then start feeding characters.

There is no valid/ready handshake: a character is consumed on every clock. To
pause the stream you must gate the clock or add a clock enable to the
flip-flops (not provided).

## The bricks

Each brick has the ports of one node of the expression's syntax tree: an
activation input `en` and a completion output `hit` towards its parent, and,
for operators, an activation output and a completion input per operand. In
the original numbering of the brick ports, odd wires are outputs and even
wires inputs; the port comments give that number (`w1` = `hit`, `w2` = `en`,
`w3`/`w4` = first operand, `w5`/`w6` = second operand).

| Module | Expression | Equations | State |
|---|---|---|---|
| `nfa_comparator` | literal `c` | `hit = active & (data == c)`, `active <= en` | 1 FF |
| `nfa_dec_comparator` | literal `c`, decoder style | `hit = active & line[c]` | 1 FF |
| `nfa_dot` | `.` | `hit = active` | 1 FF |
| `nfa_union` | `r1 \| r2` | `a_en = b_en = en`, `hit = a_hit \| b_hit` | — |
| `nfa_concat` | `r1 r2` | `a_en = en`, `b_en = a_hit`, `hit = b_hit` | — |
| `nfa_closure` | `r*` | `sub_en = en \| sub_hit`, `hit = en \| sub_hit` | — |
| `nfa_optional` | `r?` | `sub_en = en`, `hit = en \| sub_hit` | — |
| `nfa_anchor` | `^` / `$` | `sub_en = en`, `hit = sub_hit & mark` | — |
| `nfa_exclusion` | `[^c1..cn]` | `sub_en = en`, `hit = active & ~sub_hit`, `active <= en` | 1 FF |
| `nfa_decoder` | (shared) | `lines[c] = (data == c)` for c = 0..255 | — |

Things worth knowing about individual bricks:

* **Closure and option** pass their activation straight to their output,
  because `r*` and `r?` match the empty string. The closure's loop
  (`sub_en = en | sub_hit`) is broken by the flip-flops inside `r`. If `r` has
  no flip-flop of its own, the loop is combinational; that happens for a bare
  `r**` or `(r?)*`. Such patterns must be simplified before they are built
  (`r**` = `r*`).
* **Negated class** `[^xy]` is built as the union `(x|y)` of ordinary
  comparators under an `nfa_exclusion`. The exclusion inverts the union's
  output. A bare inverter would be 1 whenever the class is *inactive*, so the
  exclusion keeps its own copy of the state flip-flop and outputs
  `active & ~class_hit`. It captures the same activation on the same edge as
  the class's comparators.
* **Anchors** cannot be expressed as NFA edges. The environment supplies
  pulses instead: `sof` (the "s" pulse) is high with the first character of a
  string and `eof` (the "f" pulse) with the last. The anchor is placed after
  the literal it guards, so `^ben` is built as `b^ e n`. The completion of
  `b` counts only when `b` was the first character. `$` gates the last
  literal with `eof` in the same way.
* **`.`** is a state whose compare is always true.

## How a pattern becomes a circuit

A matcher is assembled mechanically from the expression:

1. **Simplify and rewrite.**
   * A leading `r*` is dropped: the matcher already tries every start
     position.
   * `r+` becomes `r r*`.
   * `r{n}` becomes n copies of `r`.
   * `[abc]` and ranges `[a-k]` become unions.
   * `[^...]` becomes an exclusion over a union.
   * An escaped metacharacter (`\*`, `\+`) becomes an ordinary literal.
2. **Convert to postfix.** The expression goes through the usual
   operator-stack conversion, which removes the parentheses. A `^` is swapped
   with the literal after it.
3. **Place bricks while reading the postfix form left to right.**
   * A literal places a comparator and pushes its number.
   * A binary operator pops two numbers, places its brick over them and
     pushes the brick's number.
   * A unary operator pops one.
   * At the end, the entries left on the stack are joined by concatenations,
     popped from the top, so the concatenations nest to the right.
   * The last brick's activation is tied to 1 and its completion is `match`.

`nfa_match_example` is this procedure carried out by hand for
`(a|b)*c(d|e)f*g` (postfix `a b | * c d e | f * g`). Its instance names carry
the brick numbers in placement order, from `comparator1` to
`concatenation15`.

### Building from a pattern string: `nfa_regex`

`nfa_regex` does the whole procedure at elaboration time. Its parameter
`PATTERN` is an ordinary string, for example
`nfa_regex #(.PATTERN("x[0-9]+y"))`. The constant function
`nfa_build_pkg::compile_pattern` tokenizes and rewrites the pattern,
converts it to postfix and builds a node list. A generate loop then
instantiates one brick per node. Each node `n` has an activation `en_w[n]`
and a completion `hit_w[n]`. An operator brick drives the `en_w` of its
operands and reads their `hit_w`, so each `en_w` has exactly one driver.

Details of the construction:

* **Concatenation is explicit.** The tokenizer inserts it between an
  operand-ending token and an operand-starting token. In precedence it
  binds looser than the postfix operators `* + ? {n}` and tighter than `|`.
  The simpler scheme joins whatever is left on the stack at the end, and
  that handles only concatenation at the top level: `(ab)|c` would go wrong.
* **Nodes are created in postfix order,** so every subtree is a contiguous
  run of node numbers ending at its root. `r+` (as `r r*`) and `r{n}` (as n
  copies) copy that run with an offset.
* **Classes are expanded into unions of literals.** `[a-z]` costs 26 states
  (their flip-flops merge in synthesis, since all capture the same
  activation).
* **Supported syntax:**
  * literals and `\c` escapes;
  * `.`, `|`, `*`, `+`, `?`, `{n}` and parentheses;
  * `[...]` with ranges, and `[^...]`;
  * a leading `^` and a trailing `$`.
* **Not supported:**
  * `{n,m}`;
  * `^` before a group that can match more than one symbol (the anchor
    tests only the first symbol).
* **Limits.** The netlist may hold up to 512 nodes
  (`nfa_build_pkg::MAX_NODES`). A pattern that cannot be built stops
  elaboration with an error.
* **No simplification.** A leading `r*` is not dropped, so the circuit is a
  few states larger than a hand-reduced one, but it behaves the same.

## The matchers in this repository

| Module | Pattern | Notes |
|---|---|---|
| `nfa_match_example` | `(a\|b)*c(d\|e)f*g` | the worked example; `USE_DECODER` selects the literal style |
| `nfa_match_kth` | `(a\|b)*a(a\|b)^K` | the scaling workload, K = 28 by default; leading closure dropped, so it is `a` followed by a chain of K `(a\|b)` stages |
| `nfa_match_ext` | `^d[^eE]e?.f$` | exercises anchor, exclusion, option and dot; matches `d`, a non-`e`/`E`, an optional `e`, any character, `f`, as a whole string |
| `nfa_regex` | any `PATTERN` string | built at elaboration, see above |
| `regex_nfa_top` | all of the above | one stream in; `match_example`, `match_example_dec`, `match_kth`, `match_ext`, `match_regex` out; `match_regex` uses `nfa_regex` with `(a\|b)*a(a\|b){28}` by default, so it must agree with `match_kth` |

`nfa_literal` is a small wrapper that picks the comparator style from
`USE_DECODER`. In each style one of its inputs (`lines` or `data`) goes
unused, and lint reports it as such. `nfa_match_ext` is an example of this
repository's own. Its pattern combines metacharacter examples commonly used
to explain `[^...]`, `?`, `.`, `^` and `$`.

### Size

After synthesis, `nfa_match_kth` at K = 28 has 29 flip-flops, one per stage.
The two comparators of a `(a|b)` union capture the same activation, so their
flip-flops merge. In general, the flip-flop count is at most the number of
literal, `.` and `[^...]` states in the simplified pattern. Logic grows linearly with the pattern.
The original FPGA implementation of this workload used k+3 logic elements for
k = 8…28, in line with this count.

## Decoder-style literals (for ASICs)

With one 8-bit equality comparator per literal, a long pattern repeats the
same compare many times. The alternative is one `nfa_decoder` per matcher,
which turns the character into 256 one-hot lines, and `nfa_dec_comparator`
states that each AND their flip-flop with one line. Each decoder line is
written as its own equality, so synthesis removes the lines no state uses.
This pays off once the pattern has more literals than a decoder costs. It
suits ASICs more than FPGAs, whose look-up tables absorb small comparators
anyway. `USE_DECODER = 1` on `nfa_match_example`, `nfa_match_kth` or `nfa_regex`
selects this style. The top instantiates the worked example both ways, and the two
outputs must always agree.

## Where this RTL departs from, or adds to, the original design

* **Reset.** `rst_n` and its clearing of all states are additions. The
  original circuits had none.
* **Separate `sof` and `eof`.** The original generated module had one input
  named `sf`. The anchors need a start pulse and a finish pulse, so they are
  separate inputs here. The unanchored matchers do not use them.
* **Brick insides that are choices of this repository.** These bricks were
  named but not drawn, so their insides come from the behaviour of the
  operator:
  * concatenation, closure, option and dot (their gates);
  * the state flip-flop in the exclusion;
  * the AND in the anchor.

  The original listing gives the dot four ports and an operand. Here it is a
  leaf state.
* **One module per brick, with parameters.** The original generator printed
  a separate module per character (`comparator_a`, `comparator_b`, ...).
  Here a single `nfa_comparator` takes a `CHAR` parameter.
* **No string isolation.** Matchers keep their state across string
  boundaries. A substring match may span two strings in the stream. An
  anchored pattern can only start at an `sof`, so it is unaffected.
* **Elaboration-time construction.** The netlist for a pattern was
  originally printed by a separate generator program. `nfa_regex` builds it
  with constant functions during elaboration instead, and its postfix form
  has an explicit concatenation operator.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each ends by printing `TB_RESULT checks=<n> failures=<m>`. A watchdog ends a
stuck run as a failure. The matcher testbenches compare every cycle with
reference functions in `tb/tb_regex_ref_pkg.sv`. These decide a match by
scanning the input history directly, without an automaton. Run one with
plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/regex_nfa_pkg.sv rtl/nfa_build_pkg.sv tb/tb_regex_ref_pkg.sv \
    tb/tb_regex_nfa_top.sv \
    --top-module tb_regex_nfa_top -o sim
./obj_dir/sim
```

* **`tb_regex_nfa_top`** runs the whole top at its default parameters. It
  feeds about 18,000 characters, made of anchored test strings,
  `c[de]f*g` snippets and long `a`/`b` runs. It checks all four outputs in
  every cycle. It also requires each mechanism to occur at least once:
  * a match of each pattern;
  * the `f*` loop taken two or more times;
  * a K-matcher miss caused by a `b` at the decisive position;
  * the optional `e` both taken and skipped;
  * a rejection by the negated class, by `^` and by `$`.
* **`tb_nfa_match_kth`** runs K = 8 and K = 28, the two ends of the
  evaluated range.
* **`tb_kth_workload`** runs the whole family, k = 8 to 19 and 28, on 20,000
  random `a`/`b` symbols. Each size must both match and narrowly miss.
* **`tb_nfa_match_example`** runs both literal styles against the same
  reference.
* **`tb_nfa_regex`** builds seven patterns from strings and checks each
  against its reference:
  * the worked example, in both styles;
  * the anchored example;
  * `(a|b)*a(a|b){8}`;
  * `x[0-9]+y`;
  * `\*+\.`;
  * `(ab)+c`.
* **Brick testbenches.** The combinational bricks are checked exhaustively.
  The state-holding bricks are checked against the rule "output follows the
  previous cycle's activation" with random stimulus.

All of these pass, and each testbench has been shown to fail when its module
is deliberately broken. Timing against a clock target has not been
analysed. The critical path is one comparator, then the glue of the deepest
operator nesting, into the next flip-flop.
