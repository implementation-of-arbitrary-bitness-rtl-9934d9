# Arbitrary-bitness permutations from a chain of Mealy-machine cells

This RTL builds a permutation (a bijective map) of words of any width out of
one small cell repeated along a line. The cell is a single step of a Mealy
machine. It takes one input symbol `x` of `d` bits and the machine state `s`
of `w` bits. It produces an output symbol `y = f_o(x, s)` and the next state
`s' = f_s(x, s)`. Chain `R` cells so that each one hands its state to the next,
feed the first one a fixed initial state, and the `R` output symbols form a
map of `R*d`-bit words. The circuit is combinational and linear in the word
width. If every row of the output table is a permutation of the alphabet
(for each state, different inputs give different outputs), the map is a
bijection for any `R`. Each cell is `d + w` boolean functions of `d + w`
inputs, so with `d + w <= 6` every function fits in one 6-input FPGA LUT.

The same machine can also run in time instead of space: one table lookup and
one state update per symbol, for messages of any length. This design contains
both forms and the inverse of each.

## The machine that is built in

The default machine has an alphabet of `n = 8` symbols (`d = 3` bits) and
`m = 12` states (`w = 4` bits). Its two 12 x 8 tables are in `rtl/ocsu_pkg.sv`.
They are written 1-based (`x_1..x_8`, `y_1..y_8`, `s_1..s_12`) and converted
to codes at elaboration. Symbol `x_k` has code `k-1`, and so does state `s_k`.
The initial state is `s_1` (code 0). The default cascade has `R = 8` cells,
which makes a permutation of 24-bit words.

This machine has 12 states, which is not a power of two. So state codes 12 to
15 exist in the 4-bit side signals but are not states. The cells read them as
state `s_1`, so both functions are defined for every input. A cascade never
produces these codes itself.

## Why the cascade is a permutation

Take two input words that first differ at position `k`. Cells `1..k-1` see the
same symbols and the same states, so they agree. Cell `k` sees the same state
but different symbols. Because that row of `f_o` is a permutation, cell `k`
gives different outputs. So different words always give different results, and
a map from a finite set to itself that never merges two inputs is a bijection.
Only the output table must satisfy this. The state table may be any function;
it decides which permutation you get.

Many machines give the same permutation: renumbering the states (apply the
same relabelling to the rows, the state entries and the initial state) changes
the tables but not the map.

## The inverse machine (the part worth reading twice)

`F^-1` is built from a second machine with the same states. Both of its tables
come from the direct tables, one state row at a time:

* inverse output table, row `s`, column `v`: the input symbol `x` for which the
  direct output table gives `f_o(x, s) = v`;
* inverse state table, row `s`, column `v`: the direct next state `f_s(x, s)`
  for that same `x`.

The inverse machine starts in the same initial state. At every position it
sees the direct machine's output symbol, recovers the input symbol, and moves
to exactly the state the direct machine moved to. So the two machines walk the
same state path and `F^-1(F(x)) = x` holds symbol by symbol. Their final states
match too.

`rtl/ocsu_invert.svh` holds this construction as elaboration-time functions
over the flat tables (entry `[s*N + x]`). Every module that needs the inverse
tables includes it, so you only supply the direct tables. For the built-in
machine the derived tables were checked cell by cell against an independently
written copy of the inverse tables, in `tb/tb_ocsu_ref_pkg.sv`.

## Blocks

| module | what it is |
|---|---|
| `ocsu_pkg` | sizes, the direct output and state tables, their conversion to codes |
| `ocsu_invert.svh` | construction of the inverse tables (included in modules) |
| `ocsu_fo` | output function `f_o(x, s)`: a table lookup |
| `ocsu_fs` | state function `f_s(x, s)`: a table lookup |
| `ocsu_su` | one cell: `ocsu_fo` and `ocsu_fs` fed from the same `x` and `s` |
| `ocsu_cascade` | `R` cells in a chain; computes `F` with direct tables, or any machine given as parameters |
| `ocsu_inv_cascade` | derives the inverse tables and runs an `ocsu_cascade` on them: `F^-1` |
| `ocsu_stream` | the machine run sequentially, one symbol per clock, either direction |
| `ocsu_top` | a direct cascade, an inverse cascade and a stream unit on one machine |

All modules take `N`, `M` and the tables as parameters. The tables are flat
`int unsigned` arrays of `M*N` entries, indexed `[s*N + x]`. Their defaults
are the built-in machine.

### Cascades (`ocsu_cascade`, `ocsu_inv_cascade`)

Ports: `x[R]` (packed, symbol `k` at bits `[k*d +: d]`, symbol 0 enters the
first cell), `s_in` (initial state), `y[R]`, `s_out` (state after the last
cell). They are purely combinational, with a depth of `R` table levels: the
delay is `R` times one LUT delay. `s_out` lets you join cascades into a longer
one: connect it to the next cascade's `s_in`. The inverse cascade has the same
ports with `x` and `y` exchanged, and it takes the direct tables as parameters.

### Stream unit (`ocsu_stream`)

The interface is synchronous to `clk`, with a synchronous active-low reset
`rst_n` that puts the machine in the initial state.

* `in_valid` / `in_sym`: one symbol per clock. There is no back-pressure. An
  idle cycle leaves the state unchanged.
* `in_first`: marks the first symbol of a message. The machine restarts from
  the initial state, and `inverse` is sampled as the direction for the whole
  message (0 = `F`, 1 = `F^-1`).
* `out_valid` / `out_sym`: the result, registered, exactly one clock after its
  symbol.
* `state`: the state register.

Per symbol it reads both tables at `(state, symbol)` and writes the state
back, all in one clock. A message of `r` symbols gives the same `r` output
symbols as an `r`-cell cascade. The handshake, the one-cycle latency and the
per-message direction bit are this design's choices.

### Top (`ocsu_top`)

The three datapaths are independent and share only the machine definition.
Both cascades start from the initial state. Their final states come out on
`dir_state_out` and `inv_state_out`. The stream unit's ports carry the same
names as above, and its state register comes out as `stream_state`.

## Sizes

For the default machine, one cell's tables hold `12*8*3` output bits and
`12*8*4` state bits. The software storage figure for one machine,
`nmd + (nm + 1)w`, is 676 bits; the extra `w` is the state register. The
stream unit keeps both the direct and the inverse tables, 1344 table bits in
all, as constant logic. Synthesis maps every lookup to a small ROM. The only
flip-flops are the stream unit's 9: state, direction, output valid and
output symbol.

Other machines fit by parameter override. Examples are an 8-bit permutation
from 4 cells with `n = m = 4` (`N=4, M=4, R=4`, two LUTs per cell when two
5-input functions share a LUT), and `n = 16, m = 4`, `R = 2`. You must supply
the tables. Every output row must be a permutation of `0..N-1`; `ocsu_fo`
stops elaboration with an error otherwise. `N` must be a
power of two. `M` need not be.

## Where this RTL goes beyond, or departs from, the method

* The initial state (`s_1`), the cascade length (`R = 8`), the symbol and
  state coding and the word packing are choices of this design.
* Reading state codes `>= M` as `s_1` is this design's rule. The method
  assumes fully defined functions over a power-of-two number of states.
* The tables are fixed at elaboration. Loading them at run time, for example
  to use a table pair as a key, is not built.
* The random generation of tables (each output row a random permutation, with
  the state table redrawn until the machine is connected) is an offline
  procedure. It is not hardware here.
* Cascades whose cells pass state in both directions are not built. No
  functions are defined for them beyond two states.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`, and each has a cycle-count watchdog. The
reference is `tb/tb_ocsu_ref_pkg.sv`, which runs the machine symbol by symbol
from its own copy of all four tables.

* `tb_ocsu_fo`, `tb_ocsu_fs`, `tb_ocsu_su`: every `(state, symbol)` pair,
  including the unused state codes, and a check that each row's outputs form
  a permutation.
* `tb_ocsu_cascade`: 2000 random words from random initial states at `R = 8`,
  plus all 64 words of a 2-cell cascade, to check that the map is a bijection.
* `tb_ocsu_inv_cascade`: the derived inverse tables cell by cell, plus 2000
  random round trips through a direct and an inverse cascade.
* `tb_ocsu_stream`: 300 messages of 1 to 24 symbols in both directions, with
  idle cycles. It checks the latency (exactly one clock), the state register,
  and round trips.
* `tb_ocsu_top`: the full design at default parameters. It checks the direct
  cascade against the model and the inverse cascade round trip. It streams
  each word through the sequential unit and compares the result with the
  cascade, then streams it back. It also covers idle cycles, restarts from a
  non-initial state and a reset in mid-message, and counts that each of these
  happened.

* `tb_ocsu_byte`: the byte-wide configurations, four cells of an
  `n = m = 4` machine and two cells of an `n = 16, m = 4` machine, plus a
  16-bit case (four cells, `n = 16, m = 12`). Each is swept over every word:
  it checks against the model, checks that the map is a bijection, and checks
  the inverse round trip. The tables are made at elaboration by
  `tb_ocsu_perm_check` with the random construction described above (output
  rows drawn symbol by symbol without repeats, state table redrawn until every
  state is reachable from the initial one). A fixed linear congruential
  generator drives it, so the result is reproducible.
* `tb_ocsu_equiv`: relabels the states of the built-in machine with a
  bijection `p`. Output row `s` becomes row `p(s)`, next states are mapped
  back through `p^-1`, and the initial state becomes `p^-1(s_1)`. The test
  shows that the cascade computes exactly the same permutation.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ocsu_pkg.sv tb/tb_ocsu_ref_pkg.sv tb/tb_ocsu_top.sv \
  --top-module tb_ocsu_top -o sim
./obj_dir/sim
```

Replace `tb_ocsu_top` with any other testbench name. Verilator finds the
modules in `rtl/` by file name. Every testbench finishes in well under a
second.
