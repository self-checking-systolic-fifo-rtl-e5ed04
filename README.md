# Self-checking systolic LIFO stack

A register stack (last in, first out) built as a linear array of identical
cells, where every cell has its own tiny state controller that looks only at
its immediate neighbours. No signal has to travel the length of the array to
move a word, so the array can be made as deep as needed without slowing it
down: a new cell is just one more column and one more controller.

On top of that the stack checks itself while it runs. Every word is stored
with its Berger check symbol, the binary count of zeros in the word. When a
word is popped, its symbol is computed again and compared with the stored one
through a totally self-checking two-rail checker. Any unidirectional error
(bits that flipped only 1 to 0, or only 0 to 1, in the word, the symbol or
both) is flagged in the same cycle. That is the usual signature of
intermittent faults that a one-off production test would miss.

Default build: 32-bit words, 6-bit check symbol (38 bits stored per word),
16 words deep.

## The array and its cells

```
 host ──push──► C0 ──► C1 ──► C2 ──► C3 ── … ──► CN
                temp   top
                        │
                        └──► data bus ──► checker ──► err[1:0]
```

* **C0, the temporary cell.** A pushed word, with the symbol from the push-side
  generator, lands here first. It stays only until the top cell is free.
* **C1, the top of the stack.** It drives the pop data bus.
* **C2 … CN** hold the rest of the stack, newest nearer C1.

Each cell is either *occupied* or *empty*, and that one bit, held in a JK
flip-flop, is the whole state of its controller. "Left" means towards the
host and "right" means away from it.

## How words move: the two rules

Every clock edge, every cell applies two local rules:

* **Rule 1:** if C(i-1) and C(i) are occupied and C(i+1) is empty, the word
  in C(i) moves right into C(i+1).
* **Rule 2:** if C(i-2) and C(i-1) are empty and C(i) is occupied, the word in
  C(i) moves left into C(i-1).

A cell also takes in a word when one of its neighbours applies a rule towards
it. From the left it takes one when C(i-2) and C(i-1) are occupied and it is
empty. From the right it takes one when C(i-1) and it are empty and C(i+1) is
occupied. That is why a standard controller reads the occupied bits of two
cells on its left and one on its right.

The rules never clash. A cell cannot be asked to take two words at once,
because the two cases need C(i-1) occupied and empty at the same time. For the
same reason it cannot send its word both ways. So all cells act on the same
edge, and words keep their order: nothing ever overtakes another word.

The ends of the array are special:

* **C0 (`cu_temp`)** accepts a push when it is empty and at least one of
  C1..CN is empty (`full` low). It passes its word to C1 as soon as C1 is
  empty. In effect C0 is the permanently occupied left neighbour that drives
  Rule 1 at the top.
* **C1 (`cu_top`)** serves a pop when it is occupied and C0 is empty. It
  shifts right to C2 when C0 and C1 are both full and C2 is empty. When it is
  empty it takes C0's word, or C2's word if C0 is empty too.
* **CN (`cu_std` with `LAST=1`)** has no right neighbour. It never moves right
  and never loads from the right.

The result is that words do not sit packed together. Holes travel through the
array, and in steady state the occupied cells near the top alternate with
empty ones. Here is a 6-cell stack with a push requested in every cycle
from cycle 0 to 13 and a pop in every cycle after that. Each line shows the
occupancy of C0 and C1..C6 at the start of the cycle and which request was
accepted on its closing edge:

```
cycle  C0 C1..C6  accepted      cycle  C0 C1..C6  accepted
  0    0  000000  push           14    0  110111  pop
  1    1  000000                 15    0  001111
  2    0  100000  push           16    0  010111
  3    1  100000                 17    0  100111  pop
  4    1  010000                 18    0  001011
  5    0  110000  push           19    0  010011
  6    1  101000                 20    0  100101  pop
  7    1  011000
  8    0  110100  push
```

A sustained stream of pushes is
taken at one word every 3 cycles, and so is a stream of pops. A pending pop
waits at most 4 cycles and a pending push at most 2. These figures were
measured on stacks of 8, 16, 64 and 256 cells and are the same at every
depth.

## Self-checking path

* `berger_csg` is the check symbol generator. It counts the zeros of the
  data word. For I information bits the symbol has K = ceil(log2(I+1)) bits:
  6 for 32-bit words.
* On a push, one generator produces the symbol. The symbol travels through
  the array with its word: each column is I+K bits wide.
* On a pop, `berger_checker` regenerates the symbol from the popped data with
  a second generator. It feeds the stored symbol bits and the inverted
  regenerated bits, as K rail pairs, into `two_rail_checker`.
* `two_rail_checker` is a tree of the classic two-pair cell:
  `z1 = x1·x2 + y1·y2`, `z0 = x1·y2 + y1·x2`. The output pair is
  complementary only if every input pair is.
* `err = 2'b01` or `2'b10` means no error. `2'b00` or `2'b11` means the word
  or its symbol is corrupted. Keeping the result as two rails means a fault
  in the checker itself also shows up as a non-code output. Clean words drive
  both `01` and `10`, so the checker's own output lines keep being exercised.

A column that is emptied is loaded with a valid codeword: all-zero data with
symbol I. So the checker, which always watches C1, reports "no error" while
the stack is idle.

## Interface and timing (`scs_stack`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (empties all cells) |
| `push`, `push_data` | in | 1, I | push request and word; hold until accepted |
| `push_ready` | out | 1 | the push is taken on this clock edge if `push` is high |
| `pop` | in | 1 | pop request |
| `pop_ready` | out | 1 | the pop is taken on this edge if `pop` is high |
| `pop_data`, `pop_check` | out | I, K | top word and its stored symbol, valid while `pop_ready` |
| `err` | out | 2 | two-rail error pair for `pop_data`/`pop_check` |
| `full`, `empty` | out | 1 | all of C1..CN occupied / no word anywhere |

* `push_ready` and `pop_ready` depend only on the stack's state, never on
  `push` or `pop`, so a host can decide within the cycle.
* Popped data is read straight from C1's register, so it is valid in the same
  cycle as `pop_ready`.
* A push and a pop may be accepted together. The pop then returns the word
  that was on top before the push.
* Parameters: `I` (data width, default 32) and `N` (words, default 16,
  at least 2). K is derived from I.

## What follows the source design and what is this design's choice

These parts follow the source design:

* one temporary cell plus N storage cells
* one state controller per cell, in three kinds (temporary, top, standard)
* the two movement rules
* storage columns with four controls and check bits stored beside each word
* two zero-counting check symbol generators, one on the push side and one
  in the checker, and a two-rail checker on the data bus
* the 32-bit / 6-bit example sizes

These are this implementation's own choices:

* **Depth.** N = 16 is this design's choice; no capacity is specified.
* **Controller flip-flop.** The controllers are described as built around
  cascaded master-slave JK flip-flops. Here each controller's state is one
  edge-triggered JK flip-flop, and all cells update on the same edge.
* **Gate-level logic.** The controllers' gates are not specified. They are
  written from the two rules and the listed duties of each controller.
* **Column controls.** The four controls are load-left, load-right, refresh
  and clear. Clear, and the valid-codeword clear value, are additions.
* **Pop waits for C0.** A pop waits while a pushed word still sits in C0. This
  guarantees last-in-first-out order even right after a push.
* **`full` is global.** `full` is the AND of the occupied bits of C1..CN. This
  is the only signal that spans the array.
* **Errors flag, not block.** A word with a detected error is still popped.
  `err` tells the host, and what to do about it is left to the host.
* **Checker tree.** The tree is balanced. An odd pair passes to the next
  level unchanged.
* **Handshake and reset.** The handshake (ready/request) and the reset
  behaviour are this design's own.
* **Stack type.** The design is sometimes called a "FIFO stack", but what it
  describes and what is built here is a LIFO register stack.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line.

* `berger_csg_tb` checks the zero count against `$countones`, and the 7-bit
  and 6-bit code examples 1100101→011 and 110100→011.
* `two_rail_checker_tb` tries every input combination for 6 and 3 pairs.
* `berger_checker_tb` checks for false alarms on clean codewords and for
  detection of random unidirectional errors.
* `storage_column_tb` and `storage_array_tb` compare against a model under
  random controls.
* `cu_temp_tb`, `cu_top_tb` and `cu_std_tb` check each controller against
  the rules under random neighbour states.
* `scs_stack_tb` runs the default 32×16 stack end to end against a LIFO
  model: fill, drain, 20 000 random cycles, and 40 popped words with a forced
  unidirectional error.
  * It counts every mechanism and fails if any never occurs: push, pop, both
    at once, refused push when full, refused pop when empty, pop held by C0,
    C0→C1 hand-over, Rule 1 and Rule 2 moves, and error detected.
  * It also checks the rate and wait bounds given above.
* `scs_stack_depth_tb` runs depths 8, 16, 64 and 256 on one request stream.
  It checks that the wait bounds are equal at all depths.

Run one testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scs_pkg.sv \
    tb/scs_stack_tb.sv --top-module scs_stack_tb
./obj_dir/Vscs_stack_tb
```

The package must come first, and the `-I` paths let Verilator find the other
modules by file name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/scs_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/scs_pkg.sv` | data width default, `berger_k()`, column control struct `cell_ctl_t` |
| `rtl/scs_stack.sv` | top: generators, array, controllers, checker |
| `rtl/storage_array.sv`, `rtl/storage_column.sv`, `rtl/storage_cell.sv` | word columns C0..CN, each built from one-bit basic cells |
| `rtl/cu_temp.sv`, `rtl/cu_top.sv`, `rtl/cu_std.sv` | state controllers of C0, C1, C2..CN |
| `rtl/jk_ff.sv` | JK flip-flop holding each cell's occupied bit |
| `rtl/berger_csg.sv` | zero-counting check symbol generator |
| `rtl/two_rail_checker.sv` | two-rail checker tree |
| `rtl/berger_checker.sv` | generator plus two-rail checker on the pop bus |
| `tb/*_tb.sv`, `tb/stack_harness.sv` | testbenches |
