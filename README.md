# Fish-Bone stack: a hardware stack that moves few items per command

A hardware stack built as a linear array of cells pushes every item one cell
deeper on each put and pulls every item back on each get. Every command then
switches the whole array, so its energy grows with the stack size. The
Fish-Bone stack goes the other way. Each command moves at most two items in a
nine-place leaf and at most four in a 42-place stack. A secondary move is made
only when the *next* command could need the space or the item. Time per
command does not depend on how full the stack is or on the data width.

This repository holds synthesizable SystemVerilog for that stack:

* `fishbone_stack`: the nine-location Fish-Bone leaf.
* `tree_cell`: the two-place tree cell used to combine leaves into a larger stack.
* `fishbone_hybrid_stack` (the top): a 42-place stack made of three tree cells
  over four Fish-Bone leaves. This is the configuration the design was
  evaluated in.

The original circuit is clock-less. It is a network of GasP self-timed control
modules that drive transmission gates in front of latches. This RTL is a
**clocked rendering** of the same state machines and data paths. It takes one
command per clock cycle, and all the moves of a command happen at the same
rising edge.

## The leaf: a spine and six bones

```
        outside s0u   outside s1u   outside s2u
             |             |             |
            0u            1u            2u        upper level
             |             |             |
  env ===== 0c ========== 1c ========== 2c        spine (top level)
             |             |             |
            0d            1d            2d        lower level
             |             |             |
        outside s0d   outside s1d   outside s2d
```

The environment reads and writes only the three spine locations `0c 1c 2c`.
Each spine location `ic` exchanges items only with its own two bone locations:
`iu` (upper) and `id` (lower). Each bone location may in turn exchange items
with an outside stack. Items never move between different indexes. A chain of
three linear levels needs up to three levels of propagation. Here an item is
never more than two levels away from the spine.

Puts and gets rotate through the spine round-robin. The six states `N0..N5`
mean "the next put goes to spine location k mod 3". States N0..N2 and N3..N5
use the two halves of the bones in turn, so over six commands every bone
location is used once. With the put in state `Nk`:

* the new item is written to spine location `k mod 3`;
* the spine item at `(k+1) mod 3`, if present, is pushed into a bone location,
  which frees the place the next put will need;
* the bone item at `(k+2) mod 3` may be pushed to its outside stack.

A get in `Nk` does the reverse. It reads spine location `(k+2) mod 3`, pulls a
bone item into spine location `(k+1) mod 3` if that location is empty, and may
pull an outside item into bone location `k mod 3`. `E` (empty) and `F` (full)
complete the machine.

| state | put: env to | push spine to bone | push bone to outside | next | get: to env | pull bone to spine | pull outside to bone | next |
|---|---|---|---|---|---|---|---|---|
| E  | 0c | – | – | N1 | underflow | – | – | E |
| N0 | 0c | 1c→1d if 1c full | 2d→out if 2d full | N1 | 2c | 1d→1c if 1c empty | out→0d if 0d empty | N5 |
| N1 | 1c | 2c→2d if 2c full | 0u→out if 0u full and s0u not full | N2 | 0c | 2d→2c if 2c empty and 2d full | out→1d if 1d empty and s1d not empty | E if 2u and 2d empty, else N0 |
| N2 | 2c | 0c→0u if 0c full and 0u empty | 1u→out if 1u full and s1u not full | F if 0u and 0d full, else N3 | 1c | 0u→0c if 0c empty | out→2d if 2d empty and s2d not empty | N1 |
| N3 | 0c | 1c→1u if 1c full | 2u→out if 2u full | N4 | 2c | 1u→1c if 1c empty | out→0u if 0u empty | N2 |
| N4 | 1c | 2c→2u if 2c full | 0d→out if 0d full | N5 | 0c | 2u→2c if 2c empty | out→1u if 1u empty | N3 |
| N5 | 2c | 0c→0d if 0c full | 1d→out if 1d full | N0 | 1c | 0d→0c if 0c empty | out→2u if 2u empty | N4 |
| F  | overflow, item dropped | – | – | F | 2c | – | – | N2 |

The F and E decisions use the full flags as they stood before the command.

### A leaf filling up

This is the leaf on its own, with its outside stacks counted as both full and
empty so that nothing leaves it:

| put | state before | moves made | data moves |
|---|---|---|---|
| 1 | E  | item 1 → 0c | 1 |
| 2 | N1 | item 2 → 1c | 1 |
| 3 | N2 | item 3 → 2c, item 1: 0c→0u | 2 |
| 4 | N3 | item 4 → 0c, item 2: 1c→1u | 2 |
| 5 | N4 | item 5 → 1c, item 3: 2c→2u | 2 |
| 6 | N5 | item 6 → 2c, item 4: 0c→0d | 2 |
| 7 | N0 | item 7 → 0c, item 5: 1c→1d | 2 |
| 8 | N1 | item 8 → 1c, item 6: 2c→2d | 2 |
| 9 | N2 | item 9 → 2c (0u already full, no push) → F | 1 |
| 10 | F | overflow | 0 |

Nine gets then empty it with 1,1,2,2,2,2,2,2,1 moves, and a tenth get
underflows.

The extra conditions in N1 and N2 (on `s0u`, `s1u`, `s1d`, `s2d`, on `0u` for
the 0c→0u push, and on `2d` for the 2d→2c pull) handle a leaf that is almost
full or almost empty while its outside stacks are full or empty.

### Outside stacks: not supported

The outside ports (`ext_*`, `s0u_full`, `s1u_full`, `s1d_empty`, `s2d_empty`)
carry the outside moves of the state machine above. Those rules alone do not
keep the stack correct once outside stacks really hold items.

Counterexample, with outside stacks of three items each:

1. Mixed puts and gets leave the leaf in N1 with 0c and 2c full, 2u and 2d
   empty, and items still outside.
2. The next get goes to E, although 12 items remain.

The 42-place stack uses its leaves closed: `s0u_full = s1u_full = 1`,
`s1d_empty = s2d_empty = 1`, and the outside data inputs at zero. Only that
configuration is supported. An assertion in the top fires if a leaf ever
addresses an outside stack.

## Tree cells and the 42-place stack

A `tree_cell` has two places, and each place has its own sub-stack. Puts and
gets rotate between place 0 and place 1:

* **Put.** After a put into one place, the item in the other place (if any) is
  pushed into that place's sub-stack.
* **Get.** After a get from one place, the other place (if empty) is refilled
  from its sub-stack.
* **Balance.** Sub-stack 0 always holds as many items as sub-stack 1, or one
  more.
* **Full.** The cell becomes full when sub-stack 0 refuses a push; both places
  then keep their items.
* **Empty.** The cell becomes empty when a refill from sub-stack 1 finds it
  empty.

The registered states are `E`, `N0` (place 1 on top), `N1` (place 0 on top)
and `F`. The intermediate push and pull states of the original cell finish
inside the command's cycle.

```
                 env
                  |
              root cell (2)
             /            \
        cell (2)        cell (2)
        /      \        /      \
    leaf (9) leaf (9) leaf (9) leaf (9)        2 + 4 + 36 = 42 places
```

A command moves at most one item at the root, one in an inner cell and two in
a leaf. Every accepted command therefore needs between one and four data
moves. A put on the empty stack and a get on the full stack need exactly one.

## Interface and timing

All modules share one clock and an active-low asynchronous reset. Reset empties
every stack.

| port of `fishbone_hybrid_stack` | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `put`, `get` | in | 1 | command, at most one per cycle |
| `din` | in | W | item to put |
| `dout` | out | W | top item; valid in the cycle a get is presented |
| `full`, `empty` | out | 1 | 42 items held / none held |
| `overflow` | out | 1 | high in the cycle of a put on the full stack; the item is dropped |
| `underflow` | out | 1 | high in the cycle of a get on the empty stack; nothing moves |
| `moves` | out | 4 | data moves the current command causes (energy accounting only) |

There is no handshake and no stall. A command presented in a cycle is complete
at the next rising edge, whatever the fill level. `dout`, `full` and `empty`
depend only on registered state. Because of this, a parent cell can look at
its sub-stack's top item and status in the same cycle, and the command enables
ripple down the tree without combinational loops. `W` defaults to 1 bit, the
width of the evaluated circuit. Any width works.

Inside the design, the link between a stack and its parent is the interface
`stack_if` (`put`, `get`, `din`, `dout`, `full`, `empty`, `moves`), with
modports `parent` and `child`.

## Building blocks

* `fb_control` is the leaf state machine above. It outputs one event bit per
  move (`fb_events_t` in `fb_pkg`). The names follow the original move names:
  `ep0c`, `up0c..up2c`, `dp0c..dp2c` for puts into the spine; `ug*c`, `dg*c`,
  `fg2c` for gets; `p*u`, `p*d`, `g*u`, `g*d` between spine and bones;
  `sp*`, `sg*` to and from outside; `pU`, `gU` for refused commands. The `u`
  or `d` in a spine event name only records which half of the rotation it
  belongs to. Both move the same data.
* `data_storage` is one storage location with its pass gates. It has a one-hot
  gate select per source, holds when no gate is open, and asserts that at most
  one gate is open.
* `cond_maintainer` holds the full flag of one location. Any of `N_SET` events
  sets it, any of `N_CLR` events clears it, and `init` or reset forces it to
  `INIT`. It outputs `q` and `qn`.
* `fishbone_stack` builds the leaf from `fb_control`, nine `data_storage` and
  nine `cond_maintainer` instances.

Assertions check the rules the control path must keep:

* no move from an empty location;
* no move onto a full location;
* no set and clear of the same flag in one cycle;
* never put and get together;
* no push into a full sub-stack 1 and no pull from an empty sub-stack 0 in a
  tree cell;
* no refused command inside the tree.

## Where this RTL departs from the original circuit

* **Clocked, not self-timed.** The GasP modules (self-resetting NAND pulse
  circuits) and the state keepers (cross-coupled inverters) have no
  counterpart here. Each GasP event is one bit of the event vector, fired at a
  clock edge when its guard holds. Each keeper is a flip-flop. The original
  also gates the put and get lines into the leaf by state to save power; in
  this RTL that gating is part of the next-state logic.
* **One cycle per command.** All moves of a command (distinct locations) are
  made together. In the original they follow one another within a command
  period of about 500 ps.
* **Status instead of refusal.** A tree cell does not offer an item to its
  sub-stack and wait for a refusal. It reads the sub-stack's `full` / `empty`
  flags in the same cycle.
* **Choices of this design:**
  * `overflow` / `underflow` are same-cycle flags, not sticky;
  * data registers reset to zero;
  * put wins if put and get are both high (this is also asserted against);
  * the `moves` port is added for energy accounting.
* **Outside stacks:** not supported, see above. Recursive composition of
  leaves through their outside stacks (seven leaves, 63 places) is therefore
  not provided.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_fishbone_hybrid_stack` | 8-bit, 20,000 random commands against a reference LIFO of 42. It checks data, flags, overflow, underflow and 1..4 moves per command, and that every move count 1, 2, 3, 4, full, empty, overflow and underflow occurs. |
| `tb_fishbone_hybrid_stack_full` | Default parameters. Capacity test, then 100 sequences of 100 random commands from empty, checked against a reference LIFO. It prints the average data moves per sequence (about 220 with 50/50 random put/get, underflows included). |
| `tb_fishbone_stack` | The leaf: the exact move counts of the fill/drain example above, then 4,000 random commands against a nine-place reference LIFO, with at most two moves per command and the outside ports idle. |
| `tb_fishbone_stack_patterns` | The leaf at 1 bit: ten puts and ten gets for the data patterns 1110001110, 1111111111, 0000000000, 1010101010. It checks data, overflow, underflow and 30 moves per sequence. |
| `tb_tree_cell` | One cell over two reference sub-stacks of three items each, with random commands against a LIFO of eight. |
| `tb_fb_control` | The event table and guards of every state, the special conditions in N1 and N2, and the transitions E→N1→…→F→N2→N1→E. |
| `tb_data_storage`, `tb_cond_maintainer` | Load, hold and reset; set, clear, init and `qn`. |

To run one with Verilator, list the package first:

```
verilator --binary --timing --assert -Irtl --top-module tb_fishbone_hybrid_stack \
  rtl/fb_pkg.sv rtl/stack_if.sv rtl/data_storage.sv rtl/cond_maintainer.sv \
  rtl/fb_control.sv rtl/fishbone_stack.sv rtl/tree_cell.sv \
  rtl/fishbone_hybrid_stack.sv tb/tb_fishbone_hybrid_stack.sv
./obj_dir/Vtb_fishbone_hybrid_stack
```

Each testbench runs in well under a second.

The move counts of the leaf example match the original exactly. The average
move counts of the 42-place stack cannot be compared number for number with
the published ones, about 345 per 100-command sequence. The random sequences
differ, and how refused commands and initial contents were counted is not
known.

## Changing it

* **Width.** Set `W` on the top.
* **Larger stacks.** Add tree levels: each `tree_cell` takes two `stack_if`
  children, which may be other tree cells or closed `fishbone_stack` leaves.
  Sub-stack 0 and sub-stack 1 of a cell must have the same capacity.
* **Leaf shape.** The leaf is fixed at three spine locations. A longer spine
  would need a new state machine: six states per three spine locations, and
  rotation rules that this design does not derive.
