# A fault-tolerant systolic matrix multiplier on an arbitrary processor tree

This design multiplies two n × n matrices, C = A × B, on 3n − 2 identical
processors. The processors may be connected as **any** tree. The tree is
rooted at a single I/O port. A wafer-scale array with production faults
only needs a spanning tree of working processors that reaches the port. It
does not need an intact row, column or mesh. Whatever the tree looks like:

* the host sees the same behaviour at the port: the same cycle for every
  element in and out, and the same results;
* the port bandwidth stays constant: at most one A element, one B element
  and one C element per cycle, for any n;
* a product takes O(n²) cycles. For n = 3 that is 85 cycles from start to
  the last result.

Each processor has a multiply-add unit and a few shift registers. Nothing is
addressed or routed at run time. The tree shape only decides which register
feeds which. The design has no control logic besides one sequencer at the
port.

## How the data moves

Number the processors P_1 … P_P (P = 3n − 2) in depth-first preorder from
the root P_1. Then the sons of P_j have indices j_1 > j_2 > … > j_r, and the
last one is j_r = j + 1. Every processor holds:

| buffer | direction | stages | carries |
|---|---|---|---|
| a | forward (away from port) | 1 | A elements |
| b | forward | 1 | B elements; its output is the PE's B operand |
| c | forward | 1 | C partial sums |
| A | reverse (towards port) | 1 | A elements after this PE |
| C | reverse | 2n + 1 | C partial sums after this PE |

The PE is combinational: O_A = I_A, O_B = I_B, O_C = I_C + I_A·I_B. Its
outputs load A and C[1].

**A and C streams walk the whole tree depth-first.** An element goes down
into a subtree on the forward buffers and comes back up on the reverse
buffers. It passes through the PE of a processor only on the way back up,
after it has left the processor's whole subtree. So it meets the PEs in
decreasing index order: P_P first, P_1 last. The wiring rules:

* a_j and c_j feed the forward buffers of the highest-numbered son j_1.
* The reverse outputs A and C[2n+1] of son j_s feed the forward buffers of
  the next son j_(s+1).
* The reverse outputs of the last son j_r = j+1 are P_j's PE inputs I_A and
  I_C.
* A leaf takes I_A and I_C straight from its own a and c.

**B is broadcast.** O_B of P_j feeds the b buffer of every son. So a B
element reaches a processor at distance r from the root after r cycles.

**Why the shape does not matter.** Before an A element reaches P_k's PE, it
has passed the a and A buffers of every processor numbered above k, one
stage each. It has also crossed each of the r edges on the root's path to
P_k once on an a buffer. Its delay is therefore 2(P − k) + r. A C element
takes the same route, but with 2n + 2 stages per processor: 2(n+1)(P − k) + r.
A B element takes r cycles. The three delays differ only through k, and all
three contain the same r. Which element meets which at P_k therefore depends
only on k, never on the tree. The schedule below makes a_ik, b_kj and c_ij
meet at processor s = n + i + j − k − 1. As k runs from 1 to n, c_ij takes
its n products in order at P_(n+i+j−2) down to P_(i+j−1). At every other
processor it meets A elements that are zero.

## The port schedule

Times count cycles from the first element. An element "pumped at t" is on
the port input during cycle t. A result "extracted at t" is in the root's
C[2n+1] during cycle t. For 1 ≤ i, j ≤ n:

| stream | cycle |
|---|---|
| c_ij in (value 0) | 2n(i+j−2) + 2(i−1) |
| b_ij in | 4(n²−1) + 2(n+1)(i−1) − 2(j−1) |
| a_ij in | 2n(2n−3) + 2(nj + i − 1) |
| c_ij out | 2(3n−2)(n+1) + 2n(i+j−2) + 2(i−1) |

Every element uses an even cycle. Ordered in time, the streams are regular:

* **A** is column-major, one element every 2 cycles, from 4n(n−1) to
  2(n−1)(3n+1).
* **B** goes row by row, with j falling within a row. It sends one element
  every 2 cycles, from 4n² − 2n − 2 to 6n² − 6, and leaves one idle 2-cycle
  slot between rows.
* **Results** leave by anti-diagonal i + j, with i rising inside each
  diagonal. There is one every 2 cycles in the diagonals' occupied
  positions, from 2(3n−2)(n+1) to 2(3n−2)(n+1) + 2(n−1)(2n+1).

For n = 3 (the default):

| | j=1 | j=2 | j=3 |
|---|---|---|---|
| a_1j / a_2j / a_3j in | 24 / 26 / 28 | 30 / 32 / 34 | 36 / 38 / 40 |
| b_1j / b_2j / b_3j in | 32 / 40 / 48 | 30 / 38 / 46 | 28 / 36 / 44 |
| c_1j / c_2j / c_3j out | 56 / 64 / 72 | 62 / 70 / 78 | 68 / 76 / 84 |

Every cycle that carries no element has zeros on the A and B inputs. The C
input is always zero. Outside its window the A stream must be zero. Each
c_ij meets the A elements pumped before a_11 on its way to its first real
product, and those must not change it. Zeroing B in idle cycles is not
needed for correctness: wherever a real A element meets a B slot that holds
no element, the C slot there carries no result. Zeroing both is simply
tidy. The parity of the times keeps slots apart: an
element pumped in an odd cycle only ever meets odd-cycle elements, and no
result comes from those.

## Two ways to start

* **Explicit initialisation** (`zero_init = 0`). The schedule runs from
  cycle 0, and the first 4n(n−1) cycles pump zeros into A. Those zeros flush
  whatever the buffers held, so the array needs no reset. The testbenches
  start it from random register contents.
* **Self-initialisation** (`zero_init = 1`). The sequencer raises `clear`
  for one cycle, which zeroes every buffer of every processor. It then
  starts the schedule at 4n(n−1), so all times above shift down by that
  amount. For large n this saves about 2/5 of the run time. At n = 3 it
  takes 62 cycles instead of 85.

Clearing only the c and C buffers is not enough. Without the zero prefix,
the initial contents of the a and A buffers are exactly the A elements that
c_ij meets before its first real product, so they must be zero too. Clear
therefore zeroes all five buffers.

## Modules

| module | role |
|---|---|
| `rmm_pkg` | default sizes, the `elem_tag_t` stream tag, the closed-form schedule functions |
| `ips_pe` | inner-product step, combinational |
| `tree_processor` | one processor: buffers a, b, c, A, C[1..2n+1] around an `ips_pe` |
| `systolic_tree` | P processors wired by the rules above, from a `FATHER` description of the tree |
| `port_sequencer` | cycle counter and index counters that produce the schedule; start/busy/done; clear |
| `robust_mm_top` | sequencer + tree + port gating |

### Interface of `robust_mm_top`

The host answers tags in the same cycle:

* When `a_tag.valid` is high, the host drives `a_data` = A[a_tag.row][a_tag.col]
  in that cycle. The same holds for `b_tag` / `b_data`. Indices are 1-based.
* When `c_tag.valid` is high, `c_data` is C[c_tag.row][c_tag.col].
* `start` is taken while idle. `busy` stays high until the last result.
  `done` marks the cycle of c_nn.
* `a_exit` is the root's A output: A elements leave there after their last
  use.
* `rst` resets only the sequencer. Nothing else needs it.

Number format: signed two's-complement operands of `DATA_W` bits
(default 16). C elements are `ACC_W` bits (default 32) and wrap modulo
2^ACC_W.

### Describing a tree

`FATHER` is a packed array of 16-bit processor numbers, written from
P_P down to P_1. Each entry is the father's index, and the root's entry is 0.
The numbering must be a preorder: the father of P_j must be P_(j−1) or one
of its ancestors. Elaboration stops with an error otherwise. The default
tree is:

```
P_1 ─┬─ P_2 ── P_3 ─┬─ P_4
     │              └─ P_5 ── P_6
     └─ P_7
FATHER = {16'd1, 16'd5, 16'd3, 16'd3, 16'd2, 16'd1, 16'd0}   // P_7 … P_1
```

A chain is `{16'd6, 16'd5, 16'd4, 16'd3, 16'd2, 16'd1, 16'd0}`. A star is
`{16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0}`. If you change `N`, give
a `FATHER` with 3N − 2 entries. Indices are 8 bits, so N ≤ 255.

### Size

Each processor has 3·DATA_W + (2n+2)·ACC_W register bits. At the defaults
that is 304 bits per processor and 2128 bits for the seven processors. There
is also one multiplier and one adder per processor. The sequencer is a
handful of counters.

## Verification

Each testbench prints `TB_RESULT checks=… failures=…`. Build and run any of
them like this:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rmm_pkg.sv \
    tb/tb_robust_mm_top.sv --top-module tb_robust_mm_top -Mdir obj
obj/Vtb_robust_mm_top +verilator+rand+reset+2
```

* `tb_robust_mm_top`: the design at its default parameters. It runs four
  random 3 × 3 products, alternating the two start modes. It checks every
  result against a reference product, the cycle of every element in and
  out, the latency, and the n = 3 cycle table above. It
  also checks that both start modes, the clear cycle and the B row gap each
  occurred.
* `tb_robust_mm_trees`: the complete design on a 7-node chain (n = 3), a
  10-node branching tree (n = 4), a 22-node tree (n = 8) and a 46-node comb
  (n = 16), in both start modes.
* `tb_systolic_tree`: the tree alone, driven from the closed-form schedule,
  on six trees with n = 2 to 5. It also starts from a random nonzero C0 to
  show that the array computes C0 + A × B. For the default tree it follows
  c_22 through P_5, P_4 and P_3 and checks the operands and the partial sum
  at each.
* `tb_port_sequencer`, `tb_tree_processor`, `tb_ips_pe`: unit tests against
  models kept in the testbench.

The helper modules `mm_host_model`, `tree_harness` and `seq_harness` in
`tb/` are the host and checker models those testbenches share.

## Where this RTL departs from, or adds to, the algorithm

* **Timing reference.** The port-level cycle numbers match the algorithm
  exactly. Times inside the array are one cycle later than in the
  algorithm's own accounting, which counts an element as present in a_1 in
  the cycle it is pumped.
* **The tree is fixed at elaboration.** Switching a faulty mesh into a tree,
  testing for faults and growing the spanning tree all happen outside this
  design. The tree is the `FATHER` parameter.
* **Clear covers every buffer.** The self-initialising start zeroes the a,
  b and A buffers as well as c and C, for the reason given above.
* **Design choices.** The host handshake (tags answered in the same cycle),
  the word widths, the signed wrapping arithmetic, the one-cycle `clear` and
  the counter-based sequencer are choices of this design.
* **Not built.** Two optimisations are only outlined for this architecture,
  so they are not built here:
  * a C buffer replaced by an n-word local memory with decision logic;
  * a k-stage pipelined PE for a multiply-add slower than one port cycle.
* **One product at a time.** Operations do not overlap. The next start is
  accepted after `done`.
