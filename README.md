# Systolic reduction of rational numbers with an extended plus-minus GCD

This RTL reduces a fraction a/b to lowest terms without dividing. It runs an
extended version of the plus-minus binary GCD algorithm on a linear systolic
array of one-bit processors. Besides the operands, the array carries four
cofactors u, v, t, w, one bit of each per processor. After k steps they satisfy

    u*a + v*b = a_k * 2^k
    t*a + w*b = b_k * 2^k

Here a_k and b_k are the current operand values. When b_k reaches zero,
t*a + w*b = 0 and t, w are coprime, so **a/b = -w/t in lowest terms**. The
binary GCD works only with shifts, additions and subtractions, chosen from the
two low bits of each operand. So every step fits a bit-serial array in which
each processor talks only to its neighbours.

The cofactor arithmetic costs no extra time. Without it, the array already has
an idle *wait* cycle after every command, and the cofactor updates are done in
those cycles.

## The algorithm

Each step looks at a[1:0] and b[1:0] and applies one of four operations. All
values are two's complement.

| a[0] b[0] | command | operands | cofactors |
|---|---|---|---|
| 0 0 | B, shift both | a := a/2, b := b/2 | unchanged |
| 0 1 | C, interchange and shift b | a := b, b := a/2 | u,v := 2t,2w; t,w := u,v |
| 1 0 | S, shift b | b := b/2 | u,v := 2u,2v |
| 1 1 | P (plus) if a[1] != b[1], else M (minus) | a := b, b := (a +/- b)/2 | u,v := 2t,2w; t,w := u +/- t, v +/- w |

The start values are u = 1, v = 0, t = 0, w = 1. After a plus or minus step,
(a +/- b)/2 is even, so the next step is always S. Every two plus/minus steps
at least halve max(|a|, |b|), so the algorithm ends after O(n) steps. Only ring
operations (+, -, times 2) touch the cofactors. Keeping them modulo 2^(N+1) is
therefore harmless: the final t = +/-b/g and w = -/+a/g fit in N+1 bits, even
though intermediate cofactors may wrap.

When both inputs are even, the B steps strip their common power of two 2^e. The
final a is then +/- gcd/2^e. The fraction is still reduced correctly, because
B steps leave the cofactors alone.

## The array

```
   PN  ...  P2       P1       P0
   <-- command, carry, u', v', ct, cw --   (right to left, one cell per clock)
   --- a, b, ta, tb, sa ----------------> (read from the left neighbour)
```

There are N+1 processors. P0 holds bit 0, and PN holds the sign bit, so N-bit
unsigned operands fit. Each processor has sixteen one-bit registers:

- s1, s2, s3: the current command
- a, b: operand bits
- ta, tb: the tags
- sa: the sign of a
- u, v, t, w: cofactor bits
- ct, cw: cofactor carries
- u', v': cofactor shift bits

The leftmost processor reads its own bits as its "left neighbour", which gives
sign extension on right shifts.

### The active/wait rhythm

Only P0 (`xgcd_cell0`) decides anything. It issues a command on one clock and
waits on the next, so a new command leaves P0 every second clock. A command
travels one processor per clock to the left, and a wait (W) follows it.

Consider processor i. Command k reaches it at clock t_k + i. The next command
reaches it two clocks later. Its left neighbour executes command k one clock
later, at t_k + i + 1. So when processor i executes command k and reads a[+] or
b[+], it sees the left neighbour's bits still at step k. The data needed from
the left is always one step old, exactly as the algorithm needs. This is why
the wait cycle exists. It is also why nothing is broadcast.

**Active cycle.** The processor applies the command to a and b, and then holds
the command so that its left neighbour gets it next:

- Shifts copy the left neighbour's bits.
- Plus and minus compute bit i+1 of a +/- b.

**Wait cycle.** W arrives from the right, and the processor applies the command
it still holds to its cofactor bits:

- Doubling a cofactor needs the old bit of the right neighbour. The right
  neighbour has already done its own wait cycle and may have overwritten that
  bit. For this reason it parks the old bit in u' (or v') one clock earlier.
- The additions t := u +/- t and w := v +/- w ripple their carries ct, cw
  leftwards the same way.

Everything the cofactors need flows from right to left. So the cofactor bits in
processor i depend only on processors 0..i, and they can be built behind the
command wave.

### Commands and carries

The command is kept in three bits, and for plus and minus, bit s2 is also the
operand carry (or borrow). Each processor adds a[+] + b[+] + s2 (or subtracts
a[+] - b[+] - s2) and puts its own carry-out into the s2 of the command it
passes on. P0 never needs a carry chain:

- For a plus, the two low bits give a carry of 1 into bit 2.
- For a minus, they give a borrow of 0 into bit 2.
- In both cases bit 0 of the new b is 0.

| {s1,s2,s3} | command |
|---|---|
| 000 | W, wait |
| 001 | B |
| 010 | C |
| 011 | S |
| 1c0 | plus, carry c |
| 1c1 | minus, borrow c |

### Tags, sign and termination

Tag ta (tb) at bit i is 1 when bits i..N of a (b) all equal the sign. The tags
are set from the operands at load time. They move with the operand bits, and
after plus/minus they become tb := ta & tb. This rule is conservative but sound:
a 1 is never wrong.

The sign bit sa travels rightwards. Each processor takes a[+] where the left
neighbour's tag is set, and otherwise passes sa[+] on.

P0 stops when b[0] = 0 and tb[0] = 1, because then the whole of b is zero.
Because the tags are conservative, b often becomes zero a few steps before its
tag reaches bit 0. Until then the array runs S steps, which shift the zero b
and double u, v, but leave t, w alone. In the exhaustive 8-bit test, almost
every pair ends with such a tail. The tail costs time, not correctness.

## Interface and timing (`xgcd_array`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | load `a_in`, `b_in` in parallel and start |
| `a_in`, `b_in` | in | N | numerator and denominator, unsigned |
| `busy` | out | 1 | computing |
| `done` | out | 1 | results valid; held until the next `start` |
| `t_out`, `w_out` | out | N+1 | final cofactors, two's complement; fraction = (-w_out)/t_out |
| `a_out` | out | N+1 | final a = +/- gcd/2^e |
| `sign_a` | out | 1 | sign of a from the sign wave at P0; settles up to N clocks after `done` |

Parameter `N` (default 8, i.e. nine processors) is the operand width.

Timing:

- `start` is sampled on a rising edge. P0 issues its first command on the next
  edge.
- If P0 issues K commands, `done` rises 2K+N edges after the start edge. The
  last command needs N more clocks to reach PN and finish its wait cycle.
- The sign of t and w is not normalised. Either (t, w) = (b/g, -a/g) or
  (t, w) = (-b/g, a/g).
- If a_in = b_in = 0, the array finishes at once with t = 0, w = 1.

Cost: each processor has 16 one-bit registers. After a generic synthesis, the
N = 8 array, including the start/done control, has 146 flip-flops, because a
few register bits that never change are optimised away.

Measured speed, with N = 32 and random full-length 32-bit operands:

- mean latency: 199 clocks
- worst case seen: 248 clocks
- at 25 MHz, the mean is about 8 us

This includes the tail steps and the N-clock drain. The published estimate of
about 125 clocks (5 us) seems to count neither.

Latency grows linearly with N, at about 6.2 clocks per operand bit:

| operand length | mean latency |
|---|---|
| N = 128 (four 32-bit words) | 798 clocks |
| N = 320 (ten 32-bit words) | 2023 clocks |

## What is taken as given, and what is this design's own

The following follow the published processor algorithms:

- the processor algorithms for P0 and P1..PN
- the command rhythm
- the register set
- the tag rule
- the termination test

The following are choices of this design:

- **Command bit patterns.** The three-bit patterns of the commands are this
  design's own. Only "s2 is the carry" comes from the algorithm.
- **Explicit wait hand-off.** In the wait cycle, a processor explicitly passes W
  on. P0's published listing does this. The generic processor's listing leaves it
  implicit, and it is required for correctness.
- **P0 tag rule.** P0 applies the same a, ta := b, tb and tb := ta & tb rule on
  plus/minus as the other processors. Without it, P0's tags could claim sign
  extension for a value that has none.
- **Stopping.** After termination, P0 stops issuing commands. The alternative is
  to let the array keep running shift steps, which also leaves t and w unchanged.
- **Control.** The load port, reset, `run`/`fin` handshake and drain counter are
  added to make the array a usable block.
- **Output.** Results are presented in parallel, not serially.
- **Links.** Neighbour links are packed structs (`cmd_link_t`, `opd_link_t` in
  `xgcd_pkg`).

The following are not built:

- the input and output pipelining buses, which were suggested only as further
  work
- the FPGA-specific mapping

## Verification

| bench | what it does |
|---|---|
| `tb_xgcd_cell` | P_i alone. It applies random commands, neighbour bits and loads, and compares every output each clock with a register-level model that does the one-bit sums as integer arithmetic. |
| `tb_xgcd_cell0` | P0 alone. It checks the decision table, the alternation of decision and wait cycles, the cofactor updates, the sign wave and termination. Every decision kind must occur. |
| `tb_xgcd_array` | The default N = 8 array on all 65536 operand pairs. It checks results against Euclid's gcd (t*a + w*b = 0, \|t\| = b/g, \|w\| = a/g, a_out = +/-gcd/2^e). It also checks exact outputs and the 2K+N latency against a sequential model of the algorithm, and the settled `sign_a`. It counts B, C, S, plus, minus, the carry variants and tail runs. Runs in a few seconds. |
| `tb_xgcd_32bit` | An N = 32 array on 5000 random pairs, some with large common factors. It checks the reduced fraction and prints the mean latency. |
| `tb_xgcd_long` | N = 128 and N = 320 arrays side by side, driven by two `xgcd_long_runner` instances. They check the fraction with wide integer arithmetic. |

An assertion in `xgcd_cell` guards the active/wait rhythm. It fires if a command
reaches a processor whose previous command still awaits its wait cycle. In the
array, P1 receives P0's commands, so the assertion there also catches P0 issuing
on two consecutive clocks.

Each bench ends with a `TB_RESULT checks=<n> failures=<n>` line. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/xgcd_pkg.sv rtl/xgcd_cell.sv rtl/xgcd_cell0.sv rtl/xgcd_array.sv \
    tb/tb_xgcd_array.sv --top-module tb_xgcd_array -o sim
./obj_dir/sim
```

For the cell benches, list only the package, the cell and its bench.

## Files

- `rtl/xgcd_pkg.sv`: command encoding and link structs
- `rtl/xgcd_cell0.sv`: processor P0, the decision maker
- `rtl/xgcd_cell.sv`: processor P_i
- `rtl/xgcd_array.sv`: the array, with operand load, tag initialisation and done
- `tb/*.sv`: the benches listed above, plus `xgcd_long_runner`, the driver
  used by `tb_xgcd_long`

To change the operand width, set `N`. Nothing else depends on it.
