# LFSR stack pointer

A stack (LIFO memory) needs an address that moves up by one on every PUSH
and down by one on every POP. The usual answer is an up-down binary counter.
This design replaces the counter with a linear feedback shift register that
can run its state sequence forwards and backwards. The addresses are visited
in pseudo-random order, not 0, 1, 2, ... But the order going down is the
exact reverse of the order going up, and a stack needs nothing more.
The shift register has no carry chain, so it is smaller and faster than a
counter as the memory grows. As a side effect, consecutive pushes land at
scattered physical addresses, which scrambles how the data is laid out in
the memory.

The default configuration is a 4-stage register that gives 16 addresses.
It addresses a 16-word by 8-bit memory with an asynchronous read.

## Why one step down undoes one step up

Number the flip-flops Q1..QN, and let the characteristic polynomial be
P(x) = C0 + C1 x + ... + CN x^N, with C0 = CN = 1. Going up, the register
is an ordinary external-feedback (Fibonacci) LFSR that shifts from Q1
towards QN:

    Q1' = C1 Q1 ^ C2 Q2 ^ ... ^ CN QN        Qk' = Q(k-1)

Going down, the same flip-flops shift the other way. The feedback now
enters QN and uses the reciprocal polynomial, read from the other end:

    QN' = CN Q1 ^ C1 Q2 ^ ... ^ C(N-1) QN    Qk' = Q(k+1)

Substitute the first map into the second. Every term cancels except
CN QN = QN, so the down step returns the state that the up step started
from. In matrix form the two state matrices are inverses over GF(2). So
whenever the direction input flips, the register retraces its sequence.

The general form also lets any stage drive the next one inverted (Q-bar):
parameter `DINV`, bit k-1 = Dk. This adds a constant vector to each
step: `Q(i+1) = Q(i) C + D` going up and `Q(i+1) = Q(i) C' + D'` going down,
with `D' = [D2 .. DN, CN D1 ^ C1 D2 ^ ... ^ C(N-1) DN]`. Since `D C' = D'`,
the cancellation still holds.

A primitive polynomial of degree N gives 2^N - 1 states. One state is left
out: all-zero when DINV = 0. With `ZERO_FIX = 1` (the default), a NOR term
splices the zero state into the cycle, so all 2^N addresses are used:

- Going up, the term is NOR(Q1..Q(N-1)), XORed into the feedback.
- Going down, it is NOR(Q2..QN).

It is one NOR gate whose end input is switched with the direction. The
splice needs DINV = 0, and an elaboration check enforces this.

For the default x^4 + x + 1 from reset state 0, the up sequence of
`addr = {Q4,Q3,Q2,Q1}` is:

    0 1 3 7 F E D A 5 B 6 C 9 2 4 8 (0 ...)

Going down, the same list is read right to left. Going down, the register
is the LFSR of the reciprocal x^4 + x^3 + 1, with its stages numbered from
the other end.

## Reversible parts and the ring

`updown_lfsr` is built as a ring of reversible parts:

| part | file | role |
|---|---|---|
| reversible register | `rev_reg.sv` | one stage; loads from the left going up and from the right going down |
| one-way XOR, `XOR_WHEN=1` | `oneway_xor.sv` | N-1 of them next to stage N; add the reciprocal taps C(k)·(Q(k+1)^D(k+1)) going down, bypass going up |
| reversible XOR | `rev_xor.sv` | adds the NOR term in both directions |
| one-way XOR, `XOR_WHEN=0` | `oneway_xor.sv` | N-1 of them next to stage 1; add the taps C(k)·Qk going up, bypass going down |

Going round the ring in the up direction, the order is stage 1 … stage N,
then the down-tap XORs, the NOR XOR and the up-tap XORs, and back to
stage 1. A tap whose coefficient is 0 gets a constant-0 side input, which
synthesis removes.

The circuit this comes from uses tri-state buffer pairs on bidirectional
wires. Here each ring segment is instead a pair of one-way wires, one per
direction, and each part picks its input with a multiplexer. An output
whose direction is off drives 0. The logic function is the same, and the
result is plain synthesizable logic with no combinational loops. The
inversion Dk sits on the segment on the left side of stage k, and acts in
both directions (`rev_reg` parameter `D_INV`).

## The stack (`lfsr_stack`, top)

`lfsr_stack` connects the address generator to `stack_mem`, which has one
address port, a synchronous write and an asynchronous read.

- `sp` is the physical address of the top entry, the word written last.
- **PUSH** writes `data_in` at the generator's next-up address (`addr_nxt`)
  and moves `sp` there, in one clock.
- **POP** shows the top word on `data_out` during the POP cycle (the read
  is asynchronous), and moves `sp` one step down at the clock edge.
- `data_out` always shows the word at `sp`, except during a PUSH cycle, when
  the memory address is the slot being written.
- **Empty and full** need no counter. Both mean that `sp` is back at its
  reset value `INIT`. Two flags record which way it got there: empty after a
  POP, full after a PUSH. One N-bit comparator on `addr_nxt` sets them. All
  2^N words are usable; with `ZERO_FIX = 0` there are 2^N - 1.
- A PUSH when full is refused and raises `overflow`. A POP when empty is
  refused and raises `underflow`. Both flags are combinational, for the
  cycle of the request.
- A cycle with PUSH and POP both high does nothing.
- An assertion checks that `full` and `empty` are never high together.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | asynchronous active-low reset: `sp = INIT`, empty |
| push, pop | in | 1 | requests, one per cycle |
| data_in | in | DATA_W | word to push |
| data_out | out | DATA_W | top of stack |
| empty, full | out | 1 | occupancy flags |
| overflow, underflow | out | 1 | request refused this cycle |
| sp | out | N | physical address of the top entry |

Parameters of the top: `N` (4), `POLY` (5'b10011, i.e. x^4 + x + 1, bit i =
coefficient of x^i), `DATA_W` (8), `DINV` (0), `ZERO_FIX` (1), `INIT` (0).
`POLY` must be primitive for the stack to reach all of its entries. This is
not checked in hardware.

Shared constants (default stage count, polynomial, data width, direction
encoding) are in `rtl/stack_pkg.sv`.

## What follows the source design and what is this design's own

The following come from the source design:

- The LFSR stack pointer and the up/down derivation.
- The 4-stage example with x^4 + x + 1 up and x^4 + x^3 + 1 down.
- The NOR gate that supplies the zero state.
- The reversible register and the reversible and one-way XORs.
- The Q / Q-bar inversion parameters.
- A stack made of a memory module plus an address generator, with an
  asynchronous-read memory.
- The top-of-stack pointer: after a pop it points to the previous entry.

The following are choices made here, where the source is silent:

- The data width (8).
- The exact inputs of the NOR gate, and the order of the gates on the
  feedback wire.
- Replacing the tri-state buffers with multiplexers.
- Reset values, and the load enable on the registers.
- The empty/full flags, overflow/underflow, and ignoring PUSH and POP
  together.
- Using `addr_nxt` as the write address for PUSH.

The data scrambling that the source describes as encryption is simply the
scattered address order. There is no separate cipher circuit.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_updown_lfsr` runs three instances:
  - The default: the hand-derived 16-address order, `addr_nxt`, hold, a
    full reversal, and a 400-step random walk.
  - A 5-stage x^5 + x^2 + 1 instance: all 32 states, and exact reversal.
  - A mixed-type instance with D1 = D3 = 1 and no splice: every step checked
    against the matrix equations, 15 distinct states, and exact reversal.
- `tb_rev_reg`, `tb_rev_xor`, `tb_oneway_xor` and `tb_stack_mem` test the
  parts exhaustively or with random stimulus.
- `tb_lfsr_stack` runs the top at its default parameters against a queue
  model for about 1000 cycles. It checks every pop, the pointer order and
  all flags. It also counts each mechanism, and fails if any of them never
  occurred: push, pop, a change of direction, full, back to empty, a
  refused push, a refused pop, PUSH and POP together, a step into or out of
  the zero state, and a push landing at a non-consecutive address.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/stack_pkg.sv tb/tb_lfsr_stack.sv \
              --top-module tb_lfsr_stack -Mdir obj_dir -o sim
    ./obj_dir/sim

Replace `tb_lfsr_stack` with any other testbench name. Lint with
`verilator --lint-only -Wall -Irtl rtl/stack_pkg.sv rtl/lfsr_stack.sv`.
The only remaining lint warnings are unused package constants.

## Limits

- Area and speed are not measured here. The claim that the LFSR is smaller
  and faster than a counter is the premise of the design, not a result of
  this code.
- The reversible parts are modelled at gate level with multiplexers, not at
  transistor level with tri-state buffers.
- Whether `POLY` is primitive is left to the user. With a non-primitive
  polynomial the address cycle is shorter than 2^N, and the stack fills up
  early.
