# ROCKY: a rotation countermeasure for Xoodoo[12]

A fault attack flips bits inside a running cipher to learn its secrets from
wrong outputs. The usual hardware defence is to compute twice and compare. That
fails when the attacker hits both copies with the same fault in the same place,
because the two results are then wrong in the same way and still agree.

ROCKY makes the second copy hold its data somewhere else. Before the
computation, every 32-bit lane of the state is rotated by a secret amount
`tau` (0..31). The permutation runs on the rotated state, and the result is
rotated back by `-tau`. Xoodoo's round function does not change when the whole
state is rotated along the lane axis, so the result is exact for every `tau`.
A fault at a fixed physical bit position now lands on a different logical bit
in each run. Two copies that use different representations no longer fail the
same way, and a comparator catches the difference.

This repository holds synthesizable SystemVerilog for:

* the protected Xoodoo[12] core (`rocky_core`) in the three organisations the
  ROCKY proposal evaluated on an FPGA: one round per cycle, three rounds per
  cycle, and one round per cycle with 5-stage pipelined shifters;
* the redundant pair (`rocky_top`): a plain Xoodoo path, a rotated path and a
  comparator;
* self-checking testbenches for every module, including a reproduction of the
  fault-spread experiment that motivates the scheme.

## The Xoodoo state

The state has 384 bits: 3 planes (`y`) of 4 lanes (`x`) of 32 bits (`z`).
Bit `(x, y, z)` is flat bit `z + 32*(x + 4*y)`, so lane number `x + 4*y`
occupies bits `[32*lane +: 32]`. In `xoodoo_pkg` the state is a packed
`state_t` indexed `[y][x]`, which has the same bit layout. All data moves
through the design one lane per clock, lane 0 first.

A round is built from five steps, applied in this order. The notation
`(t, v)` means a shift of `t` positions along `x` and `v` positions along `z`.

| step | effect |
|---|---|
| theta | `P = A0^A1^A2`, `E = P<<<(1,5) ^ P<<<(1,14)`, every plane XORed with `E` |
| rho_west | `A1 <<<= (1,0)`, `A2 <<<= (0,11)` |
| iota | lane (0,0) XORed with the round constant |
| chi | `Ay ^= ~A(y+1) & A(y+2)` |
| rho_east | `A1 <<<= (0,1)`, `A2 <<<= (2,8)` |

Xoodoo[12] runs 12 rounds. Their constants are those of the published Xoodoo
specification:
`58 38 3C0 D0 120 14 60 2C 380 F0 1A0 12` (hex, rounds -11 to 0).

## Why rotation is allowed, and the round-constant problem

theta, rho and chi treat every `z` position alike, so they commute with a
rotation of all lanes along `z`. iota does not: it XORs a fixed pattern into
lane (0,0). On a rotated state the constant must therefore be rotated too:

    Round(A) = rot(-tau)( Round_tau( rot(tau)(A) ) ),   Round_tau adds rotl(C, tau)

This is the one place where the protected core differs from plain Xoodoo.
Rotating the constant at run time would need another shifter in the round
loop. Instead, `xoodoo_rc_mem` holds every constant in all 32 rotations:
384 words of 32 bits, which is 12 Kbit. This fits one FPGA block RAM. The
word for address `(tau, step)` is built at elaboration from the 12-entry list
using `rotl(C[step*RPC + k], tau)`, so no data file is needed. The read is
registered, like a block RAM, and the core's controller addresses it one cycle
ahead.

With `tau = 0` the same core computes plain Xoodoo. The reference path of
`rocky_top` uses it that way.

## The constant-time cyclic shifter

A rotation whose logic depended on `tau` could leak `tau` through timing or
power. `cyclic_shift` computes it with arithmetic whose structure is the same
for every shift value:

1. A 5-to-32 decoder turns `s` into the one-hot word `2^s`.
2. A 32x32 multiplier forms the 64-bit `lane * 2^s`. This is the lane shifted
   left by `s`, with the bits pushed past bit 31 sitting in `[63:32]`.
3. Adding the high half to the low half folds those bits back. The two halves
   never overlap, so the sum is `rotl(lane, s)`.

On an FPGA the multiplier maps to DSP blocks. `MULT_PIPE` sets how it is built:

* `0`: a single combinational multiplier, with zero latency.
* `N`: a pipeline of `N` register ranks. Rank 1 registers the operands. Each of
  the other `N-1` ranks adds the partial product of one slice of the one-hot
  operand, so `N = 5` gives four 8-bit slices. `N-1` must divide 32. The
  latency is `N` cycles, and a new lane can enter every cycle.

The backward shifter is a second instance fed with `(32 - tau) mod 32`.

## Datapath and cycle budget

`rocky_core` is a lane-serial pipeline:

    in_lane -> reg -> cyclic_shift(+tau) -> reg -> xoodoo_core -> cyclic_shift(-tau) -> reg -> reg -> out_lane

`xoodoo_core` is the iterative Xoodoo. A 384-bit state register sits behind a
multiplexer that selects either an incoming lane or the output of `RPC` chained
`xoodoo_round` instances. A small controller steps through four phases:

| phase | what happens |
|---|---|
| IDLE | waits for lane 0 |
| LOAD | writes 12 lanes into the state register |
| ROUND | runs `12/RPC` cycles, `RPC` rounds per cycle |
| UNLOAD | sends out 12 lanes, read straight from the register |

One run takes the following number of cycles, counted inclusively from the
cycle in which lane 0 is offered to the cycle in which result lane 11 leaves:

    12 (lanes in) + 2 (registers) + MULT_PIPE + 12/RPC + 12 (lanes out) + 2 (registers) + MULT_PIPE

| configuration | RPC | MULT_PIPE | cycles |
|---|---|---|---|
| combinational multiplier, 1 round/cycle (default) | 1 | 0 | 40 |
| combinational multiplier, 3 rounds/cycle | 3 | 0 | 32 |
| 5-stage pipelined multiplier, 1 round/cycle | 1 | 5 | 50 |

These are the cycle counts the ROCKY proposal reports for its three FPGA
builds. The proposal does not say where its registers are. The two registers
on each side of the core were chosen because they reproduce all three numbers.
If each shifter is removed together with the register behind it, the same
count gives the 38 cycles reported for an unprotected build. The testbenches check these counts exactly.

## The redundant pair and the check

`rocky_top` feeds every input lane to two paths in the same cycle:

* `u_ref`: an `xoodoo_core` with `tau = 0`. Its result is the design's output
  (`out_*`).
* `u_rocky`: a `rocky_core` with the externally supplied `tau`.

`rocky_check` compares the two streams. They arrive at different times:
result lane 0 of the reference path appears 24 cycles after input lane 0, and
the protected lanes appear in cycles 28 to 39. The comparator therefore buffers
the 12 reference lanes and compares each protected lane as it arrives. One
clock after the last protected lane, `check_valid` pulses (cycle 40) with
`check_error = 1` if any lane differed. A new run is accepted only when both
paths are idle.

Points to keep in mind when using it:

* **`out_*` leaves before the check is known.** This follows the block diagram
  the design is based on. A system that must never release a faulty result has
  to hold the 12 lanes until `check_valid`.
* **`tau` must be fresh and secret in every run.** No random number generator
  is included. `tau` is an input port, sampled with input lane 0. With a
  constant or guessable `tau` the scheme is no stronger than plain duplication.
  With `tau = 0` both paths hold identical representations, so an identical
  fault in both goes unnoticed. The end-to-end testbench demonstrates this.
* **The reference path is plain Xoodoo.** It could use a 12-word constant table
  instead of the full rotated memory. Here it reuses `xoodoo_core` unchanged.

## Interface of `rocky_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears control, not data) |
| `in_valid` / `in_ready` | in / out | 1 | input handshake, one lane per cycle while both are high |
| `in_lane` | in | 32 | input lane, lane 0 first |
| `tau` | in | 5 | shift value of the run, sampled with lane 0 |
| `out_valid`, `out_last` | out | 1 | result lane valid; `out_last` marks lane 11 |
| `out_lane` | out | 32 | result lane (no back-pressure: 12 consecutive cycles) |
| `check_valid`, `check_error` | out | 1 | one pulse per run; error = the two computations differ |
| `busy` | out | 1 | a run is in progress |

`rocky_core` and `xoodoo_core` use the same lane handshake and add a
`round_active` status output. Parameters: `RPC` (rounds per cycle, 1 by
default; 3 for the cycle-optimised build; any divisor of 12 works) and
`MULT_PIPE` (0 by default; 5 for the frequency-optimised build).

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog ends it with a failure if it hangs. The expected values come from
`tb/xoodoo_ref_pkg.sv`, a Xoodoo model that works bit by bit on the flat
384-bit vector and is written independently of the lane-wise RTL.

| testbench | what it establishes |
|---|---|
| `cyclic_shift_tb` | every shift value on edge-case and random lanes; the pipelined version's result arrives exactly 5 cycles later |
| `xoodoo_round_tb` | one round against the model; rotating both the input and the constant by tau rotates the output by tau |
| `xoodoo_rc_mem_tb` | all 384 words for RPC = 1 and RPC = 3, one clock after the address |
| `xoodoo_core_tb` | full permutation for RPC = 1 and 3, with plain and pre-rotated inputs and gaps in the input; latency 12 + 12/RPC |
| `rocky_core_tb` | the three configurations side by side: results exact for tau = 0, 31 and random values; cycle counts 40 / 32 / 50 |
| `rocky_check_tb` | equal streams pass; one wrong bit in the first, a middle or the last lane is flagged; exactly one `check_valid` per run |
| `rocky_top_tb` | the full design at default parameters: 22 back-to-back runs with input stalls; bit flips forced into either path's state register during the rounds are flagged; fault-free runs pass; output and check timing are checked; the same bit flipped in both paths in the same round is flagged when `tau != 0` and, as expected, missed when `tau = 0` (both results are then wrong in the same way) |
| `rocky_fault_spread_tb` | fault-spread experiment (below) |

The fault-spread experiment flips one random bit of state bits 32 to 39 as
lane 1 leaves the forward shifter. After the first round it compares the
state, rotated back, with the fault-free round. Each sample's error pattern
must equal the model's prediction. Over 1,000 samples per case, the number of
state bits that can be in error grows from 150 without rotation to 288 with a
random `tau`. The histogram it prints per 8-bit group shows the same picture:
the fault no longer always lands on the same bits.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/xoodoo_pkg.sv tb/xoodoo_ref_pkg.sv -y rtl -y tb \
        tb/rocky_top_tb.sv --top-module rocky_top_tb
    ./obj_dir/Vrocky_top_tb

Replace `rocky_top_tb` with any other testbench name. The fault-injecting
testbenches reach into the hierarchy (`dut.u_rocky.u_core.state_q`,
`dut.u_fwd.lane_o`). Keep those names if you restructure the RTL.

## How far it follows the ROCKY proposal

These parts follow the proposal:

* the rotate / permute / rotate-back structure;
* the decoder-multiplier-adder shifter and its 5-stage variant;
* the iterative Xoodoo with a round-constant memory;
* the 1 and 3 rounds-per-cycle organisations;
* the redundant pair with a comparator;
* the Xoodoo step definitions and the flat bit order.

These are this design's own choices:

* **Round-constant values.** The proposal only says Xoodoo has constants. The
  values come from the Xoodoo specification.
* **What the constant memory holds.** The proposal names the memory and its
  address. Storing all 32 rotations is inferred from the shift-invariance
  argument and from the single block RAM the protected builds use.
* **Lane-serial interface, handshakes, controller and reset.** None of these
  is specified.
* **Register placement.** It was chosen to reproduce the reported cycle counts.
* **How the 5-stage multiplier is split.** Each rank after the first handles
  one 8-bit slice.
* **Comparator buffering.** The comparator stores the reference lanes to align
  the two streams.

These are not reproduced:

* **FPGA figures.** Clock periods and LUT/flip-flop/DSP counts were reported
  for a Xilinx Artix-7. The flip-flop count of this `rocky_core` (about 550 bits
  plus the 12 Kbit constant ROM) is well below the reported 1,335, so the
  original evidently buffers more. Its register organisation is not known.
* **Random shift value source.** No generator for `tau` is included.
* **Other permutations.** The proposal names Salsa, ChaCha, Keccak-f, Ascon,
  Subterranean and unkeyed AES as candidates for the same technique. Only
  Xoodoo is built.

## Files

| file | contents |
|---|---|
| `rtl/xoodoo_pkg.sv` | sizes, `lane_t`/`plane_t`/`state_t`, round constants, rotation helpers |
| `rtl/xoodoo_round.sv` | one combinational round |
| `rtl/xoodoo_rc_mem.sv` | rotated round-constant ROM |
| `rtl/xoodoo_core.sv` | iterative Xoodoo with lane I/O and controller |
| `rtl/cyclic_shift.sv` | constant-time lane rotator |
| `rtl/rocky_core.sv` | protected core: shift, permute, shift back |
| `rtl/rocky_check.sv` | result comparator |
| `rtl/rocky_top.sv` | redundant pair, top level |
| `tb/xoodoo_ref_pkg.sv` | bit-level reference model |
| `tb/*_tb.sv` | testbenches listed above |
