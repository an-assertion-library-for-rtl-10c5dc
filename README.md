# Run-time assertion library with an error scan chain

Assertions inside RTL tell you *where* a design misbehaves, not just that an
output pin went wrong. Normally they exist only in simulation or emulation.
This library makes them synthesizable so they can stay in the shipped chip,
typically in an FPGA. The assertions keep watching the live design, and when
one fails the chip drops an error pin. Debug equipment can then shift out one
bit per assertion to find which rule broke.

The RTL follows the scheme described in *"An Assertion Library for On-Chip
White-Box Verification at Run-Time"*:

- Each assertion from the Open Verification Library (OVL) set gets a small
  boundary-scan-like extension.
- The chip gains four debug pins: `eo`, `esco`, `escen` and `esclk`.
- The assertions are linked through the design hierarchy into one chain.

The checker rules are the usual OVL ones, written from scratch here.
Everything this implementation had to decide for itself is listed under
[Design choices and departures](#design-choices-and-departures).

## How the error chain works

Every assertion has exactly one extra flip-flop: its **error bit**. The bit is
1 while the assertion has never failed. On the first clock edge at which the
rule is broken it drops to 0 and stays at 0. Each assertion has six extra pins:

| pin     | dir | meaning |
|---------|-----|---------|
| `ei`    | in  | error chain input (active low) from the previous assertion |
| `eo`    | out | `ei & error_bit`: one 0 anywhere pulls the chain low |
| `esci`  | in  | scan input: the previous assertion's error bit |
| `esco`  | out | scan output: this assertion's error bit |
| `escen` | in  | scan enable: failures are ignored, shifting is allowed |
| `esclk` | in  | shift strobe: while `escen` is high, every `clk` edge with `esclk` high loads `esci` into the error bit |

The shared cell `ovl_rt_err_cell` holds this logic, and every assertion
instantiates it. The cell works in three ways:

- **Error bit and scan stage.** The error bit is also one stage of a shift
  register that runs through all assertions.
- **Error pin.** All the `eo`/`ei` links together form a wide AND. Its output
  is the chip's `eo` pin, and it falls one clock edge after any assertion
  fails.
- **Scan bypass.** The scan chain is the error bits themselves. Reading them
  out needs no capture step.

### Reading out a failure

```
clk     _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
rule    ‾‾‾‾‾‾‾|___|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾    broken in one cycle
eo      ‾‾‾‾‾‾‾‾‾‾‾|___________________________  falls after that edge
escen   ____________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
esclk   ____________________________|‾‾‾|_____   one pulse = one shift
esco    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ bit N-1 ‾‾| bit N-2 ...
```

1. The monitor sees `eo` low.
2. It raises `escen`. The assertions stop recording failures, and the last
   chain position appears on `esco` straight away.
3. Each `esclk` pulse brings the next lower position to `esco`. The pulse must
   be high at exactly one `clk` edge.
4. After N-1 pulses all N error bits have been read, and a 0 marks a failed
   assertion.
5. The chip's scan input is tied to 1, so the N-th pulse leaves every error bit
   at 1 again. Scanning out also clears the errors, and `eo` goes back high.
6. The monitor lowers `escen`, and checking resumes.

The monitor must know the chain order. In the chip it is published as the enum
`rt_assert_id_e` in `ovl_rt_pkg`. Position 0 sits next to the tied scan
input, and position N-1 drives `esco`.

A failure that happens while `escen` is high is **not** recorded, by design.
The assertions' own history registers (previous value, window flags,
counters) keep running during a scan. As a result, a check resumes correctly
when `escen` falls.

### Deterministic and non-deterministic assertions

- **Deterministic** assertions (for example `assert_always` and
  `assert_one_hot`) judge every cycle on its own. `eo` falls right after the
  faulty cycle.
- **Non-deterministic** assertions (for example `assert_window` and
  `assert_change`) only check after a triggering event. They may report a
  failure several cycles after the cause, at the end of a window or a time
  limit, and they never check anything if the event never comes.

The chip keeps the two classes in separate groups of its hierarchy.

## The assertion library

All assertions share the ports `reset_n, clk` and the six chain pins above,
plus the signals in the table. Integer parameters default to 1-bit or
single-cycle values. "State" is the number of flip-flops at the given sizes,
with the error bit included.

| module | rule (failure when violated, at a clk edge) | parameters | state |
|---|---|---|---|
| `assert_always` | `test_expr` true | – | 1 |
| `assert_never` | `test_expr` false | – | 1 |
| `assert_odd_parity` / `assert_even_parity` | odd / even number of ones | `WIDTH` | 1 |
| `assert_range` | `MIN <= test_expr <= MAX` | `WIDTH, MIN, MAX` | 1 |
| `assert_one_hot` | exactly one bit set | `WIDTH` | 1 |
| `assert_zero_one_hot` | at most one bit set | `WIDTH` | 1 |
| `assert_one_cold` | exactly one bit clear; `INACTIVE` 0/1 also allows all-zeros/all-ones, 2 allows neither | `WIDTH, INACTIVE` | 1 |
| `assert_implication` | `antecedent_expr` implies `consequent_expr` | – | 1 |
| `assert_always_on_edge` | `test_expr` true when `sampling_event` has the chosen edge (0 every cycle, 1 rising, 2 falling, 3 either) | `EDGE_TYPE` | 2 |
| `assert_proposition` | `test_expr` never low, **also between clock edges** | – | 2 |
| `assert_increment` / `assert_decrement` | a change of `test_expr` is exactly +`VALUE` / −`VALUE` (mod 2^WIDTH) | `WIDTH, VALUE` | WIDTH+1 |
| `assert_delta` | a change has size within `[MIN, MAX]` | `WIDTH, MIN, MAX` | WIDTH+1 |
| `assert_transition` | after `start_state`, the next different value is `next_state` | `WIDTH` | 2 |
| `assert_no_transition` | `start_state` is never followed directly by `next_state` | `WIDTH` | 2 |
| `assert_no_overflow` | after the value `MAX`, the next value is neither above `MAX` nor `<= MIN` | `WIDTH, MIN, MAX` | 2 |
| `assert_no_underflow` | after the value `MIN`, the next value is neither below `MIN` nor `>= MAX` | `WIDTH, MIN, MAX` | 2 |
| `assert_quiescent_state` | on a rising `sample_event`, `state_expr == check_value` | `WIDTH` | 2 |
| `assert_window` | `test_expr` true from the cycle after `start_event` through the `end_event` cycle | – | 2 |
| `assert_win_unchange` | `test_expr` constant inside that window | `WIDTH` | WIDTH+2 |
| `assert_win_change` | `test_expr` changes at least once inside that window | `WIDTH` | WIDTH+3 |
| `assert_time` | `test_expr` true in the `NUM_CKS` cycles after `start_event` | `NUM_CKS` | clog2(NUM_CKS+1)+1 |
| `assert_unchange` | `test_expr` constant in the `NUM_CKS` cycles after `start_event` | `WIDTH, NUM_CKS` | WIDTH+clog2+1 |
| `assert_change` | `test_expr` changes within `NUM_CKS` cycles after `start_event` | `WIDTH, NUM_CKS` | WIDTH+clog2+1 |
| `assert_next` | `test_expr` true exactly `NUM_CKS` cycles after each `start_event` (overlaps allowed) | `NUM_CKS` | NUM_CKS+1 |
| `assert_width` | each high pulse lasts `MIN_CKS..MAX_CKS` cycles (0 = unchecked) | `MIN_CKS, MAX_CKS` | clog2+1 |
| `assert_frame` | after `start_event` rises, `test_expr` arrives no sooner than `MIN_CKS` and no later than `MAX_CKS` cycles (0 = unchecked) | `MIN_CKS, MAX_CKS` | clog2+3 |
| `assert_cycle_sequence` | events `event_sequence[N-1]`…`[0]` in consecutive cycles; mode 0: all but the last imply the last; mode 1: the first implies all | `NUM_CKS, NECESSARY_CONDITION` | NUM_CKS |
| `assert_handshake` | no `ack` rise without an open request, no repeated `req` rise, `ack` in cycles `[MIN_ACK_CYCLE, MAX_ACK_CYCLE]` of the request, optionally `req` held until `ack` | `MIN_ACK_CYCLE, MAX_ACK_CYCLE, REQ_DROP` | clog2+4 |

Details that matter when you instantiate them:

- **History registers and reset.** Checkers that compare with the previous
  cycle keep a `prev` register that follows `test_expr` every cycle, reset
  included. The first cycle after reset therefore compares against a real
  value.
- **`transition`, `no_transition`, `no_overflow`, `no_underflow`.** They keep
  only a one-bit "was at the special value" flag, not the whole previous
  value. `start_state`/`next_state` are ports and must stay stable during a
  transition.
- **`assert_proposition`.** The check is asynchronous. A catch flip-flop is
  set directly by a low `test_expr` and is read and cleared at the next `clk`
  edge. Verilator notes that `test_expr` is used both as data and as an
  asynchronous set; that is intended.
- **Window and time-limit checkers.** A trigger that arrives while a window or
  count is already open is ignored.

## The demonstration chip (`rt_assertion_chip`)

The top module is a complete run-time-checked chip. It holds one instance of
each of the 30 assertions, arranged as a two-level hierarchy:

```
esci=1, ei=1 ─► rt_det_group (18 deterministic assertions)
             ─► rt_nondet_group (12 non-deterministic assertions) ─► esco, eo
```

Only `eo`, `esco`, `escen` and `esclk` are debug pins; the first `esci` and
`ei` are tied to 1. The design under check is not part of this RTL. The
signals the assertions watch come in through two packed structs from
`ovl_rt_pkg`:

- `det_probe_t`: fields such as `inc_value`, `one_hot` and `tr_state`.
- `nondet_probe_t`: fields such as `hs_req`/`hs_ack` and `win_start`.

In a real product you would delete these ports and instantiate the assertions
next to the logic they watch. You would then route the six chain pins through
every level of the hierarchy in the same way `rt_det_group` and
`rt_nondet_group` do.

Each instance's configuration is set in `ovl_rt_pkg`: probe width `PW = 8`,
the ranges, cycle counts and handshake limits. The chain order is set there
too (`rt_assert_id_e`, `CHAIN_LEN = 30`). At these settings generic synthesis
gives about 450 word-level cells and 126 flip-flops for the whole chip.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
# one assertion (any tb/tb_<module>.sv works the same way)
verilator --binary --timing --assert -Itb -y rtl rtl/ovl_rt_pkg.sv \
    --top-module tb_assert_handshake tb/tb_assert_handshake.sv -Mdir obj_hs
./obj_hs/Vtb_assert_handshake

# the whole chip, default configuration
verilator --binary --timing --assert -Itb -y rtl rtl/ovl_rt_pkg.sv \
    --top-module tb_rt_assertion_chip tb/tb_rt_assertion_chip.sv -Mdir obj_top
./obj_top/Vtb_rt_assertion_chip

# lint one module
verilator --lint-only -Wall -y rtl rtl/ovl_rt_pkg.sv rtl/rt_assertion_chip.sv
```

### What the testbenches check

- **Per-assertion testbenches** (`tb_<module>.sv`) include
  `tb/tb_assert_common.svh`:
  - Each holds its own reference model of the rule, written in plain
    behavioural code, and drives biased random stimulus for 4000 cycles.
  - The shared harness models the error bit and scan stage separately from
    the RTL. It drives the scan pins at random: clearing by scan, holding,
    shifting in zeros, and toggling `ei`.
  - At every falling edge it compares `eo` and `esco` with the model. Every
    detection latency is therefore checked to the cycle.
  - A run fails if it never captured a failure, never cleared one by scan,
    never masked one with `escen`, or never shifted in a zero.
  - `tb_assert_cycle_sequence_nc1.sv` covers mode 1 of the cycle-sequence
    checker.
  - `tb_assert_handshake` also requires each of the five violation kinds to
    occur.
  - `tb_assert_proposition` requires failures that only the between-edge
    catch can see.
- **`tb_rt_assertion_chip.sv`** acts as both the design and the debug
  monitor, at the chip's default configuration:
  1. 300 cycles of legal traffic on every probe, with `eo` required to stay
     high.
  2. A clean scan that must read 30 ones.
  3. For each assertion in turn: a reset, then a short sequence that breaks
     only that rule. `eo` must still be high before the violating edge and low
     right after it. A full scan must then read a single 0 at that
     assertion's chain position, and `eo` must be high again after the scan.
  4. A violation during `escen`, which must leave no trace.
  5. Two simultaneous violations, which must both read back.

## Design choices and departures

The scheme fixes the pin set, the active-low error output, the
zero-means-failed scan data and the chaining through the hierarchy. The rest
was decided here:

- **`esclk` is a shift enable on `clk`, not a second clock.** A shift happens
  at each `clk` edge where `escen` and `esclk` are both high. A monitor that
  is asynchronous to `clk` must stretch its pulse to cover exactly one `clk`
  edge. This keeps the error bit at a single flip-flop with one clock.
- **Read-out count.** The last chain position is visible as soon as `escen`
  rises. Reading N assertions therefore takes N−1 pulses, and N pulses also
  clear the chain.
- **Reset.** The reset is synchronous, and it also clears the error bits to
  "no error". If an error must survive a system reset, take the error cell's
  reset from a separate power-on reset.
- **Counter widths.** The original FPGA figures imply 32-bit counters for the
  time-limit checkers. Here the counters are `clog2(limit+1)` bits wide and
  check the same rule with fewer flip-flops. `assert_win_unchange` needs
  WIDTH+2 flip-flops, one less than the original figures show.
- **Checker rules beyond the names.** The original work names the assertions
  but does not restate their rules. The rules here follow common OVL
  behaviour, with these simplifications:
  - Wrap-around counts as a legal step for `assert_increment` and
    `assert_decrement`.
  - `assert_handshake` leaves out the limits on ack length and on how soon
    `req` must drop after `ack`.
  - `assert_cycle_sequence` leaves out the unpipelined mode 2.
  - `assert_quiescent_state` leaves out the end-of-simulation check.
  - The severity, message and option parameters of OVL are not carried over.
- **Grouping.** The chip's split into a deterministic and a
  non-deterministic group, and the probe-struct ports, are this
  implementation's way of showing the hierarchy. `assert_range` sits in the
  non-deterministic group, following the classification the scheme uses,
  although its check runs every cycle.

## Files

- `rtl/ovl_rt_err_cell.sv`: the error bit and scan stage shared by all
  assertions.
- `rtl/assert_*.sv`: the 30 run-time assertions.
- `rtl/ovl_rt_pkg.sv`: the chip's probe types, configuration and chain order.
- `rtl/rt_det_group.sv`, `rtl/rt_nondet_group.sv`, `rtl/rt_assertion_chip.sv`:
  the demonstration chip.
- `tb/tb_assert_common.svh`: the shared scan harness.
- `tb/tb_*.sv`: one testbench per module, plus the chip-level test.
