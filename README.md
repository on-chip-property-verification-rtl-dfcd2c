# Assertion processor with chained on-chip assertion checkers

Assertions written for simulation catch a bug at the wire where it happens,
without waiting for it to reach an output pin. Most of them are thrown away
when the chip is built. This design keeps a selection of them in the
hardware. Each one becomes a small synthesizable checker with a one-bit
error flag. All flags are linked into a single serial chain that ends in an
**assertion processor**. When any flag is set, the processor reads the chain
out bit by bit. From a bit's position it knows which assertion failed, and it
reacts according to that assertion's severity:

- it halts the chip;
- it pulses a hardware reset; or
- it raises a software interrupt, with the number of the failed assertion,
  so that a CPU can handle the error.

This is a way to debug a product that has already shipped: a failure is
traced to a named RTL assertion instead of a symptom at the pins.

The RTL is SystemVerilog-2017 and synthesizable, and there is a
self-checking testbench for every module. The example top,
`onchip_verif_top`, monitors twelve rules. They cover the ALU and divider
of an 8-bit processor, its interrupt acknowledge and stack, an I2C
controller, one temporal property and a small example circuit. The cores
being monitored are *not* part of this design: the signals their checkers
watch are inputs of the top.

## The error chain and the scan chain

Every checker ends in the same cell, `assert_chain_cell`, which holds one
flip-flop: the error flag. Each checker exposes the same six chain pins on
top of `clk`, `reset_n` and its own inputs:

| pin       | dir | meaning |
|-----------|-----|---------|
| `ei`      | in  | error in from the previous checker: active low, 1 = no error upstream |
| `eo`      | out | error out: `ei & ~flag`, so it is low if this flag or any flag upstream is set |
| `esci`    | in  | scan data in, from the previous checker's `esco` |
| `esco`    | out | scan data out = the flag (1 = this checker failed) |
| `escen_n` | in  | scan enable, active low |
| `esclk`   | in  | scan shift strobe, sampled on `clk` |

The checkers are connected head to tail: `eo`→`ei` and `esco`→`esci`. The
head of the chain has `ei = 1` and `esci = 0`. The tail's `eo` and `esco` go
to the processor. The result is two chains over the same flags:

- **Error chain (combinational AND of "no error").** The processor's `eo`
  input falls one clock edge after any checker fails. It needs no polling.
- **Scan chain (shift register).** With `escen_n = 0`, each cycle with
  `esclk = 1` moves every flag one place towards the processor. The flag
  nearest the processor is read first. A full scan of N shifts moves the
  head's 0 into every cell, so **reading the chain also clears it**, and `eo`
  goes high again.

In normal mode (`escen_n = 1`) a flag is sticky: `flag <= flag | fail`.
In scan mode the flags do not capture new failures. A rule broken during a
scan is lost, but its checker keeps watching, so the next violation is
caught. This keeps the cost at one flip-flop per assertion.

A scan of N = 4 flags, as the processor drives it (one bit per two
cycles):

```
clk       _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
eo        ‾‾‾\___________________________________/‾‾   (falls after a failure)
escen_n   ‾‾‾‾‾‾‾\_______________________________/‾‾
esclk     ___________/‾‾‾\_______/‾‾‾\___ ... ‾‾‾\__   (one strobe per bit)
esco      ======[ 1 ][   2   ][   3   ][   4   ]====   (bit k = checker no. k)
```

**Sequence number.** This is how the processor names a checker: 1 for the
checker next to the processor, N for the head. Putting a checker in a
different place in the chain changes its number, so the number is part of
the design. A checker table must say which rule has which number.

`esclk` is a strobe sampled on the system clock, not a second clock, so the
whole design has one clock domain. The scan path therefore adds no timing
paths beyond ordinary synchronous logic. If `esclk` were a real clock, the
scan path would need its own timing constraints.

## The assertion processor (`assertion_processor`)

Parameters: `N_ASSERT` (the chain length, default 4); `NUM_ACTIONS` (action
classes, default 3); `SEVERITY` (one `NUM_ACTIONS`-bit vector per sequence
number, `SEVERITY[k-1]` for number k); and `RESET_CYCLES` (default 4).

The processor does three things in a small state machine:

1. **Scan detection.** In `S_IDLE` it waits for `eo_i` to fall. It then
   pulls `escen_n_o` low and alternates `S_SAMPLE` (`esclk_o` low, read
   `esci_i`, count + 1) with `S_SHIFT` (`esclk_o` high for one cycle). This
   repeats `N_ASSERT` times.
2. **Priority encoding.** Each bit read as 1 stores its count as the error
   number. If several checkers failed, the last one read (the highest
   number) is reported. Each 1 also ORs that checker's severity vector into
   an accumulator. As a result, the most severe failure of a scan always
   wins, even when it is not the last one read.
3. **Action** (`S_DISPATCH`). The lowest set bit of the accumulator is
   taken. The order and the bit meanings are in `ap_pkg`:

   | bit | action | output behaviour |
   |-----|--------|------------------|
   | 0 | halt | `halt_o` goes high and stays high until `rst_n`; the processor stops (`S_HALTED`) |
   | 1 | hardware reset | `chip_rst_n_o` goes low for `RESET_CYCLES` cycles |
   | 2 | software interrupt | `sw_irq_o` goes high and stays high until `irq_ack_i` |

   `error_no_o` and `error_prio_o` hold the result of the scan that caused
   the action. `action_o` pulses once with the chosen class, one-hot. With
   `NUM_ACTIONS = 5` (five priority classes) the classes 3 and 4 have no
   pin of their own and appear only on `action_o`. A scan that finds no set
   bit takes no action.

**Timing.** Suppose a flag is set at clock edge t. Then `escen_n_o` is low
after edge t+1, the scan takes `2*N_ASSERT` cycles, and the action is
visible after edge **t + 2·N_ASSERT + 2**. The testbenches check this exact
count, for N from 4 to 512. After the scan, the processor is back in
`S_IDLE` one cycle later (for the reset action, after the reset pulse). If
`eo` is still low then, because a checker has failed again, it scans again.

**Severity encoding.** `SEVERITY` is written in one-hot notation, one bit
per class. A selection tool might list "severity 16" for a checker: with
five classes that is class 4. A value of 3 sets halt and reset together,
and halt wins. A class-number (decimal) notation is not built.

**Size.** Most of the processor's logic is the severity lookup, a constant
table of `N_ASSERT` x `NUM_ACTIONS` bits indexed by the scan counter. The
rest is a small state machine and counters of `$clog2(N_ASSERT+1)` bits.
With five classes and a varied severity table, generic gate-level synthesis
(yosys `synth`, counting all cells including flip-flops) gives:

| `N_ASSERT` | 8 | 16 | 32 | 64 | 128 | 256 | 512 |
|-----------|---|----|----|----|-----|-----|-----|
| cells     | 131 | 153 | 182 | 226 | 295 | 402 | 585 |

These counts do not include the chain itself. The chain costs each checker
one flip-flop, a 2:1 choice and an AND gate.

An immediate assertion in the processor checks the scan handshake:
`esclk_o` is never high while `escen_n_o` is high.

## The checkers

Each is a rule plus an `assert_chain_cell`. They follow the usual semantics
of the Open Verification Library checkers of the same names. A failure is
detected at a clock edge with `reset_n` high and sets the flag at that same
edge.

| module | rule (fails when …) | parameters |
|--------|---------------------|------------|
| `assert_always_sc` | `test_expr` is 0 | – |
| `assert_never_sc` | `test_expr` is 1 | – |
| `assert_one_hot_sc` | `test_expr` does not have exactly one bit set | `WIDTH` = 4 |
| `assert_window_sc` | `test_expr` is 0 in the window that opens the cycle after `start_event` and closes with `end_event` (inclusive) | – |
| `assert_time_sc` | `test_expr` is 0 in one of the `NUM_CKS` cycles after `start_event` | `NUM_CKS` = 4 |
| `assert_frame_sc` | after `start_event`, `test_expr` comes before cycle `MIN_CKS` or has not come by cycle `MAX_CKS` | `MIN_CKS` = 0, `MAX_CKS` = 8 |
| `assert_no_underflow_sc` | the value moves from `MIN` to below `MIN` or to `MAX` or above (a downward wrap) | `WIDTH` = 4, `MIN` = 0, `MAX` = all ones |
| `assert_no_overflow_sc` | the value moves from `MAX` to above `MAX` or to `MIN` or below (an upward wrap) | `WIDTH` = 8, `MIN` = 0, `MAX` = all ones |

A `start_event` while a window, time or frame check is running is ignored.
The wrap checkers skip the first cycle after reset, when there is no
previous value.

### From a temporal property to a circuit (`psl_seq_impl`)

`psl_seq_impl` is the checker for the property "always, if e1, e2, e3 hold
on three consecutive cycles, then e4 holds in the cycle of e3". The property
is compiled to gates and flip-flops:

- `a0` remembers e1 from the previous cycle.
- `a1` = e2 & `a0` from the previous cycle.
- The always-checker gets `e4 | ~(e3 & a1)`.

The same method serves any finite sequence: one flip-flop per step, with no
unbounded repetition allowed.

### The white-box example (`whitebox_example`)

`whitebox_example` computes `d = (a|b) & (a&c)`. Gate X is an OR, gates Y
and Z are ANDs, and the internal nets are `xz` and `yz`. Input `b` is
redundant (`d` equals `a & c`), so a stuck-at fault on `b` can never be
seen at `d`. The module adds a `never` checker on `xz & yz` (the error
condition "f1 + f2 > 1"), which observes the internal nets directly. Note
that this example condition does occur for `a = c = 1`. The checker is meant
as an illustration of observing internal nets, not as a property of correct
logic.

## The example subsystem (`onchip_verif_top`)

The top has one chain of twelve checkers and one processor with
`N_ASSERT = 12`, `NUM_ACTIONS = 3` and `RESET_CYCLES = 4`. The chain is
listed here from the head to the processor:

| no. | checker | watches | action |
|----:|---------|---------|--------|
| 12 | `psl_seq_impl` | `e1..e4`: {e1;e2;e3} → e4 | IRQ |
| 11 | `whitebox_example` | `xz & yz` never | IRQ |
| 10 | one-hot | `i2c_state` (controller FSM) | halt |
| 9 | never | `i2c_rd & i2c_wr` | reset |
| 8 | always | `i2c_irq_ok` (interrupt request rule) | IRQ |
| 7 | window | no new `div_en` until `div_done` | IRQ |
| 6 | time, 4 cycles | `int_ack` held 4 cycles after `int_trig` | IRQ |
| 5 | no overflow, 8 bit | stack pointer `sp` | reset |
| 4 | always1 (`alu_top_chain`) | `alu_opcode_valid` | halt |
| 3 | always2 (`alu_divide_chain`) | `div_rule_ok` | reset |
| 2 | frame, ≤ 8 cycles (`alu_divide_chain`) | `div_done` after `div_en` | IRQ |
| 1 | u_flow, 4 bit (`alu_divide_chain`) | divider counter `div_cnt` | IRQ |

Numbers 1 to 4 show how inserting assertions changes a design's
interfaces. The ALU's top level (`alu_top_chain`) holds `always1` and the
divider level (`alu_divide_chain`). The divider level holds `always2`,
`frame` and `u_flow`. The two chains enter each level through new ports and
run through it on the internal nets `eo_t1/esco_t1` and `eo_t2/esco_t2`.
Read from the processor, the order is u_flow, frame, always2, always1.

Top outputs: `halt`, `chip_rst_n`, `sw_irq`, `error_no[3:0]`,
`error_prio[2:0]`, `action[2:0]`, `chain_eo` (the chain's error state) and
`scan_busy`. `chip_rst_n` is meant for the monitored chip. The checkers and
the processor are reset only by `rst_n`.

To add a checker:

1. Put it in the chain.
2. Raise `N`.
3. Add its severity to the `SEVERITY` table at its sequence number.

Remember that every checker upstream of it gets a new number.

## What was decided here, and what is not included

The structure is the method's own:

- one flag per assertion;
- a chained error output and a scan chain;
- a processor that scans, encodes a priority per assertion and takes one of
  three actions, with halt first;
- the pins and their meaning;
- the ALU example's hierarchy, order and numbering;
- the compiled temporal property;
- the white-box example circuit.

The following are this design's choices, made where the method leaves
things open:

- `esclk` is a strobe in the `clk` domain, and the scan reads one bit every
  two cycles.
- `eo` is active low. The head of the chain is tied to "no error".
- Failures during a scan are not captured.
- Severities of one scan are ORed. The reported number is the last failing
  one read.
- The halt is held until `rst_n`. The reset pulse lasts 4 cycles. The
  interrupt is held until acknowledged. `action_o` was added.
- The checker semantics follow the standard library checkers. In
  particular, the wrap checkers treat "to `MIN` or below" and "to `MAX` or
  above" as a wrap, so full-range counters are covered.
- The choice of watched signals, the severities, the frame length, the
  counter widths and checkers 5 to 12 of the top are this design's own.

Not included:

- The monitored processor and I2C cores.
- A selection tool that chooses assertions and generates the chain.
- A class-number severity notation.
- Wiring each checker's flag straight to the processor, a star of wires
  instead of a chain. That is simpler to decode but costs one wire per
  assertion across the chip.
- Any action beyond halt, reset and interrupt, such as reporting errors
  over a network port.

The published evaluation used 5 assertions on an I2C core and 11 on an
8-bit processor core. It reports only some of them by type; the top covers
those. The processor was also synthesized with 8 to 512 assertions and
five priority classes. That configuration is a parameter setting here
(`N_ASSERT`, `NUM_ACTIONS = 5`), and `tb_ap_scale` exercises it.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. The simulator needs the package first. For example, to run
the whole subsystem:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ap_pkg.sv \
    tb/tb_onchip_verif_top.sv --top-module tb_onchip_verif_top -Mdir obj
./obj/Vtb_onchip_verif_top
```

Replace the testbench name to run another one:

| testbench | what it covers |
|-----------|----------------|
| `tb_onchip_verif_top` | The full top at its default settings. Breaks every one of the 12 rules and checks the reported number and action. Also covers a double failure (higher number reported, ORed severity, reset over interrupt), a failure during a scan (dropped), legal sequences, the halt and its release, and counts every mechanism. |
| `tb_assertion_processor` | A modelled 5-flag chain. Checks single and multiple failures, action priority, reset pulse width, interrupt handshake, strobe count and the 2N+2 latency. |
| `tb_ap_scale` | Real chains of 8, 16, 32, 64, 128, 256 and 512 cells with five classes (helper `tb/ap_chain_bench.sv`). |
| `tb_alu_top_chain`, `tb_alu_divide_chain` | Every combination of failures in the ALU levels. The scanned bit order must match the sequence numbers. |
| `tb_assert_chain_cell` | Three cells: error chain, scan order, clearing, hold and no capture in scan mode, reset. |
| `tb_<checker>` | 3000 random cycles against an independent model of the rule and of the sticky flag, with periodic scan clears. |

The testbenches use only two-state values and `$urandom`.
