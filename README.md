# Dual-rail Sleep Convention Logic AES S-box with level-sensitive scan

This design is an AES S-box built as a clockless, dual-rail pipeline in
Sleep Convention Logic (SCL). Every register rail is also a scan cell, so the
pipeline can be tested for stuck-at faults with ordinary scan patterns.

SCL is a variant of NULL Convention Logic (NCL). In NCL, every bit travels
on two wires, and a computation is a DATA wave followed by a NULL wave. In
SCL, the NULL wave is not propagated through the logic. Instead, each stage
has a *sleep* signal that forces every gate and register of the stage low at
once. This gives power gating at gate level. The gates need no hysteresis.
It also clears any stray internal value between two DATA waves.

Sleep makes SCL hard to test: a stuck sleep net silently changes how the
handshake behaves. The scan structure here exists to expose those faults:

- on the register sleep forks;
- on the completion logic;
- in the combinational blocks.

## Signal encoding

Each bit is a pair of rails `(rail1, rail0)`:

| rail1 | rail0 | meaning |
|-------|-------|---------|
| 0 | 0 | NULL (no data / asleep) |
| 0 | 1 | DATA0 (logic 0) |
| 1 | 0 | DATA1 (logic 1) |
| 1 | 1 | never occurs |

A byte is two 8-bit vectors. Throughout the RTL, `*1` names the DATA1 rails
and `*0` names the DATA0 rails. For example, the value `v` is `in1 = v`,
`in0 = ~v`.

## Pipeline

```
 in1/in0 ─┬─► F1: GF(2^8) inverse ─► R1 ─┬─► F2: affine map ─► R2 ─┬─► out1/out0
          │   (sbox_inv_dr)              │   (sbox_affine_dr)       │
         CD0                            CD1                        CD2
          │                              │                          │
          └──► C1 ◄── ~CD2               └──► C2 ◄── ki             │
               │ sleep1 (F1, R1)               │ sleep2 (F2, R2)
      ko = ~CD1
```

A stage has four parts:

- a combinational block `Fi`;
- a register `Ri`;
- a completion detector `CDi` on the register's outputs;
- a completion C-element `Ci`.

`Ci` is a resettable two-input C-element with an inverted output. That output
is the stage's sleep signal, and `Fi` and `Ri` share it.

| stage | C-element inputs | sleep |
|-------|------------------|-------|
| 1 | `CD0`, `~CD2` | `sleep1` |
| 2 | `CD1`, `ki` | `sleep2` |

`CD0` watches the primary inputs.

A stage wakes when both of these hold:

- DATA is complete in the register (or input) before it;
- the register after it is empty.

It goes back to sleep only when both of these hold:

- the register after it has captured the stage's DATA;
- the register before it has emptied.

The C-element holds its value while its two inputs disagree. This ordering is
what makes the pipeline delay-insensitive: no stage ever recaptures stale
data, whatever the gate delays.

The outside world sees two four-phase channels:

- **Sender:** drive a DATA byte on `in1/in0` and wait for `ko = 0`. Then
  drive NULL and wait for `ko = 1`.
- **Receiver:** wait until every bit of `out1/out0` is DATA, then answer
  `ki = 0`. Once the outputs are NULL again, raise `ki`.

As in any DATA/NULL pipeline, two DATA waves are always separated by NULL.
Stage 1 can take the next byte only after stage 2 has emptied. So a receiver
that is slow to acknowledge stalls the sender through `ko`.

### The combinational blocks

The S-box is the GF(2^8) multiplicative inverse followed by the affine
transformation. Both use the AES field polynomial x^8+x^4+x^3+x+1 and the
constant 0x63. Both blocks are input-complete: no output rail rises until
every input bit it depends on is DATA. Every gate is ANDed with `~sleep`.

- `sbox_inv_dr` (F1) uses one 8-input minterm gate per input value, 256 in
  all. Exactly one fires for a complete input and none fires for a partial
  one. Each output rail is the OR of the minterms whose inverse has that bit
  value. The routing is computed at elaboration from `scl_pkg::gf_inv`
  (x^254 by square-and-multiply). This form is large, about 1,300 word-level
  cells, but it is trivially delay-insensitive. A composite-field dual-rail
  inverter would be smaller; that would be the first thing to change.
- `sbox_affine_dr` (F2) builds `b[i] = a[i] ^ a[i+4] ^ a[i+5] ^ a[i+6] ^ a[i+7] ^ c[i]`
  from dual-rail XOR gates:
  - `z1 = a1·b0 + a0·b1`;
  - `z0 = a0·b0 + a1·b1`.

  A NULL input gives a NULL output. XOR with a constant 1 is a rail swap.

### Registers and completion

- `scl_register` is one rail of an SCL register. While awake, a 1 on its
  input sets it and it then holds. Sleep clears it. It has no hold-1 path
  other than that.
- `completion_detector` computes, per bit, `rail0 | rail1`, followed by an
  N-input C-element. The result rises only when the whole word is DATA and
  falls only when the whole word is NULL.
- `completion_celement` has two resets:
  - `rst_h` forces sleep = 1;
  - `rst_l` forces sleep = 0.

  If both are asserted, `rst_h` wins.

The C-elements, detectors and registers are latches. The handshake closes
loops through them, so linting and synthesis report combinational loops
(Verilator `UNOPTFLAT`, yosys "logic loop"). These loops are the
asynchronous control itself. Each loop passes through a latch that holds
while its inputs disagree, so the circuit settles after every input change.

## Scan access

Each rail of R1 and R2 is a `scl_scan_cell`, 32 in all. The cells form one
chain from `sin` to `sout`, in this order:

```
sin → R1.bit0.rail0 → R1.bit0.rail1 → R1.bit1.rail0 → … → R2.bit7.rail1 → sout
```

A scan cell pairs a master latch with the register, in the manner of
level-sensitive scan design (LSSD):

- **Master latch:** transparent while `l` is high. It samples the previous
  cell's output.
- **Modified register:** in test mode (`m = 1`), it is a plain latch that
  copies the master while `ci_l` is high, so 0s as well as 1s can be shifted.
  In normal mode (`m = 0`), it is the SCL register fed by its combinational
  block.

Sleep clears the register in both modes. The master latch is never slept.

| control | effect |
|---------|--------|
| `m` | 1 = registers load from the scan path, 0 = from the logic |
| `l`, `ci_l` | two non-overlapping scan clocks; one shift = pulse `l`, then pulse `ci_l` |
| `rst_h` | all sleep signals high: every register and gate cleared (also power-on reset) |
| `rst_l` | all sleep signals low: everything awake, the logic becomes plain Boolean logic |

To shift in a vector `V` so that cell `k` holds `V[k]`, send `V[31]` first.
The bit on `sout` before each shift is the current content of the last cell.

## Test procedure

The tests split the faults into two classes: faults on logic gates and
faults on sleep forks. Each step targets part of them.

1. **Sleep forks stuck at 0.**
   1. With `rst_l` held and `m = 1`, shift all 1s into the chain.
   2. Drop `rst_l`, pulse `rst_h`, and raise `rst_l` again.

   Every register whose sleep fork works is now 0. Shift the chain out: each
   1 in the output marks one stuck-at-0 fork, at its position.
2. **Handshake.** Take a byte through the pipeline in normal mode with a
   complete DATA/NULL cycle. A stuck completion detector output or a stuck
   C-element output makes the handshake hang or deliver a wrong value.
3. **Combinational logic.** Hold `rst_l` so nothing sleeps. F1 and F2 are
   then ordinary Boolean circuits and can be tested with ordinary patterns.
   - To test F2, scan a value into R1 and NULL into R2. Pulse `m` low for one
     capture, then shift the result out.
   - To test F1, drive a value on the primary inputs instead.

   Stuck-at-1 faults on sleep forks break the chain itself, and step 1's
   shift already reveals them.

`tb/tb_scl_fault_coverage.sv` injects 142 single stuck-at faults, one at a
time:

- both polarities on every sleep fork;
- both polarities on every register data input;
- both polarities on the five control nets (`done0..2`, `sleep1`, `sleep2`);
- both polarities on the sleep input of each combinational block.

For each fault it runs these steps. The fault-free circuit passes, and 140
of the 142 faults are detected. The two that are not are the stuck-at-0
faults on a combinational block's sleep input. Such a fault only keeps the
block awake while its register sleeps. That costs power, but no logic value
changes, so no logic test can see it. The testbench also holds four forks at
0 together and checks that exactly four 1s come out.

## Files

| file | contents |
|------|----------|
| `rtl/scl_pkg.sv` | AES constant, GF(2^8) multiply and inverse (used at elaboration) |
| `rtl/scl_sbox_top.sv` | top: two-stage pipeline, scan chain, test controls |
| `rtl/sbox_inv_dr.sv` | F1, dual-rail inverse |
| `rtl/sbox_affine_dr.sv` | F2, dual-rail affine map |
| `rtl/scl_scan_cell.sv` | scan cell: master latch + modified register |
| `rtl/scl_register.sv` | one rail of an SCL register, with test-mode load |
| `rtl/completion_detector.sv` | dual-rail completion detector |
| `rtl/completion_celement.sv` | completion C-element with rst_h / rst_l |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_scl_sbox_top.sv` | end to end: all 256 bytes with random handshake timing and stalls, scan round trip, sleep-fork test, capture tests |
| `tb/tb_scl_fault_coverage.sv` | fault injection and the three-step test |

Each testbench prints `TB_RESULT checks=N failures=M`. The reference values
come from independent models in the testbench: an inverse found by
brute-force search, and the affine map in its rotate form.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/scl_pkg.sv tb/tb_scl_sbox_top.sv \
          --top-module tb_scl_sbox_top -Mdir obj && ./obj/Vtb_scl_sbox_top
```

Replace the testbench name to run any other testbench. Every testbench
finishes in about a second. The design has no parameters that change its
size. The only parameter is `completion_detector.N`, which is set to 8 by the
top.

The testbenches drive the handshake by polling signals every nanosecond
rather than with `wait`. The RTL has zero delay, so each handshake step
settles within a single time step.

## What is assumed, and where this departs from a gate-level SCL design

- **Level of modelling.** SCL gates and registers are transistor-level cells
  (set block, hold0 block, high-Vt sleep transistors). Here they are modelled
  by their logic function: gates ANDed with `~sleep`, registers as latches.
  Power, leakage and the power-gating benefit are outside what this RTL can
  show. The same goes for any comparison with a conventional single-rail
  S-box.
- **Stage count and split** are choices of this design: two stages,
  inverse then affine.
- **Handshake wiring** is also a choice of this design: which signals feed
  each C-element, and that `Fi` and `Ri` share one sleep signal.
- **The completion detectors are not slept.** They watch registers that are,
  so they clear with them.
- **Scan cell.** The transmission-gate schematic of the scan cell is reduced
  to its function: a master latch on `l`, a select on `m`, and a register
  that loads on `ci_l`. The latch phases and the exact way the register is
  modified for test mode are this design's choices. The scan chain order is
  too.
- **Reset.** `rst_h` sets sleep to 1 and `rst_l` sets sleep to 0. This is
  how the two resets are used here for the flush and for test mode.
- **Fault model.** The testbench injects faults on nets of this RTL (forks,
  register inputs, control outputs), not on transistors. Faults inside the
  minterm and XOR gates are covered only insofar as they show up on a block
  output rail.
- Quad-rail encoding, which SCL also allows, is not used.
