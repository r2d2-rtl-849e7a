# R2D2: catching a toggle-triggered analog Trojan at run time

An A2-style hardware Trojan is a handful of transistors added to a chip after
place and route. It taps one digital wire and acts as a charge pump. Every
rising edge of the wire tips a little charge from a small capacitor into a
large one, and a leakage path slowly drains the large one. Normal activity
never charges it far. If a program makes the wire toggle fast for several
microseconds, though, the voltage crosses an inverter's switching threshold
and the Trojan fires its payload. The circuit is too small to find by
inspection, and test patterns never toggle the wire the right way. The attack
is therefore hard to stop before the chip is in the field.

R2D2 stops it at run time. The wires an attacker would choose are those that
software can toggle but that normally toggle rarely. A small on-chip counter
circuit watches each such *guarded* signal. It counts the signal's toggle
events inside a repeating *monitoring window* of T_m clock cycles. If a window
collects A_th toggles, the circuit drops its active-low detection output and
raises an interrupt request. The operating system can then stop the offending
program long before the Trojan's capacitor is charged. Privileged software
programs T_m and A_th, so they cannot be read from the layout, and
unprivileged code can neither change them nor turn detection off.

This repository holds synthesizable SystemVerilog for the detector. It also
holds the parts of an ARMv7-compatible core that the demonstration needs: the
status register whose J bit is the attacked wire, and register R0, which
carries the Trojan's payload. There is also a behavioural model of the analog
Trojan, which lets the whole attack and its detection be simulated end to end.

## The detection circuit

`r2d2_detector` is built from three parts:

```
            cfg bus (privileged) ──► r2d2_config_regs ── enable, MTW, AT[i]
                                          │        │
 clk ──► r2d2_clock_counter ◄── MTW ──────┘        │
              │ window_end (count == MTW)          │
              ▼                                    ▼
 guard_i[i] ─► r2d2_toggle_counter[i] ◄──────── AT[i]
                    │
                    └─► detect_n_o[i] ──► irq_o = OR of all alarms
```

* **Clock counter** (`r2d2_clock_counter`). The counter counts clock cycles
  from 0. In the cycle where its value equals MTW, `window_end` is high, and
  on the next edge the counter returns to 0. A window is therefore MTW + 1
  cycles long.
* **Toggle event counter** (`r2d2_toggle_counter`, one per guarded signal).
  A toggle event is any change of the guarded signal's level between two
  clock edges, rising or falling. The counter is cleared when a window ends.
  Once its count has reached AT, the next toggle sets an alarm flop. The
  channel's `detect_n_o` then stays low until the window ends.
* **Configuration registers** (`r2d2_config_regs`). These hold the enable bit,
  MTW, and one AT register per channel.

### Counter widths and the "minus one" encoding

The demonstration chip uses T_m = 256 cycles and A_th = 64 toggles, with an
8-bit clock counter and a 6-bit toggle counter. Neither 256 nor 64 fits in
those widths, so both registers hold *value minus one*:

| register | holds        | default | meaning                                  |
|----------|--------------|---------|------------------------------------------|
| MTW      | T_m − 1      | 255     | window of 256 cycles                     |
| AT[i]    | A_th − 1     | 63      | alarm on the 64th toggle of a window     |

The toggle counter stops at AT and the alarm flop serves as the seventh
bit. Together they do what a 7-bit count compared against 64 would do, with
the widths of the original design. `r2d2_detector` takes T_M and A_TH as
parameters and derives the widths as `$clog2(T_M)` and `$clog2(A_TH)`.

### Timing, cycle by cycle

* `guard_i` is sampled on every rising edge and must be synchronous to `clk`,
  as a core register bit is.
* Say the edge at cycle *k* samples the toggle that brings the window's count
  to A_th. Then `detect_n_o` is low and `irq_o` high from just after edge *k*.
  They stay that way until the edge that follows the window's last cycle. The
  alarm is thus a low pulse of at most T_m cycles, repeated in every window
  in which the toggling continues.
* If a toggle falls in the last cycle of a window, it becomes the first event
  of the next window. No toggle is lost at a window boundary.
* The threshold test is "count ≥ AT". If privileged software lowers AT in the
  middle of a window, below the running count, the next toggle raises the
  alarm at once.
* Disabling detection clears both counters and any alarm at the next edge.
* Reset is synchronous and active low. After reset, detection is enabled with
  MTW = 255 and every AT = 63, so the chip is protected before software has
  configured anything.

### Tuning

A signal that toggles in a fraction *p* of cycles collects about 256·*p*
toggles per default window. The alarm needs 64, so the default tolerates
toggle rates below 25 %. The status flags that are candidate triggers toggle
in under 5 % of cycles in a speech-recognition workload (about 13 per
window), and several never toggle at all. A program that toggles a bit at
20 MHz on a 150 MHz core produces about 68 toggles per window. The alarm
therefore rises after about 32 rising edges of the signal, while the Trojan
needs about 180.

## Configuration interface

Requests arrive as one `r2d2_pkg::cfg_req_t` per cycle:

| field   | width | meaning                                   |
|---------|-------|-------------------------------------------|
| valid   | 1     | a request is present                       |
| write   | 1     | 1 = write, 0 = read                        |
| priv    | 1     | the request comes from privileged software |
| addr    | 4     | register address                           |
| wdata   | 32    | write data                                 |

| addr   | register | bits used            |
|--------|----------|----------------------|
| 0      | CTRL     | bit 0: enable        |
| 1      | MTW      | `[CLK_CNT_W-1:0]`    |
| 2 + i  | AT[i]    | `[TGL_CNT_W-1:0]`    |

A privileged write takes effect at the next edge. A privileged read returns
data in the same cycle, on `cfg_rdata_o`. Unprivileged accesses and unmapped
addresses raise `cfg_err_o` in the same cycle, change nothing and read as 0,
so user code cannot even learn the settings. An assertion in
`r2d2_config_regs` checks that no unprivileged write ever changes a register.

## The demonstration subsystem

`r2d2_demo_top` puts the pieces together as they sit on the demonstration
chip:

```
 J write ─► cpsr_reg ── CPSR_J ─┬─► a2_trojan ── trigger_n ─► r0_payload ─► R0
                                └─► r2d2_detector ─► attack_detect_n, irq
 fetch packet ─► bp_enable ─► Bp_en
 EX1 branch outcome ─► bp_control_unit ─► fault_req, redirect_pc, BTB update
```

### The status register and the choice of trigger

`cpsr_reg` implements the ARMv7 CPSR bits that the core uses, in the
architectural bit positions:

| bits  | 31 | 30 | 29 | 28 | 27 | 24 | 23 | 19:16   | 4:0              |
|-------|----|----|----|----|----|----|----|---------|------------------|
| field | N  | Z  | C  | V  | Q  | J  | S  | GE[3:0] | M = 10000 (user) |

* N, Z, C, V, Q and GE can be written by MSR, field by field, and updated by
  instructions. Q is sticky.
* S (CPSR[23], a reserved bit in the architecture) switches the core between
  dual-issue superscalar (0) and 6-issue VLIW (1) dispatch.
* J has no function in a core without Jazelle. It is still a stored,
  software-writable bit, and nothing else ever toggles it. That makes it the
  ideal trigger wire, and it is the bit the Trojan taps and the detector
  guards.
* The core has only user mode, so IT, E, A, I, F and T read as 0, and M reads
  as user mode.

When an MSR write and a flag update fall in the same cycle, the MSR wins for
the fields it writes.

### The payload

`r0_payload` is core register R0 with the Trojan's payload attached. The
analog trigger output is asynchronous to the core, so two flops synchronise
it. While the trigger is active, R0 is forced to 1 and any write is
overridden. The attack program clears R0, toggles J, and reads R0 back. A
non-zero value tells it that the attack worked.

### Branch prediction enable

`bp_enable` is a second signal of the kind an attacker looks for. The core
fetches 256-bit packets of eight ARM instructions. Its branch predictor is
switched on (Bp_en) only for packets that contain a branch: B, BL or BLX
(immediate), or BX, BXJ or BLX (register), as encoded in the A32 instruction
set. Ordinary code leaves Bp_en quiet for long stretches, while a loop packed
with branches makes it toggle often. Bp_en and an eight-bit lane mask are
registered, one cycle after the packet, and hold between packets. The top
brings Bp_en out. It is not guarded, because the demonstration chip guards only
CPSR_J, but a second detector channel (`N_GUARD = 2`) could guard it.

### Checking branches at EX1

`bp_control_unit` is the check at the end of the branch path. When a branch
reaches EX1, its real direction and target are known. The unit compares them
with what was predicted at fetch. A wrong direction is a misprediction. So is
a taken branch that was predicted taken to the wrong target. On a
misprediction it raises `fault_req_o`, which flushes the pipeline, and gives
the restart address in `redirect_pc_o`: the real target if the branch was
taken, otherwise the fall-through address. In the same cycle it asks for the
BTB entry of that branch to be rewritten with the real outcome. The unit is
combinational. The predictor tables and the BTB it corrects are not built.

### The Trojan model

`a2_trojan` is a behavioural model of an analog circuit, with real-valued
state and time delays. It is for simulation only. On each rising edge of
`trigger_in`, C_main's voltage rises by C_unit / (C_unit + C_main) of its
headroom to VDD. It then leaks linearly at a fixed rate. `trigger_out` is the
output of an inverter with threshold V_TH, so it is high when idle and drops
when the Trojan fires. These constants are a calibration, not extracted
device values:

| parameter     | value        | effect                                   |
|---------------|--------------|------------------------------------------|
| C_UNIT/C_MAIN | 1 fF/186 fF  | charge step per rising edge              |
| VDD, V_TH     | 1.2 V, 0.6 V | supply, inverter threshold               |
| LEAK_V_PER_NS | 2.5e-5       | drain through the leakage path           |

With these values, a 20 MHz trigger fires the output after 180 rising edges
(9.0 µs) when it starts from rest. After saturation, the output stays fired for about 14.5 µs once
toggling stops. A 1 MHz trigger never fires it. These match the behaviour
reported for the fabricated Trojan: 180 events in 9 µs at 20 MHz, and about
15 µs of retention.

Because the Trojan is analog, `r2d2_demo_top` simulates but does not
synthesize as a whole. Every other module is synthesizable.

## What is not here

The rest of the demonstration core and its chip has no RTL in this
repository: the 10-stage pipeline, superscalar/VLIW dispatch, the six
functional units, the full register file, the bimodal/PAp branch predictor,
the caches and memories, and the SoC buses and peripherals. Their internals
have not been published in enough detail to reproduce. Of the branch
predictor, only the Bp_en enable and the EX1 check are here. In place of the
rest, the top brings out the ports that write the CPSR and R0, the
fetch-packet input, the EX1 branch ports and the interrupt request.

## Where this RTL makes its own choices

The window/threshold structure, the active-low detection output, the
privileged programmable registers, the 256/64 defaults and the 8-bit/6-bit
counter widths all follow the published scheme. This RTL chose the following:

* It counts both edges as toggle events.
* The registers hold "value minus one", and an alarm flop counts the
  threshold toggle.
* The alarm is held until the window ends, and the threshold test is
  "count ≥ AT".
* The register map and the 32-bit configuration bus are its own, as are
  reads returning 0 for unprivileged software and the enable bit resetting
  to 1.
* Several channels share one window. The interrupt is the OR of the alarms
  and stays high while any alarm is active; it is not sticky.
* CPSR_J is a real stored bit with its own write port. The MSR-over-flags
  priority is also a choice here.
* The payload synchroniser and the payload's priority over writes are its
  own.
* The Trojan model's constants are a calibration.
* The EX1 check treats a wrong target on a taken branch as a misprediction,
  rewrites the BTB only after a misprediction, and is combinational.

## Simulating

Every file starts with a comment describing its interface and timing. Each
block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/r2d2_pkg.sv rtl/cpsr_pkg.sv tb/tb_r2d2_demo_top.sv \
    --top-module tb_r2d2_demo_top
./obj_dir/Vtb_r2d2_demo_top
```

Replace the testbench name to run another one:

| testbench                | what it checks                                                    |
|--------------------------|-------------------------------------------------------------------|
| `tb_r2d2_clock_counter`  | window lengths of 1, 5, 17 and 256 cycles; disable; MTW change     |
| `tb_r2d2_toggle_counter` | random toggles and windows against a reference; the 64th toggle    |
| `tb_r2d2_config_regs`    | reset values, privileged access, rejected unprivileged access      |
| `tb_r2d2_detector`       | two channels, per-channel thresholds, 63 vs 64 toggles, disable     |
| `tb_cpsr_reg`            | random MSR and flag traffic against a model, mode switch, J writes |
| `tb_r0_payload`          | writes, 2–3 cycle payload latency, override, recovery              |
| `tb_bp_enable`           | every branch kind in every lane, near-miss encodings, hold          |
| `tb_bp_control_unit`     | right and wrong directions and targets, restart address, BTB write |
| `tb_a2_trojan`           | 180 edges and 9 µs at 20 MHz, retention, no firing at 1 MHz        |
| `tb_r2d2_demo_top`       | the full attack, with default parameters at 150 MHz               |

`tb_r2d2_demo_top` runs three phases. First comes a normal workload. It
switches to VLIW mode and back, and it fetches packets with an occasional
branch, which Bp_en must follow. Branches resolve in EX1, and each wrong
prediction must request a flush and a BTB correction. This phase raises no alarm, and an unprivileged
disable attempt is rejected. Next, the attack program runs with detection on. The
interrupt rises exactly at the 64th toggle of J, and the program is stopped.
The Trojan never fires and R0 stays 0. Finally, a privileged write turns
detection off and the attack is repeated. The Trojan fires after 180 rising
edges of J and R0 becomes 1, with no alarm. All testbenches pass. The end-to-end
run takes well under a minute.
