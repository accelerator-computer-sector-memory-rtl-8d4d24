# Sector memory for a relay-based accelerator control system

A linear accelerator's sectors are controlled from a central control room
(CCR) over long telephone-relay circuits. A command is a pattern of
polarities on a set of looped wire pairs; the sector's relay decoder only
acts on it if the pattern is held for 100 to 200 ms, so a computer that
wants to control a sector spends most of its time waiting for relays.

The sector memory sits between the incoming wire pairs and the sector's
relay decoder. It checks that a command is correctly coded, latches it in a
fast register within microseconds, acknowledges it at once, and then plays
it out to the slow decoder relays on its own schedule: it waits until the
manual control panels have released the sector, lets the decoder relays
relax, drives the stored command for an adjustable period, and lets the
relays relax again before it accepts the next command. The sender is free
as soon as the acknowledge arrives.

This repository is a synchronous SystemVerilog version of that logic. The
analog front end (filters, level shifters) and the relays themselves are
not logic and are not included; the RTL takes wire levels in and produces
relay-driver enables.

## Signals and the command cycle

The eleven input pairs are, in array order (`sm_pkg::pair_idx_e`):

| index | pair | role |
|---|---|---|
| 0 | CP | control pair, stored and compared |
| 1..6 | PrA..PrF | looped pairs, stored and compared |
| 7..9 | SD0..SD2 | subdevice pairs, stored; can stretch the execute pulse |
| 10 | SS | sector select (seize) pair, checked only |

A pair is correctly coded when exactly one of its two wires carries the
signal. Its *polarity* (which wire, T or R) is the information. The main
internal signals, named as in the original logic equations, are:

| signal | meaning |
|---|---|
| S | every one of the eleven pairs is correctly coded: a command is present |
| F / B | free / busy flip-flop (`busy` output; reset puts it in F) |
| P0 | load pulse of the fast storage register, P0 = S·F, 10 µs wide |
| Same | S and the seven looped pairs equal the stored bits |
| A | acknowledge to the control room, A = Same (`ack`) |
| K1, K2 | seize relays of manual panels SSP 1 and SSP 2 (inputs) |
| T1 | relax delay, 100..500 ms |
| D | execute pulse, 100..500 ms, rechargeable |
| K3 | execute relay, K3 = D |
| K3A | panel inhibit relay, K3A = S + D + T1 |

One command goes through these steps:

1. **Load.** With the memory free, S starts P0. The register takes the
   polarity of the seven looped pairs and the three subdevice pairs.
2. **Acknowledge and busy.** Once the stored bits equal the input, Same is
   high. It drives A back to the control room and sets B. At 1 MHz the
   acknowledge comes 2 µs after a correctly coded command appears.
3. **Panel release.** K3A has been on since S appeared. It disconnects the
   manual panels, so their seize relays K1/K2 drop. When both have dropped,
   T1 starts, giving the decoder relays time to relax.
4. **Execute.** When T1 has ended (or at once, if no panel held the sector)
   and the memory is busy, D starts. While D is on, each of the seven looped
   pairs is recreated towards the decoder by a pair of relay drivers
   (`drv_t`, `drv_r`), and K3 connects them.
5. **Hold and stretch.** D is a *rechargeable* one-shot. It stays on as long
   as Same is present and ends `d_ms` after the last Same. So a held command
   is held, and a repeat of the same command during D extends it.
   A subdevice pair with a 1 on its T wire does the same, but only while no
   command (S) is present.
6. **Relax and release.** When D ends, T1 runs again. When T1 has ended,
   D is off and Same is gone, F is set and the memory accepts the next
   command.

A *different* command sent while the memory is busy shows S but not Same.
It is not acknowledged and does not recharge D. The memory finishes the
current command; when it turns free, that command is still on the pairs and
is loaded by P0.

## Control-pair check: the three-state coincidence gate

The control room switches the control pair with a time code: both wires
go from 0,0 to 1,1 at 10 ms, and one wire drops to give 1,0 at 20 ms. A
conventional exclusive OR sees a brief 0,1 or 1,0 on the way from 0,0 to
1,1, because the two wires never rise at exactly the same speed. That
pulse would look like a valid command. It gives the coincidence sequence
1, 0, 1, 0 instead of 1, 1, 0.

The control pair therefore uses a coincidence gate `AB + a'b'`
(`mallory_xor`). Its NOR half (`a`, `b`) sees the wires through an
attenuator. The RTL models this by presenting each wire as a 4-bit level
code (0 = ground, 15 = full logic level) and using two thresholds:

* `A`, `B` (AND half): wire level ≥ `TH_MID` = 8
* `a`, `b` (attenuated NOR half): wire level ≥ `TH_HI` = 13

The output reads "different" only in the two corners of the input plane
where one wire is fully up (≥ 13) and the other is still below half swing
(< 8). A 0,0 → 1,1 transition reads "alike" all the way, as long as the
slower wire passes 8 before the faster one reaches 13. In steady state,
with both wires at 0 or 15, the gate is an ordinary XOR. The ten other
pairs use the conventional single-threshold check (`pair_xor`).

If you feed the design from real digital inputs, drive each wire as 0 or
15. The intermediate codes exist only to represent wires in transition.

## Timing and clock

The original circuit is asynchronous DEC discrete logic with RC one-shots.
This version is synchronous to one clock, `CLK_HZ` (default 1 MHz, so one
cycle is 1 µs). T1 and D are counters, `t1_ms × CLK_HZ/1000` and
`d_ms × CLK_HZ/1000` cycles long. The settings are run-time inputs and are
clamped to 100..500 ms, the range the potentiometers of the original
allowed. Cycle-level details:

* P0 lasts `P0_US` µs (10 µs by default, at least one cycle). The register
  loads on every P0 cycle while S is present.
* D begins the cycle after T1's last cycle, and T1 begins the cycle after
  D's last cycle, so K3A has no gap between them.
* D ends exactly `d_ms` ms after the last cycle with Same (or with a
  subdevice stretch).
* F is set one cycle after T1 ends, if the command has been removed.
* Reset (`rst_n`, synchronous, active low) gives: free, timers idle, and
  the register cleared.

## Where this design makes its own choices

The original documentation gives the logic equations and the timing
diagrams, but leaves some orderings open. These are the choices made here:

* **D runs at most once per busy period unless Same comes back.** Read
  literally, the start condition B·T1'·K1'·K2' would restart D every time
  T1 ends. Here D restarts after the closing T1 only if the same command
  is present again.
* **F is only set after D has run.** If a momentary command ended before
  the panel relays dropped, set-F = T1'·D'·Same' would free the memory
  without executing it. The original sets F on the *end* of T1; a flag
  `ran` gives the same result here.
* **Subdevice stretch** D·(SD0+SD1+SD2) is taken to mean: a correctly coded
  subdevice pair carrying a 1. It counts only while no command is present,
  so a different command with subdevice bits cannot prolong the present
  one.
* **T1 restarts** if the seize relays relax again while it is running.
* **The external reset** clears only the three subdevice flip-flops. The
  stored subdevice bits are brought out as `sd_q`, since their use beyond
  stretching ("extra device selection") is not specified.
* **The second driver of each output pair** is taken to be enabled by the
  complement of the stored bit together with D.
* **Diff** is the complement of Same.
* **Not included:** the input RC/zener filters, the emitter-follower level
  shifters, the relay drivers and the relays. The `drv_t`/`drv_r`, `k3`
  and `k3a` outputs are the enables of those drivers.

## Files

| file | content |
|---|---|
| `rtl/sm_pkg.sv` | level code, thresholds, pair indices, `command_t`, delay range |
| `rtl/pair_xor.sv` | conventional pair coding check |
| `rtl/mallory_xor.sv` | three-state coincidence check of the control pair |
| `rtl/input_checker.sv` | eleven pair checks and the S gate |
| `rtl/fast_store_reg.sv` | 7 + 3 bit fast storage register and the looped-pair comparison |
| `rtl/one_shot.sv` | retriggerable / rechargeable counter one-shot |
| `rtl/sector_control.sv` | F/B flip-flop, P0, Same/A, T1, D, K3, K3A |
| `rtl/output_drivers.sv` | D-gated relay driver enables, two per looped pair |
| `rtl/sector_memory.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_xor_venn.sv` | side-by-side input-plane maps and transition paths of the two pair checks |

Each testbench ends with `TB_RESULT checks=N failures=M`. It includes a
cycle watchdog.

`tb_sector_memory` runs the top with all parameters at their defaults
(1 MHz, real 100 to 500 ms delays; about 11 million cycles, a few seconds).
It covers:

* a computer command with the sector free;
* a momentary command and a held command after a panel had the sector;
* a repeat of the command during D;
* a different command during D;
* a lone subdevice stretch;
* miscoded pairs;
* the time-coded control-pair sequence;
* the external reset;
* clamping of the delay settings.

It counts each of these mechanisms and fails if one never occurred.

`tb_xor_venn` prints the input-plane maps of both pair checks. It then
walks both gates along equal-speed and unequal-speed transitions and checks
where each one shows a transient. `tb_sector_control` runs the control at a
100 kHz clock. The other
testbenches are exhaustive or randomised against reference rules written in
the bench.

## Simulating

```
verilator --binary --timing --assert rtl/sm_pkg.sv tb/tb_sector_memory.sv \
    -Irtl --top-module tb_sector_memory -o sim
./obj_dir/sim
```

Substitute any other `tb_<module>.sv` to test a single block. Files are
found through `-Irtl`; the package must be listed first. For lint, run
`verilator --lint-only -Wall rtl/sm_pkg.sv rtl/sector_memory.sv -Irtl`.
It reports only unused package constants and unused bits of the pair
checks.

## Changing it

* **Clock:** set `CLK_HZ`. The one-shot counters resize themselves for
  511 ms.
* **Delay range:** `MS_MIN` and `MS_MAX` in `sm_pkg`.
* **Wire-level resolution and gate thresholds:** `LVL_W`, `TH_MID` and
  `TH_HI` in `sm_pkg`. `TH_HI` sets how unequal the rise times of the
  control pair's wires may be before a transient gets through.
