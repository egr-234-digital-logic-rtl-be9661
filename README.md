# Minutes:seconds digital clock from cascaded BCD counters

A synchronous MM:SS clock for an FPGA board with four 7-segment digits.
It is built entirely from one primitive: a 4-bit counter register with
clear, enable and parallel load. Each modulo-N counter is that register
plus one AND gate. The gate spots the terminal count N-1 and drives Load
with D = 0, so the next enabled step returns to zero. The same decoded
signal is brought out as a "terminal count" flag. Chaining counters
through these flags gives two things:

* a prescaler, dividing the 50 MHz board clock down to one tick per
  second, and
* the clock proper, with seconds units, seconds tens, minutes units and
  minutes tens counting 0-9, 0-5, 0-9 and 0-5.

Everything runs on a single clock. No counter output is ever used as a
clock.

```
Clock ──► one_sec_pulse ──tick──► mod10 ─► mod6 ─► mod10 ─► mod6
          (7 × mod10 + mod5,        s0       s1      m0       m1
           ÷ 50,000,000)            │        │       │        │
                                 hex7seg  hex7seg hex7seg  hex7seg
                                    │        │       │        │
                              SecondOut0 SecondOut1 MinuteOut0 MinuteOut1
```

## The carry chain

This is the part that needs care. A counter's flag (`Nine`, `Five`,
`Four`) depends only on its own value. It stays high for as long as the
counter sits at its terminal count, whether or not the counter is
enabled. So the enable of stage *k* is the AND of:

* the enable of stage 0, and
* the flags of every stage below *k*.

A higher stage then steps exactly once, on the same edge on which all the
lower stages wrap to zero. This is the synchronous form of a ripple carry.

* **Prescaler (`one_sec_pulse`).** Stage 0 is always enabled. The stages
  form one counter in mixed radix 10,10,10,10,10,10,10,5. `Pulse` is the
  AND of all eight flags. It is high for exactly one cycle out of every
  5 × 10^7, the cycle in which the whole chain reads 4 9999999.
* **Clock (`digital_clock`).** Stage 0 is enabled by the tick. The tick
  must therefore be in *every* enable: `en_s1 = tick & Nine(s0)`,
  `en_m0 = tick & Nine(s0) & Five(s1)`, and so on. Leave the tick out and
  the seconds-tens counter sees `Nine(s0)` high for a whole second
  (50 million clocks) and counts on every one of them.
* **Roll-over.** The minutes-tens flag (`Five` of m1) drives nothing. The
  clock rolls over from 59:59 to 00:00 and has no hours.

### Timing

* After `Clear`, the first tick is high during clock cycle
  5·10^N_DECADES − 1.
* The displays change on the next rising edge, then once every
  5·10^N_DECADES cycles after that.
* The segment outputs are combinational from the digit registers.
* `Clear` is synchronous and active high. It resets the prescaler and all
  four digits together, so a full second passes after `Clear` before the
  display reads 00:01.

## Modules

| module | what it is |
|---|---|
| `clock_pkg` | types `digit_t` (4 bits) and `seg7_t` (7 bits) |
| `cntr_reg` | 4-bit register. Clear, else with Enable: Load ? D : Q+1, else hold |
| `cntr_mod10` | 0..9. Load = Q[3] & Q[0]. `Nine` = the same |
| `cntr_mod6` | 0..5. Load = Q[2] & Q[0]. `Five` = the same |
| `cntr_mod5` | 0..4. Load = Q[2]. `Four` = the same |
| `one_sec_pulse` | prescaler: `N_DECADES` × mod-10, then mod-5. One-cycle `Pulse` |
| `hex7seg` | 0..F to 7 segments, active low, bit 0 = a … bit 6 = g |
| `digital_clock` | top: prescaler, four digit counters, four decoders |

Top-level ports:

* `Clock` and `Clear`, each 1 bit.
* `SecondOut0`, `SecondOut1`, `MinuteOut0` and `MinuteOut1`, each 7 bits
  (the units and tens digits of seconds and minutes).

Top-level parameter: `N_DECADES`, the number of mod-10 stages in the
prescaler. The default is 7, which divides by 5 × 10^7. That gives 1 Hz
from a 50 MHz clock. Use a smaller value for simulation, or a different
value for a different board clock. Note that only the ratios 5 × 10^N are
available.

## Design choices and departures

* **`cntr_reg` behaviour.** The register's behaviour is this design's own
  choice. Its priority is Clear, then Load, then increment. Load only acts
  when Enable is high, so a stage waits at its terminal count until it is
  enabled. The cascades depend on this.
* **`cntr_mod6` stops at 5.** It decodes 5 (bits 2 and 0). This
  departs from the lab's printed decode, bits 2 and 1, and from its
  waveform. That version stops at 6 and gives a seven-state counter, which
  would let a tens digit show 6. The counter's name, its `Five` flag and
  its use in a 60-count clock all call for 0..5, so this design follows
  them.
* **The tick gates every enable**, as explained above.
* **Synchronous `Clear`.** Active high and synchronous.
* **`cntr_mod5` insides.** Bit 2 alone is the terminal decode, following
  the pattern of the other counters.
* **`hex7seg` segment order and polarity.** Bit 0 = a … bit 6 = g, active
  low, as for common-anode displays. Boards differ, so check against your
  pin-out. If your display is active high, invert `seg`.
* **`N_DECADES`.** A parameter here. The lab's prescaler always has
  seven stages, and that is the default.

## Simulating

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/clock_pkg.sv \
          tb/tb_digital_clock.sv --top-module tb_digital_clock
./obj_dir/Vtb_digital_clock
```

| testbench | what it checks |
|---|---|
| `tb_cntr_reg` | 2000 random cycles against a reference model. Clear, load, increment, hold and wrap each occur |
| `tb_cntr_mod10`, `tb_cntr_mod6`, `tb_cntr_mod5` | directed full cycle with the flag at N−1, hold with Enable low (also at the terminal count), Clear, then 3000 random cycles |
| `tb_hex7seg` | all 16 codes against segment lists written as letters |
| `tb_one_sec_pulse` | N_DECADES = 0, 1, 2 side by side. Pulse width one cycle, period 5·10^N, restart after a mid-period Clear |
| `tb_digital_clock` | N_DECADES = 0 (tick every 5 clocks). More than one full hour, every cycle decoded back to MM:SS and compared. Counts each carry, the 59:59 → 00:00 roll-over and a mid-count Clear |
| `tb_digital_clock_full` | default parameters. Two real seconds (100 million clocks) from Clear: 00:00 → 00:01 → 00:02 at the exact cycles. Takes about 1–2 minutes |

## How far to trust it

* Every module passes Verilator lint and the slang front end.
* Every module synthesises with Yosys to registers, adders, multiplexers
  and a 16-entry decode table. There are no latches.
* Each testbench has also been run against a deliberately broken copy of
  its module, and each caught the fault. Example faults: the mod-6 counter
  stopping at 6, and the tick left out of the seconds-tens enable.
* There are three Verilator `UNUSEDSIGNAL` warnings. They cover the
  prescaler's digit values and the minutes-tens flag, which are
  deliberately left unconnected.
* The design has not been run on hardware.
