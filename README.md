# Beam position and phase interlock with a circular post-mortem buffer

A linear accelerator needs to stop its beam quickly when the beam goes
wrong, and afterwards someone needs to know *why* it went wrong. This RTL
implements the programmable-logic part of a beam position monitor (BPM)
interlock system that does both:

* It watches 25 state quantities derived from the BPM (beam intensity, phase,
  horizontal and vertical position and transmission efficiency against high
  and low limits for two monitored sets, H1 and H2; ADC saturation on four
  channels; the width of the beam pulse). Any state that trips is latched and
  raises an interlock line to the machine protection system.
* It records every beam sample into a circular block-RAM buffer. When an
  interlock happens, the buffer address is locked, recording continues for
  another half buffer, then stops. The processor (an ARM core on a Zynq
  UltraScale+ MPSoC) then reads a record that is centred on the fault:
  4096 samples before it and 4096 from it on, or 8.192 ms at one sample per
  microsecond.

The interlock states travel to the processor over AXI4-Lite. The buffer
contents travel over an AXI4 burst port.

## Signal flow

```
beam_in ──┬─(test mode: acc_test_source)──► beam
          │
          ▼
   ilk_state_monitor ──live[24:0]──► ilk_status_latch ──► ilk_out (to MPS)
     ├ beam_gate (trigger mode, pulse width)   │ event_o (first trip)
     └ 24 × ilk_channel                        ▼
                                         circ_buf_ctrl ──► irq (record complete)
beam ──to_record()──► circ_buf_mem ◄── we/waddr │ rd_base
                          │ rdata               ▼
                          └──────────► axi4_buf_reader ◄──► AXI4 (ARM, read only)
          axil_regs ◄──► AXI4-Lite (ARM): limits, modes, status, lock address, clear
```

Everything runs on one clock. Beam data arrives as a 352-bit
`beam_sample_t` with a one-cycle `sample_valid` strobe. In the system this
was built for, the strobe comes once per microsecond, so there are many clock
cycles between samples.

| Module | Role |
|---|---|
| `bpm_ilk_pkg` | Shared types: `beam_sample_t`, `ilk_cfg_t`, `rec_t`, trigger and buffer-state enums, interlock bit map. |
| `beam_gate` | Beam-present reference (`beam_en`) chosen by the trigger mode. Also measures the beam pulse width. |
| `ilk_channel` | One high or low limit with the overthreshold-time filter. |
| `ilk_state_monitor` | The 25 live interlock states. |
| `ilk_status_latch` | Sticky latch, interlock output and first-trip event. |
| `circ_buf_ctrl` | Circular-buffer write state machine. |
| `circ_buf_mem` | 8192 × 256-bit simple dual-port RAM. |
| `axi4_buf_reader` | AXI4 read-only slave over the buffer. |
| `axil_regs` | AXI4-Lite register bank. |
| `acc_test_source` | Accumulator test pattern that replaces the beam input in test mode. |
| `bpm_ilk_top` | Connects all of the above. |

## The 25 interlock states

| Bit | State | Armed by the beam reference |
|---|---|---|
| 0–3 | ADC raw value `|raw| ≥ adc_sat`, channels 0–3 | no |
| 4 + 2q | quantity q above its high limit | yes |
| 5 + 2q | quantity q below its low limit | yes |
| 24 | beam pulse longer than `pulse_max` samples | yes |

The quantity index q runs 0–4 for H1 and 5–9 for H2. Within each set the
order is SUM (beam intensity), phase, X, Y, transmission efficiency.
For example, bit 6 is "H1 phase high" and bit 19 is "H2 X low".

All values are signed 16-bit. Limits are compared with strict `>` and `<`.

**Overthreshold time.** A limit violation becomes a state only after it has
held for `over_time` consecutive samples. A value of 0 acts as 1. One
overthreshold time is shared by all 25 states. A sample that does not meet
the condition restarts the count and drops the *live* state. The *latched*
state keeps it until the processor clears it.

**Trigger mode and the beam reference.** The position, phase and intensity
limits mean nothing between beam pulses, so they are only armed while
`beam_en` is high. `beam_en` is chosen by the trigger mode:

| Mode | `beam_en` |
|---|---|
| 0 `TRIG_ALWAYS` | always high (continuous beam) |
| 1 `TRIG_SUM` (reset) | H1 SUM ≥ beam enable level (reset value 200) |
| 2 `TRIG_EXT` | external gate `ext_trig` |
| 3 `TRIG_SUM_EXT` | both |

`beam_en` is combinational from the current sample, so a sample is judged
by its own reference. The pulse width is the number of consecutive samples
with `beam_en` high. The ADC saturation states are not gated: a saturated
ADC is a fault whether or not beam is present.

**Latch and clear.** `latched <= (clear ? 0 : latched) | live`. A state that
is still live during the clear cycle therefore stays latched, so a clear
cannot hide a fault that persists. `ilk_out` is the OR of the latched bits.
`event_o` pulses once, when the latch goes from all-clear to non-zero. Only
that first trip locks the buffer. Later trips are latched too, but they do
not move the lock address.

## The circular buffer

This is the part of the design that needs the closest reading.

The buffer has `DEPTH` = 8192 records and a single write pointer `wr_ptr`.
It moves through three states (`buf_state_e`):

1. **`BUF_WRITE`**: every sample strobe writes `to_record(beam)` at `wr_ptr`
   and advances it, wrapping at 8192. The buffer always holds the last 8192
   samples.
2. **`BUF_POST`**: entered on the interlock event.
   `lock_addr = wr_ptr - 1`, the address of the most recently written record.
   Writing continues until `wr_ptr == lock_addr + POST` (POST = 4096). That
   address is *not* written.
3. **`BUF_DONE`**: writes stop and `irq` goes high. Samples keep arriving
   but are discarded, so the record cannot be overwritten while it is read.
   A clear (CTRL bit 0) returns to `BUF_WRITE`, and writing resumes from
   where the pointer stopped. A clear during `BUF_POST` abandons the record.

At `BUF_DONE` the buffer holds, in address order starting at
`rd_base = lock_addr + POST` (that is, `lock_addr − 4096` modulo 8192):

```
rd_base ........................ lock_addr ....................... rd_base-1
sample t-4096   ...   t-1        sample t      t+1   ...   t+4095
```

Here t is the sample whose evaluation tripped the interlock.

**Which address gets locked.** A sample is written in its strobe cycle.
Its live state registers one cycle later, and the latch and event one cycle
after that. So when the event reaches the controller, the last record
written is the tripping sample's own, provided strobes are at least three
clock cycles apart. At one sample per microsecond that is always the case.
With faster strobes, the lock lands on a later sample.

**Before the buffer has filled.** If an interlock comes less than 4096
samples after reset or after a clear, the oldest records are stale data
from before. No flag marks this.

**Reading.** The AXI4 port addresses the buffer relative to `rd_base`:

```
byte address = record * 32 + word * 4     record 0 = oldest sample, 4096 = interlock sample
word w of a record = {field 2w+1, field 2w}
fields 0..15: H1 X, H1 Y, H1 phase, H1 SUM, H2 X, H2 Y, H2 phase, H2 SUM,
              probe amplitude 0..3, probe phase 0..3
```

INCR bursts of up to 256 beats step through the record. WRAP bursts are
served as INCR. FIXED bursts repeat one word. The data width is 32 bits and
ARSIZE is taken as four bytes. `RRESP` is always OKAY. Each beat costs one
BRAM read cycle plus one cycle on the R channel, so the port delivers one
word per two clocks. Reading the whole record takes 65,536 beats, which is
about 131k cycles.

The port can be read in any state. Only in `BUF_DONE` is the content
guaranteed to be the frozen record.

## Register map (AXI4-Lite, 32-bit, byte offsets)

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] clear (write 1 for a one-cycle pulse; reads 0), [1] test mode, [5:4] trigger mode |
| 0x04 | LATCHED | RO | [24:0] latched states |
| 0x08 | LIVE | RO | [24:0] live states |
| 0x0C | BUFSTAT | RO | [1:0] buffer state (0 write, 1 post, 2 done), [8] `ilk_out` |
| 0x10 | LOCK | RO | locked buffer address |
| 0x14 | RDBASE | RO | address of the oldest record (record 0 on AXI4) |
| 0x18 | BEAMLVL | RW | [15:0] beam enable level, signed, reset 200 |
| 0x1C | OVERTIME | RW | [15:0] overthreshold time in samples, reset 1 |
| 0x20 | PULSEMAX | RW | [15:0] pulse width limit in samples, reset 0xFFFF |
| 0x24 | ADCSAT | RW | [15:0] ADC saturation level, reset 0x7FFF |
| 0x40 + 8q | HI[q] | RW | [15:0] high limit of quantity q, signed, reset 0x7FFF |
| 0x44 + 8q | LO[q] | RW | [15:0] low limit of quantity q, signed, reset 0x8000 |

At reset, no limit state can trip. A full-scale ADC value (±32767 or
−32768) does count as saturation.

Write handshake: AW and W are accepted together in one cycle, and B follows
in the next cycle. WSTRB is honoured on the 16-bit registers. For CTRL, only
byte 0 counts. Unmapped addresses read 0 and ignore writes.

A typical processor sequence is:

1. wait for `irq`;
2. read LATCHED, LOCK and RDBASE;
3. burst-read records 0–8191;
4. write CTRL with bit 0 set, keeping the trigger mode and test bits as
   wanted.

## Test mode

CTRL bit 1 replaces the beam input with `acc_test_source`. This source feeds
both the monitor and the buffer. Field k of each sample carries `count + k`,
where `count` advances by one on every strobe and restarts at 0 when the
test mode is switched on. A limit on one field trips the interlock at a
predictable count. In a correct record, consecutive records then differ by
exactly one, so any lost or reordered sample shows up.

## Sizes

| Parameter | Default | Where |
|---|---|---|
| `DEPTH` | 8192 records | `bpm_ilk_top`, `circ_buf_ctrl`, `circ_buf_mem`, `axi4_buf_reader` |
| `POST` | 4096 records written from the interlock on (including it) | `bpm_ilk_top`, `circ_buf_ctrl` |
| `ID_W` | 4 (AXI4 ID width) | `bpm_ilk_top`, `axi4_buf_reader` |
| `N_ILK` | 25 | `bpm_ilk_pkg` |

`DEPTH` must be a power of two, and `POST` must be between 2 and `DEPTH`.
The buffer is 2 Mbit of block RAM (8192 × 256 bits). After synthesis the
rest of the design is roughly 800 word-level cells and 970 flip-flops.

## What follows the original design and what is this implementation's own

Taken from the original design:

* the 25 latched states;
* the list of monitored quantities (ADC saturation, then intensity, phase,
  X, Y and transmission efficiency high/low for H1 and H2);
* the overthreshold time;
* a trigger mode with a beam-enable level of 200;
* the circular buffer's five-step write / lock / post-write / read / clear
  sequence with its 4096 offsets, and 8.192 ms of data;
* the stored quantities: position, intensity, phase, and the amplitude and
  phase of four probes;
* AXI4-Lite for the states and AXI4 for the data;
* an accumulator as test data.

Chosen here, because the original gives no detail:

* all widths (16-bit signed values, 256-bit records, 32-bit buses);
* the meaning of the four trigger modes and the `≥` comparison with the
  beam-enable level;
* the 25th state as the beam pulse width (the original names the pulse
  width as a monitored quantity);
* the bit order of the states;
* one shared overthreshold time;
* the clear rule (a live state survives a clear);
* the exact cycle at which the address is locked;
* the register and AXI4 address maps and reset values;
* the AXI4 port being read-only with at most one word per two cycles;
* the accumulator's `count + k` pattern;
* a single clock.

Not part of this RTL:

* the pick-ups, ADCs and BPM signal processing that produce `beam_in`;
* the ARM processor, its software and the network user interface;
* the machine protection system that receives `ilk_out`;
* storage in DDR memory instead of block RAM, which was planned as a later
  extension.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against a reference model written independently in the testbench, ends with
a `TB_RESULT checks=… failures=…` line, and has a watchdog.

| Testbench | What it exercises |
|---|---|
| `tb_ilk_channel` | random values, limits and overthreshold times; filtered and tripped cases |
| `tb_beam_gate` | all four trigger modes; pulse width and long-pulse flag |
| `tb_ilk_state_monitor` | all 25 states against a bit-map model; each state must trip at least once |
| `tb_ilk_status_latch` | sticky bits, clear rule, first-trip event |
| `tb_circ_buf_ctrl` | 12 lock/post/done/clear rounds at DEPTH 64, POST 32: lock address, exactly POST−1 post writes, writes stop, events ignored while locked, early clear |
| `tb_circ_buf_mem` | full 8192-record write/read-back with held read data |
| `tb_axi4_buf_reader` | 300 random INCR/WRAP/FIXED bursts with back-pressure; data, RID, RLAST, beat count |
| `tb_axil_regs` | reset values, every register, WSTRB, clear pulse, status read-back |
| `tb_acc_test_source` | the `count + k` pattern and restart |
| `tb_bpm_ilk_top` | end to end at full size (8192/4096), described below |
| `tb_sine_record` | a sine wave on phase and probe amplitudes trips the interlock; all 8192 records are read back and compared with the sine samples they must hold |

`tb_bpm_ilk_top` runs the following, in order:

* buffer wrap-around;
* a 2-sample excursion filtered by an overthreshold time of 3, then a
  3-sample excursion that trips;
* hold after the fault ends, and a second fault that does not move the lock;
* exactly 4095 post-interlock writes;
* the whole record read over AXI4 with back-pressure while samples keep
  arriving;
* a trip on a low limit that stays gated off until SUM reaches the
  beam-enable level;
* ADC saturation, an over-long pulse, and the external trigger mode;
* the accumulator test mode.

It counts each of these mechanisms and fails if any never happened.

Limits of this verification:

* everything is simulation with a two-state simulator;
* the design has not been run on hardware;
* there are no timing constraints, and no timing closure was done;
* there is no clock-domain crossing, because the design assumes one clock.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_bpm_ilk_top rtl/bpm_ilk_pkg.sv tb/tb_bpm_ilk_top.sv
./obj_dir/Vtb_bpm_ilk_top
```

Replace `tb_bpm_ilk_top` with any other testbench name. The package file
must come first. The full-size top testbench simulates in about ten seconds.
For a lint-only pass on the synthesizable code:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bpm_ilk_pkg.sv rtl/bpm_ilk_top.sv
```

The remaining lint warnings are unused signals and parameters. They are
`ARSIZE` and the low address bits, which are ignored by design, and the
pulse width count, which is not read by the top.
