# DDS look-up-table addressing for an arbitrary waveform generator

An arbitrary waveform generator keeps one period of the wanted signal as samples in a fast memory,
the look-up table (LUT), and plays it through a D/A converter. What decides the generator's
frequency range is how the table is **addressed**. This RTL uses direct digital synthesis (DDS).
The table is read at one fixed sample rate. Each new sample comes from a location a programmable
distance ahead of the last one, so a larger step gives fewer samples per period and a higher output
frequency. The sample clock never changes and the table never has to be rewritten to change the
frequency. That is what makes fine frequency steps and sweeps possible.

```
              cpu_tw                    +----------- 32 -----------+
  CPU ---------------> [delta phase  ]  |                          |
   |  cpu_tw_we        [register (M) ]--+-> (phase adder) --32--> [phase register] --+
   |                                      ^  incr                     |  step       |
   |                          [mode mux]--+---------------------------+             | 12 MSBs
   |  load_run ------------->  load: step = cpu_sample_we, incr = 2^20              v
   |  cpu_sample_we -------->  run : step = fs_en,         incr = M          [LUT 4096 x 12] --> [DAC 12 bit] --> F_OUT
   |  cpu_sample ------------------------------------------------------------>  write (load)     zero-order hold
   +  fs_en (sample clock)
```

## Phase accumulation and the frequency it gives

The heart is a 32-bit **phase accumulator**, which is a phase adder followed by a phase register.
On every sample clock the register takes `phase + M` modulo 2^32. `M` is the **tuning word**,
held in the delta phase register. The 12 most significant phase bits address the 4096-entry table.
The 20 bits below them are a fraction that is never used as an address. They only accumulate, so
over many samples the average step can be any multiple of 1/2^20 of a table location.

One trip of the phase round 2^32 is one output period. Therefore

    F_OUT = M * F_S / 2^32

With a 16 MHz sample clock:

| M | F_OUT | samples per period | table locations per sample |
|---|---|---|---|
| 1 | 3.73 mHz (the frequency resolution over the whole range) | 2^32 | 2^-20 |
| 2^28 = 268435456 | exactly 1 MHz | 16 | 256 |
| 268435254 | 999,999.25 Hz | 16.00001 | 255.9998 |

The upper end is set by how few samples per period are still acceptable, not by the hardware. The
spectrum of a zero-order-hold output has images at `m*F_S ± F_OUT`, and their size depends only on
the number of samples per period. At 16 samples per period a reconstruction low-pass filter after
the converter is still needed. That filter is analog and is not part of this RTL.

When `M` does not divide 2^32, the period is not a whole number of samples. Each sample is then
taken from the location at or just below the exact phase (truncation), and the number of samples
per period alternates. At M = 268435254 it is 16 or 17 samples. This is normal DDS behaviour.

## The two modes: loading the table and generating

A single line, `load_run` (LOAD/#RUN), decides what drives the accumulator. The same accumulator
generates the table addresses for both jobs, so there is no separate address counter.

**Load mode (`load_run = 1`).**
- On the clock where `load_run` rises, the phase is cleared to 0.
- After that, each `cpu_sample_we` pulse writes `cpu_sample` at the current table address. In the
  same clock the phase advances by exactly one table location, 2^20.
- The CPU therefore streams samples 0, 1, 2, ... with no address of its own. A write after location
  4095 wraps to location 0.
- The table output is disabled: `lut_oe = 0`, and the read data is forced to 0. The converter holds
  its last code.
- **Rule:** the CPU must not write a sample in the clock where `load_run` rises. That write would
  land at the address left over from run mode. An assertion in `phase_accumulator` checks this rule.

**Run mode (`load_run = 0`).**
- The phase advances by `M` on every clock where `fs_en` is high.
- Each such clock reads the table, and the converter takes the previous read.
- Sample writes are ignored.

The tuning word can be written at any time, with `cpu_tw_we`/`cpu_tw`.
- A normal sequence writes it during or after loading, then drops `load_run`.
- A write during run mode changes the frequency from the next sample on. The phase is not touched,
  so the output has no phase jump. A sequence of such writes is a frequency sweep.

The load-mode step is deliberately one **table location**, not one phase LSB. The mode mux forces
this increment in load mode. As a result the delta phase register can already hold the run-mode `M`
while the table is being filled.

## Timing

There is one clock, `clk`, which is the reference clock. The sample clock is the enable `fs_en`.
- Tie `fs_en` high to sample at the clock rate, e.g. a 16 MHz reference with `fs_en = 1`.
- Pulse `fs_en` to sample at a fraction of a faster system clock.
- CPU strobes are single-clock pulses, synchronous to `clk`.

A hardware build of this scheme could instead multiplex the accumulator's clock between the CPU
write line and the reference clock. This design keeps a single clock and multiplexes clock enables.

Run-mode pipeline, counted in sample clocks (`fs_en` edges):

| edge k | phase register | LUT read register | converter (`dac_code`) |
|---|---|---|---|
| takes | phase(k-1) + M | table[addr(phase(k-1))] | LUT read register from edge k-1 |

So `dac_code` after edge k+2 is the table word addressed by the phase after edge k. From entering
run mode, the first table-derived code appears at the converter after the second sample clock.
`period_wrap` is high, in the clock before the edge, when that edge's advance passes 2^32.

## Blocks and files

| file | block | what it is |
|---|---|---|
| `rtl/dds_pkg.sv` | – | default sizes (32, 12, 12), 16 MHz reference, `mode_e` (LOAD/RUN) |
| `rtl/dds_top.sv` | top | wires the blocks below; ports for the CPU, the converter and observation |
| `rtl/delta_phase_reg.sv` | delta phase register | holds `M`; loads on `tw_we` |
| `rtl/phase_accumulator.sv` | phase accumulator | mode mux + adder + register, phase clear on entering load mode, wrap flag, load-entry assertion |
| `rtl/mode_mux.sv` | LOAD/#RUN multiplexer | selects the advance strobe and the increment per mode |
| `rtl/phase_adder.sv` | phase adder | `phase + incr` mod 2^N, with a carry out |
| `rtl/phase_register.sv` | phase register | phase, clear, enable; `addr` = top `ADDR_W` bits |
| `rtl/lut_memory.sv` | fast memory (LUT) | 2^12 x 12 array, writes only in load mode, synchronous read in run mode |
| `rtl/dac_model.sv` | D/A converter | **behavioural model**: zero-order hold on `fs_en`, level = code x 2.5 V / 4096 in microvolts |

Top ports:
- `clk` and `rst_n`: the reference clock and an asynchronous active-low reset.
- `fs_en` and `load_run`: the sample clock enable and the mode line.
- `cpu_tw_we`, `cpu_tw`, `cpu_sample_we` and `cpu_sample`: the CPU writes.
- `dac_code` and `dac_vout_uv`: the converter's held code and its output level.
- `phase`, `lut_addr`, `lut_oe`, `phase_step` and `period_wrap`: observation outputs.

## Not in this RTL

These parts are outside the logic and appear only as top ports or not at all:
- the supervising microcomputer;
- its bus decoding and user-interface logic, whose registers are not specified here. The top takes
  two plain write strobes with 32-bit and 12-bit data;
- the 16 MHz crystal oscillator, which is the `clk` input;
- the analog reconstruction low-pass filter;
- the real converter. `dac_model` stands in for it. In hardware `dac_code` would leave the chip.

Frequency modulation and sweeps need only tuning-word writes from the CPU, which the design
accepts at any time. Phase modulation would need a phase-offset adder, which is not built.

A sequential alternative to DDS is not built either. It uses an address counter, or a FIFO
recirculating its own output, clocked by a programmable sample clock.

## Choices this design makes

Several features follow the published description of this generator:
- the block structure;
- the 32-bit accumulator addressing a 12-bit table;
- the 12-bit converter and the 16 MHz reference;
- the load/run behaviour, where the table is written only in load mode and drives the converter
  only in run mode.

The rest are decisions of this RTL:
- **Single clock with enables**, in place of a multiplexed clock.
- **Load-mode increment = one table location (2^20).** A literal increment of 1 would step only
  the phase LSB and would not give successive table addresses.
- **Phase cleared on the rising edge of `load_run`**, so that a load always starts at address 0.
- **Separate strobes for tuning word and samples.** One shared CPU write line would need address
  decoding, which is not specified.
- **Table read synchronous, output 0 when disabled.** This stands in for an asynchronous SRAM with
  tri-stated outputs. It adds one sample of latency.
- **Sample width 12 bits**, equal to the converter resolution.
- **Reset:** all registers reset to 0, so `M = 0` and the output is still. The table array is not
  reset.
- **Converter model:** unipolar, 2.5 V full scale. Its output is an integer in microvolts so that
  the model stays within synthesizable types.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block with values the
testbench computes itself and ends with a `TB_RESULT checks=N failures=M` line:

| testbench | what it checks |
|---|---|
| `tb_phase_adder` | corner cases and 2000 random sums and carries against 64-bit arithmetic |
| `tb_delta_phase_reg` | reset value, load on strobe, hold |
| `tb_phase_register` | load, hold, clear over step, address = top 12 bits |
| `tb_mode_mux` | both modes, random inputs |
| `tb_phase_accumulator` | phase every clock against a reference accumulator: load mode (4106 writes, wrap past 4095, `fs_en` ignored) and run mode with four tuning words and random `fs_en`; wrap count = floor((P0 + nM)/2^32) |
| `tb_lut_memory` | full 4096-word fill, output off while loading, 12k random reads with latency, run-mode writes ignored |
| `tb_dac_model` | hold on `fs_en`, output level |
| `tb_dds_top` | whole design at the default sizes against a cycle model (below) |

`tb_dds_top` runs with no parameter overrides. It carries a model of the whole generator and
compares the phase, address, converter code and level on every clock (about 3.2 million checks).
It goes through these phases:
1. loads all 4096 samples, computed from a formula;
2. runs at M = 268435254, checking 16 or 17 samples between wraps and 249 periods in 4000 samples;
3. runs 20,000 clocks with `fs_en` gaps, ignored table writes and 20 tuning-word changes (a sweep);
4. reloads part of the table;
5. runs at M = 1, checking that the table address steps from 0 to 1 after exactly 2^20 samples.

It counts each of these mechanisms and fails if any of them never happened. It simulates in about
one second.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/dds_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top
    ./obj_dir/Vtb_dds_top

For a block testbench, replace the testbench file and top name; `-Irtl` lets Verilator find
the modules by file name.

## Changing the sizes

`PHASE_W`, `ADDR_W` and `SAMPLE_W` are parameters of `dds_top`, with defaults taken from
`dds_pkg`. They set:
- `PHASE_W`: the frequency resolution, F_S / 2^PHASE_W;
- `ADDR_W`: the table depth, 2^ADDR_W, and the load step, 2^(PHASE_W-ADDR_W);
- `SAMPLE_W`: the sample and converter width.

`ADDR_W` must not exceed `PHASE_W`. The end-to-end testbench takes its sizes from the package, and
its M = 1 phase assumes `PHASE_W - ADDR_W = 20`.
