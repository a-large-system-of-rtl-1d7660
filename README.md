# Zero-suppressing 500 MS/s transient digitizer system

This is synthesizable SystemVerilog for a large system of waveform digitizers.
Each channel samples one photomultiplier signal at 500 MS/s with 8 bits. It
throws away samples that hold only baseline *before* they reach memory. The
system was built for the kaon decay experiment E787 at Brookhaven, to see a
pion stop in a scintillator, decay to a muon and then to an electron. That
needs three things: fine time sampling for early decays, a memory window of
about 10 µs for the muon decay, and little data per event.

The key idea is the data handler chip of each channel, the *Macro-Cell*. It
writes every 4-sample word into a small RAM but moves the RAM address on only
when the word is worth keeping; otherwise the next word overwrites it. A
256-word RAM therefore covers far more than 256 × 8 ns = 2 µs when the signal
is sparse. An 8-bit timer tag stored with every word lets software rebuild the
time of each sample.

The RTL covers everything digital in the system: the Macro-Cell, the channel
memory, the 4-channel board, the crate readout board (TDMASTER) with its
backplane bus, and the six-crate system. The analog parts are not built: the
flash ADC, the threshold DACs and clock fanout. Nor are the processors (the
crate controller and the front-end processor) or the FastBus interface. Their
signals are ports.

## One channel

```
            2 samples / 4 ns                4-sample word / 8 ns
 flash ADC ──────────────────► Macro-Cell ─────────────────────► 12 x (256x4) RAM
 (analog,   adc_pair[1:0]      demux, TIMER,   data, tag, flags      bank A | bank B
  outside)                     zero suppress,  addr_a, addr_b, we
                               address gen
```

* **Input.** The flash ADC hybrid holds a 500 MS/s sample-and-hold and two
  interleaved 250 MS/s converters. It delivers two samples per 250 MHz clock
  (`adc_pair[0]` is the earlier). The whole design runs on this one 250 MHz
  clock.
* **Demultiplexer** (`mc_demux`). It joins two consecutive pairs into one
  4-sample word. `word_stb` is high every second clock and acts as the
  125 MHz clock enable for the rest of the chip.
* **TIMER** (`mc_timer`). An 8-bit counter that advances once per word
  (8 ns), so it wraps every 2.048 µs. Its value is stored with the word as the
  time tag.
* **Memory word** (`td_pkg::td_word_t`, 48 bits). It holds four samples
  (`data[0]` is the earliest), the 8-bit tag and 8 flag bits. The flags mark
  which of up to four summed PMTs fired. The memory is twelve 256 × 4 RAMs in
  two banks of six (`td_memory`). Each bank has its own copy of the address,
  as the board layout needed to halve the load on the address lines. Bank A
  holds samples 0–2. Bank B holds sample 3, the tag and the flags.

## Zero suppression: overwrite unless kept

This is the part that needs the most care.

The RAM write strobe is simply the R/W line, so in write mode (R/W low) every
word slot writes the current word at the current address. After the write,
the address advances only if the word is *kept*. A word is kept when any of
the following is true:

| reason (`keep_why` bit) | condition |
|---|---|
| signal (0) | one of its four samples is above the cut (`THRESH` = 7, so 8 and above) |
| neighbour (1) | the sample just before the word, or the sample just after it, is above the cut, so the edges of a pulse survive |
| overflow (2) | its tag is 255, the value at which the TIMER wraps |
| suppression off (3) | the `en_supp_n` line is high: every word is kept (for testing) |

There is one more rule. On the clock where R/W goes from low (write) to high
(read), the address advances once, unless the last written word was already
kept. This keeps the word written at the moment of the trigger, and writing
stops while R/W is high.

**The look-ahead.** The neighbour rule needs the first sample of the
*following* word. So the Macro-Cell holds each word for one word period. Word
*n* is written on the slot where word *n*+1 has just been assembled. Counting
250 MHz edges from reset release (edge 0 samples pair 0):

```
edge       0    1    2    3    4    5    6    7    8 ...
pairs in   p0   p1   p2   p3   p4   p5   p6   p7   p8
word_stb             W0        W1        W2        W3      (word n = pairs 2n, 2n+1)
RAM write                      W0        W1        W2      (word n written at edge 2n+4)
```

Word *n* carries tag *n* mod 256. Its flags are the OR of the flag inputs at
edges 2n and 2n+1.

**Why the timer-overflow word matters.** The tag is only 8 bits. A kept word
exists for every timer period (the one tagged 255), so software reading the
buffer in order can count wraps: each time the tag goes down, one period of
2.048 µs has passed. With that, the full time of every word can be rebuilt no
matter how sparse the data is. This time extension, and the reordering of the
data, is left to crate-level software. There is no hardware for it.

**Memory depth.** The buffer holds the last 256 *kept* words. If a fraction f
of the words is kept, it spans 2.048 µs / f. A 10 µs window therefore needs
f ≤ 0.2. With no signal at all, one word per timer period is kept, so the span
reaches 524 µs.

**The threshold DAC.** PMT pulses are negative. The ADC sees the pulse on one
input and a DC level from a 12-bit DAC (0.25 mV steps) on the other. The
digital cut stays at 7, and the DAC moves the baseline. This matters: a small
DC shift picked up on the cable can lift the baseline above 7. Every word is
then kept and the data volume explodes. The DAC codes live in the TDMASTER
(`dac_level` ports). `tb_td_system` shows the effect: channels with a −40 mV
shift keep every word until the DAC is corrected by 160 codes.

## Reading out

* **Channel** (`td_channel`). In read mode (R/W high) writing is off. After
  the R/W transition the address points at the oldest location of the
  circular buffer. Each `rd_step` pulse moves it by one, and the word at the
  current address is on `rd_data` combinationally. After 256 steps the address
  is back where it started, so recording can resume.
* **Board** (`td_board`). A board holds four channels. It answers on the
  crate's auxiliary bus when the 5-bit channel number `aux_sel` falls in its
  slot. It then drives the selected channel's word, and zeros otherwise, and
  passes `aux_step` to that channel only.
* **Auxiliary backplane** (`aux_backplane`). It ORs the eight boards onto one
  48-bit bus and raises `bus_err` if two boards answer at once.
* **TDMASTER** (`tdmaster`). `ro_start` is accepted only in read mode. It then
  walks channels 0–31 and, for each, all 256 words, oldest first. Each word
  goes out on a valid/ready port with its channel number (`ro_chan`, the
  "secondary address" under which the crate looks like a single 32-channel
  module) and its position (`ro_index`). The bus word is taken and the channel
  stepped on the same clock. With `ro_ready` high, one word moves per clock:
  a crate (8192 words) reads out in 8193 clocks, 32.8 µs at 250 MHz. The
  original crate took about 100 µs through FastBus. The port here stands in
  for FastBus and does not model its speed.
* **System** (`td_system`, the top). Six crates side by side. Each crate has
  its own R/W line, suppression switch, DAC write port and readout port. All
  ports are arrays indexed `[crate]` or `[crate][channel]`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `td_system` | `N_CRATES` | 6 | crates |
| `td_system`, `td_crate` | `N_BOARDS` | 8 | boards per crate |
| `td_system`, `td_crate`, `td_board` | `CH_PER_BOARD` | 4 | channels per board |
| all from `macro_cell` up | `THRESH` | 7 | a sample above this is signal |
| `td_pkg` | `ADDR_BITS`, `TAG_BITS`, `FLAG_BITS`, `DAC_BITS` | 8, 8, 8, 12 | RAM depth 256, tag, flags, DAC code |

The default system has 192 channels. Reports of the real system give 200
channels in operation and 300 in total, which six crates of 32 cannot hold.
Set `N_CRATES` to 7 or 10 for those sizes.

## Choices made here

The published description gives the Macro-Cell's rules and the system
organisation. The points below are choices made in this RTL where that
description is silent or can be read more than one way. They are the first
things to revisit when matching real hardware.

* **Clocking.** One 250 MHz clock with a one-in-two enable. The chip had a
  differential synchronizing clock and produced its 125 MHz outputs
  internally. R/W and `en_supp_n` are taken to be synchronous to this clock.
  Reset (`rst_n`, asynchronous, active low) clears counters, addresses and
  pipelines, but not the RAMs.
* **Sample order.** The byte the ADC outputs on the rising clock edge is
  taken as the earlier sample.
* **Sample equal to 7.** The cut is "above 7", so a sample of exactly 7 is
  suppressed. The source says both "greater than 7" and "a fixed count of 7".
* **Neighbour rule.** It looks at exactly one sample on each side of the
  word.
* **Overflow and R/W.** The kept overflow word is the one tagged 255. The
  extra advance on entering read mode is skipped when the last word was
  already kept, so no stale location is pulled into the buffer.
* **Flags.** The flag inputs are sampled every clock, OR-ed over the word's
  two clocks, and carried through the Macro-Cell pipeline. Their source is
  not specified.
* **Memory timing.** The RAM model writes on the clock edge with write enable
  and reads combinationally. The real RAMs are asynchronous, and were written
  without a write pulse by keeping address and data in phase. That is a board
  timing matter with no RTL equivalent.
* **Readout.** The read stepping of the address counter, the auxiliary-bus
  signals, the readout order and the valid/ready port are all this design's
  own. No FastBus protocol is implemented.
* **DAC registers.** They reset to 0 and are written one channel per clock.

No timing analysis has been done. The original Macro-Cell was a 2150-gate
current-mode-logic chip running at 250 MHz (up to 400 MHz). Whether this RTL
meets 250 MHz depends on the target technology.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_mc_demux`, `tb_mc_timer`, `tb_mc_zero_suppress`, `tb_mc_addr_gen` | each Macro-Cell part against its rule, including word-strobe timing, timer wrap, every keep reason and both cases of entering read mode |
| `tb_macro_cell` | every RAM write (data, tag, flags, address) against a reference model; the 8 ns write rate |
| `tb_ecl_ram_256x4`, `tb_td_memory` | RAM contents, and that each bank follows its own address |
| `tb_td_channel` | ADC model → channel → readout; a shifted baseline keeps every word until the DAC corrects it |
| `tb_td_board`, `tb_aux_backplane`, `tb_tdmaster` | slot decode, bus OR and collision flag, DAC registers, readout order under back-pressure, one word per clock |
| `tb_td_crate`, `tb_td_system` | one full operation of a crate / of all six crates at default size: record, correct DACs, suppression off for a stretch, read everything out; each word compared with a per-channel reference model |

`tb_memory_depth` tests the memory-depth goal on one channel. An event is a
pion pulse, its muon decay a few tens of ns later and the electron up to 9 µs
after that, on random background pulses, with R/W raised 10.5 µs after the
pion. After readout it rebuilds the absolute time of every word from the tags,
the way crate software does, and checks each word against the input at that
time. At 0.5 MHz background the buffer spans 25 µs. At 10 MHz it spans only
8.4 µs, though the time reconstruction is still exact.

`tb_td_system` runs the default 192-channel system through a whole operation.
It counts each mechanism and fails if one never happens: each keep reason,
dropped words, buffer wrap-around, DAC correction and readout back-pressure.
It also checks the readout time of a crate at full speed.

The reference model in `tb/td_tb_pkg.sv` (`ch_ref`) is written from the timing
table above. The ADC model (`tb/flash_adc_model.sv`, `adc_code`) has 1 V full
scale, 256 codes, and DAC code 2048 as zero offset. The signal source
(`sig_gen`) makes triangular pulses 30 ns wide at the base, sometimes followed
by a smaller second pulse, on a slightly noisy and possibly shifted baseline.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_td_system \
    -y rtl -y tb +libext+.sv rtl/td_pkg.sv tb/td_tb_pkg.sv tb/tb_td_system.sv
./obj_dir/Vtb_td_system
```

Replace the top module and the last file for another testbench. The design
keeps no state that is read before reset, so random initial values do no
harm. RAM locations never written since reset hold random data, and the
testbenches skip them.

## Files

* `rtl/td_pkg.sv`: shared widths and the word type.
* `rtl/mc_demux.sv`, `rtl/mc_timer.sv`, `rtl/mc_zero_suppress.sv`,
  `rtl/mc_addr_gen.sv`, `rtl/macro_cell.sv`: the Macro-Cell.
* `rtl/ecl_ram_256x4.sv`, `rtl/td_memory.sv`: channel memory.
* `rtl/td_channel.sv`, `rtl/td_board.sv`, `rtl/aux_backplane.sv`,
  `rtl/tdmaster.sv`, `rtl/td_crate.sv`, `rtl/td_system.sv`: channel, board,
  crate and system.
* `tb/`: one testbench per module, plus `td_tb_pkg.sv` (reference model,
  signal source, ADC transfer function) and `flash_adc_model.sv`.
