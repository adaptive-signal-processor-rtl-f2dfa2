# Adaptive Signal Processor: digital core in SystemVerilog

An adaptive linear combiner forms an output `y = Σ wᵢ·xᵢ` from n input
signals. It adjusts the weights so that `y` tracks a desired signal `d`, which
minimises the error `e = d − y` in the mean-square sense. The Widrow–Hoff LMS
rule updates every weight on every adapt cycle by `2μ·e·xᵢ`. That needs one
multiplication per weight. The *clipped* LMS rule replaces `xᵢ` by its sign:

    wᵢ ← wᵢ + μ·e·sgn(xᵢ)

The update is then a single add or subtract per weight, and the only number
measured per cycle is the error.

The Adaptive Signal Processor (ASP), a SLAC design by H. V. Walz, is a hybrid
machine built around this rule:

* The products `wᵢ·xᵢ` and the sum `y` are analog. Each weight drives an
  8-bit multiplying DAC, and a comparator gives the sign of each input.
* The weights are held and updated digitally with 16-bit arithmetic. Eight
  identical microprogrammed *weight processors* (WP) each serve 8 channels,
  so one system has 64 weights.
* A single *error digitizer* (ED) measures `μ·e` with a 12-bit ADC and
  broadcasts the result to all weight processors at once. All 8 WPs update
  their channels in parallel, so one adapt cycle for 64 weights takes 8 µs:
  32 instructions of 250 ns, or 125 ns per weight.
* A *test controller* (TC) makes the clock phases and downloads the
  microprograms. It also runs a small adapt sequencer that keeps the WPs and
  the ED in lockstep over a shared bus, the *dataway*.

This repository holds the digital part of that system as synthesizable
SystemVerilog. It also holds a microprogram and sequencer program written for
it, and a testbench per module. The analog parts (multipliers, amplifiers,
filters, sample-and-hold, ADC comparator) are not RTL. They appear as ports
on the top level, and the system testbench replaces them with a behavioural
model.

## Module map

```
asp_top
├── test_controller
│   ├── tc_timing_gen       T1..T4 clock phases, RUN / SINGLE CYCLE / SINGLE STEP
│   ├── tc_loader           4 pages × 256 words × 29 bits download memory
│   ├── tc_sequencer        2 pages × 16 words × 16 bits adapt sequencer
│   └── tc_led_display      32-bit status display register
├── weight_processor × N_WP (default 8, addresses 2..9)
│   ├── wp_control          PRAM 64×16, PC, AC, SC, instruction and dataway decode
│   ├── wp_datapath         A, B, C, F registers, DRAM 16×16
│   │   └── wp_alu          16-bit ALU with function table and saturation
│   └── wp_weight_section   8 DAC holding registers, sign register
└── error_digitizer (address 1)
    └── ed_sar_adc          12-bit successive-approximation control
```

`asp_pkg` holds the shared types and constants: the instruction encodings,
the OP codes, the dataway control struct and the DRAM map.
`asp_program_pkg` holds the built-in programs as functions:

* `loader_word` gives the loader ROM contents.
* `seq_program` gives the sequencer PROM contents.
* `wp_program` gives the weight processor microprogram that the loader
  downloads.

The two memories are filled from these functions at elaboration, so the
programs synthesize as ROM contents. Their content is described below.

**Bit numbering.** The design follows the original convention of numbering
bits from the MSB: D0 is the most significant bit of a 16-bit word. In the RTL,
document-style bit Dk of a 16-bit word is `[15-k]`.

## Timing: one instruction = five master clocks

Everything runs on a single 20 MHz master clock (50 ns). `tc_timing_gen`
divides each 250 ns instruction cycle into five slots:

| slot | 0 | 1 | 2 | 3 | 4 |
|------|---|---|---|---|---|
| phase line | T1 | T2 | T3 | T4 | (idle) |

The four phase lines come from the original design. The fifth, idle slot is
this implementation's way to reconcile four 50 ns phases with a 250 ns
instruction period. The generator also gives a one-clock strobe `tstb[k]` at
each phase, and the modules use two of them:

* **T4 commits.** Every programmable register in the system updates on the T4
  strobe (`commit`). Between commits, the dataway lines and the selected
  microinstruction are stable and combinational.
* **T2 samples the signs.** The sign discriminators are sampled on T2, so the
  sign word read in the same instruction is stable.

Three clock modes are available:

| mode | behaviour |
|------|-----------|
| `CLK_RUN` | runs continuously |
| `CLK_SINGLE_CYCLE` | each button press runs one full cycle of five slots, then stops on T1 |
| `CLK_SINGLE_STEP` | each button press advances one slot, so the phases can be followed one master clock at a time |

The button is synchronised and edge-detected inside the generator.

## The dataway

All modules share the following lines (`dw_ctrl_t` plus the data bus):

| lines | width | use |
|-------|-------|-----|
| data | 16 | bidirectional data: program words, PC values, weights, ADC results |
| OP | 4 | input/output instruction (IOI) |
| address | 5 | module address |
| ADEN | 1 | address enable: 0 = only the module whose address matches decodes OP; 1 = broadcast to all modules |
| CPEN | 1 | clock enable for the WP microprograms: a WP executes its current microinstruction only in cycles with CPEN = 1 |

In the RTL, the data bus is the OR of every driver's `sysbus_out` gated by its
`sysbus_oe`. An assertion in `asp_top` checks that at most one module drives
at a time. The manual switch register is the one allowed exception, because
an operator may force data while a module is being read.

OP codes (addressed = ADEN 0, broadcast = ADEN 1):

| code | WP, addressed | ED, addressed | broadcast |
|------|---------------|---------------|-----------|
| 1 | MDI: data into WP internal bus | LNW: load null weight | |
| 2 | MDO: WP internal bus onto data bus | LμW: load μ weight | |
| 3 | MDI-SPD-IPC: write PRAM, PC+1 | LCW: load control word | |
| 4 | LPC: PC ← internal bus | RAR: read ADC register | |
| 5 | IPC | SCA: start convert | |
| 6 | MDI-LPC: PC ← data bus | | |
| 10 | | | RAR-MDI: ED drives its ADC result and every WP takes it in |
| 11 | | | MDI-SPD-IPC |
| 12 | | | IPC |
| 13 | | | MDI-LPC |
| 14 | | | MDI |

Code 0 and unused codes are no-ops. Broadcast RAR-MDI is the heart of the
parallel update: in a single cycle the error reaches all 64 weights.

## Weight processor

### Microinstruction formats

The PRAM holds 64 words of 16 bits. The PC has 8 bits, used as follows:

* PC bit 7 is unused.
* **PC bit 6 is the run bit.** With PC[6] = 0, decoding is disabled, and each
  MDI-SPD-IPC writes the data word into `PRAM[PC[5:0]]` and increments the PC.
  This is how microprograms are downloaded.
* Setting PC to `40h + n` starts execution at word n. Setting it to `00h`
  stops the processor.

Normal word (D0 = MSB):

| D0–D3 | D4–D7 | D8–D11 | D12–D15 |
|-------|-------|--------|---------|
| 4-bit data | ACI | PCI | DTI |

Jump word: D0–D7 hold the 8-bit reference address, followed by PCI and DTI.
A word is in jump format when its PCI is LPC or ISC-LPC. Its ACI is then
taken as NOP.

| code | ACI (arithmetic control) | PCI (program control) | DTI (data transfer) |
|------|--------------------------|-----------------------|---------------------|
| 0 | NOP | NOP (PC holds) | NOP |
| 1 | LAR: A ← DRAM[AC] | LPC: PC ← reference | SMD: DRAM[AC] ← bus |
| 2 | PAR: ALU presents A | IPC | MMD: bus ← DRAM[AC] |
| 3 | LBR: B ← bus | LAC-IPC: AC ← data | MAD: bus ← ALU |
| 4 | CBR: B ← 0 | IAC | MSR: bus ← sign register |
| 5 | LCR: C ← bus D0–D7 | LSC-IPC: SC ← data | MPD: bus ← data field |
| 6 | SCR: shift C toward D0 | ISC | BUSY: report "not busy" |
| 7 | LFR: F ← data | IPC-IAC | MAD-SMD |
| 8 | CFR: F ← 0 | ISC-LPC | MSR-SMD |

The step counter SC provides loops:

* **ISC** increments SC and repeats the same word until SC reaches its
  terminal count (15), then advances.
* **ISC-LPC** jumps to the reference address unless SC is at terminal count,
  in which case it falls through.

When a dataway PC operation (LPC, IPC, MDI-LPC, SPD) and a microinstruction
land in the same cycle, the dataway operation wins the PC.

### Internal bus and busy

Each WP has a 16-bit internal bus. Its source in a cycle is chosen in this
order:

1. The system bus, on MDI.
2. The DTI source: sign register, ALU output or data field.
3. Otherwise, the DRAM word at AC.

MDO puts the internal bus on the system bus, which makes any DRAM word
readable through the manual switch register.

The WP busy line is high while the processor executes any word whose DTI is
not BUSY. The sequencer uses this line to wait for all WPs to finish.

### ALU

The original hardware selects ALU functions through a PROM addressed by the
4-bit F register and the MSB of the 8-bit C register. That PROM's contents are
not published, so this design defines its own table:

| F | function |
|---|----------|
| 0 | **signum step**: C MSB = 1 → A + B, else A − B |
| 1 | A + B |
| 2 | A − B |
| 3 | B − A |
| 4 | A |
| 5 | B |
| 6 | A AND B |
| 7 | A OR B |
| 8 | A XOR B |
| other | A |

Add and subtract work on 2's-complement numbers. On overflow, the output is
replaced by `7FFFh` or `8000h`, and the +OF or −OF flag is raised. The flags
reach the test controller only when an ALU result is moved (MAD or MAD-SMD).

### Weights and signs

DRAM words 2..9 hold weights W1..W8 as 16-bit 2's-complement numbers. Only
the top byte drives the analog side. Any store to DRAM word 2+k also loads DAC
holding register k with D0–D7 of the stored value, sign bit inverted (8-bit
offset binary, `80h` = zero weight).

The sign register reads the eight sign discriminators as one byte:

* D0 is channel W1 and D7 is channel W8.
* A 1 means the channel's input is positive.

## The adapt program

The loader image carries a microprogram written for this design. It is the
same for every WP, because all WPs run it in lockstep.

| PRAM | action |
|------|--------|
| 00–0A | F ← 0 (signum), AC ← 0; then store 10 broadcast data words into DRAM 0–9 (initial sign, error and weights) |
| 0B | entry: AC ← 0, not busy |
| 0C | sign register → C and DRAM 0 |
| 0D | error from the dataway (RAR-MDI) → B and DRAM 1 |
| 0E, 0F | A ← W1; W1 ← signum(A, B) |
| 10–24 | 7 × {shift C; A ← Wk; Wk ← signum(A, B)} |
| 25 | AC ← 0, not busy |
| 26 | jump to 0C |

DRAM word 1 holds μ·e as a sign-extended 12-bit number. The weight is the top
byte of a 16-bit word. One error LSB therefore moves a weight by 1/256 of a DAC
step, which gives the update a fine resolution below the DAC's 8 bits.

### Lockstep with the sequencer

A WP only advances in cycles with CPEN = 1, so the sequencer paces the program
word by word. Each pass of sequencer page 0 has five steps:

| seq step | dataway | WP PRAM | cycles |
|----------|---------|---------|--------|
| SCA (ED, CPEN) | start ADC conversion | 0C: latch sign word | 1 |
| wait ADC busy | idle | held (CPEN = 0) | about 5 |
| RAR-MDI broadcast (CPEN) | error onto data bus | 0D: B ← error | 1 |
| wait WP busy (CPEN) | idle | 0E..25: 8 weight updates | 24 |
| CPEN | idle | 26: jump to 0C | 1 |

A pass is 32 instructions, 8 µs. The ADC conversion overlaps the sampling of
the signs. Word 0 of the page loads the μ weight from the manual switch data
register (DATOUT). The 16-word page holds three passes and then retriggers.

## Error digitizer

The ED's digital side holds three registers, each loaded from the data bus on
its OP code:

| register | width | bits loaded | format |
|----------|-------|-------------|--------|
| null weight | 12 bits | D0–D11 | offset binary; drives a DAC that cancels DC offset |
| μ weight | 10 bits | D2–D11 | unipolar; scales the error before sampling |
| control word | 12 bits | D0–D11 | see below |

Control word bits D0 and D1 ground the two desired-signal inputs, for offset
measurement. D2 enables resolution control. D3 is unused, and D4–D11 are
reserved.

SCA starts `ed_sar_adc`. The conversion works as follows:

1. The sample-and-hold goes into hold.
2. The SAR tries one bit per `CLKS_PER_BIT` master clocks, MSB first. The
   default is 2 clocks, so 12 bits take 24 clocks = 1.2 µs, about five
   instructions.
3. The analog comparator answers each trial.
4. When the last bit is decided, the result is stored in a holding register
   as 2's complement (the trial code is offset binary, so its MSB is
   inverted).

ADC busy is high during the conversion. RAR or broadcast RAR-MDI drives the
result right-justified and sign-extended to 16 bits.

## Test controller

**Loader.** The loader ROM holds 1024 words of 29 bits, in four pages of 256.
Each word packs:

| bits | field |
|------|-------|
| [28:13] | data |
| [12:8] | address |
| [7] | ADEN |
| [6] | CPEN |
| [5] | unused |
| [4:1] | OP |
| [0] | DLS (download stop) |

A start edge with loader mode enabled plays the selected page onto the
dataway, one word per instruction cycle. It stops after the word with DLS set.
Page 0 of the supplied image holds 58 words:

1. Broadcast MDI-LPC 00 to stop all WPs.
2. Broadcast SPD of the 39-word microprogram.
3. MDI-LPC 40 to run the initialisation, with 10 data words for DRAM 0–9.
4. LPC 00 to stop again.
5. Loads of the null weight (`8000h`), μ (`200h` in D2–D11) and the control
   word (0) into the ED.
6. MDI-LPC 4B to park every WP at its entry point.
7. DLS.

The other pages are empty.

**Sequencer.** The sequencer PROM holds two pages of 16 words of 16 bits:

| bits | field |
|------|-------|
| [15:11] | address |
| [10] | ADEN |
| [9] | CPEN |
| [8] | ABUSY |
| [7:4] | OP |
| [3] | WPBI |
| [2] | ADCBI |
| [1] | DATIN |
| [0] | DATOUT |

A word with WPBI = 0 or ADCBI = 0 waits while WP busy or ADC busy is high. A
set inhibit bit disables that wait. DATOUT drives the manual data switches
onto the bus. DATIN captures the bus into the controller's read register.

After word 15, the sequencer waits for the next trigger. The trigger is
either the external trigger input or an internal retrigger after 0 or
2⁴…2¹¹ instruction periods (`seq_rate` 0 or 1..8). With no wait, the
sequencer runs continuously. Page 1 of the supplied image converts once and
reads the ADC with DATIN, as a test of the ED.

**Dataway master.** The dataway master is chosen in this order: loader,
sequencer, manual switch register (11 control + 16 data = 27 switches), then
idle. The manual register drives its instruction in every cycle while it is
enabled. To execute a single bus instruction, switch the clock to SINGLE
CYCLE and press the button once.

**LED register.** The 32-bit LED register shows, from bit 31 down:

* data bus (16 bits)
* OP (4 bits)
* address (5 bits)
* ADEN, CPEN
* ABUSY, WP busy, ADC busy
* +OF, −OF

In track mode it loads every clock. In strobe mode it loads on any
combination of the T1..T4 strobes selected by `led_phase_sel`.

## What is analog and not included

These parts have no digital function and are not provided as RTL:

* multiplying weight DACs, four-quadrant multipliers, sign discriminators and
  summing amplifiers
* the ED's summing, reference, difference and low-pass amplifiers, null and μ
  DACs, sample-and-hold and comparator
* the 16-channel filter array
* the crystal oscillator

`asp_top` brings out their digital interfaces:

* `wp_disc_in`: sign discriminator outputs
* `wp_dac_code`: weight DAC codes
* `ed_null_weight`, `ed_mu_weight`, `ed_ctrl_word`: ED DAC codes and control
  word
* `ed_adc_hold`, `ed_adc_trial`, `ed_adc_comp`: sample-and-hold and ADC
  comparator

`tb/asp_analog_model.sv` closes this loop for simulation with real
arithmetic:

* Weight = (code − 128)/128.
* e = d − y − null.
* The ADC is ±5 V.

## Departures and choices

The original design does not publish these details, so this implementation
chooses them:

* The idle fifth clock slot.
* T4 commit for every register.
* The wired-OR bus.
* The module addresses of the WPs.
* The field order inside the loader word.
* The ALU function table.
* The LED line map.
* The SAR bit time.
* The DRAM map and the microprogram. The original program is similar in
  structure but not identical. This one advances AC on the store step rather
  than on the load step.
* The reading of two dataway operations:
  * IOI LPC loads the PC from the WP's internal bus.
  * MDI-LPC loads it from the data bus.

The parts that follow the original are:

* The instruction set and encodings.
* The word formats of the microinstructions, ED registers, loader and
  sequencer.
* The memory sizes: PRAM 64×16, DRAM 16×16, loader 4×256×29, sequencer
  2×16×16.
* The 250 ns instruction, 8 µs adapt pass and 12-bit ADC.
* The retrigger choices.
* The clock modes.

The ADC result is always read right-justified. The alternative connections
of the ADC's top bits used in some experiments (MSB-justified or nonlinearly
weighted) are not built, because their wiring is not specified. The control
word's resolution bits are stored but drive nothing.

The hoped-for 4 µs adapt cycle and systems beyond 64 channels (`N_WP` > 8)
are not shown to work.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asp_pkg.sv rtl/asp_program_pkg.sv \
          tb/tb_asp_top.sv --top-module tb_asp_top -Mdir obj_asp_top -o sim
./obj_asp_top/sim
```

Run the simulation from the repository root: the loader and sequencer unit
testbenches read small test images, `tb/tb_loader_test.hex` and
`tb/tb_seq_test.hex`, by relative path.

Each block has its own testbench: `tb_<module>`. `tb_asp_top` runs the whole
system at its default size (8 WPs, 64 channels) against the analog model,
with a mixed-sign set of inputs:

* It downloads page 0 and runs the adapt sequencer.
* It checks that the error settles and that every DAC code mirrors its DRAM
  weight.
* It checks that an adapt pass is exactly 32 instruction cycles.
* It drives weights into positive and negative saturation.
* It reads the ADC through page 1 (DATIN).
* It exercises the internal retrigger and the external trigger.
* It steps through SINGLE CYCLE and SINGLE STEP modes.
* It reads a DRAM word with MDO from the manual switch register.

The testbench counts each of these mechanisms and fails if any never
happened. It completes in well under a minute. `tb_asp_workloads` (below) takes about 10 s.

## Experiments

`tb_asp_workloads` runs the classic bench experiments for this processor on
the full 64-channel system, with the analog model. Each experiment starts
from a fresh download, with all weights at zero, and adapts continuously.
The table lists the results.

| experiment | set-up | result |
|------------|--------|--------|
| step response | 8 DC channels; desired input steps to +5 V, then to −5 V; μ = 0.25 | error within 5 % after 143 and 169 passes (1.1 to 1.4 ms); settles at 16 mV RMS |
| waveform synthesis | 8 DC channels at ±5 V; 2 V sine desired | 1 kHz, μ = 0.5: error 21 % of the sine. 4 kHz, full μ: 41 %. Both are the lag of an 8 µs adapt cycle |
| dual bandpass | sine and cosine references at 400 Hz and 1.2 kHz, plus a DC bias (5 weights); primary = both tones + offset + noise | tones cut from 1.4 V to 24 mV RMS; the error is left with the noise |
| single bandpass | one tone (3 weights) | 1.3 V to 18 mV RMS |
| square-wave filtering | 400 Hz square wave through 16 low-pass channels; desired = phase-shifted sine | RMS error 150 mV of 1.41 V |
| wideband filtering | 750 Hz triangle through 24 low-pass channels; primary = 5 Vpp triangle in 10 Vpp noise; μ = 0.015 | weight sum recovers the triangle to within 385 mV RMS of its 1.44 V RMS |

In the last two rows, the filter array is stood in for by first-order
low-pass filters with cutoffs spaced logarithmically from 50 Hz to 20 kHz.
These experiments check the digital design only through a simplified analog
model. They say nothing about analog noise, offsets or bandwidth.

## Changing the programs

The programs are edited in `asp_program_pkg`. Helper functions build each
word from the field layouts and code tables above:

* `mi`, `mj`: a normal or jump microinstruction, `{data, aci, pci, dti}` or
  `{ref, pci, dti}`.
* `lw`: a loader word, `{data, addr, aden, cpen, 0, op, dls}`.
* `sw`: a sequencer word, `{addr, aden, cpen, abusy, op, wpbi, adcbi, datin,
  datout}`.

To load an image from a file instead, set `INIT_FILE` on `tc_loader` or
`tc_sequencer`. The file is read with `$readmemh`, one word per line; for the
loader, page p starts at line 256·p.

A new microprogram is loaded by broadcasting MDI-LPC 00 and then one
MDI-SPD-IPC per word. It is started with MDI-LPC 40h + entry.
