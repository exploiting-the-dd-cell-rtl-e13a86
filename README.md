# One DD-cell array as both PUF and TRNG

A DD-cell (delay-difference cell) is a tiny loop of two latches and two
inverters. Released from reset, it oscillates for a while and then locks into
a state decided by which of its two branches is slower. That one fact gives two
security primitives from the same 128 cells. The only difference is **when** the
cells are sampled:

* **Sampled late** (long excitation): every cell has settled to the sign of its
  own manufacturing mismatch. The 128-bit word is stable on one chip and
  different on every other chip. It is a **PUF** (physical unclonable function)
  fingerprint.
* **Sampled early** (short excitation): the cells are still oscillating, and the
  sampled bit depends on accumulated jitter. It is **random**. XOR-combining
  groups of cells removes the bias and gives a **TRNG** (true random number
  generator) stream.

This repository holds SystemVerilog for the complete system:
* a behavioural model of the cell array;
* the excitation sequencer that races the cells for a programmable number of
  450 MHz clock cycles (NCLK);
* the XOR combiner, byte packer and FIFO of the TRNG path;
* the control FSM that switches the array between its two uses;
* an SPI target through which a host sets the parameters, asks for PUF
  responses and reads random bytes.

## The DD-cell and how it is modelled

```
            S (gate of both latches), R (reset of both latches)
     +--> IV1 --> L1 --> IV2 --> L2 --+--> q
     |                                |
     +--------------------------------+
```

| R | S | phase | what the cell does |
|---|---|-------|--------------------|
| 1 | 0 | reset | both latch outputs are forced low |
| 0 | 1 | start | latches open; the loop oscillates |
| 0 | 0 | sample | latches close and hold the current value |

While the loop oscillates, the two half-periods are not equal. One branch is
slower by dT, the delay difference of the inverter-plus-latch paths including
their routing. Every period shifts the duty cycle by dT/T (T is the loop
period), so in period M:

    DC(M) = 1/2 + M * dT / T

Once DC reaches 0 or 1, the oscillation dies and the cell holds
q = (dT > 0). dT has two parts:
* a static part from process mismatch and routing, which is the PUF secret;
* a small random part, the jitter of that particular run.

The TRNG works because the random part builds up over M periods. The PUF works
because the static part wins in the end.

An FPGA cell is a race between routing delays. It cannot be written as
synthesizable zero-delay logic, so `dd_cell` is a **behavioural model** with
real-valued delays (`timescale 1ps/1fs`). When simulation starts, each instance
draws its static mismatch from its own seeded generator. Each race then adds:
* a run-to-run draw of dT, held for the whole race, so the duty-cycle spread
  grows linearly with M;
* white jitter on every period length, so the phase of the oscillation at the
  sampling instant is random.

The model's numbers are:

| parameter | value | role |
|-----------|-------|------|
| `T_OSC_PS` | 1000 | loop period |
| `MISMATCH_SIGMA_PS` | 25 | static mismatch spread, chip to chip and cell to cell |
| `JITTER_PS` | 1.5 | run-to-run spread of dT |
| `PERIOD_JITTER_PS` | 60 | white jitter per period |
| `DT_NOM_PS` | -1, +1, +5, -2 | routing mismatch of the four cells of a macro |

All of these values are estimates chosen for this design, not measurements.
They were picked so that:
* the cells settle within tens of clock cycles;
* a PUF response repeats to within a few per cent;
* responses of different chips differ in about half their bits.

The `DT_NOM_PS` values are the routing-delay mismatches of the hand-placed
4-cell macro (one CLB, two Slices). Which branch of each pair is the slower one
was not known, so the signs are chosen.

`dd_macro4` groups four cells that share R and S. `dd_array` holds 32 macros,
which makes 128 cells. Its `DEVICE_SEED` parameter stands for the piece of
silicon: the same seed is the same chip, and a different seed is another chip.

What the model reproduces, as measured by the testbenches in `tb/`:

| quantity | model |
|----------|-------|
| PUF inter-chip distance (32 chips, NCLK 1152) | about 50 % |
| PUF intra-chip distance (10 evaluations per chip) | about 3 % |
| intra distance vs NCLK | under 10 % at NCLK 1, peaks at 30-40 % around NCLK 2-6, about 15 % at NCLK 16, about 3 % at NCLK 1152 |
| bias at NCLK 16 | within 0.05 of 1/2 |

The physical design was reported to have:
* an intra-chip distance of about 1.7 %;
* an inter-chip distance of about 49.5 %;
* an optimum TRNG sampling time of 17 ± 3 cycles.

The model's random zone starts earlier than that. It shows the mechanism, not
the exact silicon figures.

## Excitation timing (`dd_excite`)

One excitation is a fixed sequence on the 450 MHz clock (one cycle = 2.22 ns):

```
cycle:   0        1 .. NCLK        NCLK+1      NCLK+2 (= next 0)
R        1        0                0           1
S        0        1                0           0
                                   hold        sample registered, next reset
```

* The sequence takes NCLK+2 cycles.
* R and S are register outputs and are never high together. An assertion
  checks this.
* `run` repeats the excitation back to back.
* `start` runs it once.
* NCLK is read when the start phase begins, so it can change between
  excitations.
* NCLK = 0 counts as 1.

The sequencer waits in the reset phase for `ready` from the consumer. This is
the only back-pressure in the design: a full FIFO stops the cells instead of
losing samples. The sequencer goes back to idle if its request is withdrawn
while it waits.

The NCLK defaults:
* **PUF: 1152.** This is 128 periods of a 50 MHz clock, expressed in 450 MHz
  cycles. It is long enough for virtually every cell to settle.
* **TRNG: 16**, the measured optimum of the reference board.

NCLK is 12 bits wide, so it reaches 4095 cycles (9.1 µs). That covers the whole
2.22 ns to 5.1 µs range over which the cells were characterised.

## TRNG path: XOR combining, packing, FIFO

`xor_combiner` folds the 128-bit sample in half `rounds` times (0 to 7). Bit i
becomes bit i XOR bit i+L/2, where L is the current length. After r rounds:
* every output bit is the parity of 2^r cells;
* there are 128 >> r output bits.

The default is 4 rounds: 8 bits per excitation, each the XOR of 16 cells. Four
rounds is the smallest depth at which the reference board passed the
statistical tests. Across boards, up to 7 rounds were needed.

Pairing cells L/2 apart makes every XOR mix cells from different macros. This
pairing is a choice of this design.

`trng_packer` concatenates the variable-width samples and emits bytes, LSB
first. Its `in_ready` is a start permission, not a per-cycle handshake. The
sequencer checks it before starting a race whose sample arrives NCLK+1 cycles
later, so the staging register has room for two samples plus a partial byte.

`sync_fifo` is a 128-byte first-word-fall-through FIFO, which holds 1024 bits:
exactly one restart-test sequence.

**Throughput.** The published throughput of this architecture counts only the S-high time:

    TP = 128 · 450 MHz / (NCLK · 2^rounds) = 225 Mbit/s

This design also spends one reset cycle and one hold cycle per excitation:

    TP = 128 · 450 MHz / ((NCLK + 2) · 2^rounds) = 200 Mbit/s   (NCLK 16, 4 rounds)

The end-to-end testbench measures the 18-cycle excitation period. Reaching
225 Mbit/s would require overlapping the reset of one excitation with the end
of the previous one, which this design does not do.

## Mode switch (`puf_trng_ctrl`)

The array is shared by the two uses, so the control FSM owns it:

* While the TRNG is on, `run` is held and every sample goes into the TRNG path.
* A PUF request drops `run`. The excitation in flight finishes, and its sample
  still goes to the TRNG path.
* The FSM then starts one excitation with the PUF NCLK. `ready` is forced high
  for it, so a full FIFO cannot block a PUF read.
* The raw 128 bits of that excitation are stored as the response and are never
  fed to the TRNG path.
* TRNG running resumes by itself afterwards.

## Host protocol (`spi_slave`, `puf_trng_ctrl`)

The SPI link runs in mode 0 (sample on the rising SCK edge), MSB first, with
SSEL_N active low. SCK, MOSI and SSEL_N are synchronised to the 450 MHz clock,
so SCK must stay below about 75 MHz. A USB-SPI bridge gives at most 30 MHz.

Each transaction (SSEL_N low ... high) begins with a command byte. While that
byte is shifted in, the **status byte** is shifted out. Its bits, from MSB to
LSB, are:

`trng_on, puf_busy, puf_valid, fifo_full, fifo_empty, xor_rounds[2:0]`

| code | command | following bytes |
|------|---------|-----------------|
| 0x00 | NOP | - |
| 0x10 | SET_NCLK_P | 2 bytes in, high byte first: PUF NCLK |
| 0x11 | SET_NCLK_T | 2 bytes in, high byte first: TRNG NCLK |
| 0x12 | SET_XOR | 1 byte in: XOR rounds, low 3 bits |
| 0x20 | PUF_EVAL | - (poll `puf_valid` in the status byte) |
| 0x21 | PUF_READ | 16 bytes out; byte k holds cells 8k+7 .. 8k |
| 0x30 | TRNG_START | - |
| 0x31 | TRNG_STOP | - |
| 0x32 | TRNG_READ | each further byte clocks out one FIFO byte (0x00 when empty) |
| 0x33 | FIFO_LEVEL | 1 byte out: FIFO fill level |

A FIFO byte is popped only when it was actually loaded into the shifter, so a
read that runs past an empty FIFO loses nothing. Reset defaults:
* PUF NCLK 1152;
* TRNG NCLK 16;
* 4 XOR rounds;
* TRNG off.

The command set, the codes and the framing are this design's own. The original
system only names the four SPI wires and an FSM that drives R and S and returns
the 128 outputs.

## Files

| file | contents |
|------|----------|
| `rtl/puf_trng_pkg.sv` | sizes, defaults, command codes, status struct |
| `rtl/dd_cell.sv` | behavioural model of one cell |
| `rtl/dd_macro4.sv` | four cells of one CLB with their routing mismatch |
| `rtl/dd_array.sv` | 128-cell array (32 macros) |
| `rtl/dd_excite.sv` | reset/start/hold sequencer and sample register |
| `rtl/xor_combiner.sv` | 0..7 rounds of XOR folding |
| `rtl/trng_packer.sv` | variable-width samples to bytes |
| `rtl/sync_fifo.sv` | byte FIFO |
| `rtl/spi_slave.sv` | SPI mode-0 target, byte interface |
| `rtl/puf_trng_ctrl.sv` | command decoder, parameter registers, mode switch, PUF response |
| `rtl/puf_trng_top.sv` | everything wired together on the 450 MHz clock |

Everything except the three cell-model files is synthesizable. On an FPGA,
`dd_cell` must be replaced by the hand-placed latch/LUT macro: two latches and
two LUTs as inverters, with matched routing, with the R and S nets and the q
outputs of the model.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/puf_trng_pkg.sv tb/tb_puf_trng_top.sv --top-module tb_puf_trng_top
./obj_dir/Vtb_puf_trng_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_dd_cell` | reset, race and hold phases; settled bit = sign of the mismatch; random bits for short races |
| `tb_dd_macro4` | each cell oscillates; strongly mismatched cells settle reproducibly |
| `tb_dd_array` | two seeds differ in about half the bits; one seed repeats |
| `tb_dd_excite` | phase lengths for several NCLK, stall on `ready`, R/S exclusivity |
| `tb_xor_combiner` | every depth 0..7 against a reference parity |
| `tb_sync_fifo` | ordering, level, full/empty, simultaneous read and write |
| `tb_spi_slave` | byte exchange in both directions, framing |
| `tb_puf_trng_ctrl` | every command, with models of the sequencer and FIFO |
| `tb_puf_trng_top` | full size, all defaults: PUF evaluate/read/repeat, TRNG stream, FIFO-full stall, mode switch while the TRNG runs, change of XOR depth and NCLK, 200 Mbit/s rate |
| `tb_puf_boards` | 32 arrays as 32 chips: inter/intra distance and bias |
| `tb_nclk_sweep` | one array swept from NCLK 1 to 1152: the random and stable zones |
| `tb_restart` | 40 resets of the full design, 1024 TRNG bits each: pairwise correlation near 0 with the spread of independent bits |

`tb_puf_trng_top` counts each mechanism (stalls, PUF/TRNG switches, PUF and
TRNG excitations) and fails if any of them never happened. It runs in a few
seconds.

Verilator is a two-state simulator, so every register has a reset value. The
cell model keeps its own state from time zero.

To imitate another chip, change `DEVICE_SEED` on `puf_trng_top`. To explore
other silicon, change the jitter and mismatch parameters of `dd_cell`.

## Departures and open points

* **Throughput** is 200 Mbit/s at the default settings, not 225 Mbit/s. Each
  excitation also spends a reset cycle and a hold cycle (see above).
* **The cell numbers** (period, mismatch, jitter) are estimates. The model's
  random zone peaks at a shorter NCLK than the measured 17 cycles. Its PUF
  intra distance (about 3 %) is higher than the measured 1.7 %.
* **Sign convention.** The settled bit is 1 when dT > 0, which is the
  convention of the settled-value law. One form of the duty-cycle law carries
  the opposite sign, which amounts to watching the complementary node.
* **Host protocol, FIFO depth, packer and XOR pairing** are this design's own.
* **Not modelled:** supply voltage and temperature effects (reliability over
  ±10 % VDD and 0-80 °C), and the statistical test suites. These are
  properties of the silicon and its delays, not of this logic.
