# DS-SS transmitter with a pseudo-chaotic spreading code

A direct-sequence spread-spectrum (DS-SS) transmitter replaces each data bit with
many short "chips" of a pseudo-noise code. The receiver, which knows the code,
correlates the chips and gets the bit back. To anyone without the code the
chips look like wideband noise. Most DS-SS transmitters take their code from
an LFSR m-sequence. An LFSR's period is fixed at 2^n - 1, and its structure is
well known.

This transmitter takes its code from a **pseudo-chaotic sequence (PCS)
generator** instead. Four small cells, each with two programmable 8-bit
registers, are chained in a loop. One bit per clock is folded out of the last
cell and fed back into the chain. All 64 register bits can be programmed, so
each user or link can get its own sequence.

At the default sizes, one 8-bit data word becomes 8 x 32 = 256 chips. The
transmitter sends one chip per clock.

```
 data[7:0] ──► tx_buffer ──data,reload──► tx_control ──data_bit,enable──► spread_multiplier ──► mod_out
  cntrl    ──►     ▲      ◄──busy,done──     │   ▲                              ▲                 mod_valid
                   │                      run│   │ready                         │pcs_out
 load, sel_reg, reg_init ───────────────────►pcs_generator ─────────────────────┘
```

## The pseudo-chaotic generator (`pcs_generator`, `pcs_cell`)

### Structure

The generator has four cells. Cell k (k = 0 is the cell nearest the output)
holds two registers:

| cell | internal register (8-bit path) | shift register (1-bit path) |
|------|--------------------------------|-----------------------------|
| 3    | R7                             | R8                          |
| 2    | R5                             | R6                          |
| 1    | R3                             | R4                          |
| 0    | R1                             | R2                          |

Each cell's output is the modulo-2 sum (bitwise XOR) of its two registers.
The cells are wired in two directions:

```
        ┌──────────── 8-bit path: cell outputs move towards the output ─────────────┐
        │                                                                           ▼
  R8 ─► R7 ⊕ R8 ─► R5 ;  R5 ⊕ R6 ─► R3 ;  R3 ⊕ R4 ─► R1 ;  R1 ⊕ R2 ─► XOR of 8 bits = chip
  ▲                                                                               │
  └── R8 ◄── R6 ◄── R4 ◄── R2 ◄───────── 1-bit path: the chip shifts back ────────┘
```

### One step

The generator steps once per clock while `run` is high. With r1..r8 as the
registers before the clock edge:

```
chip          = ^(r1 ^ r2)                 // 8 bits XORed to one bit
r1' = r3 ^ r4      r3' = r5 ^ r6      r5' = r7 ^ r8      r7' = r8
{r8',r6',r4',r2'} = {r8,r6,r4,r2} << 1 | chip     // one 32-bit shift chain
```

Inside each shift register, bits enter at bit 0 and leave at bit 7. A bit
that leaves R8 is dropped, but R8 as a whole is also copied into R7 at each
step.

`pcs_out` is the chip of the current state. It comes straight from the
registers, without an output register, so the chip on `pcs_out` in a clock
is the one that the next step uses.

### Properties worth knowing

- **It is linear.** Every operation is an XOR or a shift, so the sequence is
  a linear recurrence over GF(2) with 64 bits of state. It behaves like a
  long LFSR with a complicated feedback network, not like a truly chaotic
  map. Its statistical quality depends on the seed. An all-zero seed gives
  all-zero chips.
- **Default seed.** Reset loads R1..R8 = `5A C3 96 3C A5 69 0F E1` (hex),
  which is the `INIT` parameter `64'hE10F_69A5_3C96_C35A` with R1 in the low
  byte. With this seed, no state repeats within 2 million steps, and 2072 of
  the first 4096 chips are ones. The first 32 chips, first chip first, are
  `32'h5832C0B4`.
- **Programming.** While `load` is high, each clock writes `reg_init` into
  the register chosen by `sel_reg` (0 selects R1, 7 selects R8). While
  `load` is high the generator does not step, even if `run` is high. Program
  the generator only between words. A load during a transmission pauses the
  code while the control circuit keeps counting chips.
- **ready.** `ready` is low during reset and goes high on the first clock
  after it, because reset has already loaded a usable seed. `pcs_out` is
  forced to 0 while `ready` is low.

## Transmitting a word (`tx_buffer`, `tx_control`, `spread_multiplier`)

### Handshake

The message source writes a word by putting it on `data` and pulsing
`cntrl` for one clock while `buf_full` is low. A pulse while `buf_full` is
high is ignored.

The buffer holds one word and goes through three states:

- EMPTY: it takes a word on `cntrl` and moves to FULL.
- FULL: it raises `reload`. When the control circuit raises `busy`, it moves
  to SENT.
- SENT: it waits for `done`, then returns to EMPTY.

So only one word is in flight at a time. The next word can be written on the
clock after `done`.

### The control circuit

The control circuit sits in IDLE until both `ready` and `reload` are high.
It then copies the word into its own register and spends
`DATA_W * CHIPS_PER_BIT` clocks in SPREAD. During SPREAD:

- `run`, `enable` and `busy` are high.
- `data_bit` holds each bit of the word for `CHIPS_PER_BIT` clocks, most
  significant bit first.

After SPREAD it spends one clock in DONE, with `done` high and `busy` low,
and then returns to IDLE.

### Assertions

`tx_buffer` and `tx_control` contain concurrent assertions for the
handshake. They are active when you simulate with `--assert`. They check
that:

- `busy` rises only when a word was offered with `reload` and the generator
  was `ready`;
- `busy` always falls into `done`;
- `done` and `busy` are never high together;
- `done` reaches the buffer only while it holds a word in flight.

### The multiplier

The multiplier registers `mod_out = data_bit XOR pcs_out` on every enabled
clock and sets `mod_valid`. XOR is the product of the bit and the chip when
0 is read as +1 and 1 as -1.

### Timing at the default sizes

| clock edge (after the cntrl pulse) | event |
|---|---|
| 1 | buffer holds the word, `reload` = 1, `buf_full` = 1 |
| 2 | control takes it: `busy` = `run_txr` = 1 for 256 clocks |
| 3 | first chip on `mod_out`, `mod_valid` = 1 for 256 clocks |
| 258 | `done` = 1 for one clock, `busy` = 0; the last chip is on `mod_out` |
| 259 | buffer empty; a new `cntrl` is accepted |

`mod_out` runs one clock behind `run_txr`.

## Top level `dsss_tx`: ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `data` | in | DATA_W | parallel data word |
| `cntrl` | in | 1 | write strobe for `data` |
| `buf_full` | out | 1 | buffer holds a word; `cntrl` is ignored |
| `busy` | out | 1 | a word is being transmitted |
| `done` | out | 1 | one-clock pulse after each word |
| `load` | in | 1 | write `reg_init` into the register chosen by `sel_reg` |
| `sel_reg` | in | SEL_W | 0..7 selects R1..R8 |
| `reg_init` | in | REG_W | register value |
| `ready_out` | out | 1 | PCS generator ready |
| `run_txr` | out | 1 | PCS generator running (the control circuit's `run`) |
| `mod_out` | out | 1 | spread chip |
| `mod_valid` | out | 1 | `mod_out` holds a chip |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `REG_W` | 8 | width of each PCS register |
| `NUM_CELLS` | 4 | cells in the generator (registers = 2 x NUM_CELLS) |
| `DATA_W` | 8 | data word width |
| `CHIPS_PER_BIT` | 32 | chips per data bit |
| `SEL_W` | 3 | select width, `$clog2(2*NUM_CELLS)` |
| `INIT` (pcs_generator) | `64'hE10F_69A5_3C96_C35A` | reset seed, R1 in the low byte |

The package `dsss_pkg` holds these defaults and the state enums. The
recurrence above is written for four cells. Other cell counts build and
follow the same wiring, but the testbenches do not cover them. If you change
`NUM_CELLS` or `REG_W`, also pass a matching `INIT`.

## What comes from the original description and what is chosen here

These parts follow the published design:

- the four-block structure (buffer, control circuit, PCS generator,
  multiplier) and its signals;
- the pin names;
- four cells with two 8-bit registers each, each cell adding its registers
  modulo 2;
- the XOR of the last cell's bits into the chip, and the chip's feedback
  through the chain of shift registers;
- programming through load, a 3-bit register select and an 8-bit value;
- ready, run, enable, busy and done;
- 32 chips per bit, 8 bits, 256 chips per word.

These parts are choices made here:

- The adders are bitwise XOR ("modulo-2"), which makes the generator linear
  even though it is presented as a nonlinear (NLFSR) generator. Adding
  modulo 2^8, with carries, would be the obvious nonlinear variant, but it
  is not what is implemented.
- The shift direction, the order of the 32-bit chain, and R7 being copied
  from R8 on every step.
- The `sel_reg` numbering, load taking priority over run, and the default
  seed loaded by reset.
- The buffer's one-word depth, its EMPTY/FULL/SENT handshake, and the
  meaning of `cntrl` as the write strobe.
- Sending the most significant bit first, one chip per clock, and a
  one-clock `done`.
- The XOR multiplier, its output register, and the extra ports `mod_valid`,
  `busy`, `done` and `buf_full`.
- Synchronous active-high reset.

Not included:

- the 8-bit LFSR (x^8 + x^6 + x^5 + x^4 + 1) that the PCS generator
  replaces;
- a receiver (the top-level testbench contains a despreading model);
- any FPGA-specific timing or resource tuning.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `pcs_cell_tb` | 2000 random clocks of step/load/shift against a register model |
| `pcs_generator_tb` | reset and ready; the first 64 chips of the default seed against values computed offline; balance over 4096 chips; 3000 random clocks of run/load against the reference recurrence (`tb/pcs_ref_pkg.sv`); different seeds give different sequences |
| `tx_buffer_tb` | the EMPTY/FULL/SENT handshake against a random control-circuit model; writes while full are ignored |
| `tx_control_tb` | no start without ready; exactly 256 run clocks; MSB-first bit order; a one-clock done |
| `spread_multiplier_tb` | the ±1 product and the one-clock latency |
| `pcs_correlation_tb` | sequence quality: two generators with different seeds, 1024-chip window, lags 0..32 in the ±1 domain. The in-phase peak is 1024, the largest off-peak autocorrelation is 92, the largest cross-correlation is 76, and 513 and 465 of the 1024 chips are ones. All of these values are checked. |
| `dsss_tx_tb` | the whole transmitter at default sizes: every chip against the reference; a receiver model despreads each word, with correlation ±32 per bit; 256-clock framing; 3-clock latency; a refused write while full; re-programming the seed; back-to-back words; a reset in mid-word |

To run one, for example the top level:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dsss_pkg.sv tb/pcs_ref_pkg.sv tb/dsss_tx_tb.sv --top-module dsss_tx_tb
./obj_dir/Vdsss_tx_tb
```

`tb/pcs_ref_pkg.sv` holds the reference recurrence. Only `pcs_generator_tb`
and `dsss_tx_tb` need it.
Each testbench finishes in well under a second.
