# ADM-PCM speech codec on a single-bus microcoded data path

This design converts speech between two digital codings. One is **adaptive
delta modulation (ADM)**: one bit per sample, 32 kbit/s, where each bit says
only "the signal went up" or "the signal went down". The other is **8-bit PCM**
in two's complement. The chip holds two independent halves side by side:

* the **receiver** (`adm_receiver`) takes one ADM bit per conversion and
  produces the 8-bit PCM value it stands for;
* the **transmitter** (`pcm_transmitter`) takes one 8-bit PCM sample per
  conversion and produces the ADM bit that keeps its own estimate tracking the
  input.

Neither half is a hard-wired datapath. Each is a small, fixed-program machine:
a register-transfer data path built around **one shared 8-bit bus**, driven
by a state machine in which **every state makes exactly one bus transfer**.
Most of what is unusual in this RTL comes from that style, so most of this
file explains it.

The RTL is a cycle-accurate model of the original chip at the level of
controller states. It reproduces every published test vector bit for bit:
the 13-step receiver example, the 40-sample production test of the receiver,
and the 20-row back-to-back test of transmitter and receiver.

## 1. The ADM algorithm

Both halves run the same estimator (Song's adaptive delta modulation). With
e(k) in {+1, -1} the ADM bit of step k (bit value 1 means +1), S(k) the step
size and x(k) the estimate:

    S(k) = |S(k-1)| * e(k-1) + Smin * e(k-2)        Smin = 1
    x(k) = x(k-1) + S(k)

When several bits in a row have the same sign, the step grows by one each
time (1, 2, 3, ...). On a sign change it shrinks and turns round. All
quantities are 8-bit two's complement with **no saturation**: an estimate
that passes +127 wraps to -128. The receiver outputs x(k) as PCM. The
transmitter compares its PCM input with its own x(k) and sends
e = +1 when `PCM_input > x(k)`, else e = -1. Its estimate then follows
exactly the sequence a receiver fed with its bits will produce, one
conversion later.

Example from reset, ADM bits `1 1 1 1 1 1 1 0 0 0 0 0 0`:

| step S | -1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | -5 | -6 | -7 | -8 | -9 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| PCM x  | -1 | -1 | 0 | 2 | 5 | 9 | 14 | 20 | 15 | 9 | 2 | -6 | -15 |

The first two outputs show the start-up state (e(k-1) = e(k-2) = -1 after
reset) working its way out of the history.

## 2. The single-bus data path

### 2.1 Units and addresses

Each half has the same data path (`spil_datapath`). Every unit sits on one
8-bit bus and has a 4-bit **source address** (it drives the bus) and/or a
4-bit **destination address** (it loads from the bus):

| addr | source (drives bus)            | destination (loads bus)       |
|-----:|--------------------------------|-------------------------------|
| 0    | none: bus stays all ones       | none                          |
| 1    | -                              | adder input latch A           |
| 2    | adder output A+B               | adder input latch B           |
| 3    | left shifter output            | left shifter input latch      |
| 4    | right shifter output (*)       | right shifter input latch (*) |
| 5    | ones-complementer output       | complementer input latch      |
| 6    | chip input port                | -                             |
| 7    | -                              | chip output register          |
| 8    | X (estimate x(k))              | X                             |
| 9    | Sx (step size S(k))            | Sx                            |
| 10   | Ex (ADM bit history)           | Ex                            |
| 11   | constant 0                     | -                             |
| 12   | constant 1                     | -                             |
| 13   | constant -1                    | -                             |

(*) The right shifter (arithmetic, sign-extending) belongs to the unit set,
but neither program uses it and the codec is built without it
(`HAS_SHIFT_RIGHT = 0`). Its address then reads as all ones.

Arithmetic units are **latched-input, combinational-output**. You load
operand A in one state and operand B in the next. The result can be put on
the bus from the state after that, and stays there until an input changes.
There is no subtractor. Subtraction is done as `a + ~b + 1`, or as
`a + ~(b - 1)` with the constant -1. There are **no status flags**: the only
way to decide anything is to put a value on the bus and let the controller
test one of its bits (section 3).

Ex is a shift register of past ADM bits, built from the left shifter and the
adder: bit 0 is e(k-1) and bit 1 is e(k-2), with 1 meaning +1.

### 2.2 The bus is a wired AND

In the original circuit the bus is precharged high in one clock phase. The
selected source then *discharges* the lines that should be 0. The RTL models
this exactly (`spil_data_bus`):

    bus = all ones;  for each selected source: bus &= source value

This has three visible results, and the design relies on them:

* With source address 0 (or an unused address) the bus reads `0xFF`.
* The input-port bits that are not wired to a pin never discharge, so they
  read 1. The receiver's input port has only bit 0 wired (`IN_MASK = 8'h01`).
  The transmitter's has all 8 bits wired.
* Because of the precharge, the constant -1 is simply "discharge nothing".

### 2.3 One state, one transfer

A state names one source and one destination. During that state the source
drives the bus, and at the end of the state the destination loads it. So
`X := X + Sx` takes three states: load A from X, load B from Sx, load X from
the adder. Registers have no hardware reset. Reset is a short program (states
0-2) that stores constant 0 into Ex, X and Sx.

## 3. The controller and its one-state-late branches

`spil_fsm` is the program sequencer. In the original chip it is a PLA
between an **input latch** and an **output latch**: both RESET/GO and the
data bus reach the PLA only through the input latch, and the state plus the
Moore outputs leave through the output latch. Together they form a two-stage
pipeline, and this has one important effect:

> **A branch taken in state n tests the bus value of state n-1.**

Each program therefore puts the tested value on the bus in two states in a
row: first to get it latched, then again in the state that branches on it.
In the state tables you will see pairs such as `4: bus := Sx` /
`5: bus := Sx, branch on bit 7`. The RTL keeps the latch (`bus_l`), so a
program that did not repeat the value would behave as on the real chip.

Each program row (`spil_pkg::state_entry_t`) holds:

* `moore`: the 9-bit output word, left to right READY, dst[0], src[0],
  dst[1], src[1], ..., dst[3], src[3] (interleaved, LSB first). This is the
  bit order of the original controller listings, kept so the tables can be
  checked against them.
* `br_kind`: `BR_NONE` (always go to `next_def`), `BR_GO` (test the latched
  GO), or `BR_BUS` (test latched bus bit `br_bit`).
* `br_pol`: the value of the tested bit that takes the branch to `next_br`.

A latched RESET overrides everything and sends the machine to state 0.

### 3.1 The receiver program (33 states)

| states | operation |
|---|---|
| 0-2   | Ex := 0, X := 0, Sx := 0 (reset procedure) |
| 3     | wait: READY = 1, loop until GO |
| 4-9   | if Sx < 0: Sx := ~Sx + 1 (absolute value) |
| 10-15 | if Ex[0] = 0 (last bit was -1): Sx := ~Sx + 1 |
| 16-21 | Sx := Sx + (Ex[1] ? +1 : -1) |
| 22-24 | X := X + Sx |
| 25-26 | Ex := Ex << 1 |
| 27-31 | if ADM input bit = 1: Ex := Ex + 1 |
| 32    | PCM output register := X, back to 3 |

### 3.2 The transmitter program (38 states)

States 0-26 are the same as in the receiver. Then:

| states | operation |
|---|---|
| 27-31 | form X + ~(PCM_input - 1), which is X - PCM_input |
| 32-33 | put it on the bus twice, branch on its sign bit |
| 34-36 | if negative (PCM_input > X): Ex := Ex + 1 |
| 37    | ADM output register := Ex (only bit 0 is a pin), back to 3 |

The comparison is the sign of an 8-bit wrapped difference. It is wrong when
X - PCM_input overflows, for example X = 100 and PCM_input = -100. The
original design has the same limitation. The ADM estimate tracks the input
closely in normal use, so this never happens there.

## 4. Timing and handshake

**Clock.** The original chip uses two non-overlapping clocks with four
phases per state: precharge, source drive, destination load and PLA
evaluation. Here one rising edge of `clk` stands for one complete state. The
clock generator is not part of the RTL.

**READY/GO.** READY is high exactly while the controller is in its wait state
(state 3). GO passes through the input latch, so the controller leaves the
wait state on the second rising edge at which GO is high.
Holding GO high makes conversions run back to back.

**Conversion length** (READY rise to READY rise, GO held high):

| half | clocks |
|---|---|
| receiver    | 18 + 4·[Sx<0] + 4·[last bit -1] + 3·[new bit = 1], so 18-29 |
| transmitter | 23 + 4·[Sx<0] + 4·[last bit -1] + 3·[PCM > X], so 23-34 |

The worst case, 34 clocks per ADM bit, fixes the clock. For 32 kbit/s ADM,
32 000 × 34 = **1.088 MHz**. PCM values appear at the ADM rate, one per bit.
To get 8 kHz PCM, the surrounding system uses every fourth value. That
decimation is outside the chip.

**Reset.** Hold `reset` high for at least one rising edge. The controller
enters state 0 on the edge after reset is latched, and READY rises four
clocks after the last edge that sampled reset high. The PCM output register
is not cleared by reset. It shows the previous value until the first
conversion finishes.

**I/O timing.** The receiver reads its ADM pin in states 27-28, and the
transmitter reads its PCM pins in state 28. Hold the input stable from GO
until the next READY. The PCM/ADM output register changes in the last state
of a conversion, and it is valid when READY rises.

## 5. The chip

`adm_pcm_codec` puts the two halves side by side with nothing shared but
supply. Each half has its own clock, reset, GO and READY. Two test aids are
included:

* `rx_bus_probe_n[7:0]`: the receiver's data bus as seen through
  open-drain probe transistors. A probe pad reads low while its bus line is
  high, so this is the inverted bus. In the wait state the bus is precharged,
  so the probes read `0x00`.
* `pad_test_in` → `pad_test_out`: an input pad wired straight to an output
  pad, to test the pad cells.

The process test structures and the pad cells are analog and have no RTL.

## 6. What is taken from the original design, and what is not

Taken from the original design:

* the algorithm;
* the bus map and unit set;
* both state tables, state by state, including the Moore words and branch
  arcs;
* the one-state branch delay;
* the wired-AND precharged bus;
* the missing right shifter and the single wired ADM input bit;
* the 34-clock worst case.

Choices made here where the original is silent or is not logic:

* **One clock edge per state** in place of the four-phase clocking. Behaviour
  at state level is identical. Glitches and phase-level effects are not
  modelled.
* **Edge-triggered registers** in place of the latches of the original. Each
  loads at the end of its state.
* **The controller as a table lookup** (`PROGRAM` parameter) in place of
  NAND-NAND PLA planes. A state number outside the table behaves like an
  empty PLA row: outputs low, next state 0.
* **Strict comparison** in the transmitter. The compiled program tests
  `PCM_input > X`. One prose description of the comparator says "greater
  than or equal", and so does a drawing of the comparator. The program is
  what the chip ran, so it is followed here. The two differ only when the
  PCM input equals the estimate exactly.
* **Probe polarity.** The probe output is the logic level of a probe pad with
  a pull-up, i.e. the inverted bus.
* **Unused addresses** (sources 1, 7, 14, 15) read as all ones.

## 7. Verification

Every block has a self-checking testbench in `tb/`, named `tb_<block>`. Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_spil_addr_decoder`, `tb_spil_data_bus`, `tb_spil_register`, `tb_spil_adder`, `tb_spil_shift_left`, `tb_spil_shift_right`, `tb_spil_complementer` | each unit against a reference expression, exhaustive or random |
| `tb_spil_fsm` | every Moore word against the listed addresses; the reset procedure; the GO wait; the branch using the *previous* bus; 5000 random cycles against a reference next-state function, with every arc taken both ways |
| `tb_spil_datapath` | 20 000 random transfers against a register-level model, right shifter enabled and a partly wired input port |
| `tb_adm_receiver` | the 13-step example above, with the exact gaps between outputs in clocks; then 3000 random bits against an algorithmic model, checking value and conversion length |
| `tb_pcm_transmitter` | 4000 samples (triangle wave and random) against a model; conversion length; that the 34-clock worst case occurs |
| `tb_adm_pcm_codec` | the whole chip at default parameters (see below) |
| `tb_codec_speech` | real-time operation at the minimum clock: GO every 34 clocks, an 8 kHz two-tone PCM signal held for 4 bits, the transmitter feeding the receiver; no strobe may be missed, every bit and PCM value must match a model, and the 8 kHz output must track the input (about 15.7 dB SNR) |

`tb_adm_pcm_codec` runs three parts:

* **A.** It replays the original 1024-word receiver production test pattern
  (RESET, GO and ADM per clock). All 40 PCM values captured at READY must
  match the published capture, including a wrap from 0x85 to 0x73.
* **B.** It replays the back-to-back test, with GO = READY_rx AND READY_tx
  and a common clock, and checks all 20 captured rows.
* **C.** It feeds the transmitter's ADM output into the receiver for 60 000
  clocks, with GO pauses. After each conversion the receiver's PCM output
  must equal the transmitter's estimate of one conversion earlier.

It also counts each mechanism and fails if one never happened:

* reset procedures;
* GO waits;
* estimate wrap-around;
* 34-clock conversions;
* probe reads in the wait state;
* the pad test path;
* every conditional arc of both programs, taken both ways.

## 8. Simulating and changing it

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/spil_pkg.sv rtl/codec_pkg.sv tb/tb_adm_pcm_codec.sv \
        --top-module tb_adm_pcm_codec
    ./obj_dir/Vtb_adm_pcm_codec

Replace `tb_adm_pcm_codec` with any other testbench name. The two packages
must come first on the command line. Every testbench finishes in well under
a second.

Things that are easy to change:

* **Programs.** `codec_pkg::RX_PROGRAM` and `TX_PROGRAM` are plain tables.
  A new program needs only a new table and `N_STATES`. Remember to repeat a
  tested value on the bus in the state before the branch.
* **Right shifter.** Set `HAS_SHIFT_RIGHT = 1` on `spil_datapath` to add it
  at addresses 4/4.
* **Width.** `DATA_W` is a parameter throughout. The programs assume that
  bit 7 is the sign, so a different width needs matching branch bits.

## 9. Files

| file | contents |
|---|---|
| `rtl/spil_pkg.sv` | controller types: program row, Moore word decode |
| `rtl/codec_pkg.sv` | bus map, constants, receiver and transmitter programs |
| `rtl/spil_fsm.sv` | program sequencer with input latch |
| `rtl/spil_datapath.sv` | the single-bus data path |
| `rtl/spil_addr_decoder.sv`, `spil_data_bus.sv`, `spil_register.sv`, `spil_adder.sv`, `spil_shift_left.sv`, `spil_shift_right.sv`, `spil_complementer.sv` | data path units |
| `rtl/adm_receiver.sv`, `rtl/pcm_transmitter.sv` | the two codec halves |
| `rtl/adm_pcm_codec.sv` | the chip |
| `tb/tb_*.sv` | one testbench per module |
