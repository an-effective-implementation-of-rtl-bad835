# Dual-mode FM0 / Manchester line encoder for DSRC

Dedicated short-range communication (DSRC) links between vehicles and roadside units code
the downlink bit stream so that the line is dc-balanced and carries a transition in every
bit. The regional standards do not agree on the code:

| Region  | Standard body | Downlink code | Data rate |
|---------|---------------|---------------|-----------|
| Europe  | CEN           | FM0           | 500 kb/s  |
| America | ASTM          | Manchester    | 27 Mb/s   |
| Japan   | ARIB          | Manchester    | 4 Mb/s    |

This RTL is a single encoder that produces either code from one serial input, selected by a
`mode` pin. It is tiny: two flip-flops, an XOR, an inverter, two 2:1 multiplexers and one
XNOR. The main idea is to use the **level of the bit clock as data**. Each coded bit has
two half-bit levels, and the clock's high and low phases mark those two halves. A
multiplexer switched by the clock therefore gives two output levels per period from logic
that is clocked once per bit.

## The two codes

Each bit is sent as two half-bit levels. In this design the first half is the time the bit
clock is high.

* **Manchester:** a 1 is sent high then low, a 0 low then high. There is always a
  transition in the middle of the bit.
* **FM0 (bi-phase space):** the level always inverts at the start of a bit. It inverts
  again in the middle of the bit for a 0, and holds for a 1. A decoder recovers the bit as
  "both halves equal".

Here is the pattern `1 0 1 0 0 0 1`, shown as (first half, second half) per bit. FM0 starts
from the cleared state, in which the previous level is 0:

| bit        | 1  | 0  | 1  | 0  | 0  | 0  | 1  |
|------------|----|----|----|----|----|----|----|
| FM0        | 11 | 01 | 00 | 10 | 10 | 10 | 11 |
| Manchester | 10 | 01 | 10 | 01 | 01 | 01 | 10 |

## How the FM0 path works

Let `A(t)` be the first-half level of bit `t` and `B(t)` its second-half level. The FM0
rule becomes two one-bit recurrences:

```
A(t) = ~B(t-1)             level inverts at every bit start
B(t) = X(t) ^ B(t-1)       = A(t) for a 1, ~A(t) for a 0
```

Both depend only on the previous `B`. So one register, `DFF_B`, holds the state:

* `XOR_1` forms `X ^ B`, which goes into `DFF_B`.
* An inverter forms `~B`, which goes into `DFF_A`.
* Both flip-flops load on the rising clock edge. After that edge `DFF_A` holds the first
  half of the new bit and `DFF_B` holds its second half.
* `MUX_1` is selected by the clock itself. While CLK is high it passes `DFF_A` (input 1).
  While CLK is low it passes `DFF_B` (input 0).

Storing `A` in its own flip-flop costs one register. In return, the first-half level is
computed one clock edge early, so the half-bit change at the falling edge is only a
multiplexer delay.

## Manchester path, output select and CLR

The Manchester code is simply `X XNOR CLK`: the bit itself while CLK is high and its
inverse while CLK is low. It has no state. `MUX_2` picks the output:

* `mode = 0` (`MODE_FM0`): the FM0 code.
* `mode = 1` (`MODE_MANCHESTER`): the Manchester code.

`clr_n` is an active-low asynchronous clear of both FM0 flip-flops. The intended Manchester
setting is `mode = 1` with `clr_n = 0`. This freezes the FM0 register, which is a large part
of the circuit's switching activity, so Manchester operation uses less power than FM0. If
`clr_n` is left high in Manchester mode, the FM0 flip-flops keep running on the input data.
Nothing else changes.

After the clear is released, the first FM0 bit starts with a high level.

## Timing: the part to get right

* **One bit per clock period.** The first half-bit is CLK high, the second is CLK low. The
  output changes on both clock edges, so the encoder's bit clock runs at the bit rate and
  its duty cycle sets the half-bit lengths.
* **Presenting data.** Change `x` just after a rising edge and hold it for the whole
  period.
* **The two modes have different latencies:**
  * Manchester reads `x` combinationally, so the bit goes out in the same period.
  * FM0 samples `x` at the next rising edge, so the bit goes out one period later.
* **Glitches.** The output is combinational in the clock, `x` and `mode`. It can glitch
  where `x` changes just after the rising edge in Manchester mode, and whenever `mode`
  changes. Anything that samples it must do so away from the edges. The prototype top does
  that (next section).
* **Timing analysis and synthesis.** The clock is used as a data input of `MUX_1` and of the
  XNOR. This is deliberate, but timing tools have to be told: the clock-to-output path is a
  real, timed path.

## Two-clock prototype top (`sols_fpga_proto`)

A synchronous FPGA design cannot produce a signal that changes on both edges of its clock.
The prototype therefore uses two clocks:

* **`clk_ext` (CLKEXT):** the system clock.
* **`clk_int` (CLKINT):** the encoder's bit clock, at half the CLKEXT frequency. A toggle
  flip-flop on `clk_ext` produces it, so every CLKINT edge falls on a rising CLKEXT edge.

The outputs are:

* **`code_out`:** the encoder output itself.
* **`code_sync`:** `code_out` registered on `clk_ext`. Each half-bit is sampled once, in
  the middle of its CLKEXT period, so `code_sync` is a glitch-free copy one CLKEXT period
  (half a bit) later.

`rst_n` resets the divider and `code_sync` asynchronously. `x`, `mode` and `clr_n` go to the
encoder unregistered. They should change just after a rising CLKINT edge.

## Interfaces

| Module             | Ports |
|--------------------|-------|
| `sols_fpga_proto` (top) | in: `clk_ext`, `rst_n`, `clr_n`, `mode`, `x`. out: `clk_int`, `code_out`, `code_sync` |
| `sols_encoder`     | in: `clk`, `clr_n`, `mode` (`sols_pkg::mode_e`), `x`. out: `code_out` |
| `fm0_logic`        | in: `clk`, `clr_n`, `x`. out: `fm0_code` |
| `manchester_logic` | in: `clk`, `x`. out: `manchester_code` |
| `sols_pkg`         | `mode_e`: `MODE_FM0 = 0`, `MODE_MANCHESTER = 1` |

All signals are one bit wide. No module has parameters.

## Where this RTL follows the published architecture and where it chooses

Taken from the published architecture:

* The block structure: `DFF_A`, `DFF_B`, `XOR_1`, `MUX_1` selected by CLK, a separate
  Manchester gate, and `MUX_2` selected by Mode.
* The multiplexer input numbering.
* Mode = 1 for Manchester, and clearing `DFF_B` during Manchester to save power.
* The CLKEXT / CLKINT 2:1 prototype clocking.
* The DSRC profiles in the table above.

Choices made here:

* **XNOR rather than XOR.** The published block diagram labels the Manchester gate as an
  XOR, while its text names an XNOR. The XNOR is used, because with the first half-bit on
  CLK high it gives the stated Manchester convention (1 = high then low). With an XOR the
  line would be inverted. If your receiver expects the other polarity, swap the gate in
  `manchester_logic.sv`.
* **Clock edge and phase.** Rising-edge flip-flops, and the first half-bit while CLK is high.
* **The clear.** `clr_n` is active low and asynchronous, and it clears `DFF_A` as well as
  `DFF_B`.
* **The prototype top.** How CLKINT is made and which signals are re-timed on CLKEXT (only
  the output) are this design's own choices.
* **Hardware reuse.** The published work claims full reuse of every component in both
  modes. It does not describe how the Manchester path would share the FM0 logic, and its
  block diagram shows a separate Manchester gate. That diagram is what is built here.
* **Flip-flop count.** An FPGA resource table reports a single flip-flop for the FPGA
  version. This RTL has the two flip-flops of the block diagram, plus the divider and output
  register of the prototype.

Not modelled:

* The transmission-gate circuit style, the transistor count and layout.
* The reported speeds: FM0 up to 900 MHz and Manchester up to 2 GHz in 0.18 µm CMOS, and
  296 MHz on a Spartan-2 FPGA.
* The power figures.

All of these belong to the circuit implementation, not the logic. The rest of a DSRC
transceiver is also outside this RTL: the microprocessor, the other baseband functions
(modulation, error correction, synchronisation, receive-side decoding) and the RF front-end.

## Verification

Every testbench is self-checking. Each computes expected levels from the code definitions,
not from the RTL, and ends with a `TB_RESULT checks=N failures=M` line:

* `tb_fm0_logic`: checks both halves of every bit, over:
  * a fixed pattern, runs of 1s and 0s, and random data;
  * clears at the start and in mid-stream.

  It also checks the inversion at every bit start, decodes each bit back, and checks that
  the running disparity stays within 2 half-bits.
* `tb_manchester_logic`: checks both halves, the mid-bit transition, and exact dc balance.
* `tb_sols_encoder`: covers:
  * both modes;
  * Manchester with the FM0 register cleared and running;
  * frequent random mode switches;
  * the one-period FM0 latency.

  It counts each case and fails if one never occurs.
* `tb_sols_fpga_proto`: the end-to-end test of the top at its defaults (CLKEXT 100 MHz). It
  checks:
  * two CLKEXT periods per bit;
  * `code_out` against the model;
  * that `code_sync` equals `code_out` one CLKEXT period later;
  * a decode of every bit from `code_sync` alone.

  It counts FM0 bits, Manchester bits with and without the clear, mode switches, clears and
  releases.
* `tb_dsrc_standards`: runs the three regional profiles through the top at their real bit
  rates: FM0 at 500 kb/s, and Manchester at 27 Mb/s and 4 Mb/s. It measures the bit period,
  decodes 127–128 bits per profile and checks dc balance.
* `tb_switching_activity`: sends the same 400 random bits through the encoder in FM0, and
  then in Manchester with the clear held. It counts toggles:
  * The FM0 register never toggles in Manchester. It toggles about 300 times in FM0.
  * Internal toggles in Manchester are about two thirds of FM0's, in line with the lower
    Manchester power reported for the original circuit.

  It also checks the number of line transitions each code must have.

Any of them can be run with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sols_fpga_proto rtl/sols_pkg.sv tb/tb_sols_fpga_proto.sv
./obj_dir/Vtb_sols_fpga_proto
```

Lint a module with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/sols_pkg.sv
rtl/<module>.sv`.
