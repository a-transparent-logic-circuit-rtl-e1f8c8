# Transparent RFID tag logic: 16-bit Manchester code generator

A passive RFID tag needs very little digital logic. It must read a fixed
identifier out of a small ROM, one bit at a time, and turn the bits into a
self-clocking waveform. That waveform drives the transistor that modulates the
reader's 13.56 MHz field. This RTL describes such a tag logic block. It was
conceived for transparent amorphous oxide (a-IGZO) thin-film transistors, a
technology with NMOS devices only, gate delays of tens of microseconds and no
crystal. So the design is built to need no external clock, no reset pin and no
dynamic logic:

* a ring oscillator on the tag makes three clocks, each 120 degrees from the
  next;
* a 5-bit counter walks a 4x4 mask ROM through its 16 bits;
* a Manchester encoder built from two XOR gates and one flip-flop uses the
  three clock phases to produce a clean, glitch-free output.

The ROM is programmed by where pull-down transistors sit. Here that is the
`CODE` parameter, default `1100 0110 0110 1100`. The tag sends this code as 16
Manchester symbols and then stays silent for 16 clock periods. It repeats the
frame for as long as it is powered. The default clock is 3.2 kHz, so one
symbol takes 312.5 us and one frame takes 10 ms.

```
                CLK#1                 ADD<4:3>   +-------------+
 +-----------+ -------> +-----------+ ---------> | 2-to-4 dec. |--BL<1:4>--+
 |  clock    |          |  5-bit    |            +-------------+           v
 | generator |          |  counter  | ADD<2:1>   +-------------+      +---------+
 | (ring osc)|          |           | ---------> | 2-to-4 dec. |-WL-> | 16-bit  |
 +-----------+          +-----------+            +-------------+      |  ROM    |
   | CLK#1..3               | ENb = ADD<5>                            +---------+
   v                        v                                              | ROM output
 +--------------------------------+        ROM data       +-----+          |
 |       Manchester encoder       | <-------------------- | DFF | <--------+
 +--------------------------------+                       +-----+ (CLK#1)
   |
   v rfid_out  (to the modulation transistor)
```

## Output format

| ROM bit | symbol while enabled (ENb = 0) | while disabled (ENb = 1) |
|---------|--------------------------------|--------------------------|
| 0       | `10` (high, then low)          | `00`                     |
| 1       | `01` (low, then high)          | `00`                     |

Each symbol takes one CLK#1 period, and its first half is the half in which
CLK#1 is high. A 0 output keeps the modulation transistor off. The reader
therefore sees an unmodulated carrier, which the tag also needs while it
charges its supply. The default code comes out as

```
ROM data : 1  1  0  0  0  1  1  0  0  1  1  0  1  1  0  0
rfid_out : 01 01 10 10 10 01 01 10 10 01 01 10 01 01 10 10   then 16 x 00
```

## Three-phase clocking and the Manchester encoder

This is the subtle part of the design. A Manchester encoder is usually an XOR
of data and clock. But an XOR whose inputs change at nearly the same moment
glitches, and with slow, poorly matched TFT gates the glitches are wide. The
encoder therefore retimes the XOR output with a flip-flop. That flip-flop's
clock must have an edge inside each half of every bit, away from the
transitions of the data and of CLK#1. The third clock phase provides those
edges.

**Clock generator** (`clock_generator`). The ring has nine inverters in three
identical delay circuits of three inverters each. Every inverter output has a
capacitor load that sets the frequency. The output of each delay circuit is
buffered by one inverter:

* CLK#1 comes from after inverter 3;
* CLK#2 comes from after inverter 6;
* CLK#3 comes from after inverter 9.

Call the delay of one inverter d. The period is 18·d. Taps that are three
inverters apart, together with the odd number of inversions, put the clocks
one third of a period apart: CLK#3 lags CLK#1 by 120° and CLK#2 lags it by
240°.

**Encoder** (`manchester_encoder`):

```
mc_data = (rom_data XOR clk1) AND NOT enb      -- XOR gate with enable-bar
mc_clk  =  clk2 XOR clk3                       -- twice the CLK#1 rate
rfid_out <= mc_data  on every rising edge of mc_clk
```

One CLK#1 period, in 60° steps:

| degrees      | 0-60 | 60-120 | 120-180 | 180-240 | 240-300 | 300-360 |
|--------------|------|--------|---------|---------|---------|---------|
| CLK#1        | 1    | 1      | 1       | 0       | 0       | 0       |
| CLK#3        | 0    | 0      | 1       | 1       | 1       | 0       |
| CLK#2        | 1    | 0      | 0       | 0       | 1       | 1       |
| mc_clk       | 1    | 0      | **1**   | 1       | 0       | **1**   |
| mc_data (d)  | ~d   | ~d     | ~d      | d       | d       | d       |

`mc_clk` rises at 120° and at 300°. Each rise is 120° after the start of a
half-bit and 60° before its end. The flip-flop therefore takes ~d in the first
half and d in the second. Each half appears at `rfid_out` 120° late, with no
glitches. The duty cycle of `mc_clk` is not 50% (120° high, 60° low), which is
harmless: only the rising edges are used.

The XOR with enable-bar (`xor_en`) is built the way the NMOS-only cell is: a
NOR-2 of the inputs feeds an AND-OR-INVERT gate, `out = ~((a&b) | ~(a|b) |
enb)`. The XOR for `mc_clk` uses the same cell with its enable tied low.

## Address counter, ROM and the ROM data register

`counter5` counts CLK#1 periods modulo 32. Its bits are used as follows:

* ADD<2:1> go to a 2-to-4 decoder, which selects one of the word lines WL<1:4>;
* ADD<4:3> go to a second decoder, which selects one of the bit lines BL<1:4>;
* ADD<5> is the encoder's enable-bar. Addresses 0-15 are sent and 16-31 are
  silent.

`rom16` behaves like the transistor array. The selected bit line connects one
column to an output node that a load transistor pulls high. A cell that holds
a 0 contains a pull-down transistor, which the selected word line turns on,
pulling the node low. The result is a wired NOR over all cells. The cell for
address `a` sits on word line `a % 4` and bit line `a / 4`, so each bit line
holds four consecutive bits of the code. The bit sent at address `a` is
`CODE[15-a]`. For the default code the pull-downs are at:

| | BL<1> | BL<2> | BL<3> | BL<4> |
|---|---|---|---|---|
| WL<1> | - | pd | pd | - |
| WL<2> | - | - | - | - |
| WL<3> | pd | - | - | pd |
| WL<4> | pd | pd | pd | pd |

The ROM output node is slow and glitchy. A flip-flop on CLK#1 turns it into
the clean `rom_data` signal.

**Edge assignment (a choice made in this RTL).** The counter advances on the
*falling* edge of CLK#1. The ROM data flip-flop samples on the *rising* edge.
The ROM therefore has half a period to settle, and the flip-flop always
captures the bit of the current address. If both used the same edge, the
flip-flop would capture the previous address's bit, and the frame would be
rotated by one bit.

**Consequence for the enable.** ENb comes straight from the counter, so it
changes at 180°, in the middle of a symbol. Two half-symbols are affected:

* The second half of the last data bit (address 15) is forced to 0.
* The second half of the period just before the frame (address 31) is already
  enabled. It carries the ROM bit held in the data register, which is bit 15,
  because address 31 reads the same cell as address 15.

Both halves are 0 when the last code bit is 0, as in the default code, so the
frame is exact. With a code whose last bit is 1, that bit would lose its
second half, and a stray high half-period would precede the frame. If you change `CODE`, either keep its last bit 0 or register ENb
on the rising edge of CLK#1 before it reaches the encoder.

## Modules

| file | role |
|------|------|
| `rtl/rfid_pkg.sv` | widths, default code, `code_bit()` helper |
| `rtl/rfid_logic.sv` | top: clock generator + code generator + encoder |
| `rtl/clock_generator.sv` | behavioural ring-oscillator model (delays, simulation only) |
| `rtl/code_generator.sv` | counter, two decoders, ROM, ROM data flip-flop |
| `rtl/counter5.sv` | 5-bit address counter, falling edge |
| `rtl/decoder2to4.sv` | one-hot line decoder |
| `rtl/rom16.sv` | 4x4 mask ROM, wired-NOR model |
| `rtl/dff.sv` | rising-edge flip-flop with Q and Q-bar |
| `rtl/xor_en.sv` | XOR with enable-bar (NOR-2 + AOI-211) |
| `rtl/manchester_encoder.sv` | two XORs and the retiming flip-flop |

Everything except `clock_generator`, and therefore the top `rfid_logic`, is
synthesizable. To put the logic into a standard-cell flow, instantiate
`code_generator` and `manchester_encoder` and supply the three 120° clocks
from your own source. Synthesis tools report the ring in `clock_generator` as
a combinational loop. That loop is the oscillator itself.

Parameters:

* `CODE` (16 bits, on `rfid_logic`, `code_generator` and `rom16`): the
  identifier. Its MSB is sent first.
* `STAGE_DELAY_NS` (on `rfid_logic` and `clock_generator`): the inverter delay.
  The default of 17361 ns gives 3.2 kHz, and 15432 ns gives 3.6 kHz.
* `INV_PER_DELAY` (on `clock_generator`): inverters per delay circuit. The
  default is 3, for a nine-inverter ring.

`rst_n` is an asynchronous, active-low reset that this RTL adds. It clears the
counter and both flip-flops. For a frame that starts cleanly at address 0,
release it just after a falling edge of CLK#1. Tie it high for the reset-free
behaviour of the original circuit. The counter then starts anywhere and the
first frame is partial.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/rfid_pkg.sv tb/tb_rfid_logic.sv --top-module tb_rfid_logic
./obj_dir/Vtb_rfid_logic
```

Replace the testbench name to run another one.

* `tb_rfid_logic` runs the whole tag at its default parameters for three
  frames, which is 30 ms of simulated time and takes about a second. It checks:
  * every half-symbol of the output against the code text;
  * that a reader-side decoder recovers the code from each frame;
  * the 3.2 kHz frequency and the 120°/240° clock lags;
  * the word and bit lines against the address;
  * that the data-0 symbols, data-1 symbols, silent periods and counter wraps
    each occur as often as expected.
* `tb_rfid_logic_powerup` runs the tag at 3.6 kHz (`STAGE_DELAY_NS` =
  15432) with `rst_n` tied high, so every register starts at a random value.
  It checks that every frame after the first counter wrap is exact.
* `tb_manchester_encoder` drives ideal three-phase clocks with random data and
  enable.
* `tb_code_generator` checks the address, decoder, ROM and register timing
  edge by edge.
* `tb_clock_generator` measures the period, duty cycle and phase of the model.
* `tb_counter5`, `tb_decoder2to4`, `tb_rom16`, `tb_dff` and `tb_xor_en` test
  the leaf cells. The ROM testbench also checks a second, arbitrary code.

## Departures from the original circuit

* **Gate level versus RTL.** The flip-flop was a static six-NAND circuit, and
  all gates were ratioed NMOS with diode-connected loads. Here they are
  behavioural RTL with the same logic functions. Transistor sizing, noise
  margins, power (170 uW at 6 V), area and transistor count (222) have no
  counterpart in the RTL.
* **Clock edges, active-high lines and the reset** are choices made here. The
  original description gives none of them. See the edge assignment above.
* **Clock model.** Every inverter has the same fixed delay, and the frequency
  does not depend on the supply voltage. The measured tag ran at 3.2 kHz at
  6 V and needed at least 5.4 V. Circuit simulation of the same design gave
  3.6 kHz.
* **Not included:** the antenna, the rectifier that produces VDD, the
  modulation transistor (driven by `rfid_out`) and the reader. These are
  analog parts outside the logic.
