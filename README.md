# ETROC1 readout logic in SystemVerilog

ETROC1 is a prototype front-end chip for timing detectors built from small
sensor pads. Each pixel amplifies the sensor pulse, discriminates it, and
measures three times with a time-to-digital converter (TDC): time of arrival
(TOA), time over threshold (TOT), and a calibration reading (Cal). Together
they form one 30-bit word per 25 ns bunch crossing. The chip holds three
independent blocks, each with its own pads:

* **The 4x4 pixel array.** It has 16 pixels, two I2C slow-control slaves, a
  clock generator, per-pixel hit buffers, and two readout schemes that share
  one 1.28 Gb/s serial link.
* **The standalone pixel.** One full pixel with its own I2C slave, clock
  generator and serial link.
* **The TDC test block.** A bare TDC with its own I2C slave, strobe
  generator, serial link, and monitor registers that read the TDC internals
  back over I2C.

This repository is the digital part of all three. The analog circuits are
not modelled: preamplifier, discriminator, threshold DAC, charge injection,
the TDC core itself, the fine-phase DLL, the differential receivers and the
CML drivers. They appear as ports instead:

* TDC words and discriminator outputs come in.
* The voted configuration bytes that would steer those circuits go out.

## How the pieces fit

```
etroc1_top
├── etroc1_array          (ports *_a)
│   ├── i2c_slave  x2     slave A {00000,A1,A0}, slave B {11111,A1,A0}
│   ├── clock_gen         clk_divider, phase_shifter_coarse, tdc_strobe_gen
│   ├── pixel_digital x16 ro_test_ctrl + hit_buffer (256 x 30) + diagnostic output register
│   ├── sro_controller    simple-readout frames
│   └── dmro              scrambler / PRBS7 / 32:1 serializer
├── etroc1_standalone     (ports *_s): i2c_slave 7'b1001110, clock_gen, ro_test_ctrl, dmro
└── etroc1_tdc_test       (ports *_t): i2c_slave {010001,A0}, clk_divider, tdc_strobe_gen,
                                       tdc_mon_regs, dmro
```

`etroc1_pkg` holds the shared constants, word types and the three functions
the datapath is built on:

* `scramble30` is the scrambler;
* `prbs7_word` is the PRBS7 generator;
* `sro_order` gives the pixel readout order.

Pixel numbering is used everywhere: pixel index = 4 x column + row.

## Pixel data and the test pattern

Each array pixel gets a 30-bit TDC word per 40 MHz clock, laid out as
TOT[8:0] | TOA[9:0] | Cal[9:0] | hit. `ro_test_ctrl` can replace that word
by a test pattern:

* `{10'b1010101010, tag[3:0], counter[15:0]}`;
* the 16-bit counter advances by one each clock;
* the tag identifies the source.

The pattern is selected by `enableMon` (REG_B 0x00 bit 1). In the array,
each pixel's tag is the low four bits of its own threshold code VTHIn, so a
test can tell the pixels apart. In the standalone pixel the tag is likewise its
VTHIn[3:0] (register 0x0E[3:0]). With the pattern on, a dropped, repeated or swapped word shows up
as a gap in the counter. The testbenches rely on this.

## Simple readout: frames on L1ACC

The hardest part of the design is the interplay between the free-running
buffers and the frame controller.

**Capture.** All 16 hit buffers share one write enable and one address from
`sro_controller`. Outside a frame, WE is high and the address advances every
40 MHz clock. Each buffer therefore always holds the last 256 words of its
pixel. A 12-bit BCID counter runs alongside and is cleared by BC0.

**Trigger.** On the first clock that samples L1ACC high, the controller
does three things:

* it drops WE, which freezes every buffer;
* it latches the 16-bit ROI mask (REG_A 0x1E/0x1F);
* it sends the start-of-frame word `{18'h25555, BCID}`.

The BCID at that edge is the frame's L1ACC_ID. With BC0 and then L1ACC five
clocks later, the ID is 4.

**Body.** The controller walks the ROI in the fixed order 15, 11, 7, 3, 14,
10, 6, 2, 13, 9, 5, 1, 12, 8, 4, 0. That is, column 3 first, top row first
within a column. For each enabled pixel, it does two things:

* it enables the output of that pixel's row;
* it selects that pixel's column bus for 256 clocks.

The address keeps counting through the frame. Each buffer is therefore read
once round, starting with its oldest word.

**Trailer.** EOF `30'h2EADBEFF` follows the last word. Then WE goes high
again and capture resumes.

A frame is `2 + 256 x popcount(ROI)` words long:

* ROI `16'h9201` (pixels 15, 9, 12, 0) gives 1026 words;
* the full ROI gives 4098 words.

L1ACC is ignored while a frame is being sent. Between frames, the
simple-readout output word is 0.

RO_SEL (REG_A 0x07 bit 6) chooses what feeds the serializer: the frame
stream (1) or the diagnostic stream (0).

## Diagnostic readout

In diagnostic mode one pixel streams continuously, one word per clock. Two
fields of REG_A 0x07 choose the pixel:

* OE_DMRO_Row[3:0] enables one row of pixel output registers;
* DMRO_COL[1:0] picks one of the four OR-ed column buses.

Setting more than one row bit is invalid: those rows are OR-ed together.

## The serial link (`dmro`)

Every 25 ns the transmitter sends one 32-bit word at 1.28 Gb/s, MSB first.
In normal mode the word is the header `2'b10` followed by the 30 data bits.

* **Scrambling.** The data bits are scrambled with the self-synchronising
  polynomial X^58 + X^39 + 1. The scrambler runs in serial order, bit 29
  first: `out = in ^ s[38] ^ s[57]`, and `out` is shifted into `s`. The
  header is not scrambled, so a receiver aligns on it and then descrambles
  without knowing the scrambler state.
* **Controls.**
  * `en_scr = 0` sends the data in the clear behind the same header.
  * `test_mode = 1` replaces the words by a continuous PRBS7 sequence
    (x^7 + x^6 + 1). Each bit is the XOR of the bits 6 and 7 positions
    earlier, with no header.
  * `rev_clk = 1` latches the input on the falling edge of the word clock
    instead of the rising edge. The latch clock is `clk_word ^ rev_clk`.
  * `rev_data = 1` reverses the bit order of the input word.
* **Timing.** The input is latched on one word-clock edge. The 32-bit word is
  formed on the next. The 1.28 GHz serializer loads it one or two bit clocks
  after that, when it sees the word-clock edge through a two-flop sampler.
  The word clock must be exactly 1/32 of the bit clock, at any phase.
* **Reset.** Reset asserts asynchronously and releases on the first rising
  word-clock edge. Pulse the reset after every change of `rev_clk`.

## Clocks

`clock_gen` builds the array and standalone clocks from the 1.28 GHz input:

* **`clk_divider`** is a 5-bit counter. Its 40 MHz output is bit 4. Its
  320 MHz output is the inverted bit 1, so both rise together.
* **`phase_shifter_coarse`** is a second 5-bit counter at 1.28 GHz. On each
  rising edge of the divider's 40 MHz clock it is loaded with
  PhaseAdj[7:3]. Its outputs are therefore phase-shifted 40 and 320 MHz
  clocks, in steps of 781.25 ps over the whole 25 ns.
  * The shifted 40 MHz clock rises 2 + ((16 - delay) mod 32) bit clocks after
    the divider's edge.
  * While the delay is steady the reload does not change the count, so the
    outputs do not glitch. A new delay takes effect at the next 40 MHz edge.
  * The 97.6 ps fine step of PhaseAdj[2:0] belongs to the analog DLL and is
    ignored.
* **`tdc_strobe_gen`** makes the TDC reference strobe. A chain of nine flops
  on the falling 320 MHz edge delays the 40 MHz clock and cuts each 25 ns
  period into eight 3.125 ns slots. Slot k is enabled by bit (k+1) mod 8 of
  the select byte and gated with the high half of the 320 MHz clock. The
  default `8'b00000011` gives two pulses per 40 MHz period.
  * Its delayed 40 MHz output (the last flop) is the TDC's 40 MHz clock.
* **Bypasses and test output.**
  * TestCLK0 replaces the phase shifter output by the off-chip 40/320 MHz
    clocks.
  * TestCLK1 bypasses the strobe generator.
  * CLKOutSel puts either the 40 MHz clock or the strobe on the test clock
    pad.

The readout logic runs on the 40 MHz clock after the TestCLK0 mux. The I2C
slaves run on the divider's 40 MHz clock. These muxes are plain
combinational clock muxes: change them only while the logic they clock is
in reset.

The TDC test block has no phase shifter. It uses five bits of its register
0x05 to choose its clocks:

* divider or external clocks for the logic;
* internal or external clocks for the strobe generator;
* the serial data or the strobe for its output pad.

## Slow control (`i2c_slave`)

All four slaves are the same module. It has 32 configuration bytes at
0x00-0x1F that the host writes and the chip uses. Each byte is held in three
copies that are always written together, and the chip sees their bitwise
majority, so one upset flop changes nothing. The other addresses are
read-only:

* 16 status bytes at 0x20-0x2F;
* `{chip ID, revision}` at 0x30.

**Protocol.**

* A write is START, device address + W, register pointer, then data bytes.
  The pointer auto-increments.
* A read starts at the current pointer, usually after a pointer write and a
  repeated START, and ends on the master's NACK.

**Electrical.**

* SDA is open drain: `sda_oe = 1` pulls it low.
* SCL and SDA are oversampled by the slave's clock, so SCL must stay below
  roughly a tenth of that clock. The chip-level testbenches run SCL at 2 MHz against
  40 MHz.

**Power-up values.** Every configuration byte resets to the register-table
default (`REGA_DEFAULT` and the others in the package):

* ROI = 16'hFFFF;
* RO_SEL = 0, the diagnostic readout;
* the scrambler on;
* CLKOutSel = 1, the strobe on the test pad.

**Status bytes.** Slave A reports the DLL lock flag in 0x20 bit 0. The TDC
test block maps its TDC monitor signals onto 0x20-0x2E (`tdc_mon_regs`).
TDCRawData_Sel (0x0B bit 0) chooses between two views:

* the Cal view, with the decoded codes;
* the TOA/TOT raw view.

**Register maps.** The three register maps differ. The bits the digital
logic uses are these:

| block | register | bits |
|---|---|---|
| array, slave A | 0x04 | EN_DiscriOut: [7:4] row, [3:0] column |
| array, slave A | 0x07 | OE_DMRO_Row[3:0], DMRO_COL[5:4], RO_SEL[6] |
| array, slave A | 0x0A-0x1D | VTHIn, 10 bits per pixel |
| array, slave A | 0x1E-0x1F | ROI |
| array, slave B | 0x00 | bit 1 enableMon |
| array, slave B | 0x04 | PhaseAdj |
| array, slave B | 0x05 | RefStrSel |
| array, slave B | 0x06 | ENScr, REVCLK, REVData, TestMode, TestCLK0, TestCLK1, CLKOutSel (bits 0-6) |
| standalone | 0x00 | bit 1 test pattern |
| standalone | 0x04, 0x05 | PhaseAdj, RefStrSel |
| standalone | 0x06 | DMRO reset, ENScr, REVCLK, REVData, TestMode, TestCLK0, TestCLK1, CLKOutSel (bits 0-7) |
| standalone | 0x0E[3:0] | test tag (VTHIn[3:0]) |
| standalone | 0x0F bit 3 | EN_DiscriOut, gates the DiscriOut pad |
| standalone | 0x0F bit 6 | OE_DMRO |
| TDC test | 0x04 | ro_testmode[3], ro_enable[4], ro_reverse[5], ro_resetn[6], ro_revclk[7] |
| TDC test | 0x05 | Dataout_Sel[0], Clk320M_Psel[1], Clk40M_Psel[2], Clk320M_Sel[3], Clk40M_Sel[4] |
| TDC test | 0x06 | pulse select |
| TDC test | 0x0B bit 0 | TDCRawData_Sel |

All other bytes are kept and brought out on the `cfg*` ports for the analog
blocks.

In the array, EN_DiscriOut routes one pixel's discriminator to the DiscriOut
pad. The output stays low unless exactly one column bit is set.

## Interpretations and departures

These are the places where the source description was unclear or
self-contradictory, and what this RTL does:

* **Buffer address width.** A block diagram labels the buffer address with
  four bits, but the buffers are 256 deep. The address is 8 bits.
* **Pixel numbering in the ROI example.** One worked ROI example names pixel
  coordinates that disagree with the pixel index map. The RTL follows the
  map (index = 4 x column + row) and the printed readout order.
* **Word width.** An older diagram shows 32-bit frame words. The 30-bit
  format is used, with the 18-bit SOF header and 30-bit EOF, which matches
  the serial link.
* **Which input-latch edge.** One sentence says the serializer latches its
  input on the falling word-clock edge. The REVCLK description says rising
  by default and falling when reversed. The RTL follows the REVCLK
  description and uses REVCLK, not REVData, as the selector.
* **TestMode polarity.** The standalone register table describes TestMode
  with "== 1" for both modes. The array table's version is used: 0 is
  normal, 1 is PRBS7.
* **REVData / ro_reverse.** These are implemented as a bit-order reversal of
  the 30-bit input word.
* **The TDC test block's scrambler.** This block has no scrambler-enable
  bit, so its scrambler is always on.
* **Details this design chose** where the source is silent:
  * chip ID and revision at 0x30, with values 1 and 0;
  * the I2C pointer protocol;
  * oversampled I2C;
  * L1ACC ignored during a frame;
  * ROI sampled at L1ACC;
  * the scrambler reset state (0) and the PRBS7 seed (all ones);
  * the source of the per-pixel test tag in the array (VTHIn[3:0]);
  * the mapping of strobe select bits to slots;
  * asynchronous active-low resets everywhere.

## Simulating

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`):

* it drives random or swept stimulus;
* it checks against values computed in the bench;
* it prints `TB_RESULT checks=N failures=M`.

Shared bench code:

* `tb/i2c_master_bfm.sv` is a bit-banged I2C master;
* `tb/ser_rx.sv` is an independent link receiver. It finds the header
  phase, descrambles, and reports header errors.

The benches use a scaled time base: the 1.28 GHz clock has a period of 2
units and 40 MHz has 64. Only the ratios matter.

`tb_etroc1_top` runs the whole chip at its real sizes. It runs these
operations:

* configuring the array over I2C;
* two complete simple-readout frames, ROI 16'h9201 (1026 words, L1ACC_ID 4)
  and the full ROI (4098 words);
* diagnostic readout of a random pixel;
* the standalone pixel's data and test streams;
* a monitor readback and data stream from the TDC test block.

It counts each mechanism and fails if one never happened. It takes about
ten seconds.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/etroc1_pkg.sv tb/tb_etroc1_top.sv --top-module tb_etroc1_top -Mdir obj_top
obj_top/Vtb_etroc1_top +verilator+rand+reset+2
```

Replace `tb_etroc1_top` by any other bench name to run that one. The other
benches are:

| bench | what it checks |
|---|---|
| `tb_etroc1_array` | register defaults, frames, diagnostic and TDC streams, PRBS7, discriminator select |
| `tb_etroc1_standalone` | defaults and ID, data and test streams, OE_DMRO, scrambler off, PRBS7, DMRO reset, DiscriOut gate |
| `tb_etroc1_tdc_test` | defaults, address pin, both monitor views, data, PRBS7, strobe pulse counts, reset |
| `tb_sro_controller` | frame contents, order, length and L1ACC_ID for several ROIs |
| `tb_dmro` | word spacing, both latch edges, bit reversal, scrambler on/off, PRBS7 period |
| `tb_i2c_slave` | protocol, defaults, status, ID, NACK on other addresses, an upset register copy out-voted |
| unit benches | divider, phase shifter (output edge for every delay), strobe generator (every slot), clock muxes, hit buffer, test pattern, pixel |

All RTL is synthesizable except the clock muxes, which are combinational
stand-ins for the chip's clock-mux cells.
