# MUROS2 FPGA: PC-to-Medipix2 control and data acquisition

The Medipix2 is a photon-counting pixel readout chip (256 x 256 pixels,
851968 bits of counter data per chip). Up to eight of them sit in a daisy
chain on a chipboard and talk over a single serial link: data, clock and a
token in each direction. A PC with a general-purpose parallel digital I/O
card cannot drive such a link itself. The MUROS2 interface board sits
between the two, and an FPGA on it does all the digital work:

- it converts 16-bit words on the PC's parallel bus into the 1-bit serial
  stream the chips load their configuration from, and the chips' serial
  counter data back into 16-bit words;
- it holds the board's control registers: converter codes, chip operation
  mode, extra I/O and a firmware version;
- it generates the chips' shutter in five acquisition modes, including a
  continuous "movie" mode that runs exposures and readouts without the PC;
- it generates the digital train that switches the analog test pulse.

This repository is synthesizable SystemVerilog for that FPGA, plus
self-checking testbenches and a behavioural model of the chip chain. The
block structure, the clocking scheme, the register count, the shutter modes
and the link's signal set follow the published MUROS2 design. Protocol
details that the description leaves open were filled in here and are
flagged below as this design's choices.

## Rate matching: one clock, three frequencies

A board oscillator (7-30 MHz, `clk_main_i`) is the only time base:

| clock | frequency | made by | used for |
|---|---|---|---|
| `pc_clk_o` | f / 2 | `clk_div2` (toggle flip-flop) | PC bus, 16 bits per cycle; control, registers, shutter |
| `clk_ser_i` | 8 f | FPGA PLL (vendor primitive, outside this RTL) | serial link, 1 bit per cycle; also sent to the chips as `mpx_clk_in_o` |
| `mpx_clk_out_i` | 8 f, delayed | returned by the chip chain | sampling the chips' data |

The PC side moves 16 bits per f/2 cycle and the serial side 1 bit per 8f
cycle. Both are 8 bits per main-clock cycle, so neither side has to wait
for the other in steady state. At f = 20 MHz the link runs at 160 Mbit/s,
and one chip reads out in 851968 / 160 MHz = 5.3 ms. The FIFOs between the
sides only absorb start-up latency and short PC stalls. They never hold a
whole frame, which is why a 512-word FIFO can stream a full 8-chip readout
of 425984 words.

Incoming chip data are sampled with the clock that comes back from the
chain, not with the clock the FPGA sends. Cable delay and chip-to-chip
delay therefore shift data and clock together and do not matter. The
receive side is a separate clock domain and crosses to the PC clock
through a dual-clock FIFO.

## The serial link and the token

Six single-ended signals go to external LVDS transceivers: `mpx_clk_in_o`,
`mpx_data_in_o` and `mpx_token_in_o` towards the chips, and
`mpx_clk_out_i`, `mpx_data_out_i` and `mpx_token_out_i` back from them. A
chip may move data only while it holds the token. The other chips in the
chain pass data through.

This is the part where the RTL commits to protocol details of its own. The
chip side is captured in `tb/medipix2_chain_model.sv`:

- **Bit timing.** The FPGA changes `mpx_data_in_o` and `mpx_token_in_o`
  on the rising edge of the serial clock. The chips sample them on the
  falling edge and drive their own data on the falling edge too. The FPGA
  samples the returned data on the rising edge of `mpx_clk_out_i`, in the
  middle of the bit. Words travel most significant bit first.
- **Load (PC to chips).** The `START_WR` command puts the control block in
  load mode. The serializer then takes words from the TX FIFO and raises
  `mpx_token_in_o` on exactly those serial cycles that carry a valid bit.
  If the PC falls behind and the FIFO runs dry, the token drops and the
  chips pause. The load ends when the chain raises `mpx_token_out_i`,
  after the last chip has taken its bits.
- **Readout (chips to PC).** The `START_RD` command, or the shutter block
  in continuous mode, holds `mpx_token_in_o` high. The chips shift their
  counters out one after another. The returned clock is assumed to run
  only while a chip is driving valid data, so every rising edge carries
  one bit. The readout ends when `mpx_token_out_i` rises. The control
  block then drops the token and pulses `readout_done`.
- **Re-arming.** The chain re-arms when the token drops after a readout,
  when its mode lines change, or when a reset line is raised (`MPX_CTRL`
  bits 1:0 and 2 in the testbench).

A transfer starts only while the shutter is closed, because the chips
cannot be read while they count. It also waits until the token output of
the previous transfer has fallen. A command that arrives otherwise is
ignored; a readout request from the shutter block is kept until it can
start.

## The PC interface

The PC card supplies 16 data lines, synchronous to `pc_clk_o`, and 16
control lines that are asynchronous to it. Here the control lines are
split into eight inputs (`pc_ctrl_i`) and eight status outputs
(`pc_status_o`). The line assignment is this design's.

`pc_ctrl_i`:

| bit | meaning |
|---|---|
| 3:0 | register address or command code |
| 4 | write strobe: its rising edge writes the data word to the address, or runs the command |
| 5 | register read: the addressed register is driven on the data bus (valid from the 4th cycle on) |
| 6 | TX stream: one data word per PC clock goes into the serializer FIFO |
| 7 | RX stream: one word per PC clock is popped from the deserializer FIFO, if one is there |

The control lines pass a two-flop synchronizer. `data_mux` delays the
incoming data bus by the same two cycles, so a word and the control
setting that goes with it stay together. When streaming, the PC puts one
word per clock on the bus while bit 6 is high. When reading, it takes the
data bus on every clock where `RX_VALID` is high.

`pc_status_o`: 0 `RX_VALID` (the data bus holds a fresh chip word), 1
`RX_EMPTY`, 2 `TX_FULL`, 3 `BUSY` (a chip transfer is running), 4 shutter
open, 5 RX overflow (sticky), 6 TX overflow (sticky), 7 acquisition
sequence running.

Registers (`muros2_pkg`). There are twelve, all 16 bits wide; the count
and their purposes come from the original design, the map is this
design's:

| addr | name | contents |
|---|---|---|
| 0 | CONFIG | [0] shutter bit, [3:1] acquisition mode, [4] test pulse enable, [5] external trigger for continuous mode, [15:8] test pulse half period |
| 1, 2 | TIMER_LO/HI | exposure length in PC-clock cycles (32 bits) |
| 3 | FRAMES | exposures in continuous mode |
| 4 | MPX_CTRL | chip operation-mode lines, `mpx_ctrl_o` |
| 5-8 | DAC_BIAS, DAC_EXT, DAC_TP_HI, DAC_TP_LO | converter codes, brought out in parallel |
| 9 | ADC | loaded with each ADC result (`adc_valid_i`), also writable |
| 10 | EXTRA_IO | drives `extra_io_o` |
| 11 | VERSION | read-only, 0x0201 |

Addresses 12, 13 and 14 are the commands `START_WR`, `START_RD` and
`ABORT`. They are issued with the write strobe.

## Shutter and acquisition modes

The shutter (`mpx_shutter_o`) is high when closed, with the counters
frozen and readout allowed, and low when open, with the counters counting.
`shutter_test` runs one of five modes, selected by `CONFIG[3:1]`:

| mode | opening | closing |
|---|---|---|
| 0 manual | `CONFIG.shutter` = 1 | `CONFIG.shutter` = 0 |
| 1 timed | a write of CONFIG with shutter = 1 | after TIMER cycles |
| 2 external | external input high | external input low |
| 3 external timed | rising edge of the external input | after TIMER cycles |
| 4 continuous | a write of CONFIG with shutter = 1 | after FRAMES exposures |

In continuous mode each exposure lasts TIMER cycles and ends with an
automatic readout request. The next exposure starts when the readout is
done. The PC only has to keep reading data. With `CONFIG[5]` set, each
exposure instead waits for a rising edge of the external input. Writing
CONFIG with shutter = 0 aborts a timed or continuous run.

Timed exposures are exact: the shutter stays open for TIMER cycles of
the PC clock. The external input enters through the control block, as in
the original block diagram. It is synchronized there, which adds two
cycles.

**Test pulses.** Two DACs on the board set the high and low levels of an
analog test pulse. An analog switch near the chips toggles between them,
driven by `tp_switch_o`. While `CONFIG[4]` is set and the shutter is open,
`tp_switch_o` is a square wave with `CONFIG[15:8]` cycles per half period,
starting low. Gating the train with the shutter is this design's choice.

## Files

`rtl/`:

- `muros2_fpga.sv` is the top. It instantiates the blocks below.
- `muros2_pkg.sv` holds the register map, the command codes, the control
  and status bit positions, the CONFIG struct and the mode enum.
- `control.sv` synchronizes the control lines and the external shutter
  input, decodes writes and commands, sequences transfers and drives the
  status lines.
- `data_mux.sv` aligns incoming data and steers the outgoing bus.
- `register_bank.sv` holds the twelve registers and emits the shutter
  start/stop pulses.
- `shutter_test.sv` runs the five modes and the test pulse train.
- `tx_serializer.sv` is the TX FIFO plus the 16-to-1 shifter and token
  output. The control block decides when the token goes high. The
  flip-flop that drives the pin sits here on the serial clock, because
  during a load the token marks which bits are valid.
- `rx_deserializer.sv` is the 1-to-16 shifter plus the RX FIFO.
- `async_fifo.sv` is a dual-clock Gray-pointer FIFO with
  first-word-fall-through reads.
- `sync_2ff.sv` is the synchronizer and `clk_div2.sv` the PC clock
  divider.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`),
plus:

- `muros2_system_tb.sv`, an end-to-end harness that plays the PC card;
- `tb_muros2_fpga.sv`, which runs it with 2 chips of 512 bits and a
  16-word RX FIFO;
- `tb_muros2_full.sv`, which runs 8 full-size chips at the default
  parameters: one load and one readout;
- `tb_muros2_movie.sv`, which runs the whole end-to-end scenario with
  8 full-size chips, including three continuous frames;
- `medipix2_chain_model.sv`, `pll_clock_model.sv` and `tb_mpx_pkg.sv`,
  which hold the chip chain model, the clocks, and the reference data and
  chip mode codes.

Parameters: `muros2_fpga` has `TX_FIFO_DEPTH` and `RX_FIFO_DEPTH` (512
words each, powers of two). The original design only says the FIFO depth
is set when the FPGA is programmed.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_muros2_fpga -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/muros2_pkg.sv tb/tb_mpx_pkg.sv tb/tb_muros2_fpga.sv
obj_dir/Vtb_muros2_fpga
```

Replace `tb_muros2_fpga` with any other `tb_*` module. `tb_muros2_full`
moves 6.8 Mbit each way and takes a few seconds. `tb_muros2_movie` takes
about half a minute.

The end-to-end test exercises, and counts, each of these:

- register write and read-back, including the read-only VERSION;
- the ADC and DAC paths;
- a back-to-back chain load and one with pauses;
- a readout checked word by word, with its duration checked against one
  serial clock per bit;
- a readout refused while the shutter is open;
- a 3-frame continuous acquisition while the PC only reads;
- test pulses in a timed exposure;
- an externally triggered timed exposure;
- an RX FIFO overflow.

The block testbenches check cycle-exact exposure lengths, gap-free
serialization at the matched rate, FIFO full, empty and overflow, and the
command rules of the control block.

## Limits and departures

- Not in this RTL are the parts with no logic of their own: the PLL, the
  oscillator, the LVDS and level-translator chips, the DACs and ADC, the
  analog test pulse switch and the power regulators. DAC codes leave as
  parallel 16-bit values and the ADC result enters as a value with a
  strobe, because the converter chips' serial interfaces are not known.
- The extra I/O connector has 32 lines. Only 16 outputs, from one
  register, are provided.
- The chip-side protocol is modelled, not taken from a Medipix2
  datasheet. This covers the token as a bit qualifier during loads, the
  gated return clock, the bit order and the re-arm rules. Check it against
  the real chip before use.
- The exposure timer counts PC-clock cycles. Which clock the original
  timer counts is not known.
- Resets are asynchronous. The board is expected to release the reset
  synchronously; no reset synchronizer is included. The RX FIFO's sticky
  overflow is cleared only by reset.
- Timing closure at 160 MHz has not been checked. Nor has the target
  FPGA's own RAM and PLL mapping: the original board used a 20K100E-class
  device.
- The original description quotes both a reliable rate of about
  160 Mbit/s and a minimum readout time of 5.734 ms per chip. These two
  figures do not agree: at 160 Mbit/s a chip takes 5.325 ms. This design
  moves one bit per serial clock, so its readout time is
  851968 / f_ser.
