# Wavelet video codec board: DMA and transmission FIFO logic

A wavelet video codec (here the ADV601) compresses a PAL video field by
field. Its output does not come at a steady rate. It arrives in bursts, and the
amount per field depends on the picture content. The channel that carries the
stream is different: a fixed-rate telecom tributary (G.703, 8 to 50 Mbit/s,
carried for example in an SDH VC3 container of about 48 Mb/s). This board
connects the two with three pieces of logic:

* a **DMA controller** that empties the codec's host port in fast bursts (one
  16-bit word per three 27 MHz clocks, 144 Mbit/s). It shares that port with
  the DSP that programs the codec.
* a large **transmission FIFO** (256k x 16 words of external SRAM per
  direction) that turns the bursts into the channel's constant rate.
* a **DSP** that keeps the long-term compressed rate equal to the channel
  rate. Every field it adjusts the codec's quantisation (bin widths). This is
  software and is not part of this RTL.

The board is full duplex. The compression path (PAL decoder, ADV601 in
compression mode, DMA, TXF, line) and the decompression path (line, RXF, DMA,
ADV601 in expansion mode, PAL encoder) run independently. The RTL here is the
programmable logic of the board. It is split the way the board is split: a
DMA FPGA (`ijs_fpga`), a FIFO/line FPGA (`tr_fpga`), a small address-decoder
FPGA (`xlx_small`) and the video bus buffers (`video_bus_switch`). The top
module `wavelet_board_top` wires them together.

```
            DSP bus (A, D, RD, WR)
                 |            \
             xlx_small ------- ijs_fpga ------------------------------ tr_fpga ------- line
            (XLX_CS,VIN_OE,    dma_regs                                 sram_fifo TXF   (tx_slot,
             VLB_OE)           tx_dma_fsm  <- CMPR host port  -> TXF_*   sram_fifo RXF    tx_data,
                               rx_dma_fsm  -> XPND host port  <- RXF_*   telecombus_if    rx_data)
                                                                          |        |
                                                                      TXF SRAM  RXF SRAM
   PAL decoder -> video_bus_switch -> compressor        expander -> video_bus_switch -> PAL encoder
```

Everything runs on one clock, the 27 MHz codec clock. Reset is synchronous and
active high. All signals are active high. The bidirectional buses of the real
board (codec data, SRAM data) appear as separate `*_out`/`*_in` signals with a
drive enable, so the logic simulates on a two-state simulator.

## The compression-path DMA state machine

`tx_dma_fsm` is the core of the design. It owns the compressor's host port and
has three jobs:

1. move compressed words from the codec to TXF, as fast as possible;
2. run DSP reads of codec registers (the DSP reads the field size and the
   field statistics every field);
3. run DSP writes of codec registers (the new bin widths every field).

A DSP access may arrive in the middle of a burst, so it is latched first and
served when the burst ends. If a read and a write are pending together, the read goes first. The state
machine has a waiting state and three loops:

```
TXS0 -> TXS1                on TX_DMA_Q
TXS0 -> TXR0                on !TX_DMA_Q & CMPR_RD_TMP
TXS0 -> TXW0                on !TX_DMA_Q & CMPR_WR_TMP
TXS0 -> TXS0                otherwise
TXR0 -> TXR1 -> TXR2        TXR1 waits for CMPR_ACK_Q; TXR2 waits for !CMPR_RD_TMP, then TXS0
TXW0 -> TXW1 -> TXW2        TXW1 waits for CMPR_ACK_Q; TXW2 waits for !CMPR_WR_TMP, then TXS0
TXS1 -> TXS2 -> TXS3 -> TXS4
TXS4 -> TXS4                on !TX_ACK_Q
TXS4 -> TXS2                on TX_ACK_Q & TX_DMA_Q
TXS4 -> TXS5 -> TXS0        on TX_ACK_Q & !TX_DMA_Q
```

The states and transitions are those of the original design. The actions in
each state are this implementation's choice:

| state | host port | FIFO side | leaves when |
|---|---|---|---|
| TXS0 | idle | – | TX_DMA_Q (burst), else a pending DSP read, else a pending DSP write |
| TXS1 | CS, address = compressed-data register | – | always |
| TXS2 | CS, RD; word captured at the clock edge | – | always |
| TXS3 | CS | TXF_WR with the word | always |
| TXS4 | CS | TXF_WR again until TX_ACK_Q | TX_ACK_Q: to TXS2 if TX_DMA_Q, else to TXS5 |
| TXS5 | CS (burst end) | – | always |
| TXR0/TXW0 | CS, DSP's register address (and data) | – | always |
| TXR1/TXW1 | RD / WR held | – | CMPR_ACK_Q (read data captured) |
| TXR2/TXW2 | CS, strobe released; result held for the DSP | – | the DSP request flag drops |

Timing inside a burst:

* `*_Q` signals are the registered copies of the inputs. TX_DMA_Q is
  registered `TX_EN & HIRQ & !TXF_F`. HIRQ is read as "compressed data
  available". TX_ACK_Q is the registered TXF acceptance. CMPR_ACK_Q is the
  registered codec acknowledge.
* TXF accepts a word in the cycle it is offered (`txf_ack` is combinational on
  `txf_wr`). So in an unstalled burst TX_ACK_Q is already 1 in the first TXS4
  cycle, and the loop TXS2, TXS3, TXS4 takes exactly three clocks per word:
  27 MHz / 3 x 16 bit = 144 Mbit/s. A single-word transfer runs the longest
  loop, the six states TXS0 to TXS5.
* If TXF cannot take the word, TXS4 keeps offering it. TXF_WR in TXS4 is
  `!TX_ACK_Q`, so the word that was accepted one cycle earlier is never
  offered twice.
* TX_DMA_Q, as seen in TXS4, was sampled one clock after the codec read of
  the current word. It therefore already reflects that word's removal, so a
  burst stops exactly when the codec runs out of data.

The codec's compressed data are read without waiting for its acknowledge. A
burst relies on the codec returning data within the RD clock. Only register
accesses wait for ACK.

## The decompression-path DMA

`rx_dma_fsm` mirrors the compression path, and its exact states are this
implementation's. RXS1 selects the compressed-data register. RXS2 asks RXF
for a word. RXS3 repeats the request until RX_ACK_Q. RXS4 writes the word
into the expander, then returns to RXS2 while RX_DMA_Q holds (registered
`RX_EN & HIRQ & !RXF_E`, with HIRQ read as "expander ready"). A burst word
again costs three clocks. The DSP read and write loops RXR0 to RXR2 and RXW0
to RXW2 are the same as in the compression path.

## DSP access: registers and the request latches

The DSP reaches the board through a 16-bit data bus. `xlx_small` decodes its
I/O address. I/O page 0x000 to 0x0FF raises XLX_CS for the DMA FPGA, which
sees only A0 to A7. Address 0x100 is the video control register (bit 0
VIN_OE, bit 1 VLB_OE; after reset VIN_OE=1 and VLB_OE=0).

Inside the DMA FPGA, `dma_regs` decodes A0 to A7:

| address | register |
|---|---|
| 0x00 to 0x03 | compressor host registers (codec A0 to A1 = DSP A0 to A1) |
| 0x04 to 0x07 | expander host registers |
| 0x10 | CTRL: bit 0 TX_EN, 1 RX_EN, 2 LOOPBACK, 3 FIFO_RST, 4 IRQ_EN |
| 0x11 | STATUS: [2:0] TXF {F,H,E}, [5:3] RXF {F,H,E}, 8 line underflow, 9 RXF overflow, 10 TXF full (sticky bits, write 1 to clear) |

CTRL and STATUS answer at once (`dsp_ack` in the same cycle). A codec
register access sets a request flag (CMPR_RD_TMP, CMPR_WR_TMP, XPND_RD_TMP,
XPND_WR_TMP) at the start of the DSP strobe. The state machine serves it when
no burst is running. `dsp_ack` rises when the state machine reaches TXR2/TXW2
(or RXR2/RXW2). The flag drops once the DSP has released its strobe. This
needs the DSP to stretch its access until `dsp_ack`, which can take as long as
the burst that is running. `dsp_irq` is raised while a sticky exception
bit is set and IRQ_EN is 1. The DSP software handles FIFO overflow and
underflow from there. The register map, the bits and the acknowledge
handshake are this implementation's choices.

## Transmission FIFOs in external SRAM

`sram_fifo` keeps a FIFO of 2^AW words (AW=18: 256k x 16) in one single-port
asynchronous SRAM. It does at most one SRAM access per clock. Each access is
one clock long: address, CS and OE for a read, sampled at the next edge; or
address, CS, WE, UB, LB and data for a write. Two one-word registers decouple
the sides:

* the **write register** takes a word in the cycle `wr` is raised (`wr_ack`).
  It can do so if it is free, or if it is being written to the SRAM in that
  cycle.
* the **output register** is refilled from the SRAM whenever it is empty.
  `rd` is acknowledged in the same cycle while it holds a word.

A write-back and a refill that both want the SRAM alternate. Full capacity is
therefore 2^AW + 2 words. The flags are: F when the SRAM holds 2^AW words;
H when the FIFO holds at least half of that; E when the FIFO holds nothing.
`tr_fpga` holds one FIFO for TXF and one for RXF. The FIFO reset from CTRL
empties both.

## Line interface, loop-back and FIFO exceptions

`telecombus_if` is the fixed-rate side. The line's rate comes from outside as
strobes:

* `tx_slot` pulses once per 16-bit word the channel can carry. If the
  prefetch register holds a word, that word appears on `tx_data` with
  `tx_valid=1` one clock later. If TXF has run dry, the slot stays empty and
  `tx_under_evt` pulses (underflow).
* Each `rx_slot` word waits in a one-word register until RXF takes it. A word
  that arrives while the register is still occupied is lost, and
  `rx_over_evt` pulses (overflow).
* With LOOPBACK set, each transmitted word goes to the receive side instead
  of the line. The whole board then runs compressor to TXF to RXF to expander
  without a line.

Slot strobes, the valid flag (instead of fill words) and the place of the
loop-back are this implementation's choices. The framing of the telecom bus
is not modelled.

## Video buffers

`video_bus_switch` models the board's registered bus drivers around the
codecs. The compressor input comes from the PAL decoder (VIN_OE=1) or from
the input parallel connector. The encoder and output connector bus carry the
expander output, or, with VLB_OE=1, the video input looped back without
compression. Each path has one register stage; the video word is 10 bits
(10-bit CCIR656).

## What is outside this logic

These parts are not RTL here:

* **Chips on the board:** the ADSP-2185 DSP and its RAM, the two ADV601
  codecs, the ADV7185 decoder and ADV7194 encoder, the SRAM chips, the I2C
  and RS232 links (DSP-driven), a video RAM for testing, and the connectors.
* **Constant bit-rate control:** DSP software. Each field it subtracts the
  compressed size from a target size and accumulates the difference. From
  that sum a servo loop chooses the quantisation (bin widths) for the next
  field. When field statistics show a scene change, it forces stronger
  compression for a few fields, so that a burst never overruns the DMA and
  FIFO. The servo characteristic and bin-width formula are not available, so
  it is not built.
* **The SDH application equipment:** the multiplexer into VC3, cross-connect,
  optical and tributary units.

The testbenches contain behavioural models of the codec host port
(`tb/adv601_model.sv`) and of the SRAM (`tb/sram_model.sv`).

## Sizes and rates

| quantity | value | where from |
|---|---|---|
| clock | 27 MHz | original design |
| DMA burst | 3 clocks per 16-bit word = 144 Mbit/s | original design, confirmed in simulation |
| longest DMA loop | 6 states | original design |
| line rates | 8 to 50 Mbit/s, i.e. one word per 54 to 8.6 clocks | original design |
| FIFO | 256k x 16 = 4 Mbit per direction, about 4 fields at 50 Mbit/s | original design (size); field rate 50/s from PAL |
| one field at 48 Mbit/s | 60000 words | derived |

## Trust and departures

Taken from the original design: the block structure; the signal names between
the blocks; the 256k x 16 FIFO memories; the 8-bit address and 16-bit data DSP
bus; the states and transitions of the compression DMA, with its
three-clock burst and six-state longest loop; the existence of a similar
decompression DMA, a loop-back and FIFO overflow and underflow handling.

This implementation's own choices: the actions in each DMA state; the
meaning of HIRQ; the DSP request latching and `dsp_ack`; the register map;
the FIFO controller's structure and flag thresholds; the line slot
interface; the address map of `xlx_small`; reading the "D" video buffers as
registers; signal polarity; single-clock operation. The ADV601 host port
behaviour in the testbench model (register handshake, compressed-data
register at address 2, 16-bit transfers with BE = 0011) is a stand-in. It is
not the real chip's timing, so check it against the data sheet before reusing
the DMA state actions on hardware.

## Files and simulation

`rtl/` holds `wvc_pkg.sv` (shared types and the register map) and one module
per file. `tb/` holds one self-checking testbench per module, the models, and
three system testbenches:

* `tb_wavelet_board_top` runs 64-word FIFOs so that TXF full, line underflow,
  RXF overflow, loop-back, line mode, DSP accesses during bursts, FIFO reset
  and video loop-back all occur.
* `tb_wavelet_board_full` runs the default sizes with one 60000-word field at
  48 Mbit/s in loop-back.
* `tb_bitrate_sweep` runs the default sizes in full duplex (compressor to
  line and line to expander at once) at 8, 16, 34, 48 and 50 Mbit/s and checks
  that every line slot carries a word and every received word reaches the
  expander in order.

The FIFO and DMA modules also carry a few concurrent assertions on their
handshakes: a refused FIFO request must be held with the same data, and the
FIFO never acknowledges a write it was not asked for or a read while empty.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wavelet_board_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/wvc_pkg.sv tb/tb_wavelet_board_top.sv
./obj_dir/Vtb_wavelet_board_top
```

To change the FIFO size, set `FIFO_AW` on `wavelet_board_top`; to change the
video width, set `VW`. The register map and codec addresses are constants in
`wvc_pkg`.
