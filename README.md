# 32-channel TCSPC acquisition firmware for scanning lifetime imaging

This RTL is the digital part of a 32-channel time-correlated single-photon
counting (TCSPC) module. The module sits behind a confocal laser-scanning
microscope. A linear array of 32 single-photon detectors feeds 32
time-to-amplitude converters (TACs), and each TAC is digitised by a 14-bit ADC. For every
photon the firmware records a 12-bit arrival-time code, groups the codes
into image pixels in step with the scanner, and streams them to a PC over
USB 3.0.

The target operating point is a 256 × 256 scan with a 4 µs pixel dwell time
and up to 4 million counts per second per detector.

The main idea is a **fixed-size pixel record**. A detector at 4 Mcps
cannot deliver more than 16 photons in 4 µs, so every detector sends
exactly 16 events per pixel. Missing events are filled with a reserved
"padding" code. The position of an event in the record then identifies
its detector, so no address travels with it. With the address left out,
the stream to the PC is 32 × 16 × 12 bit per 4 µs = 192 MB/s instead of
the 272 MB/s that 5-bit addresses would add. The price:
- bandwidth is wasted at low count rates;
- a pixel saturates at 16 events per detector. For longer dwell times,
  split each line into more pixels and bin them in software.

## System structure

```
 32 TACs/ADCs ──► 4 × tcspc_board_fw ──(4 lanes, 16-bit)──► cu_fw ──► FX3 slave FIFO ──► PC
                     ▲   ▲                                   │  ▲
                     │   └── commands (broadcast) ───────────┘  │
                     └────── pixel_clock, enable_scan ──────────┘◄── frame/line_active (microscope)
```

`tcspc_system` is the top module. It instantiates:
- four board firmwares (`tcspc_board_fw`), eight channels each;
- the control-unit firmware (`cu_fw`).

Board *b* serves channels 8b … 8b+7 of the `tac_strobe`, `adc_data`,
`tac_reset` and `dither_code` arrays.

In the real system each board reaches the control unit over a 1.2 Gbit/s
Aurora 8b/10b serial lane. Here each lane is its user-side word stream
(`tdata[15:0]`, `tvalid`, `tready`, `tlast`), and the board and CU are
wired directly. The Aurora IP and the transceivers are not part of this
RTL. Neither are these parts, which are reached through the top's ports:
- the TACs, ADCs and dither DACs;
- the USB controller;
- the microcontroller and clock generator.

One clock, `clk`, runs everything. It is assumed to be 100 MHz, so the
nominal 4 µs pixel is 400 cycles. `rst_n` is an asynchronous active-low reset.

## TCSPC board (`tcspc_board_fw`)

### Acquisition pipeline (`acq_channel`, one per channel)

The TAC raises STROBE when it holds a conversion. After a two-flop
synchroniser, the rising edge does the following:

1. The ADC code is sampled and `tac_reset` is pulsed for 4 cycles.
2. **Dither compensation.** The board applies sliding-scale dithering to
   spread ADC differential nonlinearity. An 8-bit `dither_code` drives a DAC
   that offsets the TAC output, and it steps by one after every conversion.
   The code in force at the STROBE is subtracted from the ADC result,
   saturating at 0. The DAC scaling is outside this design: one dither LSB
   is taken to equal one ADC LSB.
3. **Bin size.** Three settings, each a 12-bit window of the 14-bit code:

   | Setting | Bits kept | Meaning |
   |---|---|---|
   | 1x | 11:0 | finest bins |
   | 2x | 12:1 | bins twice as wide |
   | 4x | 13:2 | bins four times as wide |

   A result of `0xFFF` is stored as `0xFFE`, because all ones is the
   padding code.
4. **Save.** The code enters the 32-deep channel FIFO (`sync_fifo`), but
   only while recording is enabled and the current pixel holds fewer than
   16 photons. Photons above the limit are dropped; their TAC is still reset.

The STROBE reaches the FIFO about 5 cycles after the pin. A photon belongs
to the pixel that is open when it reaches the FIFO.

### Pixel boundaries

The board gets two signals from the control unit. `pixel_clock` pulses once
per pixel. `enable_scan` is high while the scanner sweeps a line. Both
pass a two-flop synchroniser. A pixel is closed:
- by a rising edge of `pixel_clock` while `enable_scan` was already high;
- and, for the last pixel of a line, by the fall of `enable_scan`.

So the 256 pulses of a line give 256 pixels. At each close, every channel
latches its photon count into a count register and restarts counting.

### Pixel wrapping and transmission (`board_pixel_wrap`, `board_tx_fsm`)

The wrapping FSM reads the eight count registers. Then, for channels 0…7
in turn, it:
1. moves the recorded codes from the channel FIFO into the 256-deep
   transmission FIFO, zero-extended to 16 bits;
2. writes `0xFFFF` padding words up to 16.

A board pixel is therefore always 128 words, one per cycle. The wrapper
stalls while the FIFO is full. A boundary that arrives before the previous
one was taken up sets the sticky `overrun` flag.

The transmission FSM streams the FIFO onto the lane and marks the 128th
word of each pixel with `tlast`.

### Command receiver (`board_cmd_rx`)

The receiver assembles 32-bit commands from two 16-bit lane words; the
second word carries `tlast`. It keeps two settings:
- `run`, set by START and cleared by STOP;
- the bin size, set by BIN.

## Control unit (`cu_fw`)

### Per-board buffering and channel sorting

Each lane feeds a 256-word **buffer 1** FIFO. When buffer 1 is full the
lane's `tready` drops, so no word is lost.

The lane's framing is checked: a `tlast` anywhere but on a pixel's 128th
word sets a sticky framing error.

Once buffer 1 holds a whole pixel, the **channel sorting FSM**
(`cu_channel_sort`) moves it into the board's **buffer 2**
(`pixel_slot_buffer`). On the board PCB, a TAC's channel number is not its
detector's number. The sorter writes each 16-word channel block at its
detector's position within a pixel slot, given by the parameter
`CH_TO_DET[board][channel]`. The actual board routing is not known here,
so the default is the identity.

Buffer 2 has two pixel slots and is read in pixel order. It is split into
even and odd banks, so two codes can be read per cycle.

### Pixel wrapping towards the PC (`cu_pixel_wrap`)

The wrapper starts once all four buffer 2s hold a pixel.

**If the 1024-word FX3 FIFO has room for 193 words**, it writes:
1. a control word;
2. the 512 codes of the pixel, in detector order. The board order is set by
   the `BOARD_OF_BLOCK` parameter, identity by default. The codes are packed
   as 12-bit fields into 32-bit words, first code in the low bits. Each
   detector takes 6 words, so the data is 192 words.

The packer takes two codes per cycle, so a pixel takes 257 cycles. That
fits in the 400-cycle pixel.

**If the FIFO lacks room** (the PC is not reading fast enough), the pixel
is discarded from all four buffers. The loss is flagged in the next control
word. Discarding whole pixels keeps the fixed record alignment intact.

Control word layout:

| Bits | Content |
|---|---|
| 31:24 | `0xA5` marker |
| 17 | sticky lane framing error |
| 16 | one or more pixels were discarded since the previous control word |
| 15:0 | pixel number: cleared by START, counts discarded pixels too, wraps at 65536 (one 256×256 frame) |

Within detector *d*'s 6 words, event *k* occupies bits `12k+11 … 12k` of
the 192-bit group. `0xFFF` is padding.

### FX3 interface (`fx3_handler`)

The FX3 handler is master of the FX3 32-bit synchronous slave-FIFO bus.
Incoming commands take priority. When `flag_rd_rdy` is high, the handler:
- selects address 3;
- pulses `slrd_n`/`sloe_n` low;
- captures `dq_i` 2 cycles later.

Otherwise, while the FX3 FIFO has data and `flag_wr_rdy` is high, it
writes one word per cycle to address 0.

These details are assumptions: `flag_wr_rdy` is taken to be a watermark
flag that permits a write in the same cycle. Adjust `READ_LAT`, `WR_ADDR`
and `RD_ADDR` to match the FX3 firmware.

### Commands (`cmd_decoder`, `cu_cmd_tx`)

A PC command is one 32-bit word: opcode in bits 31:24, argument in 23:0.
The opcodes are defined in `tcspc_pkg::opcode_e`:

| Opcode | Name | Argument / effect |
|---|---|---|
| 0x01 | START | arms the acquisition, clears the pixel number; forwarded to boards |
| 0x02 | STOP | disarms; forwarded |
| 0x03 | BIN | arg[1:0]: 0 = 1x, 1 = 2x, 2 (or 3) = 4x; forwarded |
| 0x04 | PIX_PERIOD | pixel period in clock cycles (reset value 400) |
| 0x05 | TD | line delay Td in clock cycles (reset value 0) |
| 0x06 | SYNC_MODE | arg[0] = 1: the CU drives the scan (master mode) |
| 0x07 | LINE_GAP | carriage-return gap in master mode (reset value 400) |

Unknown opcodes set `bad_cmd`. Forwarded commands go to all four boards
in the same cycle, as two 16-bit words, high half first.

### Scan synchronisation (`scan_sync`)

The microscope's trigger outputs `frame_active` and `line_active` are high
while a frame or a line is being scanned.

- **Line timing.** For each line of an armed frame, the FSM waits Td cycles
  after `line_active` rises. It then issues 256 `pixel_clock` periods of
  the programmed length, each pulse high for the first half of its
  period. `enable_scan` rises with the first pulse and falls at the end of
  the 256th period. Td moves the image horizontally, to correct for
  mechanical misalignment between the trigger and the mirror.
- **Arming.** Acquisition is armed per frame: a frame is acquired only if
  START is in force as `frame_active` rises.
- **Errors.** A line that starts before the previous line's pixels are out
  sets `line_error`.
- **Master mode.** The CU itself drives `frame_active_out` and
  `line_active_out`: a gap, then 256 lines each followed by the gap.

## Where this departs from, or goes beyond, the source description

The published description gives the block structure and the data format.
It does not give the signal-level details. The following are this design's
own choices:
- the clock frequency;
- all FIFO depths;
- the link word format and the command set;
- the control-word layout beyond "pixel number and error flags";
- the dither scheme (8-bit, step one per conversion, subtract and saturate);
- the TAC reset length;
- the FX3 bus timing;
- the pixel-close rule;
- the overrun and framing flags.

Other points to know:
- **Td.** Td is measured from `line_active` to the first pixel pulse, as
  the timing diagram draws it. One sentence of the source instead suggests
  a delay from `enable_scan` to the first pulse; that variant would only
  move where `enable_scan` rises.
- **Channel and board routing.** The real routing is not known. The maps
  are parameters, defaulting to the identity.
- **Not handled.** There is no special handling for bidirectional scanning,
  and no time-tag mode with detector addresses.
- **Master mode.** Only the digital line/frame timing is generated, not a
  mirror drive.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The system-level
benches are:

- `tb_tcspc_system`: the whole design at reduced frame size (4 pixels ×
  2 lines, 400-cycle pixels). It uses:
  - a TAC/ADC/dither model per channel;
  - the behavioural FX3 model `tb/fx3_model.sv`;
  - commands sent through the FX3.

  Three frames are run:
  1. slave mode, 1x bins;
  2. 4x bins with Td = 25 and the PC stalled, so pixels are lost;
  3. master mode with 2x bins.

  It decodes the PC stream and compares every event with the photons that
  were fired. It counts each mechanism (padding, 16-photon saturation,
  sorting, each bin size, dithering, Td, carriage-return gating, pixel
  loss, master mode) and fails if any never occurred.
- `tb_tcspc_full`: the top at its default parameters. It acquires one whole
  256 × 256 frame at 4 µs pixels, checks all 65 536 pixel records as they
  arrive, and requires that no pixel is lost. This shows the 192 MB/s rate
  is sustained. It simulates 26 M cycles in under a minute.
- `tb_tcspc_workloads`: the peak load and the 512-pixel line. Every
  detector fires 16 photons in every 4 µs pixel (4 Mcps) on lines of 512
  pixels (`PIX_PER_LINE_P = 512`, 2 lines per frame). A second frame with
  random loads follows without a new START. Every record is checked, and
  the pixel numbers must run on across the frames.

Two concurrent assertions guard the interfaces: a stalled lane word must
stay offered and unchanged, and the FX3 bus is never read and written in
the same cycle.

The default build is about 3.3 k cells, 4 k flip-flop bits and 94 kbit of
memory: mostly the FIFOs and buffer 2.

## Simulating

Files are one module or package per file. `rtl/tcspc_pkg.sv` must be
compiled first. With Verilator 5:

```
verilator --binary --timing -j 0 --top-module tb_tcspc_system \
    -y rtl -y tb +libext+.sv rtl/tcspc_pkg.sv tb/tb_tcspc_system.sv
./obj_dir/Vtb_tcspc_system
```

Replace the top-module name to run any other bench, for example
`tb_tcspc_full` or `tb_cu_pixel_wrap`.

Parameters worth changing on `tcspc_system`:
- `MAX_PHOTONS` (16): events per detector per pixel;
- `PIX_PER_LINE_P` and `LINES_P` (256): for example, 512 pixels per line
  for 8 µs dwell binned in software;
- `CH_TO_DET` and `BOARD_OF_BLOCK`: routing maps.

The pixel period, Td, gap and scan mode are run-time commands.
