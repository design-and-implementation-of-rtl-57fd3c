# Content-aware image processor for a low-power wireless camera

A camera node that radios every frame spends most of its energy on the radio.
This design cuts that cost by transmitting only the parts of a frame that
changed. A frame is cut into 8x8-pixel blocks. For each block, the hardware
computes a one-bit Sobel edge map and compares it with the edge map of the same
block in the previous frame. Only blocks in which enough edge pixels appeared or
disappeared are sent to a JPEG encoder. Every other block is replaced by the
code of an empty block. The encoded stream is packed into 32-byte payloads and
handed to an nRF24L01+ 2.4 GHz radio over SPI.

Comparing edge maps rather than raw pixels makes the decision robust to slow
changes in brightness. It also keeps the memory small: one bit per pixel of the
last frame, 64 bits per block. Both thresholds and the JPEG quality factor can
be reloaded at run time. A supervisor can therefore trade picture content for
radio time as the channel gets worse.

The RTL follows the architecture of a 2015 Georgia Tech MS thesis on a
content-aware image processing module for FPGA. Where that description stops,
this implementation makes its own choices. They are listed under
[Design choices and departures](#design-choices-and-departures).

## Block diagram and data flow

```
 image sensor            system clock (clk)                              tx_clk
 ──row (8 px)──► block_buffers ──buffer 2──► preprocessor ──keep──┐
                 buf1 ─copy─► buf2     │        │  ▲               │
                                       │        ▼  │               ▼
                                       │      edge_sram     system_controller
                                       │                         │ feed / empty
                                       └──► jpeg_feeder ──pixels──► [JPEG encoder]  (external)
                                                                       │ 32-bit words
                                                          tx_fifo  ◄───┘
                                                  (2 x 256-bit payloads, async)
                                                              │
                                                        tx_controller ──SPI──► [nRF24L01+] (external)
```

A block goes through these steps:

1. The sensor writes the block into **buffer 1**, one 8-pixel row per cycle, while `buffer1_empty` is high.
2. When buffer 2 is free, buffer 1 is copied into **buffer 2**, one row per cycle. Buffer 1 then accepts the next block.
3. The **preprocessor** loads the block's old edge map from the SRAM. It runs the edge detector over buffer 2 and XORs each new edge bit with the old one. It counts the changed pixels, writes the new map back, and decides: *keep* when `changed >= blk_thr`.
4. For a kept block, the **JPEG address generator** (`jpeg_feeder`) streams the 64 pixels of buffer 2 to the encoder in raster order. For a dropped block, `enc_empty_blk` pulses. Either way, buffer 2 is then released.
5. The encoder's 32-bit words go into the **TX FIFO**. When 8 words, a full 256-bit payload, are in, the **TX controller** sends it to the radio as one 32-byte packet.

Buffer 2 is released once its pixels have gone to the encoder. The next block's
preprocessing can then overlap with the encoder's own processing (DCT, coding).

## Deciding whether a block matters

This is the core of the design. It lives in `preprocessor` and its parts.

### Sobel edge detector with column reuse (`edge_detector`)

Each pixel's 3x3 neighbourhood is convolved with the two Sobel kernels:

```
Gx = [-1 0 +1; -2 0 +2; -1 0 +1]      Gy = [-1 -2 -1; 0 0 0; +1 +2 +1]
```

The pixel is an edge when `|Gx| + |Gy| > edge_thr`. The magnitude is at most
2040, so the threshold register is 11 bits wide. Pixels outside the block count
as zero. Blocks are processed independently, so a detector cannot see the
neighbouring blocks. As a result, strong false edges appear along every block
border, where the image meets the zero padding. They are the same from frame to
frame, so the frame difference cancels them. A real edge lying exactly on a
block border can be missed.

The detector reads buffer 2 through a single pixel port, one pixel per cycle.
It does not reload the 9 window pixels for every output pixel. It keeps three
column registers and slides the window to the right:

* At the start of a row it loads columns -1, 0 and 1, which is 9 loads.
* For each of the next 7 pixels it loads only the new right-hand column, which is 3 loads.

That gives 30 loads per row and 240 per block, instead of 576. A zero-padded
position still takes its load slot, so the schedule is the same for every row.
Each window is evaluated the cycle after its last pixel arrives, while the next
column is loading. The block therefore takes **241 cycles**. `edge_valid` marks
the 64 edge bits in raster order.

### Frame differencing and counting

* **`frame_differencer`**: a single XOR of the new edge bit and the old edge bit.
* **`accumulator_thresholder`**: counts the XOR ones over the 64 pixels and registers `keep = (count >= blk_thr)`. A block threshold of 0 keeps every block, which is the "no preprocessing" mode.

### Edge map storage (`edge_map_buffers`, `edge_sram`)

Two 64-bit shift registers sit next to the detector:

* The **previous-frame buffer** is loaded from the SRAM before detection starts. It shifts out one bit per edge pixel.
* The **current-frame buffer** shifts in each new edge bit.

Both move to and from the SRAM as two 32-bit words: words `2*blk` and
`2*blk+1`, with word 0 holding pixels 0..31. A load takes 4 cycles and a store
takes 2. The SRAM has 512 words of 32 bits (a 9-bit address), which is room for
256 blocks. A 12288-byte frame has 192 blocks.

After reset no previous map exists. In the first frame, `first_frame` makes the
previous buffer all zeros instead of reading the SRAM. Every block with enough
edges is therefore sent in the first frame.

### Timing per block

With no stall, the preprocessor takes 250 cycles per block:

| Step | Cycles |
|------|--------|
| start | 1 |
| load the old edge map | 4 |
| edge detection | 241 |
| decision | 1 |
| store the new edge map | 2 |
| done | 1 |

In the first frame it takes 247 cycles, because there is no old map to load.
That is 5 µs at 50 MHz. Add 8 cycles for the row copy into buffer 2 and, for
kept blocks, 64 cycles of streaming to the encoder.

## Getting data to the radio

### TX FIFO (`tx_fifo`)

The encoder produces 32-bit words on the system clock. The radio takes 32-byte
payloads, and the controller runs on its own slow clock. The FIFO bridges both
gaps. It has two payload slots of 256 bits, written as 16 words.

The write pointer has 5 bits: a wrap bit, a slot bit and a 3-bit word offset.
The read pointer has 2 bits: a wrap bit and a slot bit.

```
empty = (wptr[4:3] == rptr)                              read side
full  = (wptr[4] != rptr[1]) && (wptr[3] == rptr[0])     write side
```

So a payload becomes visible only once all 8 of its words are in. `full` means
that both slots are taken. The reader sees the whole oldest payload on `rdata`,
with word 0 in the low bits, and pops it with `rd_en`.

The clocks are unrelated, so each side compares its own pointer with a copy of
the other side's pointer. That copy is Gray-coded, registered and passed
through two synchronizer flops. `empty` and `full` may therefore clear a few
cycles late, but they are never wrong in the unsafe direction. Assertions flag
a write while full and a read while empty.

### Radio controller (`tx_controller`)

The controller runs on `tx_clk`, 4 MHz by default. It goes through these states:

| State | Action |
|-------|--------|
| CONFIG | Writes CONFIG = 0x0A (power up, CRC on, transmitter mode). |
| PWRUP | Waits 1.5 ms (`POWERUP_CYCLES`). |
| SLEEP | Waits until the FIFO holds a payload. |
| STANDBY | Sends `W_TX_PAYLOAD` and the 32 bytes, byte 0 = payload bits [7:0], then pops the FIFO. |
| TX | Pulses CE for 15 µs and waits for the radio's IRQ ("data sent"). |
| ACK | Writes STATUS = 0x20 to clear the interrupt, then returns to SLEEP. |

SPI runs in mode 0, MSB first, at one bit per two clocks (2 MHz). Loading a
payload takes 33 bytes × 16 cycles = 132 µs. The STATUS byte that the radio
returns with every command is kept in `nrf_status`.

## Stalls, clock gating and reconfiguration (`system_controller`)

The radio is far slower than the system clock, so the FIFO is often full. While
`fifo_full` is high, `sys_ce` and `enc_ce` go low. That freezes the block
buffers, the sequencer, the preprocessor and the address generator, and the
encoder must freeze too. `buffer1_empty` also drops, so the sensor waits.
Nothing is lost. The thesis gates the clocks themselves. Here every register has
a clock enable instead; on an FPGA, or with a clock-gating cell, the enables map
directly onto gated clocks.

The preprocessor has its own enable, `pre_ce`. It is high only from a block's
start to its decision, so the preprocessor also rests while it waits for the
sensor. This is the block-level gating.

The system controller also holds `edge_thr`, `blk_thr` and `qf`. A one-cycle
`cfg_irq` loads all three from the `cfg_*` inputs, which act as the external
interrupt register. After reset the values are edge threshold 100, block
threshold 5 and QF 50. The controller counts blocks (`BLOCKS_PER_FRAME` per
frame), drives `first_frame`, and chooses between feeding a block to the
encoder and signalling an empty block.

## What is not in this RTL

* **JPEG encoder.** The thesis used an existing open-source luminance JPEG core and did not design one. The top level brings the encoder interface out as ports. The encoder must obey this contract:
  * take `enc_pix` whenever `enc_pix_valid && enc_ce`: 64 pixels per block in raster order, with `enc_first` on the first;
  * on `enc_empty_blk`, emit the code of an all-zero block;
  * follow `enc_qf`;
  * present a 32-bit word with `enc_word_valid`. The word is taken only in cycles with `enc_ce` high, and the encoder must hold it otherwise.
* **nRF24L01+ radio.** This is an external chip. Its SPI pins, CE and IRQ are top-level ports.
* **Flushing.** Only complete 256-bit payloads are sent. The tail of the stream that does not fill a payload stays in the FIFO until more data arrives.

The testbenches use behavioural stand-ins for both missing parts:

* `tb/jpeg_encoder_model.sv` does not compress. It emits a tag word and a pixel sum per kept block, and one tag word per empty block.
* `tb/nrf24_model.sv` decodes the SPI commands and raises IRQ some time after a CE pulse.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `content_aware_processor` | `BLOCKS_PER_FRAME` | 192 | blocks per frame (12288-byte frame) |
| | `SRAM_DEPTH` | 512 | edge SRAM words; 2 per block |
| | `POWERUP_CYCLES` | 6000 | radio power-up wait, 1.5 ms at 4 MHz |
| | `CE_HIGH_CYCLES` | 60 | CE pulse, 15 µs at 4 MHz |
| `system_controller` | `EDGE_THR_RST`, `BLK_THR_RST`, `QF_RST` | 100, 5, 50 | reset configuration |
| `tx_fifo` | `WORD_W`, `PAYLOAD_W` | 32, 256 | write word and payload width |

The types and widths that modules share are in `rtl/cam_pkg.sv`: 8-bit pixels,
an 11-bit edge threshold and a 7-bit block threshold.

If `tx_clk` is not 4 MHz, scale `POWERUP_CYCLES` and `CE_HIGH_CYCLES` to the
actual clock.

## Design choices and departures

These points are this implementation's own choices, not taken from the thesis:

* **Block borders:** zero padding is used. Replicating border pixels was the other option mentioned.
* **Comparisons:** an edge is `> edge_thr` and a block is kept when `>= blk_thr`.
* **First frame:** the previous edge map is all zero, without reading the SRAM.
* **Clock gating:** implemented as clock enables, not gated clocks. The sensor is also held off during a stall.
* **FIFO pointers:** compared only after Gray-code synchronisation. The original compares the raw pointers.
* **Clock rates:** the transmitter clock is 4 MHz with a 2 MHz SPI bit rate. The original says the transmitter runs at 2 MHz and reports 0.128 ms to load a payload, which matches 2 Mbit/s.
* **Radio commands:** the register values and the ACK state that clears the radio interrupt come from the radio's data sheet. The CE pulse length is also chosen here.
* **Reconfiguration timing:** `cfg_irq` takes effect immediately. Issue it between frames so that all blocks of a frame use one threshold.
* **Edge memory:** the SRAM is an inferred array with separate read and write data buses, a one-cycle read and an active-low chip select.
* **Buffer handshakes:** the buffer-2 release handshake and the 8-cycle row copy are chosen here.

## Verification and simulation

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_edge_detector` | Every edge bit against a software Sobel model (`tb_ref_pkg`), with random and structured blocks, several thresholds and random stalls. Also the 240-load / 241-cycle timing. |
| `tb_preprocessor` | Three frames with moving and static content; decision, changed-pixel count and cycles per block. |
| `tb_edge_map_buffers` | Store and reload through the SRAM over three frames. |
| `tb_block_buffers` | Twelve blocks with random producer gaps and consumer delays. |
| `tb_tx_fifo` | 50 MHz writer and 4 MHz reader; every payload, visibility only after 8 words, and that full is reached. |
| `tb_tx_controller` | Against the radio model: CONFIG write, power-up wait, payload bytes, pops and acknowledges, 528-cycle payload load. |
| `tb_system_controller`, `tb_jpeg_feeder`, `tb_accumulator_thresholder`, `tb_frame_differencer`, `tb_edge_sram` | Their units. |
| `tb_content_aware_processor` | The whole chain, 4 frames of 9 blocks (`tb_cap_harness`). |
| `tb_content_aware_processor_full` | The same chain with every default: 4 frames of 192 blocks, 1.5 ms power-up. |
| `tb_threshold_sweep` | The same chain with every default, one 192-block frame per threshold setting: block threshold 0 (every block kept), then edge/block 200/2, 200/5, 100/5, 100/10. |

The end-to-end tests check every keep/drop decision against the reference
model. They check every byte that reaches the radio model. They also check that
each mechanism actually occurred:

* kept and dropped blocks
* FIFO-full stalls
* block-level gating
* decisions changed by a reconfiguration
* frame ends
* IRQ acknowledges

Each full-size run takes about a second. The sweep runs on synthetic frames, so the number of blocks it keeps per setting
(64 to 192 of 192) says nothing about how many a real scene would keep.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/cam_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_content_aware_processor_full.sv --top-module tb_content_aware_processor_full -o sim
./obj_dir/sim
```

For a unit testbench, replace the last file and the top module name. Add
`tb/tb_ref_pkg.sv` only for the testbenches that import it:

* edge detector
* preprocessor
* accumulator
* the end-to-end tests

How far to trust it:

* The decision path is checked bit-exactly against an independent model.
* The FIFO and radio controller are checked against behavioural models, not against a real radio.
* Nothing here has been run on an FPGA.
* The JPEG encoder, and so the actual compressed stream, is outside this RTL.
