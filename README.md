# Single-channel image real-time storage system

This RTL models a memory card that records a CCD camera's video to a SCSI disk as it arrives. A FIFO buffer
absorbs the pixel stream. A small microprocessor adds a reference record from the camera controller to every
frame. The SCSI protocol chip's DMA engine moves the buffered words to the disk in blocks. The aim is to check
the whole system in simulation before hardware exists: the data flow, the two asynchronous events the
firmware must handle (the frame interrupt and the serial receive interrupt), the FIFO reset and the DMA
hand-offs.

All blocks are synthesizable SystemVerilog, and all run on one clock.

```
 ccd_sim ──strobe/lval/cdat──► pld_syn ◄──wen_n/wdat, ren_n/rdat──► fifo_sim
                                 ▲  │ frame
            fifoen/fifowrclk/    │  ▼            dreq/dwr_n/dmaclk
            fifodat/fiforst_n  mcu_sim           dack_n/dmadb
                                 ▲  │  dmawr_begin/dma_count   ┌──────────┐
 cc_sim ──txen/txclk/txdat──────►│  └─────────────────────────►│ fas_sim  │──scsidb/scsiwr/scsien──► hd_sim
        ◄──────── huafu_n ───────┘◄──── dmawr_over/xfer_words ─└──────────┘
        ── ccdok_n ─────────────►  (pld_syn <-> fas_sim carries the DMA words)
```

| block | role |
|---|---|
| `ccd_sim` | Camera output: pixel strobe, line valid `lval`, 8-bit `cdat`. |
| `cc_sim` | Camera controller: signals ready (`ccdok_n`), sends reference packets, waits for a status reply. |
| `pld_syn` | FPGA logic: FIFO write mux, frame interrupt, frame capture gating, FIFO-to-DMA path. |
| `fifo_sim` | 256K × 16 FIFO with separate write and read clocks. It pairs the incoming bytes into words. |
| `mcu_sim` | Microprocessor firmware as a state machine. |
| `fas_sim` | SCSI protocol chip, reduced to its DMA engine and its parallel disk port. |
| `hd_sim` | Disk: a sequential word store with a read-back port. |
| `image_store_system` | Top: wires the seven blocks together. |
| `memcard_pkg` | State encodings and the two test-pattern functions. |

## One clock, strobes instead of interface clocks

The real devices each have their own clock: the camera's pixel clock, the serial link clock, the DMA clock,
and the FIFO's read and write clocks. Here all of them are signals in the one `clk` domain:

- `strobe`, `dmaclk` and `fifowrclk` are one-cycle pulses. A receiver acts in the cycle where the pulse is high.
- `txclk`/`rxclk` is a free-running square wave. The receiver detects its rising edge by sampling it.
- The FIFO has independent write and read clocks (`wclk`, `rclk`) with Gray-code pointer crossing, like the
  FIFO chip it stands for; in this system both are driven by `clk`, with active-low enables `wen_n` and `ren_n`.

This keeps every block simple to time and to synthesize. Apart from the FIFO, which is tested with two
unrelated clocks, the design does not model clock-domain crossings.

## The frame cycle

This is the part that needs the most care. The sequence for one stored frame:

1. **Frame interrupt.** The camera has no frame-valid output, so `pld_syn` detects the vertical blank: when
   `lval` has been low for `VBLANK_DETECT` cycles it gives a one-cycle `frame` pulse. `VBLANK_DETECT` must be
   longer than a line gap (`HBLANK·PIX_DIV` cycles) and shorter than the frame gap. The next rising `lval` is
   then the first line of a frame.
2. **Firmware takes the interrupt.** `mcu_sim` latches `frame`. It handles the interrupt in `idle`, and only
   once two conditions hold: the previous frame is fully on disk, and at least one reference packet has
   arrived. It goes through `exint` to `fifowr`.
3. **FIFO reset and reference record.** In `fifowr` the firmware pulls `fiforst_n` low for `RST_CYCLES`. It
   then writes the reference record one byte at a time (`fifoen` high, `fifodat`, one `fifowrclk` pulse per
   byte). The record is the last complete packet, padded with a zero byte to an even length.
4. **Arming.** The falling edge of `fifoen` arms the capture in `pld_syn`.
5. **Capture.** The capture starts only at the first line after a frame boundary, and only if it is armed.
   It then writes exactly `LINES` lines of pixels into the FIFO. If a frame starts while the capture is not
   armed, the whole frame is skipped (`skip` pulse). So the disk only ever holds whole frames, each one
   directly after its reference record. A frame is skipped when the firmware is still busy at the frame
   boundary, for example while it is receiving a packet.
6. **DMA.** As soon as the record is written, the firmware sets the frame length, `FRAME_WORDS = (record
   bytes + PIXELS·LINES)/2`, and moves the frame in blocks of up to `BLOCK_WORDS` words:
   - `faswr`: sets the block length (`dma_count`).
   - `dmawr`: pulses `dmawr_begin`, then waits for `dmawr_over`.
   - `fasrd`: reads back `xfer_words`. A mismatch sets `status_err`.

   The last block of a frame is usually shorter. The DMA runs at the same time as the capture. When the DMA
   gets ahead of the camera, it waits on an empty FIFO (`dma_stall`).
7. **Status reply.** After the last block, `tx422` pulls `huafu_n` low for one cycle. The camera controller
   answers with its next reference packet.

### Disk record format

Each stored frame occupies `FRAME_WORDS` consecutive words in `hd_sim`:

- `REF_BYTES/2` words of reference record: packet bytes in order, two per word, the first byte in bits [7:0].
- Then the pixels: line by line, two per word, the first pixel in bits [7:0].

With the defaults that is 4 + 131,072 words per frame.

## Microprocessor state machine

These are the firmware's states and their 4-bit codes. `idle` uses a spare code.

| state | code | action |
|---|---|---|
| reset | 0000 | leave reset |
| init | 0001 | `INIT_CYCLES` delay |
| wait1 | 0011 | wait for `ccdok_n` low |
| fswr / fsrd | 0110 / 0111 | file system set-up, `FS_CYCLES` each |
| idle | 0100 | continue the DMA if words remain, else take a pending frame interrupt |
| exint | 1100 | clear the interrupt, take a snapshot of the reference packet |
| fifowr | 1011 | FIFO reset, then write the reference record, then arm |
| faswr | 0010 | set the DMA block length (`FAS_CYCLES`) |
| dmawr | 1000 | `dmawr_begin`, wait for `dmawr_over` |
| fasrd | 1101 | read and check the DMA count (`FAS_CYCLES`) |
| tx422 | 1010 | status pulse on `huafu_n` |
| rx422 | 1001 | receive interrupt |

**Receive interrupt.** A rising `rxen` in any state except reset and init saves the current state and enters
`rx422`. While `rxen` is high, a byte is taken from `rxdat` at each rising `rxclk`, counted by `rx_cntb`.
When `rxen` falls, a packet of exactly `PKT_BYTES` bytes becomes the new reference packet, and the saved
state resumes where it stopped.

While an interrupt is being served:
- `dmawr_over` and `frame` are latched, so neither is lost.
- The protocol chip keeps moving the block that is already running.
- The FIFO keeps filling, which is what it is there for.

## Camera link

The RS-422 serial line is replaced by an 8-bit parallel port:

- `txclk` runs continuously with a period of `BYTE_CYCLES`.
- `txdat` changes while `txclk` is low. `txclk` rises in the middle of each byte.
- `txen` stays high for the whole packet.

With a 50 MHz clock, `BYTE_CYCLES = 3200` gives 15,625 bytes/s. A packet is 7 bytes. Byte *i* of packet *p*
is `{p[3:0], i+1}`, so the first packet is 01 02 … 07.

## DMA handshake

`fas_sim` pulses `dmaclk` every `DMA_DIV` cycles while `dreq` is high. In a cycle where `dmaclk`, `dreq` and
`!dwr_n` are all high and the FIFO is not empty:

- `pld_syn` reads one FIFO word (`ren_n` low in that cycle).
- In the next cycle the word is on `dmadb`, with `dack_n` low.
- `fas_sim` copies it to `scsidb` with a one-cycle `scsiwr` pulse.

When `dma_count` words have been acknowledged, `dreq` falls and `dmawr_over` pulses once. There is at most
one read in flight, and `DMA_DIV ≥ 2` guarantees that `dreq` has fallen before the next `dmaclk` after the
last word. An assertion in `fas_sim` flags any `dack_n` outside a transfer.

The peak rate is one word per `DMA_DIV` cycles, which is 2 bytes per 4 cycles with the defaults. The camera
delivers 1 byte per 4 cycles, so the FIFO empties between frames.

## Parameters (top level defaults)

| parameter | default | meaning |
|---|---|---|
| `PIXELS`, `LINES` | 512, 512 | frame size |
| `PIX_DIV` | 4 | clock cycles per pixel |
| `HBLANK`, `VBLANK` | 32, 4096 | blank pixel periods after a line / between frames |
| `VBLANK_DETECT` | 1024 | `lval`-low cycles that count as a frame gap |
| `BYTE_CYCLES` | 3200 | link byte period (15.625 kbyte/s at 50 MHz) |
| `PKT_BYTES` | 7 | reference packet length (1…15) |
| `CC_INIT_CYCLES` | 1000 | camera controller start-up delay |
| `BLOCK_WORDS` | 256 | DMA block (one 512-byte sector) |
| `DMA_DIV` | 4 | cycles per DMA word (≥ 2) |
| `FIFO_DEPTH` | 262144 | FIFO words (256K × 16) |
| `DISK_WORDS` | 1048576 | disk store words |

Constraints when changing them:
- `PIXELS·LINES` must be even.
- `FIFO_DEPTH` must be a power of two.
- `VBLANK_DETECT` must lie between the line gap and the frame gap, in cycles.
- The frame gap must leave the firmware time to finish the last DMA block and write the record. Otherwise
  every other frame is skipped.

## What follows the specification and what is this design's own

**From the specification:**
- The blocks and how they connect.
- The signal names of each block.
- The 256K × 16 FIFO with separate write and read clocks, and its pairing of bytes into words by the lowest
  bit of the byte counter.
- The microprocessor's state list and its codes.
- Both interrupts, and the rule that they may occur in any state except reset and init.
- The FIFO reset after the frame interrupt, followed by the reference write.
- `dmawr_begin`/`dmawr_over` as the start and end of a DMA.
- The parallel replacement of the serial link and its timing, and the 15.625 kbyte/s rate.
- The disk's parallel port.
- The 7-byte packet, read from the receive waveform.

**This design's choices:**
- The single clock.
- Frame size, blanking and pixel rate.
- The test patterns.
- Frame detection from the vertical blank.
- Capture arming and frame skipping.
- The FIFO flags and dropping on overflow.
- The DMA block size, handshake timing and status check.
- The `dma_count`/`xfer_words` register path to the protocol chip.
- The `idle` state.
- The firmware delays.
- The record padding.
- `huafu_n` as a one-cycle status reply, and `ccdok_n` driven by the camera controller.
- The disk's capacity and read-back port.

**Departures and limits:**
- The FIFO's two clocks are both driven by the system clock in the top level.
- `fiforst_n` is an extra signal through `pld_syn`.
- The SCSI bus protocol and the RS-422 line drivers are not modelled.
- The firmware's register accesses and file system steps are fixed delays.
- The reference data arriving over the link is stored, but its meaning is not interpreted.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a
cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_ccd_sim` | Line and frame timing, strobe spacing and pixel values, strobe by strobe, for two frames. |
| `tb_cc_sim` | `ccdok_n` delay, `txclk` period and duty, data stable while `txclk` is high, packet length and contents, one byte per `BYTE_CYCLES`, no packet without a status pulse. |
| `tb_fifo_sim` | Write and read clocks of 10 ns and 14 ns: random traffic against a queue model, full/overflow with dropped words, drain to empty, first-word latency, `fiforst_n` realignment. |
| `tb_pld_syn` | Frame pulse, skip, reference bytes, no capture mid-frame, exactly `LINES` lines, DMA read/ack timing, stall. |
| `tb_mcu_sim` | Start-up, interrupt held until a packet has arrived, FIFO reset then record, DMA blocks 3/3/2, receive interrupt with `dmawr_over` inside it, status pulse, `status_err`. |
| `tb_fas_sim` | Word order and count, a single `dmawr_over`, `dmaclk` spacing, transfer time `n·DMA_DIV`, zero-length DMA. |
| `tb_hd_sim` | Counters, sequential placement, wrap, read-back. |

Two testbenches cover the whole system:

- **`tb_image_store_system`** runs at a reduced size (16 × 8 frames). It stores four frames, then reads the
  disk back and checks every word. It checks the link byte rate. It counts frame interrupts, skipped
  frames, DMA stalls, FIFO resets, DMA block ends, partial last blocks, received packets and every
  firmware state, and fails if any of them never happened.
- **`tb_image_store_full`** is the same test with every parameter at its default. It stores two
  512 × 512 frames, about 3.5 million cycles, which takes a few seconds.

To run one with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl +libext+.sv rtl/memcard_pkg.sv \
    tb/tb_image_store_system.sv --top-module tb_image_store_system -o sim
./obj_dir/sim
```

For a block testbench, replace the testbench file and the `--top-module` name. Lint with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/memcard_pkg.sv rtl/<module>.sv`. A lint warning,
SYNCASYNCNET, remains in `fas_sim`: `rst_n` is the asynchronous reset of the flip-flops and also the
`disable iff` condition of the handshake assertion. This is intentional.
