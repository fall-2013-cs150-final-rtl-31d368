# Difference-of-Gaussians video filter

This design takes an 800x600 greyscale image stream at one pixel per clock. It produces an edge- and feature-enhanced version of each frame and stores it in a double-buffered SRAM frame store that a display reads from.

The enhancement is a *difference of Gaussians* (DoG):

1. The image is smoothed once with a 5x5 Gaussian (G1).
2. The result is smoothed again (G2 = G1 * G).
3. G2 is subtracted from G1.

Flat regions cancel to black. Edges, corners and fine detail stay bright. A select input shows G1, G2 or the difference.

The main idea is that **all resampling is done by marking pixels valid or invalid, never by changing clocks**. The whole chain runs on one clock at one pixel slot per cycle:

```
source ─► down_sample ─► gaussian_wrapper ─► up_sample ─► bypass mux ─► image_buffer_writer ─► W0 ┐
800x600     1 in 4 valid     G1 / G2 / DoG      fills the       (raw source     4 px per 32-bit word   │
            = 400x300        on 400x300         gaps again       when bypass)                          ▼
                                                                                              sram_arbiter ◄─► SRAM
display ◄── image_buffer_reader ◄─────────────────────────────────────────────────────── R0 ┘      ▲
                ▲ swap/swap_ack                                                                   │
                └──────────── swap_controller ── bg_start/bg_done ── writer                  W1, R1: spare ports
                                              └─ ol_start/ol_done ── overlay (external)
```

A second, optional filter bank (`gaussian_wrapper_multi`) runs on the same down-sampled stream. It produces four band-pass levels d1..d4 from a chain of five Gaussian filters.

## Resampling with valid bits

### Down-sampling (`down_sample`)

Column and row counters follow the raster. A pixel is passed on as valid only when both counters are even. Every other slot carries a black dummy pixel with valid low. Of the 480,000 slots per frame, 120,000 are valid, and they form a 400x300 image. The stream keeps its 800x600 slot timing.

### Filtering on valid samples only

The Gaussian filters advance only on valid samples. To them, the image really is 400 pixels wide, and their line buffers hold 400 entries, not 800.

### Up-sampling (`up_sample`)

The up-sampler uses the empty slots to rebuild 800x600. It keeps two free-running counters, which start at the first valid pixel of a frame:

- **`repeat_counter`** toggles every cycle.
  - When it is 0, the slot holds a fresh valid pixel, which goes straight out.
  - When it is 1, the pixel from the previous cycle is sent again from a storage register.
  - This doubles each pixel horizontally.
- **`row_counter`** counts 0 .. 1599 over a pair of output rows.
  - In the first row (< 800), each output pixel is also written into a line FIFO.
  - In the second row (≥ 800), no valid input arrives (down-sampling dropped that row). The output is read back from the FIFO, which doubles the line vertically.

The FIFO is first-word fall-through (FWFT): its head word is visible before it is read. A FIFO with a read latency would shift the replayed row by one pixel.

The counters re-synchronise each frame. After 2x800 cycles with no valid input, they return to zero and the line FIFO is flushed. The next frame then starts in phase even if the source pauses between frames.

## The Gaussian filter and its 802-sample delay

`gaussian_filter` is a separable 5x5 filter with two stages:

- **Row stage.** A 5-tap window over the last five samples, with symmetric weights K0, K1, K2, K1, K0. The sum is 16 bits wide; the top 8 bits are kept (a divide by 256).
- **Column stage.** The row results of the last four lines are kept in a 400-entry line buffer, one 32-bit word (4 x 8 bits) per column. With the current row result, they form the vertical 5-tap window, weighted and divided the same way.

The weights are 1, 64, 126, 64, 1. They sum to 256, so a flat image passes through unchanged.

**Border padding.** The filter counts the column and row (within the 400x300 frame) of every sample it takes. When the window's centre lies within two pixels of an edge, each tap that would fall outside the image takes the value of the nearest tap inside it. This is edge replication, applied separately in the row and column stages.

No padding samples are inserted into the stream. The filter still produces one output per input, and its delay stays fixed.

The counters start at reset, so frames must arrive whole after reset. A filter whose input comes from another filter already lags the raster by 802 samples. Parameter `LAG` tells it so, and its counters start at the correct offset.

The output for the sample just taken is the smoothed value centred on the sample 2*400 + 2 = **802 samples earlier**: two lines and two pixels back. This delay drives the structure of `gaussian_wrapper`:

- GF1 smooths the input.
- Its output feeds two paths at once:
  - a second filter, GF2;
  - an 802-deep delay line.
- Both paths delay by exactly 802 samples. The delayed G1 and G2 pixels therefore come from the same image position, and their difference is the DoG pixel.
- The difference is saturated at zero.

FWFT FIFOs sit at the wrapper's input and output. All control comes from the input valid, and each valid input gives one valid output 4 cycles later.

In terms of image content, the output is shifted by 1604 samples: 802 for each of the two filter stages in series. The first outputs of a frame therefore still show the end of the previous frame.

`gaussian_wrapper_multi` extends this to a cascade:

- Five filters are chained.
- Each intermediate result is also delayed by 802 samples.
- Level k gives d_k = delayed(G_k) - G_{k+1}, saturated at zero.

## Frame store

The SRAM is 32 bits wide, with an 18-bit word address and a 4-bit byte mask. It holds two frame buffers of 120,000 words each (4 pixels per word, first pixel in the low byte). Buffer *b* starts at word *b* x 120,000.

### `sram_arbiter`

A five-state Moore machine (IDLE, W0, W1, R0, R1) shares the SRAM between four ports:

- **Requests.** A write port requests when its request queue is non-empty. A read port requests when it has an address and its data FIFO has room (`data_full` low).
- **Issue.** In a port's state, that port's request is sent to the SRAM and popped. All outputs depend on the state only.
- **Next state.** Round-robin in the order W0 → W1 → R0 → R1 → W0. A port never follows itself directly: a lone W0 requester alternates W0, IDLE, W0. From IDLE the priority is W0, W1, R0, R1.
- **Read data.** It returns `SRAM_LAT` cycles after the read. A small tag pipe steers it to the port that asked.

In this top level:

- The writer uses W0 and the display reader uses R0.
- W1 (overlay) and R1 are brought out as ports.
- With only W0 and R0 busy, the two alternate, so each gets every other cycle.
- The writer needs one slot per four pixel cycles.

### `image_buffer_writer`

On `bg_start`, the writer:

1. acknowledges, then asks the image source to start a frame (`src_start` / `src_start_ack`);
2. packs the next 480,000 valid pixels into words;
3. queues one write request per word for W0;
4. raises `bg_done` once the last word has been written.

### `image_buffer_reader`

The reader walks the front buffer word by word. A read is requested only when the data FIFO and the reads in flight leave room (credit check). The words are unpacked into a ready/valid pixel stream, with `disp_sof` on the first pixel of each frame.

A swap request is honoured only at a frame boundary, so the display never shows half of one frame and half of the next. The writer always fills the buffer the reader is not showing.

### `swap_controller`

The controller runs the frame loop as a request/acknowledge state machine:

```
IDLE ─system_ready─► BG_START ─bg_start_ack─► BG_WAIT ─bg_done─► OL_START ─ol_start_ack─► OL_WAIT ─ol_done─► SWAP ─swap_ack─► BG_START
```

Its outputs are Mealy outputs: each one is asserted on the transition condition of its state. The overlay pass is kept in the loop, so an external overlay engine must answer `ol_start` / `ol_done`. The testbenches model one that answers at once.

## Switches

| input | effect |
|---|---|
| `sel` = 0 / 1 / 2 | writes G1, G2 or the DoG image |
| `bypass` | writes the source stream unfiltered, for checking the frame store and display on their own |

## Where this design departs from its source, and what is its own

- **Single clock.** The original system ran the pixel path at 10 MHz and the SRAM side at 50 MHz. It did not describe the crossing between them. Here everything runs on one clock, with synchronous, active-high reset.
- **Filter weights.** The original's coefficients are not known. 1/64/126 are chosen so that the weights sum to 256, and the outer weight is 1 (an unscaled outer tap).
- **Border padding.** The original wrapper padded the filter input at image edges, but the scheme is not known. Here each filter replicates edge pixels itself, using position counters, instead of padding the stream. Results within 2 pixels of an edge can therefore differ from the original's.
- **Own designs.** These blocks follow only their names and handshakes in the original, so their insides are this design's own:
  - the writer, the reader and the bypass mux;
  - the port bundles (54-bit write request = address, data, mask);
  - the read-return tag pipe;
  - the SRAM geometry.
- **Valid rules.**
  - The up-sampler's `valid_out` is high whenever its counters run, because every output slot carries a pixel.
  - The DoG is clamped at zero rather than offset or taking an absolute value.
- **Not included.** Clock generation, the static-image ROM, the VGA input path, the overlay engine, the DVI encoder and the SRAM chip. Their signals are top-level ports.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dog_top` | `WIDTH`, `HEIGHT` | 800, 600 | input frame size (must be even) |
| `dog_top` | `SRAM_LAT` | 2 | SRAM read latency in cycles |
| `dog_top` | `LEVELS` | 4 | levels of the multi-level filter bank |
| `gaussian_filter` | `LINE_W` | 400 | filtered line length (WIDTH/2) |
| `gaussian_filter` | `LINES` | 300 | filtered lines per frame (HEIGHT/2), for padding |
| `gaussian_filter` | `LAG` | 0 | samples by which the input lags the raster (802 per filter before it) |
| `gaussian_filter` | `K0`, `K1`, `K2` | 1, 64, 126 | kernel weights, must sum to 256 |
| `gaussian_wrapper` | `DELAY` | 802 | 2*LINE_W+2, must equal the filter delay |
| `up_sample` | `LINE` | 800 | output line length |
| writer/reader | `FRAME_PIX` | 480,000 | pixels per frame, multiple of 4 |
| `fwft_fifo` | `DEPTH` | 16 | queue depth (the up-sampler uses LINE) |

Shared types and sizes are in `rtl/dog_pkg.sv`. Each module's header describes its interface and cycle timing.

## Simulating

Every block has a self-checking testbench in `tb/` with a watchdog. Each ends by printing `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/dog_pkg.sv \
    tb/tb_gaussian_wrapper.sv --top-module tb_gaussian_wrapper
./obj_dir/Vtb_gaussian_wrapper
```

Substitute any `tb_<block>` name to run that block's testbench.

### What the testbenches check

- **Block testbenches.** These use small sizes (8-pixel lines, 64-pixel frames). Each compares against a reference model written in the testbench:
  - a bit-exact 5x5 convolution model for the filters, with edge replication, checked at the borders too;
  - the up-sampler's cycle-exact doubling;
  - an independent round-robin model for the arbiter;
  - a memory model with latency for the frame store.
- **`tb_dog_top`.** Runs the whole design on a 64x48 frame for four frames: bypass with random pixels, a flat DoG (expect black), a flat G1 (expect unchanged) and a step edge (expect a response only near the edge). It checks:
  - every word written to the SRAM model;
  - the display stream against the front buffer.

  It counts the following mechanisms and fails if any never occurred: bypass and filtered frames, swaps, overlay passes, line replays, W0 and R0 services, display stalls, non-zero DoG output, and all four cascade levels.
- **`tb_gaussian_wrapper_frame`.** Two full 400x300 images pass through the DoG stage at its default size, as a down-sampled stream. Every output pixel, including the borders, is checked against the reference, with both the DoG and G1 selections. The testbench also checks the 4-cycle valid timing.
- **`tb_dog_top_full`.** The same test at the default 800x600 size, with no parameter overrides. With Verilator, it runs in seconds.
