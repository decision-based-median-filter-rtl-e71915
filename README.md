# Decision based median filter for salt-and-pepper noise

Salt-and-pepper (impulse) noise replaces random pixels of an 8-bit grayscale
image by pure black (0) or pure white (255). A plain 3x3 median filter
removes it at low densities but blurs edges, and it breaks down once half a
window is noise, because the median itself is then a noise value.

This design detects noise before filtering. A pixel is treated as a
candidate for noise only if it is exactly 0 or 255. Every other pixel is
passed through unchanged. A candidate is then replaced by a value chosen
from its 3x3 neighbourhood. The rule used depends on how much of the
neighbourhood is still information (neither 0 nor 255). The filter handles
one window per clock. It sits in a small system: a host loads an image over
a serial line (UART) and starts filtering, and the system sends the
filtered image back.

```
 uart_rxd ──► uart_rx ──► dbmf_ctrl ──► image_ram (input image)
                              │                │ one read per clock
                              │                ▼
                              │          window_gen ──► dbmf_filter
                              │                              │
                              ◄── image_ram (filtered image) ◄┘
 uart_txd ◄── uart_tx ◄───────┘
```

## The filtering decision

Number the window in raster order, 0 to 8, so that pixel 4 is the centre P.
Call a pixel *noisy* if it is 0 or 255, and an *information pixel* otherwise.
Let `n` be the number of information pixels in the window (0 to 9). The
filter (`rtl/dbmf_filter.sv`) applies the first rule that matches:

| # | condition | output | `fcase` |
|---|-----------|--------|---------|
| 1 | P is an information pixel | P unchanged | `FC_CLEAN` |
| 2 | P is noisy and all nine pixels equal P | P unchanged: a solid black or white area is treated as image content | `FC_UNIFORM` |
| 3 | n = 0: every pixel is 0 or 255 | mean of the nine pixels, `sum / 9` truncated | `FC_MEAN` |
| 4 | 1 ≤ n ≤ 4: more than half of the window is noisy | the first information pixel in raster order, 0 to 8 | `FC_NEAREST` |
| 5 | n ≥ 5 | median of the information pixels | `FC_MEDIAN` |

Rule 4 exists because, when most of the window is noise, a median can
easily land on a noisy value. Rule 4 then takes a real neighbour directly.

Examples (hex, raster order, centre in brackets):

| window | rule | output |
|--------|------|--------|
| `1B 19 1D / 0F [FF] 37 / 1F 16 14` | 5 | `1B` |
| all `00`, or all `FF` | 2 | unchanged |
| `1B FF FF / FF [FF] FF / 05 19 33` | 4 | `1B` |
| `00 FF 00 / FF [FF] 00 / 00 FF 00` | 3 | 4·255/9 = `71` |

**Median without compaction.** The information pixels sit at unknown
positions, and there can be from 5 to 9 of them, so rule 5 cannot use a
fixed-size median network. Instead, all nine pixels go through a sorting
network (`rtl/sort9.sv`, an odd-even transposition network of 9 stages and
36 compare-exchange cells). In the sorted vector every 0 is at the bottom and
every 255 is at the top. The information pixels therefore form one
contiguous run `sorted[z .. z+n-1]`, where `z` is the number of zeros. The
median is `sorted[z + n/2]`. When `n` is even this is the upper of the two
middle values, which is what the first example above needs: its 8
information pixels have middle pair `19`, `1B`, and the result is `1B`.

**Timing.** The counts, the sum, the sort and the rule selection are all
combinational. The result is registered, so `med` and `out_valid` appear on
the clock edge after the window is presented. A new window can be given
every clock. Reset (synchronous, active high) clears `med` to 0.

`fcase` reports which rule fired. Nothing in the system uses it. It is there
so that a simulation can observe the decisions.

## Forming the windows

`rtl/window_gen.sv` takes pixels in raster order, one per `in_valid`. It keeps
the two previous rows in two line buffers. Each incoming pixel pushes a
column `{row y-2, row y-1, row y}` into a 3x3 shift array. Once at least
three rows and three columns have been seen, the array is a full window
centred one row and one column behind the input. `out_valid` rises on the
clock edge that takes the completing pixel.

The image borders are handled by padding. The controller does not feed the
raw image. It feeds the image with one extra pixel on every side, and each
extra pixel copies the nearest border pixel. It does this by clamping the
read coordinates: padded position `(py, px)` reads image pixel
`(clamp(py-1), clamp(px-1))`. The line length is `IMG_W + 2`. The window
generator then produces exactly `IMG_W * IMG_H` windows, one per image
pixel, in raster order. The controller writes each filter result to the
next address of the output RAM.

A full scan takes `(IMG_W+2) * (IMG_H+2)` clocks, which is 7874 clocks
(157.5 µs at 50 MHz) for the default 125 x 60 image. The filter latency
adds a few more clocks.

## Host protocol and serial link

The serial format is 8 data bits, no parity and 1 stop bit (8N1), at `BAUD`
(default 9600) from a `CLK_HZ` clock (default 50 MHz). That makes
`CLK_HZ/BAUD = 5208` clocks per bit.

| host sends | system does |
|------------|-------------|
| `0x4C` ('L') followed by `IMG_W*IMG_H` bytes | stores the bytes, in raster order, as the input image |
| `0x53` ('S') | filters the stored image, then sends `IMG_W*IMG_H` filtered bytes in raster order |
| any other byte while idle | ignored |

`busy` is high from the command byte until the last byte has been loaded or
sent.

The input RAM can also be preloaded at start-up through the `INIT_FILE`
parameter of `image_ram`. The host then only has to send 'S'. The top level
does not pass this parameter through.

- **Transmitter** (`uart_tx`): a 10-bit shift register (start bit, data
  LSB first, stop bit), loaded in parallel and shifted once per bit time.
  `ready` rises in the last clock of the stop bit. A byte handed over then
  follows the previous one with no idle time, so an image goes back at the
  full line rate: 7500 bytes × 10 bits / 9600 baud = 7.8 s.
- **Receiver** (`uart_rx`): a two-flop synchroniser, then a start-bit check
  half a bit after the falling edge, which ignores shorter glitches. It then
  samples at the centre of each bit. A frame whose stop bit is low is
  dropped, and `frame_err` pulses instead of `valid`.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `CLK_HZ` | 50 000 000 | `dbmf_system`, `uart_rx`, `uart_tx` |
| `BAUD` | 9600 | `dbmf_system`, `uart_rx`, `uart_tx` |
| `IMG_W`, `IMG_H` | 125, 60 | `dbmf_system`, `dbmf_ctrl` |
| `DEPTH` | 7500 | `image_ram` (the top sets it to `IMG_W*IMG_H`) |
| `LINE` | 127 | `window_gen` (the top sets it to `IMG_W+2`) |

Storage at the defaults is two 7500 × 8-bit RAMs and two 127 × 8-bit line
buffers. A 128 × 128 image needs `IMG_W = IMG_H = 128`, which gives two
16384-byte RAMs. The image size is fixed when the design is built: a frame
of a different size needs different parameters.

## Design choices and limits

The detection rules, the 3x3 window, the one-clock filter, the 50 MHz clock,
the 9600 baud 8N1 link and the 125 x 60 frame come from the published
algorithm and its FPGA implementation. The following were left open there
and are this design's own choices:

- **"Nearest" information pixel (rule 4)** is the first one in raster
  order. This reproduces the reference example above, where `1B` (top
  left) is chosen although `19` (directly below) is closer.
- **Threshold for rule 4** counts the whole window, centre included: at
  least 5 of 9 noisy. The alternative reading, at least 5 of the 8
  neighbours noisy, gives the same answer on the reference example. It
  differs on other windows.
- **Even-count median** is the upper middle value, and **the rule 3 mean**
  is truncated.
- **Borders** use replicated edge pixels. A noisy border pixel is therefore
  seen twice in its own window.
- **Output RAM.** The filtered image is buffered in a second RAM and sent
  only after the whole image is filtered. It is not streamed while the
  filter runs.
- **Command bytes, the load path, `busy` and the UART handshake** are
  invented here.
- **Send-back time.** The published implementation reports that returning
  the filtered 60 x 125 image over the UART takes at most 6.9 s. At 9600
  baud 8N1 the 7500 bytes need 7.8 s. This design takes 7.8 s, and no gap
  between bytes could make it faster.
- **Image quality at high noise density.** With rule 3 as stated, a window
  that is all 0 and 255 gets a value between them, such as `71` for four
  255s. At 80 % to 90 % noise many windows are like that, and the PSNR the
  tests measure there is well below the published figures (about 27 dB at
  90 % noise). The published figures may come from a filter that reuses
  pixels it has already filtered. That is not described, and this design
  does not do it: every window is taken from the unfiltered input image.
- **Filter time.** The published figure of one clock per pixel (150 µs per
  image) leaves out border handling. Here a scan is 7874 clocks
  (157.5 µs).

## Files

| file | contents |
|------|----------|
| `rtl/dbmf_pkg.sv` | pixel and window types, 0/255 constants, rule enum, command codes |
| `rtl/dbmf_filter.sv` | the decision based median filter |
| `rtl/sort9.sv` | 9-input sorting network used by the filter |
| `rtl/window_gen.sv` | line buffers and 3x3 window array |
| `rtl/image_ram.sv` | synchronous RAM for one image |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 serial receiver and transmitter |
| `rtl/dbmf_ctrl.sv` | command decoding, load, padded scan, send-back |
| `rtl/dbmf_system.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches: one per module and four system tests (reduced, 50 x 50, 128 x 128, full size) |
| `tb/tb_dbmf_system_body.svh` | host model, reference filter and checks shared by the system tests |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
A watchdog ends it with a failure if it hangs. To build and run one with
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/dbmf_pkg.sv tb/tb_dbmf_filter.sv --top-module tb_dbmf_filter -o sim
./obj_dir/sim
```

The testbench names are `tb_dbmf_filter`, `tb_window_gen`, `tb_image_ram`,
`tb_uart_rx`, `tb_uart_tx`, `tb_dbmf_ctrl`, `tb_dbmf_system`,
`tb_dbmf_system_50`, `tb_dbmf_system_128` and `tb_dbmf_system_full`.

- **Block tests** compare each block with a model written independently
  inside the testbench. The filter test runs the example windows above and
  4000 random windows at every noise density. It checks the result, the
  rule taken and the one-clock latency. The UART tests check bit timing to
  the clock.
- **`tb_dbmf_system`** is a reduced configuration: an 11 x 18 image, 10
  clocks per bit. It runs in seconds. It acts as the host over the serial
  line and does an ignored byte, then LOAD, START and read-back twice. It
  checks every returned pixel against a reference filter, and checks that
  the scan takes `(W+2)(H+2)` clocks plus a few. It also counts each
  mechanism (ignored command, load, start, all five rules, border windows,
  back-to-back transmission) and fails if any of them never occurred. The
  test image is a smooth ramp in horizontal bands of 10 % to 90 % noise,
  with solid 0 and 255 blocks, and the PSNR of each band is printed.
- **`tb_dbmf_system_50`** and **`tb_dbmf_system_128`** run the same
  system test on 50 x 50 and 128 x 128 images. They use a fast serial link.
- **`tb_dbmf_system_full`** runs the top with every parameter at its
  default: 50 MHz, 9600 baud and a 125 x 60 image. It preloads the image into
  the input RAM, sends START and checks all 7500 returned pixels. That is
  about 390 million clocks, and it takes several minutes in Verilator.
