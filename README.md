# SOP image encryption on a VGA display

This design encrypts a small image pixel by pixel and shows the result next to
the original on a VGA monitor. Each pixel has 3 bits, one per colour gun:
red, green and blue. Each bit is encrypted with one bit of a 3-bit key, using
the sum of products

    C[i] = P[i]·¬K[i] + ¬P[i]·K[i]

The sum of the two mixed minterms is the exclusive OR of plain bit and key
bit. The same circuit therefore decrypts: D(E(P,K),K) = P. The key comes from
three push buttons. The 640 x 480 screen shows the stored (plain) image in a
window at the top left. A second window at the bottom right shows the same
image with every pixel encrypted. The rest of the screen is black.

The cipher is deliberately trivial. The same key applies to every pixel, so a
one-colour image stays one colour after encryption. Equal plain pixels give
equal cipher pixels, and one known plain/cipher pair reveals the key. This is
a demonstration of per-bit encryption in a display pipeline. It is not a
secure cipher.

## Colours and the key

| pixel | colour  | pixel | colour  |
|-------|---------|-------|---------|
| 000   | black   | 100   | red     |
| 001   | blue    | 101   | magenta |
| 010   | green   | 110   | yellow  |
| 011   | cyan    | 111   | white   |

With key `101`:

| plain         | cipher      |
|---------------|-------------|
| red `100`     | blue `001`  |
| magenta `101` | black `000` |
| yellow `110`  | cyan `011`  |
| white `111`   | green `010` |

If the cipher is black, the encrypted window cannot be told apart from the
background.

Key bit 0 is the button on `U[0]`, bit 1 is on `U[1]` and bit 2 is on
`U[2]`. The key is used as it is held: there is no latch and no debouncing.
A change takes effect from the next pixel on.

## Structure

```
 clk ──► clk_divider ──► pclk (clk/4) clocks everything below

 vga_controller ──col,row──► reader ──addr──► mymemory
        ▲                      ▲ ◄──────datain──────┘
        │                      │
        │             dataout (dataread), ennormal, enencryp
        │                      │
        │                      ├──────────► encryption (key U) ──dataencryp──┐
        │                      ▼                                           ▼
        └──── colors ◄──────── mux ◄── data_normal / data_encryp ◄──────────┘
      (bit 2 → red[0], bit 1 → green[0], bit 0 → blue[0], upper bits 0)

 decryption (key U): dec_cipher ──► dec_plain      (stand-alone)
```

| module           | role |
|------------------|------|
| `main`           | top level, wiring and board ports |
| `clk_divider`    | 2-bit counter; its MSB is the pixel clock `pclk` = clk/4 |
| `mymemory`       | 65536 x 3-bit image memory with a synchronous read port (block RAM style) |
| `reader`         | turns the raster position into a window flag and a memory address, and aligns the read pixel with the flag |
| `encryption`     | combinational SOP of pixel and key |
| `mux`            | registered choice of plain pixel, cipher pixel or black |
| `vga_controller` | 640 x 480 @ 60 Hz raster counters, syncs and blanked colour outputs |
| `decryption`     | the inverse SOP, with its own ports on the top |
| `sop_pkg`        | pixel, DAC and coordinate types, and the colour enum |

## Timing through the pipeline

This is the one part of the design that needs care. `vga_controller` outputs
the current raster position (`col`, `row`). The colour for that position
comes back four pixel clocks later:

1. `reader` stage 1 decides the window and registers the address.
2. `mymemory` reads the address. `reader` carries the window flag alongside.
3. `reader` stage 3 registers the pixel onto `dataout` together with
   `ennormal` or `enencryp`.
4. `mux` registers the plain pixel, the encrypted pixel or black.

`vga_controller` registers colour and syncs together from its counters, so
syncs and colours stay aligned with each other. Relative to the syncs, both
windows appear 4 columns to the right of the origins set in `reader`. With
the default origins the windows are:

- plain: rows 0–149, displayed columns 4–303
- cipher: rows 330–479, displayed columns 334–633

Both fit on the screen. If you move a window, leave 4 columns of margin on
the right. The pipeline takes one position per pixel clock. Encrypting adds
no cycles, because the SOP sits between two registers. Each stored pixel is
shown once plain and once encrypted in every frame of 800 x 525 pixel clocks.

At the board level, a frame takes 1,680,000 board clocks. At 100 MHz board
clock and 25 MHz pixel clock, that is 16.8 ms per frame.

## Parameters of `main`

| parameter | default | meaning |
|-----------|---------|---------|
| `CNT_W` | 2 | width of the clock divider counter (divide by 2^CNT_W) |
| `ADDR_W` | 16 | memory address width (memory depth 2^ADDR_W) |
| `INIT_PATTERN` | 0 | 0: every pixel is `INIT_COLOR`. 1: pixel i holds i mod 8 (test pattern) |
| `INIT_COLOR` | `100` (red) | colour of the one-colour image |
| `IMG_ROWS`, `IMG_COLS` | 150, 300 | image and window size |
| `PLAIN_ROW0`, `PLAIN_COL0` | 0, 0 | plain window origin |
| `CIPHER_ROW0`, `CIPHER_COL0` | 330, 330 | cipher window origin |
| `H_VISIBLE`, `H_FP`, `H_SYNC`, `H_BP` | 640, 16, 96, 48 | horizontal timing in pixel clocks |
| `V_VISIBLE`, `V_FP`, `V_SYNC`, `V_BP` | 480, 10, 2, 33 | vertical timing in lines |

The memory is written row by row: pixel (m, n) is at address m·IMG_COLS + n.
Its contents are fixed when the design is loaded. An `initial` loop fills it
with one colour or with the test pattern. To show a real picture, replace that
loop with your own initialisation, for example `$readmemh` of a file with one
hex digit per pixel. The image must satisfy IMG_ROWS·IMG_COLS ≤ 2^ADDR_W; an
elaboration-time assertion in `reader` checks this.

## Ports of `main`

| port | dir | width | board pin / meaning |
|------|-----|-------|---------------------|
| `clk` | in | 1 | board clock, A8 |
| `reset` | in | 1 | BTN0, active high, synchronous to `pclk`; hold it for at least 4 board clocks |
| `U` | in | 3 | key: BTN1 (bit 0), BTN2 (bit 1), BTN3 (bit 2) |
| `hsync`, `vsync` | out | 1 | R6, R7; active low |
| `VGA_out_red` | out | 4 | P16, P15, T7, R5 (bits 0..3) |
| `VGA_out_green` | out | 4 | N15, J16, K16, K15 |
| `VGA_out_blue` | out | 4 | L15, M16, M15, N16 |
| `dec_cipher` | in | 3 | cipher pixel for the stand-alone decryption |
| `dec_plain` | out | 3 | `dec_cipher` decrypted with key `U` |

Only bit 0 of each colour output ever carries data. Bits 3..1 are tied to
zero at the controller inputs, so each gun is fully on or off.

## Where this implementation makes its own choices

The following points come from this implementation, not from the system
description. Change them freely.

- **Content of `reader`.** Only its ports are given: `col`, `row`, `datain`,
  `clk`, `reset` in; `addr`, `dataout`, `ennormal`, `enencryp` out. The
  two-window layout follows photographs of the running system: plain image
  top left, encrypted image bottom right. The window size is the largest
  image size the system was measured with, 150 x 300, read as
  rows x columns. The exact origins and the 3-stage pipeline were chosen here.
- **VGA timing.** The resolution and mode are not specified. The standard
  640 x 480 @ 60 Hz mode is used, with negative syncs and a 25 MHz pixel
  clock.
- **Clock divider.** It is given as a 2-bit adder and register. The output is
  taken from the counter MSB, which divides by 4. That gives 25 MHz from a
  100 MHz board clock. For a 50 MHz board clock, set `CNT_W = 1`. The divided
  clock drives the clock pins directly. FPGA tools put it on a global clock
  buffer.
- **Mux.** It is registered. It outputs black when neither enable is set.
  `ennormal` wins if both are set, which the disjoint windows rule out.
- **Key.** One 3-bit key is applied to every pixel. An alternative
  formulation steps an index through an array of key values from pixel to
  pixel. That rotating key schedule is not built here, because the hardware
  interface has only the 3-bit button input.
- **Decryption.** The encrypt/transfer/decrypt flow includes a decryption
  stage, but the display system gives it no place. It is provided as a
  combinational block with its own ports on the top.
- **Image contents.** The image is fixed at configuration. No write port is
  described, so there is none.
- **Reset.** Reset is synchronous on the pixel clock. It clears the raster
  counters and the reader's window flags. The clock divider, memory and mux
  have no reset.

## What does not carry over

The per-pixel processing times reported for this system have no counterpart
in this RTL: about 5 ns per pixel without encryption and 13.5 ns with it,
for images from 1 x 1 to 150 x 300. Here both the plain and the encrypted
pixel cost one pixel clock, and the display time is fixed by the VGA frame,
not by the image size. Board pin locations appear only as comments and in
the table above. A constraint file for your board must supply them.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `encryption_tb` | all 64 pixel/key pairs against XOR, plus the four key-`101` examples above |
| `decryption_tb` | all 64 pairs undo the cipher, plus the four examples in reverse |
| `clk_divider_tb` | period of 4 board clocks and high time of 2 |
| `mymemory_tb` | one-clock read latency, pattern and one-colour contents |
| `mux_tb` | random enables and pixels, registered selection |
| `reader_tb` | raster scan and random positions on 3 x 4 windows, against a behavioural memory: window flags, row-major addressing, 3-clock latency, reset |
| `vga_controller_tb` | two full 640 x 480 frames: counters, every sync pulse, 800-clock lines, 525-line frames, blanking, reset |
| `main_tb` | whole design on a 32 x 16 raster with a 3 x 5 pattern image; see below |
| `main_full_tb` | whole design at default parameters for four frames with keys 101, 000, 011 and 111 |
| `image_sizes_tb` | the 15 measured image sizes, 1 x 1 to 150 x 300, each for one full frame |

`main_tb` follows the raster with an independent model and compares every
pixel. During the run it:

- changes the key between frames
- presses reset in the middle of a frame
- drives the decryption port with random cipher pixels
- checks the frame period in board clocks

It fails if plain pixels, cipher pixels, background, hsync, vsync, a key
change, a reset or a decryption never occurred.

`main_full_tb` checks every output at default parameters. In each frame it
also checks that exactly 45000 red pixels and 45000 pixels in the cipher
colour were shown. `image_sizes_tb` uses the helper `tb/frame_checker.sv`,
which runs one instance of the top per image size.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sop_pkg.sv \
          tb/main_tb.sv --top-module main_tb -o sim
./obj_dir/sim
```

The same command works for any testbench: replace both `main_tb` names. The
full-size test and `image_sizes_tb` each take a few seconds. The RTL passes
`verilator --lint-only -Wall` without warnings. It also elaborates in Yosys
through the slang front end.
