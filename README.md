# Streaming edge detector for strip-steel surface inspection

A camera looks at a moving steel strip. Defects such as scratches, holes,
inclusions and dents show up as outlines in the image. This design finds
those outlines in the FPGA while the frame is still streaming in. It stores
the edge map in SDRAM and shows it on a VGA monitor.

The image processing is a Canny edge detector with three changes that make
it cheaper and more robust on noisy industrial images:

* **Adaptive median filter instead of the Gaussian blur.** Salt-and-pepper
  noise (isolated black or white pixels) survives a Gaussian but is removed
  by a median. The filter only replaces a pixel when it looks like an
  impulse, so fine detail is kept.
* **Sobel in four directions** (0°, 45°, 90°, 135°) instead of only x and y.
* **Adaptive double threshold.** The high threshold of each pixel is the
  mean of its 3x3 neighbourhood and the low threshold is half of that. No
  global threshold has to be tuned.

Everything runs at one pixel per clock with no frame buffer in the
processing path. Only line buffers are used, and the only frame store is the
SDRAM between the camera side and the display side.

```
 clk_50m   ov5640_cfg -> iic_ctrl ---------------------------> SCCB (SCL/SDA) to the camera
 cam_pclk  DVP bytes -> ov5640_data -> RGB565 -> rgb2gray -> canny_pipe -> edge pixel
 clk_100m                         write FIFO -> fifo_ctrl -> sdram_ctrl <-> SDRAM pins
 clk_25m                           read FIFO <-/                   vga_ctrl -> HSYNC/VSYNC/RGB565
```

The top module is `strip_defect_top`. At its defaults it is the full
system: 640x480 at 60 Hz VGA, a 50 MHz system clock, 100 MHz SDRAM and a
25 MHz pixel clock. The three clocks come from a PLL outside the module, and
the camera pixel clock comes from the camera (72 MHz on the reference board).

## The edge pipeline (`canny_pipe`)

The pipeline takes one 8-bit gray pixel per valid clock and produces one
edge pixel (255 or 0) per valid clock. It has no back-pressure and no
stalls. Valid gaps in the input, such as camera blanking, simply pass
through.

```
gray -> window 5x5 -> amf -> window 3x3 -+-> sobel4 --------------+-> window 3x3 -> nms -> window 3x3 -> hysteresis -> edge
                                         +-> adaptive_threshold --+   (28 bits)          (2 bits)
```

### Windows and the border (`window_gen`)

Each KxK window is built from K-1 line buffers of `IMG_W` words plus a KxK
register array. It outputs one window per input pixel, so every stage lags
by K/2 rows and K/2 columns. The four windows (5, 3, 3, 3) add up to a lag
of 2+1+1+1 = 5. In the output stream, the edge pixel of picture position
(r, c) appears at stream position (r+5, c+5). On the display the edge map
is therefore shifted 5 pixels right and 5 down.

A window that would wrap across the picture's left or right edge, or reach
above the first row, is flagged *not ok*. That flag travels with the data
through every line buffer, so each later stage knows whether its whole
neighbourhood was real. Stages output 0 where it was not. The result is
that the outer 5-pixel frame of the edge map is 0. This costs one bit per
line-buffer word and makes the result exactly equal to a whole-image
reference computation.

### Adaptive median filter (`amf`, `minmedmax`)

From the 5x5 window the filter takes the minimum, median and maximum of the
inner 3x3 and of the whole 5x5. The selection is:

| condition | output | `sel` |
|---|---|---|
| min3 < med3 < max3 and min3 < centre < max3 | centre (not an impulse) | 0 |
| min3 < med3 < max3, centre is min3 or max3 | med3 | 1 |
| 3x3 median itself an impulse; min5 < med5 < max5 and min5 < centre < max5 | centre | 2 |
| same, centre is min5 or max5 | med5 | 3 |
| 5x5 median also an impulse | med5 | 3 |

The last row is this design's choice; see *Departures* below. The sorter
does not use a sorting network. It ranks the values instead: element i is
the median when exactly N/2 others are smaller, where ties are broken by
index. This needs N·(N-1) comparators (72 for 3x3, 600 for 5x5), all in
one register stage, and the selection is in a second stage.

### Four-direction Sobel (`sobel4`)

The module computes four 3x3 kernels: horizontal gradient (0), the
top-left/bottom-right diagonal (1), vertical (2) and the other diagonal
(3). The magnitude is the largest |response|, 10 bits. The direction is the
index of that kernel, and the lower index wins a tie. It uses two register
stages.

### Adaptive double threshold (`adaptive_threshold`)

Its input is the same 3x3 window of the filtered image. The output
`thigh = floor(sum / 9)` and `tlow = thigh / 2`. The sum is registered
after one clock and the thresholds after the next. For the window
36,129,9,99,13,141,141,101,18 the results are sum 687, thigh 76 and tlow
38. The testbench checks exactly this case. The sum is 12 bits wide
because 9·255 = 2295.

### Non-maximum suppression and classification (`nms`)

The gradient window carries 28 bits per pixel: {magnitude, direction,
thigh, tlow}. The centre magnitude is kept when it is greater than the
first neighbour along its direction and at least as large as the second.
This tie rule keeps a two-pixel-wide ridge once, not twice. The kept
magnitude is classified against the centre's own thresholds: 2 for strong
(≥ thigh), 1 for weak (≥ tlow), 0 otherwise. A zero magnitude is never an
edge.

### Hysteresis (`hysteresis`)

A strong pixel is an edge. A weak pixel is an edge when one of its eight
neighbours is strong; `promoted` pulses when that happens. This is a single
pass: a chain of weak pixels is not followed further than one step, because
a full connectivity search would need the whole frame.

## Camera side

**`iic_ctrl`** is the SCCB/IIC master. It is the 16-state machine IDLE,
START_1, SEND_D_ADDR, ACK_1, SEND_B_ADDR_H, ACK_2, SEND_B_ADDR_L, ACK_3,
WR_DATA, ACK_4, START_2, SEND_RD_ADDR, ACK_5, RD_DATA, N_ACK, STOP. It
supports single-byte writes and random reads with an 8- or 16-bit register
address (`addr_num`). Each SCL bit has four quarter phases (`cnt_iic_clk`
0..3). SDA changes in the low quarter and is sampled in the third quarter.
A missing acknowledge ends the transfer with STOP and raises `ack_err`
together with `iic_end`. SDA is open drain: `sda_oe = 1` pulls the line
low.

**`ov5640_cfg`** waits `POWER_UP_WAIT` clocks. It then writes a table of
camera registers: clock source, RGB565 output, 640x480 DVP size, and power
down while writing. A refused write is retried. `cfg_done` goes high at the
end.

**`ov5640_data`** assembles RGB565 pixels from the DVP bytes, high byte
first, while HREF is high. It starts at the first VSYNC rising edge after
`cfg_done`, so only whole frames enter the pipeline, and it marks the first
pixel with `pix_sof`. `rgb2gray` computes (77R + 150G + 29B) >> 8. The top
widens RGB565 to RGB888 by repeating the top bits of each channel.

## Frame store (`sdram_top` = `fifo_ctrl` + `sdram_ctrl`)

The SDRAM is a W9825G6KH: 4 banks × 8192 rows × 512 columns × 16 bits. A
word address is {bank, row, column}, 24 bits.

**`fifo_ctrl`** holds a dual-clock write FIFO (pixel clock in, SDRAM clock
out) and a dual-clock read FIFO (SDRAM clock in, VGA clock out). Both are
`async_fifo` with Gray-coded pointers and show-ahead output. The module
walks a write address and a read address through one frame of
`FRAME_WORDS` words, each from its own base, and wraps back to the base at
the end of the frame.

* A write burst is requested once the write FIFO holds a whole burst.
* A read burst is requested while `read_valid` is high and the read FIFO
  has room for a whole burst.
* A burst is `BURST_LEN` words, cut short where it would cross the end of an
  SDRAM row or the end of the frame. It must not cross the row end because a
  full-page burst wraps inside its row.
* Handshake: the request is held with stable address and length until the
  ack rises. The address advances when the ack falls.

**`sdram_ctrl`** contains five sub-modules:

* `sdram_init`: 200 µs wait, PRECHARGE ALL, 8 × AUTO REFRESH, LOAD MODE
  REGISTER with CAS latency 3, sequential, full-page burst. Raises
  `init_end`.
* `sdram_aref`: asks for a refresh every 750 clocks (7.5 µs), then issues
  PRECHARGE ALL and AUTO REFRESH and waits tRFC.
* `sdram_write`: ACT, tRCD, WRITE with the first word, the remaining words,
  BURST TERMINATE after N words, PRECHARGE, tRP. `wr_ack` pops the write
  FIFO.
* `sdram_read`: ACT, tRCD, READ, BURST TERMINATE after N words, PRECHARGE,
  tRP. A shift register of in-flight reads raises `rd_ack` when the data
  reaches the module, 5 clocks after the READ leaves it: CAS latency 3, plus
  the output register, plus the input register.
* `sdram_arbit`: priority refresh > write > read. A grant lasts until the
  module's sequence ends. It multiplexes the command, bank, address and data
  buses.

All SDRAM outputs and the read data are registered once in `sdram_ctrl`.
DQ is split into `dq_o`, `dq_oe` and `dq_i`, so the tri-state buffer
belongs in the pad ring. CKE is always 1 and DQM always 0, because the
design neither powers down nor masks bytes. These two ports are constant
on purpose.

Because the bursts are full-page bursts cut by BURST TERMINATE, any burst
length from 1 to 512 works with one mode-register setting. The top uses 512
by default, so a 640-pixel line costs about two bursts.

## Display (`vga_ctrl`)

A line is 96 sync + 40 back porch + 8 left border + 640 active + 8 right
border + 8 front porch = 800 clocks at 25 MHz. A frame is 2 + 25 + 8 + 480
+ 8 + 2 = 525 lines. Both syncs are active low. `pix_data_req` is high
exactly in the 640×480 active area, and it pops the read FIFO. `rgb` is
`pix_data` there and 0 elsewhere.

The top holds `vga_ctrl` in reset until the SDRAM is initialised; this is
synchronised into the VGA clock. That way the first frame read starts at
the frame's first word, and after that the read side stays aligned to the
frame by construction.

## Departures from the original description, and choices made here

* **Burst length.** The SDRAM test was described as a burst length of 10.
  The mode-register figure shows a full-page burst with BURST TERMINATE.
  The figure is followed: full-page bursts are cut after N words, and
  N = 10 is exercised in the controller testbench.
* **HSYNC polarity.** The text says HSYNC is low during sync, but the
  simulation waveform shows a high pulse. The text is followed, and
  VSYNC is active low too. The vertical timing was not given, so the
  standard 640x480 values are used.
* **Test colour.** The VGA test colour is printed as `16'd5535`. It is read
  as hexadecimal 5535, which matches the waveform.
* **IIC device address.** The given address is 7'b1010_000, i.e. 160/161,
  an EEPROM's address. A real OV5640 answers at 0x3C (0x78/0x79).
  `DEVICE_ADDR` keeps the given value and can be changed.
* **Camera register table.** Only nine registers are written: clock, format,
  output size and power-down. A real OV5640 needs its vendor initialisation
  table (about 250 writes), which was not given. Add it to the
  `cfg_entry()` function in `ov5640_cfg`.
* **Adaptive median filter, last branch.** When even the 5x5 median looks
  like an impulse, the flowchart ends without an output. This design
  outputs the 5x5 median.
* **Four-direction Sobel combination.** How the four responses combine into
  one magnitude and direction is not given. Here the largest response wins.
* **Threshold sum width.** The threshold sum was printed as 10 bits. It is
  12 bits here, so that it cannot overflow.
* **Hysteresis.** It is single pass (8-neighbour), as described above.
* **Clocks.** The 100 MHz SDRAM clock, 250 kHz SCL, 750-clock refresh
  period and SDRAM timing values (tRCD = tRP = 2, tRFC = 7, tMRD = 2) are
  this design's choices, taken from the part's data sheet at 100 MHz.
* **Not built.** The PLL (vendor IP; its clocks are inputs), the camera and
  SDRAM chips (behavioural models exist in `tb/`), a PCF8591T AD/DA
  converter that is only named, and a YOLO classifier that runs on a PC.

## Capacity and speed

* A 640×480 frame is 307,200 words, 1.8 % of the SDRAM.
* The camera's 72 MHz DVP clock carries one byte per clock. The pipeline
  therefore sees at most one pixel every second clock, and it can take one
  every clock.
* Peak SDRAM demand is about 61 Mword/s: camera writes of 36 Mword/s
  inside a line, plus VGA reads of 25 Mword/s. With 512-word bursts the
  controller delivers about 96 Mword/s. The 1024-word FIFOs cover one line
  of either side while the other side's burst runs.
* Latency from camera to SDRAM is 5 lines + 5 pixels + about 10 clocks. A
  frame is processed as fast as the camera sends it. At 72 MHz that is
  8.5 ms of pixel data per 640×480 frame.

## Verification

Each module has a self-checking testbench in `tb/`. The image-processing
stages are compared bit for bit with a behavioural reference of the whole
algorithm in `tb/canny_ref_pkg.sv`. The SDRAM side runs against
`tb/sdram_model.sv`, which checks command timing (tRCD, tRP, tRFC, tWR), bank state, refresh spacing and the power-up sequence, and which
stores data. `tb/iic_slave_model.sv` is an IIC target with a 64 K register
space. `tb/ov5640_dvp_model.sv` generates DVP frames of a test picture
with texture, a bright block, a diagonal scratch and salt-and-pepper
impulses.

* `tb_strip_defect_top` runs the whole system at 32×24 with short blanking.
  The camera refuses the first SCCB transfers, so a retry is forced. The
  captured VGA frame, blanking and sync widths included, is compared pixel
  by pixel with the reference edge map. The test also counts IIC retries,
  all four filter branches, hysteresis promotions, refreshes, write and
  read bursts, bursts cut at a row end, arbitration waits and displayed
  edges. Each count must be non-zero.
* `tb_strip_defect_full` is the same check with every top parameter at its
  default: a 640×480 picture, real clocks, a 1 ms configuration wait and
  200 µs SDRAM power-up. It simulates about 50 ms in about 15 s.

To run one testbench with Verilator (5.0 or later):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/sdram_pkg.sv tb/canny_ref_pkg.sv \
    tb/tb_strip_defect_top.sv --top-module tb_strip_defect_top -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`.

## Changing the design

* **Picture size:** set `IMG_W` and `IMG_H`, plus the blanking parameters,
  on `strip_defect_top`. The line buffers grow with `IMG_W`.
* **SDRAM burst:** `BURST_LEN` can be 1 to 512. It must not exceed the FIFO
  depth `2**FIFO_AW`.
* **Camera registers:** edit `cfg_entry()` and `REG_NUM` (the last index) in
  `ov5640_cfg`. Widen the 4-bit index and `reg_idx` if it grows past 16
  entries.
