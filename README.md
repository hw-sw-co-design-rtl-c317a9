# Histogram-equalization accelerator behind a PCIe/Avalon-MM framework

This RTL is an FPGA coprocessor that corrects over- and under-exposed colour
images by histogram equalization. It is a preprocessing step for face and
object recognition on a robot. A host processor copies a 24-bit image into
on-chip memory over PCIe. It programs a few registers and starts the
accelerator. The accelerator then:

1. counts how often every tone occurs in each colour channel,
2. builds one cumulative distribution over all three channels,
3. turns it into a 256-entry tone-mapping table,
4. rewrites every pixel through that table.

The host then reads the equalized image back. The whole run takes
`2*M*N + 566` clock cycles for an M x N image. That is two passes over the
pixels at one pixel per clock, plus a fixed 552 cycles for the table, plus 14
cycles of pipeline fill. At 125 MHz a 400 x 300 image takes 1.92 ms.

The design has two halves:

* **The framework.** It is reusable for other accelerators. It contains a
  dual-port on-chip memory, an Avalon-MM interconnect, a configuration slave,
  a read master (memory to accelerator) and a write master (accelerator to
  memory).
* **The equalization core.** It is `hist_equalizer` together with its
  pipelined divider.

The PCIe hard IP and its Avalon-MM bridge are vendor blocks and are not part
of this RTL. The top, `accel_wrapper`, brings out the bridge's Avalon-MM
master side as its host port.

```
 host port (Avalon-MM, from the PCIe bridge)
      |
 avalon_interconnect ---- config_slave (registers 0x20000-0x2000F)
   |        |    |                 | start, addresses, M*N
   |port A  |    |port B           v
 onchip_memory   |           hist_equalizer --- pipelined_divider
   ^        ^    |             ^        |
   |        |  read_master ----+        |  pixels in (valid/ready)
   |        +--------------------------- write_master <-+ pixels out, write_full
```

## Equalization algorithm as built

Let `h0`, `h1`, `h2` be the 256-bin histograms of the three channels of an
image with `P = M*N` pixels. The core uses a single cumulative count over all
three channels:

    cum[i] = sum over k <= i of (h0[k] + h1[k] + h2[k])      (0 <= cum[i] <= 3P)
    t[i]   = floor(255 * cum[i] / (3P))

Every channel value `v` of every pixel is replaced by `t[v]`. Because all
three channels share one table, their relative balance is kept while the
whole tone range is used. `t[255]` is always 255.

Each phase is a state of the core's controller. Before the first run, a
CLEAR state zeroes the histograms once after reset. It takes 256 cycles,
during which the core reports busy and ignores start.

| state | cycles | what happens |
|-------|--------|--------------|
| HIST  | P + fill | First pass over the image. Each accepted pixel increments one bin in each of the three histograms (three 256 x 18-bit memories, read-modify-write). |
| CUMU  | 258 | A two-stage pipeline. Stage 1 sums the three bins of tone `i` and clears them, so the histograms are zero for the next image. Stage 2 adds that sum to the running total and stores `cum[i]`. |
| TRAN  | 256 + 40 + 1 | Each cycle sends `255*cum[i]` to the divider, computed as `(cum << 8) - cum`. The divisor is `3P`, computed at start from height x width. Each quotient returns 40 cycles later with its tag `i` and is written to `t[i]`. |
| SCAN  | P + fill | Second pass. Each pixel is mapped through `t` and goes to the write master. |
| DRAIN | a few | Waits until the write master has stored the last word, then pulses `done`. |

The **divider** (`pipelined_divider`) is a restoring divider with one
quotient bit per stage. The 40-bit dividend therefore gives exactly 40
pipeline stages. The divisor is 24 bits wide (3 x 8). A new division can
enter every clock.

## Memory format and the two DMA masters

Images are stored exactly as the pixel array of a 24-bit BMP file. Each pixel
is three consecutive bytes, and bytes are packed little-endian into 32-bit
words. Four pixels therefore fill three words. Channel 0 is the byte at the
lowest address. Rows must not be padded, which means `width*3` must be a
multiple of 4. All the image sizes listed below satisfy this.

* **`read_master`** issues back-to-back word reads while its 4-word FIFO has
  room for the data still in flight. It keeps a byte buffer of up to six
  bytes. The buffer emits a pixel whenever it holds three bytes and the core
  is ready. It pulls a new word whenever two bytes or fewer would remain.
  This sustains one pixel per clock. The master runs once per pass, so twice
  per image.
* **`write_master`** does the reverse packing. Each pixel adds three bytes to
  its buffer, and every four bytes become a word in an 8-entry FIFO. After
  the last pixel, the remaining bytes go out as a final word with partial
  byte enables. Memory after the image is never touched.
* **Pausing the core.** When the bus is saturated, the write master raises
  `full` (the core's `write_full`) once 6 or more words are queued. The core
  then stops taking pixels in SCAN. The read master holds the pending pixel,
  and the run resumes when the FIFO drains. The two-word margin covers the
  pixel already in the core's output register.

Source and target regions may be the same, and the host software normally
processes images in place at word 0. This is safe because in the second pass
the write master always trails the read master.

## Interconnect and arbitration

`avalon_interconnect` joins the bridge (host), the read master, the write
master, the memory and the registers.

* **Address decode.** Word addresses `0x00000-0x1FFFF` go to the memory.
  Addresses with bit 17 set go to the register file (`0x20000-0x2000F`).
* **Port A of the memory** serves host reads and the read master.
* **Port B of the memory** serves host writes and the write master.

With this split, the two DMA masters never compete with each other, so the
second pass runs at full rate. The host has fixed priority and never waits.
A DMA master that collides with a host access sees `waitrequest` for that
cycle. Every read returns exactly one cycle after it is accepted, and
`readdatavalid` is routed back to the master that issued it.

## Register map (host word addresses)

| address | register | access |
|---------|----------|--------|
| 0x20000 | source image address (memory word) | R/W |
| 0x20001 | target image address (memory word) | R/W |
| 0x20002 | image length in 32-bit words | R/W |
| 0x20003 | height M (pixels) | R/W |
| 0x20004 | width N (pixels) | R/W |
| 0x20005 | command, 1 = equalize | R/W |
| 0x20006 | start: write 1 to start a run | W |
| 0x20007 | process time: clock cycles from start to done | R |
| 0x20008 | status: bit 0 busy, bit 1 done, bit 2 error | R |
| 0x20009-0x2000F | unused, read 0 | - |

A start is refused, and the error bit set, in any of these cases:

* the command is not 1;
* M*N is 0 or needs more than 18 bits;
* `4*length < 3*M*N`;
* either image would run past the end of memory.

A refused start therefore cannot hang the machine. The done and error bits
clear on the next start.

Host procedure:

1. Write the image words.
2. Write registers 0-5.
3. Write 1 to register 6.
4. Poll register 8 until busy clears. Also wait for busy to clear after a
   reset before the first start.
5. Read the result, and optionally register 7.

## Evaluated image sizes

All sizes are 24-bit images at the default parameters (512 KiB memory), run
in place at word 0. "Measured" is the process-time register in simulation
(`tb_accel_full`); the figure in brackets is the time the original FPGA
implementation reported.

| image | words | measured cycles | at 125 MHz |
|-------|-------|-----------------|------------|
| 400 x 300 | 90,000 | 240,566 | 1.925 ms (1.9256 ms) |
| 320 x 240 | 57,600 | 154,166 | 1.233 ms (1.2344 ms) |
| 160 x 240 | 28,800 | 77,366 | 0.619 ms (0.3127 ms reported) |
| 80 x 60 | 3,600 | 10,166 | 0.081 ms (0.0824 ms) |

The 160 x 240 figure reported for the original is below its own
`2*M*N + 552` cycle formula, which gives 0.619 ms. This design follows the
formula.

## Where this design departs from the original description, or fills gaps

* **Clock and reset.** There is one clock domain, meant for 125 MHz, and one
  asynchronous active-low reset.
* **Addresses.** All addresses are 32-bit word addresses. The 512 KiB memory
  is read from the `0x00000-0x1FFFF` range.
* **Divisor.** The shared cumulative function is divided by `3*M*N`, so all
  channels use one table. The printed formula divides by `M*N` alone, but the
  reference software and the original hardware use `3*M*N`.
* **Pausing in SCAN.** In the original, SCAN only skipped the table lookup
  while `write_full` was set, which would drop pixels. Here the core pauses
  the input stream with a valid/ready handshake instead.
* **Pipeline lengths.** CUMU and TRAN pipelines are slightly shorter than in
  the original, and the run ends only after the last word is written. The
  total is 14 cycles more than the published `2*M*N + 552`.
* **Design choices not taken from the description:**
  * the histogram is a memory with an indexed increment, cleared as it is
    read, instead of register counters with one-hot count enables;
  * the divider is a restoring divider standing in for a vendor divider;
  * the FIFO depths;
  * the port split and fixed host priority in the interconnect;
  * the status bits and configuration checks;
  * the packed-byte pixel format.
* **Completion reporting.** No interrupt is raised; the host polls the status
  register.
* **BMP row padding** is not supported.

## How far it has been checked

* Every module has a self-checking testbench with random stalls. All of them
  pass in Verilator.
* Each testbench was also run against a deliberately broken copy of its
  module, and it caught the fault every time.
* The end-to-end results match the reference model bit for bit, for all
  evaluated image sizes.
* The code is written to be synthesizable and goes through generic coarse
  synthesis.
* It has not been placed and routed on an FPGA, so the 125 MHz target is
  unverified. The most likely critical paths are the single-cycle
  read-modify-write of the histogram bins and the three table look-ups in
  SCAN. Both read asynchronously from 256-entry arrays.

## Files

| file | contents |
|------|----------|
| `rtl/he_pkg.sv` | widths, Avalon-MM request/response structs, register indices |
| `rtl/accel_wrapper.sv` | top level |
| `rtl/hist_equalizer.sv` | equalization core (HIST/CUMU/TRAN/SCAN) |
| `rtl/pipelined_divider.sv` | 40-stage divider |
| `rtl/onchip_memory.sv` | dual-port memory with byte enables |
| `rtl/avalon_interconnect.sv` | decode and arbitration |
| `rtl/config_slave.sv` | register file |
| `rtl/read_master.sv`, `rtl/write_master.sv` | DMA masters with pixel (un)packing |
| `tb/he_ref_pkg.sv` | reference equalization and test-image generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_accel_full` and `tb_accel_transfer` |

Parameters with their defaults:

* `accel_wrapper`: `MEM_DEPTH = 131072` words, `PIX_W = 18` (bits of a pixel
  count, enough for the largest image the memory holds), `DIVIDEND_W = 40`
  (the divider's width and number of stages).
* Widths fixed in `he_pkg`: channel width `X = 8`, `W = 256` bins, 3 channels.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/he_pkg.sv tb/tb_accel_wrapper.sv --top tb_accel_wrapper
./obj_dir/Vtb_accel_wrapper
```

* `tb_accel_wrapper` is the end-to-end test. It runs three small images, one
  of them with host memory traffic during the run. It checks every output
  byte and the process time. It also checks that each mechanism occurred at
  least once:
  * read-master waitrequest;
  * write-master waitrequest;
  * a pause through `write_full`;
  * in-place processing;
  * a refused start.
* `tb_accel_full` runs the four image sizes above at the default parameters,
  in about a second of simulation.
* `tb_accel_transfer` moves 1 KiB, 64 KiB and the full 512 KiB through the
  host port at one word per clock each way and checks every word.
* The module testbenches (`tb_hist_equalizer`, `tb_pipelined_divider`,
  `tb_read_master`, `tb_write_master`, `tb_avalon_interconnect`,
  `tb_config_slave`, `tb_onchip_memory`) exercise each block alone, with
  random stalls.

The reference model in `tb/he_ref_pkg.sv` computes the table straight from
the definition above, so the hardware pipeline is checked against
independent arithmetic.
