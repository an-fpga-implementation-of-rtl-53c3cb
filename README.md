# Randomised chrominance-flag steganography engine for 512 × 512 colour images

This RTL hides a secret message in a colour image so that the image still
looks the same. It also recovers the message. It has three main ideas:

* **Work in Y/Cb/Cr, not RGB.** The eye is less sensitive to the two colour
  difference planes (Cb, Cr) than to brightness (Y). The luminance plane is
  never modified; only least significant bits of Cb and Cr change.
* **Store a flag, not the message bit.** A message bit is compared with a bit
  that is already in the image. Only the result of that comparison, 0 for
  "equal" and 1 for "different", is written into a chrominance LSB.
* **Random positions.** Each plane is visited at pixel positions given by a
  row LFSR and a column LFSR. There are six 9-bit LFSRs, and each one has its
  own feedback switch set and seed. Sender and receiver must share these
  settings, which act as the key.

Each *step* hides two bits, b1 and b2, and touches three pixels:

| plane | address from   | embed                    | extract                 |
|-------|----------------|--------------------------|-------------------------|
| Y     | LFSR1 (row), LFSR2 (col) | read only: Y[0]           | Y[0]                    |
| Cb    | LFSR3, LFSR4   | Cb[0] ← b1 XOR Y[0]       | b1 = Y[0] XOR Cb[0]     |
| Cr    | LFSR5, LFSR6   | Cr[0] ← b2 XOR Cr[1]      | b2 = Cr[1] XOR Cr[0]    |

The embed writes only bit 0, so Cr[1] survives embedding and the receiver
compares against the same bit the sender did. Per step, Cb and Cr each change
by at most ±1 and Y does not change.

## Address generation: the LFSRs

`lfsr` is a Fibonacci shift register. The flip-flops FF8 … FF0 shift one place
towards FF0 on every step. The new bit that enters FF8 is

    b9 = b0 XOR (XOR of b_i for every closed switch c_i, i = 1..8)

`TAPS` bit *i* set means that switch c_i is closed. c_0 is always closed. The
plane address is `{row, column}`, 18 bits. The defaults (`stego_pkg`) are:

| LFSR | role   | closed switches | seed (hex) | period (states) |
|------|--------|-----------------|------------|-----------------|
| 1    | Y row  | 1, 5            | 3F         | 217             |
| 2    | Y col  | 1, 2, 3         | 4F         | 15              |
| 3    | Cb row | 1, 2, 8         | 33         | 155             |
| 4    | Cb col | 1, 2, 3         | 31         | 5               |
| 5    | Cr row | 1, 6            | 54         | 254             |
| 6    | Cr col | 1, 5, 7         | 34         | 511             |

Each address pair repeats after the least common multiple of its two periods:
3255 steps for Y, **155 steps for Cb** and 129794 for Cr.

**Capacity with the default key.** The Cb pair repeats after 155 steps. After
that, a later step overwrites the Cb flag of an earlier step, and the earlier
bit is lost. With the default settings, 310 bits (38 whole bytes) are stored
without loss. Longer messages are embedded and extracted exactly as the rules
say, but some of their bits come back wrong. The payload sweep testbench
measures this: 75 % of the bits are recovered at 6553 bytes, and 62 % at
65536 bytes.

To carry more, choose switch sets with longer periods and co-prime periods
within each pair. Set them with the `TAPSn`/`SEEDn` parameters of
`address_generator`, or change the package defaults. Only LFSR6's switch set
is maximal-length. Rows and columns 0 are never addressed, because an LFSR
never reaches the all-zero state.

## Datapath and operations

```
 pix_in (RGB) ─► rgb2ycbcr ─┐          ┌──────────────► seu ─► Cb', Cr' (write back)
                            ▼          │
 seq counter ──┐       ┌─► RAM Y  ─────┼──────────────► dseu ─► 2 bits ─► bytes ─► msg_out
 address_generator ─►mux├─► RAM Cb ────┤
   (3 × {row,col})     └─► RAM Cr ─────┴──────────────► ycbcr2rgb ─► stego_rgb / stego_addr
                        (single port, 2^18 × 8 each)
```

`mcu` is the controller. Pulse `start` with `op`:

| `op`         | what happens                                           | cycles            |
|--------------|--------------------------------------------------------|-------------------|
| `OP_LOAD`    | accept 2^18 RGB pixels in raster order (valid/ready), convert, write all three planes at a sequential address | about 2^18 when `pix_in_valid` stays high |
| `OP_EMBED`   | reseed the LFSRs, then for each step: take a byte when needed (`msg_in_*`, MSB first, b1 then b2), read the three planes, run `seu`, write Cb and Cr back, advance the LFSRs | 2 per step while the message stream keeps up (4 steps per byte) |
| `OP_UNLOAD`  | read the planes in raster order, convert to RGB, present each pixel with its index on `stego_we/stego_addr/stego_rgb` | 2^18 + 5 |
| `OP_EXTRACT` | reseed, read at the LFSR addresses one step per clock, run `dseu`, pack four steps into a byte on `msg_out_we/msg_out_addr/msg_out_byte` | steps + 5 |

`msg_len` (bytes) ends embed and extract runs. A run never takes more than
2^18 steps. If the message is longer than that, the run stops at the image
end and `img_end` is set. `done` pulses once at the end of each operation, and
`busy` is high in between.

### How embedding is pipelined on single-port RAMs

An embed step must read three pixels and write two of them back, and each
plane RAM has a single port. The controller therefore alternates a *read
phase* and a *write phase*, one clock each:

```
cycle   c        c+1          c+2      c+3   c+4          c+5
step k  read     seu stage 1  ...      ...   seu output   hold -> write (Cb, Cr)
step k+1         (write k-2)  read     ...                 ...
step k+2                               ...   read
```

* In a read phase, a step is issued if its two bits are available. The LFSR
  addresses go to the RAMs, and the LFSRs advance.
* One cycle later, the pixels and bits enter the 3-stage `seu`.
* Its result is held for one cycle, so that the write lands in a write phase
  (c+5). The Cb/Cr addresses of the step reach the RAMs through a 5-cycle
  delay line in the top level.

Up to three steps are in flight. This needs no hazard logic. A write changes
only Cb[0] or Cr[0], and no step reads those bits: the unit uses Y[0] from the
never-written Y plane, Cr[1], and the upper seven bits of Cb and Cr. The
writes stay in order, so a later step that hits the same pixel still has the
last word. The result is identical to running the steps one at a time; the
tests compare against a strictly sequential model, including pixel reuse.

Embedding thus completes one step every 2 cycles, with 6 cycles from read to
write-back. The streaming operations (load, unload, extract) move three plane
bytes per clock. The "3 pixels per clock" rate quoted for this architecture
refers to those three bytes. Embedding reaches half of that rate.

The three on-chip planes are 6 Mbit in total. On a small FPGA they would need
external SRAM. The RAM model is a plain array that synthesis infers as block
RAM.

## Colour conversion and why the receiver should use the YCbCr planes

`rgb2ycbcr` and `ycbcr2rgb` implement BT.601 studio-range conversion:

    Y  =  0.257R + 0.504G + 0.098B + 16      R = 1.164(Y-16)               + 1.596(Cr-128)
    Cb = -0.148R - 0.291G + 0.439B + 128     G = 1.164(Y-16) - 0.392(Cb-128) - 0.813(Cr-128)
    Cr =  0.439R - 0.368G - 0.071B + 128     B = 1.164(Y-16) + 2.017(Cb-128)

The coefficients are integers scaled by 256 (66, 129, 25 / −38, −74, 112 /
112, −94, −18 and 298, 409, 100, 208, 516). Sums are rounded to nearest and
saturated to 0…255. Each converter has two pipeline stages and takes one
pixel per clock. The constant products are written as multiplications;
synthesis reduces them to shifts and adds. The original method used a
distributed-arithmetic converter whose internals are not specified.

Both conversions round to 8 bits, so RGB → YCbCr → RGB → YCbCr does **not**
return the same chrominance LSBs. As a result:

* Extraction from the planes held in the RAMs (embed, then extract on the same
  device) is exact. The end-to-end test checks this.
* Loading the unloaded stego **RGB** image again and extracting from it is
  lossy. In the end-to-end test, 293 of 304 bits came back. The test reports
  this figure and does not check it. A loss-free link needs the Y/Cb/Cr planes
  themselves, or a lossless colour transform; this design provides neither.

## Top-level interface (`stego_system`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start`, `op` | in | 1, 2 | start an operation (`op_e` in `stego_pkg`) |
| `msg_len` | in | 17 | message length in bytes |
| `busy`, `done`, `img_end` | out | 1 | status |
| `pix_in_valid`, `pix_in`, `pix_in_ready` | in/in/out | 1, 24, 1 | RGB image input (`rgb_t` = {r, g, b}) |
| `msg_in_valid`, `msg_in_byte`, `msg_in_ready` | in/in/out | 1, 8, 1 | message input |
| `stego_we`, `stego_addr`, `stego_rgb` | out | 1, 18, 24 | write port for the external stego image memory (R, G, B) |
| `msg_out_we`, `msg_out_addr`, `msg_out_byte` | out | 1, 17, 8 | write port for the external message memory |

A typical sender runs `OP_LOAD`, `OP_EMBED` and `OP_UNLOAD`. A receiver loads
the stego image with `OP_LOAD` (mind the colour caveat above) and reads the
message with `OP_EXTRACT`, using the same `msg_len`. The key is the set of parameters in
`address_generator`; both ends must use the same values.

## Files

| file | contents |
|------|----------|
| `rtl/stego_pkg.sv` | widths, `rgb_t`/`ycc_t`, `op_e`, default LFSR switch sets and seeds |
| `rtl/lfsr.sv` | one LFSR |
| `rtl/address_generator.sv` | six LFSRs → three plane addresses |
| `rtl/rgb2ycbcr.sv`, `rtl/ycbcr2rgb.sv` | colour converters |
| `rtl/channel_ram.sv` | single-port plane RAM (write-first, 1-cycle read) |
| `rtl/seu.sv` | embed unit (3 stages) |
| `rtl/dseu.sv` | extract unit (2 stages) |
| `rtl/mcu.sv` | controller |
| `rtl/stego_system.sv` | top level |
| `tb/stego_ref_pkg.sv` | reference models (LFSR step, both conversions) |
| `tb/tb_<unit>.sv` | self-checking test of each unit |
| `tb/tb_stego_system.sv` | full-size end-to-end test |
| `tb/tb_payload_sweep.sv` | full-size payload/PSNR sweep |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/stego_pkg.sv tb/stego_ref_pkg.sv tb/tb_stego_system.sv \
  --top-module tb_stego_system -o sim
./obj_dir/sim
```

Replace `tb_stego_system` with any other testbench name.

* `tb_stego_system` runs at full size with default parameters. It loads a
  random 512 × 512 image and embeds a 38-byte ASCII message, with random gaps
  on both input streams. It unloads the image and compares all 262144 stego
  pixels with an independent model. It then extracts and compares the
  message, runs the lossy receiver path, and embeds a 70000-byte message to
  reach the image-end stop. It requires that input gaps, message stalls, both
  flag values on both chrominance planes, and the image-end stop all occurred.
  It runs in a few seconds.
* `tb_payload_sweep` runs messages of 38 bytes and of 10/30/50/70/100 % of
  65536 bytes on a synthetic gradient image. It checks the stego image and the
  extracted bytes against a model that includes pixel reuse. It prints the
  following (PSNR is measured against the cover passed through both
  converters without a message):

  | message | PSNR (dB) | bits recovered |
  |---------|-----------|----------------|
  | 38 B    | 78.6      | 100 %          |
  | 10 %    | 60.3      | 75.0 %         |
  | 30 %    | 55.6      | 74.9 %         |
  | 50 %    | 53.4      | 74.7 %         |
  | 70 %    | 53.4      | 67.8 %         |
  | 100 %   | 53.4      | 62.4 %         |

## What is taken from the method and what is this design's own

From the method:

* The embedding and extraction rules.
* Six parallel 9-bit LFSRs with switchable XOR feedback, with the switch sets
  and seeds listed above.
* The 512 × 512 image size and 8-bit planes.
* The BT.601 forward coefficients.
* Three single-port plane RAMs.
* A 3-stage embed unit.
* The unit partition: address generator, converters, RAMs, embed unit,
  extract unit and controller, plus external memories for the stego image and
  the message.

Choices made here:

* How LFSRs are assigned to planes and to row or column.
* All six LFSRs step together once per step.
* Switch *i* is bit *i* of the tap mask, and seeds are hexadecimal.
* The inverse colour matrix rows for G and B, and the sign of the G offset.
  These are the standard BT.601 values.
* Fixed-point scaling and rounding in the converters.
* The four-operation controller, the handshakes, MSB-first bit order, the
  cycle counts and the number of extract-unit stages.
* Alternating read and write phases with overlapped embed steps, the
  address delay line and the one-cycle result hold.
* Write-first RAM behaviour.
* Synchronous reset.

Not provided:

* Classic ±1 LSB matching, with its random choice between +1 and −1. The
  method describes it only as the starting point; this design stores flags
  instead.

* The external memories. They appear as write ports.
* The message ROM used in the original simulation model. The message arrives
  as a byte stream.
* Any clock-frequency or area claim. The original reports 107.75 MHz and
  2411 slices on a Virtex-II Pro; neither can be checked from RTL simulation.
