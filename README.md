# EdgeCube person-detection accelerator (FPGA side)

EdgeCube is a small edge-sensor node in which a camera microcontroller
(an ESP32-CAM class MCU) hands the heavy part of a vision task to a small
FPGA. The MCU captures a 96x96 grayscale frame and sends it to the FPGA over
SPI. The FPGA runs a tiny convolutional network on it and returns a single
byte: is there a person in the frame or not. Only that one bit leaves the node,
which keeps both the radio traffic and the privacy exposure minimal.

This repository holds the FPGA side as synthesizable SystemVerilog: the SPI
slave, the frame buffer, the frame/handshake controller and a streaming CNN
core that classifies a frame in one pass, plus a self-checking testbench for
every block and an end-to-end testbench that plays the MCU.

```
 MCU (SPI master)                         FPGA (this design, edgecube_top)
 ----------------   frame_start  ----------------------------------------------
  capture frame  ---------------> frame_ctrl ---- write ----> dp_ram (frame buffer)
  send 9216 px   -- SCK/CS/MOSI -> spi_slave                     | read
  wait ready     <-- infer_ready - frame_ctrl <-- class --- cnn_accel
  read 1 byte    <----- MISO ---- spi_slave                 window_gen -> conv3x3
                                                            -> maxpool2x2 -> dense_relu
                                                            -> dense_out -> argmax_out
```

## The network

The accelerator implements exactly one network, with these layer sizes:

| layer | shape | parameters |
|---|---|---|
| input | 96 x 96 x 1, unsigned 8-bit pixels | - |
| Conv2D 3x3, 4 filters, zero "same" padding | 96 x 96 x 4 | 36 weights + 4 biases |
| max pool 2x2, stride 2 | 48 x 48 x 4 = 9,216 features | - |
| dense, 8 units, ReLU | 8 | 73,728 weights + 8 biases |
| dense, 2 units (logits) | 2 | 16 weights + 2 biases |
| argmax | class 0 = no person, 1 = person | - |

The total is 73,794 parameters. That is the size of the trained model the
design was built for, and it comes out only with "same" padding: with "valid"
padding the total would be 70,754. The softmax of the trained model is not
built, since it cannot change which logit is larger.

### Number formats and rescaling

All weights are signed 8-bit and all biases signed 32-bit. Pixels are
unsigned 8-bit. Conv and hidden activations are signed 8-bit; the hidden ones
are 0..127 after ReLU. Every layer accumulates in 32 bits. Between layers a
sum is brought back to 8 bits with one multiplier `M` (16-bit) and one shift
`S` (0..31) per layer:

```
y = saturate_to_[-128,127]( (acc * M + 2^(S-1)) >> S )      (arithmetic shift; no rounding term when S = 0)
```

This is `edgecube_pkg::requant`. It is a simplified form of the usual
TensorFlow Lite integer scheme: one scale per layer and no zero points. A
model exported with per-channel scales or non-zero zero points must be
converted to this form first, or `requant` extended. The conv layer has no
activation function. The hidden layer applies ReLU *before* the rescale.

## One pass through the frame: how the core streams

The core never stores a feature map. A frame goes through all layers in a
single raster-order pass, one pixel per clock:

1. **Sequencer (`cnn_accel`).** It walks an *extended* raster of
   (H+1) x (W+1) = 97 x 97 positions. Positions inside the frame read pixel
   `row*96 + col` from the frame buffer; the result arrives one cycle later.
   The extra last column and last row carry zeros. They exist only to push
   out the windows of the bottom row and the right column.
2. **Window generator (`window_gen`).** Two line buffers hold the previous two
   rows. With the incoming sample they form a new 3-pixel column, which
   shifts into a 3x3 register. When the sample at (i, j) arrives, the window
   holds rows i-2..i and columns j-2..j, centred on output pixel (i-1, j-1).
   Taps that fall outside the frame are forced to zero. That is the "same"
   padding, with no need to pre-pad the buffer. Taps that wrap around from the
   previous row are always ones that get masked. So the 9,409 input samples
   give exactly 9,216 windows, in raster order.
3. **Convolution (`conv3x3`).** All 36 products (4 filters x 9 taps) are
   formed in one cycle, summed with the bias, then rescaled on the next cycle.
4. **Pooling (`maxpool2x2`).** In even rows, the maximum of each horizontal
   pair goes into a 48-entry line buffer. In odd rows it is combined with the
   stored value, and the 2x2 maximum leaves with its flattened index
   `(row/2)*48 + col/2`. Pooled pixels therefore come every second cycle
   during odd rows, and not at all during even rows.
5. **Hidden layer (`dense_relu`).** The pooled stream already arrives in
   flattened order, so the dense layer consumes it directly. Each pooled pixel
   (4 channel values) is multiplied by its 4 x 8 weight block, 32 MACs in one
   cycle. Those weights sit in one 256-bit word of a 2,304-word RAM, read one
   cycle ahead. The products add into 8 running sums. After position 2,303
   come the bias, ReLU and rescale.
6. **Output layer and selection (`dense_out`, `argmax_out`).** Sixteen
   products give the two 32-bit logits. The larger one picks the class; on a
   tie class 0 wins. The class becomes the byte `0x00` or `0x01`.

Every stage accepts a new input every cycle. Nothing downstream can stall, so
the core needs no back-pressure at all. A run therefore takes a fixed

```
(H+1)*(W+1) + 11 = 9,420 clock cycles  (94.2 us at 100 MHz)
```

from `start` to `done`. The 11 is the pipeline depth: frame-buffer read,
2 cycles of window, 2 of conv, 1 of pool, 3 of dense, 1 of the output layer
and 1 of argmax. The testbenches check this number exactly. It does not
depend on the weights or on the image.

## The link to the microcontroller

`spi_slave` and `frame_ctrl` implement this protocol:

1. The MCU raises `frame_start`, a separate pin held high for at least two
   clock cycles. Its rising edge resets the pixel counter and drops
   `infer_ready`.
2. The MCU sends the 9,216 pixels as SPI bytes in raster order: mode 0, MSB
   first. Chip select may stay low for the whole frame, or toggle between
   bytes or rows.
3. Once the last pixel is stored, the core starts by itself. If it is still
   busy with a previous frame, the start waits.
4. When the class is known, it is latched into the SPI transmit register and
   `infer_ready` rises.
5. The MCU clocks one more byte. MISO returns the class byte. Whatever the MCU
   sends on MOSI during that byte is ignored: only the first 9,216 bytes after
   a frame start are stored.

**Clock domains.** The link is meant to run at 80 MHz against a 100 MHz
system clock, too fast to oversample SCK. The SPI shift registers therefore
run on SCK itself. Received bits shift in on the rising edge; transmitted bits
change on the falling edge. Chip select high, or system reset, clears the bit
counters. Each completed byte goes to a holding register and flips a toggle
flag. A two-flop synchronizer (`cdc_sync`) carries the flag into the clock
domain, where its change becomes a one-cycle `rx_valid`. The holding register
stays stable for eight SCK periods (100 ns), far longer than the three-cycle
handover. The transmit byte travels the other way without a synchronizer: it
only changes before `infer_ready` rises, and the MCU only reads after that.

A frame needs 9,216 x 8 / 80 MHz = 921.6 us of wire time, ten times the
compute time. In this system the link, not the CNN, limits the frame rate.

## Loading the network

The trained weights are not part of this repository. All parameters are
registers or RAM written through a simple parameter bus: `param_we`, a 19-bit
`param_addr` and 32-bit `param_wdata`. Weights use bits 7:0.

| address | contents |
|---|---|
| `0..35` | conv weight, filter f, tap ky*3+kx, at f*9 + tap |
| `36..39` | conv bias, filter f |
| `40`, `41` | conv rescale multiplier M, shift S |
| `64..71` | hidden-layer bias, unit u |
| `72`, `73` | hidden-layer M, S |
| `96..111` | output-layer weight, input i, output o, at 96 + i*2 + o |
| `112`, `113` | output-layer bias |
| `2^17 + n*8 + u` | hidden-layer weight, flattened input n, unit u |

The flattened input index is `n = (row*48 + col)*4 + channel`. This is a
row-major layout with the channel changing fastest, which is how a
height x width x channel tensor flattens. A model trained in another layout
must be permuted before loading. After reset the weights and biases are zero,
with M = 1 and S = 0; the 73,728 hidden-layer weights in RAM are not reset.
In a bitstream the bus can be tied off and the memories given initial
contents instead.

## Files

| file | block |
|---|---|
| `rtl/edgecube_pkg.sv` | sizes, parameter map, bus struct, class byte enum, `requant` |
| `rtl/edgecube_top.sv` | top level: SPI link + frame control + frame buffer + CNN core |
| `rtl/spi_slave.sv`, `rtl/cdc_sync.sv` | SPI slave with SCK-domain shift registers, synchronizer |
| `rtl/frame_ctrl.sv` | frame-start, pixel addressing, start, result latch, ready line |
| `rtl/dp_ram.sv` | dual-port frame buffer (9,216 x 8) |
| `rtl/cnn_accel.sv` | sequencer and CNN pipeline |
| `rtl/window_gen.sv`, `rtl/conv3x3.sv`, `rtl/maxpool2x2.sv` | conv front end |
| `rtl/dense_relu.sv`, `rtl/dense_out.sv`, `rtl/argmax_out.sv` | classifier |
| `tb/tb_ref_pkg.sv` | golden integer model of the network, random parameters |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_edgecube_top.sv` | end-to-end test at full size |

Memory at the default size: 73,728 bits of frame buffer, 589,824 bits of
hidden-layer weights, and 2 x 97 x 8 bits of line buffer plus a 48 x 32-bit
pooling line.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/edgecube_pkg.sv tb/tb_ref_pkg.sv tb/tb_edgecube_top.sv \
    --top-module tb_edgecube_top -o sim
./obj_dir/sim
```

Change the last file and `--top-module` to run another testbench.

`tb_edgecube_top` uses every parameter at its default (96x96). It loads a
random network, then plays the MCU for four frames. Each frame is sent either
as one SPI transaction or one transaction per row, at 80 MHz SCK against a
100 MHz clock. For each frame the test waits for `infer_ready` and reads the
class back over SPI. It compares the class and both logits with the golden
model in `tb_ref_pkg`, and checks that the frame buffer was not disturbed by
the readback byte. It also checks the time from the last pixel to ready:
9,420 cycles plus up to 10 for the byte handover. It also checks that the
whole FPGA-side frame time stays within the 4.26 ms per frame (235 frames/s)
reported for the original node. In simulation the frame time is 1.02 ms:
0.92 ms of SPI transfer and 94 us of inference. Halfway through, it reloads
the network with a coarse rescale, to force saturation. It counts each of
these mechanisms and fails if one never happened: split and whole-frame
transfers, both classes, saturation, reload, ready cleared by frame start,
and the readback byte ignored. It runs in about a second.

The unit testbenches run smaller sizes where that helps, such as a 10x8 frame
for `cnn_accel`. All of them compare against values computed separately in the
testbench, never read back from the design.

## How far to trust it, and where it departs from the original system

What the design is built from:

- The layer sizes, the 96x96 frame, the 8-bit parameters, the 80 MHz SPI link
  and the 100 MHz clock.
- The blocks of the accelerator: a line-buffered sliding-window conv engine
  with an initiation interval of one, a pooling module, a small dot-product
  dense unit, and argmax output selection into an 8-bit result.
- The dual-port frame buffer.
- The frame-start strobe, the ready line and the one-byte readback.

Choices made here, where the original gives no detail:

- "Same" padding. It follows from the parameter count.
- No activation after the conv layer.
- The number formats and the single-multiplier rescale.
- The parameter bus.
- The flatten order.
- SPI mode 0, MSB first.
- A separate pin for the frame-start strobe.
- Ignoring surplus bytes.
- 32 MACs per cycle in the hidden layer.
- The whole sequencing scheme.

Known differences from the original system:

- **Hand-written, not HLS.** The original accelerator was generated by an HLS
  tool. This RTL keeps its structure (line buffers, II = 1, parallel window
  MACs) but is hand-written, so its timing differs. This core needs 94 us per
  frame; the original reported about 627 us for inference measured at the MCU.
- **Trained weights are not included.** The original built them into the
  bitstream. Here they are loaded through the parameter bus, and the tests use
  random networks. Accuracy numbers (about 71%) therefore cannot be reproduced
  with this code alone.
- **Quantization is simplified.** There are no zero points and only one scale
  per layer (see above). Matching a TensorFlow Lite export bit for bit would
  need `requant` extended.
- **No external DRAM.** The board carries DDR3, but the design keeps the frame
  on chip, as the original system's description of a self-contained pipeline
  implies.
- **One frame buffer, no double buffering.** The MCU must wait for
  `infer_ready` before the next frame, as its control loop does. If it does
  not, the new pixels overwrite the buffer. The core reads far ahead of the
  SPI writes, so this happens to be harmless, but it is not guaranteed.
- **The MCU side is out of scope.** That covers the camera, the optional
  diagnostic mode that sends frames to a host PC over UART, and the extra
  sensor board. None of them touch the FPGA logic.

Lint notes: Verilator reports `SYNCASYNCNET` for the reset used both in
`always_ff` blocks and in the `disable iff` of the assertions. It is harmless.
