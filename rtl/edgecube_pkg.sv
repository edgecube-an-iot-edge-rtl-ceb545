// edgecube_pkg: types, sizes and the parameter address map shared by the
// EdgeCube person-detection accelerator.
//
// The network is the one the accelerator runs: a 96x96x1 grayscale frame,
// a 3x3 convolution with 4 filters ("same" zero padding), 2x2 max pooling
// (48x48x4 = 9216 features), a dense layer of 8 ReLU units and a dense
// output layer of 2 units whose argmax is the class (0 = no person,
// 1 = person). The layer sizes follow the published model; with "same"
// padding its parameter count is exactly 73,794.
//
// Arithmetic (this design's choice, the published model only says "8-bit"):
// pixels are unsigned 8-bit, weights and activations signed 8-bit, biases
// and accumulators signed 32-bit. After each layer the accumulator is
// rescaled by a 16-bit multiplier and a right shift with rounding and
// saturated to 8 bits (see requant()).
//
// Parameter map (19-bit word address, 32-bit data; weights use bits 7:0):
//   region 0 (addr[18:17] = 0), small registers:
//     0..35    conv weight, filter f, tap k = ky*3+kx   -> f*9 + k
//     36..39   conv bias, filter f
//     40 / 41  conv requant multiplier / shift
//     64..71   dense-1 bias, unit u
//     72 / 73  dense-1 requant multiplier / shift
//     96..111  dense-2 weight, input i, output o         -> 96 + i*2 + o
//     112..113 dense-2 bias, output o
//   region 1 (addr[18:17] = 1): dense-1 weight, flattened input n, unit u,
//     at addr[16:0] = n*8 + u, where n = (row*48 + col)*4 + channel
//     (row-major, channel fastest, as a flattened HWC tensor).
package edgecube_pkg;

  // Frame and layer sizes of the published model.
  localparam int unsigned IMG_W      = 96;
  localparam int unsigned IMG_H      = 96;
  localparam int unsigned N_FILT     = 4;
  localparam int unsigned N_HID      = 8;
  localparam int unsigned N_CLASS    = 2;

  localparam int unsigned PADDR_W    = 19;
  localparam int unsigned PDATA_W    = 32;

  // Region 0 register offsets.
  localparam int unsigned A_CONV_W   = 0;
  localparam int unsigned A_CONV_B   = 36;
  localparam int unsigned A_CONV_M   = 40;
  localparam int unsigned A_CONV_S   = 41;
  localparam int unsigned A_D1_B     = 64;
  localparam int unsigned A_D1_M     = 72;
  localparam int unsigned A_D1_S     = 73;
  localparam int unsigned A_D2_W     = 96;
  localparam int unsigned A_D2_B     = 112;

  localparam logic [1:0] REGION_REGS = 2'd0;
  localparam logic [1:0] REGION_D1W  = 2'd1;

  // One write on the parameter bus.
  typedef struct packed {
    logic                    we;
    logic [PADDR_W-1:0]      addr;
    logic [PDATA_W-1:0]      data;
  } param_wr_t;

  // Output layer result: the class byte sent back to the MCU.
  typedef enum logic [7:0] {
    CLASS_NO_PERSON  = 8'h00,
    CLASS_PERSON     = 8'h01
  } class_byte_t;

  // Rescale a 32-bit accumulator to a signed 8-bit value:
  //   y = sat8((acc * mult + 2^(shift-1)) >>> shift)      (shift = 0: no rounding)
  function automatic logic signed [7:0] requant(input logic signed [31:0] acc,
                                                input logic        [15:0] mult,
                                                input logic        [4:0]  shift);
    logic signed [48:0] prod;
    logic signed [48:0] rnd;
    logic signed [48:0] shifted;
    prod = 49'(acc) * $signed({1'b0, mult});
    rnd  = (shift == 5'd0) ? 49'sd0 : (49'sd1 <<< (shift - 5'd1));
    shifted = (prod + rnd) >>> shift;
    if (shifted > 49'sd127)       return 8'sd127;
    else if (shifted < -49'sd128) return -8'sd128;
    else                          return shifted[7:0];
  endfunction

endpackage
