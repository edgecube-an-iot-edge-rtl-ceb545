// edgecube_top: the FPGA side of the EdgeCube edge-sensor node.
//
// A microcontroller with a camera captures 96x96 grayscale frames and streams
// them over SPI; this design stores each frame and classifies it with a small
// CNN (person / no person), then hands the one-byte result back:
//
//   SPI pins -> spi_slave -> frame_ctrl -> dp_ram (frame buffer)
//                                 |             |
//                                 |        cnn_accel (conv, pool, dense, argmax)
//                                 +<-- class byte, infer_ready line
//
// Protocol seen by the MCU: pulse frame_start, send W*H pixel bytes in raster
// order (SPI mode 0, MSB first, any number of cs_n transactions), wait for
// infer_ready, then clock one byte on SPI: MISO carries the class byte
// (0x00 no person, 0x01 person). Inference starts as soon as the last pixel
// is stored and takes about (H+1)*(W+1) clk cycles.
//
// The network's 8-bit weights, 32-bit biases and rescale constants are
// written through the parameter bus (param_*), see edgecube_pkg for the map;
// it stands in for the trained constants built into the bitstream.
// The camera, microcontroller, sensor board and host PC are outside this
// design; their only connections are the SPI pins, frame_start and
// infer_ready.
module edgecube_top
  import edgecube_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic                     clk,          // 100 MHz system clock
  input  logic                     rst_n,
  // link to the microcontroller
  input  logic                     spi_sck,
  input  logic                     spi_cs_n,
  input  logic                     spi_mosi,
  output logic                     spi_miso,
  input  logic                     frame_start,
  output logic                     infer_ready,
  // network parameter load
  input  logic                     param_we,
  input  logic [PADDR_W-1:0]       param_addr,
  input  logic [PDATA_W-1:0]       param_wdata,
  // status
  output logic                     cnn_busy,
  output logic                     frame_received,  // pulse: last pixel of a frame stored
  output logic [7:0]               class_byte,
  output logic signed [N_CLASS-1:0][31:0] logits
);
  localparam int unsigned NPIX = W * H;
  localparam int unsigned AW   = $clog2(NPIX);

  param_wr_t pwr;
  assign pwr = '{we: param_we, addr: param_addr, data: param_wdata};

  logic          rx_valid;
  logic [7:0]    rx_byte;
  logic [7:0]    tx_byte;
  logic          fb_we, fb_re;
  logic [AW-1:0] fb_waddr, fb_raddr;
  logic [7:0]    fb_wdata, fb_rdata;
  logic          cnn_start, cnn_done;

  spi_slave u_spi (
    .clk     (clk),
    .rst_n   (rst_n),
    .sck     (spi_sck),
    .cs_n    (spi_cs_n),
    .mosi    (spi_mosi),
    .miso    (spi_miso),
    .tx_byte (tx_byte),
    .rx_valid(rx_valid),
    .rx_byte (rx_byte)
  );

  frame_ctrl #(.NPIX(NPIX)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .frame_start_pin(frame_start),
    .rx_valid       (rx_valid),
    .rx_byte        (rx_byte),
    .fb_we          (fb_we),
    .fb_waddr       (fb_waddr),
    .fb_wdata       (fb_wdata),
    .cnn_start      (cnn_start),
    .cnn_busy       (cnn_busy),
    .cnn_done       (cnn_done),
    .cnn_class      (class_byte),
    .tx_byte        (tx_byte),
    .infer_ready    (infer_ready),
    .frame_received (frame_received)
  );

  dp_ram #(.DEPTH(NPIX), .WIDTH(8)) u_fbuf (
    .clk    (clk),
    .a_we   (fb_we),
    .a_addr (fb_waddr),
    .a_wdata(fb_wdata),
    .b_re   (fb_re),
    .b_addr (fb_raddr),
    .b_rdata(fb_rdata)
  );

  cnn_accel #(.W(W), .H(H)) u_cnn (
    .clk       (clk),
    .rst_n     (rst_n),
    .pwr       (pwr),
    .start     (cnn_start),
    .busy      (cnn_busy),
    .done      (cnn_done),
    .class_byte(class_byte),
    .logits    (logits),
    .fb_re     (fb_re),
    .fb_addr   (fb_raddr),
    .fb_rdata  (fb_rdata)
  );
endmodule
