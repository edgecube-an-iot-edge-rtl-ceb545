// frame_ctrl: frame reception and result handshake on the FPGA side.
//
// The MCU raises the frame-start strobe (a separate pin, synchronized here;
// it must stay high for at least two clk cycles), then sends the pixels of
// one frame over SPI in raster order. This block:
//   * on the strobe's rising edge clears the pixel counter and the ready line;
//   * writes each received byte into the frame buffer at the next address
//     until NPIX pixels have arrived; further bytes (for example the dummy
//     byte the MCU clocks out to read the result) are not stored;
//   * after the last pixel starts the accelerator (held pending if it is
//     still busy with the previous frame);
//   * when the accelerator is done, latches its class byte into the SPI
//     transmit register and raises infer_ready, the handshake line the MCU
//     polls before its single-byte readback.
// The frame-start strobe, raster order, ready line and one-byte readback
// follow the system description; the separate strobe pin, ignoring surplus
// bytes and the pending start are this design's choices.
module frame_ctrl #(
  parameter int unsigned NPIX = 96 * 96,
  localparam int unsigned AW  = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start_pin,   // asynchronous, from the MCU
  // bytes from spi_slave
  input  logic          rx_valid,
  input  logic [7:0]    rx_byte,
  // frame buffer write port
  output logic          fb_we,
  output logic [AW-1:0] fb_waddr,
  output logic [7:0]    fb_wdata,
  // accelerator
  output logic          cnn_start,
  input  logic          cnn_busy,
  input  logic          cnn_done,
  input  logic [7:0]    cnn_class,
  // result
  output logic [7:0]    tx_byte,
  output logic          infer_ready,
  output logic          frame_received     // one-cycle pulse: last pixel stored
);
  logic fs_sync, fs_d;
  logic receiving;
  logic [AW-1:0] pix_cnt;
  logic start_pending;

  cdc_sync u_sync_fs (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_async(frame_start_pin),
    .q      (fs_sync)
  );

  wire fs_rise = fs_sync && !fs_d;
  wire store   = receiving && rx_valid;
  wire last    = store && pix_cnt == AW'(NPIX - 1);

  assign fb_we    = store;
  assign fb_waddr = pix_cnt;
  assign fb_wdata = rx_byte;
  assign cnn_start = start_pending && !cnn_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_d           <= 1'b0;
      receiving      <= 1'b0;
      pix_cnt        <= '0;
      start_pending  <= 1'b0;
      tx_byte        <= '0;
      infer_ready    <= 1'b0;
      frame_received <= 1'b0;
    end else begin
      fs_d           <= fs_sync;
      frame_received <= last;
      if (fs_rise) begin
        receiving   <= 1'b1;
        pix_cnt     <= '0;
        infer_ready <= 1'b0;
      end else if (store) begin
        pix_cnt <= pix_cnt + AW'(1);
        if (last) receiving <= 1'b0;
      end
      if (last)           start_pending <= 1'b1;
      else if (cnn_start) start_pending <= 1'b0;
      if (cnn_done) begin
        tx_byte     <= cnn_class;
        infer_ready <= !fs_rise;
      end
    end
  end

  // The ready line only rises with a result.
  assert property (@(posedge clk) disable iff (!rst_n) $rose(infer_ready) |-> $past(cnn_done));
endmodule
