// tb_frame_ctrl: drives frame_ctrl with byte pulses (as from the SPI slave)
// and a model accelerator. Checks, for a 20-pixel frame: every pixel is
// written at its raster address, surplus bytes are not written, the
// accelerator is started exactly once after the last pixel (and held off
// while it is still busy), the class byte is latched into tx_byte with
// infer_ready, and the next frame-start clears infer_ready.
`timescale 1ns/1ps
module tb_frame_ctrl;
  localparam int NPIX = 20;
  localparam int AW = $clog2(NPIX);

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  logic frame_start_pin = 0, rx_valid = 0;
  logic [7:0] rx_byte = '0;
  logic fb_we;
  logic [AW-1:0] fb_waddr;
  logic [7:0] fb_wdata;
  logic cnn_start, cnn_busy = 0, cnn_done = 0;
  logic [7:0] cnn_class = '0;
  logic [7:0] tx_byte;
  logic infer_ready, frame_received;

  frame_ctrl #(.NPIX(NPIX)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] mem [NPIX];
  int n_writes = 0, n_starts = 0, n_held_off = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (fb_we) begin mem[fb_waddr] <= fb_wdata; n_writes++; end
    if (cnn_start) begin
      n_starts++;
      check(!cnn_busy, "start only when idle");
    end
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk) rx_valid = 1; rx_byte = b;
    @(negedge clk) rx_valid = 0;
    repeat ($urandom_range(0, 8)) @(negedge clk);
  endtask

  task automatic pulse_frame_start();
    @(negedge clk) frame_start_pin = 1;
    repeat (3) @(negedge clk);
    frame_start_pin = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [7:0] img [NPIX];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      bit busy_case;
      busy_case = (f == 1);
      pulse_frame_start();
      if (f > 0) check(!infer_ready, "ready cleared by frame-start");
      n_writes = 0; n_starts = 0;
      // in frame 1 the accelerator is still busy when the frame completes
      cnn_busy = busy_case;
      for (int p = 0; p < NPIX; p++) begin
        img[p] = 8'($urandom);
        send_byte(img[p]);
      end
      send_byte(8'hA5);          // readback dummy byte: must not be stored
      send_byte(8'h5A);
      repeat (3) @(negedge clk);
      check(n_writes == NPIX, $sformatf("frame %0d: %0d writes, expected %0d", f, n_writes, NPIX));
      for (int p = 0; p < NPIX; p++) check(mem[p] == img[p], $sformatf("frame %0d pixel %0d", f, p));
      if (busy_case) begin
        check(n_starts == 0, "start held while busy");
        if (n_starts == 0) n_held_off++;
        repeat (5) @(negedge clk);
        cnn_busy = 0;
        repeat (2) @(negedge clk);
      end
      check(n_starts == 1, $sformatf("frame %0d: %0d starts", f, n_starts));
      check(!infer_ready, "not ready before the result");
      cnn_busy = 1;
      repeat (10) @(negedge clk);
      cnn_class = 8'(f % 2);
      cnn_done = 1;
      @(negedge clk) cnn_done = 0; cnn_busy = 0;
      check(infer_ready, "ready after done");
      check(tx_byte == 8'(f % 2), "class byte latched");
      cnn_class = 8'hFF;        // must not leak into tx_byte
      repeat (3) @(negedge clk);
      check(tx_byte == 8'(f % 2), "class byte held");
    end
    check(n_held_off == 1, "mechanism: start held off while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
