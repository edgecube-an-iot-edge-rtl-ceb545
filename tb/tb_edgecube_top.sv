// tb_edgecube_top: end-to-end test of the FPGA side at full size (96x96
// frames, every parameter at its default).
//
// The testbench plays the microcontroller of the system flowchart: it loads
// the network parameters, then for each frame raises the frame-start strobe,
// streams the 9216 pixels over SPI (mode 0, SCK 80 MHz against a 100 MHz
// clk), waits for infer_ready and reads the class byte back with a one-byte
// SPI transaction. Results are compared with the golden model in tb_ref_pkg.
//
// Mechanisms exercised and counted (each must happen at least once):
//   frame sent as one SPI transaction / as many (one per image row),
//   readback byte ignored by the frame buffer, ready cleared by frame-start,
//   class 0 and class 1 results, rescale saturation, parameter reload,
//   inference-start latency within the expected window.
// It also checks the inference time against 627 us and the whole frame time
// against 4.26 ms (235 frames per second), the figures of the reference system.
`timescale 1ns/1ps
module tb_edgecube_top;
  import edgecube_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = IMG_W, H = IMG_H;
  localparam int NPIX = W * H;
  localparam int NF = (W/2) * (H/2) * 4;
  localparam int N_FRAMES = 4;
  localparam real SCK_HALF = 6.25;   // 80 MHz SPI clock

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start               // 100 MHz

  logic spi_sck = 0, spi_cs_n = 0, spi_mosi = 0, spi_miso;
  initial #2 spi_cs_n = 1; // deselect after the reset edge
  logic frame_start = 0, infer_ready;
  logic param_we = 0;
  logic [PADDR_W-1:0] param_addr = '0;
  logic [PDATA_W-1:0] param_wdata = '0;
  logic cnn_busy, frame_received;
  logic [7:0] class_byte;
  logic signed [N_CLASS-1:0][31:0] logits;

  edgecube_top dut (.*);

  int checks = 0, failures = 0;
  int n_single_txn = 0, n_multi_txn = 0, n_surplus_ignored = 0, n_ready_cleared = 0;
  int n_cls [2] = '{0, 0};
  int n_sat = 0, n_reload = 0, n_latency_ok = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One SPI byte, mode 0, MSB first; returns the byte seen on MISO.
  task automatic spi_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      spi_mosi = tx[b];
      #(SCK_HALF);
      spi_sck = 1;
      rx[b] = spi_miso;
      #(SCK_HALF);
      spi_sck = 0;
    end
  endtask

  net_t net;
  result_t r;
  byte unsigned img [];
  int unsigned pa [$], pd [$];

  task automatic load_net();
    param_writes(net, pa, pd);
    foreach (pa[i]) begin
      @(negedge clk);
      param_we = 1; param_addr = PADDR_W'(pa[i]); param_wdata = pd[i];
    end
    @(negedge clk) param_we = 0;
  endtask

  // Random image; 'style' varies brightness and contrast so that frames differ.
  task automatic make_image(input int style);
    int base, span;
    base = (style * 37) % 200;
    span = 16 + (style * 53) % 240;
    foreach (img[i]) img[i] = byte'((base + $urandom_range(0, span)) % 256);
  endtask

  initial begin
    logic [7:0] rx;
    img = new[NPIX];
    repeat (4) @(posedge clk);
    rst_n = 1;
    random_net(net, NF);
    load_net();

    for (int f = 0; f < N_FRAMES; f++) begin
      int want, tries;
      longint t_last, t_ready, t_frame0;
      if (f == 2) begin
        random_net(net, NF);
        net.cs = 8;            // coarse conv rescale: saturating activations
        load_net();
        n_reload++;
      end
      // pick an image whose class alternates, so both results are returned
      want = f % 2;
      tries = 0;
      do begin
        make_image(f * 16 + tries);
        r = run(net, img, W, H);
        tries++;
      end while (r.cls != want && tries < 16);
      n_sat += r.n_sat;

      // frame-start strobe
      @(negedge clk) frame_start = 1;
      t_frame0 = longint'($time);
      repeat (4) @(negedge clk);
      frame_start = 0;
      repeat (3) @(negedge clk);
      if (f > 0) begin
        check(!infer_ready, "ready cleared by frame-start");
        if (!infer_ready) n_ready_cleared++;
      end

      // pixels: frame 0 and 2 one transaction per row, others one transaction
      if (f % 2 == 0) n_multi_txn++; else n_single_txn++;
      for (int p = 0; p < NPIX; p++) begin
        if (p == 0 || (f % 2 == 0 && p % W == 0)) begin
          #(SCK_HALF) spi_cs_n = 0;
          #(SCK_HALF);
        end
        spi_byte(img[p], rx);
        if (p == NPIX - 1 || (f % 2 == 0 && p % W == W - 1)) begin
          #(SCK_HALF) spi_cs_n = 1;
          #(2 * SCK_HALF);
        end
      end
      t_last = longint'($time);

      // wait for the ready line, then read back one byte
      while (!infer_ready) @(posedge clk);
      t_ready = longint'($time);
      begin
        longint cyc;
        cyc = (t_ready - t_last) / 10;
        // byte sync (about 3-4 clk) + start + (H+1)(W+1)+11 run + ready latch
        check(cyc >= (H+1)*(W+1) + 11 && cyc <= (H+1)*(W+1) + 11 + 10,
              $sformatf("frame %0d: ready %0d clk cycles after the last pixel", f, cyc));
        if (cyc >= (H+1)*(W+1) + 11 && cyc <= (H+1)*(W+1) + 21) n_latency_ok++;
        // the reference system reports a 627 us inference time at 100 MHz
        check(cyc <= 62_700, "inference within 627 us");
      end
      #(SCK_HALF) spi_cs_n = 0;
      #(SCK_HALF);
      spi_byte(8'hA5, rx);
      #(SCK_HALF) spi_cs_n = 1;
      repeat (10) @(negedge clk);
      check(rx == 8'(r.cls), $sformatf("frame %0d: read back %0d, expected %0d", f, rx, r.cls));
      check(logits[0] == r.logit[0] && logits[1] == r.logit[1],
            $sformatf("frame %0d: logits %0d %0d expected %0d %0d", f, $signed(logits[0]), $signed(logits[1]), r.logit[0], r.logit[1]));
      n_cls[rx[0]]++;
      // the readback byte must not have been stored as a pixel
      begin
        bit same;
        same = 1;
        for (int p = 0; p < NPIX; p++) if (dut.u_fbuf.mem[p] != img[p]) same = 0;
        check(same, $sformatf("frame %0d: frame buffer intact after readback", f));
        if (same) n_surplus_ignored++;
      end
      check(infer_ready, "ready held until the next frame");
      // whole FPGA-side frame time (strobe, transfer, inference, readback)
      // against the 4.26 ms per frame (235 frames/s) of the reference system
      check(longint'($time) - t_frame0 <= 64'd4_260_000,
            $sformatf("frame %0d took %0d ns", f, longint'($time) - t_frame0));
      if (f == 0) $display("frame time %0d ns, ready %0d ns after the last pixel",
                           longint'($time) - t_frame0, t_ready - t_last);
    end

    $display("frames: single-txn %0d, multi-txn %0d; class0 %0d class1 %0d; saturations %0d; reloads %0d; ready cleared %0d; surplus ignored %0d; latency ok %0d",
             n_single_txn, n_multi_txn, n_cls[0], n_cls[1], n_sat, n_reload, n_ready_cleared, n_surplus_ignored, n_latency_ok);
    check(n_single_txn > 0, "mechanism: frame in one SPI transaction");
    check(n_multi_txn > 0, "mechanism: frame split over SPI transactions");
    check(n_cls[0] > 0, "mechanism: class 0 returned");
    check(n_cls[1] > 0, "mechanism: class 1 returned");
    check(n_sat > 0, "mechanism: rescale saturation");
    check(n_reload > 0, "mechanism: parameter reload");
    check(n_ready_cleared > 0, "mechanism: ready cleared by frame-start");
    check(n_surplus_ignored > 0, "mechanism: readback byte not stored");
    check(n_latency_ok > 0, "mechanism: inference starts once the frame is in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
