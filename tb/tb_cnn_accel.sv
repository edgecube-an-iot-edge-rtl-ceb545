// tb_cnn_accel: runs the accelerator core on random frames and random
// network parameters and compares the class byte and both logits with the
// golden model in tb_ref_pkg. A 10x8 frame (non-square, to catch swapped
// rows and columns) keeps the run short. It also checks the run length,
// (H+1)*(W+1) + 11 cycles from start to done, that busy covers the run,
// and that a start while busy is ignored.
`timescale 1ns/1ps
module tb_cnn_accel;
  import edgecube_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 10, H = 8;
  localparam int NF = (W/2) * (H/2) * 4;
  localparam int AW = $clog2(W*H);

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  param_wr_t pwr;
  logic start, busy, done;
  logic [7:0] class_byte;
  logic signed [1:0][31:0] logits;
  logic fb_re;
  logic [AW-1:0] fb_addr;
  logic [7:0] fb_rdata;
  logic [7:0] fbuf [W*H];

  cnn_accel #(.W(W), .H(H)) dut (.*);

  always_ff @(posedge clk) if (fb_re) fb_rdata <= fbuf[fb_addr];

  int checks = 0, failures = 0;
  int seen_cls [2] = '{0, 0};
  int n_sat_total = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  net_t net;
  result_t r;
  byte unsigned img [];
  int unsigned pa [$], pd [$];

  initial begin
    pwr = '0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    img = new[W*H];
    for (int t = 0; t < 12; t++) begin
      if (t % 4 == 0) begin
        random_net(net, NF);
        if (t == 8) net.cs = 7;   // coarse rescale: drives the conv outputs into saturation
        param_writes(net, pa, pd);
        foreach (pa[i]) begin
          @(negedge clk);
          pwr = '{we: 1'b1, addr: PADDR_W'(pa[i]), data: pd[i]};
        end
        @(negedge clk) pwr = '0;
      end
      foreach (img[i]) begin
        img[i] = byte'($urandom_range(0, 255));
        fbuf[i] = img[i];
      end
      r = run(net, img, W, H);
      n_sat_total += r.n_sat;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      begin
        int cyc;
        cyc = 1;
        // a second start while busy must be ignored
        start = 1; @(negedge clk) start = 0; cyc++;
        while (!done) begin @(negedge clk); cyc++; check(busy || done, "busy during run"); end
        check(cyc == (H+1)*(W+1) + 11, $sformatf("latency %0d, expected %0d", cyc, (H+1)*(W+1)+11));
      end
      check(class_byte == 8'(r.cls), $sformatf("frame %0d class %0d expected %0d", t, class_byte, r.cls));
      check(logits[0] == r.logit[0] && logits[1] == r.logit[1],
            $sformatf("frame %0d logits %0d %0d expected %0d %0d", t, logits[0], logits[1], r.logit[0], r.logit[1]));
      seen_cls[r.cls]++;
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(seen_cls[0] > 0 && seen_cls[1] > 0, $sformatf("both classes seen (%0d/%0d)", seen_cls[0], seen_cls[1]));
    check(n_sat_total > 0, "a rescale saturated at least once");
    $display("classes seen: %0d no-person, %0d person; saturations %0d", seen_cls[0], seen_cls[1], n_sat_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
