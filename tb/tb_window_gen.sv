// tb_window_gen: streams random frames (as the extended raster the
// accelerator sequencer produces, with random values in the padding
// positions) and compares every 3x3 window with one cut directly from the
// frame with zero padding. Checks the window count (W*H), raster order and
// the two-cycle latency, also with gaps in the input stream.
`timescale 1ns/1ps
module tb_window_gen;
  localparam int W = 7, H = 5;
  localparam int CW = $clog2(W + 1), RW = $clog2(H + 1);

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  logic start = 0, in_valid = 0;
  logic [7:0] in_px = '0;
  logic out_valid;
  logic [8:0][7:0] out_win;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;

  window_gen #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] img [H][W];
  int n_out = 0;
  int exp_r = 0, exp_c = 0;
  int n_pad = 0;

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

  function automatic logic [7:0] px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 8'd0;
    return img[r][c];
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    check(int'(out_row) == exp_r && int'(out_col) == exp_c,
          $sformatf("window at (%0d,%0d), expected (%0d,%0d)", out_row, out_col, exp_r, exp_c));
    for (int ky = 0; ky < 3; ky++)
      for (int kx = 0; kx < 3; kx++)
        check(out_win[ky*3+kx] == px(exp_r + ky - 1, exp_c + kx - 1),
              $sformatf("(%0d,%0d) tap %0d%0d = %0d, expected %0d", exp_r, exp_c, ky, kx,
                        out_win[ky*3+kx], px(exp_r + ky - 1, exp_c + kx - 1)));
    if (exp_r == 0 || exp_c == 0 || exp_r == H-1 || exp_c == W-1) n_pad++;
    n_out++;
    if (exp_c == W - 1) begin exp_c = 0; exp_r++; end else exp_c++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'($urandom_range(1, 255));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      n_out = 0; exp_r = 0; exp_c = 0;
      for (int i = 0; i <= H; i++)
        for (int j = 0; j <= W; j++) begin
          in_valid = 1;
          in_px = (i < H && j < W) ? img[i][j] : 8'($urandom);
          @(negedge clk);
          in_valid = 0;
          // latency check: the window for (i-1, j-1) appears two cycles later
          if (f == 0 && i >= 1 && j >= 1) begin
            @(negedge clk);
            check(out_valid && int'(out_row) == i - 1 && int'(out_col) == j - 1, "two-cycle latency");
          end else if (f == 2) begin
            repeat ($urandom_range(0, 2)) @(negedge clk);   // gaps in the stream
          end
        end
      repeat (4) @(negedge clk);
      check(n_out == W * H, $sformatf("frame %0d: %0d windows, expected %0d", f, n_out, W * H));
    end
    check(n_pad > 0, "padded windows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
