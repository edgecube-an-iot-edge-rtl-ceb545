// tb_maxpool2x2: streams random signed feature maps (8x6, 4 channels) in
// raster order, with and without gaps, and compares each pooled pixel and
// its flattened index with the maximum of the 2x2 block taken directly
// from the map. Checks the count, order and one-cycle latency.
`timescale 1ns/1ps
module tb_maxpool2x2;
  localparam int W = 8, H = 6;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  logic in_valid = 0;
  logic signed [3:0][7:0] in_fmap = '0;
  logic [6:0] in_row = '0, in_col = '0;
  logic out_valid;
  logic signed [3:0][7:0] out_vec;
  logic [$clog2((W/2)*(H/2))-1:0] out_idx;

  maxpool2x2 #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int fm [H][W][4];
  int n_out = 0, cycle = 0, last_in = 0;

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

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int py, px;
    py = n_out / (W/2); px = n_out % (W/2);
    check(int'(out_idx) == n_out, $sformatf("index %0d expected %0d", out_idx, n_out));
    check(cycle == last_in + 1, "one-cycle latency");
    for (int f = 0; f < 4; f++) begin
      int m;
      m = -1000;
      for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++)
        if (fm[2*py+a][2*px+b][f] > m) m = fm[2*py+a][2*px+b][f];
      check(int'($signed(out_vec[f])) == m, $sformatf("pool (%0d,%0d) ch %0d: %0d expected %0d", py, px, f, $signed(out_vec[f]), m));
    end
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      n_out = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int f = 0; f < 4; f++)
        fm[r][c][f] = int'($urandom_range(0, 255)) - 128;
      if (t == 2) for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) fm[r][c][0] = -128;  // all equal, most negative
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          in_valid = 1; in_row = 7'(r); in_col = 7'(c);
          for (int f = 0; f < 4; f++) in_fmap[f] = 8'(fm[r][c][f]);
          last_in = cycle;
          @(negedge clk) in_valid = 0;
          if (t == 1) repeat ($urandom_range(0, 3)) @(negedge clk);
          else begin end
        end
      repeat (3) @(negedge clk);
      check(n_out == (W/2)*(H/2), $sformatf("map %0d: %0d pooled pixels", t, n_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
