// tb_dense_relu: a reduced layer (NP = 6 pooled positions, 24 inputs, 8 units).
// Loads random weights byte by byte through parameter region 1 and biases and
// rescale constants through region 0, streams pooled vectors (back to back and
// with gaps) and compares the 8 outputs with a direct dot product, bias, ReLU
// and rescale. Checks that out_valid comes once, three cycles after the last
// input, that start clears the accumulators, and that ReLU clipping occurs.
`timescale 1ns/1ps
module tb_dense_relu;
  import edgecube_pkg::*;
  import tb_ref_pkg::*;

  localparam int NP = 6;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  param_wr_t pwr = '0;
  logic start = 0, in_valid = 0;
  logic signed [3:0][7:0] in_vec = '0;
  logic [$clog2(NP)-1:0] in_idx = '0;
  logic out_valid;
  logic signed [7:0][7:0] out_h;

  dense_relu #(.NP(NP)) dut (.*);

  int checks = 0, failures = 0;
  int w [NP*4*8], b [8], m, s, x [NP*4];
  int n_valid = 0, n_relu0 = 0, n_sat = 0, cycle = 0, t_last = 0, t_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && out_valid) begin n_valid++; t_out = cycle; end

  task automatic wr(input int a, input int d);
    @(negedge clk) pwr = '{we: 1'b1, addr: PADDR_W'(a), data: d};
    @(negedge clk) pwr = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      if (t % 2 == 0) begin
        foreach (w[i]) begin w[i] = srand8(); wr((1 << 17) | i, w[i] & 32'hff); end
        foreach (b[u]) begin b[u] = int'($urandom_range(0, 4000)) - 2000; wr(64 + u, b[u]); end
        m = $urandom_range(1, 3); s = (t == 4) ? 2 : 7;
        wr(72, m); wr(73, s);
      end
      foreach (x[i]) x[i] = srand8();
      n_valid = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int p = 0; p < NP; p++) begin
        in_valid = 1; in_idx = 3'(p);
        for (int c = 0; c < 4; c++) in_vec[c] = 8'(x[p*4 + c]);
        t_last = cycle;
        @(negedge clk) in_valid = 0;
        if (t % 3 == 1) repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (5) @(negedge clk);
      check(n_valid == 1, $sformatf("run %0d: %0d results", t, n_valid));
      check(t_out == t_last + 3, $sformatf("latency %0d", t_out - t_last));
      for (int u = 0; u < 8; u++) begin
        longint acc;
        int e;
        acc = b[u];
        for (int i = 0; i < NP*4; i++) acc += longint'(x[i]) * w[i*8 + u];
        if (acc < 0) begin acc = 0; n_relu0++; end
        e = rescale(acc, m, s, n_sat);
        check(int'($signed(out_h[u])) == e, $sformatf("run %0d unit %0d: %0d expected %0d", t, u, $signed(out_h[u]), e));
      end
    end
    check(n_relu0 > 0, "ReLU clipping exercised");
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
