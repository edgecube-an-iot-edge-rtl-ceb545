// tb_conv3x3: loads random filters, biases and rescale constants through
// the parameter bus, feeds random windows back to back (and with gaps) and
// compares the 4 outputs of each with a direct computation. Checks the
// two-cycle latency, one result per cycle, tag passing and saturation.
`timescale 1ns/1ps
module tb_conv3x3;
  import edgecube_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  param_wr_t pwr = '0;
  logic in_valid = 0;
  logic [8:0][7:0] in_win = '0;
  logic [6:0] in_row = '0, in_col = '0;
  logic out_valid;
  logic signed [3:0][7:0] out_fmap;
  logic [6:0] out_row, out_col;

  conv3x3 dut (.*);

  int checks = 0, failures = 0;
  int cw [4][9], cb [4], cm, cs;
  typedef struct { int v [4]; int r, c, t; } exp_t;
  exp_t q [$];
  int cycle = 0, n_sat = 0, n_out = 0;

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

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    n_out++;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      check(cycle == e.t + 2, $sformatf("latency %0d", cycle - e.t));
      check(int'(out_row) == e.r && int'(out_col) == e.c, "tags");
      for (int f = 0; f < 4; f++)
        check(int'($signed(out_fmap[f])) == e.v[f], $sformatf("filter %0d: %0d expected %0d", f, $signed(out_fmap[f]), e.v[f]));
    end
  end

  task automatic wr(input int a, input int d);
    @(negedge clk) pwr = '{we: 1'b1, addr: PADDR_W'(a), data: d};
    @(negedge clk) pwr = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 3; set++) begin
      for (int f = 0; f < 4; f++) begin
        for (int k = 0; k < 9; k++) begin cw[f][k] = srand8(); wr(f*9 + k, cw[f][k] & 32'hff); end
        cb[f] = int'($urandom_range(0, 20000)) - 10000; wr(36 + f, cb[f]);
      end
      cm = $urandom_range(1, 5); cs = (set == 2) ? 6 : 11;
      wr(40, cm); wr(41, cs);
      wr(200, 32'h7f);   // an unrelated address must not disturb the filters
      for (int n = 0; n < 300; n++) begin
        exp_t e;
        @(negedge clk);
        in_valid = (set == 1) ? 1'($urandom_range(0, 1)) : 1'b1;
        for (int k = 0; k < 9; k++) in_win[k] = 8'($urandom);
        in_row = 7'($urandom); in_col = 7'($urandom);
        if (in_valid) begin
          for (int f = 0; f < 4; f++) begin
            longint acc;
            acc = cb[f];
            for (int k = 0; k < 9; k++) acc += longint'(in_win[k]) * cw[f][k];
            e.v[f] = rescale(acc, cm, cs, n_sat);
          end
          e.r = in_row; e.c = in_col; e.t = cycle;
          q.push_back(e);
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (4) @(negedge clk);
      check(q.size() == 0, "all windows produced a result");
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
