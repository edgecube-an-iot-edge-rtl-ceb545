// tb_dense_out: loads random output-layer weights and biases, applies random
// hidden vectors (including the extremes) and compares both logits with a
// direct dot product. Checks the one-cycle latency.
`timescale 1ns/1ps
module tb_dense_out;
  import edgecube_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  param_wr_t pwr = '0;
  logic in_valid = 0;
  logic signed [7:0][7:0] in_h = '0;
  logic out_valid;
  logic signed [1:0][31:0] out_logit;

  dense_out dut (.*);

  int checks = 0, failures = 0;
  int w [8][2], b [2], h [8];

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

  task automatic wr(input int a, input int d);
    @(negedge clk) pwr = '{we: 1'b1, addr: PADDR_W'(a), data: d};
    @(negedge clk) pwr = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 4; set++) begin
      for (int i = 0; i < 8; i++) for (int o = 0; o < 2; o++) begin w[i][o] = srand8(); wr(96 + i*2 + o, w[i][o] & 32'hff); end
      for (int o = 0; o < 2; o++) begin b[o] = int'($urandom) >>> 8; wr(112 + o, b[o]); end
      for (int n = 0; n < 50; n++) begin
        for (int i = 0; i < 8; i++) h[i] = (n == 0) ? 127 : (n == 1) ? -128 : srand8();
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < 8; i++) in_h[i] = 8'(h[i]);
        @(negedge clk);
        in_valid = 0;
        check(out_valid, "one-cycle latency");
        for (int o = 0; o < 2; o++) begin
          int e;
          e = b[o];
          for (int i = 0; i < 8; i++) e += h[i] * w[i][o];
          check(int'($signed(out_logit[o])) == e, $sformatf("logit %0d: %0d expected %0d", o, $signed(out_logit[o]), e));
        end
        @(negedge clk);
        check(!out_valid, "single valid pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
