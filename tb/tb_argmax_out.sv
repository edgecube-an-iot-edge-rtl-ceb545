// tb_argmax_out: applies random logit pairs (including equal, negative and
// extreme values) and checks the class byte: 1 only when logit 1 is strictly
// larger, else 0; the byte holds between results.
`timescale 1ns/1ps
module tb_argmax_out;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  logic in_valid = 0;
  logic signed [1:0][31:0] in_logit = '0;
  logic out_valid;
  logic [7:0] class_byte;

  argmax_out dut (.*);

  int checks = 0, failures = 0;
  int n_tie = 0, n_one = 0, n_zero = 0;

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int a, b, e;
      case (n % 5)
        0: begin a = int'($urandom); b = a; end
        1: begin a = -2147483648; b = 2147483647; end
        2: begin a = int'($urandom_range(0, 200)) - 100; b = int'($urandom_range(0, 200)) - 100; end
        default: begin a = int'($urandom); b = int'($urandom); end
      endcase
      e = (b > a) ? 1 : 0;
      if (a == b) n_tie++;
      if (e) n_one++; else n_zero++;
      @(negedge clk);
      in_valid = 1; in_logit[0] = a; in_logit[1] = b;
      @(negedge clk);
      in_valid = 0; in_logit[0] = int'($urandom); in_logit[1] = int'($urandom);
      check(out_valid && class_byte == 8'(e), $sformatf("logits %0d %0d: class %0d expected %0d", a, b, class_byte, e));
      @(negedge clk);
      check(!out_valid && class_byte == 8'(e), "class byte held");
    end
    check(n_tie > 0 && n_one > 0 && n_zero > 0, "ties and both classes covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
