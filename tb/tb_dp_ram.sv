// tb_dp_ram: writes random data through port A while reading through port B,
// against a shadow array; checks the one-cycle read latency, that reads
// without b_re hold the output, and a read of the word being written in the
// same cycle returns the old contents.
`timescale 1ns/1ps
module tb_dp_ram;
  localparam int DEPTH = 96 * 96;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_we = 0, b_re = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [7:0] a_wdata = '0, b_rdata;

  dp_ram dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] shadow [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, held;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i); a_wdata = 8'($urandom); shadow[i] = a_wdata;
    end
    @(negedge clk) a_we = 0;
    // random concurrent traffic
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      b_re = 1; b_addr = AW'($urandom_range(0, DEPTH - 1));
      a_we = $urandom_range(0, 1);
      a_addr = (n % 7 == 0) ? b_addr : AW'($urandom_range(0, DEPTH - 1));
      a_wdata = 8'($urandom);
      exp = shadow[b_addr];               // old value, even if written now
      if (a_we) shadow[a_addr] = a_wdata;
      @(negedge clk);
      a_we = 0; b_re = 0;
      check(b_rdata == exp, $sformatf("read %0d: %02x expected %02x", b_addr, b_rdata, exp));
      held = b_rdata;
      b_addr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      check(b_rdata == held, "output held without b_re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
