// tb_spi_slave: drives the SPI slave as an 80 MHz mode-0 master against a
// 100 MHz system clock. Checks that every byte sent on MOSI comes out once,
// in order, as an rx_valid pulse, across several transactions of random
// length; and that MISO returns tx_byte MSB first in every byte.
`timescale 1ns/1ps
module tb_spi_slave;
  localparam real SCK_HALF = 6.25;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge at the start

  logic sck = 0, cs_n = 0, mosi = 0, miso;
  initial #2 cs_n = 1;     // deselect after the reset edge
  logic [7:0] tx_byte, rx_byte;
  logic rx_valid;

  spi_slave dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int n_rx = 0;

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

  // receiver side: compare each received byte with the queue of sent bytes
  always @(posedge clk) if (rst_n && rx_valid) begin
    logic [7:0] exp;
    n_rx++;
    if (sent.size() == 0) check(0, "unexpected byte");
    else begin
      exp = sent.pop_front();
      check(rx_byte == exp, $sformatf("rx %02x expected %02x", rx_byte, exp));
    end
  end

  task automatic spi_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      #(SCK_HALF);
      sck = 1;
      rx[b] = miso;
      #(SCK_HALF);
      sck = 0;
    end
  endtask

  initial begin
    logic [7:0] rx, d;
    int total;
    total = 0;
    tx_byte = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int len;
      len = $urandom_range(1, 12);
      tx_byte = 8'($urandom);
      #(SCK_HALF) cs_n = 0;
      #(SCK_HALF);
      for (int i = 0; i < len; i++) begin
        d = 8'($urandom);
        sent.push_back(d);
        total++;
        spi_byte(d, rx);
        check(rx == tx_byte, $sformatf("miso %02x expected %02x", rx, tx_byte));
      end
      #(SCK_HALF) cs_n = 1;
      // a few idle clocks between transactions, sometimes none
      #($urandom_range(0, 40));
    end
    repeat (10) @(posedge clk);
    check(n_rx == total, $sformatf("received %0d of %0d bytes", n_rx, total));
    check(sent.size() == 0, "all bytes delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
