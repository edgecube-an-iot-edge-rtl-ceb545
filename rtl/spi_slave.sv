// spi_slave: the FPGA end of the serial link to the microcontroller.
//
// The MCU is the SPI master (mode 0: SCK idles low, both sides sample on the
// rising edge, data change on the falling edge, MSB first). Because the link
// runs at 80 MHz against a 100 MHz system clock, SCK cannot be oversampled;
// instead the shift registers run on SCK itself and only whole bytes cross
// into the system clock domain.
//
// Receive: MOSI is shifted in on rising SCK edges. On the eighth bit the byte
// is copied into a holding register and a toggle flag flips. The flag is
// synchronized into clk; a change produces rx_valid for one clk cycle with
// rx_byte. The holding register is stable for the next eight SCK periods,
// far longer than the two-cycle synchronizer delay.
//
// Transmit: every byte of a transaction returns tx_byte on MISO, MSB first.
// The bit index advances on falling SCK edges. tx_byte comes from the clk
// domain and must be quasi-static: the accelerator only changes it before
// raising its ready line, and the MCU only reads after seeing ready.
//
// cs_n high (or rst_n low) resets the bit counters, so every transaction
// starts byte-aligned.
// Which bytes mean what (pixels, readback) is decided by frame_ctrl.
// The SPI mode, bit order, and SCK-clocked design are this design's choices;
// the link speed (80 MHz) and its role follow the system description.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  // SPI pins (SCK domain)
  input  logic       sck,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  // clk domain
  input  logic [7:0] tx_byte,
  output logic       rx_valid,
  output logic [7:0] rx_byte
);
  // ---------------- SCK domain ----------------
  logic [2:0] rx_cnt;
  logic [6:0] rx_shift;
  logic [7:0] rx_hold;
  logic       rx_toggle;
  logic [2:0] tx_idx;

  // Bit counters are cleared while the slave is deselected or in system reset.
  wire sck_rst = cs_n || !rst_n;

  always_ff @(posedge sck or posedge sck_rst) begin
    if (sck_rst) begin
      rx_cnt   <= '0;
      rx_shift <= '0;
    end else begin
      rx_cnt   <= rx_cnt + 3'd1;
      rx_shift <= {rx_shift[5:0], mosi};
    end
  end

  // Holding register and toggle are not reset by cs_n: a byte completed just
  // before cs_n rises must still reach the clk domain. (rx_cnt is held at 0
  // while cs_n is high, so no byte completes outside a transaction.)
  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      rx_hold   <= '0;
      rx_toggle <= 1'b0;
    end else if (rx_cnt == 3'd7) begin
      rx_hold   <= {rx_shift, mosi};
      rx_toggle <= ~rx_toggle;
    end
  end

  always_ff @(negedge sck or posedge sck_rst) begin
    if (sck_rst) tx_idx <= '0;
    else      tx_idx <= tx_idx + 3'd1;
  end

  assign miso = tx_byte[3'd7 - tx_idx];

  // ---------------- clk domain ----------------
  logic toggle_s, toggle_d;

  cdc_sync u_sync_toggle (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_async(rx_toggle),
    .q      (toggle_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toggle_d <= 1'b0;
      rx_valid <= 1'b0;
      rx_byte  <= '0;
    end else begin
      toggle_d <= toggle_s;
      rx_valid <= toggle_s ^ toggle_d;
      if (toggle_s ^ toggle_d) rx_byte <= rx_hold;
    end
  end
endmodule
