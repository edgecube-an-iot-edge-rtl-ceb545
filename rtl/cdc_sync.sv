// cdc_sync: two-flip-flop synchronizer for a single-bit level that changes
// slowly compared with the destination clock (a toggle flag or a strobe held
// for at least two destination clock cycles).
//
// Interface: d_async in any clock domain, q in the clk domain, two clk
// cycles later. Reset value is RESET_VAL. Used for the SPI byte toggle and
// the frame-start strobe; the synchronizer itself is this design's choice.
module cdc_sync #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d_async,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d_async;
      q    <= meta;
    end
  end
endmodule
