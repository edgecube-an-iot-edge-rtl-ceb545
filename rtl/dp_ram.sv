// dp_ram: simple dual-port RAM used as the frame buffer.
//
// Port A writes (one word per cycle when a_we), port B reads with one cycle
// of latency (b_rdata holds mem[b_addr] of the previous cycle). Both ports
// share one clock, so this maps onto a block RAM in simple dual-port mode.
// In the accelerator port A is fed by the SPI receiver and port B by the
// convolution sequencer. Default size: one 96x96 frame of 8-bit pixels.
// The memory contents are not reset; every word is written before it is read.
// A dual-port on-chip frame buffer is what the system description calls for;
// the single clock and the synchronous read port are this design's choices.
module dp_ram #(
  parameter int unsigned DEPTH = 96 * 96,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // write port
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  // read port
  input  logic             b_re,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_re) b_rdata <= mem[b_addr];
  end
endmodule
