// conv3x3: convolution engine, 4 filters of 3x3 over one input channel.
//
// Every cycle it can take one 3x3 window (from window_gen) and compute all
// 4 filters at once: 36 multiplies of an unsigned 8-bit pixel by a signed
// 8-bit weight, an adder tree per filter and the 32-bit bias. A second
// stage rescales each sum to a signed 8-bit activation with the layer's
// multiplier and shift (edgecube_pkg::requant). The published model shows
// no activation function after the convolution, so none is applied.
//
// Timing: fully pipelined, initiation interval one, latency two cycles
// (window in -> out_valid). Row/column tags travel with the data.
//
// Parameters (weights, biases, rescale) are registers written through the
// parameter bus at the region-0 addresses listed in edgecube_pkg. The
// filter count and kernel size follow the published model; the number
// formats and the parameter bus are this design's choices.
module conv3x3
  import edgecube_pkg::*;
#(
  parameter int unsigned RW = 7,
  parameter int unsigned CW = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  param_wr_t                     pwr,
  input  logic                          in_valid,
  input  logic [8:0][7:0]               in_win,
  input  logic [RW-1:0]                 in_row,
  input  logic [CW-1:0]                 in_col,
  output logic                          out_valid,
  output logic signed [N_FILT-1:0][7:0] out_fmap,
  output logic [RW-1:0]                 out_row,
  output logic [CW-1:0]                 out_col
);
  logic signed [7:0]  w    [N_FILT][9];
  logic signed [31:0] bias [N_FILT];
  logic        [15:0] mult;
  logic        [4:0]  shift;

  wire reg_wr = pwr.we && pwr.addr[PADDR_W-1 -: 2] == REGION_REGS;
  wire [16:0] ra = pwr.addr[16:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FILT; f++) begin
        for (int k = 0; k < 9; k++) w[f][k] <= '0;
        bias[f] <= '0;
      end
      mult  <= 16'd1;
      shift <= '0;
    end else if (reg_wr) begin
      for (int f = 0; f < N_FILT; f++) begin
        for (int k = 0; k < 9; k++)
          if (ra == 17'(A_CONV_W + f*9 + k)) w[f][k] <= pwr.data[7:0];
        if (ra == 17'(A_CONV_B + f)) bias[f] <= pwr.data;
      end
      if (ra == 17'(A_CONV_M)) mult  <= pwr.data[15:0];
      if (ra == 17'(A_CONV_S)) shift <= pwr.data[4:0];
    end
  end

  // stage 1: multiply-accumulate, all filters and taps in parallel
  logic signed [31:0] mac [N_FILT];
  always_comb begin
    for (int f = 0; f < N_FILT; f++) begin
      mac[f] = bias[f];
      for (int k = 0; k < 9; k++)
        mac[f] += 32'($signed({1'b0, in_win[k]}) * w[f][k]);
    end
  end

  logic signed [31:0] acc [N_FILT];
  logic               v1;
  logic [RW-1:0]      r1;
  logic [CW-1:0]      c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      r1 <= '0;
      c1 <= '0;
      for (int f = 0; f < N_FILT; f++) acc[f] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        r1 <= in_row;
        c1 <= in_col;
        for (int f = 0; f < N_FILT; f++) acc[f] <= mac[f];
      end
    end
  end

  // stage 2: rescale to 8 bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_fmap  <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        for (int f = 0; f < N_FILT; f++) out_fmap[f] <= requant(acc[f], mult, shift);
        out_row <= r1;
        out_col <= c1;
      end
    end
  end
endmodule
