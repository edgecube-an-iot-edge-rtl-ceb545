// dense_relu: the hidden dense layer, 9216 inputs to 8 ReLU units.
//
// It is a small vector dot-product unit fed directly by the pooling stage:
// each pooled pixel (N_FILT channel values, flattened position in_idx) is
// multiplied by the matching N_FILT x N_HID weight block and added into
// N_HID accumulators, 32 multiplies in one cycle. Because the pooled stream
// arrives in flattened order, no feature buffer is needed. After the last
// position (in_idx = NP-1) each accumulator gets its bias, passes through
// ReLU and is rescaled to 8 bits (edgecube_pkg::requant).
//
// Weights: an NP-word memory, one 256-bit word per pooled position holding
// the byte for (channel c, unit u) at byte lane c*N_HID + u. It is written
// one byte at a time through the parameter bus (region 1, addr = n*8 + u
// with n = p*N_FILT + c) and read synchronously, so it maps to block RAM.
// Biases and the rescale multiplier/shift are region-0 registers.
//
// Timing: start clears the accumulators. An input is consumed in a two-cycle
// pipeline (weight read, then accumulate) with initiation interval one;
// out_valid pulses one cycle after the last input is accumulated.
// Layer sizes and ReLU follow the published model; the datapath width
// (one pooled pixel per cycle) and number formats are this design's choices.
module dense_relu
  import edgecube_pkg::*;
#(
  parameter int unsigned NP = 48 * 48,
  localparam int unsigned PW = $clog2(NP)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  param_wr_t                    pwr,
  input  logic                         start,
  input  logic                         in_valid,
  input  logic signed [N_FILT-1:0][7:0] in_vec,
  input  logic [PW-1:0]                in_idx,
  output logic                         out_valid,
  output logic signed [N_HID-1:0][7:0] out_h
);
  localparam int unsigned LANES = N_FILT * N_HID;

  logic [LANES-1:0][7:0] wmem [NP];
  logic signed [31:0]    bias [N_HID];
  logic        [15:0]    mult;
  logic        [4:0]     shift;

  wire        d1w_wr = pwr.we && pwr.addr[PADDR_W-1 -: 2] == REGION_D1W;
  wire        reg_wr = pwr.we && pwr.addr[PADDR_W-1 -: 2] == REGION_REGS;
  wire [16:0] ra     = pwr.addr[16:0];
  wire [16:0] wword  = ra / 17'(LANES);
  wire [4:0]  wlane  = 5'(ra % 17'(LANES));

  always_ff @(posedge clk) begin
    if (d1w_wr && wword < 17'(NP)) wmem[wword[PW-1:0]][wlane] <= pwr.data[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < N_HID; u++) bias[u] <= '0;
      mult  <= 16'd1;
      shift <= '0;
    end else if (reg_wr) begin
      for (int u = 0; u < N_HID; u++)
        if (ra == 17'(A_D1_B + u)) bias[u] <= pwr.data;
      if (ra == 17'(A_D1_M)) mult  <= pwr.data[15:0];
      if (ra == 17'(A_D1_S)) shift <= pwr.data[4:0];
    end
  end

  // stage 1: weight read
  logic                         v1, last1;
  logic signed [N_FILT-1:0][7:0] x1;
  logic [LANES-1:0][7:0]        w1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      w1 <= wmem[in_idx];
      x1 <= in_vec;
    end
  end

  // stage 2: accumulate
  logic signed [31:0] acc      [N_HID];
  logic signed [31:0] acc_next [N_HID];
  logic signed [31:0] relu     [N_HID];
  logic               done2;

  always_comb begin
    for (int u = 0; u < N_HID; u++) begin
      acc_next[u] = acc[u];
      for (int c = 0; c < N_FILT; c++)
        acc_next[u] += 32'($signed(x1[c]) * $signed(w1[c*N_HID + u]));
      relu[u] = acc[u] + bias[u];
      if (relu[u] < 0) relu[u] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      last1 <= 1'b0;
      done2 <= 1'b0;
      for (int u = 0; u < N_HID; u++) acc[u] <= '0;
    end else if (start) begin
      v1    <= 1'b0;
      last1 <= 1'b0;
      done2 <= 1'b0;
      for (int u = 0; u < N_HID; u++) acc[u] <= '0;
    end else begin
      v1    <= in_valid;
      last1 <= in_valid && in_idx == PW'(NP - 1);
      done2 <= v1 && last1;
      if (v1) begin
        for (int u = 0; u < N_HID; u++) acc[u] <= acc_next[u];
      end
    end
  end

  // stage 3: bias, ReLU, rescale
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_h     <= '0;
    end else begin
      out_valid <= done2 && !start;
      if (done2) begin
        for (int u = 0; u < N_HID; u++) out_h[u] <= requant(relu[u], mult, shift);
      end
    end
  end
endmodule
