// dense_out: the output dense layer, 8 hidden activations to 2 logits.
//
// When in_valid, all N_CLASS x N_HID products of the signed 8-bit hidden
// activations and weights are summed with the 32-bit biases in one cycle;
// the 32-bit logits appear with out_valid on the next cycle. The softmax of
// the trained model is left out: it does not change which logit is largest,
// and only the class is needed (see argmax_out).
//
// Weights (addr 96 + i*2 + o) and biases (112 + o) are region-0 registers
// written through the parameter bus. Sizes follow the published model;
// formats and the bus are this design's choices.
module dense_out
  import edgecube_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  param_wr_t                     pwr,
  input  logic                          in_valid,
  input  logic signed [N_HID-1:0][7:0]  in_h,
  output logic                          out_valid,
  output logic signed [N_CLASS-1:0][31:0] out_logit
);
  logic signed [7:0]  w    [N_HID][N_CLASS];
  logic signed [31:0] bias [N_CLASS];

  wire reg_wr = pwr.we && pwr.addr[PADDR_W-1 -: 2] == REGION_REGS;
  wire [16:0] ra = pwr.addr[16:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_CLASS; o++) begin
        for (int i = 0; i < N_HID; i++) w[i][o] <= '0;
        bias[o] <= '0;
      end
    end else if (reg_wr) begin
      for (int o = 0; o < N_CLASS; o++) begin
        for (int i = 0; i < N_HID; i++)
          if (ra == 17'(A_D2_W + i*N_CLASS + o)) w[i][o] <= pwr.data[7:0];
        if (ra == 17'(A_D2_B + o)) bias[o] <= pwr.data;
      end
    end
  end

  logic signed [31:0] dot [N_CLASS];
  always_comb begin
    for (int o = 0; o < N_CLASS; o++) begin
      dot[o] = bias[o];
      for (int i = 0; i < N_HID; i++) dot[o] += 32'($signed(in_h[i]) * w[i][o]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_logit <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int o = 0; o < N_CLASS; o++) out_logit[o] <= dot[o];
      end
    end
  end
endmodule
