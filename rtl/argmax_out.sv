// argmax_out: output selection. Picks the index of the largest logit and
// encodes it as the 8-bit class byte returned to the microcontroller
// (0x00 = no person, 0x01 = person). On a tie the lower index wins, as in a
// conventional argmax. Registered: class_byte and out_valid follow in_valid
// by one cycle; class_byte holds its value until the next result.
// The argmax and the 8-bit result follow the accelerator description; the
// tie rule and the byte values are this design's choices.
module argmax_out
  import edgecube_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic signed [N_CLASS-1:0][31:0] in_logit,
  output logic                            out_valid,
  output logic [7:0]                      class_byte
);
  logic [7:0] best_idx;

  always_comb begin
    logic signed [31:0] best;
    best     = $signed(in_logit[0]);
    best_idx = 8'd0;
    for (int o = 1; o < N_CLASS; o++) begin
      if ($signed(in_logit[o]) > best) begin
        best     = $signed(in_logit[o]);
        best_idx = 8'(o);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      class_byte <= CLASS_NO_PERSON;
    end else begin
      out_valid <= in_valid;
      if (in_valid) class_byte <= best_idx;
    end
  end
endmodule
