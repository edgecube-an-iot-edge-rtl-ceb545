// maxpool2x2: 2x2 max pooling with stride 2 on a raster-ordered stream.
//
// Input: one feature-map pixel (all N_FILT channels) per cycle at most, tagged
// with its row and column, in raster order (as produced by conv3x3).
// In a pixel's even column the module keeps it; in the odd column it takes the
// maximum of the horizontal pair. On even rows that pair maximum is parked in
// a half-width line buffer; on odd rows it is combined with the parked value
// and the 2x2 maximum is emitted, tagged with its flattened position
// out_idx = (row/2) * (W/2) + col/2. The comparison is on signed 8-bit values,
// per channel.
//
// Timing: out_valid one cycle after the input pixel that closes a 2x2 block
// (odd row, odd column). With an unbroken input stream pooled pixels come every
// second cycle during odd rows and not at all during even rows.
// The pooling size follows the published model; the streaming structure
// is this design's own.
module maxpool2x2
  import edgecube_pkg::*;
#(
  parameter int unsigned W  = 96,
  parameter int unsigned H  = 96,
  parameter int unsigned RW = 7,
  parameter int unsigned CW = 7,
  localparam int unsigned PW = $clog2((W / 2) * (H / 2))
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [N_FILT-1:0][7:0] in_fmap,
  input  logic [RW-1:0]                 in_row,
  input  logic [CW-1:0]                 in_col,
  output logic                          out_valid,
  output logic signed [N_FILT-1:0][7:0] out_vec,
  output logic [PW-1:0]                 out_idx
);
  logic signed [N_FILT-1:0][7:0] line_max [W/2];
  logic signed [N_FILT-1:0][7:0] left;     // even-column pixel of the pair
  logic signed [N_FILT-1:0][7:0] pair_max;
  logic signed [N_FILT-1:0][7:0] blk_max;

  function automatic logic signed [7:0] smax(input logic signed [7:0] a,
                                             input logic signed [7:0] b);
    return (a > b) ? a : b;
  endfunction

  wire [CW-2:0] half_col = in_col[CW-1:1];

  always_comb begin
    for (int f = 0; f < N_FILT; f++) begin
      pair_max[f] = smax(left[f], in_fmap[f]);
      blk_max[f]  = smax(pair_max[f], line_max[half_col][f]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !in_col[0]) left <= in_fmap;
    if (in_valid && in_col[0] && !in_row[0]) line_max[half_col] <= pair_max;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vec   <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid && in_col[0] && in_row[0];
      if (in_valid && in_col[0] && in_row[0]) begin
        out_vec <= blk_max;
        out_idx <= PW'(32'(in_row[RW-1:1]) * (W / 2) + 32'(in_col[CW-1:1]));
      end
    end
  end
endmodule
