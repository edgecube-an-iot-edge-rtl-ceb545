// window_gen: line-buffered 3x3 sliding-window generator with zero padding.
//
// The sequencer streams an extended raster of (H+1) x (W+1) samples, one per
// cycle when in_valid: rows 0..H-1 and columns 0..W-1 carry the frame, the
// extra last column and last row are padding (their values are ignored).
// Two line buffers hold the previous two rows; together with the incoming
// sample they give one new 3-pixel column per cycle, which shifts into a 3x3
// window register. When sample (i, j) arrives the window covers rows i-2..i
// and columns j-2..j, i.e. it is centred on output pixel (i-1, j-1). Taps
// that fall outside the frame are forced to zero ("same" padding), so the
// stream yields exactly H x W windows in raster order, one per cycle: an
// initiation interval of one, as the accelerator requires.
//
// Interface: start clears the position counters before a frame. out_win is
// packed with tap k = ky*3 + kx (ky = row offset 0..2 from the top). The
// window for output pixel (r, c) appears two cycles after sample
// (r+1, c+1) was accepted, with out_row/out_col = (r, c).
// The line-buffered structure follows the accelerator description; the
// extended raster and the masking are this design's way of padding.
module window_gen #(
  parameter int unsigned W  = 96,
  parameter int unsigned H  = 96,
  localparam int unsigned CW = $clog2(W + 1),
  localparam int unsigned RW = $clog2(H + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  input  logic [7:0]       in_px,
  output logic             out_valid,
  output logic [8:0][7:0]  out_win,
  output logic [RW-1:0]    out_row,
  output logic [CW-1:0]    out_col
);
  logic [7:0] lb1 [W+1];   // row i-1
  logic [7:0] lb2 [W+1];   // row i-2
  logic [2:0][2:0][7:0] win;  // [ky][kx]

  logic [RW-1:0] i_cnt;
  logic [CW-1:0] j_cnt;

  // stage 1: window updated, centre known
  logic          v1;
  logic [RW-1:0] ci;
  logic [CW-1:0] cj;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[j_cnt] <= lb1[j_cnt];
      lb1[j_cnt] <= in_px;
      for (int ky = 0; ky < 3; ky++) begin
        win[ky][0] <= win[ky][1];
        win[ky][1] <= win[ky][2];
      end
      win[0][2] <= lb2[j_cnt];
      win[1][2] <= lb1[j_cnt];
      win[2][2] <= in_px;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_cnt <= '0;
      j_cnt <= '0;
      v1    <= 1'b0;
      ci    <= '0;
      cj    <= '0;
    end else if (start) begin
      i_cnt <= '0;
      j_cnt <= '0;
      v1    <= 1'b0;
    end else begin
      v1 <= in_valid && (i_cnt != '0) && (j_cnt != '0);
      if (in_valid) begin
        ci <= i_cnt - RW'(1);
        cj <= j_cnt - CW'(1);
        if (j_cnt == CW'(W)) begin
          j_cnt <= '0;
          i_cnt <= (i_cnt == RW'(H)) ? '0 : i_cnt + RW'(1);
        end else begin
          j_cnt <= j_cnt + CW'(1);
        end
      end
    end
  end

  // stage 2: mask the taps outside the frame
  logic [2:0] row_ok, col_ok;
  always_comb begin
    row_ok[0] = (ci != '0);
    row_ok[1] = 1'b1;
    row_ok[2] = (ci != RW'(H - 1));
    col_ok[0] = (cj != '0);
    col_ok[1] = 1'b1;
    col_ok[2] = (cj != CW'(W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_win   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= v1 && !start;
      if (v1) begin
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            out_win[ky*3 + kx] <= (row_ok[ky] && col_ok[kx]) ? win[ky][kx] : 8'd0;
        out_row <= ci;
        out_col <= cj;
      end
    end
  end
endmodule
