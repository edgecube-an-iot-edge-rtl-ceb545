// cnn_accel: the streaming CNN accelerator core for person detection.
//
// On start it reads the frame held in the frame buffer and runs it through
// the whole network in one pass, with no intermediate feature-map storage:
//
//   frame buffer -> window_gen (3x3 windows, zero padding)
//                -> conv3x3    (4 filters, 36 MACs per cycle)
//                -> maxpool2x2 (48x48x4 pooled pixels)
//                -> dense_relu (9216 -> 8, ReLU)
//                -> dense_out  (8 -> 2 logits)
//                -> argmax_out (class byte)
//
// The sequencer walks an extended raster of (H+1) x (W+1) positions, one per
// cycle; positions in_frame the frame issue a read of pixel row*W + col, the
// extra column and row (needed to flush the bottom/right windows) feed zero.
// Everything downstream has an initiation interval of one, so the run takes
// (H+1)*(W+1) cycles plus the pipeline depth: 9,409 + 11
// cycles, about 94 us at 100 MHz, for a 96x96 frame.
//
// Interface: start (one cycle, ignored while busy); busy is high from start
// until done; done pulses with class_byte (and the two logits) valid, and
// they hold until the next run. The frame buffer read port has one cycle of
// latency. Network parameters arrive over the parameter bus pwr.
// The four-stage organisation (convolution engine, pooling, dense dot-product
// unit, output selection) follows the accelerator description; the
// sequencing and the single-pass streaming are this design's own.
module cnn_accel
  import edgecube_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  localparam int unsigned AW = $clog2(W * H),
  localparam int unsigned RW = $clog2(H + 1),
  localparam int unsigned CW = $clog2(W + 1),
  localparam int unsigned NP = (W / 2) * (H / 2),
  localparam int unsigned PW = $clog2(NP)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  param_wr_t                       pwr,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic [7:0]                      class_byte,
  output logic signed [N_CLASS-1:0][31:0] logits,
  // frame buffer read port
  output logic                            fb_re,
  output logic [AW-1:0]                   fb_addr,
  input  logic [7:0]                      fb_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN} state_t;
  state_t state;

  logic [RW-1:0] i_pos;
  logic [CW-1:0] j_pos;
  logic [AW-1:0] rd_addr;
  logic          px_valid, px_inside;
  logic          go;

  assign go = start && state == S_IDLE;
  wire in_frame = (i_pos < RW'(H)) && (j_pos < CW'(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i_pos     <= '0;
      j_pos     <= '0;
      rd_addr   <= '0;
      px_valid  <= 1'b0;
      px_inside <= 1'b0;
    end else begin
      px_valid  <= (state == S_SCAN);
      px_inside <= (state == S_SCAN) && in_frame;
      unique case (state)
        S_IDLE: if (go) begin
          state   <= S_SCAN;
          i_pos   <= '0;
          j_pos   <= '0;
          rd_addr <= '0;
        end
        S_SCAN: begin
          if (in_frame) rd_addr <= rd_addr + AW'(1);
          if (j_pos == CW'(W)) begin
            j_pos <= '0;
            if (i_pos == RW'(H)) state <= S_DRAIN;
            else                 i_pos <= i_pos + RW'(1);
          end else begin
            j_pos <= j_pos + CW'(1);
          end
        end
        S_DRAIN: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign fb_re   = (state == S_SCAN) && in_frame;
  assign fb_addr = rd_addr;

  // ---------------- datapath ----------------
  logic                          win_valid;
  logic [8:0][7:0]               win;
  logic [RW-1:0]                 win_row;
  logic [CW-1:0]                 win_col;

  window_gen #(.W(W), .H(H)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (go),
    .in_valid (px_valid),
    .in_px    (px_inside ? fb_rdata : 8'd0),
    .out_valid(win_valid),
    .out_win  (win),
    .out_row  (win_row),
    .out_col  (win_col)
  );

  logic                          cv_valid;
  logic signed [N_FILT-1:0][7:0] cv_fmap;
  logic [RW-1:0]                 cv_row;
  logic [CW-1:0]                 cv_col;

  conv3x3 #(.RW(RW), .CW(CW)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .pwr      (pwr),
    .in_valid (win_valid),
    .in_win   (win),
    .in_row   (win_row),
    .in_col   (win_col),
    .out_valid(cv_valid),
    .out_fmap (cv_fmap),
    .out_row  (cv_row),
    .out_col  (cv_col)
  );

  logic                          pl_valid;
  logic signed [N_FILT-1:0][7:0] pl_vec;
  logic [PW-1:0]                 pl_idx;

  maxpool2x2 #(.W(W), .H(H), .RW(RW), .CW(CW)) u_pool (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cv_valid),
    .in_fmap  (cv_fmap),
    .in_row   (cv_row),
    .in_col   (cv_col),
    .out_valid(pl_valid),
    .out_vec  (pl_vec),
    .out_idx  (pl_idx)
  );

  logic                         h_valid;
  logic signed [N_HID-1:0][7:0] h;

  dense_relu #(.NP(NP)) u_dense1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .pwr      (pwr),
    .start    (go),
    .in_valid (pl_valid),
    .in_vec   (pl_vec),
    .in_idx   (pl_idx),
    .out_valid(h_valid),
    .out_h    (h)
  );

  logic lg_valid;

  dense_out u_dense2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .pwr      (pwr),
    .in_valid (h_valid),
    .in_h     (h),
    .out_valid(lg_valid),
    .out_logit(logits)
  );

  argmax_out u_argmax (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lg_valid),
    .in_logit  (logits),
    .out_valid (done),
    .class_byte(class_byte)
  );

  // A result can only come out of a run that was started.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> state == S_DRAIN);
endmodule
