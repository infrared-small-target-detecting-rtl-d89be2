// ats: adaptive threshold segmentation.
//
// Statistics side: while a closed frame streams past (stat_valid/stat_px) it
// sums the grey levels and tracks the maximum. After the frame's last pixel it
// sets that frame's threshold
//     T = max(T_MIN, (mean + max) / 2)
// and stores it for the frame buffer the frame was written to (frames
// alternate between buffer 0 and 1, starting with 0 after reset); done pulses
// and done_buf names the buffer. Segmentation side: seg_pix from buffer
// seg_buf is marked as target (seg_bin = 1) when it is above that buffer's
// threshold; this path is combinational.
// The document names the block and cites a method it does not describe; the
// statistic used here is this design's choice. Thresholds start at T_MIN.
module ats
  import ist_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480,
  parameter int unsigned T_MIN  = 16,
  localparam int unsigned FRAME = WIDTH * HEIGHT,
  localparam int unsigned SUM_W = $clog2(FRAME) + PIX_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic stat_valid,
  input  px_t  stat_px,
  output logic done,
  output logic done_buf,
  output pix_t thr [2],
  input  pix_t seg_pix,
  input  logic seg_buf,
  output logic seg_bin
);

  logic [SUM_W-1:0] sum;
  pix_t             maxv;
  logic             buf_sel;
  logic             last;

  assign last = stat_valid && stat_px.row == ROW_W'(HEIGHT - 1) && stat_px.col == COL_W'(WIDTH - 1);

  logic [SUM_W-1:0] sum_n;
  pix_t             max_n;
  logic [SUM_W-1:0] mean_n;
  logic [SUM_W:0]   t_n;
  always_comb begin
    sum_n  = sum + SUM_W'(stat_px.pix);
    max_n  = morph2(OP_DILATE, maxv, stat_px.pix);
    mean_n = sum_n / SUM_W'(FRAME);
    t_n    = ((SUM_W + 1)'(mean_n) + (SUM_W + 1)'(max_n)) >> 1;
    if (t_n < (SUM_W + 1)'(T_MIN)) t_n = (SUM_W + 1)'(T_MIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum      <= '0;
      maxv     <= '0;
      buf_sel  <= 1'b0;
      done     <= 1'b0;
      done_buf <= 1'b0;
      thr[0]   <= pix_t'(T_MIN);
      thr[1]   <= pix_t'(T_MIN);
    end else begin
      done <= 1'b0;
      if (stat_valid) begin
        if (last) begin
          sum          <= '0;
          maxv         <= '0;
          thr[buf_sel] <= pix_t'(t_n);
          done         <= 1'b1;
          done_buf     <= buf_sel;
          buf_sel      <= !buf_sel;
        end else begin
          sum  <= sum_n;
          maxv <= max_n;
        end
      end
    end
  end

  assign seg_bin = seg_pix > thr[seg_buf];

endmodule
