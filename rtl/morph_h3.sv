// morph_h3: grey dilation (maximum) or erosion (minimum) by a 1x3 structuring
// element on a raster pixel stream.
//
// As in the document's 1x3 stage, the stream runs through a chain of three
// registers and the operator combines the three register outputs; the middle
// register is the pixel being filtered. Neighbours outside the image row are
// replaced by the operator's neutral value (0 for dilation, full scale for
// erosion); the document does not say how borders are treated, so this is this
// design's choice. The chain shifts only when in_valid is high, so input gaps
// are allowed. A pixel comes out when the pixel after it has entered: output
// for raster sample p leaves two clocks after sample p+1 arrives, i.e. the lag
// is one sample. The last pixel of a frame is pushed out by the first pixel of
// the next frame, since the camera streams continuously.
module morph_h3
  import ist_pkg::*;
#(
  parameter morph_op_e   OP    = OP_DILATE,
  parameter int unsigned WIDTH = 640
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  px_t  in_px,
  output logic out_valid,
  output px_t  out_px
);

  px_t  r0, r1, r2;     // r0 newest (right), r1 centre, r2 oldest (left)
  logic v1;             // r1 holds a sample
  logic v0;
  logic shifted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0      <= 1'b0;
      v1      <= 1'b0;
      shifted <= 1'b0;
      r0      <= '0;
      r1      <= '0;
      r2      <= '0;
    end else begin
      shifted <= in_valid;
      if (in_valid) begin
        r0 <= in_px;
        r1 <= r0;
        r2 <= r1;
        v0 <= 1'b1;
        v1 <= v0;
      end
    end
  end

  pix_t left_pix, right_pix, win;
  always_comb begin
    left_pix  = (r1.col != '0) ? r2.pix : morph_neutral(OP);
    right_pix = (r1.col != COL_W'(WIDTH - 1)) ? r0.pix : morph_neutral(OP);
    win       = morph2(OP, morph2(OP, left_pix, r1.pix), right_pix);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_px    <= '0;
    end else begin
      out_valid <= shifted && v1;
      if (shifted && v1) out_px <= '{pix: win, row: r1.row, col: r1.col};
    end
  end

endmodule
