// close_filter: morphological closing of the accumulated image by a 3x3
// square, to join the pieces of a target track that the frame difference
// broke apart.
//
// Closing is a dilation followed by an erosion; each is split into a 1x3 and
// a 3x1 stage exactly as in the Top-hat, so the four stages stream together
// with three one-row RAMs each. The document names the operation and its
// purpose; the 3x3 element is assumed to be the same one the Top-hat uses.
// Borders use neutral values. Input and output are raster pixel streams; the
// output for sample p leaves after sample p + 2*WIDTH + 2 has entered.
module close_filter
  import ist_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  px_t  in_px,
  output logic out_valid,
  output px_t  out_px
);

  logic v_a, v_b, v_c;
  px_t  p_a, p_b, p_c;

  morph_h3 #(.OP(OP_DILATE), .WIDTH(WIDTH)) u_dh (
    .clk, .rst_n, .in_valid(in_valid), .in_px(in_px), .out_valid(v_a), .out_px(p_a));
  morph_v3 #(.OP(OP_DILATE), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_dv (
    .clk, .rst_n, .in_valid(v_a), .in_px(p_a), .out_valid(v_b), .out_px(p_b));
  morph_h3 #(.OP(OP_ERODE), .WIDTH(WIDTH)) u_eh (
    .clk, .rst_n, .in_valid(v_b), .in_px(p_b), .out_valid(v_c), .out_px(p_c));
  morph_v3 #(.OP(OP_ERODE), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_ev (
    .clk, .rst_n, .in_valid(v_c), .in_px(p_c), .out_valid(out_valid), .out_px(out_px));

endmodule
