// tophat: parallel streaming Top-hat filter for a raster pixel stream.
//
// The 3x3 square structuring element is split, by the chain rule, into a 1x3
// and a 3x1 element, so the first morphological pass is a 1x3 stage followed
// by a 3x1 stage and the second pass is the same pair with the other
// operator. All four stages work at once on the stream. The original pixels
// wait in a FIFO (DELAY_DEPTH deep, five rows by default as in the document)
// until the morphology result for the same position comes out, and the
// absolute difference of the two is the Top-hat output.
//
// ORDER selects the pass order. The default, dilation first, is the order the
// document gives (closing, so the output is closing minus original and picks
// out features darker than their surroundings). ORDER_ERODE_FIRST gives the
// opening-based Top-hat, original minus opening, which picks out bright
// targets; offering both is this design's addition.
//
// Interface: one pixel per in_valid with its row and column, raster order.
// Timing: the result for sample p leaves after sample p + 2*WIDTH + 2 has
// entered, a few clocks later; the last two rows of a frame are pushed out by
// the next frame.
module tophat
  import ist_pkg::*;
#(
  parameter int unsigned  WIDTH       = 640,
  parameter int unsigned  HEIGHT      = 480,
  parameter morph_order_e ORDER       = ORDER_DILATE_FIRST,
  parameter int unsigned  DELAY_DEPTH = 5 * WIDTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  px_t  in_px,
  output logic out_valid,
  output px_t  out_px,
  output logic delay_overflow
);

  localparam morph_op_e OP1 = (ORDER == ORDER_DILATE_FIRST) ? OP_DILATE : OP_ERODE;
  localparam morph_op_e OP2 = (ORDER == ORDER_DILATE_FIRST) ? OP_ERODE : OP_DILATE;

  logic v_a, v_b, v_c, v_d;
  px_t  p_a, p_b, p_c, p_d;

  morph_h3 #(.OP(OP1), .WIDTH(WIDTH)) u_h1 (
    .clk, .rst_n, .in_valid(in_valid), .in_px(in_px), .out_valid(v_a), .out_px(p_a));
  morph_v3 #(.OP(OP1), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_v1 (
    .clk, .rst_n, .in_valid(v_a), .in_px(p_a), .out_valid(v_b), .out_px(p_b));
  morph_h3 #(.OP(OP2), .WIDTH(WIDTH)) u_h2 (
    .clk, .rst_n, .in_valid(v_b), .in_px(p_b), .out_valid(v_c), .out_px(p_c));
  morph_v3 #(.OP(OP2), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_v2 (
    .clk, .rst_n, .in_valid(v_c), .in_px(p_c), .out_valid(v_d), .out_px(p_d));

  // Delay line for the original image.
  pix_t orig;
  logic orig_empty;
  sync_fifo #(.WIDTH(PIX_W), .DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst_n,
    .push(in_valid), .wdata(in_px.pix),
    .pop(v_d), .rdata(orig),
    .empty(orig_empty), .full(), .count(),
    .overflow(delay_overflow), .underflow());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_px    <= '0;
    end else begin
      out_valid <= v_d;
      if (v_d) out_px <= '{pix: absdiff(p_d.pix, orig), row: p_d.row, col: p_d.col};
    end
  end

endmodule
