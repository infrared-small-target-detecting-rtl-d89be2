// ist_pkg: types and constants shared by the infrared small target detector.
//
// The detector moves 8-bit grey pixels in raster order. Every pixel on an
// internal stream carries its own row and column, so each stage knows where it
// is in the frame without a separate frame-start signal: a pixel at row 0,
// column 0 opens a new frame. The counters are sized for frames up to
// 2048 x 1024; the image size itself is a parameter of each module.
// The pixel width, the coordinate fields and the memory channel bundles are
// this design's choices; the document does not give them.
package ist_pkg;

  localparam int unsigned PIX_W = 8;   // grey level width
  localparam int unsigned COL_W = 11;  // column counter width
  localparam int unsigned ROW_W = 10;  // row counter width
  localparam int unsigned SRAM_AW = 22; // external SRAM word address width
  localparam int unsigned SRAM_DW = 8;  // external SRAM data width

  typedef logic [PIX_W-1:0] pix_t;

  // One pixel of a raster stream with its position.
  typedef struct packed {
    pix_t             pix;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } px_t;

  // Grey morphology operator: dilation is a maximum, erosion a minimum.
  typedef enum logic {
    OP_DILATE = 1'b0,
    OP_ERODE  = 1'b1
  } morph_op_e;

  // Order of the two morphological passes inside the Top-hat.
  typedef enum logic {
    ORDER_DILATE_FIRST = 1'b0,  // closing, then closing - original
    ORDER_ERODE_FIRST  = 1'b1   // opening, then original - opening
  } morph_order_e;

  // Write channel request: one word to store.
  typedef struct packed {
    logic [SRAM_AW-1:0] addr;
    logic [SRAM_DW-1:0] data;
  } wr_req_t;

  // Combine two pixels with a morphology operator.
  function automatic pix_t morph2(morph_op_e op, pix_t a, pix_t b);
    if (op == OP_DILATE) return (a > b) ? a : b;
    else                 return (a < b) ? a : b;
  endfunction

  // Neutral element of an operator: what a pixel outside the image counts as.
  function automatic pix_t morph_neutral(morph_op_e op);
    return (op == OP_DILATE) ? '0 : '1;
  endfunction

  function automatic pix_t absdiff(pix_t a, pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

endpackage
