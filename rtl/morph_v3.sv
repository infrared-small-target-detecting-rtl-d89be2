// morph_v3: grey dilation (maximum) or erosion (minimum) by a 3x1 structuring
// element on a raster pixel stream.
//
// Following the document, three one-row dual-port RAMs of WIDTH pixels hold
// the stream: each incoming row is written into one RAM while the other two,
// holding the two previous rows, are read at the same column. The RAM roles
// rotate at the end of every row. When pixel (r, c) arrives, the output is
// the operator over (r-2, c), (r-1, c) and (r, c) for centre (r-1, c); rows
// above the top or below the bottom of the image count as the neutral value
// (a choice of this design). The lag is one row (WIDTH samples); the output
// leaves two clocks after the sample that completes it. Rows of a new frame
// push out the last row of the previous one, and the first row after reset
// only fills the RAMs.
module morph_v3
  import ist_pkg::*;
#(
  parameter morph_op_e   OP     = OP_DILATE,
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480,
  localparam int unsigned AW = $clog2(WIDTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  px_t  in_px,
  output logic out_valid,
  output px_t  out_px
);

  logic [1:0] wsel;        // RAM taking the current row
  logic       primed;      // one full row stored
  pix_t       rdata [3];

  for (genvar i = 0; i < 3; i++) begin : g_row
    dpram #(.WIDTH(PIX_W), .DEPTH(WIDTH)) u_row (
      .clk    (clk),
      .we_a   (in_valid && (wsel == 2'(i))),
      .addr_a (AW'(in_px.col)),
      .wdata_a(in_px.pix),
      .re_b   (in_valid && (wsel != 2'(i))),
      .addr_b (AW'(in_px.col)),
      .rdata_b(rdata[i])
    );
  end

  function automatic logic [1:0] rot(logic [1:0] s, int unsigned k);
    return 2'((int'(s) + k) % 3);
  endfunction

  // Stage 1: remember the sample and which RAMs hold the rows above it.
  px_t        s1;
  logic       s1_valid;
  logic [1:0] s1_prev, s1_prev2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel     <= 2'd0;
      primed   <= 1'b0;
      s1_valid <= 1'b0;
      s1       <= '0;
      s1_prev  <= 2'd0;
      s1_prev2 <= 2'd0;
    end else begin
      s1_valid <= in_valid && primed;
      if (in_valid) begin
        s1       <= in_px;
        s1_prev  <= rot(wsel, 2);
        s1_prev2 <= rot(wsel, 1);
        if (in_px.col == COL_W'(WIDTH - 1)) begin
          wsel   <= rot(wsel, 1);
          primed <= 1'b1;
        end
      end
    end
  end

  // Stage 2: combine the column.
  logic [ROW_W-1:0] c_row;
  pix_t up_pix, down_pix, win;
  always_comb begin
    c_row    = (s1.row == '0) ? ROW_W'(HEIGHT - 1) : s1.row - 1'b1;
    up_pix   = (c_row != '0) ? rdata[s1_prev2] : morph_neutral(OP);
    down_pix = (c_row != ROW_W'(HEIGHT - 1)) ? s1.pix : morph_neutral(OP);
    win      = morph2(OP, morph2(OP, up_pix, rdata[s1_prev]), down_pix);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_px    <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) out_px <= '{pix: win, row: c_row, col: s1.col};
    end
  end

endmodule
