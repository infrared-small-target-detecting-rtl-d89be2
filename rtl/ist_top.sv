// ist_top: infrared small target detector on one chip.
//
// A camera stream of 8-bit pixels (cam_valid/cam_pix, raster order, starting
// at a frame start after reset) runs through five sub-algorithms that all
// work at the same time:
//   tophat       spatial background suppression (parallel streaming Top-hat)
//   tfdf         three frames difference, temporal filtering
//   or_proc      per-pixel running maximum, accumulates the target track
//   close_filter morphological closing, joins broken track pieces
//   ats          adaptive threshold segmentation of the closed frame
// The stages pass pixels to each other directly. What has to survive from
// one frame to the next lives in one external SRAM shared through the
// Multi-Core Shared-Memory (mcsm): the last three Top-hat frames, the TFDF
// frame, the accumulated image and two buffers of the closed frame, which the
// VGA controller displays, thresholded, on a 640x480 monitor.
//
// SRAM map, in frames of WIDTH*HEIGHT words: 0..2 Top-hat ring, 3 TFDF
// result, 4 accumulated image, 5..6 closed frame (double buffer).
// Shared-memory channels: writes 0 Top-hat, 1 TFDF, 2 or, 3 close; reads
// 0 TFDF, 1 or, 2 close read, 3 VGA. The close stage keeps its rows on chip,
// so read channel 2 is brought out (ext_*) as a general read port into the
// SRAM, for instance to read back the TFDF result.
//
// One clock (100 MHz, the SRAM rate) drives everything; the camera pixel rate
// (7.68 MHz) and the VGA pixel rate are clock enables. Running all stages on
// one clock, the memory map and the external read port are this design's
// choices; the chain of stages and the shared-memory structure follow the
// document.
module ist_top
  import ist_pkg::*;
#(
  parameter int unsigned  WIDTH    = 640,
  parameter int unsigned  HEIGHT   = 480,
  parameter morph_order_e TH_ORDER = ORDER_DILATE_FIRST,
  parameter int unsigned  H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned  V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned  PIX_DIV  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // camera
  input  logic               cam_valid,
  input  pix_t               cam_pix,
  // external SRAM (synchronous, read data one clock after sram_re)
  output logic               sram_we,
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  // VGA monitor
  output logic               vga_hsync,
  output logic               vga_vsync,
  output logic               vga_de,
  output pix_t               vga_grey,
  // external read port (shared-memory read channel 2)
  input  logic               ext_rq_valid,
  input  logic [SRAM_AW-1:0] ext_rq_addr,
  output logic               ext_rq_ready,
  output logic               ext_rd_valid,
  output logic [SRAM_DW-1:0] ext_rd_data,
  input  logic               ext_rd_pop,
  // status
  output logic               frame_done,
  output pix_t               thr [2],
  output logic               err
);

  localparam int unsigned FRAME = WIDTH * HEIGHT;

  // Camera position counters.
  logic [ROW_W-1:0] cam_row;
  logic [COL_W-1:0] cam_col;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cam_row <= '0;
      cam_col <= '0;
    end else if (cam_valid) begin
      if (cam_col == COL_W'(WIDTH - 1)) begin
        cam_col <= '0;
        cam_row <= (cam_row == ROW_W'(HEIGHT - 1)) ? '0 : cam_row + 1'b1;
      end else cam_col <= cam_col + 1'b1;
    end
  end

  px_t cam_px;
  assign cam_px = '{pix: cam_pix, row: cam_row, col: cam_col};

  // Shared memory.
  logic [3:0]         wr_valid, wr_ready, rq_valid, rq_ready, rd_valid, rd_pop;
  wr_req_t            wr_req [4];
  logic [SRAM_AW-1:0] rq_addr [4];
  logic [SRAM_DW-1:0] rd_data [4];
  logic               mem_ovf;

  mcsm u_mcsm (
    .clk, .rst_n,
    .wr_valid, .wr_req, .wr_ready,
    .rq_valid, .rq_addr, .rq_ready,
    .rd_valid, .rd_data, .rd_pop,
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata,
    .err_overflow(mem_ovf));

  // Top-hat.
  logic th_valid, th_ovf;
  px_t  th_px;
  tophat #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .ORDER(TH_ORDER)) u_tophat (
    .clk, .rst_n, .in_valid(cam_valid), .in_px(cam_px),
    .out_valid(th_valid), .out_px(th_px), .delay_overflow(th_ovf));

  // Three frames difference.
  logic d_valid, d_err;
  px_t  d_px;
  tfdf #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .TH_REGION(0), .D_REGION(3)) u_tfdf (
    .clk, .rst_n, .in_valid(th_valid), .in_px(th_px),
    .th_wr_valid(wr_valid[0]), .th_wr_req(wr_req[0]), .th_wr_ready(wr_ready[0]),
    .rq_valid(rq_valid[0]), .rq_addr(rq_addr[0]), .rq_ready(rq_ready[0]),
    .rd_valid(rd_valid[0]), .rd_data(rd_data[0]), .rd_pop(rd_pop[0]),
    .d_wr_valid(wr_valid[1]), .d_wr_req(wr_req[1]), .d_wr_ready(wr_ready[1]),
    .out_valid(d_valid), .out_px(d_px), .err_drop(d_err));

  // Or processing.
  logic o_valid, o_err;
  px_t  o_px;
  or_proc #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .O_REGION(4)) u_or (
    .clk, .rst_n, .in_valid(d_valid), .in_px(d_px),
    .rq_valid(rq_valid[1]), .rq_addr(rq_addr[1]), .rq_ready(rq_ready[1]),
    .rd_valid(rd_valid[1]), .rd_data(rd_data[1]), .rd_pop(rd_pop[1]),
    .wr_valid(wr_valid[2]), .wr_req(wr_req[2]), .wr_ready(wr_ready[2]),
    .out_valid(o_valid), .out_px(o_px), .err_drop(o_err));

  // Closing.
  logic c_valid;
  px_t  c_px;
  close_filter #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_close (
    .clk, .rst_n, .in_valid(o_valid), .in_px(o_px), .out_valid(c_valid), .out_px(c_px));

  // Closed frames go to the two display buffers in turn.
  logic c_buf, c_last;
  assign c_last = c_valid && c_px.row == ROW_W'(HEIGHT - 1) && c_px.col == COL_W'(WIDTH - 1);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_buf <= 1'b0;
    else if (c_last) c_buf <= !c_buf;
  end
  assign wr_valid[3] = c_valid;
  assign wr_req[3]   = '{addr: SRAM_AW'((5 + int'(c_buf)) * FRAME)
                               + SRAM_AW'(c_px.row) * SRAM_AW'(WIDTH) + SRAM_AW'(c_px.col),
                         data: SRAM_DW'(c_px.pix)};

  // Adaptive threshold.
  logic ats_done, ats_buf, seg_buf, seg_bin;
  pix_t seg_pix;
  ats #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_ats (
    .clk, .rst_n, .stat_valid(c_valid), .stat_px(c_px),
    .done(ats_done), .done_buf(ats_buf), .thr(thr),
    .seg_pix(seg_pix), .seg_buf(seg_buf), .seg_bin(seg_bin));
  assign frame_done = ats_done;

  // External read port on read channel 2.
  assign rq_valid[2]  = ext_rq_valid;
  assign rq_addr[2]   = ext_rq_addr;
  assign ext_rq_ready = rq_ready[2];
  assign ext_rd_valid = rd_valid[2];
  assign ext_rd_data  = rd_data[2];
  assign rd_pop[2]    = ext_rd_pop;

  // VGA.
  logic vga_err;
  vga_ctrl #(.H_VIS(WIDTH), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
             .V_VIS(HEIGHT), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
             .PIX_DIV(PIX_DIV), .C_REGION(5)) u_vga (
    .clk, .rst_n, .new_buf(ats_done), .new_buf_id(ats_buf),
    .rq_valid(rq_valid[3]), .rq_addr(rq_addr[3]), .rq_ready(rq_ready[3]),
    .rd_valid(rd_valid[3]), .rd_data(rd_data[3]), .rd_pop(rd_pop[3]),
    .seg_pix(seg_pix), .seg_buf(seg_buf), .seg_bin(seg_bin),
    .hsync(vga_hsync), .vsync(vga_vsync), .de(vga_de), .grey(vga_grey),
    .err_underrun(vga_err));

  // Sticky error: a request was dropped or the display ran dry.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= 1'b0;
    else if (mem_ovf || th_ovf || d_err || o_err || vga_err || (wr_valid[3] && !wr_ready[3])) err <= 1'b1;
  end

endmodule
