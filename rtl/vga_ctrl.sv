// vga_ctrl: VGA display controller for the detection result.
//
// Generates 640x480 VGA timing (800 x 525 clocks per frame, negative sync
// pulses) from a pixel enable that fires every PIX_DIV system clocks, and
// shows the segmented frame held in SRAM. A fetch unit walks the frame buffer
// in raster order and keeps up to FETCH_AHEAD read requests ahead of the
// display through the VGA read channel; each visible pixel pops one word.
// Before fetching a frame it switches to the frame buffer that was completed
// last (new_buf/new_buf_id), so the display never shows a half-written frame
// and repeats a frame until the next one is done. The pixel goes through the
// adaptive threshold (seg_pix/seg_buf out, seg_bin back) and is shown white
// for a target, black otherwise; before the first frame is complete the
// screen is black. After reset the timing starts at the first blanking line,
// which gives the fetch a head start. Outputs are registered, one clock
// after the enable.
// The document names the controller and its 25.175 MHz pixel rate; with a
// 100 MHz clock this design uses 25 MHz (PIX_DIV = 4). The timing numbers are
// the usual 640x480 ones, not taken from the document.
module vga_ctrl
  import ist_pkg::*;
#(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned PIX_DIV     = 4,
  parameter int unsigned C_REGION    = 5,
  parameter int unsigned FETCH_AHEAD = 12,
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP,
  localparam int unsigned FRAME = H_VIS * V_VIS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               new_buf,
  input  logic               new_buf_id,
  output logic               rq_valid,
  output logic [SRAM_AW-1:0] rq_addr,
  input  logic               rq_ready,
  input  logic               rd_valid,
  input  logic [SRAM_DW-1:0] rd_data,
  output logic               rd_pop,
  output pix_t               seg_pix,
  output logic               seg_buf,
  input  logic               seg_bin,
  output logic               hsync,
  output logic               vsync,
  output logic               de,
  output pix_t               grey,
  output logic               err_underrun
);

  // Pixel enable.
  logic [$clog2(PIX_DIV)-1:0] div;
  logic                       pe;
  assign pe = (div == '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else div <= (div == $bits(div)'(PIX_DIV - 1)) ? '0 : div + 1'b1;
  end

  // Timing counters.
  logic [$clog2(H_TOT)-1:0] hc;
  logic [$clog2(V_TOT)-1:0] vc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= $bits(vc)'(V_VIS);   // start in vertical blanking so the fetch can run ahead
    end else if (pe) begin
      if (hc == $bits(hc)'(H_TOT - 1)) begin
        hc <= '0;
        vc <= (vc == $bits(vc)'(V_TOT - 1)) ? '0 : vc + 1'b1;
      end else hc <= hc + 1'b1;
    end
  end

  logic visible;
  assign visible = (hc < $bits(hc)'(H_VIS)) && (vc < $bits(vc)'(V_VIS));

  // Which frame buffer is complete.
  logic have_buf, last_buf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_buf <= 1'b0;
      last_buf <= 1'b0;
    end else if (new_buf) begin
      have_buf <= 1'b1;
      last_buf <= new_buf_id;
    end
  end

  // Fetch unit. Each fetched frame is tagged with the buffer it reads and
  // whether that buffer holds a finished frame; the display side takes the
  // tag over when it starts showing that frame.
  localparam int unsigned OW = $clog2(FETCH_AHEAD + 1);
  logic [SRAM_AW-1:0] fptr, dptr;
  logic               f_buf;            // buffer of the frame being fetched
  logic               n_buf, n_ok;      // tag of the next frame to display
  logic               d_buf, d_ok;      // tag of the frame on the screen
  logic [OW-1:0]      outstanding;
  logic               issue;

  assign issue    = (outstanding < OW'(FETCH_AHEAD)) && rq_ready;
  assign rq_valid = issue;
  assign rq_addr  = SRAM_AW'((C_REGION + int'(f_buf)) * FRAME) + fptr;

  assign rd_pop = pe && visible && rd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fptr        <= '0;
      dptr        <= '0;
      f_buf       <= 1'b0;
      n_buf       <= 1'b0;
      n_ok        <= 1'b0;
      d_buf       <= 1'b0;
      d_ok        <= 1'b0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding + OW'(issue) - OW'(rd_pop);
      if (issue) begin
        if (fptr == SRAM_AW'(FRAME - 1)) begin
          fptr  <= '0;
          f_buf <= last_buf;
          n_buf <= last_buf;
          n_ok  <= have_buf;
        end else begin
          fptr <= fptr + 1'b1;
        end
      end
      if (rd_pop) begin
        if (dptr == SRAM_AW'(FRAME - 1)) begin
          dptr  <= '0;
          d_buf <= n_buf;
          d_ok  <= n_ok;
        end else begin
          dptr <= dptr + 1'b1;
        end
      end
    end
  end

  assign seg_pix = pix_t'(rd_data);
  assign seg_buf = d_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsync        <= 1'b1;
      vsync        <= 1'b1;
      de           <= 1'b0;
      grey         <= '0;
      err_underrun <= 1'b0;
    end else if (pe) begin
      hsync <= !((hc >= $bits(hc)'(H_VIS + H_FP)) && (hc < $bits(hc)'(H_VIS + H_FP + H_SYNC)));
      vsync <= !((vc >= $bits(vc)'(V_VIS + V_FP)) && (vc < $bits(vc)'(V_VIS + V_FP + V_SYNC)));
      de    <= visible;
      grey  <= (visible && rd_valid && d_ok && seg_bin) ? '1 : '0;
      if (visible && !rd_valid) err_underrun <= 1'b1;
    end
  end

endmodule
