// tfdf: three frames difference filter.
//
// For every Top-hat pixel t_k(p) of frame k it reads the same position of the
// two previous Top-hat frames from the shared SRAM and outputs
//     D_k(p) = min(|t_k(p) - t_(k-1)(p)|, |t_(k-1)(p) - t_(k-2)(p)|),
// which keeps what changed in both frame steps (a moving target) and drops
// the slowly changing background. The document names the filter and its
// purpose but not its formula; this form and the zero output for the first
// two frames after reset (no history yet) are this design's choices.
//
// Memory use: the Top-hat frames live in a ring of three SRAM regions of
// WIDTH*HEIGHT words; frame k goes to region k mod 3 through the Top-hat
// write channel (th_wr), and its two predecessors are read through the TFDF
// read channel, two words per pixel. D_k is stored through the TFDF write
// channel (d_wr) in region D_REGION. Write and read requests go to FIFOs
// and must find room; a request that finds its FIFO full is dropped and
// counted in err_drop (the shared memory is sized so this never happens).
//
// Timing: a pixel leaves once both history words have come back, a handful
// of clocks after it entered; up to PEND pixels may be in flight.
module tfdf
  import ist_pkg::*;
#(
  parameter int unsigned WIDTH     = 640,
  parameter int unsigned HEIGHT    = 480,
  parameter int unsigned TH_REGION = 0,
  parameter int unsigned D_REGION  = 3,
  parameter int unsigned PEND      = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  px_t                in_px,
  // Top-hat write channel
  output logic               th_wr_valid,
  output wr_req_t            th_wr_req,
  input  logic               th_wr_ready,
  // TFDF read channel: requests and returned words
  output logic               rq_valid,
  output logic [SRAM_AW-1:0] rq_addr,
  input  logic               rq_ready,
  input  logic               rd_valid,
  input  logic [SRAM_DW-1:0] rd_data,
  output logic               rd_pop,
  // TFDF write channel
  output logic               d_wr_valid,
  output wr_req_t            d_wr_req,
  input  logic               d_wr_ready,
  // filtered stream
  output logic               out_valid,
  output px_t                out_px,
  output logic               err_drop
);

  localparam int unsigned FRAME = WIDTH * HEIGHT;

  typedef struct packed {
    px_t                px;
    logic [SRAM_AW-1:0] off;     // pixel offset in a frame
    logic [1:0]         slot;    // ring region of this frame
    logic               hist_ok; // two previous frames exist
  } ent_t;

  function automatic logic [SRAM_AW-1:0] region_addr(int unsigned region, logic [SRAM_AW-1:0] off);
    return SRAM_AW'(region * FRAME) + off;
  endfunction

  function automatic logic [1:0] slot_back(logic [1:0] s, int unsigned k);
    return 2'((int'(s) + 3 - k) % 3);
  endfunction

  // Frame tracking: slot of the frame entering, frames seen so far.
  logic [1:0] slot;
  logic [1:0] seen;
  logic       started;
  logic [1:0] cur_slot;
  logic       cur_hist_ok;
  logic       new_frame;

  assign new_frame = in_valid && in_px.row == '0 && in_px.col == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= 2'd0;
      seen    <= 2'd0;
      started <= 1'b0;
    end else if (new_frame) begin
      started <= 1'b1;
      if (started) begin
        slot <= (slot == 2'd2) ? 2'd0 : slot + 1'b1;
        if (seen != 2'd2) seen <= seen + 1'b1;
      end
    end
  end

  always_comb begin
    cur_slot    = slot;
    cur_hist_ok = (seen == 2'd2);
    if (new_frame && started) begin
      cur_slot    = (slot == 2'd2) ? 2'd0 : slot + 1'b1;
      cur_hist_ok = (seen >= 2'd1);
    end
  end

  logic [SRAM_AW-1:0] in_off;
  assign in_off = SRAM_AW'(in_px.row) * SRAM_AW'(WIDTH) + SRAM_AW'(in_px.col);

  // Top-hat frame goes to its ring region straight away.
  assign th_wr_valid = in_valid;
  assign th_wr_req   = '{addr: region_addr(TH_REGION + int'(cur_slot), in_off), data: in_px.pix};

  // Pixels waiting for their read requests, then for their data.
  ent_t iss_head, wait_head;
  logic iss_empty, iss_full, wait_empty, wait_full;
  logic iss_pop, phase;
  logic rphase;          // 0: next word is frame k-1, 1: frame k-2

  sync_fifo #(.WIDTH($bits(ent_t)), .DEPTH(PEND)) u_issue (
    .clk, .rst_n,
    .push(in_valid && !iss_full),
    .wdata(ent_t'{px: in_px, off: in_off, slot: cur_slot, hist_ok: cur_hist_ok}),
    .pop(iss_pop), .rdata(iss_head), .empty(iss_empty), .full(iss_full),
    .count(), .overflow(), .underflow());

  // Two read requests per pixel: frame k-1, then frame k-2.
  assign rq_valid = !iss_empty && !wait_full;
  logic [1:0] back_slot;
  assign back_slot = slot_back(iss_head.slot, phase ? 2 : 1);
  assign rq_addr   = region_addr(TH_REGION + int'(back_slot), iss_head.off);
  assign iss_pop   = rq_valid && rq_ready && phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else if (rq_valid && rq_ready) phase <= !phase;
  end

  sync_fifo #(.WIDTH($bits(ent_t)), .DEPTH(PEND)) u_wait (
    .clk, .rst_n,
    .push(iss_pop), .wdata(iss_head),
    .pop(rd_pop && rphase), .rdata(wait_head), .empty(wait_empty), .full(wait_full),
    .count(), .overflow(), .underflow());

  // Collect the two history words of the oldest waiting pixel.
  pix_t       prev1;
  pix_t       d_val;
  assign rd_pop = rd_valid && !wait_empty;

  always_comb begin
    d_val = '0;
    if (wait_head.hist_ok)
      d_val = morph2(OP_ERODE, absdiff(wait_head.px.pix, prev1), absdiff(prev1, pix_t'(rd_data)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rphase    <= 1'b0;
      prev1     <= '0;
      out_valid <= 1'b0;
      out_px    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (rd_pop) begin
        rphase <= !rphase;
        if (!rphase) prev1 <= pix_t'(rd_data);
        else begin
          out_valid <= 1'b1;
          out_px    <= '{pix: d_val, row: wait_head.px.row, col: wait_head.px.col};
        end
      end
    end
  end

  assign d_wr_valid = rd_pop && rphase;
  assign d_wr_req   = '{addr: region_addr(D_REGION, wait_head.off), data: d_val};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_drop <= 1'b0;
    else err_drop <= (in_valid && (iss_full || !th_wr_ready)) || (d_wr_valid && !d_wr_ready);
  end

endmodule
