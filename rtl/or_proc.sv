// or_proc: "or processing", the per-pixel running maximum of the filtered
// frames:
//     O(p) = D(p)                 for the first frame after reset,
//     O(p) = max(O(p), D(p))      afterwards.
// A moving target leaves its track in O while uncorrelated noise does not
// build up. The accumulated image O lives in SRAM region O_REGION: for each
// input pixel the module reads the old value through the "or read" channel,
// and writes the new one back through the "or write" channel. The formula is
// the document's; the memory layout and handshakes are this design's.
//
// Interface: input and output are raster pixel streams with positions. A
// pixel leaves one clock after its SRAM word returns; up to PEND pixels may
// wait. Requests that find a full FIFO are dropped and flagged in err_drop.
module or_proc
  import ist_pkg::*;
#(
  parameter int unsigned WIDTH    = 640,
  parameter int unsigned HEIGHT   = 480,
  parameter int unsigned O_REGION = 4,
  parameter int unsigned PEND     = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  px_t                in_px,
  output logic               rq_valid,
  output logic [SRAM_AW-1:0] rq_addr,
  input  logic               rq_ready,
  input  logic               rd_valid,
  input  logic [SRAM_DW-1:0] rd_data,
  output logic               rd_pop,
  output logic               wr_valid,
  output wr_req_t            wr_req,
  input  logic               wr_ready,
  output logic               out_valid,
  output px_t                out_px,
  output logic               err_drop
);

  localparam int unsigned FRAME = WIDTH * HEIGHT;

  typedef struct packed {
    px_t  px;
    logic first;
  } ent_t;

  // First frame: from reset until the second frame starts.
  logic started, first;
  logic in_first;
  assign in_first = (in_px.row == '0 && in_px.col == '0) ? !started : first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      first   <= 1'b1;
    end else if (in_valid) begin
      if (in_px.row == '0 && in_px.col == '0) started <= 1'b1;
      first <= in_first;
    end
  end

  function automatic logic [SRAM_AW-1:0] addr_of(px_t p);
    return SRAM_AW'(O_REGION * FRAME) + SRAM_AW'(p.row) * SRAM_AW'(WIDTH) + SRAM_AW'(p.col);
  endfunction

  ent_t head;
  logic empty, full;

  assign rq_valid = in_valid && !full;
  assign rq_addr  = addr_of(in_px);

  sync_fifo #(.WIDTH($bits(ent_t)), .DEPTH(PEND)) u_wait (
    .clk, .rst_n,
    .push(in_valid && !full && rq_ready), .wdata(ent_t'{px: in_px, first: in_first}),
    .pop(rd_pop), .rdata(head), .empty(empty), .full(full),
    .count(), .overflow(), .underflow());

  pix_t acc;
  assign rd_pop = rd_valid && !empty;
  assign acc    = head.first ? head.px.pix : morph2(OP_DILATE, head.px.pix, pix_t'(rd_data));

  assign wr_valid = rd_pop;
  assign wr_req   = '{addr: addr_of(head.px), data: SRAM_DW'(acc)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_px    <= '0;
      err_drop  <= 1'b0;
    end else begin
      out_valid <= rd_pop;
      if (rd_pop) out_px <= '{pix: acc, row: head.px.row, col: head.px.col};
      err_drop  <= (in_valid && (full || !rq_ready)) || (wr_valid && !wr_ready);
    end
  end

endmodule
