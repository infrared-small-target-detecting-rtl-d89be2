// mcsm: Multi-Core Shared-Memory.
//
// Five concurrently running filter stages and the display need eight streams
// of SRAM traffic at the same time. Each stream gets its own FIFO and a single
// SRAM controller (sram_ctrl) moves words between the FIFOs and the one SRAM
// port, which runs faster than all streams together. Write channels 0..3
// (Top-hat, TFDF, or, close writes) each have one FIFO of {address, data}.
// Read channels 0..3 (TFDF, or, close, VGA reads) each have an address FIFO,
// filled by the client, and a data FIFO that the controller fills and the
// client empties; words come back in request order. The document gives one
// FIFO per channel; the separate address FIFO of a read channel is this
// design's way of carrying the read address.
//
// Handshakes: wr_valid/wr_ready and rq_valid/rq_ready transfer when both are
// high; rd_valid says a word is at the head of a data FIFO and rd_pop takes
// it. err_overflow is set when a client pushes into a full FIFO.
// CHECK_FLOW enables the FIFOs' overflow/underflow assertions; a testbench
// that wants to count an overflow as a failure instead clears it.
module mcsm
  import ist_pkg::*;
#(
  parameter int unsigned WDEPTH = 16,
  parameter int unsigned RDEPTH = 16,
  parameter int unsigned BURST [8] = '{1, 2, 1, 1, 1, 1, 1, 4},
  parameter bit          CHECK_FLOW = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         wr_valid,
  input  wr_req_t            wr_req [4],
  output logic [3:0]         wr_ready,
  input  logic [3:0]         rq_valid,
  input  logic [SRAM_AW-1:0] rq_addr [4],
  output logic [3:0]         rq_ready,
  output logic [3:0]         rd_valid,
  output logic [SRAM_DW-1:0] rd_data [4],
  input  logic [3:0]         rd_pop,
  output logic               sram_we,
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic               err_overflow
);

  localparam int unsigned RCW = $clog2(RDEPTH + 1);

  logic [3:0]         w_empty, w_full, w_pop, w_ovf;
  wr_req_t            w_head [4];
  logic [3:0]         q_empty, q_full, q_pop, q_ovf;
  logic [SRAM_AW-1:0] q_head [4];
  logic [3:0]         d_empty, d_push, d_ovf, d_room;
  logic [RCW-1:0]     d_count [4];
  logic [SRAM_DW-1:0] c_rdata;

  for (genvar i = 0; i < 4; i++) begin : g_ch
    sync_fifo #(.WIDTH($bits(wr_req_t)), .DEPTH(WDEPTH), .CHECK_FLOW(CHECK_FLOW)) u_wfifo (
      .clk, .rst_n, .push(wr_valid[i]), .wdata(wr_req[i]), .pop(w_pop[i]),
      .rdata(w_head[i]), .empty(w_empty[i]), .full(w_full[i]), .count(),
      .overflow(w_ovf[i]), .underflow());
    sync_fifo #(.WIDTH(SRAM_AW), .DEPTH(RDEPTH), .CHECK_FLOW(CHECK_FLOW)) u_afifo (
      .clk, .rst_n, .push(rq_valid[i]), .wdata(rq_addr[i]), .pop(q_pop[i]),
      .rdata(q_head[i]), .empty(q_empty[i]), .full(q_full[i]), .count(),
      .overflow(q_ovf[i]), .underflow());
    sync_fifo #(.WIDTH(SRAM_DW), .DEPTH(RDEPTH), .CHECK_FLOW(CHECK_FLOW)) u_dfifo (
      .clk, .rst_n, .push(d_push[i]), .wdata(c_rdata), .pop(rd_pop[i]),
      .rdata(rd_data[i]), .empty(d_empty[i]), .full(), .count(d_count[i]),
      .overflow(d_ovf[i]), .underflow());
    assign d_room[i]   = d_count[i] <= RCW'(RDEPTH - 2);
    assign wr_ready[i] = !w_full[i];
    assign rq_ready[i] = !q_full[i];
    assign rd_valid[i] = !d_empty[i];
  end

  sram_ctrl #(.NW(4), .NR(4), .BURST(BURST)) u_ctrl (
    .clk, .rst_n,
    .wr_avail(~w_empty), .wr_head(w_head), .wr_pop(w_pop),
    .rq_avail(~q_empty), .rq_head(q_head), .rd_room(d_room), .rq_pop(q_pop),
    .rd_push(d_push), .rd_data(c_rdata),
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata,
    .cur_slot());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_overflow <= 1'b0;
    else if (|{w_ovf, q_ovf, d_ovf}) err_overflow <= 1'b1;
  end

endmodule
