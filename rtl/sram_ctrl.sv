// sram_ctrl: SRAM controller of the shared memory.
//
// It decides, cycle by cycle, which channel FIFO is served by the single SRAM
// port. The eight channels are visited in the fixed order of the shared-memory
// timing diagram: Top-hat write, TFDF read, TFDF write, or read, or write,
// close read, close write, VGA read (channel index 0..7, even indices are
// write channels 0..3, odd ones read channels 0..3). Starting from the
// current slot, the first channel that has work is served; a channel keeps
// the port for up to BURST[slot] consecutive accesses (TFDF read needs two
// words per pixel, VGA reads at more than three times the camera rate), then
// the turn passes on. Empty channels cost no cycle. One access per clock.
//
// A write channel has work when its FIFO is not empty. A read channel has
// work when its address FIFO is not empty and its data FIFO has room for two
// more words (rd_room), so a read still in flight always finds a place. The SRAM is synchronous: a read
// issued with sram_re returns sram_rdata on the next clock, and the word is
// then pushed into the data FIFO of the channel that asked.
// The slot order is the document's; burst lengths and the skipping of idle
// slots are this design's choices.
module sram_ctrl
  import ist_pkg::*;
#(
  parameter int unsigned NW = 4,
  parameter int unsigned NR = 4,
  parameter int unsigned BURST [2*4] = '{1, 2, 1, 1, 1, 1, 1, 4}
) (
  input  logic               clk,
  input  logic               rst_n,
  // write channel FIFO heads
  input  logic [NW-1:0]      wr_avail,
  input  wr_req_t            wr_head [NW],
  output logic [NW-1:0]      wr_pop,
  // read channel address FIFO heads and data FIFO room
  input  logic [NR-1:0]      rq_avail,
  input  logic [SRAM_AW-1:0] rq_head [NR],
  input  logic [NR-1:0]      rd_room,
  output logic [NR-1:0]      rq_pop,
  output logic [NR-1:0]      rd_push,
  output logic [SRAM_DW-1:0] rd_data,
  // SRAM port
  output logic               sram_we,
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic [2:0]         cur_slot
);

  localparam int unsigned NS = NW + NR;

  logic [2:0] slot;       // slot that has the turn
  logic [2:0] used;       // accesses done in this turn
  logic       inflight;
  logic [1:0] inflight_ch;

  logic [NS-1:0] work;
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (s % 2 == 0) work[s] = wr_avail[s/2];
      else work[s] = rq_avail[s/2] && rd_room[s/2];
    end
  end

  // Find the first slot with work, starting at the current one.
  logic       grant;
  logic [2:0] gslot;
  always_comb begin
    grant = 1'b0;
    gslot = slot;
    for (int k = NS - 1; k >= 0; k--) begin
      if (work[3'(int'(slot) + k)]) begin
        grant = 1'b1;
        gslot = 3'(int'(slot) + k);
      end
    end
  end

  logic [2:0] used_n;
  assign used_n = (grant && gslot == slot) ? used + 1'b1 : 3'd1;

  always_comb begin
    wr_pop     = '0;
    rq_pop     = '0;
    sram_we    = 1'b0;
    sram_re    = 1'b0;
    sram_addr  = '0;
    sram_wdata = '0;
    if (grant) begin
      if (gslot[0] == 1'b0) begin
        wr_pop[gslot[2:1]] = 1'b1;
        sram_we    = 1'b1;
        sram_addr  = wr_head[gslot[2:1]].addr;
        sram_wdata = wr_head[gslot[2:1]].data;
      end else begin
        rq_pop[gslot[2:1]] = 1'b1;
        sram_re   = 1'b1;
        sram_addr = rq_head[gslot[2:1]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot        <= '0;
      used        <= '0;
      inflight    <= 1'b0;
      inflight_ch <= '0;
    end else begin
      inflight    <= sram_re;
      inflight_ch <= gslot[2:1];
      if (grant) begin
        if (used_n >= 3'(BURST[gslot])) begin
          slot <= gslot + 1'b1;
          used <= '0;
        end else begin
          slot <= gslot;
          used <= used_n;
        end
      end
    end
  end

  always_comb begin
    rd_push = '0;
    if (inflight) rd_push[inflight_ch] = 1'b1;
  end
  assign rd_data  = sram_rdata;
  assign cur_slot = slot;

endmodule
