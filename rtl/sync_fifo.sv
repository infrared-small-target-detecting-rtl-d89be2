// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
//
// DEPTH words of WIDTH bits in a circular array. The oldest word is always
// visible on rdata while empty is low; pop removes it. A push when full and a
// pop when empty are ignored and raise the overflow / underflow flags for one
// cycle; unless CHECK_FLOW is cleared, assertions also report them. A push and a pop in the same
// cycle are both done. count gives the fill level. DEPTH need not be a power of
// two. The document uses FIFOs both as the Top-hat delay line and as the eight
// channel buffers of the shared memory; their structure is this design's own.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  parameter bit          CHECK_FLOW = 1'b1,  // assert on push-when-full / pop-when-empty
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count,
  output logic             overflow,
  output logic             underflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_push, do_pop;
  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count     <= count + CW'(do_push) - CW'(do_pop);
      overflow  <= push && full;
      underflow <= pop && empty;
    end
  end

  if (CHECK_FLOW) begin : g_check
    a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
      else $error("sync_fifo: push while full");
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
      else $error("sync_fifo: pop while empty");
  end

endmodule
