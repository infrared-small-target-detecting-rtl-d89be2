// dpram: simple dual-port RAM, one write port and one read port, one clock.
//
// Holds DEPTH words of WIDTH bits. A write on port A takes effect at the clock
// edge; a read on port B returns the addressed word one clock after re_b is
// high (registered output). Reading and writing the same address in the same
// cycle returns the old word. This is the on-chip dual-port RAM that the
// Top-hat and closing stages use as a one-row line store; the document names
// the part, the port behaviour is this design's choice.
module dpram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 640,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  input  logic             re_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
  end

  always_ff @(posedge clk) begin
    if (re_b) rdata_b <= mem[addr_b];
  end

endmodule
