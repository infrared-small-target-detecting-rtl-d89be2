// sram_model: behavioural model of the external synchronous SRAM (not
// synthesizable logic of the design; testbench use only).
//
// DEPTH words of DW bits. A write (we) stores wdata at addr on the clock
// edge; a read (re) returns the word at addr on rdata after that edge, so
// the data is there one clock after the request. Addresses beyond DEPTH read
// as zero and are not stored. Contents start undefined (random in a
// two-state simulator).
module sram_model #(
  parameter int unsigned AW    = 22,
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 7 * 640 * 480
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && addr < AW'(DEPTH)) mem[addr] <= wdata;
    if (re) rdata <= (addr < AW'(DEPTH)) ? mem[addr] : '0;
  end

endmodule
