// sram_sp: single-port synchronous SRAM, one read or write per clock.
//
// Used for the 8 kB DART memory (2048 x 32 bit, the document's size) and for
// the memory that MBIST tests.  A write stores wdata at addr on the rising
// edge when we is high; a read returns mem[addr] on rdata one cycle after
// the address is presented (read-first on a write).  The array stands in
// for a compiled SRAM macro; its width, depth and read latency are this
// design's choices except for the 8 kB DART memory capacity.
`timescale 1ps/1ps
module sram_sp #(
  parameter int WORDS = 2048,
  parameter int DW    = 32,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end
endmodule
