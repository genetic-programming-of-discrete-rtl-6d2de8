// Transpose buffer between the row and the column DCT pipelines.
//
// Two banks of 64 words. In every clock the row pipeline's output is written
// into bank `wbank` at position `addr` (row-major: address 8*row + column),
// while the column pipeline reads the other bank, which holds the previous
// block, at the transposed position of the same counter, {addr[2:0], addr[5:3]},
// so that it receives one column after another, each in natural order. The
// control unit flips `wbank` every 64 clocks. Reads are asynchronous (the word
// is on rdata in the same clock), writes take effect at the clock edge.
//
// The transposition memory between the pipelines is part of the source design;
// the two-bank organisation and the addressing are this design's own.
module tr_buf
  import dct_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         wbank,
  input  logic [5:0]   addr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);
  logic [W-1:0] mem [2][64];

  always_ff @(posedge clk) mem[wbank][addr] <= wdata;

  assign rdata = mem[!wbank][transpose_addr(addr)];
endmodule
