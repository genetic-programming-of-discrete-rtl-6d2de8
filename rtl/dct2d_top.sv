// 8x8 two-dimensional DCT processor.
//
// Structure: an input block buffer, a row DCT pipeline, a transpose buffer, a
// column DCT pipeline and a common control unit. Both pipelines are dct8_1d
// instances (3 multipliers, 6 adders each, one sample per clock, period 8).
// A block of 64 samples enters in row-major order through a valid/ready
// handshake. Once a whole block is buffered it is streamed through the row
// pipeline in the next 64-clock frame, its row transforms land in one bank of
// the transpose buffer, and in the frame after that the column pipeline reads
// them column by column. Sustained throughput is one sample per clock.
//
// Output: one coefficient per clock while out_valid is high, in column-major
// order (out_v = horizontal frequency, slow; out_u = vertical frequency, fast),
// scaled as the orthonormal 2D DCT-II, IN_W+4 bits. Latency from the first
// clock of a block's frame to its coefficient (0,0): 64 + 2*LAT = 92 clocks.
//
// The split into input buffer, two 1D pipelines, transpose buffer and common
// control unit, the 16-bit data width and the absence of block RAM follow the
// source design; the output order and word widths are this design's choice.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [IN_W+3:0] out_data,
  output logic [2:0]             out_u,
  output logic [2:0]             out_v
);
  logic                   frame_start, blk_start, tr_wbank;
  logic [5:0]             in_addr, tr_addr;
  logic [2:0]             row_phase, col_phase;
  logic signed [IN_W-1:0] row_in;
  logic signed [IN_W+1:0] row_out, col_in;

  dct_ctrl u_ctrl (
    .clk, .rst_n, .blk_start,
    .frame_start, .in_addr, .row_phase, .tr_addr, .tr_wbank, .col_phase,
    .out_valid, .out_u, .out_v
  );

  in_buf #(.W(IN_W)) u_in_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_data),
    .frame_start, .rd_addr(in_addr), .blk_start, .rd_data(row_in)
  );

  dct8_1d #(.IN_W(IN_W)) u_row (
    .clk, .rst_n, .phase(row_phase), .din(row_in), .dout(row_out)
  );

  tr_buf #(.W(IN_W+2)) u_tr_buf (
    .clk, .wbank(tr_wbank), .addr(tr_addr), .wdata(row_out), .rdata(col_in)
  );

  dct8_1d #(.IN_W(IN_W+2)) u_col (
    .clk, .rst_n, .phase(col_phase), .din(col_in), .dout(out_data)
  );
endmodule
