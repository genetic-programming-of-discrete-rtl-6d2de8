// Common control unit of the 2D DCT processor.
//
// Everything in the processor runs on a 64-clock frame, one 8x8 block per
// frame. A free-running 6-bit counter f gives the frame position of the input
// side: frame_start at f = 0, the input buffer read address f and the row
// pipeline phase f mod 8. The row pipeline delivers row r, coefficient k at
// f = 8r + k + LAT (mod 64), so the transpose side uses the counter
// g = f - LAT: it is the write address of the transpose buffer, its bank flips
// when g wraps, and g mod 8 is the phase of the column pipeline, which reads
// the previous block column by column. The column pipeline delivers column v,
// coefficient u at h = g - LAT = 8v + u, which gives the output indices.
//
// A block-valid flag follows each block through the three stages (input frame,
// transpose frame, output frame), so that frames without a block run through
// the pipelines as bubbles and only real coefficients raise out_valid.
//
// The source design names a common control unit that generates the address
// sequences and control signals; the frame timing is this design's own and
// follows from the latency LAT of the 1D pipelines.
module dct_ctrl
  import dct_pkg::*;
#(
  parameter int unsigned LAT_C = LAT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_start,    // the input buffer streams a block this frame
  output logic       frame_start,
  output logic [5:0] in_addr,
  output logic [2:0] row_phase,
  output logic [5:0] tr_addr,
  output logic       tr_wbank,
  output logic [2:0] col_phase,
  output logic       out_valid,
  output logic [2:0] out_u,
  output logic [2:0] out_v
);
  logic [5:0] f, g, h;
  logic       v_in, v_tr, v_col, v_out;

  always_comb begin
    g = f - 6'(LAT_C);
    h = g - 6'(LAT_C);
  end

  assign frame_start = (f == 6'd0);
  assign in_addr     = f;
  assign row_phase   = f[2:0];
  assign tr_addr     = g;
  assign col_phase   = g[2:0];
  assign out_u       = h[2:0];
  assign out_v       = h[5:3];
  assign out_valid   = v_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f        <= '0;
      tr_wbank <= 1'b0;
      v_in     <= 1'b0;
      v_tr     <= 1'b0;
      v_col    <= 1'b0;
      v_out    <= 1'b0;
    end else begin
      f <= f + 6'd1;
      if (f == 6'd0) v_in <= blk_start;
      if (g == 6'd63) tr_wbank <= !tr_wbank;
      if (g == 6'd63) begin
        v_tr  <= v_in;     // the block whose rows are written from g = 0 on
        v_col <= v_tr;     // the block whose columns are read from g = 0 on
      end
      if (h == 6'd63) v_out <= v_col;
    end
  end
endmodule
