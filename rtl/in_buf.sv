// Input block buffer of the 2D DCT processor.
//
// Two banks of 64 words each hold one 8x8 block, row-major. The write side
// takes samples with a valid/ready handshake at any rate and fills the banks
// alternately; a bank is marked full after its 64th word, and in_ready is low
// while the bank to be written next is still full (back-pressure). The read
// side feeds the row DCT pipeline, which needs a whole block without gaps and
// aligned to its 8-clock period: at each frame start (frame_start, one clock
// every 64) a full bank, if there is one, is streamed out during the 64 clocks
// of that frame at the addresses given by the control unit, and blk_start tells
// the control unit that this frame carries a block. rd_data is the word at
// rd_addr in the same clock (asynchronous read); it is zero in a frame that
// carries no block.
//
// The existence of an input buffer memory is taken from the source design;
// its organisation, the handshake and the frame alignment are this design's
// own. Storage is in flip-flops/distributed memory, not block RAM.
module in_buf #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // sample input
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  // block output, timed by the control unit
  input  logic         frame_start,
  input  logic [5:0]   rd_addr,
  output logic         blk_start,
  output logic [W-1:0] rd_data
);
  logic [W-1:0] mem [2][64];
  logic [1:0]   full;
  logic         wbank, rbank;
  logic [5:0]   waddr;
  logic         rd_busy;     // streaming a block, after its first clock
  logic         rd_active;   // streaming a block in this clock
  logic         wr;

  assign in_ready  = !full[wbank];
  assign wr        = in_valid && in_ready;
  assign blk_start = frame_start && full[rbank] && !rd_busy;
  assign rd_active = blk_start || rd_busy;
  assign rd_data   = rd_active ? mem[rbank][rd_addr] : '0;

  always_ff @(posedge clk) begin
    if (wr) mem[wbank][waddr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full    <= '0;
      wbank   <= 1'b0;
      rbank   <= 1'b0;
      waddr   <= '0;
      rd_busy <= 1'b0;
    end else begin
      if (wr) begin
        waddr <= waddr + 6'd1;
        if (waddr == 6'd63) begin
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
        end
      end
      if (rd_active) begin
        rd_busy <= (rd_addr != 6'd63);
        if (rd_addr == 6'd63) begin
          full[rbank] <= 1'b0;
          rbank       <= !rbank;
        end
      end
    end
  end

  // A sample is never written into a bank that is still waiting to be read.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full[wbank]);
  // The read side streams only full banks.
  a_read_full: assert property (@(posedge clk) disable iff (!rst_n) rd_active |-> full[rbank]);
endmodule
