// Self-checking testbench of in_buf.
//
// A writer offers NBLK blocks of numbered samples with random gaps; a frame
// generator pulses frame_start every 64 clocks and sweeps rd_addr 0..63, as
// the control unit does. Checked: each streamed block is the next written
// block, word by word in address order; blk_start is raised exactly when a
// complete block was waiting at the frame start; rd_data is zero in frames
// without a block; in_ready drops only when both banks are full.
module tb_in_buf;
  localparam int W = 16;
  localparam int NBLK = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [W-1:0] in_data;
  logic frame_start, blk_start;
  logic [5:0] rd_addr;
  logic [W-1:0] rd_data;

  in_buf #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wr = 0;          // samples accepted
  int n_rd_blk = 0;      // blocks whose streaming began
  int rd_blk = -1;       // block being streamed
  logic streaming = 0;
  int n_stall = 0, n_empty = 0;
  logic [5:0] fc = 0;
  logic phase_two = 0;

  function automatic logic [W-1:0] sample(int i);
    return W'(i * 37 + 5);
  endfunction

  always_comb begin
    frame_start = (fc == 0);
    rd_addr = fc;
    in_data = sample(n_wr);
  end

  always @(posedge clk) begin
    if (!rst_n) in_valid <= 0;
    // Fast writer first (exercises back-pressure), slow writer later (empty frames).
    else in_valid <= (n_wr < NBLK*64) && (phase_two ? ($urandom % 3 == 0) : 1'b1);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (frame_start) begin
        // A block is expected iff at least one complete block is written and not yet read.
        logic expect_blk;
        expect_blk = (n_wr / 64) > n_rd_blk;
        checks++;
        if (blk_start != expect_blk) begin
          failures++;
          $display("blk_start=%0d expected %0d (written %0d, read %0d)", blk_start, expect_blk, n_wr, n_rd_blk);
        end
        streaming = blk_start;
        if (blk_start) begin
          rd_blk = n_rd_blk;
          n_rd_blk++;
        end else n_empty++;
      end
      checks++;
      if (streaming) begin
        if (rd_data != sample(rd_blk*64 + int'(rd_addr))) begin
          failures++;
          $display("blk %0d addr %0d: got %h", rd_blk, rd_addr, rd_data);
        end
      end else if (rd_data != '0) begin
        failures++;
        $display("data %h outside a block", rd_data);
      end
      // Ready must be low only with two complete blocks waiting.
      checks++;
      if (in_ready != ((n_wr / 64) - n_rd_blk + (streaming ? 1 : 0) < 2) && !(streaming && rd_addr == 63)) begin
        failures++;
        $display("in_ready=%0d with %0d blocks buffered", in_ready, (n_wr / 64) - n_rd_blk);
      end
      if (in_valid && !in_ready) n_stall++;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      fc <= fc + 1;
      if (in_valid && in_ready) n_wr <= n_wr + 1;
      if (fc == 63 && streaming) streaming = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_wr >= NBLK*32);
    phase_two = 1;
    wait (n_rd_blk == NBLK && !streaming);
    repeat (70) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_empty == 0) begin
      failures++;
      $display("back-pressure %0d clocks, empty frames %0d", n_stall, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK*64*8) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
