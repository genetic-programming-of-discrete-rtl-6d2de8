// End-to-end testbench of dct2d_top at its default parameters (16-bit input).
//
// Sends NBLK 8x8 blocks through the valid/ready input: the first half with
// in_valid held high (the buffer fills and must push back), the second half
// with random gaps (the pipelines then run empty frames). Every output
// coefficient is compared with a floating-point orthonormal 2D DCT-II of its
// block (tolerance 3 LSB), its (u,v) indices with column-major order, and the
// first coefficient of every block must appear exactly 92 clocks after the
// frame in which the block entered the row pipeline. The test also counts how
// often back-pressure, empty frames and back-to-back blocks happened, and
// fails if one of them never did.
module tb_dct2d_top;
  localparam int IN_W = 16;
  localparam int NBLK = 12;
  localparam int BLK_LAT = 92;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0;
  logic rst_n = 0;
  logic in_valid;
  logic in_ready;
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [IN_W+3:0] out_data;
  logic [2:0] out_u, out_v;

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [IN_W-1:0] blocks [NBLK][64];
  real ref_coef [NBLK][8][8];
  int n_sent = 0;           // samples accepted
  int n_out = 0;            // coefficients received
  int cyc = 0;
  int start_cyc [NBLK];     // clock in which each block's frame started
  int n_started = 0;
  int n_backpressure = 0, n_bubble_frames = 0, n_back_to_back = 0;
  logic prev_frame_blk = 0;

  function automatic real cf(int k);
    return (k == 0) ? $sqrt(0.5) : 1.0;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        if (b == 0)      blocks[b][i] = 16'sh7fff;
        else if (b == 1) blocks[b][i] = ((i % 8 + i / 8) % 2 == 0) ? 16'sh7fff : -16'sh8000;
        else             blocks[b][i] = $signed(16'($urandom));
      end
    for (int b = 0; b < NBLK; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real acc;
          acc = 0.0;
          for (int r = 0; r < 8; r++)
            for (int n = 0; n < 8; n++)
              acc += real'(blocks[b][r*8+n]) * $cos((2*r+1)*u*PI/16.0) * $cos((2*n+1)*v*PI/16.0);
          ref_coef[b][u][v] = acc * cf(u) * cf(v) / 4.0;
        end
  end

  // Input driver: all valid for the first half, random gaps afterwards.
  logic want;
  always @(posedge clk) begin
    if (!rst_n) want <= 1'b0;
    else want <= (n_sent < NBLK*32) ? 1'b1 : ($urandom % 4 == 0);
  end
  always_comb begin
    in_valid = rst_n && want && (n_sent < NBLK*64);
    in_data  = (n_sent < NBLK*64) ? blocks[n_sent/64][n_sent%64] : '0;
  end

  // Frame model, from the input handshake only: the frame counter starts with
  // reset release, a frame begins every 64 clocks, and a block enters the row
  // pipeline at the first frame start after its 64th sample was accepted.
  int n_complete = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (cyc % 64 == 0) begin
        if (n_complete > n_started) begin
          if (n_started < NBLK) start_cyc[n_started] = cyc;
          n_started++;
          if (prev_frame_blk) n_back_to_back++;
          prev_frame_blk = 1;
        end else begin
          if (n_started > 0 && n_started < NBLK) n_bubble_frames++;
          prev_frame_blk = 0;
        end
      end
      if (in_valid && in_ready) begin
        n_sent <= n_sent + 1;
        if (n_sent % 64 == 63) n_complete++;
      end
      if (in_valid && !in_ready) n_backpressure++;
    end
  end

  // Output checker.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int b, k;
      real diff;
      b = n_out / 64;
      k = n_out % 64;
      if (b >= NBLK) begin
        failures++;
        $display("extra output %0d", n_out);
      end else begin
        checks++;
        if (out_u != 3'(k % 8) || out_v != 3'(k / 8)) begin
          failures++;
          $display("order: blk %0d #%0d got (u,v)=(%0d,%0d)", b, k, out_u, out_v);
        end
        diff = real'(out_data) - ref_coef[b][k % 8][k / 8];
        checks++;
        if (diff > 3.0 || diff < -3.0) begin
          failures++;
          $display("value: blk %0d (u,v)=(%0d,%0d) got %0d expected %f", b, k % 8, k / 8,
                   out_data, ref_coef[b][k % 8][k / 8]);
        end
        if (k == 0) begin
          checks++;
          if (cyc - start_cyc[b] != BLK_LAT) begin
            failures++;
            $display("latency: blk %0d took %0d clocks", b, cyc - start_cyc[b]);
          end
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_out == NBLK*64);
    repeat (200) @(posedge clk);
    $display("mechanisms: back-pressure clocks %0d, empty frames %0d, back-to-back blocks %0d",
             n_backpressure, n_bubble_frames, n_back_to_back);
    checks += 3;
    if (n_backpressure == 0) failures++;
    if (n_bubble_frames == 0) failures++;
    if (n_back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (NBLK*64*6 + 2000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d coefficients received", n_out, NBLK*64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
