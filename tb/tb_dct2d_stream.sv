// Sustained-throughput test of dct2d_top at its default parameters.
//
// Streams a 64x64-sample image (64 blocks of 8x8, a smooth ramp plus noise,
// sent block by block in row-major order) with in_valid held high. The
// processor must then deliver one coefficient every clock: once out_valid
// first rises it must stay high for all 4096 coefficients, which must arrive
// within 4095 clocks of the first. Every coefficient is also compared with a
// floating-point orthonormal 2D DCT-II of its block (tolerance 3 LSB).
module tb_dct2d_stream;
  localparam int IN_W = 16;
  localparam int NBLK = 64;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [IN_W+3:0] out_data;
  logic [2:0] out_u, out_v;

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_out = 0, cyc = 0, first_cyc = -1, gaps = 0;
  logic signed [IN_W-1:0] pix [NBLK*64];
  real cosv [8][8];

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) cosv[i][j] = $cos((2*i+1)*j*PI/16.0);
    // Block b covers image rows 8*(b/8).., columns 8*(b%8)..; sample i of a block
    // is row i/8, column i%8 inside it.
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        int y, x, v;
        y = 8 * (b / 8) + i / 8;
        x = 8 * (b % 8) + i % 8;
        v = 300 * x - 200 * y + int'($urandom % 2001) - 1000;
        pix[b*64+i] = IN_W'(v);
      end
  end

  function automatic real ref_coef(int b, int u, int v);
    real acc = 0.0;
    for (int r = 0; r < 8; r++)
      for (int n = 0; n < 8; n++)
        acc += real'(pix[b*64 + r*8 + n]) * cosv[r][u] * cosv[n][v];
    if (u == 0) acc = acc * $sqrt(0.5);
    if (v == 0) acc = acc * $sqrt(0.5);
    return acc / 4.0;
  endfunction

  assign in_valid = rst_n && (n_sent < NBLK*64);
  assign in_data  = (n_sent < NBLK*64) ? pix[n_sent] : '0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) n_sent <= n_sent + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        int b, k;
        real diff;
        if (first_cyc < 0) first_cyc = cyc;
        b = n_out / 64;
        k = n_out % 64;
        checks++;
        diff = real'(out_data) - ref_coef(b, k % 8, k / 8);
        if (out_u != 3'(k % 8) || out_v != 3'(k / 8) || diff > 3.0 || diff < -3.0) begin
          failures++;
          $display("blk %0d #%0d (u,v)=(%0d,%0d): got %0d expected %f", b, k, out_u, out_v,
                   out_data, ref_coef(b, k % 8, k / 8));
        end
        n_out++;
      end else if (first_cyc >= 0 && n_out < NBLK*64) gaps++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_out == NBLK*64);
    @(negedge clk);
    checks++;
    if (gaps != 0 || cyc - 1 - first_cyc != NBLK*64 - 1) begin
      failures++;
      $display("throughput: %0d coefficients took %0d clocks, %0d idle clocks",
               n_out, cyc - first_cyc, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK*64 + 2000) @(posedge clk);
    failures++;
    $display("watchdog: %0d coefficients received", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
