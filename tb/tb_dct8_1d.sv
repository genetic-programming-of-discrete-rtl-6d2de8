// Self-checking testbench of dct8_1d.
//
// Streams NBLK blocks of 8 samples back to back (one sample per clock, phase
// counting 0..7) and compares every output coefficient, at exactly the clock
// the 14-clock latency predicts, with a floating-point orthonormal DCT-II of the
// same block. A coefficient may differ from the rounded exact value by 1 LSB.
// Stimulus: full-scale extremes, an impulse at each position, then random data.
module tb_dct8_1d;
  localparam int IN_W = 16;
  localparam int NBLK = 40;
  localparam int LAT  = 14;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0;
  logic rst_n = 0;
  logic [2:0] phase;
  logic signed [IN_W-1:0] din;
  logic signed [IN_W+1:0] dout;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic signed [IN_W-1:0] stim [NBLK*8];

  dct8_1d #(.IN_W(IN_W)) dut (.clk, .rst_n, .phase, .din, .dout);

  always #5 clk = ~clk;

  function automatic real ref_coef(int blk, int k);
    real acc = 0.0;
    for (int n = 0; n < 8; n++)
      acc += real'(stim[blk*8+n]) * $cos((2*n+1)*k*PI/16.0);
    acc = acc / 2.0;
    if (k == 0) acc = acc / $sqrt(2.0);
    return acc;
  endfunction

  initial begin
    for (int i = 0; i < NBLK*8; i++) begin
      int blk, n;
      blk = i / 8;
      n = i % 8;
      if (blk == 0)      stim[i] = 16'sh7fff;
      else if (blk == 1) stim[i] = -16'sh8000;
      else if (blk == 2) stim[i] = (n % 2 == 0) ? 16'sh7fff : -16'sh8000;
      else if (blk < 11) stim[i] = (n == blk - 3) ? 16'sd20000 : 16'sd0;
      else               stim[i] = $signed(16'($urandom));
    end
  end

  // Drive: sample cyc-0 is on din during clock cycle 0 after reset.
  always_comb begin
    phase = 3'(cyc);
    din   = (cyc < NBLK*8) ? stim[cyc] : '0;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // Check on the falling edge, when dout of the current cycle is stable.
  always @(negedge clk) begin
    if (rst_n && cyc >= LAT && cyc < LAT + NBLK*8) begin
      int blk, k;
      real exact, diff;
      blk = (cyc - LAT) / 8;
      k   = (cyc - LAT) % 8;
      exact = ref_coef(blk, k);
      diff = real'(dout) - exact;
      checks++;
      if (diff > 1.0 || diff < -1.0) begin
        failures++;
        $display("MISMATCH blk %0d X[%0d]: got %0d expected %f", blk, k, dout, exact);
      end
    end
    if (cyc == LAT + NBLK*8) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  // Watchdog.
  initial begin
    repeat (NBLK*8 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
