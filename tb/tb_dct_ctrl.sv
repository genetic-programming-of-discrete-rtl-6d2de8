// Self-checking testbench of dct_ctrl.
//
// Drives blk_start in a fixed pattern of frames with and without a block and
// checks, against counters kept here, every output in every clock: the frame
// start every 64 clocks, the input address and row phase, the transpose
// position (14 clocks behind), the bank flip when it wraps, the column phase,
// the output indices (28 clocks behind) and out_valid exactly during the 64
// clocks that begin 92 clocks after the start of each frame with a block.
module tb_dct_ctrl;
  localparam int LAT = 14;
  localparam int NFR = 10;
  localparam logic [NFR-1:0] PATTERN = 10'b1011001101;  // bit i: frame i has a block

  logic clk = 0, rst_n = 0;
  logic blk_start;
  logic frame_start, tr_wbank, out_valid;
  logic [5:0] in_addr, tr_addr;
  logic [2:0] row_phase, col_phase, out_u, out_v;

  dct_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int t = 0;                 // clocks since reset
  logic exp_bank = 0;
  int flips = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0d: %s", t, what);
    end
  endtask

  always_comb blk_start = frame_start && (t / 64 < NFR) && PATTERN[(t / 64) % NFR];

  always @(negedge clk) begin
    if (rst_n) begin
      int g, h, fo;
      logic vexp;
      g = (t - LAT) & 63;
      h = (t - 2*LAT) & 63;
      check(frame_start == (t % 64 == 0), "frame_start");
      check(in_addr == 6'(t), "in_addr");
      check(row_phase == 3'(t), "row_phase");
      check(tr_addr == 6'(g), "tr_addr");
      check(col_phase == 3'(g), "col_phase");
      check(out_u == 3'(h % 8) && out_v == 3'(h / 8), "out indices");
      check(tr_wbank == exp_bank, "tr_wbank");
      // Output frame fo started 92 clocks after input frame fo.
      fo = (t - 64 - 2*LAT);
      vexp = (fo >= 0) && (fo / 64 < NFR) && PATTERN[(fo / 64) % NFR];
      check(out_valid == vexp, "out_valid");
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (((t - LAT) & 63) == 63) begin
        exp_bank <= !exp_bank;
        flips++;
      end
      t <= t + 1;
      if (t == 64 * (NFR + 3)) begin
        check(flips >= NFR, "bank flips");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
    repeat (64 * (NFR + 6)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
