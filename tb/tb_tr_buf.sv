// Self-checking testbench of tr_buf.
//
// Writes NBLK frames of numbered words, row-major, with the bank flipping every
// 64 clocks, and checks that during each frame the read port returns the
// previous frame's words in column-major order: at position g the word written
// at row g%8, column g/8.
module tb_tr_buf;
  localparam int W = 18;
  localparam int NBLK = 6;

  logic clk = 0;
  logic wbank = 0;
  logic [5:0] addr = 0;
  logic [W-1:0] wdata, rdata;

  tr_buf #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int frame = 0;

  function automatic logic [W-1:0] word(int f, int a);
    return W'(f * 1000 + a * 7 + 3);
  endfunction

  assign wdata = word(frame, int'(addr));

  always @(negedge clk) begin
    if (frame > 0) begin
      int r, c;
      r = addr % 8;
      c = addr / 8;
      checks++;
      if (rdata != word(frame - 1, r * 8 + c)) begin
        failures++;
        $display("frame %0d pos %0d: got %0d expected %0d", frame, addr, rdata, word(frame - 1, r * 8 + c));
      end
    end
  end

  always @(posedge clk) begin
    addr <= addr + 1;
    if (addr == 63) begin
      wbank <= !wbank;
      frame <= frame + 1;
      if (frame == NBLK) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (64 * (NBLK + 3)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
