// Adder processing unit of the 1D DCT datapath.
//
// Combinational signed adder/subtractor, y = a + b or a - b. Its result is
// registered by the datapath that owns it; six of these units are time-shared
// by the 29 additions of one 8-point transform. The wrap-around on overflow is
// never reached because the datapath width leaves enough headroom.
module pu_add #(
  parameter int unsigned W = 24
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,  // 1: a - b, 0: a + b
  output logic signed [W-1:0] y
);
  always_comb y = sub ? a - b : a + b;
endmodule
