// Multiplier processing unit of the 1D DCT datapath.
//
// Combinational signed multiplication of a data word by a fixed-point
// coefficient with CF fraction bits, rounded to the nearest integer
// (ties towards +infinity): y = floor((a*c + 2^(CF-1)) / 2^CF).
// The result keeps the width of the data word; the datapath only feeds
// coefficients below 1 in magnitude, so it cannot overflow. Three of these
// units are time-shared by the 13 multiplications of one 8-point transform.
module pu_mul #(
  parameter int unsigned W  = 24,
  parameter int unsigned CW = 16,
  parameter int unsigned CF = 15
) (
  input  logic signed [W-1:0]  a,
  input  logic signed [CW-1:0] c,
  output logic signed [W-1:0]  y
);
  logic signed [W+CW-1:0] prod;

  always_comb begin
    prod = a * c;
    y    = W'((prod + (W+CW)'(1 << (CF-1))) >>> CF);
  end
endmodule
