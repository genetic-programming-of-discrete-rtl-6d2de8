// Shared constants of the 8x8 DCT processor.
//
// The 1D transform is the orthonormal 8-point DCT-II,
//   X[k] = c(k)/2 * sum_n x[n] * cos((2n+1)k*pi/16),  c(0) = 1/sqrt(2), c(k>0) = 1,
// computed by Chen's factorisation in which every plane rotation
//   (Xa, Xb) = (cA*P + cB*Q, cB*P - cA*Q)
// is done with three products: t = cB*(P+Q), Xa = t + (cA-cB)*P, Xb = t - (cA+cB)*Q.
// With Ck = cos(k*pi/16), the multiplier constants below are round(v * 2^17) of
//   K_C4   = C4           (used on the odd half before its butterflies)
//   K_K0   = C4/2         (X0 and X4)
//   K_TE   = C6/2,        K_M1E  = (C2-C6)/2,  K_M2E  = (C2+C6)/2   (X2, X6)
//   K_TO1  = C7/2,        K_M1O1 = (C1-C7)/2,  K_M2O1 = (C1+C7)/2   (X1, X7)
//   K_TO2  = C3/2,        K_M1O2 = (C5-C3)/2,  K_M2O2 = (C5+C3)/2   (X5, X3)
// The factor 1/2 of the orthonormal scaling is folded into the final constants.
package dct_pkg;

  localparam int unsigned CW = 18;  // coefficient width, signed (one 18x18 multiplier)
  localparam int unsigned CF = 17;  // coefficient fraction bits

  typedef logic signed [CW-1:0] coef_t;

  localparam coef_t K_C4   = 18'sd92682;
  localparam coef_t K_K0   = 18'sd46341;
  localparam coef_t K_TE   = 18'sd25080;
  localparam coef_t K_M1E  = 18'sd35468;
  localparam coef_t K_M2E  = 18'sd85627;
  localparam coef_t K_TO1  = 18'sd12785;
  localparam coef_t K_M1O1 = 18'sd51491;
  localparam coef_t K_M2O1 = 18'sd77062;
  localparam coef_t K_TO2  = 18'sd54491;
  localparam coef_t K_M1O2 = -18'sd18081;
  localparam coef_t K_M2O2 = 18'sd90901;

  // Clocks from x[0] on the input of a 1D pipeline to X[0] on its output.
  localparam int unsigned LAT = 14;

  // Column-major address of position g of a row-major 8x8 frame.
  function automatic logic [5:0] transpose_addr(input logic [5:0] g);
    return {g[2:0], g[5:3]};
  endfunction

endpackage
