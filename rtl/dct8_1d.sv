// Pipelined 8-point DCT with a cyclic schedule of period 8 clocks.
//
// One sample enters and one coefficient leaves every clock, both in natural
// order, through a single input and a single output port. Each transform takes
// 13 multiplications and 29 additions (Chen's factorisation with three-product
// rotations, see dct_pkg). They are mapped onto 3 multiplier units and 6 adder
// units; every unit has a multiplexer on its operands that is switched by the
// clock slot `phase` (0..7), and every intermediate value has its own register
// written in a fixed slot. Iterations overlap: the input pair butterflies of
// one block run in the same slots as the last rotations of the previous one.
//
// Schedule (T = clock counted from x[0] on din, slot = T mod 8):
//   T5..T8  input butterflies a[n] = x[n]+x[7-n], b[n] = x[n]-x[7-n]
//   T8..T10 even butterflies, odd C4 products s, r and odd butterflies P,Q,R,S
//   T11     X0, X4 and the first product of the even rotation
//   T12     X2, X6; products of the (C1,C7) rotation
//   T13     X1, X7; products of the (C5,C3) rotation
//   T14     X5, X3
//   X[k] is loaded into the output register at T13+k and is on dout during T14+k.
//
// Interface: `phase` must equal n while x[n] is on din and count 0..7 without
// gaps; the caller owns the phase counter (the control unit of the 2D processor,
// or a testbench). Latency x[0] -> X[0] is 14 clocks (dct_pkg::LAT); a new
// transform can start every 8 clocks. An assertion checks that phase steps by
// one every clock after reset.
//
// The operation count, the 3 multipliers / 6 adders and the period of 8 follow
// the source design. The factorisation, the slot assignment, the register set
// (one register per intermediate value), the word widths (GUARD fraction bits,
// rounding after each product) and the orthonormal scaling are this design's own.
module dct8_1d
  import dct_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned GUARD = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             phase,
  input  logic signed [IN_W-1:0] din,
  output logic signed [IN_W+1:0] dout
);
  localparam int unsigned IW = IN_W + 5 + GUARD;  // internal word width
  typedef logic signed [IW-1:0] word_t;

  // ---------------------------------------------------------------- registers
  word_t xin;                      // last input sample
  word_t xs [4];                   // x[0..3] of the current block
  word_t a [4], b [4];             // input butterflies
  word_t c0, c1, c2, c3, sp, sm;   // even butterflies, odd C4 operands
  word_t e0, e1, h;                // X0/X4 operands, even rotation sum
  word_t s, r, pp, pq, pr, ps;     // odd half: C4 products, butterflies P,Q,R,S
  word_t sum_pq, sum_rs;           // rotation sums of the odd half
  word_t m1e, m2e, te;             // even rotation products
  word_t to1, m1o1, m2o1;          // (C1,C7) rotation products
  word_t to2, m1o2, m2o2;          // (C5,C3) rotation products
  word_t xr [8];                   // finished coefficients X[0..7]

  // --------------------------------------------------------- processing units
  word_t add_a [6], add_b [6], add_y [6];
  logic  add_sub [6];
  word_t mul_a [3], mul_y [3];
  coef_t mul_c [3];

  for (genvar i = 0; i < 6; i++) begin : g_add
    pu_add #(.W(IW)) u_add (.a(add_a[i]), .b(add_b[i]), .sub(add_sub[i]), .y(add_y[i]));
  end
  for (genvar i = 0; i < 3; i++) begin : g_mul
    pu_mul #(.W(IW), .CW(CW), .CF(CF)) u_mul (.a(mul_a[i]), .c(mul_c[i]), .y(mul_y[i]));
  end

  // Operand multiplexers, switched by the slot of the period.
  always_comb begin
    for (int i = 0; i < 6; i++) begin
      add_a[i]   = '0;
      add_b[i]   = '0;
      add_sub[i] = 1'b0;
    end
    for (int i = 0; i < 3; i++) begin
      mul_a[i] = '0;
      mul_c[i] = '0;
    end
    unique case (phase)
      3'd0: begin
        add_a[0] = xs[0]; add_b[0] = xin;                   // a0 = x0 + x7
        add_a[1] = xs[0]; add_b[1] = xin;  add_sub[1] = 1;  // b0 = x0 - x7
        add_a[2] = a[1];  add_b[2] = a[2];                  // c1
        add_a[3] = a[1];  add_b[3] = a[2]; add_sub[3] = 1;  // c2
        add_a[4] = b[2];  add_b[4] = b[1];                  // sp
        add_a[5] = b[2];  add_b[5] = b[1]; add_sub[5] = 1;  // sm
      end
      3'd1: begin
        add_a[0] = a[0];  add_b[0] = a[3];                  // c0
        add_a[1] = a[0];  add_b[1] = a[3]; add_sub[1] = 1;  // c3
        mul_a[0] = sp;    mul_c[0] = K_C4;                  // s
        mul_a[1] = sm;    mul_c[1] = K_C4;                  // r
        mul_a[2] = c2;    mul_c[2] = K_M2E;                 // m2e
      end
      3'd2: begin
        add_a[0] = c0;    add_b[0] = c1;                    // e0
        add_a[1] = c0;    add_b[1] = c1;   add_sub[1] = 1;  // e1
        add_a[2] = c3;    add_b[2] = c2;                    // h
        add_a[3] = b[0];  add_b[3] = s;                     // P
        add_a[4] = b[3];  add_b[4] = r;    add_sub[4] = 1;  // Q
        add_a[5] = b[0];  add_b[5] = s;    add_sub[5] = 1;  // R
        mul_a[0] = c3;    mul_c[0] = K_M1E;                 // m1e
      end
      3'd3: begin
        add_a[0] = b[3];  add_b[0] = r;                     // S
        add_a[1] = pp;    add_b[1] = pq;                    // P + Q
        mul_a[0] = e0;    mul_c[0] = K_K0;                  // X0
        mul_a[1] = e1;    mul_c[1] = K_K0;                  // X4
        mul_a[2] = h;     mul_c[2] = K_TE;                  // te
      end
      3'd4: begin
        add_a[0] = te;    add_b[0] = m1e;                   // X2
        add_a[1] = te;    add_b[1] = m2e;  add_sub[1] = 1;  // X6
        add_a[2] = pr;    add_b[2] = ps;                    // R + S
        mul_a[0] = sum_pq; mul_c[0] = K_TO1;                // to1
        mul_a[1] = pp;    mul_c[1] = K_M1O1;                // m1o1
        mul_a[2] = pq;    mul_c[2] = K_M2O1;                // m2o1
      end
      3'd5: begin
        add_a[0] = xs[3]; add_b[0] = xin;                   // a3 = x3 + x4
        add_a[1] = xs[3]; add_b[1] = xin;  add_sub[1] = 1;  // b3 = x3 - x4
        add_a[2] = to1;   add_b[2] = m1o1;                  // X1
        add_a[3] = to1;   add_b[3] = m2o1; add_sub[3] = 1;  // X7
        mul_a[0] = sum_rs; mul_c[0] = K_TO2;                // to2
        mul_a[1] = pr;    mul_c[1] = K_M1O2;                // m1o2
        mul_a[2] = ps;    mul_c[2] = K_M2O2;                // m2o2
      end
      3'd6: begin
        add_a[0] = xs[2]; add_b[0] = xin;                   // a2 = x2 + x5
        add_a[1] = xs[2]; add_b[1] = xin;  add_sub[1] = 1;  // b2 = x2 - x5
        add_a[2] = to2;   add_b[2] = m1o2;                  // X5
        add_a[3] = to2;   add_b[3] = m2o2; add_sub[3] = 1;  // X3
      end
      3'd7: begin
        add_a[0] = xs[1]; add_b[0] = xin;                   // a1 = x1 + x6
        add_a[1] = xs[1]; add_b[1] = xin;  add_sub[1] = 1;  // b1 = x1 - x6
      end
      default: ;
    endcase
  end

  // Output rounding: drop the guard bits, round to nearest.
  function automatic logic signed [IN_W+1:0] out_round(input word_t v);
    return (IN_W+2)'((v + word_t'(1 << (GUARD-1))) >>> GUARD);
  endfunction

  // Result registers, each written in its own slot.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xin <= '0;
      for (int i = 0; i < 4; i++) begin
        xs[i] <= '0; a[i] <= '0; b[i] <= '0;
      end
      {c0, c1, c2, c3, sp, sm, e0, e1, h} <= '0;
      {s, r, pp, pq, pr, ps, sum_pq, sum_rs} <= '0;
      {m1e, m2e, te, to1, m1o1, m2o1, to2, m1o2, m2o2} <= '0;
      for (int i = 0; i < 8; i++) xr[i] <= '0;
      dout <= '0;
    end else begin
      xin <= word_t'(din) <<< GUARD;
      if (phase < 3'd4) xs[phase[1:0]] <= word_t'(din) <<< GUARD;
      unique case (phase)
        3'd0: begin
          a[0] <= add_y[0]; b[0] <= add_y[1]; c1 <= add_y[2]; c2 <= add_y[3];
          sp <= add_y[4]; sm <= add_y[5];
          dout <= out_round(xr[3]);
        end
        3'd1: begin
          c0 <= add_y[0]; c3 <= add_y[1];
          s <= mul_y[0]; r <= mul_y[1]; m2e <= mul_y[2];
          dout <= out_round(xr[4]);
        end
        3'd2: begin
          e0 <= add_y[0]; e1 <= add_y[1]; h <= add_y[2];
          pp <= add_y[3]; pq <= add_y[4]; pr <= add_y[5];
          m1e <= mul_y[0];
          dout <= out_round(xr[5]);
        end
        3'd3: begin
          ps <= add_y[0]; sum_pq <= add_y[1];
          xr[0] <= mul_y[0]; xr[4] <= mul_y[1]; te <= mul_y[2];
          dout <= out_round(xr[6]);
        end
        3'd4: begin
          xr[2] <= add_y[0]; xr[6] <= add_y[1]; sum_rs <= add_y[2];
          to1 <= mul_y[0]; m1o1 <= mul_y[1]; m2o1 <= mul_y[2];
          dout <= out_round(xr[7]);
        end
        3'd5: begin
          a[3] <= add_y[0]; b[3] <= add_y[1]; xr[1] <= add_y[2]; xr[7] <= add_y[3];
          to2 <= mul_y[0]; m1o2 <= mul_y[1]; m2o2 <= mul_y[2];
          dout <= out_round(xr[0]);
        end
        3'd6: begin
          a[2] <= add_y[0]; b[2] <= add_y[1]; xr[5] <= add_y[2]; xr[3] <= add_y[3];
          dout <= out_round(xr[1]);
        end
        3'd7: begin
          a[1] <= add_y[0]; b[1] <= add_y[1];
          dout <= out_round(xr[2]);
        end
        default: ;
      endcase
    end
  end

  // The schedule relies on the phase advancing by one slot every clock.
  a_phase_steps: assert property (@(posedge clk) disable iff (!rst_n)
    $past(rst_n) |-> phase == $past(phase) + 3'd1);

endmodule
