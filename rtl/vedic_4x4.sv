// vedic_4x4: 4x4 unsigned Vedic multiplier, p = a * b, combinational.
// The operands are split into 2-bit halves. Four vedic_2x2 cells form the
// vertical and crosswise products at once:
//   q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH.
// The two crosswise products and the upper half of q0 are added by one
// carry-save adder, whose low two bits are p[3:2]; the rest of that sum is
// added to q3 by a second carry-save adder to give p[7:4]. p[1:0] is q0[1:0].
// This is the same arrangement the 8x8 multiplier uses one level up; using it
// for the 4x4 level as well is this design's choice.
// The top bits of the adder results are always zero (the product fits in 8
// bits) and are left unused.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [5:0] s_mid;   // q1 + q2 + q0[3:2], at most 9+9+3
  logic [5:0] s_hi;    // q3 + s_mid[5:2]; only bits 3:0 are ever non-zero

  vedic_2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_q1 (.a(a[1:0]), .b(b[3:2]), .p(q1));
  vedic_2x2 u_q2 (.a(a[3:2]), .b(b[1:0]), .p(q2));
  vedic_2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  csa_adder #(.W(4)) u_csa_mid (.x(q1), .y(q2), .z({2'b00, q0[3:2]}), .sum(s_mid));
  csa_adder #(.W(4)) u_csa_hi  (.x(q3), .y(s_mid[5:2]), .z(4'd0), .sum(s_hi));

  assign p = {s_hi[3:0], s_mid[1:0], q0[1:0]};
endmodule
