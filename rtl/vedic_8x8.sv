// vedic_8x8: 8x8 unsigned Vedic (Urdhva-Tiryakbhyam) multiplier, p = a * b,
// combinational, 16-bit product.
// Following the 8-bit multiplier figure, a and b are split into nibbles and
// four vedic_4x4 multipliers compute, in parallel,
//   Q0 = a[3:0]*b[3:0], Q1 = a[3:0]*b[7:4], Q2 = a[7:4]*b[3:0], Q3 = a[7:4]*b[7:4].
// Q0[3:0] is Y[3:0]. A first carry-save adder sums Q1, Q2 and Q0[7:4]; its low
// nibble is Y[7:4]. A second carry-save adder adds Q3 to the rest of that sum
// and gives Y[15:8]. Which bits of the first sum go to the second adder is
// read from the figure's bit ranges (Y[3:0], Y[7:4], Y[15:8]).
// The top bits of the adder results are always zero and are left unused.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [9:0] s_mid;   // Q1 + Q2 + Q0[7:4], at most 225+225+15
  logic [9:0] s_hi;    // Q3 + s_mid[9:4]; only bits 7:0 are ever non-zero

  vedic_4x4 u_q0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_q1 (.a(a[3:0]), .b(b[7:4]), .p(q1));
  vedic_4x4 u_q2 (.a(a[7:4]), .b(b[3:0]), .p(q2));
  vedic_4x4 u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  csa_adder #(.W(8)) u_csa_mid (.x(q1), .y(q2), .z({4'h0, q0[7:4]}), .sum(s_mid));
  csa_adder #(.W(8)) u_csa_hi  (.x(q3), .y({2'b00, s_mid[9:4]}), .z(8'h00), .sum(s_hi));

  assign p = {s_hi[7:0], s_mid[3:0], q0[3:0]};
endmodule
