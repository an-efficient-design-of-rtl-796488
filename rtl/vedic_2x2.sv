// vedic_2x2: 2x2 unsigned multiplier by the Urdhva-Tiryakbhyam ("vertically
// and crosswise") rule. The vertical products a0&b0 and a1&b1 give the outer
// columns, the two crosswise products a0&b1 and a1&b0 are summed by a half
// adder for the middle column, and a second half adder folds that carry into
// a1&b1. The structure (four ANDs, two half adders, outputs C2 S2 S1 S0) is the
// one of the 2-bit multiplier figure. Combinational; p = a * b.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11;
  logic s1, c1, s2, c2;

  always_comb begin
    pp00 = a[0] & b[0];
    pp01 = a[0] & b[1];
    pp10 = a[1] & b[0];
    pp11 = a[1] & b[1];
  end

  half_adder u_ha_mid (.a(pp01), .b(pp10), .s(s1), .c(c1));
  half_adder u_ha_top (.a(pp11), .b(c1),   .s(s2), .c(c2));

  assign p = {c2, s2, s1, pp00};
endmodule
