// full_adder: one-bit full adder built from two half adders and an OR of their
// carries. It is the cell of the carry-save row and of the carry-propagate row
// in csa_adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic s0, c0, c1;
  half_adder u_ha0 (.a(a),  .b(b),  .s(s0), .c(c0));
  half_adder u_ha1 (.a(s0), .b(ci), .s(s),  .c(c1));
  assign co = c0 | c1;
endmodule
