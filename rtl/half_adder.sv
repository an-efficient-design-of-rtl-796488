// half_adder: one-bit half adder, the cell the 2x2 Vedic multiplier is drawn
// with. s = a xor b, c = a and b. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
