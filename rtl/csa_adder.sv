// csa_adder: three-operand carry-save adder. A row of W full adders reduces
// x + y + z to a sum vector and a carry vector with no carry moving between
// bit positions; a ripple row of full adders then adds the two vectors (the
// carry vector shifted one place left) to give the binary result. The result
// has W+2 bits, enough for the largest sum 3*(2^W-1). Combinational.
// The carry-save adder is what the design uses to add the partial products of
// the Vedic multipliers; its internal split into a carry-save row and a ripple
// carry-propagate row is this implementation's choice.
module csa_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] sum
);
  // carry-save row
  logic [W-1:0] cs_s, cs_c;
  // carry-propagate row: adds {1'b0, cs_s} and {cs_c, 1'b0}
  logic [W:0]   op_a, op_b, rs;
  logic [W+1:0] rc;

  for (genvar i = 0; i < W; i++) begin : g_save
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(cs_s[i]), .co(cs_c[i]));
  end

  assign op_a = {1'b0, cs_s};
  assign op_b = {cs_c, 1'b0};
  assign rc[0] = 1'b0;

  for (genvar i = 0; i <= W; i++) begin : g_prop
    full_adder u_fa (.a(op_a[i]), .b(op_b[i]), .ci(rc[i]), .s(rs[i]), .co(rc[i+1]));
  end

  assign sum = {rc[W+1], rs};
endmodule
