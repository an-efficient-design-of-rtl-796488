// mac_unit: multiply-accumulate unit built around the 8x8 Vedic multiplier.
// Each clock cycle with en high, the 16-bit product a*b from vedic_8x8 is
// added to the accumulator by a carry-save adder and the accumulator loads the
// sum: acc <= acc + a*b. The sum wraps modulo 2^ACC_W. clr clears the
// accumulator (and takes priority over en); rst_n resets it asynchronously.
// Ports:
//   a, b  8-bit unsigned operands (multiplier and multiplicand)
//   y     combinational adder output, acc + a*b, the value loaded next
//   acc   registered accumulator, the unit's output
// Timing: the multiplier and adder are one combinational path from a, b to y;
// acc shows the new sum one clock edge after the operands are applied.
// The multiplier-adder-accumulator loop follows the MAC block diagram; the
// 17-bit width of y follows the output bus y[16:0] of the evaluated design.
// Enable, clear, reset and wrap-around are this design's own choices.
module mac_unit #(
  parameter int unsigned ACC_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [7:0]       a,
  input  logic [7:0]       b,
  output logic [ACC_W-1:0] y,
  output logic [ACC_W-1:0] acc
);
  logic [15:0]      prod;
  logic [ACC_W+1:0] add_sum;   // full adder result; the top two bits are dropped (wrap)

  vedic_8x8 u_mult (.a(a), .b(b), .p(prod));

  // third operand of the carry-save adder is unused by the accumulation and tied to zero
  csa_adder #(.W(ACC_W)) u_add (
    .x  (acc),
    .y  (ACC_W'(prod)),
    .z  ('0),
    .sum(add_sum)
  );

  assign y = add_sum[ACC_W-1:0];

  accumulator #(.W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(y), .q(acc)
  );
endmodule
