// accumulator: the register that holds the running sum of the MAC unit and
// feeds it back to the adder. On each rising clock edge it loads d when en is
// high, clears to zero when clr is high (clr wins over en), and otherwise
// holds. rst_n is an asynchronous active-low reset to zero. The register, its
// feedback and its use as the unit's output follow the MAC block diagram; the
// enable, the clear and the reset are this design's choices.
module accumulator #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (en)    q <= d;
  end
endmodule
