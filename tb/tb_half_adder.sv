// tb_half_adder: exhaustive self-check of the half adder over all four input
// pairs against s = a xor b, c = a and b computed as a 2-bit sum a + b.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] exp_sum;
      {a, b} = 2'(i);
      exp_sum = 2'(a) + 2'(b);
      #1;
      checks++;
      if ({c, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%0d b=%0d got c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
