// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier. Every
// operand pair is applied and the product compared with the integer product
// a * b computed in the testbench.
module tb_vedic_2x2;
  logic [1:0]  a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      for (int j = 0; j < (1 << 2); j++) begin
        int unsigned exp_p;
        a = 2'(i);
        b = 2'(j);
        exp_p = i * j;
        #1;
        checks++;
        if (32'(p) != exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d got %0d expected %0d", a, b, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
