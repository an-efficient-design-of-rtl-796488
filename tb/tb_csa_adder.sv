// tb_csa_adder: self-check of the three-operand carry-save adder at its
// default width (8 bits) and at 17 bits, the width the MAC unit uses. Corner
// cases (all zeros, all ones) and random operands are compared with the
// integer sum x + y + z.
module tb_csa_adder;
  localparam int unsigned W8  = 8;
  localparam int unsigned W17 = 17;

  logic [W8-1:0]  x8, y8, z8;
  logic [W8+1:0]  s8;
  logic [W17-1:0] x17, y17, z17;
  logic [W17+1:0] s17;
  int checks = 0, failures = 0;

  csa_adder                 dut8  (.x(x8),  .y(y8),  .z(z8),  .sum(s8));
  csa_adder #(.W(W17))      dut17 (.x(x17), .y(y17), .z(z17), .sum(s17));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [W8-1:0] x, y, z);
    int unsigned e;
    x8 = x; y8 = y; z8 = z;
    e = int'(x) + int'(y) + int'(z);
    #1;
    checks++;
    if (32'(s8) != e) begin
      failures++;
      if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d got %0d", x, y, z, s8);
    end
  endtask

  task automatic check17(input logic [W17-1:0] x, y, z);
    int unsigned e;
    x17 = x; y17 = y; z17 = z;
    e = int'(x) + int'(y) + int'(z);
    #1;
    checks++;
    if (32'(s17) != e) begin
      failures++;
      if (failures < 10) $display("FAIL W=17 %0d+%0d+%0d got %0d", x, y, z, s17);
    end
  endtask

  initial begin
    check8('0, '0, '0);
    check8('1, '1, '1);
    check8('1, 8'd1, '0);
    check17('0, '0, '0);
    check17('1, '1, '1);
    check17('1, 17'd1, '0);
    for (int i = 0; i < 20000; i++) begin
      check8(8'($urandom), 8'($urandom), 8'($urandom));
      check17(17'($urandom), 17'($urandom), 17'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
