// tb_accumulator: self-check of the accumulator register. Random clear,
// enable and data are applied for many clock cycles and q is compared each
// cycle with a reference register kept in the testbench; the asynchronous
// reset is checked at the start and once mid-run.
module tb_accumulator;
  localparam int unsigned W = 17;

  logic         clk = 1'b0;
  logic         rst_n, clr, en;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;
  int cycles = 0;

  accumulator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%0d expected %0d", what, q, ref_q);
    end
  endtask

  initial begin
    // raise reset first so that asserting it is a falling edge
    rst_n = 1'b1; clr = 1'b0; en = 1'b0; d = '0; ref_q = '0;
    #1 rst_n = 1'b0;
    #1;
    compare("reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      clr = ($urandom % 16) == 0;
      en  = ($urandom % 4) != 0;
      d   = W'($urandom);
      @(posedge clk);
      if (clr)     ref_q = '0;
      else if (en) ref_q = d;
      #1;
      compare("step");
      cycles++;
      if (i == 2500) begin
        rst_n = 1'b0;
        ref_q = '0;
        #1;
        compare("async reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
