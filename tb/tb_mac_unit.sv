// tb_mac_unit: end-to-end self-check of the MAC unit at its default size
// (8x8 multiplier, 17-bit accumulator). A reference model in the testbench
// keeps acc_ref = acc_ref + a*b mod 2^17 and is compared with both the
// combinational sum y (before the clock edge) and the accumulator acc (one
// edge later, the unit's one-cycle latency). The run covers:
//   - the operand pairs of the evaluated test waveform, accumulated in order
//   - long random runs with random holds (en low) and clears
//   - clear and enable asserted together (clear wins)
//   - runs of large products that wrap the 17-bit accumulator
//   - an asynchronous reset in mid-run
// Each of these events is counted; one that never happens counts a failure.
module tb_mac_unit;
  localparam int unsigned ACC_W = 17;

  logic             clk = 1'b0;
  logic             rst_n, clr, en;
  logic [7:0]       a, b;
  logic [ACC_W-1:0] y, acc;
  logic [ACC_W-1:0] acc_ref;
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_clr_en = 0, n_wrap = 0, n_reset = 0;

  mac_unit dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
    .a(a), .b(b), .y(y), .acc(acc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ACC_W-1:0] model_sum(logic [ACC_W-1:0] s, logic [7:0] x, logic [7:0] w);
    return ACC_W'(int'(s) + int'(x) * int'(w));
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // One clock cycle: apply inputs at the falling edge, check y, clock, check acc.
  task automatic step(input logic c, input logic e, input logic [7:0] x, input logic [7:0] w);
    logic [ACC_W-1:0] next;
    @(negedge clk);
    clr = c; en = e; a = x; b = w;
    #1;
    next = model_sum(acc_ref, x, w);
    checks++;
    if (y !== next) fail($sformatf("y=%0d expected %0d (acc=%0d a=%0d b=%0d)", y, next, acc_ref, x, w));
    if (c) begin
      acc_ref = '0;
      n_clr++;
      if (e) n_clr_en++;
    end else if (e) begin
      if (32'(acc_ref) + 32'(x) * 32'(w) >= (32'd1 << ACC_W)) n_wrap++;
      acc_ref = next;
      n_acc++;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (acc !== acc_ref) fail($sformatf("acc=%0d expected %0d", acc, acc_ref));
  endtask

  // operand pairs (a, b) of the evaluated test waveform
  localparam int NW = 6;
  localparam logic [7:0] WAVE_A [NW] = '{8'd15, 8'd235, 8'd40, 8'd35, 8'd41, 8'd85};
  localparam logic [7:0] WAVE_B [NW] = '{8'd69, 8'd66,  8'd35, 8'd71, 8'd31, 8'd59};

  initial begin
    // raise reset first so that asserting it is a falling edge
    rst_n = 1'b1; clr = 1'b0; en = 1'b0; a = '0; b = '0; acc_ref = '0;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (acc !== '0) fail("acc not zero in reset");
    @(negedge clk);
    rst_n = 1'b1;

    // waveform operands, accumulated in order
    for (int i = 0; i < NW; i++) step(1'b0, 1'b1, WAVE_A[i], WAVE_B[i]);
    checks++;
    if (acc !== ACC_W'(15*69 + 235*66 + 40*35 + 35*71 + 41*31 + 85*59))
      fail($sformatf("waveform sum acc=%0d", acc));

    // clear and enable together: clear wins
    step(1'b1, 1'b1, 8'd200, 8'd200);

    // large products until the accumulator wraps at least three times
    for (int i = 0; i < 12; i++) step(1'b0, 1'b1, 8'd255, 8'd255);

    // random operation
    for (int i = 0; i < 50000; i++) begin
      step(($urandom % 64) == 0, ($urandom % 8) != 0, 8'($urandom), 8'($urandom));
      if (i == 25000) begin
        @(negedge clk);
        rst_n = 1'b0;
        en = 1'b0;
        clr = 1'b0;
        acc_ref = '0;
        #1;
        checks++;
        if (acc !== '0) fail("async reset did not clear acc");
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end

    $display("events: accumulate=%0d hold=%0d clear=%0d clear_with_enable=%0d wrap=%0d reset=%0d",
             n_acc, n_hold, n_clr, n_clr_en, n_wrap, n_reset);
    if (n_acc == 0)    fail("no accumulate");
    if (n_hold == 0)   fail("no hold");
    if (n_clr == 0)    fail("no clear");
    if (n_clr_en == 0) fail("no clear with enable");
    if (n_wrap == 0)   fail("no wrap");
    if (n_reset == 0)  fail("no reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
