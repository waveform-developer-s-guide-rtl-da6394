// ResetGen_tb: Enable low then high, two separated push-button resets and a
// soft reset; after each, SystemReset must stay high and fall exactly
// RESET_CYCLES (8) clocks after the source went away, plus the two-flop
// button synchroniser and the registered output. Reference times are counted here, not read from the DUT.
module ResetGen_tb;
  logic Clk = 0, Enable = 0, SwitchReset = 0, SoftReset = 0;
  logic SystemReset, SMFailure;
  int checks = 0, failures = 0;

  ResetGen #(.RESET_CYCLES(8)) dut (.Clk, .Enable, .SwitchReset, .SoftReset, .SystemReset, .SMFailure);
  always #5 Clk = ~Clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // count clocks from now until SystemReset is low
  task automatic measure(output int n);
    n = 0;
    while (SystemReset) begin @(posedge Clk); #1; n++; if (n > 100) break; end
  endtask

  int n;
  initial begin
    repeat (5) @(posedge Clk);
    #1 check(SystemReset == 1, "reset while Enable low");
    @(negedge Clk) Enable = 1;
    measure(n);
    check(n == 12, $sformatf("power-on stretch %0d", n));
    repeat (10) begin @(posedge Clk); #1 check(!SystemReset, "no reset while idle"); end
    for (int k = 0; k < 2; k++) begin
      @(negedge Clk) SwitchReset = 1;
      repeat (4) @(posedge Clk);
      #1 check(SystemReset, "reset during button");
      repeat (5) @(posedge Clk);
      #1 check(SystemReset, "reset held during button");
      @(negedge Clk) SwitchReset = 0;
      measure(n);
      check(n == 12, $sformatf("button stretch %0d", n));
      repeat (20) @(posedge Clk);
    end
    @(negedge Clk) SoftReset = 1;
    @(negedge Clk) SoftReset = 0;
    #1 check(SystemReset, "soft reset asserts");
    measure(n);
    check(n == 9, $sformatf("soft stretch %0d", n));
    check(!SMFailure, "no SM failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
