// ClockEnables_tb: checks that each of the three enables pulses exactly once
// every END_COUNTn clocks, with small counts (4, 8, 2) to keep the run short.
module ClockEnables_tb;
  logic Clk = 0, Reset = 1;
  logic [3:1] en;
  int checks = 0, failures = 0;
  int cycle = 0;
  int count [1:3] = '{0, 0, 0};
  localparam int E [1:3] = '{4, 8, 2};

  ClockEnables #(.END_COUNT1(4), .END_COUNT2(8), .END_COUNT3(2)) dut (.Clk, .Reset, .ClockEn(en));

  always #5 Clk = ~Clk;

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    // after reset release, enable n first rises after E[n] clocks, then every E[n]
    for (int c = 1; c <= 64; c++) begin
      @(posedge Clk); #1;
      for (int n = 1; n <= 3; n++) begin
        checks++;
        if (en[n] !== ((c % E[n]) == 0)) begin
          failures++;
          $display("FAIL cycle %0d en%0d=%b", c, n, en[n]);
        end
        if (en[n]) count[n]++;
      end
    end
    for (int n = 1; n <= 3; n++) begin
      checks++;
      if (count[n] != 64 / E[n]) begin failures++; $display("FAIL count%0d=%0d", n, count[n]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
