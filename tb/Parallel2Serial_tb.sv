// Parallel2Serial_tb: loads random words every 16 symbol enables (symbol
// enable every 2nd clock) and checks that BitOut walks through bits 15..0 of
// each word, one per symbol.
module Parallel2Serial_tb;
  logic Clk = 0, Reset = 1, Load = 0, SymbEn = 0;
  logic [15:0] DataIn = 0;
  logic BitOut;
  int checks = 0, failures = 0;

  Parallel2Serial dut (.Clk, .Reset, .Load, .SymbEn, .DataIn, .BitOut);
  always #5 Clk = ~Clk;

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 20; k++) begin
      w = 16'($urandom);
      @(negedge Clk) begin DataIn = w; Load = 1; SymbEn = 0; end
      @(negedge Clk) Load = 0;
      for (int b = 15; b >= 0; b--) begin
        checks++;
        if (BitOut !== w[b]) begin failures++; $display("FAIL word %0d bit %0d", k, b); end
        @(negedge Clk) SymbEn = 0;           // one idle clock: output must hold
        checks++;
        if (BitOut !== w[b]) begin failures++; $display("FAIL hold word %0d bit %0d", k, b); end
        if (b != 0) begin
          SymbEn = 1;
          @(negedge Clk) SymbEn = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
