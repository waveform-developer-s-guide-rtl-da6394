// NrzL2M_tb: random bits with symbol enables; the reference level toggles on
// each 1 in NRZ-M mode and equals the input in bypass (NRZ-L) mode. Also
// checks that the level holds between symbol enables.
module NrzL2M_tb;
  logic Clk = 0, Reset = 1, SymbEn = 0, Bypass = 0, BitIn = 0;
  logic BitOut;
  int checks = 0, failures = 0;

  NrzL2M dut (.Clk, .Reset, .SymbEn, .Bypass, .BitIn, .BitOut);
  always #5 Clk = ~Clk;

  initial begin
    bit lvl = 0;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge Clk) begin
        BitIn = 1'($urandom);
        Bypass = (k >= 150);
        SymbEn = 1;
      end
      lvl = Bypass ? BitIn : lvl ^ BitIn;
      @(negedge Clk) begin SymbEn = 0; BitIn = ~BitIn; end
      checks++;
      if (BitOut !== lvl) begin failures++; $display("FAIL symbol %0d", k); end
      @(negedge Clk);
      checks++;
      if (BitOut !== lvl) begin failures++; $display("FAIL hold %0d", k); end
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
