// BpskMod_tb: bit 0 must give I = +AMPLITUDE, bit 1 I = -AMPLITUDE, Q = 0,
// one clock after the bit is applied.
module BpskMod_tb;
  logic Clk = 0, Reset = 1, BitIn = 0;
  logic signed [15:0] IOut, QOut;
  int checks = 0, failures = 0;

  BpskMod #(.AMPLITUDE(12345)) dut (.Clk, .Reset, .BitIn, .IOut, .QOut);
  always #5 Clk = ~Clk;

  initial begin
    bit b;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 100; k++) begin
      b = 1'($urandom);
      @(negedge Clk) BitIn = b;
      @(negedge Clk);
      checks++;
      if (IOut !== (b ? -16'sd12345 : 16'sd12345) || QOut !== 0) begin
        failures++; $display("FAIL bit %b I=%0d Q=%0d", b, IOut, QOut);
      end
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
