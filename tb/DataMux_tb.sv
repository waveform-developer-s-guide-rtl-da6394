// DataMux_tb: for each select value drives random inputs with a word enable
// and checks DataOut (ADC sign-extended from 11 bits), DataValid, and that
// the output holds without WordEn.
module DataMux_tb;
  logic Clk = 0, Reset = 1, WordEn = 0;
  logic [1:0] Sel = 0;
  logic [10:0] AdcData = 0;
  logic [15:0] LoopbackData = 0, PrbsData = 0, DataOut;
  logic DataValid;
  int checks = 0, failures = 0;

  DataMux dut (.Clk, .Reset, .WordEn, .Sel, .AdcData, .LoopbackData, .PrbsData, .DataOut, .DataValid);
  always #5 Clk = ~Clk;

  initial begin
    logic [15:0] exp_d;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 80; k++) begin
      @(negedge Clk) begin
        Sel = 2'(k % 4);
        AdcData = 11'($urandom);
        LoopbackData = 16'($urandom);
        PrbsData = 16'($urandom);
        WordEn = 1;
      end
      exp_d = (Sel == 1) ? LoopbackData : (Sel == 2) ? PrbsData : {{5{AdcData[10]}}, AdcData};
      @(negedge Clk) begin WordEn = 0; AdcData = ~AdcData; LoopbackData = ~LoopbackData; PrbsData = ~PrbsData; end
      checks += 2;
      if (DataOut !== exp_d) begin failures++; $display("FAIL sel %0d", Sel); end
      if (!DataValid) failures++;
      @(negedge Clk);
      checks += 2;
      if (DataOut !== exp_d) failures++;
      if (DataValid) failures++;
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
