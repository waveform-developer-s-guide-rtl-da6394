// ReceiveSignal_tb: feeds the receive path from a testbench PRBS-23 source on
// the loopback input (one word a clock after each word enable, as the transmit
// path does) and a random ADC input. Checks:
//  - ADC source: the word taken at each word enable is the sample from two
//    clocks earlier, bits 13..3, sign-extended to 16 bits;
//  - loopback source: the word is the last loopback word received;
//  - PRBS source: the words form an unbroken PRBS-23 bit stream;
//  - BERT: locks after two words, counts 16 bits per word, counts exactly the
//    bit errors put in, loses lock on a word with many errors and relocks,
//    and ClearCounts empties the counters.
module ReceiveSignal_tb;
  logic Clk = 0, Reset = 1, WordEn = 0, LoopbackValid = 0, ClearCounts = 0;
  logic [1:0] RxSrc = 0;
  logic [13:0] AdcData = 0;
  logic [15:0] LoopbackData = 0, RxParallelData;
  logic RxDataValid, BertLocked;
  logic [63:0] BertBits;
  logic [31:0] BertErrors;
  logic [7:0] SyncLosses;
  int checks = 0, failures = 0;

  ReceiveSignal dut (.*);
  always #5 Clk = ~Clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // testbench PRBS-23 (x^23 + x^18 + 1), MSB first
  logic [22:0] lfsr = '1;
  function automatic logic [15:0] next_word();
    logic [15:0] w;
    for (int i = 15; i >= 0; i--) begin
      w[i] = lfsr[22] ^ lfsr[17];
      lfsr = {lfsr[21:0], w[i]};
    end
    return w;
  endfunction

  int cnt = 0;
  int err_bits = 0;        // bit errors to put in the next loopback word
  int inserted = 0;
  logic [13:0] adc_h [3];
  always @(posedge Clk) begin
    cnt    <= (cnt == 15) ? 0 : cnt + 1;
    WordEn <= !Reset && cnt == 15;
    AdcData <= 14'($urandom);
    adc_h[0] <= AdcData; adc_h[1] <= adc_h[0]; adc_h[2] <= adc_h[1];
  end
  always @(posedge Clk) begin
    LoopbackValid <= WordEn;
    if (WordEn) begin
      logic [15:0] w;
      w = next_word();
      for (int k = 0; k < err_bits; k++) w[k] = ~w[k];
      inserted += err_bits;
      err_bits = 0;
      LoopbackData <= w;
    end
  end

  // output words as seen at RxDataValid, with the expected ADC word
  logic [15:0] exp_adc, lb_last;
  logic [15:0] outw [$];
  always @(posedge Clk) begin
    if (WordEn) exp_adc <= {{5{adc_h[1][13]}}, adc_h[1][13:3]};
    if (LoopbackValid) lb_last <= LoopbackData;
    if (RxDataValid) outw.push_back(RxParallelData);
  end

  function automatic int prbs_violations();
    bit b [$];
    int v;
    v = 0;
    foreach (outw[j]) for (int i = 15; i >= 0; i--) b.push_back(outw[j][i]);
    for (int n = 23; n < b.size(); n++) if (b[n] != (b[n-23] ^ b[n-18])) v++;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    // ADC source
    @(negedge Clk) RxSrc = 0;
    repeat (50) begin
      @(posedge RxDataValid); #1;
      check(RxParallelData == exp_adc, $sformatf("ADC word %h exp %h", RxParallelData, exp_adc));
    end
    // loopback source
    @(negedge Clk) RxSrc = 1;
    @(posedge RxDataValid);
    repeat (50) begin
      @(posedge RxDataValid); #1;
      check(RxParallelData == lb_last, "loopback word");
    end
    // PRBS source
    @(negedge Clk) RxSrc = 2;
    @(posedge RxDataValid);
    outw.delete();
    repeat (100) @(posedge RxDataValid);
    check(prbs_violations() == 0 && outw.size() >= 100, "PRBS source words");

    // BERT: locked with no errors so far
    check(BertLocked, "BERT locked");
    check(BertErrors == 0 && SyncLosses == 0, "no errors on a clean stream");
    @(negedge Clk) ClearCounts = 1;
    @(negedge Clk) ClearCounts = 0;
    check(BertBits == 0 && BertErrors == 0, "counters cleared");
    begin
      longint b0;
      @(posedge LoopbackValid);
      @(negedge Clk);
      b0 = BertBits;
      repeat (10) @(posedge LoopbackValid);
      @(negedge Clk);
      check(BertBits == b0 + 160, "16 bits counted per word");
    end
    // counted errors
    repeat (20) begin
      @(negedge Clk) err_bits = $urandom_range(6);
      @(posedge LoopbackValid);
    end
    repeat (3) @(posedge LoopbackValid);
    @(negedge Clk);
    check(BertErrors == 32'(inserted), $sformatf("errors %0d exp %0d", BertErrors, inserted));
    check(BertLocked && SyncLosses == 0, "lock kept with few errors");
    // loss of lock and relock
    @(negedge Clk) err_bits = 12;
    @(posedge LoopbackValid);
    @(posedge LoopbackValid);
    @(negedge Clk);
    check(!BertLocked && SyncLosses == 1, "lock lost on a bad word");
    repeat (3) @(posedge LoopbackValid);
    @(negedge Clk);
    check(BertLocked, "relocked");
    check(BertErrors == 32'(inserted - 12), "bad word not counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
