// TxStreamData_tb: a 64-word copy of the stream buffer. Streaming payload
// bytes are written on a 125 MHz-like clock in frames with random gaps, and
// words are read on an unrelated transmit clock with a word enable every few
// clocks. Checks: words come out in order and byte-paired big-endian; zeros
// and Underflow once the buffer runs dry after streaming started; Overflow when
// writing into a full buffer; both flags clear on their flag resets.
module TxStreamData_tb;
  logic Clk125 = 0, Reset125 = 1, FlagReset = 0, Frame = 0, DataValid = 0;
  logic [7:0] DataIn = 0;
  logic Overflow, Underflow;
  logic TxClk = 0, TxReset = 1, FlagResetTx = 0, WordEn = 0;
  logic [15:0] StreamingData;
  int checks = 0, failures = 0;

  TxStreamData #(.DEPTH(64)) dut (.*);
  always #4 Clk125 = ~Clk125;
  always #7 TxClk = ~TxClk;

  logic [15:0] q [$];
  logic [15:0] e;
  bit reading = 0;
  int rdcnt = 0, zeros = 0;
  int wdiv = 0;

  // word enable every 6 transmit clocks while reading
  always @(posedge TxClk) begin
    wdiv <= (wdiv == 5) ? 0 : wdiv + 1;
    WordEn <= reading && wdiv == 5;
  end
  // the word taken at WordEn is visible on the next clock
  logic we_d;
  always @(posedge TxClk) begin
    we_d <= WordEn;
    if (we_d && !TxReset) begin
      if (q.size() != 0) begin
        e = q.pop_front();
        checks++;
        rdcnt++;
        if (StreamingData !== e) begin failures++; $display("FAIL word %h exp %h", StreamingData, e); end
      end else begin
        checks++;
        zeros++;
        if (StreamingData !== 0) begin failures++; $display("FAIL empty word %h", StreamingData); end
      end
    end
  end

  task automatic frame(input int words, input bit push);
    logic [7:0] hi, lo;
    @(negedge Clk125) Frame = 1;
    for (int i = 0; i < words; i++) begin
      hi = 8'($urandom); lo = 8'($urandom);
      while ($urandom_range(3) == 0) begin DataValid = 0; @(negedge Clk125); end
      DataValid = 1; DataIn = hi; @(negedge Clk125);
      DataValid = 1; DataIn = lo;
      if (push) q.push_back({hi, lo});
      @(negedge Clk125);
    end
    DataValid = 0; Frame = 0;
    @(negedge Clk125);
  endtask

  initial begin
    repeat (4) @(posedge TxClk);
    Reset125 <= 0; TxReset <= 0;
    repeat (4) @(posedge TxClk);
    // prefill, then read while writing in bursts that keep the buffer part full
    frame(40, 1);
    reading = 1;
    for (int k = 0; k < 20; k++) begin
      while (q.size() > 50) @(negedge Clk125);
      frame(10, 1);
      repeat ($urandom_range(20)) @(negedge Clk125);
    end
    // run dry
    while (q.size() != 0) @(negedge Clk125);
    repeat (100) @(negedge Clk125);
    checks += 3;
    if (!Underflow) begin failures++; $display("FAIL no underflow"); end
    if (Overflow) begin failures++; $display("FAIL early overflow"); end
    if (zeros == 0) failures++;
    @(negedge TxClk) FlagResetTx = 1;
    @(negedge TxClk) FlagResetTx = 0;
    checks++;
    if (Underflow) begin failures++; $display("FAIL underflow not cleared"); end
    // overflow: stop reading, write more than the depth
    reading = 0;
    repeat (10) @(negedge TxClk);
    frame(80, 0);
    repeat (10) @(negedge Clk125);
    checks++;
    if (!Overflow) begin failures++; $display("FAIL no overflow"); end
    @(negedge Clk125) FlagReset = 1;
    @(negedge Clk125) FlagReset = 0;
    checks += 2;
    if (Overflow) begin failures++; $display("FAIL overflow not cleared"); end
    if (rdcnt != 240) begin failures++; $display("FAIL read %0d words", rdcnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge Clk125);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
