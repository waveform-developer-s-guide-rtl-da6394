// PrbsRx23_tb: feeds the bit error rate tester with a reference PRBS-23 word
// stream (bit-serial recurrence, arbitrary start state). Checks: it locks
// after two words, counts 16 bits per later word and no errors on a clean
// stream; single-bit and three-bit errors are counted exactly; a burst of
// wrong words makes it lose and regain lock; ClearCounts zeroes the counters.
module PrbsRx23_tb;
  logic Clk = 0, Reset = 1, WordEn = 0, ClearCounts = 0;
  logic [15:0] DataIn = 0;
  logic [63:0] BertBits;
  logic [31:0] BertErrors;
  logic Locked;
  logic [7:0] SyncLosses;
  int checks = 0, failures = 0;
  bit hist [$];

  PrbsRx23 dut (.Clk, .Reset, .WordEn, .DataIn, .ClearCounts, .BertBits, .BertErrors, .Locked, .SyncLosses);
  always #5 Clk = ~Clk;

  function automatic logic [15:0] ref_word();
    logic [15:0] w;
    for (int i = 15; i >= 0; i--) begin
      bit b = hist[hist.size() - 23] ^ hist[hist.size() - 18];
      hist.push_back(b);
      w[i] = b;
    end
    return w;
  endfunction

  task automatic send(input logic [15:0] w);
    @(negedge Clk) begin DataIn = w; WordEn = 1; end
    @(negedge Clk) WordEn = 0;
  endtask

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (bits=%0d errs=%0d lock=%b)", m, BertBits, BertErrors, Locked); end
  endtask

  initial begin
    // arbitrary non-zero start state
    for (int i = 0; i < 23; i++) hist.push_back(bit'((32'h5A3C1F7 >> i) & 1));
    repeat (2) @(posedge Clk);
    Reset <= 0;
    send(ref_word());
    #1 check(!Locked, "not locked after one word");
    send(ref_word());
    #1 check(Locked, "locked after two words");
    for (int k = 0; k < 100; k++) send(ref_word());
    #1 check(BertBits == 1600 && BertErrors == 0, "clean stream");
    send(ref_word() ^ 16'h0100);
    send(ref_word() ^ 16'h8001);
    send(ref_word() ^ 16'h0010);
    #1 check(BertBits == 1648 && BertErrors == 4, "four inserted errors");
    for (int k = 0; k < 3; k++) send(ref_word() ^ 16'hFFFF);
    #1 check(SyncLosses != 0, "sync lost on burst");
    for (int k = 0; k < 8; k++) send(ref_word());
    #1 check(Locked, "relocked");
    @(negedge Clk) ClearCounts = 1;
    @(negedge Clk) ClearCounts = 0;
    #1 check(BertBits == 0 && BertErrors == 0, "cleared");
    for (int k = 0; k < 10; k++) send(ref_word());
    #1 check(BertBits == 160 && BertErrors == 0, "counting after clear");
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
