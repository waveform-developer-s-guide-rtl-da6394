// ClockDomainCrossing_tb: source clock 10 ns, destination clock 7 ns. The
// source word changes every few source clocks; every word delivered with
// DstValid must be one the source actually held (kept in a history here),
// deliveries must be in order, and after the source stops changing the
// destination must show the final word.
module ClockDomainCrossing_tb;
  logic SrcClk = 0, DstClk = 0, SrcReset = 1, DstReset = 1;
  logic [31:0] SrcData = 0, DstData;
  logic DstValid;
  int checks = 0, failures = 0, deliveries = 0;
  logic [31:0] hist [$];
  int last_pos = 0;

  ClockDomainCrossing #(.WIDTH(32)) dut (.SrcClk, .SrcReset, .SrcData, .DstClk, .DstReset, .DstData, .DstValid);
  always #5 SrcClk = ~SrcClk;
  always #3.5 DstClk = ~DstClk;

  always @(posedge DstClk) if (DstValid && !DstReset) begin
    int pos = -1;
    for (int i = last_pos; i < hist.size(); i++) if (hist[i] == DstData) begin pos = i; break; end
    checks++;
    deliveries++;
    if (pos < 0) begin failures++; $display("FAIL word %h never held (or out of order) t=%0t last=%0d n=%0d", DstData, $time, last_pos, hist.size()); end
    else last_pos = pos;
  end

  initial begin
    hist.push_back(32'h0);
    repeat (3) @(posedge SrcClk);
    SrcReset <= 0; DstReset <= 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge SrcClk) SrcData = $urandom;
      hist.push_back(SrcData);
      repeat ($urandom_range(0, 4)) @(negedge SrcClk);
    end
    repeat (30) @(posedge DstClk);
    checks += 2;
    if (DstData !== SrcData) begin failures++; $display("FAIL final word"); end
    if (deliveries < 50) begin failures++; $display("FAIL only %0d deliveries", deliveries); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge SrcClk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
