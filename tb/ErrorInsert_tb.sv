// ErrorInsert_tb: with PERIOD 8, checks that words pass unchanged while
// disabled, and that when enabled exactly every 8th word (per WordEn) has
// bit 0 inverted and no other bit changes.
module ErrorInsert_tb;
  logic Clk = 0, Reset = 1, Enable = 0, WordEn = 0;
  logic [15:0] DataIn = 0, DataOut;
  int checks = 0, failures = 0;

  ErrorInsert #(.PERIOD(8)) dut (.Clk, .Reset, .Enable, .WordEn, .DataIn, .DataOut);
  always #5 Clk = ~Clk;

  initial begin
    int hits;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 40; k++) begin
      @(negedge Clk) begin DataIn = 16'($urandom); WordEn = 1; end
      #1 checks++;
      if (DataOut !== DataIn) failures++;
      @(negedge Clk) WordEn = 0;
    end
    @(negedge Clk) Enable = 1;
    hits = 0;
    for (int k = 0; k < 64; k++) begin
      @(negedge Clk) begin DataIn = 16'($urandom); WordEn = 1; end
      #1 checks++;
      if (DataOut !== (DataIn ^ ((k % 8 == 7) ? 16'h0001 : 16'h0000))) begin
        failures++; $display("FAIL word %0d", k);
      end
      if (DataOut != DataIn) hits++;
      @(negedge Clk) WordEn = 0;
    end
    checks++;
    if (hits != 8) begin failures++; $display("FAIL hits %0d", hits); end
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
