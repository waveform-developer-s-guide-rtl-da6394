// PrbsTx23_tb: compares the generator's words with a bit-serial reference
// that applies the recurrence b[k] = b[k-23] ^ b[k-18] to the bit history,
// starting from 23 ones. Also checks that DataOut holds without WordEn.
module PrbsTx23_tb;
  logic Clk = 0, Reset = 1, WordEn = 0;
  logic [15:0] DataOut;
  int checks = 0, failures = 0;
  bit hist [$];

  PrbsTx23 dut (.Clk, .Reset, .WordEn, .DataOut);
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

  initial begin
    logic [15:0] exp_w, held;
    for (int i = 0; i < 23; i++) hist.push_back(1'b1);
    repeat (2) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge Clk) WordEn = 1;
      @(negedge Clk) WordEn = 0;
      exp_w = ref_word();
      checks++;
      if (DataOut !== exp_w) begin failures++; $display("FAIL word %0d %h exp %h", k, DataOut, exp_w); end
      held = DataOut;
      if (k % 7 == 0) begin
        repeat (3) @(negedge Clk);
        checks++;
        if (DataOut !== held) begin failures++; $display("FAIL hold"); end
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
