// CommandParse_tb: sends command payloads (header, ID, five data bytes, then
// padding) framed by Frame, with random DataValid gaps. Payloads with a good
// header must give one OutReady pulse with the right ID and data; payloads with
// a bad header must give none and add one to BadHeaderCount. Padding bytes
// after the seventh byte must be ignored.
module CommandParse_tb;
  import strs_radio_pkg::*;
  logic Clk = 0, Reset = 1, Frame = 0, DataValid = 0;
  logic [7:0] DataIn = 0;
  logic OutReady;
  logic [7:0] CmdIdOut, BadHeaderCount;
  logic [39:0] CmdData;
  int checks = 0, failures = 0;
  int readies = 0, bad = 0;
  logic [7:0] exp_id;
  logic [39:0] exp_data;

  CommandParse dut (.Clk, .Reset, .Frame, .DataIn, .DataValid, .OutReady, .CmdIdOut, .CmdData, .BadHeaderCount);
  always #5 Clk = ~Clk;

  always @(posedge Clk) if (!Reset && OutReady) begin
    readies++;
    checks++;
    if (CmdIdOut !== exp_id || CmdData !== exp_data) begin
      failures++; $display("FAIL id %h data %h exp %h %h", CmdIdOut, CmdData, exp_id, exp_data);
    end
  end

  task automatic command(input logic [7:0] hdr, input int pad);
    logic [7:0] b [];
    b = new[7 + pad];
    b[0] = hdr;
    for (int i = 1; i < 7 + pad; i++) b[i] = 8'($urandom);
    exp_id   = b[1];
    exp_data = {b[2], b[3], b[4], b[5], b[6]};
    for (int i = 0; i < 7 + pad; i++) begin
      @(negedge Clk);
      Frame = 1;
      while ($urandom_range(2) == 0) begin DataValid = 0; @(negedge Clk); end
      DataValid = 1; DataIn = b[i];
    end
    @(negedge Clk) begin DataValid = 0; Frame = 0; end
    repeat (2) @(negedge Clk);
  endtask

  initial begin
    int good;
    good = 0;
    repeat (3) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 60; k++) begin
      if ($urandom_range(3) == 0) begin
        command(8'($urandom_range(255)) == CMD_PKT_HEADER ? 8'h00 : 8'($urandom_range(255)) | 8'h01, $urandom_range(11));
        bad++;
      end else begin
        command(CMD_PKT_HEADER, $urandom_range(11));
        good++;
      end
    end
    checks += 2;
    if (readies != good) begin failures++; $display("FAIL %0d ready pulses for %0d good commands", readies, good); end
    if (BadHeaderCount != 8'(bad)) begin failures++; $display("FAIL bad count %0d exp %0d", BadHeaderCount, bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
