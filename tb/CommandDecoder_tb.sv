// CommandDecoder_tb: issues random commands (all defined IDs plus undefined
// ones) and plays the response builder: RespSending_n is held low for a random
// time while a previous response is "sent", and goes low a few clocks after
// each TxSendReady. A reference model predicts the register outputs and the
// 120-bit response. Checks: every answered command gives exactly one
// TxSendReady, only while RespSending_n is high; the response is right;
// soft reset gives a ResetOut pulse and no response; clear flags gives a
// FlagResetOut pulse; a command arriving while a response is pending is ignored.
module CommandDecoder_tb;
  import strs_radio_pkg::*;
  logic Clk = 0, Reset = 1, CmdReady = 0, RespSending_n = 1;
  logic [7:0] CmdId = 0, DipSwitches;
  logic [39:0] CmdData = 0;
  logic [35:0] StatusBits;
  logic [63:0] BertBits;
  logic [31:0] BertErrors;
  logic [119:0] Response;
  logic TxSendReady, ResetOut, FlagResetOut, StreamEnable;
  logic [7:0] LEDs;
  logic [15:0] CmdRegOut;
  int checks = 0, failures = 0;

  CommandDecoder dut (.*);
  always #5 Clk = ~Clk;

  logic [15:0] m_cmdreg = 0;
  logic [7:0]  m_leds = 0;
  logic        m_stream = 0;
  int sends = 0, resets = 0, flagresets = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge Clk) if (!Reset) begin
    if (TxSendReady) begin
      sends++;
      if (!RespSending_n) begin failures++; $display("FAIL TxSendReady while sending"); end
    end
    if (ResetOut) resets++;
    if (FlagResetOut) flagresets++;
  end

  task automatic issue(input logic [7:0] id);
    logic [95:0] rd;
    logic acc;
    int s0, r0, f0;
    s0 = sends; r0 = resets; f0 = flagresets;
    @(negedge Clk);
    CmdId = id; CmdData = {$urandom, 8'($urandom)};
    DipSwitches = 8'($urandom); StatusBits = {4'($urandom), $urandom};
    BertBits = {$urandom, $urandom}; BertErrors = $urandom;
    CmdReady = 1;
    acc = 1; rd = '0;
    case (id)
      8'h01: begin rd[95:80] = CmdData[39:24]; m_cmdreg = CmdData[39:24]; end
      8'h02: begin rd[95:88] = {7'd0, CmdData[32]}; m_stream = CmdData[32]; end
      8'h03: begin rd[95:88] = CmdData[39:32]; m_leds = CmdData[39:32]; end
      8'h04: rd[95:88] = DipSwitches;
      8'h05: rd[95:56] = {4'd0, StatusBits};
      8'h06: rd = {BertBits, BertErrors};
      8'h07, 8'h08: ;
      default: acc = 0;
    endcase
    @(negedge Clk) CmdReady = 0;
    // play the response builder
    if (id != 8'h07) begin
      // sometimes the output is still busy with an earlier response
      if ($urandom_range(1)) begin
        RespSending_n = 0;
        repeat ($urandom_range(6, 1)) @(negedge Clk);
        // a second command while pending must be ignored
        CmdId = 8'h03; CmdData = 40'hFF_0000_0000; CmdReady = 1;
        @(negedge Clk) CmdReady = 0;
        RespSending_n = 1;
      end
      while (sends == s0) @(negedge Clk);
      check(Response == {8'hAA, id, acc ? 8'h01 : 8'h00, rd}, $sformatf("response to %h", id));
      repeat ($urandom_range(3)) @(negedge Clk);
      RespSending_n = 0;
      repeat ($urandom_range(8, 1)) @(negedge Clk);
      RespSending_n = 1;
    end
    repeat (3) @(negedge Clk);
    check(sends == s0 + (id != 8'h07), "one send per answered command");
    check(resets == r0 + (id == 8'h07), "soft reset pulse");
    check(flagresets == f0 + (id == 8'h08), "flag reset pulse");
    check(CmdRegOut == m_cmdreg && LEDs == m_leds && StreamEnable == m_stream, "registers");
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 200; k++)
      issue(($urandom_range(9) == 0) ? 8'($urandom_range(255, 9)) : 8'($urandom_range(8, 1)));
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
