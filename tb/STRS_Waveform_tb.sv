// STRS_Waveform_tb: drives the waveform as the wrapper would: command payload
// bytes on RxCmdDataIn/RxCmdDataSrcRdy, streaming payload bytes on
// StreamDataIn/StreamDataValid, and RespSending_n played back as the response
// builder (low for a frame's time after each TxSendReady). Clock enables come
// from ClockEnables instances on the DAC and ADC clocks. Each mechanism is
// counted in its own check:
//   dip switch read, LED write, status read with the wrapper's bits passed
//   through, stream enable, tone on the DAC, Tx stream words on the DAC in
//   order, ADC data as RxParallelData, BERT locked with zero errors on the
//   PRBS loopback, BERT errors with error insertion, flag clear zeroing the
//   BERT counters, unknown command rejected, soft reset returning the
//   registers to zero.
module STRS_Waveform_tb;
  import strs_radio_pkg::*;
  logic Clk125 = 0, TxWFClock = 0, RxWFClock = 0, Reset = 1;
  logic [7:0] DIP_SW = 8'h5C, RxCmdDataIn = 0, StreamDataIn = 0;
  logic RxCmdDataSrcRdy = 0, StreamDataValid = 0, RespSending_n = 1;
  logic [35:0] StatusBitsIn = 0;
  logic [13:0] AdcDataInI = 0;
  logic [15:0] DacDataOutI, DacDataOutQ, RxParallelData;
  logic WFResetOut, RxResetOut, FlagResetOut, SoftResetOut, TxSendReady, StreamEnRx, RxDataValid;
  logic [119:0] CmdResponse;
  logic [7:0] LED;
  logic [3:1] tx_en, rx_en;
  int checks = 0, failures = 0;

  always #4 Clk125 = ~Clk125;
  always #2.5 TxWFClock = ~TxWFClock;
  always #2.6 RxWFClock = ~RxWFClock;

  logic [1:0] txr, rxr;
  always @(posedge TxWFClock) txr <= {txr[0], Reset};
  always @(posedge RxWFClock) rxr <= {rxr[0], Reset};
  ClockEnables u_tce (.Clk(TxWFClock), .Reset(txr[1]), .ClockEn(tx_en));
  ClockEnables u_rce (.Clk(RxWFClock), .Reset(rxr[1]), .ClockEn(rx_en));

  STRS_Waveform dut (.Clk125, .TxWFClock, .TxWFClockEn2(tx_en[2]), .SymbClockEn(tx_en[3]),
                     .RxWFClock, .RxWFClockEn2(rx_en[2]), .Reset, .DIP_SW, .RxCmdDataIn,
                     .RxCmdDataSrcRdy, .StreamDataIn, .StreamDataValid, .StatusBitsIn,
                     .RespSending_n, .AdcDataInI, .DacDataOutI, .DacDataOutQ, .WFResetOut,
                     .RxResetOut, .FlagResetOut, .SoftResetOut, .CmdResponse, .TxSendReady,
                     .StreamEnRx, .RxParallelData, .RxDataValid, .LED);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // response builder stand-in
  logic [119:0] last_resp;
  int responses = 0;
  always @(posedge Clk125) if (TxSendReady) begin
    last_resp <= CmdResponse;
    responses++;
    fork begin
      RespSending_n <= 0;
      repeat (60) @(posedge Clk125);
      RespSending_n <= 1;
    end join_none
  end

  // send one command payload (7 bytes, then 11 bytes of padding) and wait for the answer
  task automatic command(input logic [7:0] id, input logic [39:0] data, input bit answer = 1);
    logic [7:0] b [18];
    int r0;
    b[0] = 8'hAA; b[1] = id;
    for (int i = 0; i < 5; i++) b[2 + i] = data[39 - 8*i -: 8];
    for (int i = 7; i < 18; i++) b[i] = 8'($urandom);
    r0 = responses;
    for (int i = 0; i < 18; i++) begin
      @(negedge Clk125) begin RxCmdDataSrcRdy = 1; RxCmdDataIn = b[i]; end
    end
    @(negedge Clk125) RxCmdDataSrcRdy = 0;
    if (answer) begin
      repeat (200) if (responses == r0) @(negedge Clk125);
      @(negedge Clk125);
      check(responses == r0 + 1, $sformatf("response to command %h", id));
      while (!RespSending_n) @(negedge Clk125);
    end else repeat (100) @(negedge Clk125);
  endtask

  function automatic bit resp_ok(input logic [7:0] id);
    return last_resp[119:112] == 8'hAA && last_resp[111:104] == id && last_resp[103:96] == 8'h01;
  endfunction

  // DAC samples at each Tx word enable
  logic [15:0] dac_words [$];
  bit grab = 0;
  always @(posedge TxWFClock) if (grab && tx_en[2]) dac_words.push_back(DacDataOutI);

  task automatic wait_words(input int n);
    repeat (n) @(posedge tx_en[2]);
  endtask

  initial begin
    logic [15:0] sent [$];
    repeat (10) @(posedge Clk125);
    Reset <= 0;
    repeat (40) @(posedge Clk125);

    // dip switches
    command(8'h04, 40'h0);
    check(resp_ok(8'h04) && last_resp[95:88] == 8'h5C, "dip switch read");
    // LEDs
    command(8'h03, 40'hA5_0000_0000);
    check(resp_ok(8'h03) && LED == 8'hA5, "LED write");
    // status with wrapper bits
    StatusBitsIn = 36'h9_8765_4320;
    repeat (4) @(posedge Clk125);
    command(8'h05, 40'h0);
    check(resp_ok(8'h05) && last_resp[91:60] == 32'h9876_5432, "status read");
    // stream enable
    command(8'h02, 40'h01_0000_0000);
    check(resp_ok(8'h02) && StreamEnRx, "stream enable");
    command(8'h02, 40'h00_0000_0000);
    // unknown command
    command(8'h3C, 40'h0);
    check(last_resp[111:96] == 16'h3C00, "unknown command rejected");

    // tone: frequency word 0x20, source 0
    command(8'h01, 40'h2000_000000);
    wait_words(4);
    begin
      int mx, mn;
      mx = -40000; mn = 40000;
      repeat (2000) begin
        @(posedge TxWFClock);
        if ($signed(DacDataOutI) > mx) mx = $signed(DacDataOutI);
        if ($signed(DacDataOutI) < mn) mn = $signed(DacDataOutI);
      end
      check(mx > 30000 && mn < -30000 && mx <= 32767, $sformatf("tone on the DAC %0d..%0d", mn, mx));
    end

    // Tx stream to DAC: 256 words of a counting pattern
    command(8'h01, 40'h0001_000000);
    grab = 1;
    for (int i = 0; i < 256; i++) sent.push_back(16'h3000 + 16'(i));
    for (int i = 0; i < 256; i++) begin
      @(negedge Clk125) begin StreamDataValid = 1; StreamDataIn = sent[i][15:8]; end
      @(negedge Clk125) StreamDataIn = sent[i][7:0];
    end
    @(negedge Clk125) StreamDataValid = 0;
    wait_words(270);
    grab = 0;
    begin
      int p, ok;
      p = -1; ok = 1;
      foreach (dac_words[i]) if (p < 0 && dac_words[i] == 16'h3000) p = i;
      if (p < 0 || p + 256 > dac_words.size()) ok = 0;
      else for (int i = 0; i < 256; i++) if (dac_words[p + i] != sent[i]) ok = 0;
      check(ok, "Tx stream words on the DAC");
    end

    // ADC path
    command(8'h01, 40'h0000_000000);
    AdcDataInI = 14'h1234;
    repeat (3) @(posedge RxDataValid);
    #1 check(RxParallelData == 16'h0246, "ADC data to RxParallelData");

    // PRBS BPSK with loopback receive: BERT locks with no errors
    command(8'h01, 40'h0012_000000);
    wait_words(10);
    command(8'h08, 40'h0, 1);
    wait_words(100);
    command(8'h06, 40'h0);
    check(resp_ok(8'h06) && last_resp[95:32] > 64'd1000 && last_resp[31:0] == 0,
          $sformatf("BERT clean: bits %0d errors %0d", last_resp[95:32], last_resp[31:0]));
    command(8'h05, 40'h0);
    check(last_resp[58], "BERT locked in status");
    // error insertion
    command(8'h01, 40'h0016_000000);
    wait_words(200);
    command(8'h06, 40'h0);
    check(last_resp[31:0] >= 2 && last_resp[31:0] <= 6, $sformatf("BERT errors with insertion: %0d", last_resp[31:0]));
    // flag clear empties the counters
    command(8'h01, 40'h0012_000000);
    command(8'h08, 40'h0);
    repeat (20) @(posedge Clk125);
    command(8'h06, 40'h0);
    check(last_resp[95:32] < 64'd200 && last_resp[31:0] == 0, "flag clear zeroes BERT counters");

    // soft reset
    begin
      int r0;
      r0 = responses;
      command(8'h07, 40'h0, 0);
      repeat (20) @(posedge TxWFClock);
      // command register back to zero: tone source at zero frequency, Q at full scale
      check(responses == r0 && LED == 8'h00 && $signed(DacDataOutQ) > 30000 && DacDataOutI == 0,
            "soft reset clears registers, no response");
    end
    command(8'h04, 40'h0);
    check(resp_ok(8'h04), "commands work after soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge Clk125);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
