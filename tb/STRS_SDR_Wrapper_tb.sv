// STRS_SDR_Wrapper_tb: end-to-end test of the radio wrapper with the test
// waveform, at full size (no parameter overrides). The host side is played
// through the LocalLink ports: command and streaming UDP frames go in on RxLL,
// response and streaming frames come out on TxLL and are taken apart. Each
// mechanism has its own counted checks:
//   reset until the clock is locked, command response frame (header and payload), LED write,
//   dip switch read, frame for another port ignored, EthernetRx stuck flag in
//   the status word and its clearing, Tx streaming frames to DAC words in
//   order, tone on the DAC, PRBS BPSK on the DAC with and without pulse
//   shaping, receive streaming frames with ADC data, receive
//   streaming frames with the PRBS source, responses sent between streaming
//   frames, BERT over the loopback with no errors and then with error
//   insertion, soft reset, push-button reset.
module STRS_SDR_Wrapper_tb;
  import strs_radio_pkg::*;
  `include "frame_check.svh"
  logic GtxClk = 0, TxWFClock = 0, RxWFClock = 0, Locked = 0, ResetButton = 0;
  ll_t RxLL = LL_IDLE, TxLL;
  logic [7:0] DIP_SW = 8'h3B, LED;
  logic [15:0] DacDataOutI, DacDataOutQ;
  logic [13:0] AdcDataInI = 0;
  int checks = 0, failures = 0;

  STRS_SDR_Wrapper dut (.*);
  always #4 GtxClk = ~GtxClk;
  always #2.55 TxWFClock = ~TxWFClock;
  always #2.5 RxWFClock = ~RxWFClock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- frames to the FPGA -------------------------------------------------
  task automatic send_frame(input logic [15:0] port, input logic [7:0] pl [$], input bit noend = 0);
    logic [7:0] f [$];
    logic [47:0] dmac = 48'h000A_3501_0203, smac = 48'h0011_2233_4455;
    logic [31:0] sum;
    for (int i = 0; i < 6; i++) f.push_back(dmac[47 - 8*i -: 8]);
    for (int i = 0; i < 6; i++) f.push_back(smac[47 - 8*i -: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((pl.size() + 28) >> 8)); f.push_back(8'(pl.size() + 28));
    f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'h40); f.push_back(8'h11); f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'hC0); f.push_back(8'hA8); f.push_back(8'h00); f.push_back(8'h01);
    f.push_back(8'hC0); f.push_back(8'hA8); f.push_back(8'h00); f.push_back(8'h02);
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += 32'({f[i], f[i+1]});
    sum = 32'(sum[15:0]) + 32'(sum[31:16]); sum = 32'(sum[15:0]) + 32'(sum[31:16]);
    f[24] = ~sum[15:8]; f[25] = ~sum[7:0];
    f.push_back(port[15:8]); f.push_back(port[7:0]);
    f.push_back(port[15:8]); f.push_back(port[7:0]);
    f.push_back(8'((pl.size() + 8) >> 8)); f.push_back(8'(pl.size() + 8));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (pl[i]) f.push_back(pl[i]);
    foreach (f[i]) begin
      @(negedge GtxClk);
      RxLL.data = f[i]; RxLL.src_rdy_n = 0; RxLL.sof_n = (i != 0);
      RxLL.eof_n = noend || (i != f.size() - 1);
    end
    @(negedge GtxClk) RxLL = LL_IDLE;
    repeat (12) @(negedge GtxClk);
  endtask

  task automatic send_command(input logic [7:0] id, input logic [39:0] data);
    logic [7:0] pl [$];
    pl = {8'hAA, id, data[39:32], data[31:24], data[23:16], data[15:8], data[7:0]};
    for (int i = 7; i < 18; i++) pl.push_back(8'h00);
    send_frame(16'h8C35, pl);
  endtask

  // ---- frames from the FPGA -----------------------------------------------
  logic [7:0] fr [$];
  bit in_frame = 0;
  int resp_frames = 0, stream_frames = 0, bad_frames = 0, gaps = 0;
  logic [119:0] resp_q [$];
  logic [15:0] stream_words [$];
  // the output is watched once the clock is locked (registers settle in reset)
  always @(posedge GtxClk) if (Locked) begin
    if (!TxLL.src_rdy_n) begin
      if (!TxLL.sof_n) begin fr.delete(); in_frame = 1; end
      fr.push_back(TxLL.data);
      if (!TxLL.eof_n) begin in_frame = 0; take_frame(); end
    end else if (in_frame) gaps++;
  end

  function automatic void take_frame();
    logic [119:0] r;
    if (fr.size() == 60 && hdr_errors(fr, 18, 16'h8C35) == 0) begin
      for (int i = 0; i < 15; i++) r[119 - 8*i -: 8] = fr[42 + i];
      resp_q.push_back(r);
      resp_frames++;
    end else if (fr.size() == 557 && hdr_errors(fr, 515, 16'h8CA0) == 0 && fr[42] == 8'h55 && fr[43] == 8'h0A) begin
      for (int i = 0; i < 256; i++) stream_words.push_back({fr[45 + 2*i], fr[46 + 2*i]});
      stream_frames++;
    end else begin
      bad_frames++;
      $display("FAIL frame of %0d bytes not understood at %0t", fr.size(), $time);
    end
  endfunction

  // command and response; returns the response (or X if none came)
  logic [119:0] resp;
  task automatic cmd(input logic [7:0] id, input logic [39:0] data, input bit answer = 1);
    resp_q.delete();
    send_command(id, data);
    if (answer) begin
      repeat (30000) if (resp_q.size() == 0) @(negedge GtxClk);
      check(resp_q.size() == 1, $sformatf("response frame to command %h", id));
      resp = (resp_q.size() != 0) ? resp_q.pop_front() : 'x;
      check(resp[119:112] == 8'hAA && resp[111:104] == id, $sformatf("response header and ID %h", id));
    end
  endtask

  function automatic int prbs_violations(input logic [15:0] w [$]);
    bit b [$];
    int v;
    v = 0;
    foreach (w[j]) for (int i = 15; i >= 0; i--) b.push_back(w[j][i]);
    for (int n = 23; n < b.size(); n++) if (b[n] != (b[n-23] ^ b[n-18])) v++;
    return v;
  endfunction

  // DAC samples: in stream mode the DAC holds each word for a word period,
  // so every change of value is the next word (the test words all differ)
  logic [15:0] dac_words [$];
  logic [15:0] dac_last = 0;
  bit grab = 0;
  always @(posedge TxWFClock) if (grab && DacDataOutI != dac_last) begin
    dac_words.push_back(DacDataOutI);
    dac_last <= DacDataOutI;
  end

  // one word period is 128 DAC or ADC clocks
  task automatic tx_words(input int n);
    repeat (n * 128) @(posedge TxWFClock);
  endtask
  task automatic rx_words(input int n);
    repeat (n * 128) @(posedge RxWFClock);
  endtask

  initial begin
    logic [15:0] sent [$];
    // ---- power-on reset
    repeat (20) @(posedge GtxClk);
    resp_q.delete();
    send_command(8'h04, 40'h0);
    repeat (500) @(posedge GtxClk);
    check(resp_q.size() == 0, "no answer while the clock is not locked");
    Locked = 1;
    repeat (100) @(posedge GtxClk);

    // ---- command responses
    cmd(8'h04, 40'h0);
    check(resp[103:96] == 8'h01 && resp[95:88] == 8'h3B, "dip switch read over Ethernet after lock");
    cmd(8'h03, 40'hC3_0000_0000);
    check(LED == 8'hC3, "LED write over Ethernet");
    // a frame for another UDP port is ignored
    resp_q.delete();
    begin
      logic [7:0] pl [$];
      pl = {8'hAA, 8'h03, 8'h11, 8'h00, 8'h00, 8'h00, 8'h00};
      for (int i = 7; i < 18; i++) pl.push_back(8'h00);
      send_frame(16'h1F90, pl);
    end
    repeat (500) @(negedge GtxClk);
    check(resp_q.size() == 0 && LED == 8'hC3, "frame for another port ignored");

    // ---- stuck frame sets status bit 11, clear flags removes it
    begin
      logic [7:0] pl [$];
      for (int i = 0; i < 1600; i++) pl.push_back(8'h00);
      send_frame(16'h1F90, pl, 1);
    end
    cmd(8'h05, 40'h0);
    check(resp[56 + 11], "stuck frame flag in the status word");
    cmd(8'h08, 40'h0);
    cmd(8'h05, 40'h0);
    check(!resp[56 + 11], "flag clear removes the stuck flag");

    // ---- tone on the DAC
    cmd(8'h01, 40'h1000_000000);
    repeat (3000) @(posedge TxWFClock);
    begin
      int mx, mn;
      mx = -40000; mn = 40000;
      repeat (5000) begin
        @(posedge TxWFClock);
        if ($signed(DacDataOutI) > mx) mx = $signed(DacDataOutI);
        if ($signed(DacDataOutI) < mn) mn = $signed(DacDataOutI);
      end
      check(mx > 30000 && mn < -30000, $sformatf("tone on the DAC %0d..%0d", mn, mx));
    end

    // ---- PRBS BPSK on the DAC, plain (two levels) and pulse-shaped
    for (int m = 0; m < 2; m++) begin
      int mx, mid, other;
      cmd(8'h01, m ? 40'h0042_000000 : 40'h0002_000000);
      repeat (300) @(posedge TxWFClock);
      mx = 0; mid = 0; other = 0;
      repeat (4000) begin
        @(posedge TxWFClock);
        if ($signed(DacDataOutI) > mx) mx = $signed(DacDataOutI);
        if ($signed(DacDataOutI) > -9000 && $signed(DacDataOutI) < 9000) mid++;
        if ($signed(DacDataOutI) != 16000 && $signed(DacDataOutI) != -16000) other++;
      end
      if (m == 0) check(other == 0 && mx == 16000, $sformatf("BPSK on the DAC: two levels (%0d others)", other));
      else check(mid > 200 && mx > 11000 && mx < 32000, $sformatf("shaped BPSK on the DAC: %0d transition samples, peak %0d", mid, mx));
    end

    // ---- Tx streaming frames to the DAC
    cmd(8'h01, 40'h0001_000000);
    grab = 1;
    for (int k = 0; k < 2; k++) begin
      logic [7:0] pl [$];
      pl = {8'h55, 8'h0A, 8'h00};
      for (int i = 0; i < 256; i++) begin
        logic [15:0] w;
        w = 16'(k * 256 + i) ^ 16'h5A00;
        sent.push_back(w);
        pl.push_back(w[15:8]); pl.push_back(w[7:0]);
      end
      send_frame(16'h8CA0, pl);
    end
    tx_words(520);
    grab = 0;
    begin
      int p, ok;
      p = -1; ok = 1;
      foreach (dac_words[i]) if (p < 0 && dac_words[i] == sent[0]) p = i;
      if (p < 0 || p + 512 > dac_words.size()) ok = 0;
      else for (int i = 0; i < 512; i++) if (dac_words[p + i] != sent[i]) ok = 0;
      check(ok, "Tx streaming frames reach the DAC in order");
    end

    // ---- receive streaming with ADC data
    AdcDataInI = 14'h2468;
    cmd(8'h01, 40'h0000_000000);
    stream_words.delete();
    cmd(8'h02, 40'h01_0000_0000);
    check(resp[95:88] == 8'h01, "stream enable acknowledged");
    while (stream_frames < 2) @(posedge GtxClk);
    begin
      int n;
      n = 0;
      foreach (stream_words[i]) if (stream_words[i] == 16'hFC8D) n++;
      check(n > 400, $sformatf("ADC words in streaming frames (%0d)", n));
    end
    // ---- receive streaming with the PRBS source, responses in between
    cmd(8'h01, 40'h0020_000000);
    rx_words(20);
    stream_words.delete();
    begin
      int s0, answered;
      s0 = stream_frames; answered = 0;
      while (stream_frames < s0 + 4) begin
        cmd(8'h04, 40'h0);
        if (resp[95:88] == 8'h3B) answered++;
        repeat (3000) @(posedge GtxClk);
      end
      check(answered >= 4, $sformatf("%0d responses sent while streaming", answered));
    end
    begin
      logic [15:0] w [$];
      // drop the first frame, which may hold words from before the switch
      for (int i = 256; i < stream_words.size(); i++) w.push_back(stream_words[i]);
      check(w.size() >= 512 && prbs_violations(w) == 0, "PRBS words in streaming frames, none lost");
    end
    cmd(8'h02, 40'h00_0000_0000);
    repeat (30000) @(posedge GtxClk);

    // ---- BERT over the loopback
    cmd(8'h01, 40'h0012_000000);
    tx_words(10);
    cmd(8'h08, 40'h0);
    tx_words(200);
    cmd(8'h06, 40'h0);
    check(resp[95:32] >= 64'd3000 && resp[31:0] == 0,
          $sformatf("BERT without errors: %0d bits %0d errors", resp[95:32], resp[31:0]));
    cmd(8'h05, 40'h0);
    check(resp[56 + 2], "BERT locked in the status word");
    cmd(8'h01, 40'h0016_000000);
    tx_words(10);
    cmd(8'h08, 40'h0);
    tx_words(640);
    cmd(8'h06, 40'h0);
    check(resp[31:0] >= 8 && resp[31:0] <= 11,
          $sformatf("BERT with error insertion: %0d errors in %0d bits", resp[31:0], resp[95:32]));

    // ---- soft reset
    cmd(8'h07, 40'h0, 0);
    repeat (300) @(posedge GtxClk);
    check(LED == 8'h00 && resp_q.size() == 0, "soft reset clears the LEDs, no response");
    cmd(8'h03, 40'h81_0000_0000);
    check(LED == 8'h81, "commands work after soft reset");
    // ---- push-button reset
    ResetButton = 1;
    repeat (20) @(posedge GtxClk);
    ResetButton = 0;
    repeat (100) @(posedge GtxClk);
    check(LED == 8'h00, "push-button reset clears the LEDs");
    cmd(8'h04, 40'h0);

    check(bad_frames == 0 && gaps == 0, "all output frames whole and understood");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge GtxClk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
