// TransmitSignal_tb: runs the transmit path in each source mode with a symbol
// enable every 8 clocks and a word enable every 16 symbols.
//  - tone: DacI/DacQ follow SinI/SinQ one clock later;
//  - stream: DacI follows the streaming word one clock later, DacQ is zero;
//  - PRBS BPSK: the loopback words form an unbroken PRBS-23 bit stream
//    (x[n] = x[n-23] ^ x[n-18]); the BPSK symbols on DacI (+A for 0, -A for 1,
//    Q zero) carry the same bits, in order, once aligned; with NRZ-M on, the
//    symbols carry the differential code of the same bits;
//  - error insertion: the PRBS stream shows errors, about one per 64 words;
//  - stream BPSK: the loopback words are the streaming words, in order.
module TransmitSignal_tb;
  import strs_radio_pkg::*;
  logic Clk = 0, Reset = 1, WordEn = 0, SymbEn = 0;
  logic [15:0] CmdReg = 0, StreamingData = 0;
  logic signed [15:0] SinI = 0, SinQ = 0, DacI, DacQ;
  logic [15:0] Loopback;
  logic LoopbackValid;
  int checks = 0, failures = 0;

  TransmitSignal dut (.*);
  always #5 Clk = ~Clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // enables
  int cnt = 0;
  always @(posedge Clk) begin
    cnt    <= (cnt == 127) ? 0 : cnt + 1;
    SymbEn <= !Reset && (cnt % 8 == 7);
    WordEn <= !Reset && (cnt == 127);
  end

  // streaming word source: a new random word after every word enable
  logic [15:0] stream_q [$];
  always @(posedge Clk) if (WordEn) begin
    StreamingData <= 16'($urandom);
  end
  always @(posedge Clk) begin
    SinI <= 16'($urandom);
    SinQ <= 16'($urandom);
  end

  // capture: symbols at the end of each symbol period, loopback words
  bit lb_bits [$];
  bit dac_bits [$];
  logic [15:0] lb_words [$];
  logic [15:0] sd_words [$];
  bit capture = 0, shaped = 0;
  int sh_max = 0, sh_q = 0, sh_mid = 0, sh_n = 0;
  always @(posedge Clk) if (capture && shaped) begin
    sh_n++;
    if (DacQ != 0) sh_q++;
    if (DacI > sh_max) sh_max = DacI;
    if (-DacI > sh_max) sh_max = -DacI;
    if (DacI != 16000 && DacI != -16000 && DacI > -9000 && DacI < 9000) sh_mid++;
  end
  always @(posedge Clk) if (capture && !shaped) begin
    if (SymbEn) begin
      dac_bits.push_back(DacI < 0);
      if (DacQ != 0 || (DacI != 16000 && DacI != -16000)) begin failures++; $display("FAIL symbol %0d %0d", DacI, DacQ); end
    end
    if (LoopbackValid) begin
      lb_words.push_back(Loopback);
      for (int i = 15; i >= 0; i--) lb_bits.push_back(Loopback[i]);
    end
    if (WordEn) sd_words.push_back(StreamingData);
  end

  function automatic int prbs_violations();
    int v = 0;
    for (int n = 23; n < lb_bits.size(); n++) if (lb_bits[n] != (lb_bits[n-23] ^ lb_bits[n-18])) v++;
    return v;
  endfunction

  // best alignment of the DAC bits to the loopback bits; returns mismatches
  function automatic int align_mismatch(input bit diff);
    int best = 1 << 30;
    bit d [$];
    d = dac_bits;
    if (diff) for (int i = d.size() - 1; i > 0; i--) d[i] = dac_bits[i] ^ dac_bits[i-1];
    for (int s = -64; s < 64; s++) begin
      int m = 0, n = 0;
      for (int i = 1; i < d.size(); i++) if (i + s >= 0 && i + s < lb_bits.size()) begin
        n++;
        if (d[i] != lb_bits[i + s]) m++;
      end
      if (n > 200 && m < best) best = m;
    end
    return best;
  endfunction

  task automatic run_mode(input logic [15:0] cr, input int words);
    @(negedge Clk) CmdReg = cr;
    repeat (3 * 128) @(negedge Clk);
    lb_bits.delete(); dac_bits.delete(); lb_words.delete(); sd_words.delete();
    capture = 1;
    repeat (words * 128) @(negedge Clk);
    capture = 0;
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;

    // tone
    @(negedge Clk) CmdReg = 16'h0000;
    repeat (20) begin
      logic signed [15:0] si, sq;
      @(negedge Clk); si = SinI; sq = SinQ;
      @(posedge Clk); #1 check(DacI == si && DacQ == sq, "tone passes to DAC");
    end
    // stream
    @(negedge Clk) CmdReg = 16'h0001;
    repeat (300) begin
      logic [15:0] sd;
      @(negedge Clk); sd = StreamingData;
      @(posedge Clk); #1 check(DacI == signed'(sd) && DacQ == 0, "stream passes to DAC");
    end

    // PRBS BPSK
    run_mode(16'h0002, 60);
    check(prbs_violations() == 0, "PRBS loopback stream");
    check(lb_bits.size() >= 900, "loopback words");
    check(align_mismatch(0) == 0, "BPSK symbols carry the PRBS bits");

    // PRBS BPSK with NRZ-M
    run_mode(16'h000A, 60);
    check(prbs_violations() == 0, "PRBS loopback stream with NRZ-M");
    check(align_mismatch(1) == 0, "NRZ-M symbols carry the PRBS bits");

    // error insertion: expected about 3 violations per inserted error
    run_mode(16'h0006, 200);
    begin
      int v;
      v = prbs_violations();
      check(v >= 3 * 2 && v <= 3 * 4, $sformatf("error insertion gives %0d violations", v));
      check(align_mismatch(0) == 0, "BPSK symbols carry the errored bits");
    end

    // stream BPSK: loopback words are the stream words
    run_mode(16'h0003, 40);
    begin
      int best;
      best = 99;
      for (int s = 0; s < 4; s++) begin
        int m;
        m = 0;
        for (int i = 0; i + s < lb_words.size() && i < sd_words.size(); i++) if (lb_words[i + s] != sd_words[i]) m++;
        if (m < best) best = m;
      end
      check(best == 0, "stream BPSK loopback equals stream words");
      check(align_mismatch(0) == 0, "stream BPSK symbols carry the stream bits");
    end
    // PRBS BPSK through the pulse-shaping filter: smooth transitions between
    // the symbol levels, within the 16-bit range, Q still zero
    shaped = 1;
    run_mode(16'h0042, 20);
    check(sh_q == 0, "shaped BPSK Q is zero");
    check(sh_max > 11000 && sh_max < 32000, $sformatf("shaped BPSK peak %0d", sh_max));
    check(sh_mid > sh_n / 20, $sformatf("shaped BPSK has transition samples (%0d of %0d)", sh_mid, sh_n));
    check(prbs_violations() == 0, "PRBS loopback unaffected by shaping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
