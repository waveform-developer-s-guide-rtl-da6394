// TxResponsePackets_tb: asks for random responses and grants the bus after a
// random delay. Each frame collected from the LocalLink output must be 60
// bytes with sof/eof on the first/last byte and no gaps, carry a correct
// header for UDP port 0x8C35 with an 18-byte payload, then the 15 response
// bytes (most significant first) and zero padding. Req must stay high from the
// request until the last byte is taken (one clock before it is on the bus), RespSending_n must be low from the request to
// the end, and a second request while busy must set Overflow (cleared by
// FlagReset).
module TxResponsePackets_tb;
  import strs_radio_pkg::*;
  `include "frame_check.svh"
  logic Clk = 0, Reset = 1, FlagReset = 0, RespSendReady = 0, Grant = 0;
  logic [119:0] CmdResponse = 0;
  logic RespSending_n, Req, Overflow, SMFailure;
  ll_t LL;
  int checks = 0, failures = 0;

  TxResponsePackets dut (.*);
  always #5 Clk = ~Clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] fr [$];
  bit in_frame = 0;
  int frames = 0, gaps = 0;
  always @(posedge Clk) if (!Reset) begin
    if (!LL.src_rdy_n) begin
      if (!LL.sof_n) begin fr.delete(); in_frame = 1; end
      fr.push_back(LL.data);
      if (!LL.eof_n) begin in_frame = 0; frames++; end
    end else if (in_frame) gaps++;
  end

  task automatic one(input bit overlap);
    logic [119:0] r;
    int f0;
    r = {$urandom, $urandom, $urandom, 24'($urandom)};
    f0 = frames;
    @(negedge Clk) begin CmdResponse = r; RespSendReady = 1; end
    @(negedge Clk) begin RespSendReady = 0; CmdResponse = ~r; end
    check(!RespSending_n && Req, "busy and requesting after RespSendReady");
    repeat ($urandom_range(10)) begin
      @(negedge Clk);
      check(Req && !RespSending_n, "request held until granted");
    end
    if (overlap) begin RespSendReady = 1; @(negedge Clk) RespSendReady = 0; end
    Grant = 1;
    begin
      int low;
      low = 0;
      while (frames == f0) begin
        @(negedge Clk);
        if (frames == f0 && !Req) low++;
      end
      // Req falls as the last byte is taken, one clock before it is on the bus
      check(low >= 1 && low <= 2, $sformatf("Req low %0d clocks before the frame ended", low));
    end
    Grant = 0;
    @(negedge Clk);
    check(RespSending_n && !Req, "idle after the frame");
    check(fr.size() == 60, $sformatf("frame length %0d", fr.size()));
    check(hdr_errors(fr, 18, 16'h8C35) == 0, "response header");
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 15; i++) if (fr[42 + i] != r[119 - 8*i -: 8]) ok = 0;
      for (int i = 57; i < 60; i++) if (fr[i] != 0) ok = 0;
      check(ok, "response bytes and padding");
    end
    check(Overflow == overlap, "overflow flag");
    @(negedge Clk) FlagReset = 1;
    @(negedge Clk) FlagReset = 0;
    repeat ($urandom_range(5)) @(negedge Clk);
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 30; k++) one(k % 7 == 3);
    check(gaps == 0 && !SMFailure, "no gaps inside frames");
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
