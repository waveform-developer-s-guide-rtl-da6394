// OutputDataMux_tb: runs the response builder and the stream builder together
// behind the arbiter. A counting word source on its own clock feeds the stream
// side with streaming on; command responses are asked for at random times,
// each one only after the previous one has gone (as the command decoder does
// when it waits for RespSending_n). Every frame on TxLL is taken apart:
// frames must never interleave or have gaps; response frames (port 0x8C35)
// must carry the responses in order; stream frames (port 0x8CA0) must carry
// the count with no word lost. Every response must be sent, and its wait for
// the bus must be no longer than one group of four stream packets.
module OutputDataMux_tb;
  import strs_radio_pkg::*;
  `include "frame_check.svh"
  logic Clk = 0, Reset = 1, FlagReset = 0, RespSendReady = 0, StreamEn = 0;
  logic RxClk = 0, RxReset = 1, RxDataValid = 0;
  logic [119:0] CmdResponse = 0;
  logic [15:0] RxParallelData = 0;
  logic RespSending_n, RespOverflow, StreamOverflow, StreamUnderflow, SMFailureResp, SMFailureStream, SMFailure;
  ll_t TxLL;
  int checks = 0, failures = 0;

  OutputDataMux #(.WaitCnt(20)) dut (.*);
  always #4 Clk = ~Clk;
  always #5 RxClk = ~RxClk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int div = 0;
  always @(posedge RxClk) begin
    div <= (div == 2) ? 0 : div + 1;
    RxDataValid <= !RxReset && div == 2;
    if (RxDataValid) RxParallelData <= RxParallelData + 16'd1;
  end

  logic [119:0] resp_q [$];
  logic [7:0] fr [$];
  bit in_frame = 0;
  int resp_frames = 0, stream_frames = 0, gaps = 0, nested = 0;
  logic [15:0] next_word;
  bit started = 0;

  always @(posedge Clk) if (!Reset) begin
    if (!TxLL.src_rdy_n) begin
      if (!TxLL.sof_n) begin
        if (in_frame) nested++;
        fr.delete(); in_frame = 1;
      end
      fr.push_back(TxLL.data);
      if (!TxLL.eof_n) begin in_frame = 0; take_frame(); end
    end else if (in_frame) gaps++;
  end

  function automatic void take_frame();
    logic [119:0] r;
    bit ok;
    checks++;
    if (fr.size() == 60 && {fr[34], fr[35]} == 16'h8C35) begin
      resp_frames++;
      ok = hdr_errors(fr, 18, 16'h8C35) == 0 && resp_q.size() != 0;
      if (ok) begin
        r = resp_q.pop_front();
        for (int i = 0; i < 15; i++) if (fr[42 + i] != r[119 - 8*i -: 8]) ok = 0;
      end
      if (!ok) begin failures++; $display("FAIL response frame %0d", resp_frames); end
    end else if (fr.size() == 557 && {fr[34], fr[35]} == 16'h8CA0) begin
      stream_frames++;
      ok = hdr_errors(fr, 515, 16'h8CA0) == 0 && fr[42] == 8'h55 && fr[43] == 8'h0A;
      if (!started) begin next_word = {fr[45], fr[46]}; started = 1; end
      for (int i = 0; i < 256; i++) begin
        if ({fr[45 + 2*i], fr[46 + 2*i]} != next_word) ok = 0;
        next_word++;
      end
      if (!ok) begin failures++; $display("FAIL stream frame %0d", stream_frames); end
    end else begin
      failures++; $display("FAIL unknown frame of %0d bytes", fr.size());
    end
  endfunction

  initial begin
    int max_wait;
    max_wait = 0;
    repeat (4) @(posedge RxClk);
    Reset <= 0; RxReset <= 0;
    @(negedge Clk) StreamEn = 1;
    for (int k = 0; k < 25; k++) begin
      int w;
      repeat ($urandom_range(3000, 200)) @(negedge Clk);
      while (!RespSending_n) @(negedge Clk);
      CmdResponse = {$urandom, $urandom, $urandom, 24'($urandom)};
      resp_q.push_back(CmdResponse);
      RespSendReady = 1;
      @(negedge Clk) RespSendReady = 0;
      w = 0;
      while (resp_q.size() != 0) begin @(negedge Clk); w++; end
      if (w > max_wait) max_wait = w;
    end
    repeat (100) @(negedge Clk);
    check(resp_frames == 25, $sformatf("%0d responses sent", resp_frames));
    check(stream_frames > 20, $sformatf("%0d stream frames", stream_frames));
    check(nested == 0 && gaps == 0, "frames whole and unmixed");
    check(max_wait < 4 * (557 + 20) + 200, $sformatf("longest response wait %0d clocks", max_wait));
    check(!RespOverflow && !StreamOverflow && !StreamUnderflow && !SMFailure && !SMFailureResp && !SMFailureStream,
          "no flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
