// RxStreamData_tb: an ADC-side source writes a counting word sequence on its
// own clock; the test grants the bus whenever the builder asks, after a random
// delay. Each 557-byte frame must carry a correct header for UDP port 0x8CA0
// with a 515-byte payload, then 0x55 0x0A 0x00 and 256 words high byte first,
// continuing the count with no word lost or repeated. Within one grant there
// are at most PacketNum frames, at least WaitCnt idle clocks apart. With
// StreamEn low nothing is written; with the bus withheld the buffer fills and
// Overflow is set, and FlagReset clears it.
module RxStreamData_tb;
  import strs_radio_pkg::*;
  `include "frame_check.svh"
  localparam int WAITC = 20;
  logic Clk = 0, Reset = 1, FlagReset = 0, StreamEn = 0, Grant = 0;
  logic RxClk = 0, RxReset = 1, DataValid = 0;
  logic [15:0] DataIn = 0;
  logic Req, Underflow, SMFailure, Overflow;
  ll_t LL;
  int checks = 0, failures = 0;

  RxStreamData #(.WaitCnt(WAITC), .FIFO_DEPTH(1024)) dut (.*);
  always #4 Clk = ~Clk;
  always #6 RxClk = ~RxClk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ADC side: a word every 3 clocks
  int div = 0;
  always @(posedge RxClk) begin
    div <= (div == 2) ? 0 : div + 1;
    DataValid <= !RxReset && div == 2;
    if (DataValid) DataIn <= DataIn + 16'd1;
  end

  // bus grant: follow Req after a random delay, drop when Req drops
  always @(posedge Clk) begin
    if (!Req) Grant <= 1'b0;
    else if (hold_off == 0 && $urandom_range(3) == 0) Grant <= 1'b1;
  end
  bit hold_off = 0;

  // frame collection
  logic [7:0] fr [$];
  bit in_frame = 0;
  int frames = 0, gaps = 0, per_grant = 0, max_per_grant = 0, idle = 0, min_idle = 1 << 30;
  logic [15:0] next_word;
  bit started = 0;
  always @(posedge Clk) if (!Reset) begin
    if (!Grant) per_grant = 0;
    if (!LL.src_rdy_n) begin
      if (!LL.sof_n) begin
        fr.delete(); in_frame = 1; per_grant++;
        if (per_grant > 1 && idle < min_idle) min_idle = idle;
        if (per_grant > max_per_grant) max_per_grant = per_grant;
      end
      fr.push_back(LL.data);
      if (!LL.eof_n) begin
        in_frame = 0; frames++; idle = 0;
        check_frame();
      end
    end else if (in_frame) gaps++;
    else idle++;
  end

  function automatic void check_frame();
    bit ok;
    checks++;
    if (fr.size() != 557 || hdr_errors(fr, 515, 16'h8CA0) != 0 || fr[42] != 8'h55 || fr[43] != 8'h0A || fr[44] != 8'h00) begin
      failures++; $display("FAIL frame size %0d or header", fr.size()); return;
    end
    if (!started) begin next_word = {fr[45], fr[46]}; started = 1; end
    ok = 1;
    for (int i = 0; i < 256; i++) begin
      if ({fr[45 + 2*i], fr[46 + 2*i]} != next_word) ok = 0;
      next_word++;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL stream words in frame %0d", frames); end
  endfunction

  initial begin
    repeat (4) @(posedge RxClk);
    Reset <= 0; RxReset <= 0;
    repeat (2000) @(posedge Clk);
    check(frames == 0 && !Req, "nothing sent while streaming is off");
    // let the buffer fill with several packets first, then grant
    hold_off = 1;
    @(negedge Clk) StreamEn = 1;
    repeat (4200) @(posedge Clk);
    hold_off = 0;
    while (frames < 12) @(posedge Clk);
    check(max_per_grant <= 4 && max_per_grant >= 2, $sformatf("packets per grant %0d", max_per_grant));
    check(min_idle >= WAITC, $sformatf("idle between packets %0d", min_idle));
    check(!Overflow && !Underflow && gaps == 0 && !SMFailure, "flags clear, no gaps");
    // withhold the bus: the buffer fills and overflows
    hold_off = 1;
    repeat (12000) @(posedge Clk);
    check(Overflow, "overflow when the bus is withheld");
    @(negedge Clk) StreamEn = 0;
    repeat (10) @(posedge Clk);
    @(negedge Clk) FlagReset = 1;
    @(negedge Clk) FlagReset = 0;
    repeat (20) @(posedge Clk);
    check(!Overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
