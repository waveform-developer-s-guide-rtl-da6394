// EthernetRx_tb: sends command frames (UDP source port 0x8C35), streaming
// frames (0x8CA0) and frames for another port, back to back and with gaps, on
// a LocalLink bus. The output side is monitored: every enabled byte must equal
// the frame byte expected at that position, the enable must cover exactly bytes
// 16..end of matching frames (so 26 header bytes remain), and no byte of a
// foreign frame may be enabled. A frame without an end sets StuckFlag.
module EthernetRx_tb;
  import strs_radio_pkg::*;
  logic Clk = 0, Reset = 1, FlagReset = 0;
  ll_t RxLL = LL_IDLE;
  logic [7:0] EthDataOut;
  logic EthRdyOut, CommandEn, StrDataEn, StuckFlag, SMFailure;
  int checks = 0, failures = 0;

  EthernetRx #(.MAX_FRAME(200)) dut (.Clk, .Reset, .FlagReset, .RxLL, .EthDataOut, .EthRdyOut,
                                     .CommandEn, .StrDataEn, .StuckFlag, .SMFailure);
  always #5 Clk = ~Clk;

  // expected enabled output, as a queue of {kind, byte}
  typedef struct { int kind; logic [7:0] b; } ex_t;
  ex_t expq [$];

  task automatic send_frame(input logic [15:0] port, input int len, input int gap, input bit noend = 0);
    logic [7:0] f [];
    int kind;
    f = new[len];
    for (int i = 0; i < len; i++) f[i] = 8'($urandom);
    f[34] = port[15:8];
    f[35] = port[7:0];
    kind = (port == 16'h8C35) ? 1 : (port == 16'h8CA0) ? 2 : 0;
    if (kind != 0 && !noend)
      for (int i = 16; i < len; i++) expq.push_back('{kind, f[i]});
    for (int i = 0; i < len; i++) begin
      @(negedge Clk);
      RxLL.data = f[i]; RxLL.src_rdy_n = 0;
      RxLL.sof_n = (i != 0);
      RxLL.eof_n = noend ? 1'b1 : (i != len - 1);
    end
    @(negedge Clk) RxLL = LL_IDLE;
    repeat (gap) @(negedge Clk);
  endtask

  int seen_cmd = 0, seen_str = 0;
  ex_t e;
  bit ignore = 0;   // an abandoned frame's bytes are passed until it is found stuck
  always @(posedge Clk) if (!Reset && !ignore && (CommandEn || StrDataEn)) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected enabled byte"); end
    else begin
      e = expq.pop_front();
      if (!EthRdyOut || EthDataOut !== e.b || CommandEn !== (e.kind == 1) || StrDataEn !== (e.kind == 2)) begin
        failures++; $display("FAIL byte %h exp %h kind %0d cmd %b str %b", EthDataOut, e.b, e.kind, CommandEn, StrDataEn);
      end
    end
    if (CommandEn) seen_cmd++;
    if (StrDataEn) seen_str++;
  end

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    send_frame(16'h8C35, 60, 12);
    send_frame(16'h8CA0, 120, 0);
    send_frame(16'h1234, 60, 0);
    send_frame(16'h8C35, 60, 0);
    send_frame(16'h8C35, 64, 30);
    send_frame(16'h8C36, 60, 5);
    send_frame(16'h8CA0, 100, 40);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bytes never enabled", expq.size()); end
    if (seen_cmd != (44 + 44 + 48)) begin failures++; $display("FAIL cmd bytes %0d", seen_cmd); end
    if (seen_str != (104 + 84)) begin failures++; $display("FAIL str bytes %0d", seen_str); end
    checks++;
    if (StuckFlag) failures++;
    ignore = 1;
    send_frame(16'h8C35, 230, 30, 1);
    ignore = 0;
    checks++;
    if (!StuckFlag) begin failures++; $display("FAIL stuck flag"); end
    @(negedge Clk) FlagReset = 1;
    @(negedge Clk) FlagReset = 0;
    checks++;
    if (StuckFlag) failures++;
    send_frame(16'h8C35, 60, 30);
    checks += 2;
    if (expq.size() != 0) failures++;
    if (SMFailure) failures++;
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
