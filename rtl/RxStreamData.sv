// RxStreamData: packs receive-side samples into streaming packets.
//
// Input side (ADC clock): while StreamEn is high (synchronised from the
// Ethernet clock by two flip-flops), every 16-bit word with DataValid is
// written into a dual-clock FIFO of FIFO_DEPTH words; a word that finds the
// FIFO full is lost and sets the sticky Overflow flag.
// Output side (Ethernet clock): when at least 256 words (512 bytes) wait in the
// FIFO, the module raises Req towards the output multiplexer and, once Grant is
// high, sends a DATA_PACKET_SIZE (557) byte frame on LL: the 42 header bytes
// from a PacketHeaderRom (port {STREAM_PKT_BYTE1,STREAM_PKT_BYTE2}), the
// payload header 0x55, 0x0A, 0x00 and 512 data bytes (high byte of each word
// first). Packets go out in groups of up to PACKET_NUM_CNT (4) with WAIT_CNT
// (500) idle clocks after each packet; Req stays high for the whole group and
// drops after it, and the module waits for Grant to fall before it asks again,
// so a command response can be sent between groups.
// Underflow (a read of an empty FIFO while sending) and SMFailure (undefined
// state) are sticky; FlagReset clears all flags. FlagReset reaches the ADC
// clock side as a toggle through two flip-flops, so a one-clock pulse is never
// missed whatever the ratio of the two clocks.
// Frame size, payload header, packet gap and group size follow the original
// design. The original uses a second, byte-wide FIFO that holds whole packets;
// here the packet is read straight out of the sample FIFO, which the
// 256-word threshold makes safe.
module RxStreamData
  import strs_radio_pkg::*;
#(
  parameter int ByteCnt    = DATA_PACKET_SIZE,
  parameter int WaitCnt    = WAIT_CNT,
  parameter int PacketNum  = PACKET_NUM_CNT,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        FlagReset,
  input  logic        StreamEn,
  output logic        Req,
  input  logic        Grant,
  output ll_t         LL,
  output logic        Underflow,
  output logic        SMFailure,
  input  logic        RxClk,
  input  logic        RxReset,
  input  logic [15:0] DataIn,
  input  logic        DataValid,
  output logic        Overflow
);
  localparam int PAYLOAD_WORDS = (ByteCnt - HEADER_SIZE - 3) / 2;
  localparam int CW = $clog2(ByteCnt > WaitCnt ? ByteCnt : WaitCnt) + 1;

  // ---- ADC-clock side ----------------------------------------------------
  // FlagReset is a one-clock pulse on Clk; it crosses as a toggle
  logic fr_tog;
  always_ff @(posedge Clk) begin
    if (Reset) fr_tog <= 1'b0;
    else if (FlagReset) fr_tog <= ~fr_tog;
  end

  logic en_s1, en_s2, fr_s1, fr_s2, fr_s3, full;
  always_ff @(posedge RxClk) begin
    if (RxReset) begin
      en_s1 <= 1'b0; en_s2 <= 1'b0; fr_s1 <= 1'b0; fr_s2 <= 1'b0; fr_s3 <= 1'b0; Overflow <= 1'b0;
    end else begin
      en_s1 <= StreamEn;
      en_s2 <= en_s1;
      fr_s1 <= fr_tog;
      fr_s2 <= fr_s1;
      fr_s3 <= fr_s2;
      if (fr_s2 != fr_s3) Overflow <= 1'b0;
      if (en_s2 && DataValid && full) Overflow <= 1'b1;
    end
  end

  logic        rd_en, empty;
  logic [15:0] rd_data;
  logic [$clog2(FIFO_DEPTH):0] rd_count;

  AsyncFifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(RxClk), .wr_rst(RxReset), .wr_en(en_s2 && DataValid), .wr_data(DataIn), .wr_full(full),
    .rd_clk(Clk), .rd_rst(Reset), .rd_en, .rd_data, .rd_empty(empty), .rd_count);

  // ---- Ethernet-clock side -----------------------------------------------
  typedef enum logic [2:0] {S_IDLE = 3'd0, S_REQ = 3'd1, S_SEND = 3'd2, S_WAIT = 3'd3, S_RELEASE = 3'd4} state_e;
  state_e state;
  logic [CW-1:0] idx;
  logic [2:0]    npkt;
  logic [7:0]    hdr, b;
  logic          have_packet;

  assign have_packet = rd_count >= ($bits(rd_count))'(PAYLOAD_WORDS);

  PacketHeaderRom #(.PAYLOAD_LEN(ByteCnt - HEADER_SIZE), .PORT({STREAM_PKT_BYTE1, STREAM_PKT_BYTE2}))
    u_rom (.Addr(6'(idx)), .Data(hdr));

  always_comb begin
    if      (idx <  CW'(HEADER_SIZE))     b = hdr;
    else if (idx == CW'(HEADER_SIZE))     b = STREAM_PKT_HEADER;
    else if (idx == CW'(HEADER_SIZE + 1)) b = STREAM_DATA_ID;
    else if (idx == CW'(HEADER_SIZE + 2)) b = 8'h00;
    else b = idx[0] ? rd_data[15:8] : rd_data[7:0];   // byte 45 (odd) is a high byte
  end

  assign rd_en = (state == S_SEND) && (idx > CW'(HEADER_SIZE + 2)) && !idx[0];
  assign Req   = (state == S_REQ) || (state == S_SEND) || (state == S_WAIT);

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state     <= S_IDLE;
      idx       <= '0;
      npkt      <= '0;
      LL        <= LL_IDLE;
      Underflow <= 1'b0;
      SMFailure <= 1'b0;
    end else begin
      if (FlagReset) begin
        Underflow <= 1'b0;
        SMFailure <= 1'b0;
      end
      LL <= LL_IDLE;
      case (state)
        S_IDLE: begin
          idx  <= '0;
          npkt <= '0;
          if (have_packet) state <= S_REQ;
        end
        S_REQ: if (Grant) state <= S_SEND;
        S_SEND: begin
          if (rd_en && empty) Underflow <= 1'b1;
          LL.data      <= b;
          LL.src_rdy_n <= 1'b0;
          LL.sof_n     <= (idx != '0);
          LL.eof_n     <= (idx != CW'(ByteCnt - 1));
          if (idx == CW'(ByteCnt - 1)) begin
            idx   <= '0;
            npkt  <= npkt + 3'd1;
            state <= S_WAIT;
          end else idx <= idx + 1'b1;
        end
        S_WAIT: begin
          if (idx == CW'(WaitCnt - 1)) begin
            idx   <= '0;
            state <= (npkt != 3'(PacketNum) && have_packet) ? S_SEND : S_RELEASE;
          end else idx <= idx + 1'b1;
        end
        S_RELEASE: if (!Grant) state <= S_IDLE;
        default: begin
          SMFailure <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
