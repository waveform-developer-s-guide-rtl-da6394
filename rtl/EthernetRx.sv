// EthernetRx: sorts received Ethernet frames into command and streaming packets.
//
// Frames arrive from the EMAC's LocalLink receive port (RxLL, one byte per
// clock between sof_n and eof_n, as in the LocalLink timing diagram). The UDP
// source port sits in the two bytes that follow byte SOURCE_PORT_BYTE (byte 0
// is the first MAC destination byte). A port of {CmdPktByte1,CmdPktByte2} marks
// a command packet, {StreamPktByte1,StreamPktByte2} a streaming packet; other
// frames are dropped. Because the decision is only known at byte 35, the bytes
// pass through a DELAY-cycle delay line, so that the enable (CommandEn or
// StrDataEn) can rise together with byte HEADER_SIZE-REMAINING_HEADER_SIZE (16)
// and leave exactly REMAINING_HEADER_SIZE (26) header bytes for RxPackets to
// strip. The enable stays high through the frame's last byte.
//
// Timing: EthDataOut/EthRdyOut follow the input by DELAY+1 clocks. A frame must
// arrive without gaps (src_rdy_n low from sof_n to eof_n). A frame still open
// after MAX_FRAME bytes sets the sticky StuckFlag and is abandoned; FlagReset
// clears it. SMFailure is set if the state register reaches an undefined value.
// Port values, header sizes and the two flags follow the original design; the
// delay line is this design's way of meeting the 26-byte remaining header.
module EthernetRx
  import strs_radio_pkg::*;
#(
  parameter logic [7:0] StreamPktByte1 = STREAM_PKT_BYTE1,
  parameter logic [7:0] StreamPktByte2 = STREAM_PKT_BYTE2,
  parameter logic [7:0] CmdPktByte1    = CMD_PKT_BYTE1,
  parameter logic [7:0] CmdPktByte2    = CMD_PKT_BYTE2,
  parameter int         MAX_FRAME      = 1536
) (
  input  logic       Clk,
  input  logic       Reset,
  input  logic       FlagReset,
  input  ll_t        RxLL,
  output logic [7:0] EthDataOut,
  output logic       EthRdyOut,
  output logic       CommandEn,
  output logic       StrDataEn,
  output logic       StuckFlag,
  output logic       SMFailure
);
  localparam int FIRST_EN = HEADER_SIZE - REMAINING_HEADER_SIZE;          // 16
  localparam int PORT_LSB = SOURCE_PORT_BYTE + 2;                         // 35
  localparam int DELAY    = PORT_LSB + 1 - FIRST_EN;                       // 20

  typedef enum logic [1:0] {K_NONE = 2'd0, K_CMD = 2'd1, K_STREAM = 2'd2} kind_e;
  typedef enum logic [1:0] {S_IDLE = 2'd0, S_FRAME = 2'd1} state_e;

  typedef struct packed {
    logic        v;
    logic        tag;
    logic [10:0] idx;
    logic [7:0]  d;
  } dl_t;

  state_e      state;
  logic [10:0] idx;
  logic        tag;
  logic [7:0]  port_msb;
  kind_e       kind [2];
  dl_t         dl [DELAY];
  dl_t         cur;

  logic in_v;
  assign in_v = !RxLL.src_rdy_n;

  // byte index of the current input byte
  logic [10:0] cur_idx;
  assign cur_idx = !RxLL.sof_n ? 11'd0 : idx;

  always_comb begin
    cur.v   = in_v && (state == S_FRAME || !RxLL.sof_n);
    cur.tag = !RxLL.sof_n ? ~tag : tag;
    cur.idx = cur_idx;
    cur.d   = RxLL.data;
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state     <= S_IDLE;
      idx       <= '0;
      tag       <= 1'b0;
      port_msb  <= '0;
      kind[0]   <= K_NONE;
      kind[1]   <= K_NONE;
      StuckFlag <= 1'b0;
      SMFailure <= 1'b0;
    end else begin
      if (FlagReset) begin
        StuckFlag <= 1'b0;
        SMFailure <= 1'b0;
      end
      case (state)
        S_IDLE: begin
          if (in_v && !RxLL.sof_n) begin
            tag       <= ~tag;
            kind[~tag] <= K_NONE;
            idx       <= 11'd1;
            state     <= RxLL.eof_n ? S_FRAME : S_IDLE;
          end
        end
        S_FRAME: begin
          if (in_v) begin
            if (!RxLL.sof_n) begin          // new frame without an end: restart
              tag        <= ~tag;
              kind[~tag] <= K_NONE;
              idx        <= 11'd1;
            end else begin
              idx <= idx + 11'd1;
              if (idx == 11'(PORT_LSB - 1)) port_msb <= RxLL.data;
              if (idx == 11'(PORT_LSB)) begin
                if (port_msb == CmdPktByte1 && RxLL.data == CmdPktByte2)
                  kind[tag] <= K_CMD;
                else if (port_msb == StreamPktByte1 && RxLL.data == StreamPktByte2)
                  kind[tag] <= K_STREAM;
              end
              if (!RxLL.eof_n) state <= S_IDLE;
              else if (idx == 11'(MAX_FRAME - 1)) begin
                StuckFlag <= 1'b1;
                kind[tag] <= K_NONE;
                state     <= S_IDLE;
              end
            end
          end
        end
        default: begin
          SMFailure <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end

  // delay line
  always_ff @(posedge Clk) begin
    if (Reset) begin
      for (int i = 0; i < DELAY; i++) dl[i] <= '0;
    end else begin
      dl[0] <= cur;
      for (int i = 1; i < DELAY; i++) dl[i] <= dl[i-1];
    end
  end

  // outputs
  dl_t o;
  assign o = dl[DELAY-1];
  always_ff @(posedge Clk) begin
    if (Reset) begin
      EthDataOut <= '0;
      EthRdyOut  <= 1'b0;
      CommandEn  <= 1'b0;
      StrDataEn  <= 1'b0;
    end else begin
      EthDataOut <= o.d;
      EthRdyOut  <= o.v;
      CommandEn  <= o.v && o.idx >= 11'(FIRST_EN) && kind[o.tag] == K_CMD;
      StrDataEn  <= o.v && o.idx >= 11'(FIRST_EN) && kind[o.tag] == K_STREAM;
    end
  end
endmodule
