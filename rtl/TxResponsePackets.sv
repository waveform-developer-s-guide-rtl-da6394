// TxResponsePackets: frames a command response for the Ethernet port.
//
// A one-clock RespSendReady pulse captures the 120-bit CmdResponse and raises
// Req towards the output multiplexer; RespSending_n goes low and stays low
// until the frame is sent. Once Grant is high the module sends PACKET_SIZE (60)
// bytes on its LocalLink output LL, one per clock: the 42 header bytes from a
// PacketHeaderRom (port {CMD_PKT_BYTE1,CMD_PKT_BYTE2}), the 15 response bytes
// (bits 119:112 first) and zero padding, with sof_n on the first and eof_n on
// the last byte. Req drops with the last byte. A RespSendReady pulse while a
// response is still pending sets the sticky Overflow flag and is dropped.
// SMFailure flags an undefined state. Frame length, payload size and header
// ROM follow the original design; the request/grant handshake and the use of
// a single response register instead of a response FIFO are this design's.
module TxResponsePackets
  import strs_radio_pkg::*;
#(
  parameter int CmdResponseSize = COMMAND_RESPONSE_SIZE,
  parameter int ByteCnt         = PACKET_SIZE
) (
  input  logic                       Clk,
  input  logic                       Reset,
  input  logic                       FlagReset,
  input  logic [CmdResponseSize-1:0] CmdResponse,
  input  logic                       RespSendReady,
  output logic                       RespSending_n,
  output logic                       Req,
  input  logic                       Grant,
  output ll_t                        LL,
  output logic                       Overflow,
  output logic                       SMFailure
);
  localparam int NRB = CmdResponseSize / 8;
  typedef enum logic [1:0] {S_IDLE = 2'd0, S_REQ = 2'd1, S_SEND = 2'd2} state_e;
  state_e state;
  logic [CmdResponseSize-1:0] resp;
  logic [$clog2(ByteCnt)-1:0] idx;
  logic [7:0] hdr, b;

  PacketHeaderRom #(.PAYLOAD_LEN(ByteCnt - HEADER_SIZE), .PORT({CMD_PKT_BYTE1, CMD_PKT_BYTE2}))
    u_rom (.Addr(6'(idx)), .Data(hdr));

  always_comb begin
    if (idx < ($bits(idx))'(HEADER_SIZE)) b = hdr;
    else if (idx < ($bits(idx))'(HEADER_SIZE + NRB)) b = resp[CmdResponseSize - 1 - 8 * (int'(idx) - HEADER_SIZE) -: 8];
    else b = 8'h00;
  end

  assign RespSending_n = (state == S_IDLE);
  assign Req           = (state == S_REQ) || (state == S_SEND && idx != ($bits(idx))'(ByteCnt - 1));

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state     <= S_IDLE;
      resp      <= '0;
      idx       <= '0;
      LL        <= LL_IDLE;
      Overflow  <= 1'b0;
      SMFailure <= 1'b0;
    end else begin
      if (FlagReset) begin
        Overflow  <= 1'b0;
        SMFailure <= 1'b0;
      end
      LL <= LL_IDLE;
      case (state)
        S_IDLE: begin
          idx <= '0;
          if (RespSendReady) begin
            resp  <= CmdResponse;
            state <= S_REQ;
          end
        end
        S_REQ: begin
          if (RespSendReady) Overflow <= 1'b1;
          if (Grant) state <= S_SEND;
        end
        S_SEND: begin
          if (RespSendReady) Overflow <= 1'b1;
          LL.data      <= b;
          LL.src_rdy_n <= 1'b0;
          LL.sof_n     <= (idx != '0);
          LL.eof_n     <= (idx != ($bits(idx))'(ByteCnt - 1));
          if (idx == ($bits(idx))'(ByteCnt - 1)) state <= S_IDLE;
          else idx <= idx + 1'b1;
        end
        default: begin
          SMFailure <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
