// OutputDataMux: shares the Ethernet transmit port between command responses
// and receive-side streaming packets.
//
// Contains TxResponsePackets and RxStreamData and an arbiter. When the port is
// free the arbiter grants it to a requesting response first, otherwise to a
// requesting stream; the grant is held until the owner drops its Req. A
// response owns the port for one 60-byte frame, the stream for a group of up
// to four packets, so a response waits at most one group. The owner's
// LocalLink bytes are registered once more and driven on TxLL (the 11-bit
// bundle of data, sof_n, eof_n and src_rdy_n). RespSending_n is low from the
// response request until its last byte. The structure (two packet builders
// feeding an 11-bit multiplexer) follows the original receive block diagram;
// the priority rule is this design's choice. SMFailure flags an undefined
// arbiter state; the packet builders' flags are passed out.
module OutputDataMux
  import strs_radio_pkg::*;
#(
  parameter int CmdResponseSize = COMMAND_RESPONSE_SIZE,
  parameter int WaitCnt         = WAIT_CNT,
  parameter int PacketNum       = PACKET_NUM_CNT
) (
  input  logic                       Clk,
  input  logic                       Reset,
  input  logic                       FlagReset,
  input  logic [CmdResponseSize-1:0] CmdResponse,
  input  logic                       RespSendReady,
  output logic                       RespSending_n,
  input  logic                       StreamEn,
  input  logic                       RxClk,
  input  logic                       RxReset,
  input  logic [15:0]                RxParallelData,
  input  logic                       RxDataValid,
  output ll_t                        TxLL,
  output logic                       RespOverflow,
  output logic                       StreamOverflow,
  output logic                       StreamUnderflow,
  output logic                       SMFailureResp,
  output logic                       SMFailureStream,
  output logic                       SMFailure
);
  typedef enum logic [1:0] {G_NONE = 2'd0, G_RESP = 2'd1, G_STREAM = 2'd2} grant_e;
  grant_e g;
  logic   req_r, req_s;
  ll_t    ll_r, ll_s;

  TxResponsePackets #(.CmdResponseSize(CmdResponseSize)) u_resp (
    .Clk, .Reset, .FlagReset, .CmdResponse, .RespSendReady, .RespSending_n,
    .Req(req_r), .Grant(g == G_RESP), .LL(ll_r), .Overflow(RespOverflow), .SMFailure(SMFailureResp));

  RxStreamData #(.WaitCnt(WaitCnt), .PacketNum(PacketNum)) u_stream (
    .Clk, .Reset, .FlagReset, .StreamEn, .Req(req_s), .Grant(g == G_STREAM), .LL(ll_s),
    .Underflow(StreamUnderflow), .SMFailure(SMFailureStream),
    .RxClk, .RxReset, .DataIn(RxParallelData), .DataValid(RxDataValid), .Overflow(StreamOverflow));

  always_ff @(posedge Clk) begin
    if (Reset) begin
      g         <= G_NONE;
      TxLL      <= LL_IDLE;
      SMFailure <= 1'b0;
    end else begin
      if (FlagReset) SMFailure <= 1'b0;
      case (g)
        G_NONE:   if (req_r) g <= G_RESP; else if (req_s) g <= G_STREAM;
        G_RESP:   if (!req_r) g <= G_NONE;
        G_STREAM: if (!req_s) g <= G_NONE;
        default: begin
          SMFailure <= 1'b1;
          g         <= G_NONE;
        end
      endcase
      TxLL <= !ll_r.src_rdy_n ? ll_r : ll_s;   // idle builders drive LL_IDLE
    end
  end

  // A frame never overlaps another on the port.
  property p_one_owner;
    @(posedge Clk) disable iff (Reset) !(ll_r.src_rdy_n == 1'b0 && ll_s.src_rdy_n == 1'b0);
  endproperty
  a_one_owner: assert property (p_one_owner);
endmodule
