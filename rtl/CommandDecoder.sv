// CommandDecoder: executes test-waveform commands and builds their responses.
//
// On CmdReady the command ID and 40-bit data are decoded (IDs in
// strs_radio_pkg::cmd_id_e): write the 16-bit command register CmdRegOut
// (source selects and options for the signal paths), switch Rx-side streaming
// on or off, set the LEDs, read the dip switches, read the 36 status bits,
// read the BERT counters (64-bit bit count and 32-bit error count fill the 12
// response data bytes exactly), pulse FlagResetOut to clear status flags, or
// pulse ResetOut (commanded reset; no response is sent for it). Unknown IDs
// are answered with "rejected".
//
// The 120-bit Response is {header 0xAA, command ID, accepted/rejected, 12 data
// bytes}, data byte 0 in bits 95:88. When it is ready, TxSendReady pulses for
// one clock, but only while RespSending_n is high; a response built while the
// previous one is still being sent waits. After a pulse the decoder waits for
// RespSending_n to go low before it can pulse again. A command arriving while
// a response is waiting is ignored. The response layout and the port set
// follow the original design; the command IDs and their encoding are this
// design's choices.
module CommandDecoder
  import strs_radio_pkg::*;
(
  input  logic         Clk,
  input  logic         Reset,
  input  logic         CmdReady,
  input  logic [7:0]   CmdId,
  input  logic [39:0]  CmdData,
  input  logic [7:0]   DipSwitches,
  input  logic [35:0]  StatusBits,
  input  logic [63:0]  BertBits,
  input  logic [31:0]  BertErrors,
  input  logic         RespSending_n,
  output logic [119:0] Response,
  output logic         TxSendReady,
  output logic         ResetOut,
  output logic         FlagResetOut,
  output logic         StreamEnable,
  output logic [7:0]   LEDs,
  output logic [15:0]  CmdRegOut
);
  typedef enum logic [1:0] {R_IDLE = 2'd0, R_PENDING = 2'd1, R_WAIT_LOW = 2'd2} rstate_e;
  rstate_e rstate;

  logic        accept;
  logic [95:0] rdata;

  always_comb begin
    accept = 1'b1;
    rdata  = '0;
    case (cmd_id_e'(CmdId))
      CMD_WRITE_CMDREG: rdata[95:80] = CmdData[39:24];
      CMD_STREAM_EN:    rdata[95:88] = {7'd0, CmdData[32]};
      CMD_SET_LEDS:     rdata[95:88] = CmdData[39:32];
      CMD_READ_DIP:     rdata[95:88] = DipSwitches;
      CMD_STATUS:       rdata[95:56] = {4'd0, StatusBits};
      CMD_BERT:         rdata        = {BertBits, BertErrors};
      CMD_CLEAR_FLAGS:  rdata        = '0;
      CMD_SOFT_RESET:   rdata        = '0;
      default:          accept       = 1'b0;
    endcase
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      rstate       <= R_IDLE;
      Response     <= '0;
      TxSendReady  <= 1'b0;
      ResetOut     <= 1'b0;
      FlagResetOut <= 1'b0;
      StreamEnable <= 1'b0;
      LEDs         <= '0;
      CmdRegOut    <= '0;
    end else begin
      TxSendReady  <= 1'b0;
      ResetOut     <= 1'b0;
      FlagResetOut <= 1'b0;
      case (rstate)
        R_IDLE: begin
          if (CmdReady) begin
            case (cmd_id_e'(CmdId))
              CMD_WRITE_CMDREG: CmdRegOut    <= CmdData[39:24];
              CMD_STREAM_EN:    StreamEnable <= CmdData[32];
              CMD_SET_LEDS:     LEDs         <= CmdData[39:32];
              CMD_CLEAR_FLAGS:  FlagResetOut <= 1'b1;
              default: ;
            endcase
            if (cmd_id_e'(CmdId) == CMD_SOFT_RESET) ResetOut <= 1'b1;
            else begin
              Response <= {RESP_PKT_HEADER, CmdId, accept ? RESP_ACCEPTED : RESP_REJECTED, rdata};
              rstate   <= R_PENDING;
            end
          end
        end
        R_PENDING: begin
          if (RespSending_n) begin
            TxSendReady <= 1'b1;
            rstate      <= R_WAIT_LOW;
          end
        end
        R_WAIT_LOW: if (!RespSending_n) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
