// STRS_SDR_Wrapper: FPGA wrapper of the software defined radio, with the test
// waveform in place.
//
// The wrapper hides the platform interfaces from the waveform. Commands and
// streaming data arrive from the host processor as UDP packets through the
// Ethernet MAC's LocalLink receive port (RxLL); EthernetRx sorts them by UDP
// source port and two RxPackets instances strip the headers (26 bytes for
// commands, 29 for streaming packets, which also lose their 3-byte payload
// header). The waveform (STRS_Waveform) answers commands and drives the DAC
// sample ports; OutputDataMux sends command responses and receive-side
// streaming packets back through the LocalLink transmit port (TxLL).
// ResetGen makes the system reset from the clock wizard's Locked, the push
// button and the commanded reset. Two ClockEnables instances derive the
// byte/word/symbol enables from the DAC clock (TxWFClock) and the ADC clock
// (RxWFClock). The ErrorFlag register collects the wrapper's sticky flags in
// the 36-bit StatusBits word given to the waveform:
//   11 EthernetRx stuck, 12 response packet overflow, 13 Rx sample FIFO
//   overflow, 14 Rx sample FIFO underflow, 19 ResetGen, 20 EthernetRx,
//   21 command RxPackets, 22 stream RxPackets, 23 and 35 response packet
//   builder, 25 and 27 streaming packet builder, 28 output mux (each: state
//   machine in an undefined state). Bits 15-18, 24 and 26 belong to FIFOs and
//   state machines this design merges away and read zero; bits 0-10 and 29-34
//   are left to the waveform.
// The clock wizard, the Ethernet MAC, the DAC/ADC pin interfaces and the RF
// configuration processor are outside this RTL: their clocks, Locked, the
// LocalLink bundles and the I/Q sample buses are ports. Only the ADC's I
// channel is used by the test waveform.
module STRS_SDR_Wrapper
  import strs_radio_pkg::*;
(
  input  logic        GtxClk,        // 125 MHz
  input  logic        TxWFClock,     // DAC clock, ~196.6 MHz
  input  logic        RxWFClock,     // ADC clock, ~196.6 MHz
  input  logic        Locked,
  input  logic        ResetButton,
  input  ll_t         RxLL,
  output ll_t         TxLL,
  input  logic [7:0]  DIP_SW,
  output logic [7:0]  LED,
  output logic [15:0] DacDataOutI,
  output logic [15:0] DacDataOutQ,
  input  logic [13:0] AdcDataInI
);
  logic SystemReset, rg_smf, soft_reset, flag_reset, wf_reset, rx_reset;
  logic [1:0] txr, rxr;
  logic [3:1] tx_en, rx_en;

  ResetGen u_rst (.Clk(GtxClk), .Enable(Locked), .SwitchReset(ResetButton), .SoftReset(soft_reset),
                  .SystemReset, .SMFailure(rg_smf));

  always_ff @(posedge TxWFClock) txr <= {txr[0], SystemReset};
  always_ff @(posedge RxWFClock) rxr <= {rxr[0], SystemReset};

  ClockEnables u_tx_ce (.Clk(TxWFClock), .Reset(txr[1]), .ClockEn(tx_en));
  ClockEnables u_rx_ce (.Clk(RxWFClock), .Reset(rxr[1]), .ClockEn(rx_en));

  // ---- Ethernet receive side ---------------------------------------------
  logic [7:0] eth_data, cmd_byte, str_byte;
  logic       eth_rdy, cmd_en, str_en, cmd_valid, str_valid;
  logic       stuck, erx_smf, rcp_smf, rsp_smf;

  EthernetRx u_erx (.Clk(GtxClk), .Reset(SystemReset), .FlagReset(flag_reset), .RxLL,
                    .EthDataOut(eth_data), .EthRdyOut(eth_rdy), .CommandEn(cmd_en), .StrDataEn(str_en),
                    .StuckFlag(stuck), .SMFailure(erx_smf));

  RxPackets #(.HeaderLen(REMAINING_HEADER_SIZE)) Inst_RxCommandPackets (
    .Clk(GtxClk), .Reset(SystemReset), .Enable(cmd_en), .DataIn(eth_data), .DataValid(eth_rdy),
    .DataOut(cmd_byte), .DataOutValid(cmd_valid), .SMFailure(rcp_smf));

  RxPackets #(.HeaderLen(REMAINING_HEADER_SIZE + 3)) Inst_RxStreamPackets (
    .Clk(GtxClk), .Reset(SystemReset), .Enable(str_en), .DataIn(eth_data), .DataValid(eth_rdy),
    .DataOut(str_byte), .DataOutValid(str_valid), .SMFailure(rsp_smf));

  // ---- waveform --------------------------------------------------------------
  logic [35:0]  StatusBits;
  logic [119:0] cmd_response;
  logic         send_ready, resp_sending_n, stream_en;
  logic [15:0]  rx_par;
  logic         rx_par_valid;

  STRS_Waveform u_wf (
    .Clk125(GtxClk), .TxWFClock, .TxWFClockEn2(tx_en[2]), .SymbClockEn(tx_en[3]),
    .RxWFClock, .RxWFClockEn2(rx_en[2]), .Reset(SystemReset), .DIP_SW,
    .RxCmdDataIn(cmd_byte), .RxCmdDataSrcRdy(cmd_valid), .StreamDataIn(str_byte), .StreamDataValid(str_valid),
    .StatusBitsIn(StatusBits), .RespSending_n(resp_sending_n), .AdcDataInI,
    .DacDataOutI, .DacDataOutQ, .WFResetOut(wf_reset), .RxResetOut(rx_reset), .FlagResetOut(flag_reset),
    .SoftResetOut(soft_reset), .CmdResponse(cmd_response), .TxSendReady(send_ready), .StreamEnRx(stream_en),
    .RxParallelData(rx_par), .RxDataValid(rx_par_valid), .LED);

  // ---- Ethernet transmit side --------------------------------------------
  logic resp_ovf, str_ovf, str_udf, resp_smf, strm_smf, mux_smf;
  logic [1:0] ovf_s;

  OutputDataMux u_odm (
    .Clk(GtxClk), .Reset(wf_reset), .FlagReset(flag_reset), .CmdResponse(cmd_response),
    .RespSendReady(send_ready), .RespSending_n(resp_sending_n), .StreamEn(stream_en),
    .RxClk(RxWFClock), .RxReset(rx_reset), .RxParallelData(rx_par), .RxDataValid(rx_par_valid),
    .TxLL, .RespOverflow(resp_ovf), .StreamOverflow(str_ovf), .StreamUnderflow(str_udf),
    .SMFailureResp(resp_smf), .SMFailureStream(strm_smf), .SMFailure(mux_smf));

  // ---- ErrorFlag: status word ----------------------------------------------
  always_ff @(posedge GtxClk) begin
    ovf_s <= {ovf_s[0], str_ovf};
    if (SystemReset) StatusBits <= '0;
    else begin
      StatusBits     <= '0;
      StatusBits[11] <= stuck;
      StatusBits[12] <= resp_ovf;
      StatusBits[13] <= ovf_s[1];
      StatusBits[14] <= str_udf;
      StatusBits[19] <= rg_smf;
      StatusBits[20] <= erx_smf;
      StatusBits[21] <= rcp_smf;
      StatusBits[22] <= rsp_smf;
      StatusBits[23] <= resp_smf;
      StatusBits[25] <= strm_smf;
      StatusBits[27] <= strm_smf;
      StatusBits[28] <= mux_smf;
      StatusBits[35] <= resp_smf;
    end
  end
endmodule
