// STRS_Waveform: the test waveform that exercises every wrapper interface.
//
// Command path (125 MHz Ethernet clock): CommandParse collects command
// payloads from the command packet stream (RxCmdDataIn while RxCmdDataSrcRdy
// is high); CommandDecoder executes them and hands the 120-bit CmdResponse to
// the wrapper with a TxSendReady pulse, holding it while RespSending_n is low.
// Transmit path (DAC clock): SineWaveGen, TxStreamData (Tx-side streaming
// packets to continuous words through the 262K FIFO) and TransmitSignal
// (source select, PRBS, error insertion, serialiser, NRZ-M, BPSK) produce
// DacDataOutI/Q and a loopback word per word enable.
// Receive path (ADC clock): ReceiveSignal runs the bit error rate tester on the
// loopback words and picks ADC, loopback or PRBS data as RxParallelData.
//
// Clock crossings: the command register goes to the DAC and ADC clock domains
// and the BERT counters come back through ClockDomainCrossing handshakes; the
// loopback words cross from the DAC to the ADC clock through a 16-word
// dual-clock FIFO; single flags use two flip-flops, and the one-clock flag
// reset pulse crosses as a toggle.
// Resets, as in the original transmit block diagram: the wrapper reset and the
// commanded reset (stretched to 16 Ethernet clocks) are combined, pass two registers on the DAC clock
// (SampleReset, the DAC-side reset) and then two on the Ethernet clock
// (MainReset, output as WFResetOut); a further two registers on the ADC clock
// give RxResetOut.
// The byte-rate clock enables of the original port list are not needed: the
// streaming FIFO is read a word at a time.
// Waveform status bits (StatusBitsIn bits 0..3, which the wrapper leaves zero):
// 0 Tx stream FIFO overflow, 1 Tx stream FIFO underflow, 2 BERT locked,
// 3 a command packet with a wrong header byte was seen.
module STRS_Waveform
  import strs_radio_pkg::*;
(
  input  logic         Clk125,
  input  logic         TxWFClock,
  input  logic         TxWFClockEn2,
  input  logic         SymbClockEn,
  input  logic         RxWFClock,
  input  logic         RxWFClockEn2,
  input  logic         Reset,
  input  logic [7:0]   DIP_SW,
  input  logic [7:0]   RxCmdDataIn,
  input  logic         RxCmdDataSrcRdy,
  input  logic [7:0]   StreamDataIn,
  input  logic         StreamDataValid,
  input  logic [35:0]  StatusBitsIn,
  input  logic         RespSending_n,
  input  logic [13:0]  AdcDataInI,
  output logic [15:0]  DacDataOutI,
  output logic [15:0]  DacDataOutQ,
  output logic         WFResetOut,
  output logic         RxResetOut,
  output logic         FlagResetOut,
  output logic         SoftResetOut,
  output logic [119:0] CmdResponse,
  output logic         TxSendReady,
  output logic         StreamEnRx,
  output logic [15:0]  RxParallelData,
  output logic         RxDataValid,
  output logic [7:0]   LED
);
  // ---- resets -----------------------------------------------------------
  logic [1:0] tx_rst_r, main_rst_r, rx_rst_r;
  logic       SampleReset, MainReset, RxReset;
  logic       reset_any;
  logic [3:0] soft_cnt;
  // the commanded reset is a one-clock pulse; it is held for 16 Ethernet
  // clocks so that the DAC clock always sees it
  always_ff @(posedge Clk125) begin
    if (Reset)             soft_cnt <= '0;
    else if (SoftResetOut) soft_cnt <= 4'd15;
    else if (soft_cnt != 0) soft_cnt <= soft_cnt - 4'd1;
  end
  assign reset_any = Reset | SoftResetOut | (soft_cnt != 4'd0);

  always_ff @(posedge TxWFClock) tx_rst_r   <= {tx_rst_r[0], reset_any};
  always_ff @(posedge Clk125)    main_rst_r <= {main_rst_r[0], SampleReset};
  always_ff @(posedge RxWFClock) rx_rst_r   <= {rx_rst_r[0], SampleReset};
  assign SampleReset = tx_rst_r[1];
  assign MainReset   = main_rst_r[1];
  assign RxReset     = rx_rst_r[1];
  assign WFResetOut  = MainReset;
  assign RxResetOut  = RxReset;

  // ---- command path -------------------------------------------------------
  logic        cmd_ready;
  logic [7:0]  cmd_id, bad_hdr;
  logic [39:0] cmd_data;
  logic [15:0] cmd_reg;
  logic [96:0] bert_rx, bert_g;
  logic        tx_ovf, tx_udf, tx_udf_s1, tx_udf_s2;

  CommandParse u_parse (.Clk(Clk125), .Reset(MainReset), .Frame(RxCmdDataSrcRdy), .DataIn(RxCmdDataIn),
                        .DataValid(RxCmdDataSrcRdy), .OutReady(cmd_ready), .CmdIdOut(cmd_id),
                        .CmdData(cmd_data), .BadHeaderCount(bad_hdr));

  logic [35:0] status_all;
  always_comb begin
    status_all    = StatusBitsIn;
    status_all[0] = tx_ovf;
    status_all[1] = tx_udf_s2;
    status_all[2] = bert_g[96];
    status_all[3] = (bad_hdr != 8'd0);
  end

  CommandDecoder u_dec (.Clk(Clk125), .Reset(MainReset), .CmdReady(cmd_ready), .CmdId(cmd_id),
                        .CmdData(cmd_data), .DipSwitches(DIP_SW), .StatusBits(status_all),
                        .BertBits(bert_g[95:32]), .BertErrors(bert_g[31:0]), .RespSending_n,
                        .Response(CmdResponse), .TxSendReady, .ResetOut(SoftResetOut),
                        .FlagResetOut, .StreamEnable(StreamEnRx), .LEDs(LED), .CmdRegOut(cmd_reg));

  // ---- transmit path (DAC clock) -----------------------------------------
  logic [15:0] cmd_reg_tx, cmd_reg_rx, stream_word, lb_word;
  logic        lb_valid;
  logic signed [15:0] sin_i, sin_q;
  logic [2:0]  fr_tx, fr_rx;
  logic        fr_tog, fr_tx_p, fr_rx_p;

  // FlagResetOut crosses to the DAC and ADC clocks as a toggle
  always_ff @(posedge Clk125) begin
    if (MainReset)         fr_tog <= 1'b0;
    else if (FlagResetOut) fr_tog <= ~fr_tog;
  end
  always_ff @(posedge TxWFClock) fr_tx <= {fr_tx[1:0], fr_tog};
  always_ff @(posedge RxWFClock) fr_rx <= {fr_rx[1:0], fr_tog};
  assign fr_tx_p = fr_tx[2] ^ fr_tx[1];
  assign fr_rx_p = fr_rx[2] ^ fr_rx[1];

  ClockDomainCrossing #(.WIDTH(16)) u_cdc_cmd_tx (.SrcClk(Clk125), .SrcReset(MainReset), .SrcData(cmd_reg),
                                                 .DstClk(TxWFClock), .DstReset(SampleReset),
                                                 .DstData(cmd_reg_tx), .DstValid());

  SineWaveGen u_sine (.Clk(TxWFClock), .Reset(SampleReset), .ClockEn(1'b1),
                      .PhaseInc({4'h0, cmd_reg_tx[CR_FREQ_LSB +: 8], 4'h0}), .SinOut(sin_i), .CosOut(sin_q));

  TxStreamData u_txs (.Clk125, .Reset125(MainReset), .FlagReset(FlagResetOut), .Frame(StreamDataValid),
                      .DataIn(StreamDataIn), .DataValid(StreamDataValid), .Overflow(tx_ovf),
                      .TxClk(TxWFClock), .TxReset(SampleReset), .FlagResetTx(fr_tx_p),
                      .WordEn(TxWFClockEn2), .StreamingData(stream_word), .Underflow(tx_udf));

  TransmitSignal u_tx (.Clk(TxWFClock), .Reset(SampleReset), .WordEn(TxWFClockEn2), .SymbEn(SymbClockEn),
                       .CmdReg(cmd_reg_tx), .SinI(sin_i), .SinQ(sin_q), .StreamingData(stream_word),
                       .DacI(DacDataOutI), .DacQ(DacDataOutQ), .Loopback(lb_word), .LoopbackValid(lb_valid));

  always_ff @(posedge Clk125) {tx_udf_s2, tx_udf_s1} <= {tx_udf_s1, tx_udf};

  // ---- loopback crossing DAC clock -> ADC clock ---------------------------
  logic        lb_empty;
  logic [15:0] lb_rx;
  logic        lb_rx_valid;
  AsyncFifo #(.WIDTH(16), .DEPTH(16)) u_lb_fifo (
    .wr_clk(TxWFClock), .wr_rst(SampleReset), .wr_en(lb_valid), .wr_data(lb_word), .wr_full(),
    .rd_clk(RxWFClock), .rd_rst(RxReset), .rd_en(!lb_empty), .rd_data(lb_rx), .rd_empty(lb_empty),
    .rd_count());
  assign lb_rx_valid = !lb_empty;

  // ---- receive path (ADC clock) ------------------------------------------
  logic [63:0] bert_bits;
  logic [31:0] bert_errs;
  logic        bert_locked;

  ClockDomainCrossing #(.WIDTH(16)) u_cdc_cmd_rx (.SrcClk(Clk125), .SrcReset(MainReset), .SrcData(cmd_reg),
                                                 .DstClk(RxWFClock), .DstReset(RxReset),
                                                 .DstData(cmd_reg_rx), .DstValid());

  ReceiveSignal u_rx (.Clk(RxWFClock), .Reset(RxReset), .WordEn(RxWFClockEn2),
                      .RxSrc(cmd_reg_rx[CR_RXSRC_LSB +: 2]), .AdcData(AdcDataInI),
                      .LoopbackData(lb_rx), .LoopbackValid(lb_rx_valid), .ClearCounts(fr_rx_p),
                      .RxParallelData, .RxDataValid, .BertBits(bert_bits), .BertErrors(bert_errs),
                      .BertLocked(bert_locked), .SyncLosses());

  assign bert_rx = {bert_locked, bert_bits, bert_errs};
  ClockDomainCrossing #(.WIDTH(97)) u_cdc_bert (.SrcClk(RxWFClock), .SrcReset(RxReset), .SrcData(bert_rx),
                                               .DstClk(Clk125), .DstReset(MainReset),
                                               .DstData(bert_g), .DstValid());
endmodule
