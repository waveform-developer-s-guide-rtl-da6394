// ReceiveSignal: receive-side test waveform on the ADC clock.
//
// Three things happen here, as in the original receive block diagram:
// the loopback words from the transmit side (PRBS or streaming data, one per
// LoopbackValid pulse) feed the PrbsRx23 bit error rate tester; the 14-bit ADC
// samples pass two pipeline registers and their 11 most significant bits go to
// the data mux; and a second PRBS-23 generator makes receive-side test words.
// DataMux picks one of the three (Sel = RxSrc) on each WordEn and presents it
// as RxParallelData with a one-clock RxDataValid pulse, for streaming to the
// processor. ClearCounts zeroes the BERT counters.
module ReceiveSignal (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        WordEn,
  input  logic [1:0]  RxSrc,
  input  logic [13:0] AdcData,
  input  logic [15:0] LoopbackData,
  input  logic        LoopbackValid,
  input  logic        ClearCounts,
  output logic [15:0] RxParallelData,
  output logic        RxDataValid,
  output logic [63:0] BertBits,
  output logic [31:0] BertErrors,
  output logic        BertLocked,
  output logic [7:0]  SyncLosses
);
  logic [13:0] adc_r1, adc_r2;
  logic [15:0] prbs, lb_hold;

  always_ff @(posedge Clk) begin
    if (Reset) begin
      adc_r1  <= '0;
      adc_r2  <= '0;
      lb_hold <= '0;
    end else begin
      adc_r1 <= AdcData;
      adc_r2 <= adc_r1;
      if (LoopbackValid) lb_hold <= LoopbackData;
    end
  end

  PrbsRx23 u_bert (.Clk, .Reset, .WordEn(LoopbackValid), .DataIn(LoopbackData), .ClearCounts,
                   .BertBits, .BertErrors, .Locked(BertLocked), .SyncLosses);

  PrbsTx23 u_prbs (.Clk, .Reset, .WordEn, .DataOut(prbs));

  DataMux u_mux (.Clk, .Reset, .WordEn, .Sel(RxSrc), .AdcData(adc_r2[13:3]),
                 .LoopbackData(lb_hold), .PrbsData(prbs), .DataOut(RxParallelData),
                 .DataValid(RxDataValid));
endmodule
