// DataMux: selects the receive-side word that is streamed to the processor.
//
// On each clock with WordEn high, DataOut takes the source chosen by Sel
// (strs_radio_pkg::rx_src_e): the 11 most significant ADC bits, sign-extended
// to 16 bits; the latest loopback word from the transmit side; or the
// receive-side PRBS word. Sel value 3 also selects the ADC. DataValid pulses
// for one clock with each new DataOut. The three inputs and their widths (11,
// 16, 16) follow the original receive block diagram; the select encoding is
// this design's choice.
module DataMux
  import strs_radio_pkg::*;
(
  input  logic        Clk,
  input  logic        Reset,
  input  logic        WordEn,
  input  logic [1:0]  Sel,
  input  logic [10:0] AdcData,
  input  logic [15:0] LoopbackData,
  input  logic [15:0] PrbsData,
  output logic [15:0] DataOut,
  output logic        DataValid
);
  always_ff @(posedge Clk) begin
    if (Reset) begin
      DataOut   <= '0;
      DataValid <= 1'b0;
    end else begin
      DataValid <= WordEn;
      if (WordEn) begin
        case (rx_src_e'(Sel))
          RX_LOOPBACK: DataOut <= LoopbackData;
          RX_PRBS:     DataOut <= PrbsData;
          default:     DataOut <= {{5{AdcData[10]}}, AdcData};
        endcase
      end
    end
  end
endmodule
