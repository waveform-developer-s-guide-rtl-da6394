// TransmitSignal: chooses what the DAC sends and what is looped back.
//
// Runs on the DAC clock. The Tx source field of the command register
// (CmdReg[1:0], strs_radio_pkg::tx_src_e) selects the DAC samples:
//   TX_SINE        the quadrature tone from SineWaveGen,
//   TX_STREAM      the 16-bit streaming words on I (Q zero),
//   TX_PRBS_BPSK   the internal PRBS-23 words, serialised and BPSK modulated,
//   TX_STREAM_BPSK the streaming words, serialised and BPSK modulated.
// The test word (streaming word in the two streaming modes, PRBS word
// otherwise) passes through ErrorInsert (enabled by CmdReg[2]) and is taken by
// Parallel2Serial on each WordEn; the serial bits go through NrzL2M
// (differential NRZ-M coding when CmdReg[3] is high, plain NRZ-L otherwise)
// to BpskMod. With CmdReg[6] high the BPSK I samples come instead from
// PulseShapeFilter (root-raised-cosine, 8 samples per symbol), which takes the
// same symbols one symbol period later.
// The same test word is sent to the receive side as Loopback, with a one-clock
// LoopbackValid pulse, once per WordEn. DAC outputs are registered. The
// blocks and the loopback follow the original transmit block diagram; the
// source encoding is this design's choice.
module TransmitSignal
  import strs_radio_pkg::*;
(
  input  logic               Clk,
  input  logic               Reset,
  input  logic               WordEn,
  input  logic               SymbEn,
  input  logic        [15:0] CmdReg,
  input  logic signed [15:0] SinI,
  input  logic signed [15:0] SinQ,
  input  logic        [15:0] StreamingData,
  output logic signed [15:0] DacI,
  output logic signed [15:0] DacQ,
  output logic        [15:0] Loopback,
  output logic               LoopbackValid
);
  tx_src_e src;
  assign src = tx_src_e'(CmdReg[CR_TXSRC_LSB +: 2]);

  logic [15:0] prbs, word, tword;
  logic        bit_l, bit_m;
  logic signed [15:0] bi, bq, ps;

  PrbsTx23 u_prbs (.Clk, .Reset, .WordEn, .DataOut(prbs));

  assign word = (src == TX_STREAM || src == TX_STREAM_BPSK) ? StreamingData : prbs;

  ErrorInsert u_err (.Clk, .Reset, .Enable(CmdReg[CR_ERRINS]), .WordEn,
                     .DataIn(word), .DataOut(tword));

  Parallel2Serial u_p2s (.Clk, .Reset, .Load(WordEn), .SymbEn, .DataIn(tword), .BitOut(bit_l));
  NrzL2M          u_nrz (.Clk, .Reset, .SymbEn, .Bypass(!CmdReg[CR_NRZM]), .BitIn(bit_l), .BitOut(bit_m));
  BpskMod         u_mod (.Clk, .Reset, .BitIn(bit_m), .IOut(bi), .QOut(bq));
  PulseShapeFilter u_psf (.Clk, .Reset, .SymbEn, .BitIn(bit_m), .DataOut(ps));

  always_ff @(posedge Clk) begin
    if (Reset) begin
      DacI          <= '0;
      DacQ          <= '0;
      Loopback      <= '0;
      LoopbackValid <= 1'b0;
    end else begin
      unique case (src)
        TX_SINE:   begin DacI <= SinI;                  DacQ <= SinQ; end
        TX_STREAM: begin DacI <= signed'(StreamingData); DacQ <= '0;   end
        default:   begin DacI <= CmdReg[CR_PSF] ? ps : bi; DacQ <= bq;   end
      endcase
      LoopbackValid <= WordEn;
      if (WordEn) Loopback <= tword;
    end
  end
endmodule
