// TxStreamData: turns streaming packets into a continuous sample stream.
//
// Write side (Ethernet clock): payload bytes of Tx-side streaming packets
// (DataIn with DataValid, Frame high for the packet) are paired, first byte in
// bits 15:8, and each pair is written as one word into a dual-clock FIFO of
// DEPTH words (the default, 131072 16-bit words, is 262,144 bytes). The byte
// pairing restarts when Frame is low.
// Read side (DAC clock): on each WordEn one word is popped and held on
// StreamingData. Before the first word arrives, and whenever the FIFO runs
// dry, StreamingData is zero. Sticky flags: Overflow (a word was written while
// the FIFO was full) in the Ethernet clock domain, Underflow (the FIFO ran dry
// after streaming had started) in the DAC clock domain; FlagReset (Ethernet
// domain) and FlagResetTx (DAC domain) clear them.
// The 262K FIFO and the packet-to-continuous conversion follow the original
// design; the FIFO width and the flag rules are this design's choices.
module TxStreamData #(
  parameter int DEPTH = 131072
) (
  input  logic        Clk125,
  input  logic        Reset125,
  input  logic        FlagReset,
  input  logic        Frame,
  input  logic [7:0]  DataIn,
  input  logic        DataValid,
  output logic        Overflow,
  input  logic        TxClk,
  input  logic        TxReset,
  input  logic        FlagResetTx,
  input  logic        WordEn,
  output logic [15:0] StreamingData,
  output logic        Underflow
);
  logic        phase;
  logic [7:0]  first;
  logic        wr_en, full, empty, running;
  logic [15:0] rd_data;

  assign wr_en = Frame && DataValid && phase;

  always_ff @(posedge Clk125) begin
    if (Reset125) begin
      phase    <= 1'b0;
      first    <= '0;
      Overflow <= 1'b0;
    end else begin
      if (FlagReset) Overflow <= 1'b0;
      if (!Frame) phase <= 1'b0;
      else if (DataValid) begin
        phase <= ~phase;
        if (!phase) first <= DataIn;
        else if (full) Overflow <= 1'b1;
      end
    end
  end

  AsyncFifo #(.WIDTH(16), .DEPTH(DEPTH)) u_fifo (
    .wr_clk(Clk125), .wr_rst(Reset125), .wr_en, .wr_data({first, DataIn}), .wr_full(full),
    .rd_clk(TxClk), .rd_rst(TxReset), .rd_en(WordEn), .rd_data, .rd_empty(empty), .rd_count());

  always_ff @(posedge TxClk) begin
    if (TxReset) begin
      StreamingData <= '0;
      running       <= 1'b0;
      Underflow     <= 1'b0;
    end else begin
      if (FlagResetTx) Underflow <= 1'b0;
      if (WordEn) begin
        if (!empty) begin
          StreamingData <= rd_data;
          running       <= 1'b1;
        end else begin
          StreamingData <= '0;
          if (running) Underflow <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end
endmodule
