// PrbsRx23: bit error rate tester for the x^23 + x^18 + 1 sequence.
//
// Words of 16 received bits (bit 15 first) arrive with WordEn. In the HUNT
// state the checker copies the received bits into its own 23-bit generator
// state; two words fill it, and the checker moves to LOCK. In LOCK it predicts
// each next word with its own generator, counts the bits that differ (two
// lookups in the ones-per-byte table of strs_radio_pkg), and adds 16 to
// BertBits and the differing bits to BertErrors. A word with more than
// LOSS_THRESHOLD errors means the checker has lost the sequence: it returns to
// HUNT (counted in SyncLosses) and that word is not counted. ClearCounts zeroes
// the counters. Counter widths (64 and 32 bits) and the byte error table follow
// the original design; the synchronisation rule is this design's choice.
module PrbsRx23
  import strs_radio_pkg::*;
#(
  parameter int LOSS_THRESHOLD = 6
) (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        WordEn,
  input  logic [15:0] DataIn,
  input  logic        ClearCounts,
  output logic [63:0] BertBits,
  output logic [31:0] BertErrors,
  output logic        Locked,
  output logic [7:0]  SyncLosses
);
  logic [22:0] state;
  logic [22:0] s;
  logic [15:0] pred;
  logic [15:0] diff;
  logic [4:0]  nerr;
  logic [22:0] hist_next;
  logic        second;

  always_comb begin
    s    = state;
    pred = '0;
    for (int i = 15; i >= 0; i--) begin
      pred[i] = s[22] ^ s[17];
      s       = {s[21:0], pred[i]};
    end
    diff      = pred ^ DataIn;
    nerr      = 5'(ones8(diff[15:8])) + 5'(ones8(diff[7:0]));
    hist_next = {state[6:0], DataIn};
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state      <= '0;
      Locked     <= 1'b0;
      second     <= 1'b0;
      BertBits   <= '0;
      BertErrors <= '0;
      SyncLosses <= '0;
    end else begin
      if (ClearCounts) begin
        BertBits   <= '0;
        BertErrors <= '0;
        SyncLosses <= '0;
      end
      if (WordEn) begin
        if (!Locked) begin
          state  <= hist_next;
          second <= ~second;
          if (second) Locked <= 1'b1;
        end else if (nerr > 5'(LOSS_THRESHOLD)) begin
          Locked     <= 1'b0;
          second     <= 1'b0;               // the bad word is dropped; hunt again
          SyncLosses <= SyncLosses + 8'd1;
        end else begin
          state <= s;
          if (!ClearCounts) begin
            BertBits   <= BertBits + 64'd16;
            BertErrors <= BertErrors + 32'(nerr);
          end
        end
      end
    end
  end
endmodule
