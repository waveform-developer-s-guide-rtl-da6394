// Parallel2Serial: sends 16-bit words out one bit per symbol.
//
// On a clock with Load high the word DataIn is taken; on each later clock with
// SymbEn high the register shifts left, so BitOut shows bit 15 of the word
// first and bit 0 sixteenth. Load wins over SymbEn. With the default clock
// enables (one word enable per 16 symbol enables, aligned) every word is sent
// complete. Only the module name is given by the original design; the bit
// order is this design's choice.
module Parallel2Serial (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        Load,
  input  logic        SymbEn,
  input  logic [15:0] DataIn,
  output logic        BitOut
);
  logic [15:0] sh;
  assign BitOut = sh[15];
  always_ff @(posedge Clk) begin
    if (Reset)       sh <= '0;
    else if (Load)   sh <= DataIn;
    else if (SymbEn) sh <= {sh[14:0], 1'b0};
  end
endmodule
