// NrzL2M: NRZ-L to NRZ-M (differential) line code.
//
// On each clock with SymbEn high the output level toggles when the input bit
// is 1 and holds when it is 0 (NRZ-M: "mark" changes the level). Bypass passes
// the NRZ-L bit straight through. The output is registered: it changes on the
// clock with SymbEn, one clock after the input bit was sampled. The original
// design names the converter; the bypass is this design's choice.
module NrzL2M (
  input  logic Clk,
  input  logic Reset,
  input  logic SymbEn,
  input  logic Bypass,
  input  logic BitIn,
  output logic BitOut
);
  logic level;
  always_ff @(posedge Clk) begin
    if (Reset) level <= 1'b0;
    else if (SymbEn) level <= Bypass ? BitIn : level ^ BitIn;
  end
  assign BitOut = level;
endmodule
