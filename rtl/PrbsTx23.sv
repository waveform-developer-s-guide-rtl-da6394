// PrbsTx23: 23-stage pseudorandom bit sequence generator, 16 bits per word.
//
// The sequence is x^23 + x^18 + 1 (period 2^23-1): each new bit is the XOR of
// the bits generated 23 and 18 steps earlier. On every clock with WordEn high
// the generator advances 16 steps and loads the 16 new bits into DataOut, the
// earliest bit in bit 15. Reset loads the all-ones state. The original design
// names a 23-bit PRBS generator with a 16-bit word wrapper; the polynomial,
// bit order and seed are this design's choices.
module PrbsTx23 (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        WordEn,
  output logic [15:0] DataOut
);
  logic [22:0] state;
  logic [22:0] s;
  logic [15:0] w;

  always_comb begin
    s = state;
    w = '0;
    for (int i = 15; i >= 0; i--) begin
      w[i] = s[22] ^ s[17];
      s    = {s[21:0], w[i]};
    end
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state   <= '1;
      DataOut <= '0;
    end else if (WordEn) begin
      state   <= s;
      DataOut <= w;
    end
  end
endmodule
