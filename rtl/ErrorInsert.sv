// ErrorInsert: deliberate bit errors in a 16-bit test data stream.
//
// DataOut follows DataIn combinationally. While Enable is high, every
// PERIOD-th word with WordEn high has its bit 0 inverted, so the receiving
// bit error rate tester should count one error per PERIOD*16 bits. Only the
// name of the error insertion module is given by the original design; the
// period and the inverted bit are this design's choices.
module ErrorInsert #(
  parameter int PERIOD = 64
) (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        Enable,
  input  logic        WordEn,
  input  logic [15:0] DataIn,
  output logic [15:0] DataOut
);
  logic [$clog2(PERIOD)-1:0] cnt;
  logic hit;
  assign hit     = Enable && (cnt == ($bits(cnt))'(PERIOD - 1));
  assign DataOut = {DataIn[15:1], DataIn[0] ^ hit};

  always_ff @(posedge Clk) begin
    if (Reset || !Enable) cnt <= '0;
    else if (WordEn) cnt <= hit ? '0 : cnt + 1'b1;
  end
endmodule
