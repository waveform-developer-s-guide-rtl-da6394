// ClockEnables: three clock enables derived from one waveform clock.
//
// Each enable comes from its own counter that runs from 0 to END_COUNTn-1 and
// pulses ClockEn[n] for one clock when it reaches END_COUNTn-1, so enable n
// has the frequency f_clk / END_COUNTn. The wrapper uses one instance on the
// DAC clock and one on the ADC clock (enable 1 = byte rate, enable 2 = word
// rate, enable 3 = symbol rate). Three generics setting the frequencies follow
// the original design; the default counts are this design's choice and make
// the three rates commensurate (word = 2 bytes = 16 symbols). All counters
// clear together in reset, so the enables are phase aligned.
module ClockEnables #(
  parameter int END_COUNT1 = 64,
  parameter int END_COUNT2 = 128,
  parameter int END_COUNT3 = 8
) (
  input  logic       Clk,
  input  logic       Reset,
  output logic [3:1] ClockEn
);
  localparam int W = $clog2(END_COUNT1 > END_COUNT2 ? (END_COUNT1 > END_COUNT3 ? END_COUNT1 : END_COUNT3)
                                                    : (END_COUNT2 > END_COUNT3 ? END_COUNT2 : END_COUNT3)) + 1;
  localparam int END [1:3] = '{END_COUNT1, END_COUNT2, END_COUNT3};

  logic [W-1:0] cnt [1:3];

  for (genvar n = 1; n <= 3; n++) begin : g_en
    always_ff @(posedge Clk) begin
      if (Reset) begin
        cnt[n]     <= '0;
        ClockEn[n] <= 1'b0;
      end else if (cnt[n] == W'(END[n] - 1)) begin
        cnt[n]     <= '0;
        ClockEn[n] <= 1'b1;
      end else begin
        cnt[n]     <= cnt[n] + W'(1);
        ClockEn[n] <= 1'b0;
      end
    end
  end
endmodule
