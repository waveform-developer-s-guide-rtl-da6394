// BpskMod: binary phase-shift keying of a bit stream for the DAC.
//
// Each clock the symbol bit is mapped to an in-phase sample of +AMPLITUDE
// (bit 0) or -AMPLITUDE (bit 1); the quadrature sample is zero. Outputs are
// registered (one clock of latency). The original design names a BPSK
// modulator followed by an eight-times interpolating pulse-shaping filter;
// this module gives the rectangular pulses and PulseShapeFilter the shaped
// ones. The mapping and amplitude are this design's choices.
module BpskMod #(
  parameter int AMPLITUDE = 16000
) (
  input  logic               Clk,
  input  logic               Reset,
  input  logic               BitIn,
  output logic signed [15:0] IOut,
  output logic signed [15:0] QOut
);
  always_ff @(posedge Clk) begin
    if (Reset) begin
      IOut <= '0;
      QOut <= '0;
    end else begin
      IOut <= BitIn ? -16'(AMPLITUDE) : 16'(AMPLITUDE);
      QOut <= '0;
    end
  end
endmodule
