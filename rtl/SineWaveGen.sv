// SineWaveGen: quadrature sine/cosine test tone.
//
// A 16-bit phase accumulator advances by PhaseInc on every clock with ClockEn
// high; its top LUT_BITS bits address a sine table. The cosine uses the same
// table a quarter turn ahead. Outputs are two's-complement, amplitude
// AMPLITUDE, registered (one clock after the phase they belong to), so the tone
// frequency is f_en * PhaseInc / 65536. The table is computed at elaboration
// from a Taylor series of sin(2*pi*k/2^LUT_BITS). The original design only
// names the sine generator and its 16-bit output; accumulator, table size and
// amplitude are this design's choices.
module SineWaveGen #(
  parameter int LUT_BITS  = 10,
  parameter int AMPLITUDE = 32000
) (
  input  logic               Clk,
  input  logic               Reset,
  input  logic               ClockEn,
  input  logic        [15:0] PhaseInc,
  output logic signed [15:0] SinOut,
  output logic signed [15:0] CosOut
);
  localparam int N = 1 << LUT_BITS;
  typedef logic signed [15:0] lut_t [N];

  function automatic real taylor_sin(input real x);
    real pi = 3.14159265358979323846;
    real t, s;
    if (x > pi) x = x - 2.0 * pi;               // x in (-pi, pi]
    if (x > pi / 2.0) x = pi - x;
    else if (x < -pi / 2.0) x = -pi - x;        // x in [-pi/2, pi/2]
    t = x;
    s = x;
    for (int k = 1; k < 9; k++) begin
      t = -t * x * x / real'((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return s;
  endfunction

  function automatic lut_t make_lut();
    lut_t l;
    real v;
    for (int k = 0; k < N; k++) begin
      v = real'(AMPLITUDE) * taylor_sin(2.0 * 3.14159265358979323846 * real'(k) / real'(N));
      l[k] = 16'(v < 0.0 ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5));
    end
    return l;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [15:0] phase;
  logic [LUT_BITS-1:0] ia, ib;
  assign ia = phase[15 -: LUT_BITS];
  assign ib = ia + LUT_BITS'(N / 4);

  always_ff @(posedge Clk) begin
    if (Reset) begin
      phase  <= '0;
      SinOut <= '0;
      CosOut <= '0;
    end else if (ClockEn) begin
      phase  <= phase + PhaseInc;
      SinOut <= LUT[ia];
      CosOut <= LUT[ib];
    end
  end
endmodule
