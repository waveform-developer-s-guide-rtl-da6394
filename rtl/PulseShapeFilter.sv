// PulseShapeFilter: x8 interpolating root-raised-cosine pulse-shaping filter
// for the BPSK transmitter.
//
// Each SymbEn takes one symbol (BitIn: 0 -> +1, 1 -> -1) into a shift
// register of the last SPAN+1 symbols and restarts a phase counter. On every
// clock the output is the sum over those symbols of +-h[phase + 8k], where h
// is a root-raised-cosine impulse response with roll-off ALPHA_X100/100,
// OSR samples per symbol and SPAN symbols long (OSR*SPAN+1 taps, centred on
// tap OSR*SPAN/2). This is the polyphase form of zero-stuffing the symbols to
// the sample rate and running the full FIR, with no multipliers. The taps are
// computed at elaboration (sine/cosine by Taylor series) and scaled so that
// the centre tap is PEAK; the output is registered, so it is valid one clock
// after the phase it belongs to, and the whole filter delays the symbol
// stream by OSR*SPAN/2 + 1 samples after its SymbEn. SymbEn must come every
// OSR clocks.
// The original design uses a vendor filter core that is only named (x8,
// roll-off 0.35 are read from its name); the root-raised-cosine shape, the
// span and the scaling are this design's choices.
module PulseShapeFilter #(
  parameter int OSR       = 8,
  parameter int SPAN      = 6,
  parameter int ALPHA_X100 = 35,
  parameter int PEAK      = 12000
) (
  input  logic               Clk,
  input  logic               Reset,
  input  logic               SymbEn,
  input  logic               BitIn,
  output logic signed [15:0] DataOut
);
  localparam int NT = OSR * SPAN + 1;
  localparam int NS = SPAN + 1;
  typedef int taps_t [NT];

  function automatic real sin_t(input real x);
    real pi = 3.14159265358979323846;
    real t, s;
    while (x > pi) x = x - 2.0 * pi;
    while (x < -pi) x = x + 2.0 * pi;
    if (x > pi / 2.0) x = pi - x;
    else if (x < -pi / 2.0) x = -pi - x;
    t = x;
    s = x;
    for (int k = 1; k < 9; k++) begin
      t = -t * x * x / real'((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return s;
  endfunction

  function automatic real rrc(input real t);   // t in symbols
    real pi = 3.14159265358979323846;
    real a = real'(ALPHA_X100) / 100.0;
    real d;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    d = pi * t * (1.0 - (4.0 * a * t) * (4.0 * a * t));
    return (sin_t(pi * t * (1.0 - a)) + 4.0 * a * t * sin_t(pi * t * (1.0 + a) + pi / 2.0)) / d;
  endfunction

  function automatic taps_t make_taps();
    taps_t h;
    real v, h0;
    h0 = rrc(0.0);
    for (int n = 0; n < NT; n++) begin
      v = real'(PEAK) * rrc(real'(n - NT / 2) / real'(OSR)) / h0;
      h[n] = v < 0.0 ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
    end
    return h;
  endfunction

  localparam taps_t H = make_taps();

  logic [NS-1:0] syms;                       // syms[0] is the newest symbol
  logic [$clog2(OSR)-1:0] phase;
  int acc;

  always_comb begin
    acc = 0;
    for (int k = 0; k < NS; k++) begin
      if (int'(phase) + OSR * k < NT)
        acc = syms[k] ? acc - H[int'(phase) + OSR * k] : acc + H[int'(phase) + OSR * k];
    end
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      syms    <= '0;
      phase   <= '0;
      DataOut <= '0;
    end else begin
      DataOut <= 16'(acc);
      if (SymbEn) begin
        syms  <= {syms[NS-2:0], BitIn};
        phase <= '0;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
